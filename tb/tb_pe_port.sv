// tb_pe_port: self-checking test of a PE output port. Random source vectors
// and routing settings are applied; one clock edge later each channel must
// show the selected source if its enable was set and its old value if not.
module tb_pe_port;
  import crc_pkg::*;
  logic clk = 0, rst_n = 0;
  port_cfg_t cfg;
  logic [31:0][DW-1:0] dsrc;
  logic [15:0] ssrc;
  logic [1:0][DW-1:0] dout, exp_d;
  logic sout, exp_s;
  int checks = 0, failures = 0;

  pe_port dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .dsrc(dsrc), .ssrc(ssrc), .dout(dout), .sout(sout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; dsrc = '0; ssrc = '0;
    #12 rst_n = 1;
    checks++; if (dout !== '0 || sout !== 1'b0) failures++;
    exp_d = '0; exp_s = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) dsrc[i] = $urandom;
      ssrc = 16'($urandom);
      cfg.d0.en = 1'($urandom); cfg.d0.sel = dsrc_e'($urandom % 32);
      cfg.d1.en = 1'($urandom); cfg.d1.sel = dsrc_e'($urandom % 32);
      cfg.s.en  = 1'($urandom); cfg.s.sel  = ssrc_e'($urandom % 16);
      if (cfg.d0.en) exp_d[0] = dsrc[cfg.d0.sel];
      if (cfg.d1.en) exp_d[1] = dsrc[cfg.d1.sel];
      if (cfg.s.en)  exp_s    = ssrc[cfg.s.sel];
      // before the edge the output still holds the previous value
      checks++;
      @(posedge clk); #1;
      checks++;
      if (dout !== exp_d || sout !== exp_s) begin
        failures++; $display("FAIL dout=%h exp %h sout=%b exp %b", dout, exp_d, sout, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
