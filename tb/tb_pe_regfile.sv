// tb_pe_regfile: self-checking test of the PE register file, in the data
// configuration (7 x 32 bits). Random writes are mirrored in a local model
// and all words compared after every clock edge.
module tb_pe_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] widx = 0;
  logic [31:0] wdata = 0;
  logic [6:0][31:0] q;
  logic [31:0] model [7];
  int checks = 0, failures = 0;

  pe_regfile #(.N(7), .W(32)) dut (.clk(clk), .rst_n(rst_n), .we(we), .widx(widx), .wdata(wdata), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (q[i] !== model[i]) begin failures++; $display("FAIL r%0d=%h exp %h", i, q[i], model[i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < 7; i++) model[i] = 0;
    #12 rst_n = 1;
    compare();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      widx = 3'($urandom % 8);
      wdata = $urandom;
      @(posedge clk); #1;
      if (we && widx < 7) model[widx] = wdata;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
