// tb_pe_ctx_mem: self-checking test of the context memory with 24 contexts
// (low-area size). Checks that reset leaves the all-zero idle context, that
// written words read back asynchronously in the same cycle, and that a
// write to one context leaves the others unchanged.
module tb_pe_ctx_mem;
  import crc_pkg::*;
  localparam int N = 24;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  ctx_t wdata, rdata;
  ctx_t model [N];
  int checks = 0, failures = 0;

  pe_ctx_mem #(.NCTX(N)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctx_t rnd_ctx();
    logic [CTXW-1:0] v;
    for (int i = 0; i < CTXW; i += 32) v[i +: 32] = $urandom;
    return ctx_t'(v);
  endfunction

  initial begin
    wdata = '0;
    #12 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      model[i] = '0;
      raddr = 5'(i); #1;
      checks++; if (rdata !== '0) begin failures++; $display("FAIL reset ctx %0d", i); end
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom % N); wdata = rnd_ctx();
      @(posedge clk); #1;
      model[waddr] = wdata;
      we = 0;
      for (int i = 0; i < N; i++) begin
        raddr = 5'(i); #1;
        checks++;
        if (rdata !== model[i]) begin failures++; $display("FAIL ctx %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
