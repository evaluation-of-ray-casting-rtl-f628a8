// pe_ctx_mem: context memory of a processing element.
//
// Holds NCTX context words. The word selected by the FSM state drives the
// PE in the same cycle (asynchronous read), so a context switch costs only
// the read delay, a fraction of a clock cycle, as the design study states.
// Words are written only by the boot-time configuration port. On reset every
// word clears to the all-zero context, which performs no operation and loads
// no register, so an unconfigured PE stays idle.
// NCTX defaults to 4 (high-throughput instance); the low-area instance uses 24.
module pe_ctx_mem
  import crc_pkg::*;
#(
  parameter int NCTX = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(NCTX)-1:0] waddr,
  input  ctx_t                    wdata,
  input  logic [$clog2(NCTX)-1:0] raddr,
  output ctx_t                    rdata
);

  ctx_t mem [NCTX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < NCTX)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < NCTX) ? mem[raddr] : '0;

endmodule
