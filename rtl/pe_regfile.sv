// pe_regfile: register file of a processing element, used twice per PE:
// once with 7 words of 32 bits (data registers) and once with 3 words of
// 1 bit (status registers), the counts the design study settles on.
//
// All words are visible at once (the routing muxes of the PE read any of
// them in the same cycle); one word can be written per clock cycle, selected
// by the context. Registers clear on reset. Writes take effect at the next
// rising clock edge. The single write port is this implementation's choice.
module pe_regfile #(
  parameter int N = 7,
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] widx,
  input  logic [W-1:0]         wdata,
  output logic [N-1:0][W-1:0]  q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (we && (int'(widx) < N)) q[widx] <= wdata;
  end

endmodule
