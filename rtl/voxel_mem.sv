// voxel_mem: one memory block of the reconfigurable core.
//
// Caches a sub-cube of the volume data set, 16 x 16 x 16 voxels by default
// (DEPTH = 4096). Eight such blocks with identical contents let the array
// fetch the 2 x 2 x 2 neighbourhood of one sample per clock cycle. Reading
// is synchronous: an address presented in cycle t gives its voxel in cycle
// t+1, so the data reach the resampling stage one cycle after voxel fetch
// produced the address. The read address normally comes from the memory
// bus; the cache controller attached to the block can take it over
// (ovr_en) to re-read a line it has just refilled, and owns the write port.
// The read register is a pipeline register between voxel fetch and
// resampling, so it freezes together with the PE array: while hold is high
// it keeps its value, unless the override reads. The voxel width (16 bits),
// the hold input and the override port are this implementation's choices.
module voxel_mem #(
  parameter int DEPTH = 4096,
  parameter int VW    = 16
) (
  input  logic                     clk,
  input  logic                     hold,
  input  logic [$clog2(DEPTH)-1:0] bus_addr,
  input  logic                     ovr_en,
  input  logic [$clog2(DEPTH)-1:0] ovr_addr,
  output logic [VW-1:0]            rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [VW-1:0]            wdata
);

  logic [VW-1:0]            mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] raddr;

  assign raddr = ovr_en ? ovr_addr : bus_addr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (ovr_en || !hold) rdata <= mem[raddr];
  end

endmodule
