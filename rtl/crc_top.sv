// crc_top: reconfigurable core instance for the voxel fetch and resampling
// stages of ray casting.
//
// A ROWS x COLS array of processing elements sits between two memory buses.
// Above and below the array there are NMEM_SIDE memory blocks each, all
// holding the same 16^3-voxel sub-cube, so that the border PEs can fetch up
// to 2*NMEM_SIDE voxels per clock cycle. The default is the high-throughput
// instance: 4 x 15 PEs (5 columns for voxel fetch, 10 for resampling), 4
// contexts per PE, 4 + 4 memory blocks, one sample per clock cycle. The
// low-area instance is ROWS=4, COLS=2, NCTX=24, NMEM_SIDE=1 and takes 15
// cycles per sample. Which PE does what is set entirely by the boot-time
// configuration written through cfg (PE ids 0 .. ROWS*COLS-1; bus ids 0 for
// the top bus and 1 for the bottom bus).
//
// The cache controllers, which refill the memory blocks from external
// memory, are outside this module: each block's write port and read-address
// override come in as cc_* ports, the address each block sees on the bus
// goes out as mem_addr, and a controller that misses raises stall. Stall
// reaches every PE's FSM, which then switches to the contexts reserved for
// a stall. Since a context switch takes effect one cycle after its
// condition, the array is frozen in the cycles after stall is high; the
// memory read registers are held in exactly those cycles (stall_q). West and east border channels and the status channels of the
// north and south borders are the I/O of the core.
// Memory blocks 0 .. NMEM_SIDE-1 are on top, the others at the bottom.
module crc_top
  import crc_pkg::*;
#(
  parameter int ROWS      = 4,
  parameter int COLS      = 15,
  parameter int NCTX      = 4,
  parameter int NMEM_SIDE = 4,
  parameter int MEM_DEPTH = 4096,
  localparam int AW       = $clog2(MEM_DEPTH),
  localparam int NMEM     = 2*NMEM_SIDE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  logic                          stall,
  input  cfg_req_t                      cfg,
  // west border (input side of the pipeline)
  input  logic [ROWS-1:0][1:0][DW-1:0]  w_din,
  input  logic [ROWS-1:0]               w_sin,
  input  logic [ROWS-1:0][DW-1:0]       w_lr_in,
  output logic [ROWS-1:0][1:0][DW-1:0]  w_dout,
  output logic [ROWS-1:0]               w_sout,
  // east border (output side of the pipeline)
  input  logic [ROWS-1:0][1:0][DW-1:0]  e_din,
  input  logic [ROWS-1:0]               e_sin,
  output logic [ROWS-1:0][1:0][DW-1:0]  e_dout,
  output logic [ROWS-1:0]               e_sout,
  output logic [ROWS-1:0][DW-1:0]       e_lr_out,
  // status channels of the north and south borders
  input  logic [COLS-1:0]               n_sin,
  output logic [COLS-1:0]               n_sout,
  input  logic [COLS-1:0]               s_sin,
  output logic [COLS-1:0]               s_sout,
  // cache controller side of the memory blocks
  input  logic [NMEM-1:0]               cc_we,
  input  logic [NMEM-1:0][AW-1:0]       cc_waddr,
  input  logic [NMEM-1:0][VOXW-1:0]     cc_wdata,
  input  logic [NMEM-1:0]               cc_ovr_en,
  input  logic [NMEM-1:0][AW-1:0]       cc_ovr_addr,
  output logic [NMEM-1:0][AW-1:0]       mem_addr,
  // current context of every PE
  output logic [ROWS-1:0][COLS-1:0][$clog2(NCTX)-1:0] ctx_ids
);

  logic [COLS-1:0][1:0][DW-1:0] n_din, n_dout, s_din, s_dout;
  logic [NMEM-1:0][VOXW-1:0]    mem_rdata;
  logic                         stall_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stall_q <= 1'b0;
    else        stall_q <= stall && run;
  end

  pe_array #(.ROWS(ROWS), .COLS(COLS), .NCTX(NCTX)) u_array (
    .clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .cfg(cfg),
    .n_din(n_din), .n_sin(n_sin), .n_dout(n_dout), .n_sout(n_sout),
    .s_din(s_din), .s_sin(s_sin), .s_dout(s_dout), .s_sout(s_sout),
    .w_din(w_din), .w_sin(w_sin), .w_lr_in(w_lr_in), .w_dout(w_dout), .w_sout(w_sout),
    .e_din(e_din), .e_sin(e_sin), .e_dout(e_dout), .e_sout(e_sout), .e_lr_out(e_lr_out),
    .ctx_ids(ctx_ids)
  );

  mem_bus #(.COLS(COLS), .NMEM(NMEM_SIDE), .AW(AW), .BUS_ID(0)) u_bus_top (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .pe_dout(n_dout), .pe_din(n_din),
    .mem_addr(mem_addr[NMEM_SIDE-1:0]), .mem_rdata(mem_rdata[NMEM_SIDE-1:0])
  );

  mem_bus #(.COLS(COLS), .NMEM(NMEM_SIDE), .AW(AW), .BUS_ID(1)) u_bus_bot (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .pe_dout(s_dout), .pe_din(s_din),
    .mem_addr(mem_addr[NMEM-1:NMEM_SIDE]), .mem_rdata(mem_rdata[NMEM-1:NMEM_SIDE])
  );

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    voxel_mem #(.DEPTH(MEM_DEPTH), .VW(VOXW)) u_mem (
      .clk(clk), .hold(stall_q), .bus_addr(mem_addr[m]), .ovr_en(cc_ovr_en[m]), .ovr_addr(cc_ovr_addr[m]),
      .rdata(mem_rdata[m]), .we(cc_we[m]), .waddr(cc_waddr[m]), .wdata(cc_wdata[m])
    );
  end

endmodule
