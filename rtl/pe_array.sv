// pe_array: ROWS x COLS identical processing elements joined by the refined
// nearest-neighbour interconnect.
//
// Between every pair of horizontally or vertically adjacent PEs there are
// two 32-bit data channels and one status channel in each direction (the
// second data channel set is what the refined interconnect adds to the
// initial one). In addition, a left-to-right data channel joins each PE to
// its eastern neighbour only. The channels at the border of the array are
// brought out as ports for I/O and for the memory buses. All PEs share the
// configuration bus, the run input and the stall input; PE (r, c) answers
// to configuration id r*COLS + c. Every PE output is registered, so a hop
// from one PE to the next takes one clock cycle.
// Defaults: 4 x 15 PEs with 4 contexts (high-throughput instance: 5 columns
// of voxel fetch, 10 of resampling); the low-area instance is 4 x 2 with 24.
module pe_array
  import crc_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 15,
  parameter int NCTX = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  logic                          stall,
  input  cfg_req_t                      cfg,
  // north border
  input  logic [COLS-1:0][1:0][DW-1:0]  n_din,
  input  logic [COLS-1:0]               n_sin,
  output logic [COLS-1:0][1:0][DW-1:0]  n_dout,
  output logic [COLS-1:0]               n_sout,
  // south border
  input  logic [COLS-1:0][1:0][DW-1:0]  s_din,
  input  logic [COLS-1:0]               s_sin,
  output logic [COLS-1:0][1:0][DW-1:0]  s_dout,
  output logic [COLS-1:0]               s_sout,
  // west border
  input  logic [ROWS-1:0][1:0][DW-1:0]  w_din,
  input  logic [ROWS-1:0]               w_sin,
  input  logic [ROWS-1:0][DW-1:0]       w_lr_in,
  output logic [ROWS-1:0][1:0][DW-1:0]  w_dout,
  output logic [ROWS-1:0]               w_sout,
  // east border
  input  logic [ROWS-1:0][1:0][DW-1:0]  e_din,
  input  logic [ROWS-1:0]               e_sin,
  output logic [ROWS-1:0][1:0][DW-1:0]  e_dout,
  output logic [ROWS-1:0]               e_sout,
  output logic [ROWS-1:0][DW-1:0]       e_lr_out,
  // current context of every PE, for observation
  output logic [ROWS-1:0][COLS-1:0][$clog2(NCTX)-1:0] ctx_ids
);

  logic [3:0][1:0][DW-1:0] pdin  [ROWS][COLS];
  logic [3:0][1:0][DW-1:0] pdout [ROWS][COLS];
  logic [3:0]              psin  [ROWS][COLS];
  logic [3:0]              psout [ROWS][COLS];
  logic [DW-1:0]           plr_in  [ROWS][COLS];
  logic [DW-1:0]           plr_out [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // north input
      if (r == 0) begin : g_nb
        assign pdin[r][c][DIR_N] = n_din[c];
        assign psin[r][c][DIR_N] = n_sin[c];
        assign n_dout[c]         = pdout[r][c][DIR_N];
        assign n_sout[c]         = psout[r][c][DIR_N];
      end else begin : g_ni
        assign pdin[r][c][DIR_N] = pdout[r-1][c][DIR_S];
        assign psin[r][c][DIR_N] = psout[r-1][c][DIR_S];
      end
      // south input
      if (r == ROWS-1) begin : g_sb
        assign pdin[r][c][DIR_S] = s_din[c];
        assign psin[r][c][DIR_S] = s_sin[c];
        assign s_dout[c]         = pdout[r][c][DIR_S];
        assign s_sout[c]         = psout[r][c][DIR_S];
      end else begin : g_si
        assign pdin[r][c][DIR_S] = pdout[r+1][c][DIR_N];
        assign psin[r][c][DIR_S] = psout[r+1][c][DIR_N];
      end
      // west input and left-to-right channel
      if (c == 0) begin : g_wb
        assign pdin[r][c][DIR_W] = w_din[r];
        assign psin[r][c][DIR_W] = w_sin[r];
        assign plr_in[r][c]      = w_lr_in[r];
        assign w_dout[r]         = pdout[r][c][DIR_W];
        assign w_sout[r]         = psout[r][c][DIR_W];
      end else begin : g_wi
        assign pdin[r][c][DIR_W] = pdout[r][c-1][DIR_E];
        assign psin[r][c][DIR_W] = psout[r][c-1][DIR_E];
        assign plr_in[r][c]      = plr_out[r][c-1];
      end
      // east input
      if (c == COLS-1) begin : g_eb
        assign pdin[r][c][DIR_E] = e_din[r];
        assign psin[r][c][DIR_E] = e_sin[r];
        assign e_dout[r]         = pdout[r][c][DIR_E];
        assign e_sout[r]         = psout[r][c][DIR_E];
        assign e_lr_out[r]       = plr_out[r][c];
      end else begin : g_ei
        assign pdin[r][c][DIR_E] = pdout[r][c+1][DIR_W];
        assign psin[r][c][DIR_E] = psout[r][c+1][DIR_W];
      end

      pe #(.NCTX(NCTX), .PE_ID(r*COLS + c)) u_pe (
        .clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .cfg(cfg),
        .din(pdin[r][c]), .sin(psin[r][c]), .lr_in(plr_in[r][c]),
        .dout(pdout[r][c]), .sout(psout[r][c]), .lr_out(plr_out[r][c]),
        .ctx_id(ctx_ids[r][c])
      );
    end
  end

endmodule
