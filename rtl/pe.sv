// pe: processing element of the reconfigurable core.
//
// A PE contains a functional unit (FU), 7 data registers, 3 status
// registers, a context memory, a configurable FSM and four output ports
// (N, E, S, W), each with two 32-bit data channels and one status channel,
// plus a left-to-right data channel that enters at W and leaves at E and
// serves to carry data past a pipeline stage with matching latency.
//
// Every clock cycle the FSM state selects one context word. That word sets
// the FU operation and its operands (neighbour inputs, registers, the
// left-to-right input or an immediate), which register takes the result,
// and what every output channel carries. Operating the FU and routing data
// between neighbours happen in the same cycle. All outputs are registered:
// a value computed or routed in cycle t is seen by the neighbour in cycle
// t+1. While run is low the PE executes the all-zero context (no operation,
// nothing loads). Configuration writes arrive on a shared bus (cfg) and are
// decoded by PE_ID.
//
// Structure, counts and widths follow the design study (its PE figure and
// the refined interconnect); the registered outputs, the immediate operand
// and all encodings are this implementation's own.
module pe
  import crc_pkg::*;
#(
  parameter int NCTX  = 4,
  parameter int PE_ID = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     stall,
  input  cfg_req_t                 cfg,
  input  logic [3:0][1:0][DW-1:0]  din,    // [dir][channel], dir as dir_e
  input  logic [3:0]               sin,
  input  logic [DW-1:0]            lr_in,
  output logic [3:0][1:0][DW-1:0]  dout,
  output logic [3:0]               sout,
  output logic [DW-1:0]            lr_out,
  output logic [$clog2(NCTX)-1:0]  ctx_id   // current context, for observation
);

  ctx_t                      ctx_raw, ctx;
  logic                      ctx_we, fsm_we;
  logic [$clog2(NCTX)-1:0]   cfg_addr;
  ctx_t                      cfg_ctx;
  fsm_entry_t                cfg_fsm;
  logic [NDREG-1:0][DW-1:0]  dreg;
  logic [NSREG-1:0][0:0]     sreg;
  logic [31:0][DW-1:0]       osrc, dsrc;
  logic [15:0]               ssrc;
  logic [DW-1:0]             fu_a, fu_b, fu_y;
  logic                      fu_c, fu_s;
  logic [NSREG-1:0]          sreg_flat;

  pe_cfg #(.NCTX(NCTX), .PE_ID(PE_ID)) u_cfg (
    .cfg(cfg), .ctx_we(ctx_we), .fsm_we(fsm_we), .addr(cfg_addr),
    .ctx_data(cfg_ctx), .fsm_data(cfg_fsm)
  );

  pe_ctx_mem #(.NCTX(NCTX)) u_ctx (
    .clk(clk), .rst_n(rst_n), .we(ctx_we), .waddr(cfg_addr), .wdata(cfg_ctx),
    .raddr(ctx_id), .rdata(ctx_raw)
  );

  assign ctx = run ? ctx_raw : '0;

  for (genvar i = 0; i < NSREG; i++) begin : g_sflat
    assign sreg_flat[i] = sreg[i][0];
  end

  pe_fsm #(.NCTX(NCTX)) u_fsm (
    .clk(clk), .rst_n(rst_n), .run(run), .stall(stall),
    .st_port(sin), .st_reg(sreg_flat), .st_fu(fu_s),
    .cfg_we(fsm_we), .cfg_addr(cfg_addr), .cfg_data(cfg_fsm),
    .state(ctx_id)
  );

  // Operand sources (everything but the FU itself) and routing sources.
  always_comb begin
    osrc = '0;
    for (int d = 0; d < 4; d++) begin
      osrc[d]     = din[d][0];
      osrc[4 + d] = din[d][1];
    end
    osrc[DS_LR]  = lr_in;
    osrc[DS_IMM] = sext_imm(ctx.imm);
    for (int r = 0; r < NDREG; r++) osrc[16 + r] = dreg[r];
    dsrc = osrc;
    dsrc[DS_FU] = fu_y;
  end

  always_comb begin
    ssrc = '0;
    ssrc[3:0]     = sin;
    ssrc[SS_FU]   = fu_s;
    ssrc[SS_ONE]  = 1'b1;
    ssrc[10:8]    = sreg_flat;
  end

  assign fu_a = osrc[ctx.a_sel];
  assign fu_b = osrc[ctx.b_sel];
  always_comb begin
    fu_c = 1'b0;
    unique case (ctx.c_sel)
      SS_N: fu_c = sin[0];
      SS_E: fu_c = sin[1];
      SS_S: fu_c = sin[2];
      SS_W: fu_c = sin[3];
      SS_ONE: fu_c = 1'b1;
      SS_R0: fu_c = sreg_flat[0];
      SS_R1: fu_c = sreg_flat[1];
      SS_R2: fu_c = sreg_flat[2];
      default: fu_c = 1'b0;
    endcase
  end

  pe_fu u_fu (.op(ctx.op), .a(fu_a), .b(fu_b), .c(fu_c), .y(fu_y), .s(fu_s));

  pe_regfile #(.N(NDREG), .W(DW)) u_dreg (
    .clk(clk), .rst_n(rst_n), .we(ctx.dreg_we), .widx(ctx.dreg_idx),
    .wdata(fu_y), .q(dreg)
  );

  pe_regfile #(.N(NSREG), .W(1)) u_sreg (
    .clk(clk), .rst_n(rst_n), .we(ctx.sreg_we), .widx(ctx.sreg_idx),
    .wdata(fu_s), .q(sreg)
  );

  for (genvar d = 0; d < 4; d++) begin : g_port
    pe_port u_port (
      .clk(clk), .rst_n(rst_n), .cfg(ctx.port[d]), .dsrc(dsrc), .ssrc(ssrc),
      .dout(dout[d]), .sout(sout[d])
    );
  end

  // Left-to-right channel: one register, loaded when the context enables it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        lr_out <= '0;
    else if (ctx.lr.en) lr_out <= dsrc[ctx.lr.sel];
  end

endmodule
