// pe_fsm: configurable finite state machine that selects the context.
//
// A Medvedev machine: the state is the context number, so the context of a
// clock cycle is the state register itself. Each state has one configured
// transition entry: a status bit to test (a port status input, a status
// register or the FU status) and the next state for true and for false,
// once for the normal case and once for the case that the global stall
// input is high. A cache miss can so move every PE to a context reserved
// for the stall that also records which context is to follow once the
// stall ends, since the status bit tested in the stalled cycle will have
// moved on by then. The stall input and the one-test-per-state form are
// this implementation's choices. While run is low the state is held at 0.
// Timing: the condition sampled in cycle t selects the context of cycle t+1.
module pe_fsm
  import crc_pkg::*;
#(
  parameter int NCTX = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic                    stall,
  input  logic [3:0]              st_port,   // status inputs N, E, S, W
  input  logic [NSREG-1:0]        st_reg,
  input  logic                    st_fu,
  // configuration
  input  logic                    cfg_we,
  input  logic [$clog2(NCTX)-1:0] cfg_addr,
  input  fsm_entry_t              cfg_data,
  output logic [$clog2(NCTX)-1:0] state
);

  localparam int SW = $clog2(NCTX);

  fsm_entry_t tbl [NCTX];
  fsm_entry_t cur;
  logic       cond;
  logic [4:0] nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) tbl[i] <= '0;
    end else if (cfg_we && (int'(cfg_addr) < NCTX)) begin
      tbl[cfg_addr] <= cfg_data;
    end
  end

  assign cur = (int'(state) < NCTX) ? tbl[state] : '0;

  always_comb begin
    unique case (cur.cond)
      SS_N:    cond = st_port[0];
      SS_E:    cond = st_port[1];
      SS_S:    cond = st_port[2];
      SS_W:    cond = st_port[3];
      SS_FU:   cond = st_fu;
      SS_ONE:  cond = 1'b1;
      SS_R0:   cond = st_reg[0];
      SS_R1:   cond = st_reg[1];
      SS_R2:   cond = st_reg[2];
      default: cond = 1'b0;
    endcase
    unique case ({stall, cond})
      2'b00:   nxt = cur.next_false;
      2'b01:   nxt = cur.next_true;
      2'b10:   nxt = cur.stall_false;
      default: nxt = cur.stall_true;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= '0;
    else if (!run) state <= '0;
    else if (int'(nxt) < NCTX) state <= nxt[SW-1:0];
    else           state <= '0;
  end

endmodule
