// crc_pkg: types and constants shared by the processing elements (PEs), the
// PE array, the memory buses and the top of the reconfigurable core.
//
// The data path is 32 bits wide and the multiplier takes two 16-bit operands
// to a 32-bit product, as the ray casting source code requires. Each PE holds
// 7 data registers and 3 status registers. Those numbers follow the design
// study; the encodings below (operation codes, operand selects, the layout of
// a context word and of a configuration write) are this implementation's own.
//
// A context word fixes, for one clock cycle, the FU operation, its operands,
// the register write-back and, for every output channel of the PE, which
// source is routed there and whether its output register loads.
package crc_pkg;

  localparam int DW     = 32;  // data path width D
  localparam int NDREG  = 7;   // data registers per PE
  localparam int NSREG  = 3;   // status registers per PE
  localparam int IMMW   = 16;  // immediate field, sign-extended to DW
  localparam int VOXW   = 16;  // width of one voxel in a memory block

  // Operations of the functional unit: the C operators without / and %,
  // plus a select for if-else branches inside one context.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // result 0, status 0
    OP_PASS = 5'd1,   // a
    OP_ADD  = 5'd2,   // a + b
    OP_SUB  = 5'd3,   // a - b
    OP_MUL  = 5'd4,   // signed a[15:0] * b[15:0], 32-bit product
    OP_MULU = 5'd5,   // unsigned a[15:0] * b[15:0]
    OP_AND  = 5'd6,   // a & b
    OP_OR   = 5'd7,   // a | b
    OP_XOR  = 5'd8,   // a ^ b
    OP_NOT  = 5'd9,   // ~a
    OP_NEG  = 5'd10,  // -a
    OP_SHL  = 5'd11,  // a << b[4:0]
    OP_SHR  = 5'd12,  // a >> b[4:0] (logical)
    OP_SRA  = 5'd13,  // a >>> b[4:0] (arithmetic)
    OP_EQ   = 5'd14,  // a == b
    OP_NE   = 5'd15,  // a != b
    OP_LT   = 5'd16,  // signed a < b
    OP_LE   = 5'd17,  // signed a <= b
    OP_GT   = 5'd18,  // signed a > b
    OP_GE   = 5'd19,  // signed a >= b
    OP_LTU  = 5'd20,  // unsigned a < b
    OP_LAND = 5'd21,  // a && b
    OP_LOR  = 5'd22,  // a || b
    OP_LNOT = 5'd23,  // !a
    OP_SEL  = 5'd24   // c ? a : b
  } fu_op_e;

  // Data sources: the two data channels of each neighbour port, the
  // left-to-right channel, the immediate, the FU result and the registers.
  typedef enum logic [4:0] {
    DS_N0 = 5'd0, DS_E0 = 5'd1, DS_S0 = 5'd2, DS_W0 = 5'd3,
    DS_N1 = 5'd4, DS_E1 = 5'd5, DS_S1 = 5'd6, DS_W1 = 5'd7,
    DS_LR = 5'd8, DS_IMM = 5'd9, DS_FU = 5'd10,
    DS_R0 = 5'd16, DS_R1 = 5'd17, DS_R2 = 5'd18, DS_R3 = 5'd19,
    DS_R4 = 5'd20, DS_R5 = 5'd21, DS_R6 = 5'd22
  } dsrc_e;

  // Status (1-bit) sources.
  typedef enum logic [3:0] {
    SS_N = 4'd0, SS_E = 4'd1, SS_S = 4'd2, SS_W = 4'd3,
    SS_FU = 4'd4, SS_ZERO = 4'd5, SS_ONE = 4'd6,
    SS_R0 = 4'd8, SS_R1 = 4'd9, SS_R2 = 4'd10
  } ssrc_e;

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // One output data channel: what it carries and whether its register loads.
  typedef struct packed {
    logic  en;
    dsrc_e sel;
  } dout_cfg_t;

  typedef struct packed {
    logic  en;
    ssrc_e sel;
  } sout_cfg_t;

  // Routing of one neighbour port: two data channels and one status channel.
  typedef struct packed {
    dout_cfg_t d1;
    dout_cfg_t d0;
    sout_cfg_t s;
  } port_cfg_t;

  // One context word.
  typedef struct packed {
    fu_op_e          op;
    dsrc_e           a_sel;
    dsrc_e           b_sel;
    ssrc_e           c_sel;
    logic [IMMW-1:0] imm;
    logic            dreg_we;
    logic [2:0]      dreg_idx;
    logic            sreg_we;
    logic [1:0]      sreg_idx;
    port_cfg_t [3:0] port;     // indexed by dir_e
    dout_cfg_t       lr;       // left-to-right channel towards E
  } ctx_t;

  localparam int CTXW = $bits(ctx_t);

  // One FSM transition entry, one per state (= context). The next state is
  // chosen by the tested status bit and by the global stall input, so a
  // stall can move to a stall context that remembers where to resume.
  typedef struct packed {
    ssrc_e      cond;          // status bit tested
    logic [4:0] next_true;
    logic [4:0] next_false;
    logic [4:0] stall_true;    // taken while the memory system stalls
    logic [4:0] stall_false;
  } fsm_entry_t;

  localparam int FSMW = $bits(fsm_entry_t);

  typedef enum logic [1:0] {
    CFG_CTX    = 2'd0,  // context word: id = PE, addr = context
    CFG_FSM    = 2'd1,  // FSM entry:    id = PE, addr = state
    CFG_BUS_A  = 2'd2,  // bus address source: id = bus, addr = memory
    CFG_BUS_R  = 2'd3   // bus read routing:   id = bus, addr = 2*column+channel
  } cfg_tgt_e;

  // A configuration write, issued at boot time.
  typedef struct packed {
    logic            we;
    cfg_tgt_e        tgt;
    logic [7:0]      id;
    logic [5:0]      addr;
    logic [CTXW-1:0] data;
  } cfg_req_t;

  function automatic logic [DW-1:0] sext_imm(input logic [IMMW-1:0] v);
    return {{(DW-IMMW){v[IMMW-1]}}, v};
  endfunction

endpackage
