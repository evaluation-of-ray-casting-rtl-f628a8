// tb_pe_fsm: self-checking test of the configurable context FSM.
// Loads a transition table, then steps the machine with random condition
// inputs and stall, and compares the state after every edge with a model
// of the table, for both the normal and the stall transitions. Also checks that run = 0 holds the state at 0.
module tb_pe_fsm;
  import crc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, run = 0, stall = 0, st_fu = 0, cfg_we = 0;
  logic [3:0] st_port = 0;
  logic [2:0] st_reg = 0;
  logic [1:0] cfg_addr = 0, state;
  fsm_entry_t cfg_data;
  fsm_entry_t tbl [N];
  logic [1:0] exp_state;
  int checks = 0, failures = 0;

  pe_fsm #(.NCTX(N)) dut (.clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .st_port(st_port),
    .st_reg(st_reg), .st_fu(st_fu), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data), .state(state));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cond_of(ssrc_e c);
    case (c)
      SS_N: return st_port[0];
      SS_E: return st_port[1];
      SS_S: return st_port[2];
      SS_W: return st_port[3];
      SS_FU: return st_fu;
      SS_ONE: return 1'b1;
      SS_R0: return st_reg[0];
      SS_R1: return st_reg[1];
      SS_R2: return st_reg[2];
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    ssrc_e conds [9] = '{SS_N, SS_E, SS_S, SS_W, SS_FU, SS_ONE, SS_R0, SS_R1, SS_R2};
    cfg_data = '0;
    #12 rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      // new random table
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        tbl[i].cond = conds[$urandom % 9];
        tbl[i].next_true = 5'($urandom % N);
        tbl[i].next_false = 5'($urandom % N);
        tbl[i].stall_true = 5'($urandom % N);
        tbl[i].stall_false = 5'($urandom % N);
        cfg_we = 1; cfg_addr = 2'(i); cfg_data = tbl[i];
      end
      @(negedge clk); cfg_we = 0; run = 0;
      @(negedge clk);
      checks++; if (state !== 0) begin failures++; $display("FAIL run=0 state %0d", state); end
      run = 1;
      exp_state = 0;
      for (int n = 0; n < 200; n++) begin
        st_port = 4'($urandom); st_reg = 3'($urandom); st_fu = 1'($urandom);
        stall = ($urandom % 5) == 0;
        #1;
        if (stall) exp_state = cond_of(tbl[exp_state].cond) ? 2'(tbl[exp_state].stall_true) : 2'(tbl[exp_state].stall_false);
        else if (cond_of(tbl[exp_state].cond)) exp_state = 2'(tbl[exp_state].next_true);
        else exp_state = 2'(tbl[exp_state].next_false);
        @(negedge clk);
        checks++;
        if (state !== exp_state) begin failures++; $display("FAIL state %0d exp %0d", state, exp_state); end
      end
      run = 0; stall = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
