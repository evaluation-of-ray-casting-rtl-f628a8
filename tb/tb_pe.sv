// tb_pe: self-checking test of one processing element.
// Configures a small program through the configuration bus:
//   context 0: E0 <= W0 + W1, r2 <= W0 + W1, E1 <= r2, N1 <= W0,
//              E status <= W status, LR <= LR input
//   context 1: E0 <= S-status ? N0 : -5, status register 1 <= FU status,
//              S status <= status register 1, E1 <= r2
//   contexts 2, 3: stall contexts, nothing loads
//   FSM: states 0 and 1 go to 1 if the N status input is 1, else to 0;
//        under stall they go to 3 or 2 instead, which then stay while
//        the stall lasts and afterwards resume at 1 or 0.
// Inputs are random; a cycle model of the program predicts every output.
// Also counts context switches and stall cycles and requires both to occur.
module tb_pe;
  import crc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, stall = 0;
  cfg_req_t cfg;
  logic [3:0][1:0][DW-1:0] din, dout;
  logic [3:0] sin, sout;
  logic [DW-1:0] lr_in, lr_out;
  logic [1:0] ctx_id;
  int checks = 0, failures = 0, switches = 0, stalls = 0;

  pe #(.NCTX(4), .PE_ID(9)) dut (.clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .cfg(cfg),
    .din(din), .sin(sin), .lr_in(lr_in), .dout(dout), .sout(sout), .lr_out(lr_out), .ctx_id(ctx_id));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_tgt_e t, int addr, logic [CTXW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.tgt = t; cfg.id = 8'd9; cfg.addr = 6'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic fsm_entry_t fe(int t, int f, int st, int sf);
    fsm_entry_t e;
    e.cond = SS_N; e.next_true = 5'(t); e.next_false = 5'(f); e.stall_true = 5'(st); e.stall_false = 5'(sf);
    return e;
  endfunction

  // model state
  int st;
  logic [DW-1:0] r2, e0, e1, n1, lr, n0x;
  logic es, ss, sr1;

  initial begin
    ctx_t c0, c1;
    logic [DW-1:0] sum;
    cfg = '0; din = '0; sin = '0; lr_in = '0;
    c0 = '0;
    c0.op = OP_ADD; c0.a_sel = DS_W0; c0.b_sel = DS_W1; c0.dreg_we = 1; c0.dreg_idx = 3'd2;
    c0.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
    c0.port[DIR_E].d1 = '{en: 1'b1, sel: DS_R2};
    c0.port[DIR_N].d1 = '{en: 1'b1, sel: DS_W0};
    c0.port[DIR_E].s  = '{en: 1'b1, sel: SS_W};
    c0.lr = '{en: 1'b1, sel: DS_LR};
    c1 = '0;
    c1.op = OP_SEL; c1.a_sel = DS_N0; c1.b_sel = DS_IMM; c1.c_sel = SS_S; c1.imm = 16'hFFFB;
    c1.sreg_we = 1; c1.sreg_idx = 2'd1;
    c1.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
    c1.port[DIR_E].d1 = '{en: 1'b1, sel: DS_R2};
    c1.port[DIR_S].s  = '{en: 1'b1, sel: SS_R1};
    #12 rst_n = 1;
    wr(CFG_CTX, 0, CTXW'(c0));
    wr(CFG_CTX, 1, CTXW'(c1));
    wr(CFG_FSM, 0, CTXW'(fe(1, 0, 3, 2)));
    wr(CFG_FSM, 1, CTXW'(fe(1, 0, 3, 2)));
    wr(CFG_FSM, 2, CTXW'(fe(0, 0, 2, 2)));
    wr(CFG_FSM, 3, CTXW'(fe(1, 1, 3, 3)));
    // a write for another PE must not land here
    c0.op = OP_SUB;
    @(negedge clk); cfg.we = 1; cfg.tgt = CFG_CTX; cfg.id = 8'd8; cfg.addr = 0; cfg.data = CTXW'(c0);
    @(negedge clk); cfg.we = 0;
    // while run is low nothing loads
    din[DIR_W][0] = 32'd5; #1;
    @(posedge clk); #1;
    checks++; if (dout !== '0 || lr_out !== '0 || ctx_id !== 0) begin failures++; $display("FAIL idle"); end
    @(negedge clk); run = 1;
    st = 0; r2 = 0; e0 = 0; e1 = 0; n1 = 0; lr = 0; es = 0; ss = 0; sr1 = 0;
    for (int n = 0; n < 600; n++) begin
      for (int d = 0; d < 4; d++) begin din[d][0] = $urandom; din[d][1] = $urandom; end
      sin = 4'($urandom); lr_in = $urandom;
      stall = ($urandom % 8) == 0;
      #1;
      checks++;
      if (ctx_id !== 2'(st)) begin failures++; $display("FAIL ctx %0d exp %0d", ctx_id, st); end
      // model one clock edge
      case (st)
        0: begin
          sum = din[DIR_W][0] + din[DIR_W][1];
          e0 = sum; e1 = r2; n1 = din[DIR_W][0]; es = sin[DIR_W]; lr = lr_in; r2 = sum;
        end
        1: begin
          n0x = sin[DIR_S] ? din[DIR_N][0] : 32'hFFFF_FFFB;
          e0 = n0x; e1 = r2; ss = sr1; sr1 = (n0x != 0);
        end
        default: ;
      endcase
      begin
        int nx;
        if (st < 2) nx = stall ? (sin[DIR_N] ? 3 : 2) : (sin[DIR_N] ? 1 : 0);
        else        nx = stall ? st : st - 2;
        if (nx != st) switches++;
        if (st >= 2) stalls++;
        st = nx;
      end
      @(posedge clk); #1;
      checks++;
      if (dout[DIR_E][0] !== e0 || dout[DIR_E][1] !== e1 || dout[DIR_N][1] !== n1 ||
          sout[DIR_E] !== es || sout[DIR_S] !== ss || lr_out !== lr) begin
        failures++;
        $display("FAIL n=%0d e0=%h/%h e1=%h/%h n1=%h/%h es=%b/%b ss=%b/%b lr=%h/%h", n, dout[DIR_E][0], e0,
          dout[DIR_E][1], e1, dout[DIR_N][1], n1, sout[DIR_E], es, sout[DIR_S], ss, lr_out, lr);
      end
      // channels never routed stay 0
      checks++;
      if (dout[DIR_W] !== '0 || dout[DIR_S] !== '0 || dout[DIR_N][0] !== '0) failures++;
      @(negedge clk);
    end
    checks++; if (switches == 0) begin failures++; $display("FAIL no context switch"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall context"); end
    $display("context switches=%0d stall cycles=%0d", switches, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
