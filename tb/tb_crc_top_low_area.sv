// tb_crc_top_low_area: end-to-end test of the low-area instance of the
// core: 4 x 2 PEs, 24 contexts per PE, one memory block above and one below.
//
// Instead of one column per pipeline stage, each stage is spread over the
// contexts of a single PE, and every PE steps through its contexts once per
// sample: one sample takes 15 clock cycles.
//   PE (0,0), voxel fetch, contexts 0-14 in turn:
//     0: r0 = y*16   1: r1 = x>>4   2: r0 += r1   3: r0 += z*256 (from PE (1,0))
//     4: r1 = r0+1, N0 <= r0 (addr0)   5: N0 <= r1 (addr1)   6: E0 <= x & 15
//     Both addresses go to the single top memory block, one cycle apart.
//   PE (0,1), resampling:
//     0: r3 = 5 (counter)   6: r0 = v0   7: r1 = v1, then branch on the mode
//     bit (W status) to
//       linear  (8-11): r2 = r1-r0; r2 *= fx; r2 >>>= 4; E0 <= r2 + r0; 12-14 idle
//       nearest (16-18): s0 = fx >= 8; E0 <= s0 ? r1 : r0; context 18 counts
//       r3 down to 0 and stays until then, so both branches take 15 cycles.
// The result of every sample is compared with a reference at the end of its
// 15-cycle period, and the context sequence is checked to repeat every 15
// cycles.
module tb_crc_top_low_area;
  import crc_pkg::*;
  localparam int ROWS = 4, COLS = 2, NCTX = 24, NMEM = 2, NS = 60, PER = 15;

  logic clk = 0, rst_n = 0, run = 0;
  cfg_req_t cfg;
  logic [ROWS-1:0][1:0][DW-1:0] w_din, w_dout, e_din, e_dout;
  logic [ROWS-1:0] w_sin, w_sout, e_sin, e_sout;
  logic [ROWS-1:0][DW-1:0] w_lr_in, e_lr_out;
  logic [COLS-1:0] n_sin, n_sout, s_sin, s_sout;
  logic [NMEM-1:0] cc_we, cc_ovr_en;
  logic [NMEM-1:0][11:0] cc_waddr, cc_ovr_addr, mem_addr;
  logic [NMEM-1:0][VOXW-1:0] cc_wdata;
  logic [ROWS-1:0][COLS-1:0][4:0] ctx_ids;

  int checks = 0, failures = 0, n_lin = 0, n_nn = 0, n_count = 0;

  crc_top #(.ROWS(ROWS), .COLS(COLS), .NCTX(NCTX), .NMEM_SIDE(1)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .stall(1'b0), .cfg(cfg),
    .w_din(w_din), .w_sin(w_sin), .w_lr_in(w_lr_in), .w_dout(w_dout), .w_sout(w_sout),
    .e_din(e_din), .e_sin(e_sin), .e_dout(e_dout), .e_sout(e_sout), .e_lr_out(e_lr_out),
    .n_sin(n_sin), .n_sout(n_sout), .s_sin(s_sin), .s_sout(s_sout),
    .cc_we(cc_we), .cc_waddr(cc_waddr), .cc_wdata(cc_wdata), .cc_ovr_en(cc_ovr_en),
    .cc_ovr_addr(cc_ovr_addr), .mem_addr(mem_addr), .ctx_ids(ctx_ids));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] vox(int a);
    return 16'((a * 53 + 7) % 4096);
  endfunction

  function automatic logic [31:0] pixel(int x, int y, int z, int m);
    int a0, v0, v1, fx;
    a0 = z*256 + y*16 + (x >> 4);
    v0 = int'(vox(a0)); v1 = int'(vox(a0 + 1)); fx = x & 15;
    if (m == 0) return 32'(v0 + (((v1 - v0) * fx) >>> 4));
    else        return 32'((fx >= 8) ? v1 : v0);
  endfunction

  task automatic cfg_wr(cfg_tgt_e t, int id, int addr, logic [CTXW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.tgt = t; cfg.id = 8'(id); cfg.addr = 6'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic fsm_entry_t fe(ssrc_e cond, int t, int f);
    fsm_entry_t e;
    e.cond = cond; e.next_true = 5'(t); e.next_false = 5'(f);
    e.stall_true = 5'(t); e.stall_false = 5'(f);
    return e;
  endfunction

  function automatic ctx_t op3(fu_op_e op, dsrc_e a, dsrc_e b, int imm, int rd);
    ctx_t c;
    c = '0; c.op = op; c.a_sel = a; c.b_sel = b; c.imm = 16'(imm);
    if (rd >= 0) begin c.dreg_we = 1; c.dreg_idx = 3'(rd); end
    return c;
  endfunction

  localparam int PE00 = 0, PE01 = 1, PE10 = COLS;

  task automatic configure();
    ctx_t c;
    // PE (1,0): z*256 -> N0 every cycle, stays in context 0
    c = op3(OP_MUL, DS_W0, DS_IMM, 256, -1); c.port[DIR_N].d0 = '{en: 1'b1, sel: DS_FU};
    cfg_wr(CFG_CTX, PE10, 0, CTXW'(c));
    cfg_wr(CFG_FSM, PE10, 0, CTXW'(fe(SS_ZERO, 0, 0)));
    // PE (0,0): voxel fetch over contexts 0-14
    c = op3(OP_MUL, DS_W1, DS_IMM, 16, 0); c.port[DIR_E].s = '{en: 1'b1, sel: SS_W};
    cfg_wr(CFG_CTX, PE00, 0, CTXW'(c));
    cfg_wr(CFG_CTX, PE00, 1, CTXW'(op3(OP_SHR, DS_W0, DS_IMM, 4, 1)));
    cfg_wr(CFG_CTX, PE00, 2, CTXW'(op3(OP_ADD, DS_R0, DS_R1, 0, 0)));
    cfg_wr(CFG_CTX, PE00, 3, CTXW'(op3(OP_ADD, DS_R0, DS_S0, 0, 0)));
    c = op3(OP_ADD, DS_R0, DS_IMM, 1, 1); c.port[DIR_N].d0 = '{en: 1'b1, sel: DS_R0};
    cfg_wr(CFG_CTX, PE00, 4, CTXW'(c));
    c = '0; c.port[DIR_N].d0 = '{en: 1'b1, sel: DS_R1};
    cfg_wr(CFG_CTX, PE00, 5, CTXW'(c));
    c = op3(OP_AND, DS_W0, DS_IMM, 15, -1); c.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
    cfg_wr(CFG_CTX, PE00, 6, CTXW'(c));
    for (int s = 0; s < PER; s++) cfg_wr(CFG_FSM, PE00, s, CTXW'(fe(SS_ZERO, 0, (s + 1) % PER)));
    // PE (0,1): resampling
    cfg_wr(CFG_CTX, PE01, 0, CTXW'(op3(OP_PASS, DS_IMM, DS_IMM, 5, 3)));
    cfg_wr(CFG_CTX, PE01, 6, CTXW'(op3(OP_PASS, DS_N0, DS_N0, 0, 0)));
    cfg_wr(CFG_CTX, PE01, 7, CTXW'(op3(OP_PASS, DS_N0, DS_N0, 0, 1)));
    cfg_wr(CFG_CTX, PE01, 8, CTXW'(op3(OP_SUB, DS_R1, DS_R0, 0, 2)));
    cfg_wr(CFG_CTX, PE01, 9, CTXW'(op3(OP_MUL, DS_R2, DS_W0, 0, 2)));
    cfg_wr(CFG_CTX, PE01, 10, CTXW'(op3(OP_SRA, DS_R2, DS_IMM, 4, 2)));
    c = op3(OP_ADD, DS_R2, DS_R0, 0, -1); c.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
    cfg_wr(CFG_CTX, PE01, 11, CTXW'(c));
    c = op3(OP_GE, DS_W0, DS_IMM, 8, -1); c.sreg_we = 1; c.sreg_idx = 2'd0;
    cfg_wr(CFG_CTX, PE01, 16, CTXW'(c));
    c = op3(OP_SEL, DS_R1, DS_R0, 0, -1); c.c_sel = SS_R0; c.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
    cfg_wr(CFG_CTX, PE01, 17, CTXW'(c));
    cfg_wr(CFG_CTX, PE01, 18, CTXW'(op3(OP_SUB, DS_R3, DS_IMM, 1, 3)));
    for (int s = 0; s < PER; s++)
      if (s != 7) cfg_wr(CFG_FSM, PE01, s, CTXW'(fe(SS_ZERO, 0, (s + 1) % PER)));
    cfg_wr(CFG_FSM, PE01, 7, CTXW'(fe(SS_W, 16, 8)));
    cfg_wr(CFG_FSM, PE01, 16, CTXW'(fe(SS_ZERO, 0, 17)));
    cfg_wr(CFG_FSM, PE01, 17, CTXW'(fe(SS_ZERO, 0, 18)));
    cfg_wr(CFG_FSM, PE01, 18, CTXW'(fe(SS_FU, 18, 0)));
    // top bus: memory 0 address from (col 0, ch 0), its data to (col 1, ch 0)
    cfg_wr(CFG_BUS_A, 0, 0, CTXW'((1 << 9) | 0));
    cfg_wr(CFG_BUS_R, 0, 2*1 + 0, CTXW'((1 << 4) | 0));
  endtask

  initial begin
    int x, y, z, m;
    logic [31:0] expv;
    cfg = '0; w_din = '0; w_sin = '0; w_lr_in = '0; e_din = '0; e_sin = '0; n_sin = '0; s_sin = '0;
    cc_we = '0; cc_waddr = '0; cc_wdata = '0; cc_ovr_en = '0; cc_ovr_addr = '0;
    #12 rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      cc_we = '1;
      for (int k = 0; k < NMEM; k++) begin cc_waddr[k] = 12'(a); cc_wdata[k] = vox(a); end
    end
    @(negedge clk); cc_we = '0;
    configure();
    for (int p = 0; p < NS; p++) begin
      x = $urandom % (15*16); y = $urandom % 16; z = $urandom % 16;
      m = (p % 2 == 0) ? int'($urandom % 2) : (p / 2) % 2;
      expv = pixel(x, y, z, m);
      @(negedge clk);
      w_din[0][0] = 32'(x); w_din[0][1] = 32'(y); w_din[1][0] = 32'(z); w_sin[0] = 1'(m);
      run = 1;
      for (int cy = 0; cy < PER; cy++) begin
        #1;
        // the context sequence restarts every 15 cycles
        if (cy == 0) begin
          checks++;
          if (ctx_ids[0][0] != 0 || ctx_ids[0][1] != 0) begin
            failures++; $display("FAIL period %0d does not start in context 0 (%0d, %0d)", p, ctx_ids[0][0], ctx_ids[0][1]);
          end
        end
        if (ctx_ids[0][1] == 5'd8) n_lin++;
        if (ctx_ids[0][1] == 5'd16) n_nn++;
        if (ctx_ids[0][1] == 5'd18) n_count++;
        if (cy == PER - 1) begin
          checks++;
          if (e_dout[0][0] !== expv) begin
            failures++;
            $display("FAIL sample %0d (x=%0d y=%0d z=%0d mode=%0d): got %0d expected %0d", p, x, y, z, m, e_dout[0][0], expv);
          end
        end
        if (cy != PER - 1) @(negedge clk);
      end
    end
    $display("samples=%0d linear=%0d nearest=%0d count-down cycles=%0d", NS, n_lin, n_nn, n_count);
    checks++; if (n_lin == 0 || n_nn == 0) begin failures++; $display("FAIL one interpolation mode never used"); end
    checks++; if (n_count != 5 * n_nn) begin failures++; $display("FAIL count-down context not 5 cycles per sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
