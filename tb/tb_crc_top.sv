// tb_crc_top: end-to-end test of the high-throughput core at its default
// size (4 x 15 PEs, 4 contexts, 4 + 4 memory blocks of 16^3 voxels).
//
// The testbench configures, through the configuration bus, a super-
// pipelined mapping of a reduced voxel fetch and resampling step:
//   voxel fetch  (row 0, columns 0-4, helped by row 1 column 0):
//     addr0 = z*256 + y*16 + (x >> 4), addr1 = addr0 + 1
//     (x carries 4 fraction bits), sent up to memory blocks 0 and 1 over
//     the top memory bus by PEs (0,3) and (0,4);
//   resampling  (row 0, columns 5-9), switched per sample by a mode bit:
//     mode 0, context 0: linear    v0 + (((v1 - v0) * fx) >>> 4)
//     mode 1, context 1: nearest   fx >= 8 ? v1 : v0   (select function)
//   columns 10-14 carry the result to the east border.
// The left-to-right channel carries z*256, x >> 4 and fx past the PEs that
// do not use them. The mode bit travels on the status channel of row 1, one
// cycle ahead of the data, so that each resampling PE's FSM can choose the
// context of the next cycle. Contexts 2 and 3 of every PE are the stall
// contexts (nothing loads); a resampling PE enters 2 or 3 according to the
// context it would have taken next and resumes there.
//
// A cache controller model in this file watches the addresses on the bus.
// Lines with z >= 12 start invalid (their voxels are garbage); on a miss it
// raises stall, refills the 16-voxel line in all eight blocks, re-reads the
// missed address through the override port in the last stall cycle and
// releases stall. The expected pixel of every sample is computed here from
// the formulas above; the test also checks one sample per clock cycle
// outside stalls and counts the context switches, stalls, refills and the
// samples of each mode, failing if any of them never happened.
module tb_crc_top;
  import crc_pkg::*;
  localparam int ROWS = 4, COLS = 15, NMEM = 8, NS = 400, LAT = 16;

  logic clk = 0, rst_n = 0, run = 0, stall = 0, stall_q;
  cfg_req_t cfg;
  logic [ROWS-1:0][1:0][DW-1:0] w_din, w_dout, e_din, e_dout;
  logic [ROWS-1:0] w_sin, w_sout, e_sin, e_sout;
  logic [ROWS-1:0][DW-1:0] w_lr_in, e_lr_out;
  logic [COLS-1:0] n_sin, n_sout, s_sin, s_sout;
  logic [NMEM-1:0] cc_we, cc_ovr_en;
  logic [NMEM-1:0][11:0] cc_waddr, cc_ovr_addr, mem_addr;
  logic [NMEM-1:0][VOXW-1:0] cc_wdata;
  logic [ROWS-1:0][COLS-1:0][1:0] ctx_ids;

  int checks = 0, failures = 0;
  int n_switch = 0, n_stall_cycles = 0, n_stall_window = 0, n_refill = 0, n_lin = 0, n_out = 0;

  crc_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .cfg(cfg),
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

  // ---------------------------------------------------------------- data
  function automatic logic [15:0] vox(int a);
    return 16'((a * 37 + 11) % 4096);   // 12-bit voxel values
  endfunction

  int sx [NS], sy [NS], sz [NS], smode [NS];
  logic [31:0] expv [NS];

  function automatic logic [31:0] pixel(int x, int y, int z, int m);
    int a0, v0, v1, fx;
    a0 = z*256 + y*16 + (x >> 4);
    v0 = int'(vox(a0)); v1 = int'(vox(a0 + 1)); fx = x & 15;
    if (m == 0) return 32'(v0 + (((v1 - v0) * fx) >>> 4));
    else        return 32'((fx >= 8) ? v1 : v0);
  endfunction

  // ------------------------------------------------------- configuration
  task automatic cfg_wr(cfg_tgt_e t, int id, int addr, logic [CTXW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.tgt = t; cfg.id = 8'(id); cfg.addr = 6'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic int pid(int r, int c);
    return r*COLS + c;
  endfunction

  function automatic dout_cfg_t dr(dsrc_e s);
    return '{en: 1'b1, sel: s};
  endfunction

  function automatic fsm_entry_t fe(ssrc_e cond, int t, int f, int st, int sf);
    fsm_entry_t e;
    e.cond = cond; e.next_true = 5'(t); e.next_false = 5'(f); e.stall_true = 5'(st); e.stall_false = 5'(sf);
    return e;
  endfunction

  // Plain PE: context 0 normal, context 2 for the stall.
  task automatic fsm_plain(int id);
    cfg_wr(CFG_FSM, id, 0, CTXW'(fe(SS_ZERO, 0, 0, 2, 2)));
    cfg_wr(CFG_FSM, id, 2, CTXW'(fe(SS_ZERO, 0, 0, 2, 2)));
  endtask

  // Resampling PE: context by the mode bit on the S status input. A stall
  // goes to 3 (resume at 1) or 2 (resume at 0) by the same bit.
  task automatic fsm_mode(int id);
    cfg_wr(CFG_FSM, id, 0, CTXW'(fe(SS_S, 1, 0, 3, 2)));
    cfg_wr(CFG_FSM, id, 1, CTXW'(fe(SS_S, 1, 0, 3, 2)));
    cfg_wr(CFG_FSM, id, 2, CTXW'(fe(SS_ZERO, 0, 0, 2, 2)));
    cfg_wr(CFG_FSM, id, 3, CTXW'(fe(SS_ZERO, 1, 1, 3, 3)));
  endtask

  task automatic configure();
    ctx_t c;
    // row 1: z*256 at column 0, mode bit passed east and up everywhere
    for (int col = 0; col < COLS; col++) begin
      c = '0;
      c.port[DIR_E].s = '{en: 1'b1, sel: SS_W};
      c.port[DIR_N].s = '{en: 1'b1, sel: SS_W};
      if (col == 0) begin
        c.op = OP_MUL; c.a_sel = DS_W0; c.b_sel = DS_IMM; c.imm = 16'd256;
        c.port[DIR_N].d0 = dr(DS_FU);
      end
      cfg_wr(CFG_CTX, pid(1, col), 0, CTXW'(c));
      fsm_plain(pid(1, col));
    end
    // (0,0): y*16 -> E1, x -> E0, z*256 (from S) -> LR
    c = '0; c.op = OP_MUL; c.a_sel = DS_W1; c.b_sel = DS_IMM; c.imm = 16'd16;
    c.port[DIR_E].d1 = dr(DS_FU); c.port[DIR_E].d0 = dr(DS_W0); c.lr = dr(DS_S0);
    cfg_wr(CFG_CTX, pid(0, 0), 0, CTXW'(c)); fsm_plain(pid(0, 0));
    // (0,1): yz = y*16 + z*256 -> E1
    c = '0; c.op = OP_ADD; c.a_sel = DS_W1; c.b_sel = DS_LR;
    c.port[DIR_E].d1 = dr(DS_FU); c.port[DIR_E].d0 = dr(DS_W0);
    cfg_wr(CFG_CTX, pid(0, 1), 0, CTXW'(c)); fsm_plain(pid(0, 1));
    // (0,2): xi = x >> 4 -> LR
    c = '0; c.op = OP_SHR; c.a_sel = DS_W0; c.b_sel = DS_IMM; c.imm = 16'd4;
    c.lr = dr(DS_FU); c.port[DIR_E].d0 = dr(DS_W0); c.port[DIR_E].d1 = dr(DS_W1);
    cfg_wr(CFG_CTX, pid(0, 2), 0, CTXW'(c)); fsm_plain(pid(0, 2));
    // (0,3): addr0 = yz + xi -> N0 (memory bus) and E1
    c = '0; c.op = OP_ADD; c.a_sel = DS_W1; c.b_sel = DS_LR;
    c.port[DIR_N].d0 = dr(DS_FU); c.port[DIR_E].d1 = dr(DS_FU); c.port[DIR_E].d0 = dr(DS_W0);
    cfg_wr(CFG_CTX, pid(0, 3), 0, CTXW'(c)); fsm_plain(pid(0, 3));
    // (0,4): addr1 = addr0 + 1 -> N0
    c = '0; c.op = OP_ADD; c.a_sel = DS_W1; c.b_sel = DS_IMM; c.imm = 16'd1;
    c.port[DIR_N].d0 = dr(DS_FU); c.port[DIR_E].d0 = dr(DS_W0);
    cfg_wr(CFG_CTX, pid(0, 4), 0, CTXW'(c)); fsm_plain(pid(0, 4));
    // (0,5): fx = x & 15 -> E0, v0 (memory 0 via N0) -> E1
    c = '0; c.op = OP_AND; c.a_sel = DS_W0; c.b_sel = DS_IMM; c.imm = 16'd15;
    c.port[DIR_E].d0 = dr(DS_FU); c.port[DIR_E].d1 = dr(DS_N0);
    cfg_wr(CFG_CTX, pid(0, 5), 0, CTXW'(c)); fsm_plain(pid(0, 5));
    // (0,6): linear: d = v1 - v0 -> E0 | nearest: v1 -> E0; v0 -> E1, fx -> LR
    c = '0; c.op = OP_SUB; c.a_sel = DS_N0; c.b_sel = DS_W1;
    c.port[DIR_E].d0 = dr(DS_FU); c.port[DIR_E].d1 = dr(DS_W1); c.lr = dr(DS_W0);
    cfg_wr(CFG_CTX, pid(0, 6), 0, CTXW'(c));
    c.op = OP_NOP; c.port[DIR_E].d0 = dr(DS_N0);
    cfg_wr(CFG_CTX, pid(0, 6), 1, CTXW'(c)); fsm_mode(pid(0, 6));
    // (0,7): linear: d * fx | nearest: fx >= 8 -> E status, v1 -> E0
    c = '0; c.op = OP_MUL; c.a_sel = DS_W0; c.b_sel = DS_LR;
    c.port[DIR_E].d0 = dr(DS_FU); c.port[DIR_E].d1 = dr(DS_W1);
    cfg_wr(CFG_CTX, pid(0, 7), 0, CTXW'(c));
    c = '0; c.op = OP_GE; c.a_sel = DS_LR; c.b_sel = DS_IMM; c.imm = 16'd8;
    c.port[DIR_E].s = '{en: 1'b1, sel: SS_FU};
    c.port[DIR_E].d0 = dr(DS_W0); c.port[DIR_E].d1 = dr(DS_W1);
    cfg_wr(CFG_CTX, pid(0, 7), 1, CTXW'(c)); fsm_mode(pid(0, 7));
    // (0,8): linear: >>> 4 | nearest: select
    c = '0; c.op = OP_SRA; c.a_sel = DS_W0; c.b_sel = DS_IMM; c.imm = 16'd4;
    c.port[DIR_E].d0 = dr(DS_FU); c.port[DIR_E].d1 = dr(DS_W1);
    cfg_wr(CFG_CTX, pid(0, 8), 0, CTXW'(c));
    c = '0; c.op = OP_SEL; c.a_sel = DS_W0; c.b_sel = DS_W1; c.c_sel = SS_W;
    c.port[DIR_E].d0 = dr(DS_FU);
    cfg_wr(CFG_CTX, pid(0, 8), 1, CTXW'(c)); fsm_mode(pid(0, 8));
    // (0,9): linear: v0 + ... | nearest: pass
    c = '0; c.op = OP_ADD; c.a_sel = DS_W0; c.b_sel = DS_W1;
    c.port[DIR_E].d0 = dr(DS_FU);
    cfg_wr(CFG_CTX, pid(0, 9), 0, CTXW'(c));
    c = '0; c.port[DIR_E].d0 = dr(DS_W0);
    cfg_wr(CFG_CTX, pid(0, 9), 1, CTXW'(c)); fsm_mode(pid(0, 9));
    // (0,10..14): carry the result east
    for (int col = 10; col < COLS; col++) begin
      c = '0; c.port[DIR_E].d0 = dr(DS_W0);
      cfg_wr(CFG_CTX, pid(0, col), 0, CTXW'(c)); fsm_plain(pid(0, col));
    end
    // top memory bus: memory 0 <- (col 3, ch 0), memory 1 <- (col 4, ch 0)
    cfg_wr(CFG_BUS_A, 0, 0, CTXW'((1 << 9) | (0 << 8) | 3));
    cfg_wr(CFG_BUS_A, 0, 1, CTXW'((1 << 9) | (0 << 8) | 4));
    // read data: (col 5, ch 0) <- memory 0, (col 6, ch 0) <- memory 1
    cfg_wr(CFG_BUS_R, 0, 2*5 + 0, CTXW'((1 << 4) | 0));
    cfg_wr(CFG_BUS_R, 0, 2*6 + 0, CTXW'((1 << 4) | 1));
  endtask

  // -------------------------------------------- cache controller model
  bit line_valid [256];          // one line = 16 voxels along x (z, y)
  int refill_left = 0, refill_pos = 0, nmiss = 0;
  int miss_mem [2], miss_addr [2];

  always_ff @(posedge clk) stall_q <= stall && run;

  // ------------------------------------------------------------ stimulus
  int k = 0;   // effective cycle: advances in every cycle the array is not frozen

  function automatic int sample_of(int idx);
    return (idx >= 0 && idx < NS) ? idx : -1;
  endfunction

  task automatic drive_inputs();
    int s1, s0, sm;
    s1 = sample_of(k); s0 = sample_of(k - 1); sm = sample_of(k + 1);
    w_din = '0; w_sin = '0;
    w_din[1][0] = (s1 >= 0) ? 32'(sz[s1]) : 32'd0;
    w_din[0][0] = (s0 >= 0) ? 32'(sx[s0]) : 32'd0;
    w_din[0][1] = (s0 >= 0) ? 32'(sy[s0]) : 32'd0;
    w_sin[1]    = (sm >= 0) ? smode[sm][0] : 1'b0;
  endtask

  initial begin
    int first_out_cycle, last_out_cycle, cyc;
    logic [31:0] held;
    cfg = '0; w_din = '0; w_sin = '0; w_lr_in = '0; e_din = '0; e_sin = '0; n_sin = '0; s_sin = '0;
    cc_we = '0; cc_waddr = '0; cc_wdata = '0; cc_ovr_en = '0; cc_ovr_addr = '0;
    for (int i = 0; i < NS; i++) begin
      sx[i] = $urandom % (15*16);   // keeps x >> 4 <= 14 so that addr0 + 1 stays in the line
      sy[i] = $urandom % 16;
      sz[i] = $urandom % 16;
      smode[i] = ((i / 7) % 3 == 1) ? 1 : int'($urandom % 4 == 0);
      expv[i] = pixel(sx[i], sy[i], sz[i], smode[i]);
    end
    #12 rst_n = 1;
    // fill all eight blocks; lines with z >= 12 are left as garbage
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      cc_we = '1;
      for (int m = 0; m < NMEM; m++) begin
        cc_waddr[m] = 12'(a);
        cc_wdata[m] = (a >= 12*256) ? 16'hDEAD : vox(a);
      end
    end
    for (int l = 0; l < 256; l++) line_valid[l] = (l < 12*16);
    @(negedge clk); cc_we = '0;
    configure();
    @(negedge clk);
    run = 1;
    drive_inputs();
    cyc = 0; first_out_cycle = -1; last_out_cycle = -1;
    while (k < NS + LAT + 2) begin
      // ---- cache controller, decided before the edge (combinational stall)
      cc_we = '0; cc_ovr_en = '0;
      if (refill_left == 0 && !stall_q) begin
        nmiss = 0;
        for (int m = 0; m < 2; m++) begin
          if (!line_valid[int'(mem_addr[m]) >> 4]) begin
            miss_mem[nmiss] = m; miss_addr[nmiss] = int'(mem_addr[m]); nmiss++;
          end
        end
        if (nmiss > 0) begin
          refill_left = 16*nmiss + 2; refill_pos = 0; n_refill += nmiss;
        end
      end
      if (refill_left > 0) begin
        stall = 1;
        if (refill_pos < 16*nmiss) begin
          int ln;
          ln = miss_addr[refill_pos / 16] >> 4;
          cc_we = '1;
          for (int m = 0; m < NMEM; m++) begin
            cc_waddr[m] = 12'(ln*16 + refill_pos % 16); cc_wdata[m] = vox(ln*16 + refill_pos % 16);
          end
          refill_pos++;
        end
        if (refill_left == 1) begin
          for (int i = 0; i < nmiss; i++) begin
            line_valid[miss_addr[i] >> 4] = 1;
            cc_ovr_en[miss_mem[i]] = 1'b1; cc_ovr_addr[miss_mem[i]] = 12'(miss_addr[i]);
          end
        end
        refill_left--;
      end else begin
        stall = 0;
      end
      #1;
      held = e_dout[0][0];
      @(posedge clk);
      @(negedge clk);
      cyc++;
      if (ran_last) begin
        // the array ran in the cycle just ended: sample k - LAT + 1 is out
        if (k - LAT + 1 >= 0 && k - LAT + 1 < NS) begin
          int s;
          s = k - LAT + 1;
          checks++; n_out++;
          if (first_out_cycle < 0) first_out_cycle = cyc;
          last_out_cycle = cyc;
          if (smode[s] == 0) n_lin++;
          if (e_dout[0][0] !== expv[s]) begin
            failures++;
            $display("FAIL sample %0d (x=%0d y=%0d z=%0d mode=%0d): got %0d expected %0d",
                     s, sx[s], sy[s], sz[s], smode[s], e_dout[0][0], expv[s]);
          end
        end
        k++;
      end else begin
        n_stall_cycles++;
        if (first_out_cycle >= 0 && n_out < NS) n_stall_window++;
        checks++;
        if (e_dout[0][0] !== held) begin failures++; $display("FAIL output changed during a stall"); end
      end
      drive_inputs();
    end
    // throughput: NS samples leave in NS cycles plus the stalled ones
    checks++;
    if (last_out_cycle - first_out_cycle + 1 != NS + n_stall_window) begin
      failures++;
      $display("FAIL throughput: %0d samples over %0d cycles with %0d stall cycles",
               NS, last_out_cycle - first_out_cycle + 1, n_stall_window);
    end
    $display("samples=%0d linear=%0d nearest=%0d context switches=%0d stall cycles=%0d refills=%0d",
             n_out, n_lin, n_out - n_lin, n_switch, n_stall_cycles, n_refill);
    checks++; if (n_out != NS)        begin failures++; $display("FAIL not every sample came out"); end
    checks++; if (n_switch == 0)      begin failures++; $display("FAIL mode switch never happened"); end
    checks++; if (n_stall_cycles == 0) begin failures++; $display("FAIL stall never happened"); end
    checks++; if (n_refill == 0)      begin failures++; $display("FAIL no cache refill"); end
    checks++; if (n_lin == 0 || n_lin == NS) begin failures++; $display("FAIL one interpolation mode never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Whether the PEs executed a normal context in the last cycle, and
  // context switches of a resampling PE.
  logic ran_last = 1'b0;
  logic [1:0] prev_ctx8 = '0;
  always @(posedge clk) begin
    ran_last <= run && (ctx_ids[0][14] < 2);
    if (run && ctx_ids[0][8] != prev_ctx8 && ctx_ids[0][8] < 2 && prev_ctx8 < 2) n_switch++;
    prev_ctx8 <= ctx_ids[0][8];
  end

endmodule
