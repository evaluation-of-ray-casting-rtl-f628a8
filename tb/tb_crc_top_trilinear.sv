// tb_crc_top_trilinear: full trilinear interpolation on the low-area instance
// of the core (4 x 2 PEs, 24 contexts, one memory block above and one below),
// one sample every 15 clock cycles.
//
// Sample positions are fixed point with 4 fraction bits (X, Y, Z; integer
// parts 0-14 so that the 2 x 2 x 2 neighbourhood stays inside the 16^3
// sub-cube). Trilinear interpolation is seven linear steps
//   lerp(a, b, f) = a + (((b - a) * f) >>> 4),
// four operations each, 28 in total. All PEs cycle through contexts 0-14;
// the phase of a cycle is its context number.
//   Column 0, voxel fetch. PE (0,0) builds base = zi*256 + yi*16 + xi
//   (zi*256 comes from PE (1,0)) and sends base, +1, +16, +17 in phases 4-7 to
//   the top memory; PE (3,0) does the same with base + 256 (from PE (2,0))
//   for the bottom memory. Both then pass fx and fy east; PE (1,0) passes fz
//   in phase 14, so it reaches the last stage while that stage works on the
//   sample.
//   Column 1, resampling. PE (0,1) takes the four voxels of the z0 plane as
//   they arrive (phases 6-9), computes two x steps and the y step, and sends
//   c0 south in phase 4 of the next period. PE (3,1) does the same for the
//   z1 plane and sends c1 north, relayed by PE (2,1). PE (1,1) computes the z
//   step and drives the result on its east output in phase 9.
// Operations that run past phase 14 wrap round into the next period: the
// schedule is periodic, and no register is rewritten before its last read.
// The result of sample p is checked in the last cycle of period p+1 (latency
// two periods minus one cycle), together with the 15-cycle context sequence.
module tb_crc_top_trilinear;
  import crc_pkg::*;
  localparam int ROWS = 4, COLS = 2, NCTX = 24, NMEM = 2, NS = 80, PER = 15;

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

  int checks = 0, failures = 0, n_reads = 0;

  crc_top #(.ROWS(ROWS), .COLS(COLS), .NCTX(NCTX), .NMEM_SIDE(1)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .stall(1'b0), .cfg(cfg),
    .w_din(w_din), .w_sin(w_sin), .w_lr_in(w_lr_in), .w_dout(w_dout), .w_sout(w_sout),
    .e_din(e_din), .e_sin(e_sin), .e_dout(e_dout), .e_sout(e_sout), .e_lr_out(e_lr_out),
    .n_sin(n_sin), .n_sout(n_sout), .s_sin(s_sin), .s_sout(s_sout),
    .cc_we(cc_we), .cc_waddr(cc_waddr), .cc_wdata(cc_wdata), .cc_ovr_en(cc_ovr_en),
    .cc_ovr_addr(cc_ovr_addr), .mem_addr(mem_addr), .ctx_ids(ctx_ids));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int vox(int a);
    return (a * 97 + 13 * (a >> 8) + 5) % 4096;
  endfunction

  function automatic int lerp(int a, int b, int f);
    return a + (((b - a) * f) >>> 4);
  endfunction

  function automatic int trilin(int x, int y, int z);
    int a, fx, fy, fz, c0, c1;
    a = (z >> 4) * 256 + (y >> 4) * 16 + (x >> 4);
    fx = x & 15; fy = y & 15; fz = z & 15;
    c0 = lerp(lerp(vox(a), vox(a + 1), fx), lerp(vox(a + 16), vox(a + 17), fx), fy);
    c1 = lerp(lerp(vox(a + 256), vox(a + 257), fx), lerp(vox(a + 272), vox(a + 273), fx), fy);
    return lerp(c0, c1, fz);
  endfunction

  task automatic cfg_wr(cfg_tgt_e t, int id, int addr, logic [CTXW-1:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.tgt = t; cfg.id = 8'(id); cfg.addr = 6'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic ctx_t op3(fu_op_e op, dsrc_e a, dsrc_e b, int imm, int rd);
    ctx_t c;
    c = '0; c.op = op; c.a_sel = a; c.b_sel = b; c.imm = 16'(imm);
    if (rd >= 0) begin c.dreg_we = 1; c.dreg_idx = 3'(rd); end
    return c;
  endfunction

  // the same operation, result routed to output port dir, channel ch
  function automatic ctx_t op_out(fu_op_e op, dsrc_e a, dsrc_e b, int imm, dir_e dir, int ch);
    ctx_t c;
    c = op3(op, a, b, imm, -1);
    if (ch == 0) c.port[dir].d0 = '{en: 1'b1, sel: DS_FU};
    else         c.port[dir].d1 = '{en: 1'b1, sel: DS_FU};
    return c;
  endfunction

  function automatic ctx_t route(ctx_t c, dir_e dir, dsrc_e src);
    c.port[dir].d0 = '{en: 1'b1, sel: src};
    return c;
  endfunction

  function automatic int pe_id(int r, int c);
    return r * COLS + c;
  endfunction

  // voxel fetch PE of one memory side: zin is the input carrying z*256 (+256)
  task automatic cfg_fetch(int id, dsrc_e zin, dir_e mdir);
    cfg_wr(CFG_CTX, id, 0, CTXW'(op3(OP_AND, DS_W1, DS_IMM, -16, 0)));
    cfg_wr(CFG_CTX, id, 1, CTXW'(op3(OP_SHR, DS_W0, DS_IMM, 4, 1)));
    cfg_wr(CFG_CTX, id, 2, CTXW'(op3(OP_ADD, DS_R0, DS_R1, 0, 0)));
    cfg_wr(CFG_CTX, id, 3, CTXW'(op3(OP_ADD, DS_R0, zin, 0, 0)));
    cfg_wr(CFG_CTX, id, 4, CTXW'(route(op3(OP_ADD, DS_R0, DS_IMM, 1, 1), mdir, DS_R0)));
    cfg_wr(CFG_CTX, id, 5, CTXW'(route(op3(OP_ADD, DS_R0, DS_IMM, 16, 2), mdir, DS_R1)));
    cfg_wr(CFG_CTX, id, 6, CTXW'(route(op3(OP_ADD, DS_R0, DS_IMM, 17, 3), mdir, DS_R2)));
    cfg_wr(CFG_CTX, id, 7, CTXW'(route('0, mdir, DS_R3)));
    cfg_wr(CFG_CTX, id, 8, CTXW'(op_out(OP_AND, DS_W0, DS_IMM, 15, DIR_E, 0)));
    cfg_wr(CFG_CTX, id, 9, CTXW'(op_out(OP_AND, DS_W1, DS_IMM, 15, DIR_E, 1)));
  endtask

  // bilinear PE of one z plane: voxels arrive on vin, c goes out towards odir
  task automatic cfg_bilin(int id, dsrc_e vin, dir_e odir);
    cfg_wr(CFG_CTX, id, 6, CTXW'(op3(OP_PASS, vin, vin, 0, 0)));
    cfg_wr(CFG_CTX, id, 7, CTXW'(op3(OP_SUB, vin, DS_R0, 0, 1)));
    cfg_wr(CFG_CTX, id, 8, CTXW'(op3(OP_PASS, vin, vin, 0, 2)));
    cfg_wr(CFG_CTX, id, 9, CTXW'(op3(OP_SUB, vin, DS_R2, 0, 3)));
    cfg_wr(CFG_CTX, id, 10, CTXW'(op3(OP_MUL, DS_R1, DS_W0, 0, 1)));
    cfg_wr(CFG_CTX, id, 11, CTXW'(op3(OP_SRA, DS_R1, DS_IMM, 4, 1)));
    cfg_wr(CFG_CTX, id, 12, CTXW'(op3(OP_ADD, DS_R1, DS_R0, 0, 1)));
    cfg_wr(CFG_CTX, id, 13, CTXW'(op3(OP_MUL, DS_R3, DS_W0, 0, 3)));
    cfg_wr(CFG_CTX, id, 14, CTXW'(op3(OP_SRA, DS_R3, DS_IMM, 4, 3)));
    cfg_wr(CFG_CTX, id, 0, CTXW'(op3(OP_ADD, DS_R3, DS_R2, 0, 3)));
    cfg_wr(CFG_CTX, id, 1, CTXW'(op3(OP_SUB, DS_R3, DS_R1, 0, 3)));
    cfg_wr(CFG_CTX, id, 2, CTXW'(op3(OP_MUL, DS_R3, DS_W1, 0, 3)));
    cfg_wr(CFG_CTX, id, 3, CTXW'(op3(OP_SRA, DS_R3, DS_IMM, 4, 3)));
    cfg_wr(CFG_CTX, id, 4, CTXW'(op_out(OP_ADD, DS_R3, DS_R1, 0, odir, 0)));
  endtask

  task automatic configure();
    fsm_entry_t e;
    // z*256 for the top side, z*256 + 256 for the bottom side
    cfg_wr(CFG_CTX, pe_id(1, 0), 0, CTXW'(op3(OP_AND, DS_W0, DS_IMM, -16, 0)));
    cfg_wr(CFG_CTX, pe_id(1, 0), 1, CTXW'(op_out(OP_SHL, DS_R0, DS_IMM, 4, DIR_N, 0)));
    cfg_wr(CFG_CTX, pe_id(1, 0), 14, CTXW'(op_out(OP_AND, DS_W0, DS_IMM, 15, DIR_E, 0)));
    cfg_wr(CFG_CTX, pe_id(2, 0), 0, CTXW'(op3(OP_AND, DS_W0, DS_IMM, -16, 0)));
    cfg_wr(CFG_CTX, pe_id(2, 0), 1, CTXW'(op3(OP_SHL, DS_R0, DS_IMM, 4, 0)));
    cfg_wr(CFG_CTX, pe_id(2, 0), 2, CTXW'(op_out(OP_ADD, DS_R0, DS_IMM, 256, DIR_S, 0)));
    cfg_fetch(pe_id(0, 0), DS_S0, DIR_N);
    cfg_fetch(pe_id(3, 0), DS_N0, DIR_S);
    cfg_bilin(pe_id(0, 1), DS_N0, DIR_S);
    cfg_bilin(pe_id(3, 1), DS_S0, DIR_N);
    cfg_wr(CFG_CTX, pe_id(2, 1), 5, CTXW'(route('0, DIR_N, DS_S0)));
    // z step: c0 from the north, c1 from the south, fz from the west
    cfg_wr(CFG_CTX, pe_id(1, 1), 6, CTXW'(op3(OP_SUB, DS_S0, DS_N0, 0, 0)));
    cfg_wr(CFG_CTX, pe_id(1, 1), 7, CTXW'(op3(OP_MUL, DS_R0, DS_W0, 0, 0)));
    cfg_wr(CFG_CTX, pe_id(1, 1), 8, CTXW'(op3(OP_SRA, DS_R0, DS_IMM, 4, 0)));
    cfg_wr(CFG_CTX, pe_id(1, 1), 9, CTXW'(op_out(OP_ADD, DS_R0, DS_N0, 0, DIR_E, 0)));
    // every PE steps through contexts 0-14
    for (int id = 0; id < ROWS * COLS; id++)
      for (int s = 0; s < PER; s++) begin
        e.cond = SS_ZERO; e.next_true = 5'(0); e.next_false = 5'((s + 1) % PER);
        e.stall_true = e.next_true; e.stall_false = e.next_false;
        cfg_wr(CFG_FSM, id, s, CTXW'(e));
      end
    // each bus: memory 0 addressed by column 0, channel 0; data to column 1, channel 0
    for (int b = 0; b < 2; b++) begin
      cfg_wr(CFG_BUS_A, b, 0, CTXW'((1 << 9) | 0));
      cfg_wr(CFG_BUS_R, b, 2*1 + 0, CTXW'((1 << 4) | 0));
    end
  endtask

  // count the read cycles (both memories are read in the same cycles), and
  // check the addresses of the bottom memory lie one z plane below the top
  always @(posedge clk) if (run) begin
    if (ctx_ids[0][0] inside {[5'd5:5'd8]}) begin
      n_reads++;
      checks++;
      if (int'(mem_addr[1]) != int'(mem_addr[0]) + 256) begin
        failures++;
        $display("FAIL bottom address %0d, top address %0d", mem_addr[1], mem_addr[0]);
      end
    end
  end

  initial begin
    int xs[NS + 1], ys[NS + 1], zs[NS + 1];
    int got;
    cfg = '0; w_din = '0; w_sin = '0; w_lr_in = '0; e_din = '0; e_sin = '0; n_sin = '0; s_sin = '0;
    cc_we = '0; cc_waddr = '0; cc_wdata = '0; cc_ovr_en = '0; cc_ovr_addr = '0;
    #12 rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      cc_we = '1;
      for (int k = 0; k < NMEM; k++) begin cc_waddr[k] = 12'(a); cc_wdata[k] = 16'(vox(a)); end
    end
    @(negedge clk); cc_we = '0;
    configure();
    for (int p = 0; p <= NS; p++) begin
      xs[p] = $urandom % 240; ys[p] = $urandom % 240; zs[p] = $urandom % 240;
      if (p == 1) begin xs[p] = 239; ys[p] = 239; zs[p] = 239; end
      if (p == 2) begin xs[p] = 0; ys[p] = 0; zs[p] = 0; end
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        w_din[r][0] = 32'(xs[p]); w_din[r][1] = 32'(ys[p]);
      end
      w_din[1][0] = 32'(zs[p]); w_din[2][0] = 32'(zs[p]);
      run = 1;
      for (int cy = 0; cy < PER; cy++) begin
        #1;
        if (cy == 0) begin
          checks++;
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++)
              if (ctx_ids[r][c] != 0) begin
                failures++; $display("FAIL period %0d: PE (%0d,%0d) in context %0d", p, r, c, ctx_ids[r][c]);
              end
        end
        if (cy == PER - 1 && p > 0) begin
          checks++;
          got = int'(e_dout[1][0]);
          if (got != trilin(xs[p-1], ys[p-1], zs[p-1])) begin
            failures++;
            $display("FAIL sample %0d (X=%0d Y=%0d Z=%0d): got %0d expected %0d", p - 1,
                     xs[p-1], ys[p-1], zs[p-1], got, trilin(xs[p-1], ys[p-1], zs[p-1]));
          end
        end
        if (cy != PER - 1) @(negedge clk);
      end
    end
    $display("samples=%0d cycles per sample=%0d reads per memory=%0d", NS, PER, n_reads);
    checks++; if (n_reads != 4 * (NS + 1)) begin failures++; $display("FAIL not 4 reads per sample and memory"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
