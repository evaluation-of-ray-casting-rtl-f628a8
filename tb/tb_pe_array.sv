// tb_pe_array: self-checking test of the PE mesh at 3 x 4 PEs.
// Every PE is configured to pass W->E on both data channels, the status
// channel and the left-to-right channel, E->W on data channel 0, N->S on
// data channel 0 and S->N on data channel 1. PE (1, 2) instead adds 1 to
// its W0 input on the way east. Random border inputs are fed each cycle;
// each border output must equal the matching input delayed by one cycle per
// PE crossed (plus 1 on row 1). This checks every neighbour connection, the
// PE numbering and the per-hop latency.
module tb_pe_array;
  import crc_pkg::*;
  localparam int R = 3, C = 4, T = 400;
  logic clk = 0, rst_n = 0, run = 0, stall = 0;
  cfg_req_t cfg;
  logic [C-1:0][1:0][DW-1:0] n_din, n_dout, s_din, s_dout;
  logic [C-1:0] n_sin, n_sout, s_sin, s_sout;
  logic [R-1:0][1:0][DW-1:0] w_din, w_dout, e_din, e_dout;
  logic [R-1:0] w_sin, w_sout, e_sin, e_sout;
  logic [R-1:0][DW-1:0] w_lr_in, e_lr_out;
  logic [R-1:0][C-1:0][1:0] ctx_ids;
  logic [R-1:0][1:0][DW-1:0] hw [T], he [T];
  logic [R-1:0] hws [T];
  logic [R-1:0][DW-1:0] hlr [T];
  logic [C-1:0][1:0][DW-1:0] hn [T], hs [T];
  int checks = 0, failures = 0;

  pe_array #(.ROWS(R), .COLS(C), .NCTX(4)) dut (.clk(clk), .rst_n(rst_n), .run(run), .stall(stall), .cfg(cfg),
    .n_din(n_din), .n_sin(n_sin), .n_dout(n_dout), .n_sout(n_sout),
    .s_din(s_din), .s_sin(s_sin), .s_dout(s_dout), .s_sout(s_sout),
    .w_din(w_din), .w_sin(w_sin), .w_lr_in(w_lr_in), .w_dout(w_dout), .w_sout(w_sout),
    .e_din(e_din), .e_sin(e_sin), .e_dout(e_dout), .e_sout(e_sout), .e_lr_out(e_lr_out), .ctx_ids(ctx_ids));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctx_t c0;
    cfg = '0; n_din = '0; s_din = '0; w_din = '0; e_din = '0; n_sin = '0; s_sin = '0; w_sin = '0; e_sin = '0; w_lr_in = '0;
    #12 rst_n = 1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      c0 = '0;
      c0.port[DIR_E].d0 = '{en: 1'b1, sel: DS_W0};
      c0.port[DIR_E].d1 = '{en: 1'b1, sel: DS_W1};
      c0.port[DIR_E].s  = '{en: 1'b1, sel: SS_W};
      c0.port[DIR_W].d0 = '{en: 1'b1, sel: DS_E0};
      c0.port[DIR_S].d0 = '{en: 1'b1, sel: DS_N0};
      c0.port[DIR_N].d1 = '{en: 1'b1, sel: DS_S1};
      c0.lr = '{en: 1'b1, sel: DS_LR};
      if (r == 1 && c == 2) begin
        c0.op = OP_ADD; c0.a_sel = DS_W0; c0.b_sel = DS_IMM; c0.imm = 16'd1;
        c0.port[DIR_E].d0 = '{en: 1'b1, sel: DS_FU};
      end
      @(negedge clk);
      cfg.we = 1; cfg.tgt = CFG_CTX; cfg.id = 8'(r*C + c); cfg.addr = 0; cfg.data = CTXW'(c0);
    end
    @(negedge clk); cfg.we = 0; run = 1;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) begin
        w_din[r][0] = $urandom; w_din[r][1] = $urandom; e_din[r][0] = $urandom; e_din[r][1] = $urandom;
        w_lr_in[r] = $urandom;
      end
      w_sin = R'($urandom);
      for (int c = 0; c < C; c++) begin
        n_din[c][0] = $urandom; n_din[c][1] = $urandom; s_din[c][0] = $urandom; s_din[c][1] = $urandom;
      end
      hw[t] = w_din; he[t] = e_din; hws[t] = w_sin; hlr[t] = w_lr_in; hn[t] = n_din; hs[t] = s_din;
      @(posedge clk); #1;
      // outputs after edge t show inputs of cycle t - hops + 1
      if (t >= C) begin
        for (int r = 0; r < R; r++) begin
          checks++;
          if (e_dout[r][0] !== hw[t-C+1][r][0] + ((r == 1) ? 32'd1 : 32'd0) || e_dout[r][1] !== hw[t-C+1][r][1] ||
              e_sout[r] !== hws[t-C+1][r] || e_lr_out[r] !== hlr[t-C+1][r]) begin
            failures++; $display("FAIL east row %0d t=%0d", r, t);
          end
          checks++;
          if (w_dout[r][0] !== he[t-C+1][r][0]) begin failures++; $display("FAIL west row %0d", r); end
        end
      end
      if (t >= R) begin
        for (int c = 0; c < C; c++) begin
          checks++;
          if (s_dout[c][0] !== hn[t-R+1][c][0] || n_dout[c][1] !== hs[t-R+1][c][1]) begin
            failures++; $display("FAIL vertical col %0d t=%0d", c, t);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
