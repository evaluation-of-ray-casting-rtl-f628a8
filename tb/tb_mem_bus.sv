// tb_mem_bus: self-checking test of one memory bus (15 columns, 4 memories).
// Configures random address sources and read routings through the
// configuration bus, then checks that every memory sees the address of its
// chosen PE channel and every PE channel the (zero-extended) data of its
// chosen memory, or zero when unrouted. Writes for the other bus id must
// be ignored.
module tb_mem_bus;
  import crc_pkg::*;
  localparam int COLS = 15, NMEM = 4;
  logic clk = 0, rst_n = 0;
  cfg_req_t cfg;
  logic [COLS-1:0][1:0][DW-1:0] pe_dout, pe_din;
  logic [NMEM-1:0][11:0] mem_addr;
  logic [NMEM-1:0][VOXW-1:0] mem_rdata;
  int acol [NMEM], ach [NMEM], aval [NMEM];
  int rmem [COLS*2], rval [COLS*2];
  int checks = 0, failures = 0;

  mem_bus #(.COLS(COLS), .NMEM(NMEM), .AW(12), .BUS_ID(1)) dut (.clk(clk), .rst_n(rst_n), .cfg(cfg),
    .pe_dout(pe_dout), .pe_din(pe_din), .mem_addr(mem_addr), .mem_rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_tgt_e t, int id, int addr, int data);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tgt = t; cfg.id = 8'(id); cfg.addr = 6'(addr); cfg.data = CTXW'(data);
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    cfg = '0; pe_dout = '0; mem_rdata = '0;
    #12 rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      for (int m = 0; m < NMEM; m++) begin
        acol[m] = $urandom % COLS; ach[m] = $urandom % 2; aval[m] = ($urandom % 4) != 0;
        wr(CFG_BUS_A, 1, m, (aval[m] << 9) | (ach[m] << 8) | acol[m]);
        wr(CFG_BUS_A, 0, m, (1 << 9) | 3);   // other bus: ignored
      end
      for (int k = 0; k < COLS*2; k++) begin
        rmem[k] = $urandom % NMEM; rval[k] = ($urandom % 3) != 0;
        wr(CFG_BUS_R, 1, k, (rval[k] << 4) | rmem[k]);
      end
      for (int n = 0; n < 50; n++) begin
        for (int c = 0; c < COLS; c++) begin pe_dout[c][0] = $urandom; pe_dout[c][1] = $urandom; end
        for (int m = 0; m < NMEM; m++) mem_rdata[m] = 16'($urandom);
        #1;
        for (int m = 0; m < NMEM; m++) begin
          checks++;
          if (mem_addr[m] !== (aval[m] ? pe_dout[acol[m]][ach[m]][11:0] : 12'd0)) begin
            failures++; $display("FAIL mem %0d addr %h", m, mem_addr[m]);
          end
        end
        for (int k = 0; k < COLS*2; k++) begin
          checks++;
          if (pe_din[k/2][k%2] !== (rval[k] ? {16'd0, mem_rdata[rmem[k]]} : 32'd0)) begin
            failures++; $display("FAIL pe %0d ch %0d data %h", k/2, k%2, pe_din[k/2][k%2]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
