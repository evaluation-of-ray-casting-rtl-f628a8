// mem_bus: memory bus along the top or the bottom edge of the PE array.
//
// The PEs of the border row reach every memory block on their side through
// this bus. Each memory block takes its read address from one configured
// border PE and data channel (the outward-facing port: N for the top row,
// S for the bottom row). Each data channel of each border PE's outward
// input can be fed with the read data of one configured memory block
// (zero-extended to the data path width) or with nothing (0). The routing
// is set at boot time through the configuration bus: target CFG_BUS_A,
// addr = memory, data = {valid, channel, column[7:0]}; target CFG_BUS_R,
// addr = 2*column + channel, data = {valid, memory[3:0]}; id = BUS_ID.
// The address path is combinational (the PE output and the memory hold the
// registers). The design study proposes the bus and its reach; the
// configured crossbar form is this implementation's choice. Write access
// belongs to the cache controllers and goes directly to each block.
module mem_bus
  import crc_pkg::*;
#(
  parameter int COLS   = 15,
  parameter int NMEM   = 4,
  parameter int AW     = 12,
  parameter int BUS_ID = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  cfg_req_t                     cfg,
  input  logic [COLS-1:0][1:0][DW-1:0] pe_dout,  // from border PEs
  output logic [COLS-1:0][1:0][DW-1:0] pe_din,   // to border PEs
  output logic [NMEM-1:0][AW-1:0]      mem_addr,
  input  logic [NMEM-1:0][VOXW-1:0]    mem_rdata
);

  typedef struct packed {
    logic       valid;
    logic       ch;
    logic [7:0] col;
  } asrc_t;

  typedef struct packed {
    logic       valid;
    logic [3:0] mem;
  } rsel_t;

  asrc_t asrc [NMEM];
  rsel_t rsel [COLS*2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NMEM; m++)   asrc[m] <= '0;
      for (int k = 0; k < COLS*2; k++) rsel[k] <= '0;
    end else if (cfg.we && (int'(cfg.id) == BUS_ID)) begin
      if (cfg.tgt == CFG_BUS_A && int'(cfg.addr) < NMEM)
        asrc[int'(cfg.addr)] <= asrc_t'(cfg.data[9:0]);
      if (cfg.tgt == CFG_BUS_R && int'(cfg.addr) < COLS*2)
        rsel[int'(cfg.addr)] <= rsel_t'(cfg.data[4:0]);
    end
  end

  always_comb begin
    for (int m = 0; m < NMEM; m++) begin
      mem_addr[m] = '0;
      if (asrc[m].valid && int'(asrc[m].col) < COLS)
        mem_addr[m] = pe_dout[asrc[m].col][asrc[m].ch][AW-1:0];
    end
    for (int c = 0; c < COLS; c++) begin
      for (int h = 0; h < 2; h++) begin
        pe_din[c][h] = '0;
        if (rsel[2*c+h].valid && int'(rsel[2*c+h].mem) < NMEM)
          pe_din[c][h] = DW'(mem_rdata[rsel[2*c+h].mem]);
      end
    end
  end

endmodule
