// tb_voxel_mem: self-checking test of a memory block at its full size
// (16^3 voxels). Fills it through the cache-controller write port, then
// reads random addresses from the bus side and through the override and
// checks data and the one-cycle read latency, then the hold input.
module tb_voxel_mem;
  localparam int DEPTH = 4096;
  logic clk = 0, we = 0, ovr_en = 0, hold = 0;
  logic [11:0] bus_addr = 0, ovr_addr = 0, waddr = 0;
  logic [15:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  voxel_mem #(.DEPTH(DEPTH), .VW(16)) dut (.clk(clk), .hold(hold), .bus_addr(bus_addr), .ovr_en(ovr_en), .ovr_addr(ovr_addr),
    .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  function automatic logic [15:0] vox(int a);
    return 16'((a * 40503) ^ (a >> 3));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] prev;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 12'(a); wdata = vox(a);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ovr_en = ($urandom % 4) == 0;
      bus_addr = 12'($urandom); ovr_addr = 12'($urandom);
      prev = ovr_en ? ovr_addr : bus_addr;
      @(posedge clk); #1;
      // one cycle latency: data appear right after the edge
      checks++;
      if (rdata !== vox(int'(prev))) begin failures++; $display("FAIL addr %0d got %h", prev, rdata); end
    end
    // a write and a read of the same address in one cycle returns the old data
    @(negedge clk); we = 1; waddr = 12'd77; wdata = 16'hBEEF; ovr_en = 0; bus_addr = 12'd77;
    @(posedge clk); #1; we = 0;
    checks++; if (rdata !== vox(77)) failures++;
    @(posedge clk); #1;
    checks++; if (rdata !== 16'hBEEF) failures++;
    // hold freezes the read register; the override still reads
    @(negedge clk); hold = 1; bus_addr = 12'd5;
    @(posedge clk); #1;
    checks++; if (rdata !== 16'hBEEF) failures++;
    @(negedge clk); ovr_en = 1; ovr_addr = 12'd9;
    @(posedge clk); #1;
    checks++; if (rdata !== vox(9)) failures++;
    @(negedge clk); ovr_en = 0; hold = 0;
    @(posedge clk); #1;
    checks++; if (rdata !== vox(5)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
