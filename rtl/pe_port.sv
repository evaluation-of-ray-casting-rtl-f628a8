// pe_port: one output port of a processing element (N, E, S or W).
//
// The port carries two 32-bit data channels (the original channel and the
// second set added for the refined interconnect) and one status channel.
// Each channel has a routing multiplexer that the current context drives:
// it can pick a data input of any neighbour port, the FU result, a data
// register, the left-to-right channel or the immediate (status: a port
// status input, the FU status or a status register). Behind each
// multiplexer sits an output register that loads only when the context
// enables it and otherwise holds. The register is this implementation's
// choice: it makes every hop between PEs one clock cycle and rules out
// combinational loops through the mesh.
// Timing: a source selected in cycle t appears at the port in cycle t+1.
module pe_port
  import crc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  port_cfg_t            cfg,
  input  logic [31:0][DW-1:0]  dsrc,   // indexed by dsrc_e
  input  logic [15:0]          ssrc,   // indexed by ssrc_e
  output logic [1:0][DW-1:0]   dout,
  output logic                 sout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      sout <= 1'b0;
    end else begin
      if (cfg.d0.en) dout[0] <= dsrc[cfg.d0.sel];
      if (cfg.d1.en) dout[1] <= dsrc[cfg.d1.sel];
      if (cfg.s.en)  sout    <= ssrc[cfg.s.sel];
    end
  end

endmodule
