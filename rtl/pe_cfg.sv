// pe_cfg: boot-time configuration port of a processing element.
//
// Configuration writes travel on one bus shared by all PEs of the array.
// This block compares the PE number of each write with its own (parameter
// PE_ID) and turns a matching write into a write of the context memory
// (target CFG_CTX) or of the FSM transition table (target CFG_FSM). The
// design study says only that context memory and FSM transitions are
// configured at boot, as in an FPGA; the addressed bus is this
// implementation's own. Combinational; the writes land at the next clock edge.
module pe_cfg
  import crc_pkg::*;
#(
  parameter int NCTX  = 4,
  parameter int PE_ID = 0
) (
  input  cfg_req_t                cfg,
  output logic                    ctx_we,
  output logic                    fsm_we,
  output logic [$clog2(NCTX)-1:0] addr,
  output ctx_t                    ctx_data,
  output fsm_entry_t              fsm_data
);

  logic hit;

  assign hit      = cfg.we && (int'(cfg.id) == PE_ID) && (int'(cfg.addr) < NCTX);
  assign ctx_we   = hit && (cfg.tgt == CFG_CTX);
  assign fsm_we   = hit && (cfg.tgt == CFG_FSM);
  assign addr     = cfg.addr[$clog2(NCTX)-1:0];
  assign ctx_data = ctx_t'(cfg.data);
  assign fsm_data = fsm_entry_t'(cfg.data[FSMW-1:0]);

endmodule
