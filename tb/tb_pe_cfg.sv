// tb_pe_cfg: self-checking test of the configuration decoder of one PE
// (PE_ID = 5, 4 contexts). Random writes on the shared configuration bus
// must turn into a context or FSM write exactly when they are addressed to
// this PE, name a valid context and carry the matching target.
module tb_pe_cfg;
  import crc_pkg::*;
  cfg_req_t cfg;
  logic ctx_we, fsm_we;
  logic [1:0] addr;
  ctx_t ctx_data;
  fsm_entry_t fsm_data;
  int checks = 0, failures = 0;

  pe_cfg #(.NCTX(4), .PE_ID(5)) dut (.cfg(cfg), .ctx_we(ctx_we), .fsm_we(fsm_we), .addr(addr), .ctx_data(ctx_data), .fsm_data(fsm_data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hit;
    for (int n = 0; n < 2000; n++) begin
      cfg.we = 1'($urandom);
      cfg.tgt = cfg_tgt_e'($urandom % 4);
      cfg.id = (n % 3 == 0) ? 8'd5 : 8'($urandom % 8);
      cfg.addr = 6'($urandom % 6);
      for (int i = 0; i < CTXW; i += 32) cfg.data[i +: 32] = $urandom;
      #1;
      hit = cfg.we && cfg.id == 8'd5 && cfg.addr < 4;
      checks++;
      if (ctx_we !== (hit && cfg.tgt == CFG_CTX) || fsm_we !== (hit && cfg.tgt == CFG_FSM)) begin
        failures++; $display("FAIL we=%b tgt=%0d id=%0d addr=%0d ctx_we=%b fsm_we=%b", cfg.we, cfg.tgt, cfg.id, cfg.addr, ctx_we, fsm_we);
      end
      checks++;
      if (addr !== cfg.addr[1:0] || ctx_data !== ctx_t'(cfg.data) || fsm_data !== fsm_entry_t'(cfg.data[FSMW-1:0])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
