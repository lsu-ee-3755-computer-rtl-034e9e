// tb_npc_control: all eight input combinations of the NPC controller against
// the four rules: branch & condition met -> 00, j/jal -> 01, jr/jalr -> 10,
// otherwise (regular, or branch not taken) -> 11.
module tb_npc_control;
  import mips_pkg::*;
  npc_sig_e sig;
  logic     cond;
  npc_sel_e sel;
  int checks = 0, failures = 0;

  npc_control dut (.npc_cnt_sig(sig), .cond_met(cond), .mux_npc_cnt(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    npc_sel_e e;
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < 2; c++) begin
        sig = npc_sig_e'(s); cond = c[0];
        #1;
        case (sig)
          SIG_BRANCH: e = cond ? NPC_TARGET : NPC_PLUS4;
          SIG_JUMP:   e = NPC_JUMP;
          SIG_JREG:   e = NPC_DRS;
          default:    e = NPC_PLUS4;
        endcase
        checks++;
        if (sel !== e) begin
          failures++;
          $display("FAIL sig=%b cond=%b sel=%b exp=%b", sig, cond, sel, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
