// tb_sc_control: exhaustive check of the decoder-based control block. All
// 4096 {opcode, function} combinations are compared with a reference table
// written here, one row per instruction with the control values of the
// control tables (ALU_OP, the mux selects, NPC_CNT_SIG, Mux_Branch, R/W) plus
// the register write enable and byte flag. Combinations that match no row
// must decode as a regular instruction that writes nothing.
module tb_sc_control;
  import mips_pkg::*;
  logic [5:0] op, fn;
  sc_ctrl_t   ctrl;
  int checks = 0, failures = 0;

  sc_control dut (.op, .fn, .ctrl);

  // reference rows: mnemonic, opcode, function code (-1: any), controls
  string      r_name [19];
  logic [5:0] r_op   [19];
  int         r_fn   [19];
  sc_ctrl_t   r_c    [19];

  task automatic row(int k, string n, logic [5:0] o, int f, sc_ctrl_t c);
    r_name[k] = n; r_op[k] = o; r_fn[k] = f; r_c[k] = c;
  endtask

  // fields: alu_op, alu_cnt, datamem, rd_cnt, line11, npc_plus4, sig, branch, rw, regw, byte
  function automatic sc_ctrl_t mk(alu_op_e a, bit s2, bit s3, bit s4, bit s5, bit s6,
                                  npc_sig_e s7, bit s8, bit s9, bit rwr, bit byt);
    sc_ctrl_t c;
    c.alu_op             = a;
    c.mux_alu_cnt        = s2;
    c.mux_datamem        = s3;
    c.mux_rd_cnt         = s4;
    c.mux_line11         = s5;
    c.mux_line_npc_plus4 = s6;
    c.npc_cnt_sig        = s7;
    c.mux_branch         = s8;
    c.rw                 = s9;
    c.reg_write          = rwr;
    c.mem_byte           = byt;
    return c;
  endfunction

  initial begin
    row(0, "and", 6'h00, 'h24, mk(ALU_AND, 0,0,0,0,0, SIG_REGULAR, 0,0, 1,0));
    row(1, "andi", 6'h06, -1,   mk(ALU_AND, 1,0,0,1,0, SIG_REGULAR, 0,0, 1,0));
    row(2, "or", 6'h00, 'h25, mk(ALU_OR,  0,0,0,0,0, SIG_REGULAR, 0,0, 1,0));
    row(3, "ori", 6'h0d, -1,   mk(ALU_OR,  1,0,0,1,0, SIG_REGULAR, 0,0, 1,0));
    row(4, "slt", 6'h00, 'h2a, mk(ALU_SLT, 0,0,0,0,0, SIG_REGULAR, 0,0, 1,0));
    row(5, "slti", 6'h0a, -1,   mk(ALU_SLT, 1,0,0,1,0, SIG_REGULAR, 0,0, 1,0));
    row(6, "add", 6'h00, 'h20, mk(ALU_ADD, 0,0,0,0,0, SIG_REGULAR, 0,0, 1,0));
    row(7, "addi", 6'h08, -1,   mk(ALU_ADD, 1,0,0,1,0, SIG_REGULAR, 0,0, 1,0));
    row(8, "sub", 6'h00, 'h22, mk(ALU_SUB, 0,0,0,0,0, SIG_REGULAR, 0,0, 1,0));
    row(9, "lw", 6'h23, -1,   mk(ALU_ADD, 1,1,0,1,0, SIG_REGULAR, 0,0, 1,0));
    row(10, "lb", 6'h20, -1,   mk(ALU_ADD, 1,1,0,1,0, SIG_REGULAR, 0,0, 1,1));
    row(11, "sw", 6'h2b, -1,   mk(ALU_ADD, 1,0,0,0,0, SIG_REGULAR, 0,1, 0,0));
    row(12, "sb", 6'h28, -1,   mk(ALU_ADD, 1,0,0,0,0, SIG_REGULAR, 0,1, 0,1));
    row(13, "beq", 6'h04, -1,   mk(ALU_SUB, 0,0,0,0,0, SIG_BRANCH,  0,0, 0,0));
    row(14, "bne", 6'h05, -1,   mk(ALU_SUB, 0,0,0,0,0, SIG_BRANCH,  1,0, 0,0));
    row(15, "j", 6'h02, -1,   mk(ALU_AND, 0,0,0,0,0, SIG_JUMP,    0,0, 0,0));
    row(16, "jal", 6'h03, -1,   mk(ALU_AND, 0,0,1,0,1, SIG_JUMP,    0,0, 1,0));
    row(17, "jr", 6'h00, 'h08, mk(ALU_AND, 0,0,0,0,0, SIG_JREG,    0,0, 0,0));
    row(18, "jalr", 6'h00, 'h09, mk(ALU_AND, 0,0,0,0,1, SIG_JREG,    0,0, 1,0));
  end

  // ALU_OP is a don't-care for j, jal, jr, jalr in the tables
  function automatic bit alu_dont_care(sc_ctrl_t c);
    return c.npc_cnt_sig == SIG_JUMP || c.npc_cnt_sig == SIG_JREG;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nrow [19];
    #1;
    foreach (nrow[k]) nrow[k] = 0;
    for (int a = 0; a < 4096; a++) begin
      int hit;
      sc_ctrl_t e, got;
      hit = -1;
      op = 6'(a >> 6); fn = 6'(a);
      #1;
      for (int k = 0; k < 19; k++)
        if (r_op[k] == op && (r_fn[k] < 0 || r_fn[k] == int'(fn))) hit = k;
      if (hit >= 0) begin
        e = r_c[hit];
        nrow[hit]++;
      end else begin
        e = mk(ALU_AND, 0,0,0,0,0, SIG_REGULAR, 0,0, 0,0);
      end
      got = ctrl;
      if (hit < 0 || alu_dont_care(e)) begin
        // only the write enables and the NPC select matter for these
        checks++;
        if (got.reg_write !== e.reg_write || got.rw !== e.rw ||
            got.npc_cnt_sig !== e.npc_cnt_sig ||
            (hit >= 0 && (got.mux_rd_cnt !== e.mux_rd_cnt ||
                          got.mux_line_npc_plus4 !== e.mux_line_npc_plus4 ||
                          got.mux_line11 !== e.mux_line11))) begin
          failures++;
          $display("FAIL op=%h fn=%h got=%p exp=%p", op, fn, got, e);
        end
      end else begin
        checks++;
        if (got !== e) begin
          failures++;
          $display("FAIL %s op=%h fn=%h got=%p exp=%p", r_name[hit], op, fn, got, e);
        end
      end
    end
    foreach (nrow[k]) begin
      checks++;
      if (nrow[k] == 0) begin
        failures++;
        $display("FAIL row %s never matched", r_name[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
