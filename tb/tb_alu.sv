// tb_alu: checks the five ALU operations and the zero flag against a
// reference written in the testbench, on corner values and random operands.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y, .zero);

  function automatic logic [31:0] ref_alu(logic [31:0] x1, logic [31:0] x2, alu_op_e o);
    case (o)
      ALU_AND: return x1 & x2;
      ALU_OR:  return x1 | x2;
      ALU_SLT: begin
        // signed compare done by hand: sign bits first, then magnitude
        if (x1[31] != x2[31]) return {31'd0, x1[31]};
        return {31'd0, x1 < x2};
      end
      ALU_ADD: return x1 + x2;
      ALU_SUB: return x1 + ~x2 + 32'd1;
      default: return 32'd0;
    endcase
  endfunction

  task automatic check(logic [31:0] x1, logic [31:0] x2, alu_op_e o);
    logic [31:0] e;
    a = x1; b = x2; op = o;
    #1;
    e = ref_alu(x1, x2, o);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h zero=%b", o, x1, x2, y, e, zero);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hffff_ffff,
                                          32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [5] = '{ALU_AND, ALU_OR, ALU_SLT, ALU_ADD, ALU_SUB};
    foreach (ops[k])
      foreach (CORNER[i])
        foreach (CORNER[j]) check(CORNER[i], CORNER[j], ops[k]);
    for (int n = 0; n < 2000; n++) check($urandom, $urandom, ops[n % 5]);
    // equal operands give zero after SUB (beq/bne use this)
    for (int n = 0; n < 50; n++) begin
      logic [31:0] r;
      r = $urandom;
      check(r, r, ALU_SUB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
