// tb_decoder6to64: exhaustive check of the 6-to-64 decoder. For every input
// value exactly one output bit may be set, the bit whose index is the input.
module tb_decoder6to64;
  logic [5:0]  in;
  logic [63:0] out;
  int checks = 0, failures = 0;

  decoder6to64 dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      in = 6'(i);
      #1;
      checks++;
      if (out != (64'd1 << i) || $countones(out) != 1) begin
        failures++;
        $display("FAIL in=%0d out=%h", i, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
