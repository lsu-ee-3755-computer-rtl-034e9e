// tb_regfile: random writes and reads against a shadow copy; checks that
// register 0 stays zero, that a write with we = 0 changes nothing and that
// reads are asynchronous (visible right after the writing edge).
module tb_regfile;
  logic        clk = 0, rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom % 4) != 0;
      wa = 5'($urandom);
      wd = $urandom;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
      we  = 0;
      ra1 = 5'($urandom);
      ra2 = (n % 7 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        $display("FAIL r%0d=%h exp %h, r%0d=%h exp %h", ra1, rd1, shadow[ra1], ra2, rd2, shadow[ra2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
