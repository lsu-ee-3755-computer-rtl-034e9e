// tb_dmem: random word and byte writes and reads against a byte-array shadow
// (little-endian lanes); byte reads must come back sign-extended and a read
// cycle (R/W = 0) must not change the memory.
module tb_dmem;
  localparam int DEPTH = 64;
  logic        clk = 0, rw, byte_en;
  logic [31:0] addr, din, dout;
  logic [7:0]  shadow [DEPTH*4];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH)) dut (.clk, .addr, .din, .rw, .byte_en, .dout);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_word(int a);
    int b = a & ~3;
    return {shadow[b+3], shadow[b+2], shadow[b+1], shadow[b]};
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    rw = 0; byte_en = 0; addr = 0; din = 0;
    for (int i = 0; i < DEPTH; i++) begin
      din = $urandom; addr = 32'(i * 4); rw = 1; byte_en = 0;
      for (int k = 0; k < 4; k++) shadow[i*4+k] = din[8*k +: 8];
      @(posedge clk); #1;
    end
    for (int n = 0; n < 1000; n++) begin
      int a;
      a = $urandom % (DEPTH * 4);
      addr = 32'(a); din = $urandom; byte_en = $urandom % 2; rw = $urandom % 2;
      #1;
      if (!rw) begin
        e = byte_en ? {{24{shadow[a][7]}}, shadow[a]} : ref_word(a);
        checks++;
        if (dout !== e) begin
          failures++;
          $display("FAIL read addr=%h byte=%b dout=%h exp=%h", addr, byte_en, dout, e);
        end
      end
      @(posedge clk);
      if (rw) begin
        if (byte_en) shadow[a] = din[7:0];
        else for (int k = 0; k < 4; k++) shadow[(a & ~3) + k] = din[8*k +: 8];
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
