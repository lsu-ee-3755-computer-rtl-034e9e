// tb_imem: loads random words through the load port and reads them back at
// their byte addresses, including with the low two address bits set.
module tb_imem;
  localparam int DEPTH = 64;
  logic        clk = 0, load_we;
  logic [31:0] addr, rdata, load_addr, load_data;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH)) dut (.clk, .addr, .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      load_we = 1; load_addr = 32'(i * 4); load_data = shadow[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int n = 0; n < 300; n++) begin
      int i;
      i = $urandom % DEPTH;
      addr = 32'(i * 4) | 32'($urandom % 4);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h exp=%h", addr, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
