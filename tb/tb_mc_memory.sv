// tb_mc_memory: unified memory of the multi-cycle machine. Loads words
// through the load port, then mixes processor writes and reads against a
// shadow array; checks that a read with mem_read = 0 returns zero and that
// the load port wins over a simultaneous processor write.
module tb_mc_memory;
  localparam int DEPTH = 64;
  logic        clk = 0, mem_read, mem_write, load_we;
  logic [31:0] addr, wdata, rdata, load_addr, load_data;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  mc_memory #(.DEPTH(DEPTH)) dut (.clk, .addr, .mem_read, .mem_write, .wdata,
                                   .rdata, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0; mem_write = 0; load_we = 0; addr = 0; wdata = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      shadow[i] = $urandom;
      load_we = 1; load_addr = 32'(i * 4); load_data = shadow[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int n = 0; n < 600; n++) begin
      int i;
      i = $urandom % DEPTH;
      addr = 32'(i * 4); wdata = $urandom;
      mem_read = $urandom % 2; mem_write = !mem_read && ($urandom % 2);
      load_we = (n % 37 == 0); load_addr = 32'((($urandom % DEPTH)) * 4); load_data = $urandom;
      #1;
      checks++;
      if (rdata !== (mem_read ? shadow[i] : 32'd0)) begin
        failures++;
        $display("FAIL addr=%h rd=%b rdata=%h exp=%h", addr, mem_read, rdata, shadow[i]);
      end
      @(posedge clk);
      if (load_we) shadow[load_addr[7:2]] = load_data;
      else if (mem_write) shadow[i] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
