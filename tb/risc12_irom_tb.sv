// risc12_irom_tb: self-checking test of the instruction ROM.
//
// Loads the directed test program into the ROM and, separately, into a
// testbench array; random addresses must return the word one cycle later
// (address in I, data in R), and words past the end of the program must be
// 0 (the NOP).
module risc12_irom_tb;
  import risc12_pkg::*;

  logic clk = 0;
  addr_t addr = 0, last;
  instr_t data;
  logic [15:0] image [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_irom #(.INIT_FILE("tb/cpu_test.hex")) dut (.clk, .addr, .data);

  initial begin
    foreach (image[i]) image[i] = '0;
    $readmemh("tb/cpu_test.hex", image);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = (n % 2) ? 12'($urandom % 128) : 12'($urandom);
      #1;
      if (n > 0) begin
        checks++;
        if (data !== image[last]) begin failures++; $display("FAIL data changed before the clock edge"); end
      end
      last = addr;
      @(posedge clk); #1;
      checks++;
      if (data !== image[last]) begin
        failures++;
        if (failures < 10) $display("FAIL [%h] = %h, expected %h", last, data, image[last]);
      end
    end
    checks++;
    if (image[12'h002] != 16'h580a) begin failures++; $display("FAIL reference image"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
