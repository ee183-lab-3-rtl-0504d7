// risc12_dram_tb: self-checking test of the data RAM.
//
// Random reads and writes against a shadow array: the read word appears one
// cycle after its address (E to W), a read of the address being written
// returns the old word, and written words persist. Memory starts at zero.
module risc12_dram_tb;
  import risc12_pkg::*;

  logic clk = 0, we = 0;
  logic [10:0] addr = 0;
  word_t wdata = 0, rdata, expect_q;
  word_t shadow [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_dram dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = (n < 3000) ? 11'($urandom % 16) : 11'($urandom);
      wdata = 12'($urandom);
      expect_q = shadow[addr];
      if (we) shadow[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL [%h] = %h, expected %h", addr, rdata, expect_q);
      end
    end
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
