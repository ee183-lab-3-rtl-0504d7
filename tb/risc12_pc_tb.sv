// risc12_pc_tb: self-checking test of the program counter.
//
// Checks that reset gives PC 0 with fetch_valid low, that fetch_valid rises
// one cycle after reset is released, that the PC advances by one per cycle
// and wraps at 0xFFF, and that a jump request loads the target at the next
// edge. A model PC is kept in the testbench.
module risc12_pc_tb;
  import risc12_pkg::*;

  logic clk = 0, reset = 1, jump_en = 0, fetch_valid;
  addr_t jump_target = 0, pc, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_pc dut (.clk, .reset, .jump_en, .jump_target, .pc, .fetch_valid);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s (pc %h)", what, pc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(pc == 0 && !fetch_valid, "reset");
    reset = 0;
    model = 0;
    @(negedge clk);
    model = 1;
    check(pc == model && fetch_valid, "first step");
    for (int n = 0; n < 6000; n++) begin
      jump_en = ($urandom % 8) == 0;
      jump_target = 12'($urandom);
      if (n > 5000) jump_en = 0;  // run through the wrap
      @(negedge clk);
      model = jump_en ? jump_target : model + 1;
      check(pc == model && fetch_valid, "step");
    end
    reset = 1;
    @(negedge clk);
    check(pc == 0 && !fetch_valid, "reset again");
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
