// free_counter_tb: self-checking test of the free-running counter.
//
// With a 6-bit counter and EXT on bit 3: after reset the count must be 0,
// then step by one each cycle and wrap; ext must equal bit 3 of the model
// count and therefore toggle every 8 cycles.
module free_counter_tb;
  logic clk = 0, reset = 1, ext, ext_prev;
  logic [5:0] count, model;
  int checks = 0, failures = 0, toggles = 0, since = 0;

  always #5 clk = ~clk;

  free_counter #(.WIDTH(6), .EXT_BIT(3)) dut (.clk, .reset, .count, .ext);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++; if (count != 0) failures++;
    reset = 0; model = 0; ext_prev = ext;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      model = model + 1;
      since++;
      checks++;
      if (count != model || ext != model[3]) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d ext %b, expected %0d", count, ext, model);
      end
      if (ext != ext_prev) begin
        if (toggles > 0) begin checks++; if (since != 8) failures++; end
        toggles++; since = 0;
      end
      ext_prev = ext;
    end
    checks++; if (toggles < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
