// risc12_system_full_tb: the whole system at its default settings.
//
// Nothing is overridden: the instruction ROM holds the default
// demonstration program, which reads the switches and paints every one of
// the 1200 frame-buffer cells with that colour, over and over. The test sets
// the switches, lets the program paint the screen once, then scans a whole
// 640x480 frame on the VGA pins: every visible pixel (two clocks each) must
// show the switch colour and nothing else may be lit. It then changes the
// switches and checks the next frame again, and counts the hsync and vsync
// pulses of a frame (525 and 1).
module risc12_system_full_tb;
  logic clk = 0, reset = 1;
  logic [11:0] sw_data = 12'h0F0;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_system dut (.clk, .reset, .sw_data, .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic scan_frame(logic [11:0] colour);
    int match = 0, other = 0, hs = 0, vs = 0;
    logic hs_prev = 1, vs_prev = 1;
    repeat (525 * 800 * 2) begin
      @(negedge clk);
      if ({vga_r, vga_g, vga_b} == colour) match++;
      else if ({vga_r, vga_g, vga_b} != 12'h000) other++;
      if (!vga_hsync && hs_prev) hs++;
      if (!vga_vsync && vs_prev) vs++;
      hs_prev = vga_hsync; vs_prev = vga_vsync;
    end
    check(match == 640 * 480 * 2, $sformatf("%0d pixel clocks show %h", match, colour));
    check(other == 0, $sformatf("%0d pixel clocks show another colour", other));
    check(hs == 525 && vs == 1, $sformatf("%0d hsync and %0d vsync pulses", hs, vs));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (8000) @(posedge clk);  // 1200 cells x 5 instructions
    scan_frame(12'h0F0);
    sw_data = 12'hA5C;
    repeat (8000) @(posedge clk);
    scan_frame(12'hA5C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
