// vga_timing_tb: self-checking test of the VGA sync generator.
//
// Runs the generator at its default 640x480 settings for just over one
// frame and measures, from the outputs alone: system clocks per pixel (2),
// pixels per line (800) and per hsync pulse (96, active low, starting at
// pixel 656), lines per frame (525) and per vsync pulse (2 lines, starting
// at line 490), and the visible area (640 x 480 pixels of active).
module vga_timing_tb;
  logic clk = 0, reset = 1;
  logic pix_en, active, hsync, vsync;
  logic [9:0] hcount, vcount;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_timing dut (.clk, .reset, .pix_en, .hcount, .vcount, .active, .hsync, .vsync);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int pix = 0, clocks = 0, hs_len = 0, hs_start = -1, lines = 0, active_px = 0;
  int vs_lines = 0, vs_start = -1, en_count = 0;
  logic hs_prev = 1, vs_prev = 1;

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    // one frame = 525 lines x 800 pixels x 2 clocks
    for (int n = 0; n < 525 * 800 * 2; n++) begin
      @(negedge clk);
      clocks++;
      if (pix_en) begin
        en_count++;
        if (active) active_px++;
        if (!hsync) hs_len++;
        if (!hsync && hs_prev && lines == 0) hs_start = hcount;
        hs_prev = hsync;
        if (hcount == 799) begin
          lines++;
          if (!vsync) vs_lines++;
          if (!vsync && vs_prev) vs_start = vcount;
          vs_prev = vsync;
        end
        check(active == (hcount < 640 && vcount < 480), "active area");
      end
    end
    check(en_count * 2 == clocks, $sformatf("pixel enables %0d in %0d clocks", en_count, clocks));
    check(lines == 525, $sformatf("lines per frame %0d", lines));
    check(hs_len == 96 * 525, $sformatf("hsync pixels %0d", hs_len));
    check(hs_start == 656, $sformatf("hsync start %0d", hs_start));
    check(vs_lines == 2, $sformatf("vsync lines %0d", vs_lines));
    check(vs_start == 490, $sformatf("vsync start %0d", vs_start));
    check(active_px == 640 * 480, $sformatf("active pixels %0d", active_px));
    check(hcount == 0 && vcount == 0, "frame wraps to 0,0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
