// vga_display_tb: self-checking test of the memory-mapped VGA device.
//
// Writes random colours into random cells (and one write past the last
// cell, which must be ignored), then watches a whole frame. Every clock, the
// colour on the outputs must be the colour the testbench stored for the cell
// under the pixel the sync generator showed one clock earlier (black
// outside the visible area), and hsync/vsync must be the generator's syncs
// delayed by the same clock.
module vga_display_tb;
  logic clk = 0, reset = 1, we = 0;
  logic [10:0] waddr = 0;
  logic [11:0] wdata = 0;
  logic [3:0] r, g, b;
  logic hs, vs;
  logic [11:0] model [1200];
  int checks = 0, failures = 0, lit = 0;

  always #5 clk = ~clk;

  vga_display dut (.clk, .reset, .we, .waddr, .wdata, .vga_r(r), .vga_g(g), .vga_b(b),
                   .vga_hsync(hs), .vga_vsync(vs));

  logic [9:0] h_d, v_d;
  logic act_d, hs_d, vs_d;
  logic [11:0] exp_c;

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = 1; waddr = 11'($urandom % 1200); wdata = 12'($urandom);
      model[waddr] = wdata;
    end
    @(negedge clk);
    waddr = 11'd1200; wdata = 12'hFFF;   // out of range: ignored
    @(negedge clk);
    we = 0; reset = 0;
    h_d = dut.u_timing.hcount; v_d = dut.u_timing.vcount;
    act_d = dut.u_timing.active; hs_d = dut.u_timing.hsync; vs_d = dut.u_timing.vsync;
    for (int n = 0; n < 525 * 800 * 2 + 10; n++) begin
      @(negedge clk);
      exp_c = act_d ? model[int'(v_d / 16) * 40 + int'(h_d / 16)] : 12'h000;
      checks++;
      if ({r, g, b} !== exp_c || hs !== hs_d || vs !== vs_d) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d): %h, expected %h", h_d, v_d, {r, g, b}, exp_c);
      end
      if ({r, g, b} != 0) lit++;
      h_d = dut.u_timing.hcount; v_d = dut.u_timing.vcount;
      act_d = dut.u_timing.active; hs_d = dut.u_timing.hsync; vs_d = dut.u_timing.vsync;
    end
    checks++;
    if (lit < 1000) failures++;
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
