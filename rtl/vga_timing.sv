// vga_timing: VGA sync generator for 640x480 at 60 Hz.
//
// A clock-enable divider makes the 25 MHz pixel rate from the system clock
// (CLK_DIV system clocks per pixel, 2 for a 50 MHz clock). On each pixel
// enable the horizontal counter steps through 800 pixel times (640 visible,
// 16 front porch, 96 sync, 48 back porch) and at the end of each line the
// vertical counter steps through 525 lines (480, 10, 2, 33). hsync and vsync
// are active low. The counters are registered; active and the syncs are
// decoded from them, so all outputs are valid together: hcount and
// vcount name the pixel being shown while active is 1. The design only asks
// for a VGA device; these standard VGA numbers are this code's choice.
// Synchronous, active-high reset.
module vga_timing #(
  parameter int unsigned CLK_DIV  = 2,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       reset,
  output logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync,
  output logic       vsync
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned DIVW    = CLK_DIV > 1 ? $clog2(CLK_DIV) : 1;

  logic [DIVW-1:0] div;

  always_ff @(posedge clk) begin
    if (reset) begin
      div <= '0;
    end else if (32'(div) == CLK_DIV - 1) begin
      div <= '0;
    end else begin
      div <= div + 1'b1;
    end
  end

  assign pix_en = (32'(div) == CLK_DIV - 1);

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (32'(hcount) == H_TOTAL - 1) begin
        hcount <= '0;
        vcount <= (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign active = 32'(hcount) < H_ACTIVE && 32'(vcount) < V_ACTIVE;
  assign hsync  = !(32'(hcount) >= H_ACTIVE + H_FP && 32'(hcount) < H_ACTIVE + H_FP + H_SYNC);
  assign vsync  = !(32'(vcount) >= V_ACTIVE + V_FP && 32'(vcount) < V_ACTIVE + V_FP + V_SYNC);

endmodule
