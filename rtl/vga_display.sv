// vga_display: the memory-mapped VGA device.
//
// The screen is divided into COLS x ROWS square cells of 2^CELL_SHIFT pixels
// (40 x 30 cells of 16 x 16 pixels at 640 x 480). A frame buffer holds one
// 12-bit colour per cell, {red[3:0], green[3:0], blue[3:0]}, written by the
// processor through its data port (cell index = row * COLS + column). The
// scan side reads the cell under the current pixel from a second port of the
// buffer; the read takes one clock, so colour, hsync and vsync all leave one
// clock after the sync generator's counters, aligned with each other. Colour
// is black outside the visible area. The design asks for a memory-mapped VGA
// device the processor shows its results on; the cell frame buffer, its
// colour format and the 640 x 480 mode are this code's choices. Synchronous,
// active-high reset (the frame buffer itself starts black and is not reset).
module vga_display #(
  parameter int unsigned COLS       = 40,
  parameter int unsigned ROWS       = 30,
  parameter int unsigned CELL_SHIFT = 4,
  parameter int unsigned CLK_DIV    = 2
) (
  input  logic        clk,
  input  logic        reset,
  // write port (from the processor's data bus)
  input  logic        we,
  input  logic [$clog2(COLS*ROWS)-1:0] waddr,
  input  logic [11:0] wdata,
  // VGA outputs
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync
);

  localparam int unsigned CELLS = COLS * ROWS;
  localparam int unsigned CW    = $clog2(CELLS);

  logic [11:0] fb [CELLS];

  initial for (int i = 0; i < int'(CELLS); i++) fb[i] = '0;

  always_ff @(posedge clk)
    if (we && 32'(waddr) < CELLS) fb[waddr] <= wdata;

  logic       active, hsync, vsync;
  logic [9:0] hcount, vcount;

  vga_timing #(.CLK_DIV(CLK_DIV), .H_ACTIVE(COLS << CELL_SHIFT),
               .V_ACTIVE(ROWS << CELL_SHIFT)) u_timing (
    .clk, .reset, .pix_en(), .hcount, .vcount, .active, .hsync, .vsync
  );

  logic [9:0]  col, row;
  logic [CW-1:0] cell_idx;
  logic [11:0] pixel;
  logic        active_d;

  assign col  = hcount >> CELL_SHIFT;
  assign row  = vcount >> CELL_SHIFT;
  assign cell_idx = CW'(32'(row) * COLS + 32'(col));

  always_ff @(posedge clk)
    pixel <= fb[active ? cell_idx : '0];

  always_ff @(posedge clk) begin
    if (reset) begin
      active_d  <= 1'b0;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
    end else begin
      active_d  <= active;
      vga_hsync <= hsync;
      vga_vsync <= vsync;
    end
  end

  assign {vga_r, vga_g, vga_b} = active_d ? pixel : 12'h000;

endmodule
