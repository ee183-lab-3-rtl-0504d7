// risc12_system: the complete 12-bit RISC system.
//
// Joins the pipelined processor to its instruction ROM, and its data port,
// through the address decoder, to the data RAM, the memory-mapped VGA frame
// buffer and the switch input. A free-running counter supplies the external
// jump condition (EXT_COND) from one of its bits. All parts share one clock
// and the synchronous, active-high reset, which restarts the program at
// address 0.
//
// The four parts (processor, instruction ROM, data RAM, I/O devices) and
// the counter feeding EXT_COND follow the specification's system description. The
// memory map (RAM 0x000-0x7FF, frame buffer 0x800-0xCAF, switches 0xFFF)
// and the VGA format are this code's choices; see risc12_iomap and
// vga_display. IROM_INIT names the program hex file; the default is a small
// demonstration program that paints the switch value as a colour bar.
module risc12_system
  import risc12_pkg::*;
#(
  parameter string       IROM_INIT  = "rtl/risc12_demo.hex",
  parameter int unsigned IROM_DEPTH = 4096,
  parameter int unsigned RAM_WORDS  = 2048,
  parameter int unsigned CNT_WIDTH  = 24,
  parameter int unsigned EXT_BIT    = 23,
  parameter int unsigned VGA_CLK_DIV = 2
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [11:0] sw_data,
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync
);

  localparam int unsigned VGA_COLS  = 40;
  localparam int unsigned VGA_ROWS  = 30;
  localparam int unsigned VGA_CELLS = VGA_COLS * VGA_ROWS;

  addr_t    irom_addr;
  instr_t   irom_data;
  addr_t    d_addr;
  word_t    d_wdata, d_rdata;
  logic     d_we;
  logic     ext_cond;

  risc12_cpu u_cpu (
    .clk, .reset, .ext_cond,
    .irom_addr_i(irom_addr), .irom_data_d(irom_data),
    .dram_addr_e(d_addr), .dram_data_e(d_wdata), .dram_we(d_we),
    .dram_data_m(d_rdata),
    .fwd_sel_a(), .fwd_sel_b(), .jump_taken()
  );

  risc12_irom #(.DEPTH(IROM_DEPTH), .INIT_FILE(IROM_INIT)) u_irom (
    .clk, .addr(irom_addr), .data(irom_data)
  );

  logic                          ram_we;
  logic [$clog2(RAM_WORDS)-1:0]  ram_addr;
  word_t                         ram_wdata, ram_rdata;
  logic                          vga_we;
  logic [$clog2(VGA_CELLS)-1:0]  vga_addr;
  word_t                         vga_wdata;

  risc12_iomap #(.RAM_WORDS(RAM_WORDS), .VGA_CELLS(VGA_CELLS)) u_iomap (
    .clk, .reset,
    .addr_e(d_addr), .wdata_e(d_wdata), .we_e(d_we), .rdata_m(d_rdata),
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .vga_we, .vga_addr, .vga_wdata,
    .sw_data
  );

  risc12_dram #(.DEPTH(RAM_WORDS)) u_dram (
    .clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  free_counter #(.WIDTH(CNT_WIDTH), .EXT_BIT(EXT_BIT)) u_counter (
    .clk, .reset, .count(), .ext(ext_cond)
  );

  vga_display #(.COLS(VGA_COLS), .ROWS(VGA_ROWS), .CLK_DIV(VGA_CLK_DIV)) u_vga (
    .clk, .reset, .we(vga_we), .waddr(vga_addr), .wdata(vga_wdata),
    .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync
  );

endmodule
