// risc12_iomap: data address decoder and read-data mux.
//
// The processor's single data port (address, store data and write enable in
// the E stage; read data expected in the W stage) is shared between the data
// RAM and the memory-mapped devices:
//   0x000-0x7FF  data RAM (read/write)
//   0x800-0xCAF  VGA frame buffer, one 12-bit colour per screen cell,
//                cell = address - 0x800 (write only; reads give 0)
//   0xFFF        the 12 switches SW_DATA (read only)
//   others       reads give 0, writes are ignored
// The design asks for a memory-mapped VGA device and switch input but gives
// no map; this map is this code's choice. Because the RAM answers one cycle
// after the address, the decoder registers which device was addressed, and
// the switches are sampled at the same edge, so every read returns its word
// in the W stage. Synchronous, active-high reset.
module risc12_iomap
  import risc12_pkg::*;
#(
  parameter int unsigned RAM_WORDS = 2048,
  parameter addr_t       VGA_BASE  = 12'h800,
  parameter int unsigned VGA_CELLS = 1200,
  parameter addr_t       SW_ADDR   = 12'hFFF
) (
  input  logic  clk,
  input  logic  reset,
  // processor side
  input  addr_t addr_e,
  input  word_t wdata_e,
  input  logic  we_e,
  output word_t rdata_m,
  // data RAM
  output logic  ram_we,
  output logic [$clog2(RAM_WORDS)-1:0] ram_addr,
  output word_t ram_wdata,
  input  word_t ram_rdata,
  // VGA frame buffer write port
  output logic  vga_we,
  output logic [$clog2(VGA_CELLS)-1:0] vga_addr,
  output word_t vga_wdata,
  // switches
  input  word_t sw_data
);

  typedef enum logic [1:0] {SRC_NONE, SRC_RAM, SRC_SW} src_e;

  logic  in_ram, in_vga, in_sw;
  addr_t vga_off;
  src_e  src_m;
  word_t sw_m;

  assign vga_off = addr_e - VGA_BASE;
  assign in_ram  = 32'(addr_e) < RAM_WORDS;
  assign in_vga  = addr_e >= VGA_BASE && 32'(vga_off) < VGA_CELLS;
  assign in_sw   = addr_e == SW_ADDR;

  assign ram_we    = we_e & in_ram;
  assign ram_addr  = addr_e[$clog2(RAM_WORDS)-1:0];
  assign ram_wdata = wdata_e;

  assign vga_we    = we_e & in_vga;
  assign vga_addr  = vga_off[$clog2(VGA_CELLS)-1:0];
  assign vga_wdata = wdata_e;

  always_ff @(posedge clk) begin
    if (reset) begin
      src_m <= SRC_NONE;
      sw_m  <= '0;
    end else begin
      src_m <= in_ram ? SRC_RAM : in_sw ? SRC_SW : SRC_NONE;
      sw_m  <= sw_data;
    end
  end

  always_comb begin
    unique case (src_m)
      SRC_RAM: rdata_m = ram_rdata;
      SRC_SW:  rdata_m = sw_m;
      default: rdata_m = '0;
    endcase
  end

endmodule
