// risc12_iomap_tb: self-checking test of the data address decoder.
//
// Drives random and boundary addresses (0x7FF/0x800, 0xCAF/0xCB0, 0xFFE/
// 0xFFF) with random write enables and checks the RAM and frame-buffer
// write strobes and addresses in the same cycle, and, one cycle later, that
// the read data comes from the RAM, the switches or is zero according to the
// address presented the cycle before.
module risc12_iomap_tb;
  import risc12_pkg::*;

  logic clk = 0, reset = 1;
  addr_t addr = 0, prev;
  word_t wdata = 0, rdata, ram_rdata = 0, sw = 0, sw_prev, ram_prev;
  logic we = 0, ram_we, vga_we;
  logic [10:0] ram_addr, vga_addr;
  word_t ram_wdata, vga_wdata;
  int checks = 0, failures = 0;
  int n_ram = 0, n_vga = 0, n_sw = 0;

  always #5 clk = ~clk;

  risc12_iomap dut (.clk, .reset, .addr_e(addr), .wdata_e(wdata), .we_e(we), .rdata_m(rdata),
                    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
                    .vga_we, .vga_addr, .vga_wdata, .sw_data(sw));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s (addr %h)", what, addr); end
  endtask

  addr_t edges [8] = '{12'h000, 12'h7FF, 12'h800, 12'hCAF, 12'hCB0, 12'hFFE, 12'hFFF, 12'h801};

  initial begin
    repeat (2) @(posedge clk);
    reset = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = (n % 3 == 0) ? edges[$urandom % 8] : 12'($urandom);
      we = 1'($urandom); wdata = 12'($urandom); sw = 12'($urandom);
      #1;
      check(ram_we == (we && addr < 12'h800), "RAM write strobe");
      check(vga_we == (we && addr >= 12'h800 && addr <= 12'hCAF), "VGA write strobe");
      if (ram_we) begin n_ram++; check(ram_addr == addr[10:0] && ram_wdata == wdata, "RAM write"); end
      if (vga_we) begin n_vga++; check(vga_addr == 11'(addr - 12'h800) && vga_wdata == wdata, "VGA write"); end
      prev = addr; sw_prev = sw;
      @(posedge clk); #1;
      ram_rdata = 12'($urandom); ram_prev = ram_rdata; #1;
      if (prev < 12'h800)       check(rdata == ram_prev, "RAM read data");
      else if (prev == 12'hFFF) begin n_sw++; check(rdata == sw_prev, "switch read"); end
      else                      check(rdata == 12'h000, "unmapped read gives 0");
    end
    check(n_ram > 0 && n_vga > 0 && n_sw > 0, "coverage");
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
