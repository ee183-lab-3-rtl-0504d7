// risc12_system_tb: end-to-end test of the whole system.
//
// The system runs the directed program cpu_test.hex from its instruction
// ROM, with the counter's bit 5 as EXT_COND so that the program's waits on
// the external condition finish quickly. The instruction-level reference
// model runs in lockstep with the pipeline (same checks as the processor
// test: PC in R, stores in E, register writes in W, final registers and
// RAM). On top of that the test checks the system's own paths: the switch
// value read through the address decoder, the two frame-buffer cells the
// program paints, and those colours on the VGA pins during a frame scan.
// Each mechanism of the design is counted and must occur at least once:
// forwarding from W and from the post-W register on each operand, a LOAD
// result forwarded, jumps taken and not taken, a conditional jump decided
// on EXT_COND, stores to RAM and to the frame buffer, switch reads.
module risc12_system_tb;
  import risc12_pkg::*;
  import risc12_ref_pkg::*;

  localparam logic [11:0] HALT_PC = 12'h06C;
  localparam logic [11:0] SW      = 12'h3C5;

  logic clk = 0, reset = 1;
  logic [11:0] sw_data = SW;
  logic [3:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync;

  always #5 clk = ~clk;

  risc12_system #(.IROM_INIT("tb/cpu_test.hex"), .CNT_WIDTH(8), .EXT_BIT(5)) dut (
    .clk, .reset, .sw_data, .vga_r, .vga_g, .vga_b, .vga_hsync, .vga_vsync
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int n_fwd_wa = 0, n_fwd_wb = 0, n_fwd_xa = 0, n_fwd_xb = 0, n_load_fwd = 0;
  int n_taken = 0, n_not_taken = 0, n_ext_jump = 0, n_ram_st = 0, n_vga_st = 0, n_sw_rd = 0;

  risc12_ref ref_m;
  effect_t h0, h1, h2;
  bit v0, v1, v2;
  int steps = 0, halt_seen = 0, cycles = 0;
  logic [15:0] prog [4096];

  initial begin
    ref_m = new();
    foreach (prog[i]) prog[i] = '0;
    $readmemh("tb/cpu_test.hex", prog);
    foreach (prog[i]) ref_m.rom[i] = prog[i];
    foreach (dut.u_cpu.u_rf.regs[i]) dut.u_cpu.u_rf.regs[i] = '0;
    v0 = 0; v1 = 0; v2 = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
  end

  always @(negedge clk) if (!reset) begin
    cycles++;
    h2 = h1; v2 = v1; h1 = h0; v1 = v0;
    v0 = dut.u_cpu.fetch_valid;
    if (v0) begin
      check(dut.u_cpu.pc_r == ref_m.pc, $sformatf("R-stage PC %h, expected %h", dut.u_cpu.pc_r, ref_m.pc));
      h0 = ref_m.step(dut.ext_cond, sw_data);
      steps++;
      if (h0.is_jump) begin
        check(dut.u_cpu.jump_taken == h0.taken, $sformatf("jump at %h", h0.pc));
        if (h0.taken) n_taken++; else n_not_taken++;
        if (h0.taken && prog[h0.pc][11:8] == 4'd8 && prog[h0.pc][15:13] == 3'b000) n_ext_jump++;
      end
      if (h0.pc == HALT_PC) halt_seen++;
    end
    check(dut.d_we == (v1 && h1.mem_we), $sformatf("store enable at %h", h1.pc));
    if (dut.d_we && v1 && h1.mem_we) begin
      check(dut.d_addr == h1.maddr && dut.d_wdata == h1.mdata, $sformatf("store at %h", h1.pc));
      if (dut.ram_we) n_ram_st++;
      if (dut.vga_we) n_vga_st++;
    end
    if (dut.u_cpu.fwd_sel_a == FWD_W) n_fwd_wa++;
    if (dut.u_cpu.fwd_sel_b == FWD_W) n_fwd_wb++;
    if (dut.u_cpu.fwd_sel_a == FWD_X) n_fwd_xa++;
    if (dut.u_cpu.fwd_sel_b == FWD_X) n_fwd_xb++;
    if ((dut.u_cpu.fwd_sel_a == FWD_W || dut.u_cpu.fwd_sel_b == FWD_W) && dut.u_cpu.w_mem_rd) n_load_fwd++;
    check(dut.u_cpu.w_we == (v2 && h2.reg_we), $sformatf("reg write enable at %h", h2.pc));
    if (dut.u_cpu.w_we && v2 && h2.reg_we) begin
      check(dut.u_cpu.w_wc == h2.wc && dut.u_cpu.w_data == h2.wdata,
            $sformatf("write at %h: R%0d=%h, expected R%0d=%h", h2.pc, dut.u_cpu.w_wc,
                      dut.u_cpu.w_data, h2.wc, h2.wdata));
      if (dut.u_cpu.w_mem_rd && dut.u_iomap.src_m == dut.u_iomap.SRC_SW) n_sw_rd++;
    end
  end

  int px_sw = 0;
  initial begin
    wait (halt_seen >= 4);
    @(negedge clk);
    check(steps == cycles - 1, $sformatf("%0d instructions in %0d cycles", steps, cycles));
    foreach (ref_m.regs[i])
      check(dut.u_cpu.u_rf.regs[i] == ref_m.regs[i], $sformatf("R%0d", i));
    for (int i = 0; i < 2048; i++)
      if (dut.u_dram.ram[i] != ref_m.ram[i]) check(0, $sformatf("RAM[%h]", i));
    check(dut.u_dram.ram['h102] == 12'd55, "sum 1..10");
    check(dut.u_dram.ram['h104] == 12'h5A6, "J delay slot executed");
    check(dut.u_dram.ram['h103] == 12'h000, "no wrong-way branch");
    check(dut.u_vga.fb[0] == SW && dut.u_vga.fb[1199] == SW, "switch value painted into cells 0 and 1199");
    // scan one frame on the VGA pins: cells 0 and 1199 are 16x16 pixels
    // each, and every pixel lasts two clocks
    repeat (525 * 800 * 2) begin
      @(negedge clk);
      if ({vga_r, vga_g, vga_b} == SW) px_sw++;
    end
    check(px_sw == 2 * 16 * 16 * 2, $sformatf("%0d pixels show the switch colour", px_sw));
    check(n_fwd_wa > 0, "forward W->A");
    check(n_fwd_wb > 0, "forward W->B");
    check(n_fwd_xa > 0, "forward X->A");
    check(n_fwd_xb > 0, "forward X->B");
    check(n_load_fwd > 0, "LOAD result forwarded");
    check(n_taken > 0 && n_not_taken > 0, "jumps taken and not taken");
    check(n_ext_jump > 0, "jump on EXT_COND");
    check(n_ram_st > 0 && n_vga_st == 2, "stores to RAM and frame buffer");
    check(n_sw_rd > 0, "switch read");
    $display("system: %0d instr; fwd WA %0d WB %0d XA %0d XB %0d load %0d; taken %0d not %0d ext %0d; st ram %0d vga %0d; sw %0d",
             steps, n_fwd_wa, n_fwd_wb, n_fwd_xa, n_fwd_xb, n_load_fwd, n_taken, n_not_taken,
             n_ext_jump, n_ram_st, n_vga_st, n_sw_rd);
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
