// risc12_cpu_tb: self-checking test of the pipelined processor.
//
// The processor runs the directed program cpu_test.hex (every ALU operation,
// forwarding from W and from the post-W register on both operands, LOAD
// results forwarded, every jump condition taken and not taken, delay slots,
// a counted loop, waits on EXT_COND). The instruction ROM is the system's
// ROM module; data memory is a testbench model with the same one-cycle read
// latency and the system's address map. The reference model steps once per
// cycle in lockstep: the R-stage PC must equal the model's PC (one
// instruction per cycle, jumps with one delay slot), each store must appear
// in E one cycle later and each register write in W two cycles later with
// the model's value. At the end the register file and RAM are compared and a
// few results are checked against hand-computed values.
module risc12_cpu_tb;
  import risc12_pkg::*;
  import risc12_ref_pkg::*;

  localparam logic [11:0] HALT_PC = 12'h06C;

  logic clk = 0, reset = 1, ext_cond = 0;
  addr_t irom_addr, d_addr;
  instr_t irom_data;
  word_t d_wdata, d_rdata;
  logic d_we;
  fwd_sel_e sel_a, sel_b;
  logic jump_taken;
  logic [11:0] sw = 12'h3C5;

  always #5 clk = ~clk;

  risc12_cpu dut (
    .clk, .reset, .ext_cond,
    .irom_addr_i(irom_addr), .irom_data_d(irom_data),
    .dram_addr_e(d_addr), .dram_data_e(d_wdata), .dram_we(d_we),
    .dram_data_m(d_rdata),
    .fwd_sel_a(sel_a), .fwd_sel_b(sel_b), .jump_taken
  );

  risc12_irom #(.INIT_FILE("tb/cpu_test.hex")) u_rom (
    .clk, .addr(irom_addr), .data(irom_data)
  );

  // data memory model: RAM below 0x800, switches at 0xFFF, one-cycle read
  logic [11:0] mem [2048];
  initial foreach (mem[i]) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (d_we && d_addr < 12'h800) mem[d_addr[10:0]] <= d_wdata;
    d_rdata <= (d_addr < 12'h800) ? mem[d_addr[10:0]] :
               (d_addr == 12'hFFF) ? sw : 12'h000;
  end

  // EXT_COND: a slow square wave
  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 40 == 39) ext_cond <= ~ext_cond;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  risc12_ref ref_m;
  effect_t h0, h1, h2;
  bit v0, v1, v2;
  int steps = 0, halt_seen = 0, cycles = 0;
  int n_fwd_w = 0, n_fwd_x = 0, n_taken = 0, n_not_taken = 0;

  logic [15:0] prog [4096];

  initial begin
    ref_m = new();
    foreach (prog[i]) prog[i] = '0;
    $readmemh("tb/cpu_test.hex", prog);
    foreach (prog[i]) ref_m.rom[i] = prog[i];
    foreach (dut.u_rf.regs[i]) dut.u_rf.regs[i] = '0;
    v0 = 0; v1 = 0; v2 = 0;
    repeat (3) @(posedge clk);
    reset <= 0;
  end

  always @(negedge clk) if (!reset) begin
    cycles++;
    h2 = h1; v2 = v1; h1 = h0; v1 = v0;
    v0 = dut.fetch_valid;
    if (v0) begin
      check(dut.pc_r == ref_m.pc, $sformatf("R-stage PC %h, expected %h", dut.pc_r, ref_m.pc));
      h0 = ref_m.step(ext_cond, sw);
      steps++;
      if (h0.is_jump) begin
        check(jump_taken == h0.taken, $sformatf("jump at %h taken=%b", h0.pc, jump_taken));
        if (h0.taken) n_taken++; else n_not_taken++;
      end
      if (h0.pc == HALT_PC) halt_seen++;
    end
    // E stage: the store of the instruction one step older
    check(d_we == (v1 && h1.mem_we), $sformatf("store enable %b at %h", d_we, h1.pc));
    if (d_we && v1 && h1.mem_we) begin
      check(d_addr == h1.maddr && d_wdata == h1.mdata,
            $sformatf("store at %h: [%h]=%h, expected [%h]=%h", h1.pc, d_addr, d_wdata, h1.maddr, h1.mdata));
    end
    if (sel_a == FWD_W || sel_b == FWD_W) n_fwd_w++;
    if (sel_a == FWD_X || sel_b == FWD_X) n_fwd_x++;
    // W stage: the register write of the instruction two steps older
    check(dut.w_we == (v2 && h2.reg_we), $sformatf("reg write enable at %h", h2.pc));
    if (dut.w_we && v2 && h2.reg_we) begin
      check(dut.w_wc == h2.wc && dut.w_data == h2.wdata,
            $sformatf("write at %h: R%0d=%h, expected R%0d=%h", h2.pc, dut.w_wc, dut.w_data, h2.wc, h2.wdata));
    end
  end

  initial begin
    wait (halt_seen >= 4);
    @(negedge clk);
    // throughput: one instruction per cycle once the pipeline is full
    check(steps == cycles - 1, $sformatf("%0d instructions in %0d cycles", steps, cycles));
    foreach (ref_m.regs[i])
      check(dut.u_rf.regs[i] == ref_m.regs[i], $sformatf("R%0d = %h, expected %h", i, dut.u_rf.regs[i], ref_m.regs[i]));
    foreach (mem[i])
      if (mem[i] != ref_m.ram[i]) check(0, $sformatf("RAM[%h] = %h, expected %h", i, mem[i], ref_m.ram[i]));
    // independent hand-computed results of the program
    check(mem['h102] == 12'd55, "sum 1..10");
    check(mem['h104] == 12'h5A6, "J delay slot executed");
    check(mem['h103] == 12'h000, "no wrong-way branch reached 'bad'");
    check(mem['h100] == (12'hABC ^ 12'hFFF), "load-forwarded XOR");
    check(mem['h101] == 12'hFFF, "ONES stored");
    check(n_fwd_w > 0 && n_fwd_x > 0, "both forwarding paths used");
    check(n_taken > 5 && n_not_taken > 5, "jumps taken and not taken");
    $display("cpu: %0d instructions, fwd W %0d, fwd X %0d, taken %0d, not taken %0d",
             steps, n_fwd_w, n_fwd_x, n_taken, n_not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
