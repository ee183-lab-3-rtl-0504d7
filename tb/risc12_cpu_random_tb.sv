// risc12_cpu_random_tb: the processor on random programs, checked against
// the instruction-level reference model.
//
// Generates NPROG programs of LEN instructions each. Every program starts by
// loading all eight registers with random literals, then mixes random ALU
// operations, LOADLITs of small RAM addresses (so that stores and loads hit
// the same words), LOADs and STOREs through random registers (which also hit
// the switches and unmapped addresses), conditional jumps that follow an ALU
// instruction as the programming rules require, jumps on EXT and
// unconditional jumps, all forward within the program, and ends in a halt
// loop. The instruction ROM and data memory are testbench models with one
// cycle of read latency. Between programs the processor is reset and the
// memory cleared. The lockstep checks are those of risc12_cpu_tb: R-stage
// PC, stores in E, register writes in W, and final registers and RAM.
module risc12_cpu_random_tb;
  import risc12_pkg::*;
  import risc12_ref_pkg::*;

  localparam int NPROG = 200;
  localparam int LEN   = 240;   // instructions per program, halt loop included

  logic clk = 0, reset = 1, ext_cond = 0;
  addr_t irom_addr, d_addr;
  instr_t irom_data;
  word_t d_wdata, d_rdata;
  logic d_we, jump_taken;
  fwd_sel_e sel_a, sel_b;
  logic [11:0] sw = 12'h5E1;

  always #5 clk = ~clk;

  risc12_cpu dut (
    .clk, .reset, .ext_cond,
    .irom_addr_i(irom_addr), .irom_data_d(irom_data),
    .dram_addr_e(d_addr), .dram_data_e(d_wdata), .dram_we(d_we), .dram_data_m(d_rdata),
    .fwd_sel_a(sel_a), .fwd_sel_b(sel_b), .jump_taken
  );

  logic [15:0] rom [4096];
  logic [11:0] mem [2048];
  always_ff @(posedge clk) begin
    irom_data <= rom[irom_addr];
    if (d_we && d_addr < 12'h800) mem[d_addr[10:0]] <= d_wdata;
    d_rdata <= (d_addr < 12'h800) ? mem[d_addr[10:0]] :
               (d_addr == 12'hFFF) ? sw : 12'h000;
  end

  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 23 == 22) ext_cond <= ~ext_cond;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- program generator ----
  function automatic logic [15:0] alu_word(logic [4:0] op);
    return {2'b01, 3'($urandom), op, 3'($urandom), 3'($urandom)};
  endfunction

  function automatic logic [4:0] random_alu_op();
    logic [4:0] op;
    do op = 5'($urandom); while (op inside {[5'h0A:5'h0F]});
    return op;
  endfunction

  int halt_pc;
  task automatic generate_program();
    bit prev_alu = 0;
    foreach (rom[i]) rom[i] = '0;
    for (int r = 0; r < 8; r++)
      rom[r] = {1'b1, 1'($urandom), 3'(r), 11'($urandom)};
    for (int pc = 8; pc < LEN - 2; pc++) begin
      int kind = $urandom % 100;
      int room = LEN - 2 - pc;   // forward jump distance that stays in the program
      if (kind < 40) begin
        rom[pc] = alu_word(random_alu_op()); prev_alu = 1;
      end else if (kind < 52) begin
        logic [11:0] a = ($urandom % 8 == 0) ? 12'hFFF : 12'($urandom % 16);
        rom[pc] = {1'b1, a[11], 3'($urandom), a[10:0]}; prev_alu = 0;
      end else if (kind < 64) begin
        rom[pc] = alu_word(5'h0A); prev_alu = 0;           // LOAD
      end else if (kind < 76) begin
        rom[pc] = alu_word(5'h0B); prev_alu = 0;           // STORE
      end else if (kind < 90 && prev_alu && room > 3) begin
        logic [3:0] c = 4'(4 + $urandom % 4);              // NEG..NEGZERO
        int t = pc + 2 + $urandom % (room < 12 ? room - 2 : 10);
        rom[pc] = {2'b00, 2'($urandom % 2), c, 8'(t)}; prev_alu = 0;
      end else if (kind < 95 && room > 3) begin
        int t = pc + 2 + $urandom % (room < 12 ? room - 2 : 10);
        rom[pc] = {2'b00, 2'($urandom % 2), 4'(($urandom % 2) ? 8 : 0), 8'(t)}; prev_alu = 0;
      end else if (room > 3) begin
        int t = pc + 2 + $urandom % (room < 12 ? room - 2 : 10);
        rom[pc] = {4'b0010, 12'(t)}; prev_alu = 0;
      end else begin
        rom[pc] = alu_word(random_alu_op()); prev_alu = 1;
      end
    end
    // A flag-testing jump must be reached only from the ALU instruction
    // before it: turn any such jump that is also a jump target into an ALU
    // operation.
    for (int pc = 8; pc < LEN - 2; pc++) begin
      logic [15:0] w = rom[pc];
      int t;
      if (w[15:14] != 2'b00 || w == 16'h0000) continue;
      t = (w[13:12] == 2'd2) ? int'(w[11:0]) : int'(w[7:0]);
      if (rom[t][15:14] == 2'b00 && rom[t][13:12] != 2'd2 && rom[t][11:8] inside {[4'd4:4'd7]})
        rom[t] = alu_word(random_alu_op());
    end
    halt_pc = LEN - 2;
    rom[LEN - 2] = {4'b0010, 12'(LEN - 2)};  // J halt
    rom[LEN - 1] = '0;
  endtask

  // ---- lockstep check ----
  risc12_ref ref_m;
  effect_t h0, h1, h2;
  bit v0, v1, v2;
  bit running = 0;
  int halt_seen = 0, steps = 0;
  int n_fwd_w = 0, n_fwd_x = 0, n_taken = 0, n_not_taken = 0, n_loads = 0, n_stores = 0;

  always @(negedge clk) if (running && !reset) begin
    h2 = h1; v2 = v1; h1 = h0; v1 = v0;
    v0 = dut.fetch_valid;
    if (v0) begin
      check(dut.pc_r == ref_m.pc, $sformatf("R-stage PC %h, expected %h", dut.pc_r, ref_m.pc));
      h0 = ref_m.step(ext_cond, sw);
      steps++;
      if (h0.is_jump) begin
        check(jump_taken == h0.taken, $sformatf("jump at %h", h0.pc));
        if (h0.taken) n_taken++; else n_not_taken++;
      end
      if (h0.pc == 12'(halt_pc)) halt_seen++;
    end
    check(d_we == (v1 && h1.mem_we), $sformatf("store enable at %h", h1.pc));
    if (d_we && v1 && h1.mem_we) begin
      n_stores++;
      check(d_addr == h1.maddr && d_wdata == h1.mdata, $sformatf("store at %h", h1.pc));
    end
    if (sel_a == FWD_W || sel_b == FWD_W) n_fwd_w++;
    if (sel_a == FWD_X || sel_b == FWD_X) n_fwd_x++;
    if (dut.w_mem_rd) n_loads++;
    check(dut.w_we == (v2 && h2.reg_we), $sformatf("reg write enable at %h", h2.pc));
    if (dut.w_we && v2 && h2.reg_we)
      check(dut.w_wc == h2.wc && dut.w_data == h2.wdata,
            $sformatf("write at %h: R%0d=%h, expected R%0d=%h", h2.pc, dut.w_wc, dut.w_data, h2.wc, h2.wdata));
  end

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      reset = 1;
      running = 0;
      generate_program();
      foreach (mem[i]) mem[i] = '0;
      ref_m = new();
      foreach (rom[i]) ref_m.rom[i] = rom[i];
      v0 = 0; v1 = 0; v2 = 0; halt_seen = 0;
      repeat (3) @(posedge clk);
      @(negedge clk);
      reset = 0;
      running = 1;
      wait (halt_seen >= 3);
      @(negedge clk);
      foreach (ref_m.regs[i])
        check(dut.u_rf.regs[i] == ref_m.regs[i], $sformatf("program %0d: R%0d", p, i));
      foreach (mem[i])
        if (mem[i] != ref_m.ram[i]) check(0, $sformatf("program %0d: RAM[%h]", p, i));
      checks++;
    end
    check(n_fwd_w > 100 && n_fwd_x > 100 && n_taken > 100 && n_not_taken > 100 &&
          n_loads > 100 && n_stores > 100, "coverage");
    $display("random: %0d programs, %0d instructions; fwd W %0d X %0d; taken %0d not %0d; loads %0d stores %0d",
             NPROG, steps, n_fwd_w, n_fwd_x, n_taken, n_not_taken, n_loads, n_stores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPROG * (LEN + 20) * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
