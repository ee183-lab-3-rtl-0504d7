// risc12_hazards_tb: the pipeline-hazard examples, cycle by cycle.
//
// Runs hazards.hex on the processor: the data-hazard sequence
// ADD R1,R2,R3 / SUB R4,R1,R5 / NOR R6,R1,R7, then the control-hazard
// sequence ADD / JT.ZERO / SUB / AND / NOR once with the jump not taken and
// once taken (R0 stands in for the example's R8, which does not exist with
// eight registers). Checks, against hand-computed values: the SUB gets R1
// from the W stage two cycles after the ADD was in R and the NOR gets it
// from the post-W register one cycle later; the jump is resolved with
// exactly one delay-slot instruction (the SUB) executing, the AND executing
// only when the jump is not taken; and the stored results.
module risc12_hazards_tb;
  import risc12_pkg::*;

  logic clk = 0, reset = 1;
  addr_t irom_addr, d_addr;
  instr_t irom_data;
  word_t d_wdata, d_rdata;
  logic d_we, jump_taken;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_cpu dut (
    .clk, .reset, .ext_cond(1'b0),
    .irom_addr_i(irom_addr), .irom_data_d(irom_data),
    .dram_addr_e(d_addr), .dram_data_e(d_wdata), .dram_we(d_we), .dram_data_m(d_rdata),
    .fwd_sel_a(sel_a), .fwd_sel_b(sel_b), .jump_taken
  );

  risc12_irom #(.INIT_FILE("tb/hazards.hex")) u_rom (.clk, .addr(irom_addr), .data(irom_data));

  logic [11:0] mem [16];
  initial foreach (mem[i]) mem[i] = '0;
  always_ff @(posedge clk) begin
    if (d_we && d_addr[11:4] == 8'h10) mem[d_addr[3:0]] <= d_wdata;
    d_rdata <= 12'h000;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // trace of R-stage addresses and forwarding selections, one entry per cycle
  addr_t pcs [$];
  fwd_sel_e sa [$];
  always @(negedge clk) if (!reset && dut.fetch_valid) begin
    pcs.push_back(dut.pc_r);
    sa.push_back(sel_a);
  end

  function automatic int find(addr_t a);
    foreach (pcs[i]) if (pcs[i] == a) return i;
    return -1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    wait (pcs.size() > 0 && pcs[$] == 12'd34);
    repeat (4) @(negedge clk);
    begin
      int t;
      t = find(12'd6);       // ADD R1,R2,R3 in R
      check(t >= 0 && pcs[t+1] == 7 && pcs[t+2] == 8, "data-hazard instructions issue back to back");
      check(sa[t+2] == FWD_W, "SUB takes R1 from W");
      check(sa[t+3] == FWD_X, "NOR takes R1 from the post-W register");
      t = find(12'd11);      // JT.ZERO not taken
      check(pcs[t+1] == 12 && pcs[t+2] == 13 && pcs[t+3] == 14, "not taken: fall through");
      t = find(12'd24);      // JT.ZERO taken
      check(pcs[t+1] == 25 && pcs[t+2] == 27, "taken: one delay slot, then the target");
      check(find(12'd26) < 0, "AND after a taken jump never issues");
    end
    check(dut.u_rf.regs[1] == 12'h000, "R1");
    check(mem[0] == 12'hEEE, "delay-slot SUB (not taken)");
    check(mem[1] == 12'h008, "AND executes when not taken");
    check(mem[2] == 12'hE90, "NOR (not taken)");
    check(mem[3] == 12'h112, "delay-slot SUB (taken)");
    check(mem[4] == 12'h0F0, "AND skipped when taken");
    check(mem[5] == 12'hFF0, "NOR at target");
    check(dut.u_rf.regs[6] == 12'hFF0 && dut.u_rf.regs[4] == 12'h112, "registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data-hazard results, checked as they are written back
  always @(negedge clk) if (!reset && dut.w_we && dut.pc_r == 12'd9)
    check(dut.w_wc == 3'd4 && dut.w_data == 12'h157, "SUB R4 = R1 - R5 with R1 forwarded");
  always @(negedge clk) if (!reset && dut.w_we && dut.pc_r == 12'd10)
    check(dut.w_wc == 3'd6 && dut.w_data == 12'hE07, "NOR R6 with R1 forwarded");

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
