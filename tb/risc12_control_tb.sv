// risc12_control_tb: self-checking test of the decoder and jump resolution.
//
// Feeds random instruction words of all three classes, with random flags,
// EXT_COND and instruction address, and compares the decoded control word
// and the jump decision and target with the instruction-set rules written
// out in the testbench: LOADLIT literal = {bit 14, bits 10:0}; LOAD writes a
// register and reads memory; STORE writes memory only; other ALU codes write
// WC; JF jumps when its condition is false, JT when true, J always with a
// 12-bit target; conditional targets stay in the jump's 256-word page.
module risc12_control_tb;
  import risc12_pkg::*;

  instr_t instr;
  addr_t pc_r, jump_target;
  logic [3:0] pc_page;
  flags_t flags_e;
  logic ext_cond, jump_en;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_jt = 0, n_jf = 0, n_j = 0, n_taken = 0;

  risc12_control dut (.instr, .pc_page, .flags_e, .ext_cond, .ctrl, .jump_en, .jump_target);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s: instr %h", what, instr); end
  endtask

  function automatic logic cond_of(logic [3:0] c);
    case (c)
      4'd0: return 1'b1;
      4'd4: return flags_e.neg;
      4'd5: return flags_e.zero;
      4'd6: return flags_e.carry;
      4'd7: return flags_e.neg || flags_e.zero;
      4'd8: return ext_cond;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      instr = 16'($urandom);
      if (n % 3 == 0) instr[15:14] = 2'b00;
      if (n % 6 == 0) instr[11:8] = 4'(($urandom % 6 == 5) ? 8 : ($urandom % 2) ? 0 : 4 + $urandom % 4);
      pc_r = 12'($urandom);
      pc_page = pc_r[11:8];
      flags_e = 3'($urandom);
      ext_cond = 1'($urandom);
      #1;
      if (instr[15]) begin
        check(ctrl.reg_we && !ctrl.mem_we && !ctrl.mem_rd && ctrl.use_lit && !jump_en, "LOADLIT control");
        check(ctrl.wc == instr[13:11] && ctrl.literal == {instr[14], instr[10:0]} && ctrl.alu_op == OP_PASSB,
              "LOADLIT fields");
      end else if (instr[14]) begin
        check(!jump_en && !ctrl.use_lit && ctrl.alu_op == instr[10:6], "ALU op");
        check(ctrl.wc == instr[13:11] && ctrl.ra == instr[5:3] && ctrl.rb == instr[2:0], "ALU fields");
        if (instr[10:6] == 5'h0A)      check(ctrl.reg_we && ctrl.mem_rd && !ctrl.mem_we, "LOAD");
        else if (instr[10:6] == 5'h0B) check(!ctrl.reg_we && !ctrl.mem_rd && ctrl.mem_we, "STORE");
        else                           check(ctrl.reg_we && !ctrl.mem_rd && !ctrl.mem_we, "ALU write");
      end else begin
        check(!ctrl.reg_we && !ctrl.mem_we && !ctrl.mem_rd, "jump writes nothing");
        case (instr[13:12])
          2'd0: begin n_jf++; check(jump_en == !cond_of(instr[11:8]), "JF decision"); end
          2'd1: begin n_jt++; check(jump_en == cond_of(instr[11:8]), "JT decision"); end
          2'd2: begin n_j++;  check(jump_en && jump_target == instr[11:0], "J"); end
          default: check(!jump_en, "reserved jump op");
        endcase
        if (jump_en) n_taken++;
        if (jump_en && instr[13:12] != 2'd2)
          check(jump_target == {pc_r[11:8], instr[7:0]}, "conditional target");
      end
    end
    instr = 16'h0000; #1;
    check(!jump_en && !ctrl.reg_we && !ctrl.mem_we, "all-zero word is a NOP");
    check(n_jt > 100 && n_jf > 100 && n_j > 100 && n_taken > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
