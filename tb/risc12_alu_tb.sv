// risc12_alu_tb: self-checking test of the ALU.
//
// Applies every operation code to corner operands (0, 1, 0x7FF, 0x800,
// 0xFFF) and to random operands, and compares the result and the NEG, ZERO
// and CARRY flags with a model that writes each operation out as its own
// expression (13-bit sums for the carry).
module risc12_alu_tb;
  import risc12_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  flags_t flags;
  int checks = 0, failures = 0;

  risc12_alu dut (.op, .a, .b, .y, .flags);

  task automatic expect_ok(logic [4:0] o, word_t ea, word_t eb);
    logic [12:0] s;
    word_t ey;
    logic ec;
    s = '0; ec = 0;
    case (o)
      5'h00: s = ea + eb;
      5'h01: s = ea + eb + 1;
      5'h03: s = ea + 1;
      5'h04: s = ea - eb - 1 + 13'h1000;
      5'h05: s = ea - eb + 13'h1000;
      5'h06: s = ea - 1 + 13'h1000;
      default: s = '0;
    endcase
    case (o)
      5'h00, 5'h01, 5'h03, 5'h04, 5'h05, 5'h06: begin ey = s[11:0]; ec = s[12]; end
      5'h02, 5'h07, 5'h15: ey = ea;
      5'h08: ey = {ea[10:0], 1'b0};
      5'h09: ey = {ea[11], ea[11:1]};
      5'h11: ey = ea & eb;
      5'h12: ey = ~ea & eb;
      5'h13: ey = eb;
      5'h14: ey = ea & ~eb;
      5'h16: ey = ea ^ eb;
      5'h17: ey = ea | eb;
      5'h18: ey = ~(ea | eb);
      5'h19: ey = ea ^ ~eb;
      5'h1A: ey = ~ea;
      5'h1B: ey = ~ea | eb;
      5'h1C: ey = ~eb;
      5'h1D: ey = ea | ~eb;
      5'h1E: ey = ~ea | ~eb;
      5'h1F: ey = 12'hFFF;
      default: ey = 12'h000;
    endcase
    op = alu_op_e'(o); a = ea; b = eb;
    #1;
    checks++;
    if (y !== ey || flags.carry !== ec || flags.zero !== (ey == 0) || flags.neg !== ey[11]) begin
      failures++;
      if (failures < 10)
        $display("FAIL op %h a %h b %h: y %h c%b z%b n%b, expected %h c%b", o, ea, eb, y,
                 flags.carry, flags.zero, flags.neg, ey, ec);
    end
  endtask

  word_t corner [5] = '{12'h000, 12'h001, 12'h7FF, 12'h800, 12'hFFF};

  initial begin
    for (int o = 0; o < 32; o++) begin
      foreach (corner[i]) foreach (corner[j]) expect_ok(5'(o), corner[i], corner[j]);
      repeat (200) expect_ok(5'(o), 12'($urandom), 12'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
