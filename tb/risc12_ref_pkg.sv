// risc12_ref_pkg: instruction-level reference model of the 12-bit RISC,
// used by the processor and system testbenches as an independent checker.
//
// The model executes one instruction per call of step(), in program order,
// with the architectural rules written out directly from the instruction set
// rather than from the RTL: each ALU operation as its own expression, flags
// set by ALU-class instructions only, one delay-slot instruction after every
// jump (modelled with a PC / next-PC pair), conditional targets in the page
// of the jump. Data memory is modelled as RAM (0x000-0x7FF), write-only
// frame buffer (0x800-0xCAF) and switches (0xFFF). step() returns what the
// instruction writes, so a testbench can compare it with the pipeline's
// register and memory writes when that instruction reaches E and W.
package risc12_ref_pkg;

  typedef struct {
    logic [11:0] pc;
    logic        reg_we;
    logic [2:0]  wc;
    logic [11:0] wdata;
    logic        mem_we;
    logic [11:0] maddr;
    logic [11:0] mdata;
    logic        is_jump;
    logic        taken;
  } effect_t;

  class risc12_ref;
    logic [15:0] rom [4096];
    logic [11:0] regs [8];
    logic [11:0] ram [2048];
    logic [11:0] vga [1200];
    logic [11:0] pc, npc;
    logic        f_neg, f_zero, f_carry;

    function new();
      foreach (rom[i]) rom[i] = '0;
      foreach (regs[i]) regs[i] = '0;
      foreach (ram[i]) ram[i] = '0;
      foreach (vga[i]) vga[i] = '0;
      pc = 0; npc = 1;
      f_neg = 0; f_zero = 0; f_carry = 0;
    endfunction

    function logic [11:0] rd(logic [11:0] a, logic [11:0] sw);
      if (a < 12'h800) return ram[a[10:0]];
      if (a == 12'hFFF) return sw;
      return '0;
    endfunction

    function effect_t step(logic ext, logic [11:0] sw);
      effect_t e;
      logic [15:0] w;
      logic [11:0] a, b, y, nxt;
      logic [12:0] s;
      logic [4:0]  op;
      logic        c, cond;
      w = rom[pc];
      e = '{default: '0};
      e.pc = pc;
      nxt = npc + 1;
      if (w[15]) begin
        e.reg_we = 1; e.wc = w[13:11]; e.wdata = {w[14], w[10:0]};
      end else if (w[14]) begin
        op = w[10:6]; a = regs[w[5:3]]; b = regs[w[2:0]];
        s = '0; c = 0; y = '0;
        case (op)
          5'h00: s = a + b;
          5'h01: s = a + b + 1;
          5'h02, 5'h07, 5'h15: y = a;
          5'h03: s = a + 1;
          5'h04: s = {1'b0, a} + {1'b0, ~b};
          5'h05: s = {1'b0, a} + {1'b0, ~b} + 1;
          5'h06: s = {1'b0, a} + 13'hFFF;
          5'h08: y = a << 1;
          5'h09: y = $signed(a) >>> 1;
          5'h10: y = 0;
          5'h11: y = a & b;
          5'h12: y = ~a & b;
          5'h13: y = b;
          5'h14: y = a & ~b;
          5'h16: y = a ^ b;
          5'h17: y = a | b;
          5'h18: y = ~(a | b);
          5'h19: y = ~(a ^ b);
          5'h1A: y = ~a;
          5'h1B: y = ~a | b;
          5'h1C: y = ~b;
          5'h1D: y = a | ~b;
          5'h1E: y = ~(a & b);
          5'h1F: y = 12'hFFF;
          default: y = 0;
        endcase
        if (op inside {5'h00, 5'h01, 5'h03, 5'h04, 5'h05, 5'h06}) begin
          y = s[11:0]; c = s[12];
        end
        f_neg = y[11]; f_zero = (y == 0); f_carry = c;
        if (op == 5'h0A) begin
          e.reg_we = 1; e.wc = w[13:11]; e.wdata = rd(a, sw);
        end else if (op == 5'h0B) begin
          e.mem_we = 1; e.maddr = a; e.mdata = b;
          if (a < 12'h800) ram[a[10:0]] = b;
          else if (a <= 12'hCAF) vga[11'(a - 12'h800)] = b;
        end else begin
          e.reg_we = 1; e.wc = w[13:11]; e.wdata = y;
        end
      end else begin
        case (w[11:8])
          4'd0: cond = 1;
          4'd4: cond = f_neg;
          4'd5: cond = f_zero;
          4'd6: cond = f_carry;
          4'd7: cond = f_neg | f_zero;
          4'd8: cond = ext;
          default: cond = 0;
        endcase
        e.is_jump = (w != 0);
        case (w[13:12])
          2'd0: e.taken = !cond;
          2'd1: e.taken = cond;
          2'd2: e.taken = 1;
          default: e.taken = 0;
        endcase
        if (e.taken) nxt = (w[13:12] == 2'd2) ? w[11:0] : {pc[11:8], w[7:0]};
      end
      if (e.reg_we) regs[e.wc] = e.wdata;
      pc = npc; npc = nxt;
      return e;
    endfunction
  endclass

endpackage
