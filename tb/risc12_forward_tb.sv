// risc12_forward_tb: self-checking test of the forwarding unit.
//
// Random register numbers (from a small set so that matches are frequent),
// write enables and values. The expected operand is the W-stage value when
// the W-stage instruction writes that register, else the post-W value when
// that one does, else the register file value.
module risc12_forward_tb;
  import risc12_pkg::*;

  reg_t ra, rb, w_wc, x_wc;
  word_t rf_a, rf_b, w_data, x_data, a, b;
  logic w_we, x_we;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  risc12_forward dut (.ra, .rb, .rf_a, .rf_b, .w_we, .w_wc, .w_data,
                      .x_we, .x_wc, .x_data, .a, .b, .sel_a, .sel_b);

  function automatic word_t pick(reg_t r, word_t rf);
    if (w_we && w_wc == r) return w_data;
    if (x_we && x_wc == r) return x_data;
    return rf;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      ra = 3'($urandom % 3); rb = 3'($urandom % 3);
      w_wc = 3'($urandom % 3); x_wc = 3'($urandom % 3);
      w_we = 1'($urandom); x_we = 1'($urandom);
      rf_a = 12'($urandom); rf_b = 12'($urandom);
      w_data = 12'($urandom); x_data = 12'($urandom);
      #1;
      checks++;
      if (a !== pick(ra, rf_a) || b !== pick(rb, rf_b)) begin
        failures++;
        if (failures < 10) $display("FAIL ra %0d rb %0d w %b/%0d x %b/%0d: a %h b %h", ra, rb,
                                    w_we, w_wc, x_we, x_wc, a, b);
      end
      seen[sel_a]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
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
