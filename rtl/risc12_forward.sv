// risc12_forward: operand forwarding into the E stage.
//
// Every result is forwarded to the E stage. An E-stage operand register
// number is compared with the destination of the instruction now in the W
// stage and with the destination kept in the extra register after the W
// stage; the newer matching result wins, otherwise the value read from the
// register file in the R stage is used. The W-stage result is the one
// selected by the W-stage mux, so a LOAD's memory data is forwarded as well
// and no NOPs are needed between dependent instructions. The two sources and
// the E-stage destination follow the specification's block diagram; the priority
// order is the only order that gives correct results. Combinational; sel_a
// and sel_b report the chosen sources.
module risc12_forward
  import risc12_pkg::*;
(
  input  reg_t     ra,
  input  reg_t     rb,
  input  word_t    rf_a,
  input  word_t    rf_b,
  input  logic     w_we,
  input  reg_t     w_wc,
  input  word_t    w_data,
  input  logic     x_we,
  input  reg_t     x_wc,
  input  word_t    x_data,
  output word_t    a,
  output word_t    b,
  output fwd_sel_e sel_a,
  output fwd_sel_e sel_b
);

  function automatic fwd_sel_e pick(reg_t r);
    if (w_we && w_wc == r)      return FWD_W;
    else if (x_we && x_wc == r) return FWD_X;
    else                        return FWD_RF;
  endfunction

  assign sel_a = pick(ra);
  assign sel_b = pick(rb);

  always_comb begin
    unique case (sel_a)
      FWD_W:   a = w_data;
      FWD_X:   a = x_data;
      default: a = rf_a;
    endcase
    unique case (sel_b)
      FWD_W:   b = w_data;
      FWD_X:   b = x_data;
      default: b = rf_b;
    endcase
  end

endmodule
