// risc12_regfile_tb: self-checking test of the register file.
//
// Random writes and reads against a shadow array: a written value must be
// readable on both ports from the next cycle on, a write must leave the
// other registers alone, and a disabled write must change nothing. Also
// checks that a register written in a cycle still reads its old value in
// that same cycle (no write-through; forwarding covers that case).
module risc12_regfile_tb;
  import risc12_pkg::*;

  logic clk = 0, we = 0;
  reg_t waddr = 0, ra = 0, rb = 0;
  word_t wdata = 0, qa, qb;
  word_t shadow [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  risc12_regfile dut (.clk, .we, .waddr, .wdata, .raddr_a(ra), .raddr_b(rb),
                      .rdata_a(qa), .rdata_b(qb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    // fill every register
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1; waddr = 3'(i); wdata = 12'($urandom); shadow[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      check(qa == shadow[ra] && qb == shadow[rb], $sformatf("read R%0d=%h R%0d=%h", ra, qa, rb, qb));
      we = 1'($urandom); waddr = 3'($urandom); wdata = 12'($urandom);
      ra = waddr; #1;
      check(qa == shadow[ra], "same-cycle read returns the old value");
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
