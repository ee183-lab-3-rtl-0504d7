// free_counter: free-running binary counter.
//
// Counts up by one every clock and wraps; ext is bit EXT_BIT of the count,
// the signal the system feeds to the processor's external jump condition,
// so EXT_COND toggles every 2^EXT_BIT cycles. That one counter bit drives
// EXT_COND is from the specification; the width and the bit (24 bits, bit 23: about
// three toggles per second at 50 MHz) are this code's choices. Synchronous,
// active-high reset to zero.
module free_counter #(
  parameter int unsigned WIDTH   = 24,
  parameter int unsigned EXT_BIT = 23
) (
  input  logic             clk,
  input  logic             reset,
  output logic [WIDTH-1:0] count,
  output logic             ext
);

  always_ff @(posedge clk)
    if (reset) count <= '0;
    else       count <= count + 1'b1;

  assign ext = count[EXT_BIT];

endmodule
