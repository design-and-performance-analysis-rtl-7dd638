// lfsr: maximal-length linear feedback shift register, the random number
// generator of the random-access arbitration algorithm.
//
// Fibonacci form, shifting left: the new bit 0 is the XOR of the taps of the
// polynomial x^16 + x^14 + x^13 + x^11 + 1, which visits all 65535 non-zero
// states. The random-number source being an LFSR follows the arbiter design;
// the width, polynomial and seed are this design's choice. A zero seed would
// lock the register, so a zero SEED is replaced by 1.
//
// Interface: step advances the state by one at the rising clock edge; q is
// the registered state. Asynchronous active-low reset loads SEED.
module lfsr #(
  parameter int unsigned       W    = 16,
  parameter logic [W-1:0]      SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [W-1:0] q
);

  // Tap mask for the supported widths (bit i set = stage i+1 is a tap).
  function automatic logic [W-1:0] taps();
    case (W)
      8:       return W'(8'hB8);          // x^8+x^6+x^5+x^4+1
      16:      return W'(16'hB400);       // x^16+x^14+x^13+x^11+1
      32:      return W'(32'h8020_0003);  // x^32+x^22+x^2+x^1+1
      default: return W'(16'hB400);
    endcase
  endfunction

  localparam logic [W-1:0] TAPS      = taps();
  localparam logic [W-1:0] SAFE_SEED = (SEED == '0) ? W'(1) : SEED;

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SAFE_SEED;
    else if (step)  q <= {q[W-2:0], fb};
  end

  initial assert (W == 8 || W == 16 || W == 32)
    else $error("lfsr: no tap table for W=%0d", W);

endmodule
