// random_arb: random-access arbitration inside one block.
//
// A linear feedback shift register produces a fresh random word every clock.
// The word is cut into N slices of LFSR_W/N bits, one random number per
// master, and a comparator grants the requesting master whose number is the
// largest. Using an LFSR and a maximum comparator follows the arbiter design;
// the 16-bit register (4 bits per master), its seed, and the rule that equal
// numbers go to the lower index are this design's choices.
//
// Interface: gnt (one-hot) and valid are combinational from req and the
// current LFSR state, which is also brought out on rnd. The LFSR steps every
// clock regardless of en and advance, so no decision depends on when the
// block was last used.
module random_arb #(
  parameter int unsigned          N      = 4,
  parameter int unsigned          LFSR_W = 16,
  parameter logic [LFSR_W-1:0]    SEED   = 16'hACE1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [N-1:0]      req,
  input  logic              advance,
  output logic [N-1:0]      gnt,
  output logic              valid,
  output logic [LFSR_W-1:0] rnd
);

  localparam int unsigned RW = LFSR_W / N;   // bits of random number per master
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  lfsr #(.W(LFSR_W), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (1'b1),
    .q    (rnd)
  );

  // Comparator: strict '>' keeps the lower index on a tie.
  always_comb begin
    logic [RW-1:0] best;
    logic [IW-1:0] best_id;
    logic          found;
    best    = '0;
    best_id = '0;
    found   = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (req[i] && (!found || rnd[i*RW +: RW] > best)) begin
        best    = rnd[i*RW +: RW];
        best_id = IW'(i);
        found   = 1'b1;
      end
    end
    gnt = '0;
    if (found) gnt[best_id] = 1'b1;
  end

  assign valid = |req;

  // The random choice keeps no state besides the free-running LFSR.
  logic unused;
  assign unused = ^{en, advance};

  initial assert (LFSR_W % N == 0) else $error("random_arb: LFSR_W must be a multiple of N");

endmodule
