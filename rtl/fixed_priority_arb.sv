// fixed_priority_arb: static fixed-priority arbitration inside one block.
//
// Master 0 has the highest priority and master N-1 the lowest
// (M0 > M1 > M2 > M3 for the four-input blocks of the arbiter), as in the
// arbiter design. The candidate is the lowest-indexed requesting master.
//
// Interface, common to all four algorithm blocks: req is the request vector,
// gnt the one-hot candidate and valid = |req, both combinational in the same
// cycle. en and advance are part of the common interface but the fixed scheme
// keeps no state, so they are not used; clk and rst_n likewise.
module fixed_priority_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         valid
);

  // req & -req isolates the lowest set bit.
  assign gnt   = req & (~req + N'(1));
  assign valid = |req;

  // Stateless: the clock, reset, enable and advance inputs are intentionally unused.
  logic unused;
  assign unused = ^{clk, rst_n, en, advance};

endmodule
