// round_robin_arb: round-robin arbitration inside one block.
//
// A pointer register holds the index of the master granted last. Priority
// starts at the master after it and wraps around, so every requesting master
// is reached within N decisions. The pointer controller's scan over the
// masters is done as one combinational search (a rotate, a fixed-priority
// pick and a rotate back) rather than one master per clock; this is this
// design's choice. The grant register and the tenure timer of a round-robin
// arbiter are shared by the whole arbiter and live in grant_ctrl.
//
// Interface: gnt (one-hot) and valid are combinational from req and the
// pointer. When advance and en are both high at a clock edge, the pointer
// moves to the master in gnt. After reset the pointer sits on N-1, so master
// 0 has priority first.
module round_robin_arb #(
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

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;     // last granted master
  logic [IW-1:0] pick;

  always_comb begin
    logic [IW-1:0] idx;
    gnt  = '0;
    pick = ptr;
    for (int unsigned k = N; k >= 1; k--) begin
      // scan from ptr+N down to ptr+1 so that ptr+1 is seen last and wins
      idx = IW'((32'(ptr) + k) % N);
      if (req[idx]) pick = idx;
    end
    if (|req) gnt[pick] = 1'b1;
  end

  assign valid = |req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr <= IW'(N - 1);
    else if (en && advance && valid)  ptr <= pick;
  end

endmodule
