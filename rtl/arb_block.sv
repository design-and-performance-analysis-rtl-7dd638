// arb_block: one reconfigurable functional block (F1..F5) of the arbiter.
//
// The four arbitration algorithms (fixed priority, round robin, first come
// first serve, random access) see the same four requests in parallel; the
// one-hot enable from the reconfiguration controller selects which of them
// drives the block's grant and which one is told that its candidate was
// accepted. This structure follows the arbiter design. Keeping all four
// algorithms instantiated, so the block can be switched at any time, and
// letting disabled algorithms hold their state (FCFS keeps recording arrival
// order, the LFSR keeps running) are this design's choices.
//
// Interface: gnt (one-hot over N inputs) and valid are combinational; advance
// at a clock edge updates the enabled algorithm's state (round-robin pointer,
// FCFS queue).
module arb_block
  import arb_pkg::*;
#(
  parameter int unsigned    N    = GROUP_SIZE,
  parameter logic [15:0]    SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  alg_en_t      alg_en,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         valid
);

  logic [N-1:0] gnt_alg [NUM_ALGS];
  logic         vld_alg [NUM_ALGS];
  logic [15:0]  rnd;

  fixed_priority_arb #(.N(N)) u_fixed (
    .clk, .rst_n, .en(alg_en[ALG_FIXED]), .req, .advance,
    .gnt(gnt_alg[ALG_FIXED]), .valid(vld_alg[ALG_FIXED]));

  round_robin_arb #(.N(N)) u_rr (
    .clk, .rst_n, .en(alg_en[ALG_RR]), .req, .advance,
    .gnt(gnt_alg[ALG_RR]), .valid(vld_alg[ALG_RR]));

  fcfs_arb #(.N(N)) u_fcfs (
    .clk, .rst_n, .en(alg_en[ALG_FCFS]), .req, .advance,
    .gnt(gnt_alg[ALG_FCFS]), .valid(vld_alg[ALG_FCFS]));

  random_arb #(.N(N), .LFSR_W(16), .SEED(SEED)) u_rand (
    .clk, .rst_n, .en(alg_en[ALG_RANDOM]), .req, .advance,
    .gnt(gnt_alg[ALG_RANDOM]), .valid(vld_alg[ALG_RANDOM]), .rnd(rnd));

  // Output multiplexer driven by the one-hot enables.
  always_comb begin
    gnt   = '0;
    valid = 1'b0;
    for (int k = 0; k < NUM_ALGS; k++) begin
      if (alg_en[k]) begin
        gnt   = gnt   | gnt_alg[k];
        valid = valid | vld_alg[k];
      end
    end
  end

  // The random numbers are only observed by tests; the block's output is gnt.
  logic unused;
  assign unused = ^rnd;

  a_onehot_en: assert property (@(posedge clk) disable iff (!rst_n) $onehot(alg_en));
  a_gnt_from_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
