// reconfigurable_arbiter: two-level hybrid bus arbiter for 16 masters.
//
// The masters are split into four groups of four. In the first level the
// functional blocks F1..F4 each pick one candidate from their group; in the
// second level F5 picks one of the four group candidates, and that master is
// granted the bus. Each of the five blocks runs one of four algorithms (fixed
// priority, round robin, first come first serve, random access), chosen at run
// time through the reconfiguration controller, so fixed-priority, round-robin
// and mixed ("hybrid") schemes are all one write away. This organisation
// follows the arbiter design. This design's own choices: the bus is held by
// its owner for at most BLOCK_CYCLES cycles per grant; a first-level block's
// state (round-robin pointer, FCFS queue) moves only when its candidate also
// wins at F5; a new selection takes effect at the next arbitration boundary.
//
// Interface: req[i] is master i's bus request, gnt the registered one-hot
// grant (parked on master 0 when nobody requests, bus_busy then low),
// master_id its index. cfg_we/cfg_wdata write the selection, F1 in bits
// [1:0] up to F5 in [9:8], codes 00 fixed, 01 round robin, 10 FCFS,
// 11 random; cfg_active shows the selection in force. arb_now marks the
// cycles in which a decision is taken.
//
// Timing: a request seen in a decision cycle is granted in the next cycle;
// one decision per cycle while the bus is idle.
module reconfigurable_arbiter
  import arb_pkg::*;
#(
  parameter int unsigned BLOCK_CYCLES   = 16,
  parameter int unsigned DEFAULT_MASTER = 0,
  parameter arb_cfg_t    RESET_CFG      = CFG_ALL_FIXED
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  arb_cfg_t               cfg_wdata,
  output arb_cfg_t               cfg_active,
  input  logic [NUM_MASTERS-1:0] req,
  output logic [NUM_MASTERS-1:0] gnt,
  output logic [3:0]             master_id,
  output logic                   bus_busy,
  output logic                   arb_now
);

  alg_en_t                alg_en [NUM_BLOCKS];
  logic                   cfg_pending;

  logic [GROUP_SIZE-1:0]  grp_gnt   [NUM_GROUPS];
  logic [NUM_GROUPS-1:0]  grp_valid;
  logic [NUM_GROUPS-1:0]  top_gnt;
  logic                   top_valid;
  logic [NUM_GROUPS-1:0]  grp_advance;

  logic                   win_valid;
  logic [3:0]             win_id;

  reconfig_controller #(.RESET_CFG(RESET_CFG)) u_ctrl (
    .clk, .rst_n,
    .cfg_we, .cfg_wdata,
    .apply  (arb_now),
    .cfg    (cfg_active),
    .alg_en (alg_en),
    .pending(cfg_pending)
  );

  // First level: F1..F4.
  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_level1
    arb_block #(.N(GROUP_SIZE), .SEED(block_seed(3'(g)))) u_f (
      .clk, .rst_n,
      .alg_en (alg_en[g]),
      .req    (req[g*GROUP_SIZE +: GROUP_SIZE]),
      .advance(grp_advance[g]),
      .gnt    (grp_gnt[g]),
      .valid  (grp_valid[g])
    );
    assign grp_advance[g] = arb_now && top_gnt[g];
  end

  // Second level: F5 arbitrates between the group candidates.
  arb_block #(.N(NUM_GROUPS), .SEED(block_seed(3'(NUM_GROUPS)))) u_f5 (
    .clk, .rst_n,
    .alg_en (alg_en[NUM_GROUPS]),
    .req    (grp_valid),
    .advance(arb_now),
    .gnt    (top_gnt),
    .valid  (top_valid)
  );

  // Encode the final winner: group index and position inside the group.
  always_comb begin
    win_id = '0;
    for (int g = 0; g < NUM_GROUPS; g++)
      for (int m = 0; m < GROUP_SIZE; m++)
        if (top_gnt[g] && grp_gnt[g][m]) win_id = 4'(g * GROUP_SIZE + m);
  end
  assign win_valid = top_valid;

  grant_ctrl #(
    .NUM_MASTERS   (NUM_MASTERS),
    .BLOCK_CYCLES  (BLOCK_CYCLES),
    .DEFAULT_MASTER(DEFAULT_MASTER)
  ) u_grant (
    .clk, .rst_n,
    .req, .win_valid, .win_id,
    .arb_now, .gnt, .master_id, .bus_busy
  );

  // The selection register is always written while the bus keeps deciding.
  logic unused;
  assign unused = cfg_pending;

endmodule
