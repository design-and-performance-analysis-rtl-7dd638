// reconfig_controller: arbitration selection register of the arbiter.
//
// Holds the user-defined selection of the five functional blocks F1..F5,
// two bits each, and decodes every code into the one-hot enable lines
// "enable fixed priority / round robin / FCFS / random access" (codes 00, 01,
// 10, 11). The codes and the per-block enables follow the arbiter design.
// How the selection is written is this design's choice: a host writes all
// ten bits at once with cfg_we; the value is held as pending and takes effect
// at the next cycle in which apply is high (the arbiter raises apply at every
// arbitration boundary and while the bus is idle), so a change never splits
// a decision in progress. After reset every block runs fixed priority.
//
// Timing: a write in cycle t is visible on cfg/alg_en after the first rising
// edge at which apply is high, at the earliest in cycle t+1 if apply is high
// in cycle t (the write and its application share that edge).
module reconfig_controller
  import arb_pkg::*;
#(
  parameter arb_cfg_t RESET_CFG = CFG_ALL_FIXED
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_we,
  input  arb_cfg_t cfg_wdata,
  input  logic     apply,
  output arb_cfg_t cfg,
  output alg_en_t  alg_en [NUM_BLOCKS],
  output logic     pending
);

  arb_cfg_t pend_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= RESET_CFG;
      pend_cfg <= RESET_CFG;
      pending  <= 1'b0;
    end else begin
      if (apply) begin
        // a write in this very cycle is applied at once
        cfg     <= cfg_we ? cfg_wdata : (pending ? pend_cfg : cfg);
        pending <= 1'b0;
      end else if (cfg_we) begin
        pend_cfg <= cfg_wdata;
        pending  <= 1'b1;
      end
    end
  end

  // Table decode: code k enables algorithm k of the block.
  always_comb begin
    logic [2*NUM_BLOCKS-1:0] bits;
    bits = cfg;
    for (int b = 0; b < NUM_BLOCKS; b++)
      alg_en[b] = alg_en_t'(1) << bits[2*b +: 2];
  end

endmodule
