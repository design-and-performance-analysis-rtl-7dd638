// grant_ctrl: grant register and bus tenure timer of the arbiter.
//
// The second-level block F5 names a winner every cycle. grant_ctrl decides
// when that decision is taken (arb_now) and holds the result in the grant
// register. A decision is taken when the bus is idle, when the owner drops its
// request, or when the owner has used the bus for BLOCK_CYCLES cycles, one
// block transfer (16 cycles of a 32-bit bus in the reference traffic). The
// owner then competes again like any other master. With no requester the bus
// is parked on DEFAULT_MASTER with bus_busy low, as an AMBA arbiter does.
// The grant register, a timer and the default master follow the arbiter
// design and the bus it serves; the exact tenure rule is this design's choice.
//
// Timing: winners seen in cycle t own the bus from cycle t+1 (gnt, master_id
// and bus_busy are registered). arb_now is combinational and doubles as the
// "candidate accepted" strobe for the functional blocks.
module grant_ctrl #(
  parameter int unsigned NUM_MASTERS    = 16,
  parameter int unsigned BLOCK_CYCLES   = 16,
  parameter int unsigned DEFAULT_MASTER = 0,
  localparam int unsigned IW = $clog2(NUM_MASTERS),
  localparam int unsigned TW = $clog2(BLOCK_CYCLES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MASTERS-1:0] req,
  input  logic                   win_valid,
  input  logic [IW-1:0]          win_id,
  output logic                   arb_now,
  output logic [NUM_MASTERS-1:0] gnt,
  output logic [IW-1:0]          master_id,
  output logic                   bus_busy
);

  logic [TW-1:0] timer;   // cycles the owner has held the bus, minus one

  assign arb_now = !bus_busy || !req[master_id] || (timer == TW'(BLOCK_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master_id <= IW'(DEFAULT_MASTER);
      bus_busy  <= 1'b0;
      timer     <= '0;
    end else if (arb_now) begin
      timer <= '0;
      if (win_valid) begin
        master_id <= win_id;
        bus_busy  <= 1'b1;
      end else begin
        master_id <= IW'(DEFAULT_MASTER);
        bus_busy  <= 1'b0;
      end
    end else begin
      timer <= timer + 1'b1;
    end
  end

  always_comb begin
    gnt            = '0;
    gnt[master_id] = 1'b1;
  end

  // The winner must be a requester, and a busy owner never exceeds its block.
  a_win_requests: assert property (@(posedge clk) disable iff (!rst_n)
                                   win_valid |-> req[win_id]);
  a_tenure: assert property (@(posedge clk) disable iff (!rst_n)
                             timer < TW'(BLOCK_CYCLES));

endmodule
