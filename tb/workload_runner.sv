// workload_runner: one arbiter instance driven by the reference traffic,
// used by tb_workload. BC is the bus tenure (transfer period) in cycles,
// WORD_BYTES the bus width in bytes, and TXN_MIN..TXN_MAX the equilikely
// range of words per transaction. The runner plays the nine arbitration
// states one after another, resetting the arbiter before each, prints the
// per-master average wait, grant rate (decisions won over decisions taken
// while the master requested) and completion time, and reports its check and
// failure counts and done when finished.
//
// Per state it checks that every word is delivered exactly once, that the bus
// only carries words of the granted master, that every master finishes, that
// under 11111 master 15 waits longer on average and has a lower grant rate
// than master 0, and that under 22222 no single wait exceeds fifteen full
// tenures.
module workload_runner #(
  parameter int BC         = 16,
  parameter int WORD_BYTES = 4,
  parameter int TXN_MIN    = 8,
  parameter int TXN_MAX    = 16
) (
  output int checks,
  output int failures,
  output bit done
);
  import arb_pkg::*;

  localparam int NS = 9;

  logic        clk = 0, rst_n = 0;
  logic        cfg_we = 0;
  arb_cfg_t    cfg_wdata = '0, cfg_active;
  logic [15:0] req = '0, gnt;
  logic [3:0]  master_id;
  logic        bus_busy, arb_now;

  reconfigurable_arbiter #(.BLOCK_CYCLES(BC)) dut (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .cfg_active,
    .req, .gnt, .master_id, .bus_busy, .arb_now);

  always #5 clk = ~clk;


  // data per master in units of 1/8 KB (128 bytes = 32 words)
  int eighths [16] = '{14, 8, 15, 8, 11, 9, 12, 8, 9, 9, 15, 15, 9, 10, 9, 10};


  function automatic logic [9:0] cfg_of(int d1, int d2, int d3, int d4, int d5);
    int d [5] = '{d1, d2, d3, d4, d5};
    logic [9:0] c = '0;
    for (int b = 0; b < 5; b++) c[2*b +: 2] = 2'(d[b] - 1);
    return c;
  endfunction

  task automatic run_state(int digits, logic [9:0] cfg, output real avg_w0, output real avg_w15,
                           output real rate0, output real rate15, output int max_wait);
    int left [16], txn [16], wait_start [16], wait_sum [16], grants [16], done_at [16], rounds [16];
    int sent = 0, total = 0, cyc = 0, busy_cycles = 0;
    bit all_done;
    max_wait = 0;
    // reset the arbiter and load the state
    rst_n = 0; req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg_we = 1; cfg_wdata = arb_cfg_t'(cfg);
    @(negedge clk);
    cfg_we = 0;
    checks++;
    if (cfg_active !== arb_cfg_t'(cfg)) begin failures++; $display("FAIL state not loaded"); end
    for (int i = 0; i < 16; i++) begin
      left[i] = eighths[i] * (128 / WORD_BYTES); total += left[i];
      txn[i] = 0; wait_sum[i] = 0; grants[i] = 0; done_at[i] = -1; wait_start[i] = -1; rounds[i] = 0;
    end
    do begin
      @(negedge clk);
      #1;
      // the bus carries one word of the owner in every busy cycle
      if (bus_busy) begin
        int o = int'(master_id);
        busy_cycles++;
        checks++;
        if (txn[o] == 0) begin failures++; $display("FAIL bus given to master %0d without a pending word", o); end
        else begin
          txn[o]--; left[o]--; sent++;
        end
        if (wait_start[o] >= 0) begin
          int w = cyc - wait_start[o];
          wait_sum[o] += w;
          grants[o]++;
          if (w > max_wait) max_wait = w;
          wait_start[o] = -1;
        end
      end
      // requests of this cycle: the owner lowers its request with its last
      // word, idle masters with data left raise one with probability 0.5
      for (int i = 0; i < 16; i++) begin
        if (req[i] && txn[i] == 0) begin
          req[i] = 0;
          if (left[i] == 0 && done_at[i] < 0) done_at[i] = cyc;
        end else if (!req[i] && left[i] > 0 && $urandom_range(0, 1) == 1) begin
          req[i]        = 1;
          txn[i]        = $urandom_range(TXN_MIN, TXN_MAX);
          if (txn[i] > left[i]) txn[i] = left[i];
          wait_start[i] = cyc;
        end
      end
      // grant rate: decisions won over decisions taken while requesting
      #1;
      if (arb_now) for (int i = 0; i < 16; i++) if (req[i]) rounds[i]++;
      cyc++;
      all_done = 1;
      for (int i = 0; i < 16; i++) if (done_at[i] < 0) all_done = 0;
    end while (!all_done && cyc < 40000);

    checks++;
    if (!all_done || sent != total) begin
      failures++;
      $display("FAIL state %0d: sent %0d of %0d words in %0d cycles", digits, sent, total, cyc);
    end
    $display("tenure %0d, %0d-bit bus, state %05d: %0d words in %0d cycles, bus utilisation %.1f %%",
             BC, 8 * WORD_BYTES, digits, sent, cyc, 100.0 * busy_cycles / cyc);
    for (int i = 0; i < 16; i++)
      $display("  master %2d: avg wait %7.2f cycles over %3d grants, grant rate %5.1f %%, completed at %0d",
               i, grants[i] ? real'(wait_sum[i]) / grants[i] : 0.0, grants[i],
               rounds[i] ? 100.0 * grants[i] / rounds[i] : 0.0, done_at[i]);
    avg_w0  = grants[0]  ? real'(wait_sum[0])  / grants[0]  : 0.0;
    avg_w15 = grants[15] ? real'(wait_sum[15]) / grants[15] : 0.0;
    rate0   = rounds[0]  ? real'(grants[0])  / rounds[0]  : 0.0;
    rate15  = rounds[15] ? real'(grants[15]) / rounds[15] : 0.0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
  end

  initial begin
    int states [NS] = '{11111, 22222, 33333, 44444, 21133, 21241, 12341, 22221, 13431};
    real w0, w15, r0, r15;
    int mw;
    for (int s = 0; s < NS; s++) begin
      int d;
      d = states[s];
      run_state(d, cfg_of(d / 10000, (d / 1000) % 10, (d / 100) % 10, (d / 10) % 10, d % 10), w0, w15, r0, r15, mw);
      if (d == 11111) begin
        checks++;
        if (!(w15 > w0)) begin failures++; $display("FAIL fixed priority does not favour master 0"); end
        checks++;
        if (!(r15 < r0)) begin failures++; $display("FAIL fixed priority grant rate of master 15 not below master 0"); end
      end
      if (d == 22222) begin
        checks++;
        if (mw > 15 * BC + 2) begin failures++; $display("FAIL round robin wait %0d too long", mw); end
      end
    end
    done = 1;
  end
endmodule
