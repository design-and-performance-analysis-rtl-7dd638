// tb_reconfigurable_arbiter: end-to-end test of the 16-master arbiter at its
// default parameters.
//
// Sixteen bus masters request the bus, hold it while they have data left and
// release it when done; the selection register is rewritten every few hundred
// cycles with configurations such as 11111, 22222, 33333, 44444, 12141, 21241,
// 12341 and random ones. A reference model of both arbitration levels, the
// grant register and the selection register (built from arb_ref_pkg) is
// compared with the DUT every cycle: arb_now, gnt, master_id, bus_busy and
// cfg_active. Each mechanism must happen at least once: every algorithm
// deciding a contended first-level and second-level choice, a selection
// applied at once and one deferred to the next boundary, a tenure cut at
// BLOCK_CYCLES, an early release and idle parking on the default master.
module tb_reconfigurable_arbiter;
  import arb_pkg::*;
  import arb_ref_pkg::*;

  localparam int BC     = 16;     // default BLOCK_CYCLES of the arbiter
  localparam int CYCLES = 40000;

  logic        clk = 0, rst_n = 0;
  logic        cfg_we;
  arb_cfg_t    cfg_wdata, cfg_active;
  logic [15:0] req, gnt;
  logic [3:0]  master_id;
  logic        bus_busy, arb_now;

  reconfigurable_arbiter dut (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .cfg_active,
    .req, .gnt, .master_id, .bus_busy, .arb_now);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference state
  block_model blk [5];
  logic [9:0] m_cfg = '0, m_pend = '0;
  bit         m_pending = 0, m_busy = 0;
  int         m_owner = 0, m_held = 0;

  // mechanism counters
  int n_l1 [4], n_l2 [4];
  int n_cfg_now = 0, n_cfg_deferred = 0, n_expire = 0, n_release = 0, n_park = 0;

  // master behaviour
  int data_left [16];

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // "12341" -> F1 digit first; digit d selects code d-1
  function automatic logic [9:0] cfg_of(int d1, int d2, int d3, int d4, int d5);
    int d [5] = '{d1, d2, d3, d4, d5};
    logic [9:0] c = '0;
    for (int b = 0; b < 5; b++) c[2*b +: 2] = 2'(d[b] - 1);
    return c;
  endfunction

  function automatic int alg_of(logic [9:0] c, int b);
    return int'(c[2*b +: 2]);
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, what);
  endtask

  logic [9:0] paper_cfgs [12];

  initial begin
    logic [15:0] nreq;
    paper_cfgs = '{cfg_of(1,1,1,1,1), cfg_of(2,2,2,2,2), cfg_of(3,3,3,3,3), cfg_of(4,4,4,4,4),
                   cfg_of(1,2,1,4,1), cfg_of(2,1,2,4,1), cfg_of(1,2,3,4,1), cfg_of(2,1,1,3,3),
                   cfg_of(2,2,2,2,1), cfg_of(1,3,4,3,1), cfg_of(3,2,3,3,2), cfg_of(4,3,2,4,4)};
    for (int b = 0; b < 5; b++) blk[b] = new(4, block_seed(3'(b)));
    foreach (n_l1[k]) begin n_l1[k] = 0; n_l2[k] = 0; end
    foreach (data_left[i]) data_left[i] = 0;
    req = '0; nreq = '0; cfg_we = 0; cfg_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int gc [4];
      logic [3:0] gvalid;
      int t, win, exp_arb;
      if (cyc > 0) @(negedge clk);   // cycle 0 is the one right after reset
      req = nreq;
      // configuration traffic
      cfg_we = (cyc % 250 == 17) || ($urandom_range(0, 999) == 0);
      cfg_wdata = arb_cfg_t'(($urandom_range(0, 1) == 0) ? paper_cfgs[$urandom_range(0, 11)]
                                                          : 10'($urandom));
      #1;
      // reference: first level, second level, decision
      for (int g = 0; g < 4; g++) begin
        gc[g]     = blk[g].cand(alg_of(m_cfg, g), 32'(req[4*g +: 4]));
        gvalid[g] = (gc[g] >= 0);
      end
      t       = blk[4].cand(alg_of(m_cfg, 4), 32'(gvalid));
      win     = (t >= 0) ? 4 * t + gc[t] : -1;
      exp_arb = !m_busy || !req[m_owner] || (m_held == BC - 1);

      checks++;
      if (arb_now !== 1'(exp_arb))      fail($sformatf("arb_now=%b exp=%0d", arb_now, exp_arb));
      checks++;
      if (master_id !== 4'(m_owner) || gnt !== 16'(1 << m_owner) || bus_busy !== m_busy)
        fail($sformatf("grant id=%0d exp=%0d busy=%b exp=%b cfg=%b", master_id, m_owner, bus_busy, m_busy, m_cfg));
      checks++;
      if (cfg_active !== m_cfg)         fail($sformatf("cfg=%b exp=%b", cfg_active, m_cfg));

      // mechanism counters
      if (exp_arb) begin
        if (t >= 0 && $countones(req[4*t +: 4]) >= 2) n_l1[alg_of(m_cfg, t)]++;
        if ($countones(gvalid) >= 2)                   n_l2[alg_of(m_cfg, 4)]++;
        if (m_busy && req[m_owner] && m_held == BC - 1) n_expire++;
        if (m_busy && !req[m_owner])                    n_release++;
        if (win < 0)                                    n_park++;
      end

      // reference: clock edge
      for (int g = 0; g < 4; g++)
        blk[g].step(alg_of(m_cfg, g), 32'(req[4*g +: 4]), exp_arb && t == g);
      blk[4].step(alg_of(m_cfg, 4), 32'(gvalid), exp_arb != 0);
      if (exp_arb) begin
        if (cfg_we)          begin m_cfg = cfg_wdata; n_cfg_now++; end
        else if (m_pending)  begin m_cfg = m_pend; n_cfg_deferred++; end
        m_pending = 0;
        m_held    = 0;
        m_busy    = (win >= 0);
        m_owner   = (win >= 0) ? win : 0;
      end else begin
        if (cfg_we) begin m_pend = cfg_wdata; m_pending = 1; end
        m_held++;
      end

      // masters: the owner spends its data, others wait or start new requests
      nreq = req;
      for (int i = 0; i < 16; i++) begin
        if (m_busy && m_owner == i && req[i]) begin
          if (data_left[i] > 0) data_left[i]--;
          if (data_left[i] == 0) nreq[i] = 0;
        end else if (!req[i]) begin
          if ($urandom_range(0, 99) < ((cyc / 5000) % 2 == 0 ? 8 : 1)) begin
            nreq[i] = 1;
            data_left[i] = $urandom_range(1, 3 * BC);
          end
        end else if ($urandom_range(0, 999) == 0) begin
          nreq[i] = 0;   // a waiting master gives up
        end
      end
    end

    for (int k = 0; k < 4; k++) begin
      $display("algorithm %0d: first-level contended decisions %0d, second-level %0d", k + 1, n_l1[k], n_l2[k]);
      checks += 2;
      if (n_l1[k] == 0) fail($sformatf("algorithm %0d never decided at first level", k + 1));
      if (n_l2[k] == 0) fail($sformatf("algorithm %0d never decided at F5", k + 1));
    end
    $display("selection applied at once %0d, deferred %0d; tenure expiries %0d, early releases %0d, idle parks %0d",
             n_cfg_now, n_cfg_deferred, n_expire, n_release, n_park);
    checks += 5;
    if (n_cfg_now == 0)      fail("no selection applied at once");
    if (n_cfg_deferred == 0) fail("no selection deferred");
    if (n_expire == 0)       fail("no tenure expiry");
    if (n_release == 0)      fail("no early release");
    if (n_park == 0)         fail("no idle parking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
