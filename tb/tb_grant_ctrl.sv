// tb_grant_ctrl: grant register and tenure timer with a random winner source.
// A behavioural reference holds owner, busy flag and held-cycle count and is
// compared each cycle; the test also counts tenure expiries, early releases
// and idle parking on the default master, each of which must happen.
module tb_grant_ctrl;
  localparam int BC = 16;
  logic        clk = 0, rst_n = 0;
  logic [15:0] req, gnt;
  logic        win_valid, arb_now, bus_busy;
  logic [3:0]  win_id, master_id;
  int checks = 0, failures = 0;
  int owner = 0, held = 0, n_expire = 0, n_release = 0, n_park = 0;
  bit busy = 0;

  grant_ctrl #(.NUM_MASTERS(16), .BLOCK_CYCLES(BC), .DEFAULT_MASTER(0)) dut (
    .clk, .rst_n, .req, .win_valid, .win_id, .arb_now, .gnt, .master_id, .bus_busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; win_valid = 0; win_id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit exp_arb;
      // stimulus: sparse phases leave the bus idle, owners sometimes drop
      if ((cyc / 500) % 3 == 2) req = ($urandom_range(0, 3) == 0) ? 16'(1 << $urandom_range(0, 15)) : 16'h0;
      else begin
        req = 16'($urandom) | 16'($urandom);
        if (busy) req[owner] = ($urandom_range(0, 30) != 0);
      end
      win_valid = (req != 0);
      win_id    = 0;
      if (win_valid) begin
        int k;
        do k = $urandom_range(0, 15); while (!req[k]);
        win_id = 4'(k);
      end
      #1;
      exp_arb = !busy || !req[owner] || held == BC - 1;
      checks++;
      if (arb_now !== exp_arb || master_id !== 4'(owner) || bus_busy !== busy || gnt !== 16'(1 << owner)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d arb=%b/%b id=%0d/%0d busy=%b/%b", cyc, arb_now, exp_arb, master_id, owner, bus_busy, busy);
      end
      if (busy && held > BC - 1) begin failures++; $display("FAIL tenure too long"); end
      if (exp_arb) begin
        if (busy && held == BC - 1 && req[owner]) n_expire++;
        if (busy && !req[owner]) n_release++;
        if (!win_valid) n_park++;
        held  = 0;
        owner = win_valid ? int'(win_id) : 0;
        busy  = win_valid;
      end else held++;
      @(negedge clk);
    end
    checks += 3;
    $display("expiries=%0d releases=%0d parks=%0d", n_expire, n_release, n_park);
    if (n_expire == 0 || n_release == 0 || n_park == 0) begin failures++; $display("FAIL a mechanism never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
