// tb_fcfs_arb: first-come-first-serve block against the reference queue.
// Masters behave like bus masters: a request stays up until it is accepted
// (then it may stay for another turn or drop), and sometimes a waiting master
// withdraws. Besides the cycle-by-cycle comparison, the test checks that a
// master that arrived strictly earlier than another is always served first.
module tb_fcfs_arb;
  import arb_ref_pkg::*;
  logic       clk = 0, rst_n = 0, en, advance;
  logic [3:0] req, gnt, nreq;
  logic       valid;
  int checks = 0, failures = 0;
  int multi_queued = 0;
  block_model m;
  int arrive [4];

  fcfs_arb #(.N(4)) dut (.clk, .rst_n, .en, .req, .advance, .gnt, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(4, 16'h1);
    req = 0; nreq = 0; en = 1; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int c;
      @(negedge clk);
      req     = nreq;
      en      = ($urandom_range(0, 7) != 0);
      advance = ($urandom_range(0, 3) == 0);
      #1;
      c = m.cand_fcfs(req);
      checks++;
      if (gnt !== ((c >= 0) ? 4'(1 << c) : 4'b0) || valid !== (req != 0)) begin
        failures++;
        $display("FAIL cyc=%0d req=%b gnt=%b exp=%0d", cyc, req, gnt, c);
      end
      // order: no requester arrived strictly before the candidate
      if (c >= 0) for (int i = 0; i < 4; i++) if (req[i] && i != c) begin
        checks++;
        if (arrive[i] < arrive[c]) begin failures++; $display("FAIL order %0d before %0d", i, c); end
      end
      if ($countones(req) >= 2) multi_queued++;
      m.step(FCFS * 1 + (en ? 0 : 1), req, advance);   // FCFS when enabled, RANDOM (no pop) otherwise
      // masters for the next cycle
      nreq = req;
      for (int i = 0; i < 4; i++) begin
        if (en && advance && c == i) begin
          nreq[i] = ($urandom_range(0, 1) == 0);
          arrive[i] = cyc + 1;
        end else if (req[i]) begin
          if ($urandom_range(0, 40) == 0) nreq[i] = 0;
        end else if ($urandom_range(0, 3) == 0) begin
          nreq[i] = 1;
          arrive[i] = cyc + 1;
        end
      end
    end
    checks++;
    if (multi_queued < 100) begin failures++; $display("FAIL queue rarely held two masters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
