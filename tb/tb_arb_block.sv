// tb_arb_block: one reconfigurable functional block against the reference
// model while the enabled algorithm is switched among all four codes at
// random moments. Requests behave like bus masters (held until accepted).
// Every algorithm must be exercised with two or more requesters.
module tb_arb_block;
  import arb_pkg::*;
  import arb_ref_pkg::*;
  localparam logic [15:0] SEED = 16'h5A5A;
  logic       clk = 0, rst_n = 0, advance;
  alg_en_t    alg_en;
  logic [3:0] req, gnt, nreq;
  logic       valid;
  int checks = 0, failures = 0;
  int used [4];
  block_model m;

  arb_block #(.N(4), .SEED(SEED)) dut (.clk, .rst_n, .alg_en, .req, .advance, .gnt, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int alg;
    m = new(4, SEED);
    req = 0; advance = 0; alg = FIXED; alg_en = 4'b0001;
    foreach (used[i]) used[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int c;
      if ($urandom_range(0, 99) == 0) alg = $urandom_range(0, 3);
      alg_en  = alg_en_t'(1 << alg);
      advance = ($urandom_range(0, 2) == 0);
      #1;
      c = m.cand(alg, req);
      checks++;
      if (gnt !== ((c >= 0) ? 4'(1 << c) : 4'b0) || valid !== (req != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d alg=%0d req=%b gnt=%b exp=%0d", cyc, alg, req, gnt, c);
      end
      if ($countones(req) >= 2 && advance) used[alg]++;
      m.step(alg, req, advance);
      nreq = req;
      for (int i = 0; i < 4; i++) begin
        if (advance && c == i)  nreq[i] = ($urandom_range(0, 1) == 0);
        else if (!req[i])       nreq[i] = ($urandom_range(0, 3) == 0);
      end
      @(negedge clk);
      req = nreq;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      $display("algorithm %0d decided %0d contended cycles", k, used[k]);
      if (used[k] == 0) begin failures++; $display("FAIL algorithm %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
