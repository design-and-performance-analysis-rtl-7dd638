// tb_random_arb: random-access block against the reference LFSR and maximum
// comparator. Also checks that with all four masters requesting each one wins
// a fair share (between 15 % and 35 % of 4000 decisions).
module tb_random_arb;
  import arb_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  req, gnt;
  logic        valid;
  logic [15:0] rnd;
  int checks = 0, failures = 0;
  int wins [4];
  block_model m;

  random_arb #(.N(4), .LFSR_W(16), .SEED(16'h1D2B)) dut (
    .clk, .rst_n, .en(1'b1), .req, .advance(1'b1), .gnt, .valid, .rnd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(4, 16'h1D2B);
    req = 0;
    foreach (wins[i]) wins[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int c;
      req = (cyc < 4000) ? 4'($urandom) : 4'hF;
      #1;
      c = m.cand_rand(req);
      checks++;
      if (gnt !== ((c >= 0) ? 4'(1 << c) : 4'b0) || valid !== (req != 0) || rnd !== m.lf) begin
        failures++;
        if (failures < 10) $display("FAIL cyc=%0d req=%b gnt=%b exp=%0d rnd=%h", cyc, req, gnt, c, rnd);
      end
      if (cyc >= 4000 && c >= 0) wins[c]++;
      m.step(RANDOM, req, 1'b1);
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      $display("master %0d won %0d of 4000", i, wins[i]);
      if (wins[i] < 600 || wins[i] > 1400) begin failures++; $display("FAIL unfair share"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
