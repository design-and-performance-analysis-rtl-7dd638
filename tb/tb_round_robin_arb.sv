// tb_round_robin_arb: random requests and accept strobes against the
// reference model; also checks that every requester held continuously is
// granted within four accepted decisions (no starvation), and that the pointer
// does not move while en is low.
module tb_round_robin_arb;
  import arb_ref_pkg::*;
  logic       clk = 0, rst_n = 0, en, advance;
  logic [3:0] req, gnt;
  logic       valid;
  int checks = 0, failures = 0;
  block_model m;
  int waited [4];

  round_robin_arb #(.N(4)) dut (.clk, .rst_n, .en, .req, .advance, .gnt, .valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(4, 16'h1);
    req = 0; en = 1; advance = 0;
    foreach (waited[i]) waited[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int c;
      @(negedge clk);
      req     = (cyc < 2500) ? 4'($urandom) : 4'hF;   // second half: all request
      en      = ($urandom_range(0, 9) != 0);
      advance = ($urandom_range(0, 2) != 0);
      #1;
      c = m.cand_rr(req);
      checks++;
      if (gnt !== ((c >= 0) ? 4'(1 << c) : 4'b0) || valid !== (req != 0)) begin
        failures++;
        $display("FAIL cyc=%0d req=%b gnt=%b exp=%0d", cyc, req, gnt, c);
      end
      if (cyc >= 2500 && en && advance) begin
        for (int i = 0; i < 4; i++) waited[i] = (c == i) ? 0 : waited[i] + 1;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (waited[i] > 3) begin failures++; $display("FAIL starvation of %0d", i); end
        end
      end
      m.step(en ? RR : FIXED, req, advance);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
