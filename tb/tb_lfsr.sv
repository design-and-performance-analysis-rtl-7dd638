// tb_lfsr: the 16-bit LFSR must follow x^16+x^14+x^13+x^11+1 step by step,
// hold its state when step is low, never reach zero and return to its seed
// after exactly 65535 steps (maximal length).
module tb_lfsr;
  import arb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, step = 0;
  logic [15:0] q, model;
  int checks = 0, failures = 0;
  int period = 0;

  lfsr #(.W(16), .SEED(16'hACE1)) dut (.clk, .rst_n, .step, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s q=%h model=%h", what, q, model);
    end
  endtask

  initial begin
    model = 16'hACE1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(q == 16'hACE1, "reset value");
    // hold
    @(negedge clk);
    check(q == model, "hold without step");
    step = 1;
    do begin
      @(negedge clk);
      model = lfsr_next(model);
      period++;
      if (period < 200) check(q == model, "step");
      if (q == 16'h0000) check(0, "zero state");
    end while (q != 16'hACE1 && period < 65536);
    check(period == 65535, "maximal period");
    $display("period %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
