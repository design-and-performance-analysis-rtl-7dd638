// tb_reconfig_controller: reset value, decode of every code into its enable
// line, immediate application of a write made while apply is high, and
// deferral of a write made while apply is low until the next apply.
module tb_reconfig_controller;
  import arb_pkg::*;
  logic     clk = 0, rst_n = 0, cfg_we = 0, apply = 0, pending;
  arb_cfg_t cfg_wdata, cfg;
  alg_en_t  alg_en [NUM_BLOCKS];
  int checks = 0, failures = 0;
  logic [9:0] expect_cfg;

  reconfig_controller dut (.clk, .rst_n, .cfg_we, .cfg_wdata, .apply, .cfg, .alg_en, .pending);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(string what);
    checks++;
    if (cfg !== expect_cfg) begin failures++; $display("FAIL %s cfg=%b exp=%b", what, cfg, expect_cfg); end
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      logic [3:0] e;
      case (expect_cfg[2*b +: 2])
        2'b00: e = 4'b0001;   // fixed priority
        2'b01: e = 4'b0010;   // round robin
        2'b10: e = 4'b0100;   // FCFS
        2'b11: e = 4'b1000;   // random access
      endcase
      checks++;
      if (alg_en[b] !== e) begin failures++; $display("FAIL %s block %0d en=%b exp=%b", what, b, alg_en[b], e); end
    end
  endtask

  initial begin
    expect_cfg = '0;
    cfg_wdata  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check_state("reset");
    for (int t = 0; t < 300; t++) begin
      logic [9:0] w;
      bit ap;
      w  = 10'($urandom);
      ap = 1'($urandom_range(0, 1));
      @(negedge clk);
      cfg_we = 1; cfg_wdata = arb_cfg_t'(w); apply = ap;
      @(negedge clk);
      cfg_we = 0; apply = 0;
      if (ap) begin
        expect_cfg = w;
        check_state("immediate");
        checks++; if (pending) begin failures++; $display("FAIL pending after apply"); end
      end else begin
        check_state("deferred (old kept)");
        checks++; if (!pending) begin failures++; $display("FAIL no pending"); end
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check_state("still deferred");
        apply = 1;
        @(negedge clk);
        apply = 0;
        expect_cfg = w;
        check_state("applied");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
