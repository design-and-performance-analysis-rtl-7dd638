// tb_fixed_priority_arb: exhaustive check of the fixed-priority block.
// All 16 request patterns of a four-input block are applied; the grant must
// be the lowest-indexed requester (M0 > M1 > M2 > M3), valid = any request.
module tb_fixed_priority_arb;
  logic       clk = 0, rst_n = 0;
  logic [3:0] req, gnt;
  logic       valid;
  int checks = 0, failures = 0;

  fixed_priority_arb #(.N(4)) dut (.clk, .rst_n, .en(1'b1), .req, .advance(1'b1), .gnt, .valid);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      logic [3:0] exp;
      req = 4'(r);
      exp = 4'b0000;
      for (int i = 3; i >= 0; i--) if (req[i]) exp = 4'(1 << i);
      #1;
      checks++;
      if (gnt !== exp || valid !== (r != 0)) begin
        failures++;
        $display("FAIL req=%b gnt=%b exp=%b valid=%b", req, gnt, exp, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
