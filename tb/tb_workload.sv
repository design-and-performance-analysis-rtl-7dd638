// tb_workload: the reference traffic of the arbiter's performance study,
// run on the arbiter at two block sizes side by side.
//
// Traffic: sixteen masters, each with a fixed amount of data to send
// (1.0 to 1.875 KB per master). A master without a pending request raises one
// with probability 0.5 in every cycle (Bernoulli request times). Each request
// carries an equilikely number of words, one word per cycle while granted.
//   - 16-cycle tenure, 32-bit bus, 8..16 words (mean 12, variance 6.67): the
//     arbiter's default parameters.
//   - 32-cycle tenure, 64-bit bus, 16..32 words: the larger block size.
// Nine arbitration states are played on each (see workload_runner), which
// prints per-master waiting and completion times and counts its checks.
module tb_workload;
  int  c16, f16, c32, f32;
  bit  d16, d32;

  workload_runner #(.BC(16), .WORD_BYTES(4), .TXN_MIN(8),  .TXN_MAX(16)) u_c16b32 (
    .checks(c16), .failures(f16), .done(d16));
  workload_runner #(.BC(32), .WORD_BYTES(8), .TXN_MIN(16), .TXN_MAX(32)) u_c32b64 (
    .checks(c32), .failures(f32), .done(d32));

  initial begin : watchdog
    #5ms;
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32, f16 + f32 + 1);
    $finish;
  end

  initial begin
    wait (d16 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32, f16 + f32);
    $finish;
  end
endmodule
