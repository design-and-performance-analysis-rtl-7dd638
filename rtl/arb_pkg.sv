// arb_pkg: types and constants shared by the reconfigurable arbiter.
//
// The arbiter serves 16 bus masters in four groups of four. Five functional
// blocks take part: F1..F4 arbitrate inside the groups, F5 arbitrates between
// the four group winners. Each block runs one of four algorithms, chosen by a
// 2-bit code; the codes below are the ones of the arbiter's control table
// (00 fixed priority, 01 round robin, 10 first come first serve, 11 random).
// A configuration is written as five digits F1..F5 with 1=fixed, 2=round
// robin, 3=FCFS and 4=random, so "12141" means F1, F3, F5 fixed priority,
// F2 round robin and F4 random access.
package arb_pkg;

  localparam int NUM_GROUPS  = 4;
  localparam int GROUP_SIZE  = 4;
  localparam int NUM_MASTERS = NUM_GROUPS * GROUP_SIZE;
  localparam int NUM_BLOCKS  = NUM_GROUPS + 1;      // F1..F4 plus F5
  localparam int NUM_ALGS    = 4;

  typedef enum logic [1:0] {
    ALG_FIXED  = 2'b00,
    ALG_RR     = 2'b01,
    ALG_FCFS   = 2'b10,
    ALG_RANDOM = 2'b11
  } alg_e;

  // Selection of all five blocks; F1 sits in the low bits.
  typedef struct packed {
    alg_e f5;
    alg_e f4;
    alg_e f3;
    alg_e f2;
    alg_e f1;
  } arb_cfg_t;

  // One-hot enable lines of one block, bit k enables algorithm code k.
  typedef logic [NUM_ALGS-1:0] alg_en_t;

  localparam arb_cfg_t CFG_ALL_FIXED = '{f5: ALG_FIXED, f4: ALG_FIXED, f3: ALG_FIXED,
                                         f2: ALG_FIXED, f1: ALG_FIXED};

  // LFSR seed of functional block b (0 = F1 .. 4 = F5); any non-zero values work.
  function automatic logic [15:0] block_seed(logic [2:0] b);
    return 16'hACE1 ^ (16'(b) * 16'h1357);
  endfunction

endpackage
