// arb_ref_pkg: cycle-level reference models of the arbitration algorithms,
// written independently of the RTL for the testbenches.
//
// Each model is a class with a combinational query (cand: the candidate for
// a request vector) and a clock step (what happens at the rising edge given
// the inputs of the cycle). Candidates are master indices, -1 for none.
package arb_ref_pkg;

  // Algorithm codes of the arbiter's control table.
  localparam int FIXED = 0, RR = 1, FCFS = 2, RANDOM = 3;

  // Next state of the 16-bit LFSR, polynomial x^16+x^14+x^13+x^11+1:
  // shift left, new bit 0 = s[15]^s[13]^s[12]^s[10].
  function automatic logic [15:0] lfsr_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  class block_model;
    int n;
    int ptr;            // round robin: last granted
    int q[$];           // FCFS queue, front = head
    logic [15:0] lf;    // random access LFSR

    function new(int n_, logic [15:0] seed);
      n   = n_;
      ptr = n_ - 1;
      lf  = seed;
    endfunction

    function int cand_fixed(logic [31:0] req);
      for (int i = 0; i < n; i++) if (req[i]) return i;
      return -1;
    endfunction

    function int cand_rr(logic [31:0] req);
      for (int k = 1; k <= n; k++) if (req[(ptr + k) % n]) return (ptr + k) % n;
      return -1;
    endfunction

    // queue as it stands after this cycle's arrivals and departures
    function void merged(logic [31:0] req, ref int m[$]);
      bit inq [32];
      foreach (inq[i]) inq[i] = 1'b0;
      m.delete();
      foreach (q[i]) begin
        inq[q[i]] = 1;
        if (req[q[i]]) m.push_back(q[i]);
      end
      for (int i = 0; i < n; i++) if (req[i] && !inq[i]) m.push_back(i);
    endfunction

    function int cand_fcfs(logic [31:0] req);
      int m[$];
      merged(req, m);
      return (m.size() > 0) ? m[0] : -1;
    endfunction

    function int cand_rand(logic [31:0] req);
      int rw = 16 / n;
      int best = -1, bestv = -1;
      for (int i = 0; i < n; i++) begin
        int v = int'((lf >> (i * rw)) & ((1 << rw) - 1));
        if (req[i] && v > bestv) begin best = i; bestv = v; end
      end
      return best;
    endfunction

    function int cand(int alg, logic [31:0] req);
      case (alg)
        FIXED:   return cand_fixed(req);
        RR:      return cand_rr(req);
        FCFS:    return cand_fcfs(req);
        default: return cand_rand(req);
      endcase
    endfunction

    // Rising clock edge: alg is the enabled algorithm, adv the accept strobe.
    function void step(int alg, logic [31:0] req, bit adv);
      int m[$];
      int c = cand(alg, req);
      merged(req, m);
      if (adv && c >= 0 && alg == RR) ptr = c;
      if (adv && m.size() > 0 && alg == FCFS) void'(m.pop_front());
      q  = m;
      lf = lfsr_next(lf);
    endfunction
  endclass

endpackage
