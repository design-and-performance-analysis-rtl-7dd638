// fcfs_arb: first-come-first-serve arbitration inside one block.
//
// A FIFO buffer of master indices keeps the order in which requests arrived;
// its head is the candidate. A stack counter gives the number of queued
// masters. A master enters the FIFO in the first cycle its request is seen and
// it is not already queued; masters that arrive in the same cycle are sorted by
// index, lowest first (the priority sorting controller). Each master is queued
// at most once, so a depth of N never overflows. The FIFO, stack counter and
// sorting follow the arbiter design; removing a master whose request drops
// before service, and letting a newcomer be the candidate in its arrival
// cycle when the queue is empty, are this design's choices.
//
// Interface: gnt (one-hot) and valid are combinational. At a clock edge with
// en and advance high the head leaves the FIFO; if that master still requests
// it enters again at the tail in the next cycle. The queue records arrivals
// whether or not en is set, so switching to FCFS starts with a true order.
module fcfs_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         valid
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic [IW-1:0] fifo_q [N];     // FIFO buffer, entry 0 is the head
  logic [CW-1:0] count_q;        // FIFO stack counter
  logic [IW-1:0] fifo_d [N];
  logic [CW-1:0] count_d;
  logic [N-1:0]  queued;         // master is in the FIFO

  logic [IW-1:0] merged [N];     // queue after purge and append, before pop
  logic [CW-1:0] mcount;

  always_comb begin
    queued = '0;
    for (int unsigned i = 0; i < N; i++)
      if (i < count_q) queued[fifo_q[i]] = 1'b1;
  end

  always_comb begin
    mcount = '0;
    for (int unsigned i = 0; i < N; i++) merged[i] = '0;
    // keep queued masters that still request, in order
    for (int unsigned i = 0; i < N; i++) begin
      if (i < count_q && req[fifo_q[i]]) begin
        merged[mcount[IW-1:0]] = fifo_q[i];
        mcount = mcount + 1'b1;
      end
    end
    // append newcomers, sorted by index
    for (int unsigned m = 0; m < N; m++) begin
      if (req[m] && !queued[m]) begin
        merged[mcount[IW-1:0]] = IW'(m);
        mcount = mcount + 1'b1;
      end
    end
  end

  assign valid = (mcount != '0);

  always_comb begin
    gnt = '0;
    if (valid) gnt[merged[0]] = 1'b1;
  end

  always_comb begin
    if (en && advance && valid) begin
      for (int unsigned i = 0; i < N; i++)
        fifo_d[i] = (i + 1 < N) ? merged[i+1] : '0;
      count_d = mcount - 1'b1;
    end else begin
      fifo_d  = merged;
      count_d = mcount;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      for (int unsigned i = 0; i < N; i++) fifo_q[i] <= '0;
    end else begin
      count_q <= count_d;
      fifo_q  <= fifo_d;
    end
  end

  // The FIFO can never hold more than N masters.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count_q <= CW'(N));

endmodule
