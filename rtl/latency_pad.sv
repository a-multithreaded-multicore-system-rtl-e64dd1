// latency_pad: empty pipeline stages that raise an operation's latency to the
// next multiple of the number of interleaved (foreground) threads.
//
// When every operation latency is a multiple of the interleave factor M, all
// results of one thread return in the same cycle modulo M, so write-backs can
// be scheduled statically and the register file needs only one writing thread
// per cycle. This block delays a result (valid, thread ID, data) by
// ceil(OP_LAT / M) * M cycles, where OP_LAT is the unit's natural latency and
// M = fg_count is a run-time input (1..NUM_THREADS), so the padding follows
// the core's mode. The delay line is MAX_LAT = OP_LAT + NUM_THREADS - 1
// stages long and the output is tapped at the padded depth.
//
// A flush (flush_valid, flush_tid) cancels every entry of that thread that is
// in the line, which is how a thread leaving the foreground has its
// in-flight operations removed. Cancelling all of them, not only those behind
// the stage that stalled, is this design's simplification.
//
// Timing: an entry accepted at edge k with padded latency P appears on the
// outputs after edge k+P-1, i.e. P cycles after the cycle it was presented.
// OP_LAT must be at least 1. Synchronous active-high reset clears all valids.
module latency_pad #(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned OP_LAT      = 1,
  parameter int unsigned DATA_W      = 32,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_THREADS + 1),
  localparam int unsigned MAX_LAT    = OP_LAT + NUM_THREADS - 1,
  localparam int unsigned LAT_W      = $clog2(MAX_LAT + 1),
  localparam int unsigned IDX_W      = (MAX_LAT > 1) ? $clog2(MAX_LAT) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CNT_W-1:0]  fg_count,
  input  logic              in_valid,
  input  logic [TID_W-1:0]  in_tid,
  input  logic [DATA_W-1:0] in_data,
  input  logic              flush_valid,
  input  logic [TID_W-1:0]  flush_tid,
  output logic              out_valid,
  output logic [TID_W-1:0]  out_tid,
  output logic [DATA_W-1:0] out_data,
  output logic [LAT_W-1:0]  pad_lat           // the padded latency in use
);

  logic [CNT_W-1:0] m;
  always_comb begin
    if (fg_count == '0) m = CNT_W'(1);
    else if (int'(fg_count) > NUM_THREADS) m = CNT_W'(NUM_THREADS);
    else m = fg_count;
  end

  assign pad_lat = LAT_W'(((OP_LAT + int'(m) - 1) / int'(m)) * int'(m));

  logic [IDX_W-1:0] tap;   // stage whose output is the padded result
  assign tap = IDX_W'(pad_lat - 1'b1);

  logic              v_q [MAX_LAT];
  logic [TID_W-1:0]  t_q [MAX_LAT];
  logic [DATA_W-1:0] d_q [MAX_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MAX_LAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_valid && !(flush_valid && flush_tid == in_tid);
      for (int i = 1; i < MAX_LAT; i++)
        v_q[i] <= v_q[i-1] && !(flush_valid && flush_tid == t_q[i-1]);
    end
  end

  always_ff @(posedge clk) begin
    t_q[0] <= in_tid;
    d_q[0] <= in_data;
    for (int i = 1; i < MAX_LAT; i++) begin
      t_q[i] <= t_q[i-1];
      d_q[i] <= d_q[i-1];
    end
  end

  assign out_valid = v_q[tap];
  assign out_tid   = t_q[tap];
  assign out_data  = d_q[tap];

endmodule
