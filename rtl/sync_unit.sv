// sync_unit: hardware locks shared by all cores.
//
// The cores build atomic operations (for instance the atomic decrement of a
// per-macroblock reference counter) from these locks. Each of NUM_LOCKS locks
// is free or held by one hardware thread (core and thread number).
//   * SYNC_ACQUIRE on a free lock takes it and is answered "granted"; on a
//     held lock it is answered "refused" and software retries.
//   * SYNC_RELEASE by the owner frees the lock and is answered "granted"; a
//     release by any other thread changes nothing and is answered "refused".
// Interface: each core presents at most one request on req_*; a round-robin
// arbiter accepts one per cycle (req_ready) and the answer appears one cycle
// later on resp_valid[core] / resp_granted[core] / resp_tid[core]. Because
// requests are served one at a time, two threads asking for the same lock in
// the same cycle are ordered by the arbiter and only the first gets it.
// Synchronous active-high reset frees all locks.
// Only the unit's existence and purpose are given by the system description;
// the try-lock protocol, the number of locks (64) and the one-request-per-
// cycle service are this design's choices.
module sync_unit
  import mmsys_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 16,
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_LOCKS   = 64,
  localparam int unsigned CID_W      = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned LID_W      = (NUM_LOCKS > 1) ? $clog2(NUM_LOCKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_CORES-1:0] req_valid,
  input  sync_op_e             req_op   [NUM_CORES],
  input  logic [TID_W-1:0]     req_tid  [NUM_CORES],
  input  logic [LID_W-1:0]     req_lock [NUM_CORES],
  output logic [NUM_CORES-1:0] req_ready,
  output logic [NUM_CORES-1:0] resp_valid,
  output logic [NUM_CORES-1:0] resp_granted,
  output logic [TID_W-1:0]     resp_tid [NUM_CORES],
  output logic [NUM_LOCKS-1:0] lock_held
);

  logic [CID_W-1:0] own_core [NUM_LOCKS];
  logic [TID_W-1:0] own_tid  [NUM_LOCKS];

  logic [NUM_CORES-1:0] eligible;
  always_comb begin
    for (int c = 0; c < NUM_CORES; c++)
      eligible[c] = req_valid[c] && (req_op[c] != SYNC_NOP);
  end

  logic             arb_valid;
  logic [CID_W-1:0] arb_idx;
  rr_arbiter #(.N(NUM_CORES)) u_arb (
    .clk, .rst, .req(eligible), .advance(1'b1),
    .gnt_valid(arb_valid), .gnt_idx(arb_idx)
  );

  sync_op_e         cur_op;
  logic [LID_W-1:0] cur_lock;
  logic [TID_W-1:0] cur_tid;
  logic             grant;
  assign cur_op   = req_op[arb_idx];
  assign cur_lock = req_lock[arb_idx];
  assign cur_tid  = req_tid[arb_idx];

  always_comb begin
    req_ready = '0;
    if (arb_valid) req_ready[arb_idx] = 1'b1;
    grant = 1'b0;
    if (cur_op == SYNC_ACQUIRE) grant = !lock_held[cur_lock];
    else if (cur_op == SYNC_RELEASE)
      grant = lock_held[cur_lock] && own_core[cur_lock] == arb_idx && own_tid[cur_lock] == cur_tid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lock_held    <= '0;
      resp_valid   <= '0;
      resp_granted <= '0;
    end else begin
      resp_valid   <= '0;
      resp_granted <= '0;
      if (arb_valid) begin
        resp_valid[arb_idx]   <= 1'b1;
        resp_granted[arb_idx] <= grant;
        if (grant) lock_held[cur_lock] <= (cur_op == SYNC_ACQUIRE);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (arb_valid) resp_tid[arb_idx] <= cur_tid;
    if (arb_valid && grant && cur_op == SYNC_ACQUIRE) begin
      own_core[cur_lock] <= arb_idx;
      own_tid[cur_lock]  <= cur_tid;
    end
  end

endmodule
