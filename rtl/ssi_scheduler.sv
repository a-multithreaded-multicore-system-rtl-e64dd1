// ssi_scheduler: thread selection for Subset Static Interleaved (SSI)
// multithreading.
//
// The NUM_THREADS hardware threads of a core are split into fg_count
// foreground threads, each sitting in an issue slot, and background threads.
// The foreground slots are interleaved statically: slot s may issue in the
// cycles where (cycle mod fg_count) == s. A foreground thread that is not
// runnable (stalled on a cache miss, blocked on the task scheduling unit) is
// exchanged at its slot's turn with a runnable background thread, and so is
// a foreground thread whose priority is lower than that of a runnable
// background thread. The slot's turn in which the exchange happens issues
// nothing: that is the switch penalty, and swap_out_tid tells the datapath
// which thread's in-flight instructions to cancel. If no background thread
// can take the slot, the turn is a bubble.
//
// fg_count = 1 gives blocked multithreading, fg_count = NUM_THREADS gives
// static interleaving, values in between give SSI. fg_count is a run-time
// input (1..NUM_THREADS). When it changes, the slots are reloaded with
// threads 0..fg_count-1 and a mode_switch pulse is given; the caller is
// expected to change it only with the pipeline drained.
//
// Background candidate choice: the runnable background thread with the
// highest priority, lowest thread number on a tie. Reset (synchronous,
// active high) puts thread s in slot s and starts at slot 0.
//
// Timing: issue_valid/issue_tid/issue_slot and the swap outputs are
// combinational from the registered slot map and the ready/priority inputs.
module ssi_scheduler #(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned PRIO_W      = 2,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_THREADS + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [CNT_W-1:0]        fg_count,          // number of foreground threads, 1..NUM_THREADS
  input  logic [NUM_THREADS-1:0]  thread_ready,      // thread can issue
  input  logic [PRIO_W-1:0]       thread_prio [NUM_THREADS],
  output logic                    issue_valid,
  output logic [TID_W-1:0]        issue_tid,
  output logic [TID_W-1:0]        issue_slot,        // slot whose turn it is
  output logic                    swap_valid,        // a foreground/background exchange this cycle
  output logic [TID_W-1:0]        swap_out_tid,      // thread sent to the background (flush it)
  output logic [TID_W-1:0]        swap_in_tid,       // thread brought to the foreground
  output logic                    mode_switch,       // fg_count changed; slots reloaded
  output logic [NUM_THREADS-1:0]  fg_mask            // which threads are foreground
);

  logic [TID_W-1:0] slot_tid [NUM_THREADS];
  logic [TID_W-1:0] cur;
  logic [CNT_W-1:0] fg_q;
  logic [CNT_W-1:0] fg_eff;

  // clamp the mode input to a legal value
  always_comb begin
    if (fg_count == '0) fg_eff = CNT_W'(1);
    else if (int'(fg_count) > NUM_THREADS) fg_eff = CNT_W'(NUM_THREADS);
    else fg_eff = fg_count;
  end

  assign mode_switch = (fg_eff != fg_q);

  // which threads currently own a foreground slot
  always_comb begin
    fg_mask = '0;
    for (int s = 0; s < NUM_THREADS; s++)
      if (s < int'(fg_q)) fg_mask[slot_tid[s]] = 1'b1;
  end

  // best runnable background thread
  logic             bg_found;
  logic [TID_W-1:0] bg_tid;
  always_comb begin
    bg_found = 1'b0;
    bg_tid   = '0;
    for (int t = 0; t < NUM_THREADS; t++) begin
      if (thread_ready[t] && !fg_mask[t]) begin
        if (!bg_found || (thread_prio[t] > thread_prio[bg_tid])) begin
          bg_found = 1'b1;
          bg_tid   = TID_W'(t);
        end
      end
    end
  end

  logic [TID_W-1:0] cur_tid;
  logic             cur_ready;
  logic             do_swap;
  assign cur_tid   = slot_tid[cur];
  assign cur_ready = thread_ready[cur_tid];

  always_comb begin
    do_swap = 1'b0;
    if (!mode_switch && bg_found) begin
      if (!cur_ready) do_swap = 1'b1;
      else if (thread_prio[bg_tid] > thread_prio[cur_tid]) do_swap = 1'b1;
    end
  end

  assign issue_slot   = cur;
  assign issue_valid  = !mode_switch && cur_ready && !do_swap;
  assign issue_tid    = cur_tid;
  assign swap_valid   = do_swap;
  assign swap_out_tid = cur_tid;
  assign swap_in_tid  = bg_tid;

  always_ff @(posedge clk) begin
    if (rst || mode_switch) begin
      for (int s = 0; s < NUM_THREADS; s++) slot_tid[s] <= TID_W'(s);
      cur  <= '0;
      fg_q <= rst ? CNT_W'(1) : fg_eff;
    end else begin
      if (do_swap) slot_tid[cur] <= bg_tid;
      cur <= (int'(cur) + 1 >= int'(fg_q)) ? '0 : cur + 1'b1;
    end
  end

endmodule
