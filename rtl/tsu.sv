// tsu: task scheduling unit shared by all cores.
//
// A hardware pool of ready-to-run tasks. Threads submit tasks and ask for
// tasks with special operations; the unit keeps one double-ended queue per
// core and implements distributed task stealing:
//   * TSU_SUBMIT puts the task at the newest end of the submitting core's
//     queue;
//   * TSU_GET takes the newest task of the own queue; if that queue is empty
//     it steals the oldest task of another queue, chosen at random; if all
//     queues are empty the requesting thread is blocked;
//   * while any thread is blocked, a submitted task does not go to the
//     submitter's queue but to a blocked thread of the core that has the most
//     threads blocked on the unit (most-blocked-first: the least loaded core,
//     ties to the lowest core number, lowest thread number within the core);
//   * near-full / near-empty interrupts let software spill tasks to an
//     overflow area in memory (TSU_SPILL takes the oldest task of the own
//     queue) and bring them back later (TSU_RESTORE puts a task back at the
//     oldest end, or, like a submit, to a blocked thread). irq_full[c] is high while queue c holds at least HI_WM
//     tasks; irq_empty[c] is high while it holds at most LO_WM tasks and has
//     tasks spilled that were not restored.
//
// Interface: each core presents at most one request (from one of its
// threads) on req_*; a round-robin arbiter accepts one request per cycle and
// raises req_ready for it. A submit or restore to a full queue is not
// accepted until there is room (or a blocked thread to take it). GET and SPILL are answered one cycle after
// acceptance on resp_*[core] with the thread number, the task and a status;
// a blocked thread is answered (status TSU_R_WOKEN) one cycle after the
// submit that wakes it. blocked[c][t] is high while thread t of core c waits;
// the core uses it to take the thread out of scheduling. A GET from a thread
// that is already blocked is accepted and ignored.
//
// Random victim selection uses a 16-bit LFSR: the search for a non-empty
// queue starts at LFSR mod NUM_CORES. Synchronous active-high reset.
// Defaults: 16 cores with 4 threads, the largest evaluated system. Queue
// depth, watermarks and the LFSR are this design's choices.
module tsu
  import mmsys_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 16,
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned HI_WM       = DEPTH - 2,
  parameter int unsigned LO_WM       = 2,
  localparam int unsigned CID_W      = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned QCNT_W     = $clog2(DEPTH + 1),
  localparam int unsigned BCNT_W     = $clog2(NUM_THREADS + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  // requests, one per core
  input  logic [NUM_CORES-1:0]   req_valid,
  input  tsu_op_e                req_op   [NUM_CORES],
  input  logic [TID_W-1:0]       req_tid  [NUM_CORES],
  input  task_t                  req_task [NUM_CORES],
  output logic [NUM_CORES-1:0]   req_ready,
  // responses, one per core
  output logic [NUM_CORES-1:0]   resp_valid,
  output logic [TID_W-1:0]       resp_tid    [NUM_CORES],
  output task_t                  resp_task   [NUM_CORES],
  output tsu_status_e            resp_status [NUM_CORES],
  // thread state and interrupts
  output logic [NUM_THREADS-1:0] blocked     [NUM_CORES],
  output logic [NUM_CORES-1:0]   irq_full,
  output logic [NUM_CORES-1:0]   irq_empty,
  output logic [QCNT_W-1:0]      q_count     [NUM_CORES]
);

  // ---------------------------------------------------------------- queues
  logic [NUM_CORES-1:0] dq_valid;
  dq_op_e               dq_op;
  task_t                dq_wdata;
  task_t                q_new [NUM_CORES];
  task_t                q_old [NUM_CORES];
  logic [NUM_CORES-1:0] q_full, q_empty;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_q
    task_deque #(.DEPTH(DEPTH), .W(TASK_W)) u_dq (
      .clk, .rst,
      .op_valid (dq_valid[c]),
      .op       (dq_op),
      .wdata    (dq_wdata),
      .new_data (q_new[c]),
      .old_data (q_old[c]),
      .count    (q_count[c]),
      .full     (q_full[c]),
      .empty    (q_empty[c])
    );
  end

  logic any_blocked;   // some thread of some core waits for a task

  // ---------------------------------------------------------- eligibility
  // a submit/restore to a full queue waits; everything else can go
  logic [NUM_CORES-1:0] eligible;
  always_comb begin
    for (int c = 0; c < NUM_CORES; c++) begin
      eligible[c] = req_valid[c];
      if ((req_op[c] == TSU_RESTORE) && q_full[c] && !any_blocked) eligible[c] = 1'b0;
      if ((req_op[c] == TSU_SUBMIT) && q_full[c] && !any_blocked) eligible[c] = 1'b0;
    end
  end

  logic             arb_valid;
  logic [CID_W-1:0] arb_idx;
  rr_arbiter #(.N(NUM_CORES)) u_arb (
    .clk, .rst, .req(eligible), .advance(1'b1),
    .gnt_valid(arb_valid), .gnt_idx(arb_idx)
  );

  // ------------------------------------------------------ blocked threads
  logic [BCNT_W-1:0] nblk [NUM_CORES];
  logic [CID_W-1:0]  mb_core;
  logic [TID_W-1:0]  mb_tid;

  always_comb begin
    any_blocked = 1'b0;
    for (int c = 0; c < NUM_CORES; c++) begin
      nblk[c] = '0;
      for (int t = 0; t < NUM_THREADS; t++)
        nblk[c] = nblk[c] + BCNT_W'(blocked[c][t]);
      if (blocked[c] != '0) any_blocked = 1'b1;
    end
    // most-blocked-first: core with the largest count, lowest number on a tie
    mb_core = '0;
    for (int c = 1; c < NUM_CORES; c++)
      if (nblk[c] > nblk[mb_core]) mb_core = CID_W'(c);
    mb_tid = '0;
    for (int t = NUM_THREADS - 1; t >= 0; t--)
      if (blocked[mb_core][t]) mb_tid = TID_W'(t);
  end

  // ------------------------------------------------------- random victim
  logic [15:0] lfsr;
  always_ff @(posedge clk) begin
    if (rst) lfsr <= 16'hACE1;
    else     lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  logic             victim_found;
  logic [CID_W-1:0] victim;
  always_comb begin
    int unsigned start;
    start        = 32'(lfsr) % NUM_CORES;
    victim_found = 1'b0;
    victim       = '0;
    for (int k = 0; k < NUM_CORES; k++) begin
      int unsigned i;
      i = (start + k) % NUM_CORES;
      if (!victim_found && !q_empty[i]) begin
        victim_found = 1'b1;
        victim       = CID_W'(i);
      end
    end
  end

  // ------------------------------------------------------------- decision
  tsu_op_e          cur_op;
  logic [TID_W-1:0] cur_tid;
  task_t            cur_task;
  logic             cur_is_blocked;
  assign cur_op         = req_op[arb_idx];
  assign cur_tid        = req_tid[arb_idx];
  assign cur_task       = req_task[arb_idx];
  assign cur_is_blocked = blocked[arb_idx][cur_tid];

  // what happens this cycle
  logic             r_fire;       // a response goes out next cycle
  logic [CID_W-1:0] r_core;
  logic [TID_W-1:0] r_tid;
  task_t            r_task;
  tsu_status_e      r_status;
  logic             set_block, clr_block;
  logic             spill_inc, spill_dec;

  always_comb begin
    dq_valid  = '0;
    dq_op     = DQ_PUSH_NEW;
    dq_wdata  = cur_task;
    r_fire    = 1'b0;
    r_core    = arb_idx;
    r_tid     = cur_tid;
    r_task    = cur_task;
    r_status  = TSU_R_OWN;
    set_block = 1'b0;
    clr_block = 1'b0;
    spill_inc = 1'b0;
    spill_dec = 1'b0;
    req_ready = '0;
    if (arb_valid) begin
      req_ready[arb_idx] = 1'b1;
      unique case (cur_op)
        TSU_SUBMIT: begin
          if (any_blocked) begin
            r_fire    = 1'b1;
            r_core    = mb_core;
            r_tid     = mb_tid;
            r_status  = TSU_R_WOKEN;
            clr_block = 1'b1;
          end else begin
            dq_valid[arb_idx] = 1'b1;
            dq_op             = DQ_PUSH_NEW;
          end
        end
        TSU_GET: begin
          if (cur_is_blocked) begin
            // already waiting: nothing to do
          end else if (!q_empty[arb_idx]) begin
            dq_valid[arb_idx] = 1'b1;
            dq_op    = DQ_POP_NEW;
            r_fire   = 1'b1;
            r_task   = q_new[arb_idx];
            r_status = TSU_R_OWN;
          end else if (victim_found) begin
            dq_valid[victim] = 1'b1;
            dq_op    = DQ_POP_OLD;
            r_fire   = 1'b1;
            r_task   = q_old[victim];
            r_status = TSU_R_STOLEN;
          end else begin
            set_block = 1'b1;
          end
        end
        TSU_SPILL: begin
          r_fire = 1'b1;
          if (!q_empty[arb_idx]) begin
            dq_valid[arb_idx] = 1'b1;
            dq_op     = DQ_POP_OLD;
            r_task    = q_old[arb_idx];
            r_status  = TSU_R_OWN;
            spill_inc = 1'b1;
          end else begin
            r_status  = TSU_R_EMPTY;
          end
        end
        TSU_RESTORE: begin
          // a restored task is new work too: a waiting thread takes it first
          spill_dec = 1'b1;
          if (any_blocked) begin
            r_fire    = 1'b1;
            r_core    = mb_core;
            r_tid     = mb_tid;
            r_status  = TSU_R_WOKEN;
            clr_block = 1'b1;
          end else begin
            dq_valid[arb_idx] = 1'b1;
            dq_op             = DQ_PUSH_OLD;
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------ state
  logic [15:0] spilled [NUM_CORES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NUM_CORES; c++) begin
        blocked[c] <= '0;
        spilled[c] <= '0;
      end
      resp_valid <= '0;
    end else begin
      if (set_block) blocked[arb_idx][cur_tid] <= 1'b1;
      if (clr_block) blocked[mb_core][mb_tid] <= 1'b0;
      if (spill_inc) spilled[arb_idx] <= spilled[arb_idx] + 1'b1;
      if (spill_dec && spilled[arb_idx] != '0) spilled[arb_idx] <= spilled[arb_idx] - 1'b1;
      resp_valid <= '0;
      if (r_fire) resp_valid[r_core] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (r_fire) begin
      resp_tid[r_core]    <= r_tid;
      resp_task[r_core]   <= r_task;
      resp_status[r_core] <= r_status;
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CORES; c++) begin
      irq_full[c]  = (int'(q_count[c]) >= HI_WM);
      irq_empty[c] = (int'(q_count[c]) <= LO_WM) && (spilled[c] != '0);
    end
  end

endmodule
