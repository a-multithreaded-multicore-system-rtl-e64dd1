// mt_core: the thread-context part of one multithreaded media core.
//
// Each hardware thread owns an execution context: a program counter and a
// register file. This block holds the NUM_THREADS contexts and decides which
// thread issues each cycle:
//   * ssi_scheduler picks the issuing thread by subset static interleaving
//     over fg_count foreground threads and swaps stalled or lower-priority
//     foreground threads with runnable background ones;
//   * mt_regfile holds the registers of all threads, read by the issuing
//     thread and written by the write-back thread;
//   * latency_pad carries the issuing thread ID down a pipeline padded to a
//     multiple of fg_count, so the thread that writes back in a cycle is known
//     statically; a swap cancels the leaving thread's in-flight write-backs.
// A thread is runnable when it is neither stalled by the datapath or data
// cache (thread_stall) nor blocked on the task scheduling unit (tsu_blocked).
//
// The VLIW datapath itself (decode, functional units, data cache) is not
// part of this block: it receives issue_tid/issue_pc, reads operands through
// rd_addr/rd_data, returns the issuing thread's next PC on next_pc in the
// same cycle, and presents results on wr_* in the cycle given by the padded
// write-back latency (OP_LAT rounded up to a multiple of fg_count). Only
// results whose write-back slot is still valid (wb_valid) are written.
// pc_load sets a thread's PC from outside (thread start); it has priority
// over an update from the issuing thread. Reset (synchronous, active high)
// clears all PCs to zero.
//
// Defaults: 4 threads; register file as in mt_regfile; OP_LAT = 1, the
// single-cycle ALU latency, is this design's choice of write-back latency.
module mt_core #(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_REGS    = 128,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NUM_RD      = 15,
  parameter int unsigned NUM_WR      = 5,
  parameter int unsigned PC_W        = 32,
  parameter int unsigned PRIO_W      = 2,
  parameter int unsigned OP_LAT      = 1,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_THREADS + 1),
  localparam int unsigned ADDR_W     = $clog2(NUM_REGS)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [CNT_W-1:0]       fg_count,
  input  logic [NUM_THREADS-1:0] thread_stall,
  input  logic [NUM_THREADS-1:0] tsu_blocked,
  input  logic [PRIO_W-1:0]      thread_prio [NUM_THREADS],
  // thread start
  input  logic                   pc_load,
  input  logic [TID_W-1:0]       pc_load_tid,
  input  logic [PC_W-1:0]        pc_load_val,
  // issue
  output logic                   issue_valid,
  output logic [TID_W-1:0]       issue_tid,
  output logic [PC_W-1:0]        issue_pc,
  input  logic [PC_W-1:0]        next_pc,
  output logic                   swap_valid,
  output logic [TID_W-1:0]       swap_out_tid,
  output logic [TID_W-1:0]       swap_in_tid,
  output logic                   mode_switch,
  output logic [NUM_THREADS-1:0] fg_mask,
  // operand read (issuing thread)
  input  logic [ADDR_W-1:0]      rd_addr [NUM_RD],
  output logic [DATA_W-1:0]      rd_data [NUM_RD],
  // write-back (thread given by the padded pipeline)
  output logic                   wb_valid,
  output logic [TID_W-1:0]       wb_tid,
  input  logic [NUM_WR-1:0]      wr_en,
  input  logic [ADDR_W-1:0]      wr_addr [NUM_WR],
  input  logic [DATA_W-1:0]      wr_data [NUM_WR]
);

  logic [NUM_THREADS-1:0] ready;
  assign ready = ~thread_stall & ~tsu_blocked;

  logic [TID_W-1:0] issue_slot_unused;

  ssi_scheduler #(.NUM_THREADS(NUM_THREADS), .PRIO_W(PRIO_W)) u_sched (
    .clk, .rst, .fg_count,
    .thread_ready (ready),
    .thread_prio,
    .issue_valid, .issue_tid,
    .issue_slot   (issue_slot_unused),
    .swap_valid, .swap_out_tid, .swap_in_tid,
    .mode_switch, .fg_mask
  );

  // program counters
  logic [PC_W-1:0] pc [NUM_THREADS];
  assign issue_pc = pc[issue_tid];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NUM_THREADS; t++) pc[t] <= '0;
    end else begin
      if (issue_valid && !(pc_load && pc_load_tid == issue_tid)) pc[issue_tid] <= next_pc;
      if (pc_load) pc[pc_load_tid] <= pc_load_val;
    end
  end

  // write-back thread tracking
  logic [0:0] pad_data_unused;
  logic [$clog2(OP_LAT + NUM_THREADS)-1:0] pad_lat_unused;

  latency_pad #(.NUM_THREADS(NUM_THREADS), .OP_LAT(OP_LAT), .DATA_W(1)) u_wbpad (
    .clk, .rst, .fg_count,
    .in_valid    (issue_valid),
    .in_tid      (issue_tid),
    .in_data     (1'b0),
    .flush_valid (swap_valid),
    .flush_tid   (swap_out_tid),
    .out_valid   (wb_valid),
    .out_tid     (wb_tid),
    .out_data    (pad_data_unused),
    .pad_lat     (pad_lat_unused)
  );

  mt_regfile #(
    .NUM_THREADS(NUM_THREADS), .NUM_REGS(NUM_REGS), .DATA_W(DATA_W),
    .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)
  ) u_rf (
    .clk,
    .wr_tid  (wb_tid),
    .wr_en   (wr_en & {NUM_WR{wb_valid}}),
    .wr_addr, .wr_data,
    .rd_tid  (issue_tid),
    .rd_addr, .rd_data
  );

endmodule
