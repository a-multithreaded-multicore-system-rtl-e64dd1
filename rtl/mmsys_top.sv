// mmsys_top: multithreaded multicore system for media processing.
//
// NUM_CORES multithreaded cores, each with its own data cache, share a task
// scheduling unit (TSU), a synchronization unit and, through a snooping
// MESI bus, the shared memory. Each core (mt_core) holds NUM_THREADS hardware thread
// contexts and issues by subset static interleaving over fg_count foreground
// threads. The TSU hands tasks to threads; a thread that asks for a task when
// none exists is blocked in the TSU, and that blocked bit is fed straight
// into the core's scheduler, so the thread leaves the foreground and another
// runnable thread of the same core takes its slot. The TSU in turn counts the
// blocked threads per core to give new tasks to the least loaded core. In the
// same way a data cache miss stalls the thread that missed (miss_valid /
// miss_tid of the cache) until the line is in, so another thread runs.
//
// Not included, so their connections are ports of this module: the VLIW
// datapaths of the cores (they drive next_pc, register read addresses and
// write-backs, other thread stalls and priorities, the TSU / lock requests
// and the data cache accesses of the issuing thread), the shared memory
// (the mem_* port; a line access takes a fixed 40 cycles in the evaluated
// system) and the hardwired entropy decoder.
//
// Per-core signals are arrays indexed by core number; see mt_core, tsu and
// sync_unit for the timing of each interface. fg_count is common to all
// cores. Synchronous active-high reset.
//
// The block list, 16 cores of 4 threads and the cache geometry follow the
// evaluated system; how the blocks are wired (stall masks, the bus, the
// split between RTL and ports) is this design's own.
module mmsys_top
  import mmsys_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 16,
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_REGS    = 128,
  parameter int unsigned NUM_RD      = 15,
  parameter int unsigned NUM_WR      = 5,
  parameter int unsigned PRIO_W      = 2,
  parameter int unsigned OP_LAT      = 1,
  parameter int unsigned TSU_DEPTH   = 16,
  parameter int unsigned NUM_LOCKS   = 64,
  parameter int unsigned DC_BYTES    = 65536,
  parameter int unsigned DC_WAYS     = 4,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned CNT_W      = $clog2(NUM_THREADS + 1),
  localparam int unsigned ADDR_W     = $clog2(NUM_REGS),
  localparam int unsigned LID_W      = (NUM_LOCKS > 1) ? $clog2(NUM_LOCKS) : 1,
  localparam int unsigned QCNT_W     = $clog2(TSU_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [CNT_W-1:0]       fg_count,
  // ---- cores
  input  logic [NUM_THREADS-1:0] thread_stall [NUM_CORES],
  input  logic [PRIO_W-1:0]      thread_prio  [NUM_CORES][NUM_THREADS],
  input  logic [NUM_CORES-1:0]   pc_load,
  input  logic [TID_W-1:0]       pc_load_tid  [NUM_CORES],
  input  logic [WORD_W-1:0]      pc_load_val  [NUM_CORES],
  output logic [NUM_CORES-1:0]   issue_valid,
  output logic [TID_W-1:0]       issue_tid    [NUM_CORES],
  output logic [WORD_W-1:0]      issue_pc     [NUM_CORES],
  input  logic [WORD_W-1:0]      next_pc      [NUM_CORES],
  output logic [NUM_CORES-1:0]   swap_valid,
  output logic [TID_W-1:0]       swap_out_tid [NUM_CORES],
  output logic [TID_W-1:0]       swap_in_tid  [NUM_CORES],
  output logic [NUM_CORES-1:0]   mode_switch,
  output logic [NUM_THREADS-1:0] fg_mask      [NUM_CORES],
  input  logic [ADDR_W-1:0]      rd_addr      [NUM_CORES][NUM_RD],
  output logic [WORD_W-1:0]      rd_data      [NUM_CORES][NUM_RD],
  output logic [NUM_CORES-1:0]   wb_valid,
  output logic [TID_W-1:0]       wb_tid       [NUM_CORES],
  input  logic [NUM_WR-1:0]      wr_en        [NUM_CORES],
  input  logic [ADDR_W-1:0]      wr_addr      [NUM_CORES][NUM_WR],
  input  logic [WORD_W-1:0]      wr_data      [NUM_CORES][NUM_WR],
  // ---- task scheduling unit
  input  logic [NUM_CORES-1:0]   tsu_req_valid,
  input  tsu_op_e                tsu_req_op     [NUM_CORES],
  input  logic [TID_W-1:0]       tsu_req_tid    [NUM_CORES],
  input  task_t                  tsu_req_task   [NUM_CORES],
  output logic [NUM_CORES-1:0]   tsu_req_ready,
  output logic [NUM_CORES-1:0]   tsu_resp_valid,
  output logic [TID_W-1:0]       tsu_resp_tid    [NUM_CORES],
  output task_t                  tsu_resp_task   [NUM_CORES],
  output tsu_status_e            tsu_resp_status [NUM_CORES],
  output logic [NUM_THREADS-1:0] tsu_blocked     [NUM_CORES],
  output logic [NUM_CORES-1:0]   tsu_irq_full,
  output logic [NUM_CORES-1:0]   tsu_irq_empty,
  output logic [QCNT_W-1:0]      tsu_q_count     [NUM_CORES],
  // ---- synchronization unit
  input  logic [NUM_CORES-1:0]   sync_req_valid,
  input  sync_op_e               sync_req_op   [NUM_CORES],
  input  logic [TID_W-1:0]       sync_req_tid  [NUM_CORES],
  input  logic [LID_W-1:0]       sync_req_lock [NUM_CORES],
  output logic [NUM_CORES-1:0]   sync_req_ready,
  output logic [NUM_CORES-1:0]   sync_resp_valid,
  output logic [NUM_CORES-1:0]   sync_resp_granted,
  output logic [TID_W-1:0]       sync_resp_tid [NUM_CORES],
  output logic [NUM_LOCKS-1:0]   sync_lock_held,
  // ---- data caches (CPU side, one per core)
  input  logic [NUM_CORES-1:0]   dc_req,
  input  logic [NUM_CORES-1:0]   dc_we,
  input  logic [WORD_W-1:0]      dc_addr  [NUM_CORES],
  input  logic [WORD_W-1:0]      dc_wdata [NUM_CORES],
  input  logic [3:0]             dc_be    [NUM_CORES],
  input  logic [TID_W-1:0]       dc_tid   [NUM_CORES],
  output logic [NUM_CORES-1:0]   dc_ready,
  output logic [WORD_W-1:0]      dc_rdata [NUM_CORES],
  output logic [NUM_CORES-1:0]   dc_miss_valid,
  output logic [TID_W-1:0]       dc_miss_tid [NUM_CORES],
  // ---- shared memory
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [LADDR_W-1:0]     mem_addr,
  output logic [LINE_W-1:0]      mem_wdata,
  input  logic                   mem_ack,
  input  logic [LINE_W-1:0]      mem_rdata
);

  // ------------------------------------------------ data caches and bus
  logic [NUM_CORES-1:0] bus_req, bus_gnt, bus_done, snoop_valid, snoop_hit, snoop_dirty;
  bus_op_e              bus_op [NUM_CORES];
  bus_op_e              snoop_op;
  logic [LADDR_W-1:0]   bus_addr [NUM_CORES];
  logic [LADDR_W-1:0]   snoop_addr;
  logic [LINE_W-1:0]    bus_wdata [NUM_CORES];
  logic [LINE_W-1:0]    snoop_data [NUM_CORES];
  logic [LINE_W-1:0]    bus_rdata;
  logic                 bus_shared;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_dc
    dcache #(.SIZE_BYTES(DC_BYTES), .WAYS(DC_WAYS), .NUM_THREADS(NUM_THREADS)) u_dc (
      .clk, .rst,
      .cpu_req     (dc_req[c]),
      .cpu_we      (dc_we[c]),
      .cpu_addr    (dc_addr[c]),
      .cpu_wdata   (dc_wdata[c]),
      .cpu_be      (dc_be[c]),
      .cpu_tid     (dc_tid[c]),
      .cpu_ready   (dc_ready[c]),
      .cpu_rdata   (dc_rdata[c]),
      .miss_valid  (dc_miss_valid[c]),
      .miss_tid    (dc_miss_tid[c]),
      .bus_req     (bus_req[c]),
      .bus_op      (bus_op[c]),
      .bus_addr    (bus_addr[c]),
      .bus_wdata   (bus_wdata[c]),
      .bus_gnt     (bus_gnt[c]),
      .bus_done    (bus_done[c]),
      .bus_rdata,
      .bus_shared,
      .snoop_valid (snoop_valid[c]),
      .snoop_op,
      .snoop_addr,
      .snoop_hit   (snoop_hit[c]),
      .snoop_dirty (snoop_dirty[c]),
      .snoop_data  (snoop_data[c])
    );
  end

  coh_bus #(.NUM_CACHES(NUM_CORES)) u_bus (
    .clk, .rst,
    .bus_req, .bus_op, .bus_addr, .bus_wdata, .bus_gnt, .bus_done,
    .bus_rdata, .bus_shared,
    .snoop_valid, .snoop_op, .snoop_addr, .snoop_hit, .snoop_dirty, .snoop_data,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata
  );

  // a thread waiting for its cache line is not runnable
  logic [NUM_THREADS-1:0] core_stall [NUM_CORES];
  always_comb begin
    for (int c = 0; c < NUM_CORES; c++) begin
      core_stall[c] = thread_stall[c];
      if (dc_miss_valid[c]) core_stall[c][dc_miss_tid[c]] = 1'b1;
    end
  end

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    mt_core #(
      .NUM_THREADS(NUM_THREADS), .NUM_REGS(NUM_REGS), .DATA_W(WORD_W),
      .NUM_RD(NUM_RD), .NUM_WR(NUM_WR), .PC_W(WORD_W), .PRIO_W(PRIO_W),
      .OP_LAT(OP_LAT)
    ) u_core (
      .clk, .rst, .fg_count,
      .thread_stall (core_stall[c]),
      .tsu_blocked  (tsu_blocked[c]),
      .thread_prio  (thread_prio[c]),
      .pc_load      (pc_load[c]),
      .pc_load_tid  (pc_load_tid[c]),
      .pc_load_val  (pc_load_val[c]),
      .issue_valid  (issue_valid[c]),
      .issue_tid    (issue_tid[c]),
      .issue_pc     (issue_pc[c]),
      .next_pc      (next_pc[c]),
      .swap_valid   (swap_valid[c]),
      .swap_out_tid (swap_out_tid[c]),
      .swap_in_tid  (swap_in_tid[c]),
      .mode_switch  (mode_switch[c]),
      .fg_mask      (fg_mask[c]),
      .rd_addr      (rd_addr[c]),
      .rd_data      (rd_data[c]),
      .wb_valid     (wb_valid[c]),
      .wb_tid       (wb_tid[c]),
      .wr_en        (wr_en[c]),
      .wr_addr      (wr_addr[c]),
      .wr_data      (wr_data[c])
    );
  end

  tsu #(
    .NUM_CORES(NUM_CORES), .NUM_THREADS(NUM_THREADS), .DEPTH(TSU_DEPTH)
  ) u_tsu (
    .clk, .rst,
    .req_valid   (tsu_req_valid),
    .req_op      (tsu_req_op),
    .req_tid     (tsu_req_tid),
    .req_task    (tsu_req_task),
    .req_ready   (tsu_req_ready),
    .resp_valid  (tsu_resp_valid),
    .resp_tid    (tsu_resp_tid),
    .resp_task   (tsu_resp_task),
    .resp_status (tsu_resp_status),
    .blocked     (tsu_blocked),
    .irq_full    (tsu_irq_full),
    .irq_empty   (tsu_irq_empty),
    .q_count     (tsu_q_count)
  );

  sync_unit #(
    .NUM_CORES(NUM_CORES), .NUM_THREADS(NUM_THREADS), .NUM_LOCKS(NUM_LOCKS)
  ) u_sync (
    .clk, .rst,
    .req_valid    (sync_req_valid),
    .req_op       (sync_req_op),
    .req_tid      (sync_req_tid),
    .req_lock     (sync_req_lock),
    .req_ready    (sync_req_ready),
    .resp_valid   (sync_resp_valid),
    .resp_granted (sync_resp_granted),
    .resp_tid     (sync_resp_tid),
    .lock_held    (sync_lock_held)
  );

endmodule
