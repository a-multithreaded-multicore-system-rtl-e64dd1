// mmsys_pkg: types and constants shared by the blocks of the multithreaded
// multicore system (task scheduling unit, synchronization unit, cores).
//
// A task, as handed around by the task scheduling unit, is a function pointer
// plus one argument word. The widths of both are this design's choice; the
// 32-bit width matches the word size of the media cores.
package mmsys_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned TASK_W = 2 * WORD_W;

  // A task descriptor: the code to run and its argument.
  typedef struct packed {
    logic [WORD_W-1:0] func;
    logic [WORD_W-1:0] arg;
  } task_t;

  // Operations a hardware thread can send to the task scheduling unit.
  typedef enum logic [1:0] {
    TSU_SUBMIT  = 2'd0,  // put a task into the own queue (newest end)
    TSU_GET     = 2'd1,  // take a task: own newest, else steal, else block
    TSU_SPILL   = 2'd2,  // remove the oldest task of the own queue (overflow handler)
    TSU_RESTORE = 2'd3   // put a task back at the oldest end (overflow handler)
  } tsu_op_e;

  // Status returned with a TSU response.
  typedef enum logic [1:0] {
    TSU_R_OWN    = 2'd0,  // task came from the requester's own queue
    TSU_R_STOLEN = 2'd1,  // task was stolen from another core's queue
    TSU_R_WOKEN  = 2'd2,  // thread was blocked and received a newly submitted task
    TSU_R_EMPTY  = 2'd3   // spill found the queue empty
  } tsu_status_e;

  // Operations on one double-ended task queue.
  typedef enum logic [1:0] {
    DQ_PUSH_NEW = 2'd0,  // add at the newest end
    DQ_POP_NEW  = 2'd1,  // take from the newest end (own retrieval)
    DQ_POP_OLD  = 2'd2,  // take from the oldest end (steal, spill)
    DQ_PUSH_OLD = 2'd3   // add at the oldest end (restore)
  } dq_op_e;

  // Operations on the synchronization unit.
  typedef enum logic [1:0] {
    SYNC_NOP     = 2'd0,
    SYNC_ACQUIRE = 2'd1,  // try to take a lock; answered granted / refused
    SYNC_RELEASE = 2'd2   // give a lock back (only its owner can)
  } sync_op_e;

  // Data cache line states (MESI coherence).
  typedef enum logic [1:0] {
    MESI_I = 2'd0,
    MESI_S = 2'd1,
    MESI_E = 2'd2,
    MESI_M = 2'd3
  } mesi_e;

  // Transactions on the coherent memory bus.
  typedef enum logic [1:0] {
    BUS_RD   = 2'd0,  // read a line to share it
    BUS_RDX  = 2'd1,  // read a line to own and modify it
    BUS_UPGR = 2'd2,  // shared copy becomes the only, modified one
    BUS_WB   = 2'd3   // write a modified line back to memory
  } bus_op_e;

  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = 8 * LINE_BYTES;
  localparam int unsigned LADDR_W    = WORD_W - $clog2(LINE_BYTES);  // line address width

endpackage
