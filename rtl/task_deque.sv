// task_deque: one double-ended task queue of the task scheduling unit.
//
// A core submits and retrieves its own tasks at the newest end, so its own
// work is taken first-in-last-out (the newest task usually shares data with
// the task just finished). Other cores steal, and the overflow handler spills,
// at the oldest end; spilled tasks come back at the oldest end as well.
// The queue is a circular buffer of DEPTH entries with a pointer to the
// oldest entry and an occupancy count.
//
// Interface: one operation per cycle (op_valid, op, wdata), applied at the
// rising edge. new_data and old_data show the entries at the two ends
// combinationally, so a pop reads its task in the cycle it is issued. Pushes
// to a full queue and pops from an empty queue are ignored (the caller checks
// full/empty). Synchronous active-high reset empties the queue.
// DEPTH must be a power of two. The default of 16 entries is this design's
// choice.
module task_deque
  import mmsys_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = TASK_W,
  localparam int unsigned PTR_W = $clog2(DEPTH),
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             op_valid,
  input  dq_op_e           op,
  input  logic [W-1:0]     wdata,
  output logic [W-1:0]     new_data,
  output logic [W-1:0]     old_data,
  output logic [CNT_W-1:0] count,
  output logic             full,
  output logic             empty
);

  logic [W-1:0]     mem [DEPTH];
  logic [PTR_W-1:0] old_ptr;
  logic [PTR_W-1:0] new_ptr;   // index of the newest entry

  assign new_ptr  = old_ptr + PTR_W'(count) - 1'b1;
  assign new_data = mem[new_ptr];
  assign old_data = mem[old_ptr];
  assign full     = (count == CNT_W'(DEPTH));
  assign empty    = (count == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      old_ptr <= '0;
      count   <= '0;
    end else if (op_valid) begin
      unique case (op)
        DQ_PUSH_NEW: if (!full) begin
          mem[old_ptr + PTR_W'(count)] <= wdata;
          count <= count + 1'b1;
        end
        DQ_POP_NEW: if (!empty) count <= count - 1'b1;
        DQ_POP_OLD: if (!empty) begin
          old_ptr <= old_ptr + 1'b1;
          count   <= count - 1'b1;
        end
        DQ_PUSH_OLD: if (!full) begin
          mem[old_ptr - 1'b1] <= wdata;
          old_ptr <= old_ptr - 1'b1;
          count   <= count + 1'b1;
        end
      endcase
    end
  end

endmodule
