// tb_task_deque: self-checking test of the double-ended task queue.
// Random sequences of the four operations are compared with a SystemVerilog
// queue used as the reference: newest end = back, oldest end = front. Checks
// the two end views, the count and the full/empty flags every cycle, and
// that the queue returns its own tasks last-in-first-out and stolen tasks
// oldest-first.
module tb_task_deque;
  import mmsys_pkg::*;
  localparam int D = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, op_valid, full, empty;
  dq_op_e op;
  logic [63:0] wdata, new_data, old_data;
  logic [4:0] count;

  task_deque #(.DEPTH(D), .W(64)) dut (.*);

  logic [63:0] q [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (int'(count) != q.size() || full != (q.size() == D) || empty != (q.size() == 0)
        || (q.size() > 0 && (new_data != q[$] || old_data != q[0]))) begin
      failures++;
      if (failures < 10) $display("FAIL %s: count %0d exp %0d", what, count, q.size());
    end
  endtask

  initial begin
    rst = 1; op_valid = 0; op = DQ_PUSH_NEW; wdata = 0;
    repeat (2) @(negedge clk); rst = 0;
    // LIFO for own work
    for (int i = 0; i < 4; i++) begin
      op_valid = 1; op = DQ_PUSH_NEW; wdata = 64'(i); q.push_back(wdata);
      @(negedge clk);
    end
    op = DQ_POP_NEW; #1 checks++; if (new_data != 64'd3) begin failures++; $display("FAIL LIFO"); end
    void'(q.pop_back()); @(negedge clk);
    op = DQ_POP_OLD; #1 checks++; if (old_data != 64'd0) begin failures++; $display("FAIL steal oldest"); end
    void'(q.pop_front()); @(negedge clk);
    op_valid = 0; #1 compare("directed");
    // random
    for (int i = 0; i < 20000; i++) begin
      op_valid = ($urandom_range(0, 4) != 0);
      op = dq_op_e'($urandom_range(0, 3));
      if (i % 3000 > 2000) op = (op == DQ_POP_NEW || op == DQ_POP_OLD) ? DQ_PUSH_NEW : op;  // phases that fill up
      wdata = {$urandom, $urandom};
      #1 compare("before op");
      @(posedge clk);
      if (op_valid) begin
        case (op)
          DQ_PUSH_NEW: if (q.size() < D) q.push_back(wdata);
          DQ_POP_NEW:  if (q.size() > 0) void'(q.pop_back());
          DQ_POP_OLD:  if (q.size() > 0) void'(q.pop_front());
          DQ_PUSH_OLD: if (q.size() < D) q.push_front(wdata);
        endcase
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
