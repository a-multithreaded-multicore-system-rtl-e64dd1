// tb_tsu: self-checking test of the task scheduling unit at its default size
// (16 cores, 4 threads, 16-entry queues).
// Directed checks, expected values worked out by hand:
//   * own tasks come back newest first; an empty core steals the oldest task
//     of another queue;
//   * a GET with all queues empty blocks the thread; with 1, 2 and 3 threads
//     blocked on cores 1, 2 and 3, a task submitted by core 0 goes to core 3
//     (most blocked first), then ties go to the lower core number;
//   * near-full interrupt at 14 tasks, spill of the oldest tasks, near-empty
//     interrupt while spilled tasks are outstanding, restore at the oldest end.
// Random part: 15 cores submit and retrieve concurrently while a 16th feeds
// tasks whenever threads are blocked; every task submitted must be received
// exactly once.
module tb_tsu;
  import mmsys_pkg::*;
  localparam int C = 16, T = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [C-1:0] req_valid, req_ready, resp_valid, irq_full, irq_empty;
  tsu_op_e req_op [C];
  logic [1:0] req_tid [C];
  task_t req_task [C];
  logic [1:0] resp_tid [C];
  task_t resp_task [C];
  tsu_status_e resp_status [C];
  logic [T-1:0] blocked [C];
  logic [4:0] q_count [C];

  tsu dut (.*);

  int checks = 0, failures = 0;
  int n_steal = 0, n_wake = 0, n_block = 0, n_own = 0, n_full_irq = 0, n_empty_irq = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: loops_done=%0d submitted=%0d", loops_done, submitted);
    for (int c = 0; c < C; c++) $display("core %0d blocked %b q %0d got %0d req %b", c, blocked[c], q_count[c], got_task[c].size(), req_valid[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses seen per core, in order
  task_t got_task [C][$];
  logic [1:0] got_tid [C][$];
  tsu_status_e got_st [C][$];
  always @(negedge clk) if (!rst) for (int c = 0; c < C; c++) if (resp_valid[c]) begin
    got_task[c].push_back(resp_task[c]);
    got_tid[c].push_back(resp_tid[c]);
    got_st[c].push_back(resp_status[c]);
    case (resp_status[c])
      TSU_R_STOLEN: n_steal++;
      TSU_R_WOKEN:  n_wake++;
      TSU_R_OWN:    n_own++;
      default: ;
    endcase
  end
  logic [C-1:0] irq_full_q, irq_empty_q;
  always @(negedge clk) if (!rst) begin
    for (int c = 0; c < C; c++) begin
      if (irq_full[c] && !irq_full_q[c]) n_full_irq++;
      if (irq_empty[c] && !irq_empty_q[c]) n_empty_irq++;
    end
    irq_full_q <= irq_full; irq_empty_q <= irq_empty;
  end

  // issue one request from core c and wait until it is accepted
  task automatic tsu_op(input int c, input tsu_op_e op, input int tid, input task_t tk);
    @(negedge clk);
    req_valid[c] = 1; req_op[c] = op; req_tid[c] = 2'(tid); req_task[c] = tk;
    forever begin
      #1;
      if (req_ready[c]) break;
      @(negedge clk);
    end
    @(posedge clk);
    if (op == TSU_GET) begin
      #1 if (blocked[c][tid]) n_block++;
    end
    @(negedge clk);
    req_valid[c] = 0;
  endtask

  function automatic task_t mk(input int id);
    return '{func: 32'(id), arg: ~32'(id)};
  endfunction

  task automatic expect_resp(input int c, input int id, input tsu_status_e st, input int tid, input string what);
    checks++;
    if (got_task[c].size() == 0) begin failures++; $display("FAIL %s: no response", what); return; end
    if (got_task[c][$] != mk(id) || got_st[c][$] != st || got_tid[c][$] != 2'(tid)) begin
      failures++;
      $display("FAIL %s: got task %0d st %s tid %0d", what, got_task[c][$].func, got_st[c][$].name(), got_tid[c][$]);
    end
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------- random phase
  int submitted = 0;
  int seen [int];
  int next_id = 1000;
  bit rand_done = 0;
  bit rand_start = 0;
  int loops_done = 0;

  for (genvar g = 0; g < C - 1; g++) begin : g_loop
    initial begin
      wait (rand_start);
      core_loop(g, 150);
      loops_done++;
    end
  end

  task automatic core_loop(input int c, input int nops);
    for (int i = 0; i < nops; i++) begin
      int tid = $urandom_range(0, T - 1);
      if ($urandom_range(0, 9) < 5) begin
        int id = next_id++;
        submitted++;
        tsu_op(c, TSU_SUBMIT, tid, mk(id));
      end else begin
        int nbefore = got_task[c].size();
        tsu_op(c, TSU_GET, tid, '0);
        // wait for the task (immediately, or when woken)
        while (got_task[c].size() == nbefore) @(negedge clk);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; req_valid = '0;
    for (int c = 0; c < C; c++) begin req_op[c] = TSU_GET; req_tid[c] = 0; req_task[c] = '0; end
    irq_full_q = '0; irq_empty_q = '0;
    repeat (3) @(negedge clk); rst = 0;

    // own LIFO and stealing
    tsu_op(0, TSU_SUBMIT, 0, mk(1));
    tsu_op(0, TSU_SUBMIT, 0, mk(2));
    tsu_op(0, TSU_SUBMIT, 0, mk(3));
    check(q_count[0] == 3, "three tasks queued");
    tsu_op(0, TSU_GET, 1, '0); @(negedge clk);
    expect_resp(0, 3, TSU_R_OWN, 1, "own newest");
    tsu_op(5, TSU_GET, 2, '0); @(negedge clk);
    expect_resp(5, 1, TSU_R_STOLEN, 2, "steal oldest");
    tsu_op(0, TSU_GET, 0, '0); @(negedge clk);
    expect_resp(0, 2, TSU_R_OWN, 0, "own last");

    // most-blocked-first (the situation of a 4-thread system with cores 1..3 idle)
    tsu_op(1, TSU_GET, 0, '0);
    tsu_op(2, TSU_GET, 0, '0); tsu_op(2, TSU_GET, 1, '0);
    tsu_op(3, TSU_GET, 1, '0); tsu_op(3, TSU_GET, 2, '0); tsu_op(3, TSU_GET, 3, '0);
    check(blocked[1] == 4'b0001 && blocked[2] == 4'b0011 && blocked[3] == 4'b1110, "threads blocked");
    tsu_op(0, TSU_SUBMIT, 0, mk(10)); @(negedge clk);
    expect_resp(3, 10, TSU_R_WOKEN, 1, "to most blocked core 3");
    check(blocked[3] == 4'b1100 && q_count[0] == 0, "thread 1 of core 3 woken, nothing queued");
    tsu_op(0, TSU_SUBMIT, 0, mk(11)); @(negedge clk);
    expect_resp(2, 11, TSU_R_WOKEN, 0, "tie 2 vs 3 goes to core 2");
    tsu_op(0, TSU_SUBMIT, 0, mk(12)); @(negedge clk);
    expect_resp(3, 12, TSU_R_WOKEN, 2, "tie 2 vs 3 goes to core 3 after core 2 drops");
    tsu_op(0, TSU_SUBMIT, 0, mk(13)); @(negedge clk);
    tsu_op(0, TSU_SUBMIT, 0, mk(14)); @(negedge clk);
    tsu_op(0, TSU_SUBMIT, 0, mk(15)); @(negedge clk);
    check(blocked[1] == 0 && blocked[2] == 0 && blocked[3] == 0, "all woken");

    // overflow handling on core 7
    for (int i = 0; i < 13; i++) tsu_op(7, TSU_SUBMIT, 0, mk(100 + i));
    #1 check(!irq_full[7], "no near-full at 13");
    tsu_op(7, TSU_SUBMIT, 0, mk(113));
    #1 check(irq_full[7], "near-full at 14");
    for (int i = 0; i < 3; i++) begin
      tsu_op(7, TSU_SPILL, 3, '0); @(negedge clk);
      expect_resp(7, 100 + i, TSU_R_OWN, 3, "spill oldest");
    end
    #1 check(!irq_full[7] && q_count[7] == 11, "spilled to 11");
    for (int i = 0; i < 9; i++) begin
      tsu_op(7, TSU_GET, 0, '0); @(negedge clk);
      expect_resp(7, 113 - i, TSU_R_OWN, 0, "drain newest");
    end
    #1 check(irq_empty[7], "near-empty with spilled tasks");
    for (int i = 2; i >= 0; i--) tsu_op(7, TSU_RESTORE, 3, mk(100 + i));
    #1 check(!irq_empty[7] && q_count[7] == 5, "restored");
    tsu_op(8, TSU_GET, 0, '0); @(negedge clk);
    expect_resp(8, 100, TSU_R_STOLEN, 0, "restored task is the oldest");
    for (int i = 0; i < 4; i++) tsu_op(7, TSU_GET, 0, '0);
    // spill on empty queue
    tsu_op(7, TSU_SPILL, 0, '0); @(negedge clk);
    check(got_st[7][$] == TSU_R_EMPTY, "spill of empty queue");
    check(irq_empty[7] == 0, "spill counter back to zero");

    // random concurrent traffic
    for (int c = 0; c < C; c++) begin got_task[c].delete(); got_tid[c].delete(); got_st[c].delete(); end
    rand_start = 1;
    // feeder: whenever someone waits, core 15 submits
    while (loops_done < C - 1) begin
      bit any;
      any = 0;
      for (int c = 0; c < C; c++) if (blocked[c] != 0) any = 1;
      if (any && q_count[C-1] < 5'd12) begin
        int id;
        id = next_id++;
        submitted++;
        tsu_op(C - 1, TSU_SUBMIT, 3, mk(id));
      end else @(negedge clk);
    end
    rand_done = 1;
    repeat (5) @(negedge clk);
    // drain what is left through core 0
    while (1) begin
      int left;
      left = 0;
      for (int c = 0; c < C; c++) left += int'(q_count[c]);
      if (left == 0) break;
      tsu_op(0, TSU_GET, 0, '0);
    end
    repeat (3) @(negedge clk);
    begin
      int received = 0, dup = 0;
      for (int c = 0; c < C; c++)
        foreach (got_task[c][i]) begin
          int id;
          id = int'(got_task[c][i].func);
          received++;
          if (got_task[c][i].arg != ~got_task[c][i].func) dup++;
          if (seen.exists(id)) dup++;
          seen[id] = 1;
        end
      check(received == submitted && dup == 0, "every task received exactly once");
      $display("submitted=%0d received=%0d", submitted, received);
    end
    $display("own=%0d steals=%0d blocks=%0d wakes=%0d full_irqs=%0d empty_irqs=%0d",
             n_own, n_steal, n_block, n_wake, n_full_irq, n_empty_irq);
    check(n_steal > 0 && n_wake > 0 && n_block > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
