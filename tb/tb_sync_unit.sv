// tb_sync_unit: self-checking test of the synchronization unit (16 cores,
// 4 threads, 64 locks). Directed: acquire of a free lock is granted, a second
// acquire is refused, a release by a non-owner is refused and leaves the lock
// held, a release by the owner frees it. Random: all cores issue acquire /
// release requests concurrently; a reference lock table, updated in the
// order the unit accepts the requests, predicts every answer. Finally the
// atomic decrement the lock exists for: 16 cores each decrement a shared
// counter 20 times under lock 0, and the count must come out exact.
module tb_sync_unit;
  import mmsys_pkg::*;
  localparam int C = 16, T = 4, L = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [C-1:0] req_valid, req_ready, resp_valid, resp_granted;
  sync_op_e req_op [C];
  logic [1:0] req_tid [C];
  logic [5:0] req_lock [C];
  logic [1:0] resp_tid [C];
  logic [L-1:0] lock_held;

  sync_unit dut (.*);

  int checks = 0, failures = 0;
  int n_refused = 0, n_granted = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated at the accepting edge
  bit m_held [L];
  int m_core [L], m_tid [L];
  bit exp_grant [C];
  bit exp_pending [C];
  always @(posedge clk) if (!rst) begin
    for (int c = 0; c < C; c++) if (req_ready[c]) begin
      int l;
      bit g;
      l = int'(req_lock[c]);
      if (req_op[c] == SYNC_ACQUIRE) begin
        g = !m_held[l];
        if (g) begin m_held[l] = 1; m_core[l] = c; m_tid[l] = int'(req_tid[c]); end
      end else begin
        g = m_held[l] && m_core[l] == c && m_tid[l] == int'(req_tid[c]);
        if (g) m_held[l] = 0;
      end
      exp_grant[c] = g;
      exp_pending[c] = 1;
    end
  end
  always @(negedge clk) if (!rst) begin
    for (int c = 0; c < C; c++) begin
      if (resp_valid[c]) begin
        checks++;
        if (!exp_pending[c] || resp_granted[c] != exp_grant[c]) begin
          failures++;
          if (failures < 10) $display("FAIL core %0d granted %0d exp %0d", c, resp_granted[c], exp_grant[c]);
        end
        if (resp_granted[c]) n_granted++; else n_refused++;
        exp_pending[c] = 0;
      end
    end
  end

  bit last_grant [C];
  task automatic sync_op(input int c, input sync_op_e op, input int tid, input int lock);
    @(negedge clk);
    req_valid[c] = 1; req_op[c] = op; req_tid[c] = 2'(tid); req_lock[c] = 6'(lock);
    forever begin
      #1;
      if (req_ready[c]) break;
      @(negedge clk);
    end
    @(negedge clk);
    req_valid[c] = 0;
    last_grant[c] = resp_granted[c];
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int counter = 320;
  int loops_done = 0;
  bit go = 0;
  for (genvar g = 0; g < C; g++) begin : g_core
    initial begin
      wait (go);
      for (int i = 0; i < 20; i++) begin
        int tid;
        tid = $urandom_range(0, T - 1);
        do sync_op(g, SYNC_ACQUIRE, tid, 0); while (!last_grant[g]);
        // critical section: read-modify-write over several cycles
        begin
          int v;
          v = counter;
          repeat ($urandom_range(1, 4)) @(negedge clk);
          counter = v - 1;
        end
        sync_op(g, SYNC_RELEASE, tid, 0);
      end
      loops_done++;
    end
  end

  initial begin
    rst = 1; req_valid = '0;
    for (int c = 0; c < C; c++) begin req_op[c] = SYNC_NOP; req_tid[c] = 0; req_lock[c] = 0; exp_pending[c] = 0; end
    for (int l = 0; l < L; l++) m_held[l] = 0;
    repeat (3) @(negedge clk); rst = 0;
    sync_op(3, SYNC_ACQUIRE, 1, 7);  check(last_grant[3] && lock_held[7], "acquire free lock");
    sync_op(4, SYNC_ACQUIRE, 0, 7);  check(!last_grant[4], "second acquire refused");
    sync_op(3, SYNC_RELEASE, 2, 7);  check(!last_grant[3] && lock_held[7], "release by other thread refused");
    sync_op(3, SYNC_RELEASE, 1, 7);  check(last_grant[3] && !lock_held[7], "release by owner");
    // random concurrent traffic on 8 locks
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int c = 0; c < C; c++) begin
        if (!req_valid[c] || req_ready[c]) begin
          req_valid[c] = ($urandom_range(0, 2) != 0);
          req_op[c]    = ($urandom_range(0, 1) != 0) ? SYNC_ACQUIRE : SYNC_RELEASE;
          req_tid[c]   = 2'($urandom);
          req_lock[c]  = 6'($urandom_range(0, 7));
        end
      end
      #1;
    end
    @(negedge clk); req_valid = '0;
    repeat (3) @(negedge clk);
    // release everything still held, through the owners
    for (int l = 0; l < L; l++) if (m_held[l]) sync_op(m_core[l], SYNC_RELEASE, m_tid[l], l);
    check(lock_held == '0, "all locks free");
    // atomic decrement by all cores
    go = 1;
    wait (loops_done == C);
    check(counter == 0, "atomic decrement exact");
    $display("granted=%0d refused=%0d counter=%0d", n_granted, n_refused, counter);
    check(n_refused > 0 && n_granted > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
