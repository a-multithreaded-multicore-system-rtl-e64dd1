// tb_ssi_scheduler: self-checking test of the SSI thread scheduler.
// Directed part, with the expected issue sequences written out by hand:
//   * static interleaving (4 foreground threads, all ready): 0,1,2,3,0,...
//   * blocked (1 foreground): thread 0 every cycle; when it stalls, one
//     bubble for the swap, then thread 1 every cycle;
//   * SSI (2 foreground of 4): slots alternate; a stalled foreground thread is
//     replaced by a ready background thread; a higher-priority background
//     thread displaces a ready foreground one.
// Random part: random ready/priority inputs compared every cycle with a
// reference model of the rules, with mode switches in between.
module tb_ssi_scheduler;
  localparam int T = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [2:0] fg_count;
  logic [T-1:0] thread_ready;
  logic [1:0] thread_prio [T];
  logic issue_valid, swap_valid, mode_switch;
  logic [1:0] issue_tid, issue_slot, swap_out_tid, swap_in_tid;
  logic [T-1:0] fg_mask;

  ssi_scheduler dut (.*);

  int checks = 0, failures = 0;
  int n_swaps = 0, n_bubbles = 0, n_prio_swaps = 0, n_modes = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_issue(input bit v, input int tid, input string what);
    checks++;
    if (issue_valid !== v || (v && issue_tid !== 2'(tid))) begin
      failures++;
      $display("FAIL %s: got v=%0d tid=%0d exp v=%0d tid=%0d", what, issue_valid, issue_tid, v, tid);
    end
  endtask

  // reference model state
  int m_slot [T];
  int m_cur, m_fg;

  task automatic model_reset();
    for (int s = 0; s < T; s++) m_slot[s] = s;
    m_cur = 0; m_fg = 1;
  endtask

  // evaluate the model for the current inputs; returns expected outputs
  task automatic model_step(output bit e_issue, output int e_tid, output bit e_swap, output int e_in);
    int fge, bg, ct;
    bit isfg [T];
    fge = (fg_count == 0) ? 1 : (fg_count > T ? T : int'(fg_count));
    e_issue = 0; e_tid = 0; e_swap = 0; e_in = 0;
    if (fge != m_fg) begin
      for (int s = 0; s < T; s++) m_slot[s] = s;
      m_cur = 0; m_fg = fge;
      e_tid = 0;
      return;
    end
    for (int t = 0; t < T; t++) isfg[t] = 0;
    for (int s = 0; s < m_fg; s++) isfg[m_slot[s]] = 1;
    bg = -1;
    for (int t = 0; t < T; t++)
      if (thread_ready[t] && !isfg[t] && (bg < 0 || thread_prio[t] > thread_prio[bg])) bg = t;
    ct = m_slot[m_cur];
    e_tid = ct;
    if (bg >= 0 && (!thread_ready[ct] || thread_prio[bg] > thread_prio[ct])) begin
      e_swap = 1; e_in = bg; m_slot[m_cur] = bg;
    end else if (thread_ready[ct]) e_issue = 1;
    m_cur = (m_cur + 1 >= m_fg) ? 0 : m_cur + 1;
  endtask

  initial begin
    bit e_issue, e_swap; int e_tid, e_in;
    rst = 1; fg_count = 3'd4; thread_ready = '1;
    for (int t = 0; t < T; t++) thread_prio[t] = 2'd1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    // after reset the registered mode is 1, so the first cycle is a mode switch to 4
    #1 checks++; if (!mode_switch) begin failures++; $display("FAIL no mode switch"); end
    @(negedge clk);
    // static interleaving
    for (int i = 0; i < 8; i++) begin
      #1 expect_issue(1, i % 4, "SI rotation");
      @(negedge clk);
    end
    // SI: thread 2 stalls -> bubble at its turn (no background threads)
    thread_ready[2] = 0;
    for (int i = 0; i < 8; i++) begin
      #1 expect_issue(i % 4 != 2, i % 4, "SI bubble");
      @(negedge clk);
    end
    thread_ready = '1;
    // blocked multithreading
    fg_count = 3'd1; #1 checks++; if (!mode_switch) begin failures++; $display("FAIL mode"); end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin #1 expect_issue(1, 0, "blocked t0"); @(negedge clk); end
    thread_ready[0] = 0;
    #1 expect_issue(0, 0, "blocked swap bubble");
    checks++; if (!(swap_valid && swap_out_tid == 0 && swap_in_tid == 1)) begin failures++; $display("FAIL blocked swap"); end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin #1 expect_issue(1, 1, "blocked t1"); @(negedge clk); end
    thread_ready = '1;
    // SSI with 2 foreground threads: slots hold 0 and 1
    fg_count = 3'd2; @(negedge clk);
    for (int i = 0; i < 4; i++) begin #1 expect_issue(1, i % 2, "SSI rotation"); @(negedge clk); end
    // thread 1 stalls: at slot 1's turn it is swapped with thread 2
    thread_ready[1] = 0;
    #1 expect_issue(1, 0, "SSI slot0"); @(negedge clk);
    #1 expect_issue(0, 1, "SSI swap");
    checks++; if (!(swap_valid && swap_in_tid == 2)) begin failures++; $display("FAIL SSI swap in"); end
    @(negedge clk);
    #1 expect_issue(1, 0, "SSI slot0 b"); @(negedge clk);
    #1 expect_issue(1, 2, "SSI slot1 now t2"); @(negedge clk);
    checks++; if (fg_mask !== 4'b0101) begin failures++; $display("FAIL fg_mask %b", fg_mask); end
    // priority: thread 3 (background, ready) raised above thread 0
    thread_prio[3] = 2'd3;
    #1 expect_issue(0, 0, "prio swap");
    checks++; if (!(swap_valid && swap_in_tid == 3)) begin failures++; $display("FAIL prio swap"); end
    @(negedge clk);
    #1 expect_issue(1, 2, "SSI slot1 t2"); @(negedge clk);
    #1 expect_issue(1, 3, "SSI slot0 t3"); @(negedge clk);

    // random comparison with the model
    rst = 1; @(negedge clk); rst = 0;
    model_reset();
    for (int i = 0; i < 20000; i++) begin
      if (i % 2000 == 0) fg_count = 3'($urandom_range(1, 4));
      thread_ready = 4'($urandom) | 4'($urandom);
      if ($urandom_range(0, 9) == 0) for (int t = 0; t < T; t++) thread_prio[t] = 2'($urandom);
      #1;
      model_step(e_issue, e_tid, e_swap, e_in);
      if (mode_switch) n_modes++;
      if (swap_valid) begin
        n_swaps++;
        if (thread_ready[swap_out_tid]) n_prio_swaps++;
      end
      if (!issue_valid && !mode_switch) n_bubbles++;
      checks++;
      if (issue_valid !== e_issue || swap_valid !== e_swap || (e_issue && issue_tid !== 2'(e_tid))
          || (e_swap && (swap_in_tid !== 2'(e_in) || swap_out_tid !== 2'(e_tid)))) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d: issue %0d/%0d exp %0d/%0d swap %0d exp %0d",
                                    i, issue_valid, issue_tid, e_issue, e_tid, swap_valid, e_swap);
      end
      @(negedge clk);
    end
    $display("swaps=%0d priority_swaps=%0d bubbles=%0d mode_switches=%0d", n_swaps, n_prio_swaps, n_bubbles, n_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
