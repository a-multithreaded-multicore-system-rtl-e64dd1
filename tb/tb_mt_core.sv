// tb_mt_core: self-checking test of the thread-context part of a core, with
// the testbench acting as the VLIW datapath. Every issued instruction of
// thread t advances t's PC by 4 (checked against a per-thread expected PC),
// reads one register of t (checked against a reference register file) and
// writes one register of t at the padded write-back latency: 3 rounded up to
// a multiple of the foreground count, i.e. 4 cycles both in SSI mode with 2
// foreground threads and in SI mode with 4. The test checks that the write-back thread ID
// equals the thread that issued that many cycles before, that stalls and TSU
// blocking take a thread out of issue, that a swap cancels the leaving
// thread's pending write-backs, and that the PC load starts a thread.
module tb_mt_core;
  localparam int T = 4, R = 128, NRD = 15, NWR = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [2:0] fg_count;
  logic [T-1:0] thread_stall, tsu_blocked, fg_mask;
  logic [1:0] thread_prio [T];
  logic pc_load;
  logic [1:0] pc_load_tid, issue_tid, swap_out_tid, swap_in_tid, wb_tid;
  logic [31:0] pc_load_val, issue_pc, next_pc;
  logic issue_valid, swap_valid, mode_switch, wb_valid;
  logic [6:0] rd_addr [NRD];
  logic [31:0] rd_data [NRD];
  logic [NWR-1:0] wr_en;
  logic [6:0] wr_addr [NWR];
  logic [31:0] wr_data [NWR];

  mt_core #(.OP_LAT(3)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_issue = 0, n_swap = 0, n_cancel = 0, n_wb = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model
  logic [31:0] exp_pc [T];
  logic [31:0] ref_rf [T][R];
  bit          ref_ok [T][R];
  int          icount [T];
  // in-flight instructions: due cycle, thread, register, data
  int          fl_due [$];
  int          fl_tid [$];
  int          fl_reg [$];
  logic [31:0] fl_dat [$];
  int          pad;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // combinational part of the datapath: decide this cycle's reads and write-backs
  always @(negedge clk) if (!rst) begin
    #1;
    wr_en = '0;
    next_pc = issue_pc + 32'd4;
    rd_addr[0] = 7'(icount[issue_tid] % 16);
    // write-back of an instruction issued pad cycles ago
    if (fl_due.size() != 0 && fl_due[0] == cyc) begin
      if (wb_valid) begin
        check(wb_tid == 2'(fl_tid[0]), "write-back thread");
        wr_en[0] = 1; wr_addr[0] = 7'(fl_reg[0]); wr_data[0] = fl_dat[0];
        n_wb++;
      end else begin
        check(fl_tid[0] == -1, "only a swapped-out thread's write-back is cancelled");
        n_cancel++;
      end
      void'(fl_due.pop_front()); void'(fl_tid.pop_front()); void'(fl_reg.pop_front()); void'(fl_dat.pop_front());
    end else begin
      check(!wb_valid, "no unexpected write-back");
    end
    #1;
    if (issue_valid) begin
      int t, r;
      t = int'(issue_tid);
      r = int'(rd_addr[0]);
      n_issue++;
      check(!thread_stall[t] && !tsu_blocked[t], "issuing thread is runnable");
      check(issue_pc == exp_pc[t], "issue PC");
      if (ref_ok[t][r]) check(rd_data[0] == ref_rf[t][r], "operand read");
      exp_pc[t] += 4;
      fl_due.push_back(cyc + pad); fl_tid.push_back(t);
      fl_reg.push_back(icount[t] % 16); fl_dat.push_back({8'(t), 24'(icount[t])});
      icount[t]++;
    end
    if (swap_valid) begin
      n_swap++;
      // a swapped-out thread loses its in-flight write-backs
      for (int i = 0; i < fl_tid.size(); i++) if (fl_tid[i] == int'(swap_out_tid)) fl_tid[i] = -1;
    end
  end
  always @(posedge clk) if (!rst) begin
    cyc++;
    for (int p = 0; p < NWR; p++) if (wr_en[p]) begin
      ref_rf[wb_tid][wr_addr[p]] = wr_data[p];
      ref_ok[wb_tid][wr_addr[p]] = 1;
    end
  end

  initial begin
    rst = 1; fg_count = 3'd2; thread_stall = '0; tsu_blocked = '0; pc_load = 0;
    pc_load_tid = 0; pc_load_val = 0; next_pc = 0; wr_en = '0;
    for (int t = 0; t < T; t++) begin thread_prio[t] = 2'd1; icount[t] = 0; exp_pc[t] = 0; end
    for (int t = 0; t < T; t++) for (int r = 0; r < R; r++) ref_ok[t][r] = 0;
    for (int p = 0; p < NRD; p++) rd_addr[p] = '0;
    for (int p = 0; p < NWR; p++) begin wr_addr[p] = '0; wr_data[p] = '0; end
    pad = 4;
    repeat (3) @(negedge clk);
    rst = 0;
    // start all threads at their own code address; hold them until loaded
    thread_stall = '1;
    for (int t = 0; t < T; t++) begin
      pc_load = 1; pc_load_tid = 2'(t); pc_load_val = 32'h1000 * (t + 1); exp_pc[t] = pc_load_val;
      @(negedge clk);
    end
    pc_load = 0;
    repeat (4) @(negedge clk);
    check(fl_due.size() == 0, "nothing issued while stalled");
    thread_stall = '0;
    // SSI: slots 0 and 1 alternate; with all ready only threads 0 and 1 issue
    repeat (40) @(negedge clk);
    check(icount[0] >= 19 && icount[1] >= 19 && icount[2] == 0 && icount[3] == 0, "SSI: two foreground threads");
    // thread 1 blocked on the TSU: thread 2 takes its slot
    tsu_blocked[1] = 1;
    repeat (40) @(negedge clk);
    check(icount[2] >= 18 && fg_mask[2] && !fg_mask[1], "blocked thread swapped for a background thread");
    // thread 0 misses in the cache: thread 3 takes over
    thread_stall[0] = 1;
    repeat (40) @(negedge clk);
    check(icount[3] >= 18, "stalled thread swapped");
    thread_stall = '0; tsu_blocked = '0;
    // random stalls
    for (int i = 0; i < 3000; i++) begin
      thread_stall = 4'($urandom) & 4'($urandom);
      tsu_blocked = ($urandom_range(0, 7) == 0) ? 4'($urandom) : '0;
      @(negedge clk);
    end
    thread_stall = '0; tsu_blocked = '0;
    // SI mode: pipeline drained first, then latency padded to 4
    thread_stall = '1; repeat (6) @(negedge clk);
    fg_count = 3'd4;
    @(negedge clk); thread_stall = '0;
    repeat (2000) begin
      @(negedge clk);
      thread_stall = ($urandom_range(0, 3) == 0) ? 4'($urandom) : '0;
    end
    thread_stall = '1; repeat (8) @(negedge clk);
    $display("issued=%0d swaps=%0d writebacks=%0d cancelled=%0d", n_issue, n_swap, n_wb, n_cancel);
    check(n_swap > 0 && n_cancel > 0 && n_wb > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
