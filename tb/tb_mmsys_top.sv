// tb_mmsys_top: end-to-end test of the whole system at its default size
// (16 cores x 4 threads, 64 KB caches, 16-entry task queues) running a
// parallel macroblock-decoding wavefront.
//
// The testbench plays the software and the parts outside the RTL: each of
// the 64 hardware threads is a process that takes tasks from the TSU, loads
// the task's entry point into its PC, "decodes" a macroblock by being issued
// WORK times by its core (a datapath model writes and reads the thread's
// registers at the padded write-back latency and checks them), reads the
// results of the macroblocks it depends on and writes its own result through
// its data cache, and then, under a lock of the synchronization unit,
// atomically decrements the reference counters (kept in shared memory, so
// in the caches) of the two macroblocks that depend on it. A macroblock
// whose counter reaches zero is submitted as a new task. The dependences are
// the decoding ones: (x,y) waits for (x-1,y) and (x+1,y-1).
// Frame 0 uses the tail-submit code (one ready successor is processed
// directly, a second one is submitted) on cores with 2 foreground threads;
// frame 1 uses the plain code (every ready successor is submitted) with all
// 4 threads in the foreground. Before frame 0, extra tasks overfill core 0's
// queue so that the near-full / near-empty interrupts and the spill/restore
// handler run.
//
// Checked: every macroblock decoded exactly once and only after its
// dependences; the values read through the caches are the ones written;
// the counters end at zero; PCs and register contents follow each thread.
// Each mechanism (thread swap, priority swap, mode switch, write-back
// cancelled by a swap, task steal, thread block, most-blocked wake-up,
// both interrupts, cache miss, write-back, cache-to-cache transfer, upgrade,
// hit under miss, lock refused) is counted and must occur at least once.
module tb_mmsys_top;
  import mmsys_pkg::*;
  localparam int C = 16, T = 4, NRD = 15, NWR = 5;
  localparam int FW = 8, FH = 6;            // frame size in macroblocks
  localparam int WORK = 6;                  // instructions per macroblock
  localparam int NDUMMY = 15;
  localparam int WD_CYCLES = 60000;               // tasks that overfill queue 0
  localparam logic [31:0] RC_BASE  = 32'h0001_0000;  // reference counters, per frame 0x1000
  localparam logic [31:0] PIX_BASE = 32'h0010_0000;  // one line per macroblock
  localparam logic [31:0] TAB_BASE = 32'h0000_2000;  // table read by the extra tasks
  localparam logic [31:0] DECODE_FN = 32'h0000_4000;
  localparam logic [31:0] DUMMY_FN  = 32'h0000_8000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;

  // ------------------------------------------------------------------ DUT
  logic [2:0] fg_count;
  logic [T-1:0] thread_stall [C];
  logic [1:0] thread_prio [C][T];
  logic [C-1:0] pc_load;
  logic [1:0] pc_load_tid [C];
  logic [31:0] pc_load_val [C];
  logic [C-1:0] issue_valid, swap_valid, mode_switch, wb_valid;
  logic [1:0] issue_tid [C], swap_out_tid [C], swap_in_tid [C], wb_tid [C];
  logic [31:0] issue_pc [C], next_pc [C];
  logic [T-1:0] fg_mask [C];
  logic [6:0] rd_addr [C][NRD];
  logic [31:0] rd_data [C][NRD];
  logic [NWR-1:0] wr_en [C];
  logic [6:0] wr_addr [C][NWR];
  logic [31:0] wr_data [C][NWR];
  logic [C-1:0] tsu_req_valid, tsu_req_ready, tsu_resp_valid, tsu_irq_full, tsu_irq_empty;
  tsu_op_e tsu_req_op [C];
  logic [1:0] tsu_req_tid [C], tsu_resp_tid [C];
  task_t tsu_req_task [C], tsu_resp_task [C];
  tsu_status_e tsu_resp_status [C];
  logic [T-1:0] tsu_blocked [C];
  logic [4:0] tsu_q_count [C];
  logic [C-1:0] sync_req_valid, sync_req_ready, sync_resp_valid, sync_resp_granted;
  sync_op_e sync_req_op [C];
  logic [1:0] sync_req_tid [C], sync_resp_tid [C];
  logic [5:0] sync_req_lock [C];
  logic [63:0] sync_lock_held;
  logic [C-1:0] dc_req, dc_we, dc_ready, dc_miss_valid;
  logic [31:0] dc_addr [C], dc_wdata [C], dc_rdata [C];
  logic [3:0] dc_be [C];
  logic [1:0] dc_tid [C], dc_miss_tid [C];
  logic mem_req, mem_we, mem_ack;
  logic [LADDR_W-1:0] mem_addr;
  logic [LINE_W-1:0] mem_wdata, mem_rdata;

  mmsys_top dut (.*);
  shared_mem_model u_mem (.*);

  int checks = 0, failures = 0, cyc = 0;
  // per-core port ownership among the threads of a core, and the last step of each thread
  localparam int P_TSU = 0, P_DC = 1, P_SYNC = 2, P_PC = 3;
  bit busy [4][C];
  int phase [C][T];
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (WD_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d: decoded %0d/%0d, extra tasks done %0d", cyc, n_decoded[0], n_decoded[1], n_dummy_done);
    $display("bus: state %0d req %b mem_req %b mem_ack %b", dut.u_bus.bs_q, dut.bus_req, mem_req, mem_ack);
    $display("cache 0: ms %0d fill_req %b wb_req %b  cache 1: ms %0d fill_req %b wb_req %b",
             dut.g_dc[0].u_dc.ms_q, dut.g_dc[0].u_dc.fill_req_q, dut.g_dc[0].u_dc.wb_req_q,
             dut.g_dc[1].u_dc.ms_q, dut.g_dc[1].u_dc.fill_req_q, dut.g_dc[1].u_dc.wb_req_q);
    for (int c = 0; c < C; c++)
      $display("core %0d: phases %0d %0d %0d %0d blocked %b stall %b miss %b/%0d busy %0d%0d%0d%0d icount %0d %0d %0d %0d", c,
               phase[c][0], phase[c][1], phase[c][2], phase[c][3], tsu_blocked[c], thread_stall[c],
               dc_miss_valid[c], dc_miss_tid[c], busy[0][c], busy[1][c], busy[2][c], busy[3][c],
               icount[c][0], icount[c][1], icount[c][2], icount[c][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_swap = 0, n_prio_swap = 0, n_mode = 0, n_cancel = 0, n_issue = 0;
  int n_steal = 0, n_block = 0, n_wake = 0, n_irq_full = 0, n_irq_empty = 0, n_spill = 0, n_restore = 0;
  int n_miss = 0, n_wb = 0, n_c2c = 0, n_upgr = 0, n_hum = 0, n_refused = 0;
  logic [C-1:0] irqf_q = '0, irqe_q = '0, miss_q = '0;
  logic [T-1:0] blk_q [C];
  always @(negedge clk) if (!rst) begin
    for (int c = 0; c < C; c++) begin
      if (swap_valid[c]) begin
        n_swap++;
        if (!thread_stall[c][swap_out_tid[c]] && !tsu_blocked[c][swap_out_tid[c]] &&
            !(dc_miss_valid[c] && dc_miss_tid[c] == swap_out_tid[c])) n_prio_swap++;
      end
      if (mode_switch[c]) n_mode++;
      if (tsu_irq_full[c] && !irqf_q[c]) n_irq_full++;
      if (tsu_irq_empty[c] && !irqe_q[c]) n_irq_empty++;
      if (dc_miss_valid[c] && !miss_q[c]) n_miss++;
      if (dc_ready[c] && dc_miss_valid[c]) n_hum++;
      if (sync_resp_valid[c] && !sync_resp_granted[c]) n_refused++;
      for (int t = 0; t < T; t++) if (tsu_blocked[c][t] && !blk_q[c][t]) n_block++;
      blk_q[c] = tsu_blocked[c];
      if (dut.bus_gnt[c] && dut.bus_op[c] == BUS_WB) n_wb++;
      if (dut.bus_gnt[c] && dut.bus_op[c] == BUS_UPGR) n_upgr++;
      if (dut.snoop_valid[c] && dut.snoop_dirty[c]) n_c2c++;
    end
    irqf_q = tsu_irq_full; irqe_q = tsu_irq_empty; miss_q = dc_miss_valid;
  end

  // ------------------------------------------------------- datapath models
  int icount [C][T];
  logic [31:0] exp_pc [C][T];
  logic [31:0] ref_rf [C][T][16];
  bit ref_ok [C][T][16];
  int pad;
  for (genvar gc = 0; gc < C; gc++) begin : g_dp
    int fl_due [$];
    int fl_tid [$];
    int fl_reg [$];
    logic [31:0] fl_dat [$];
    always @(negedge clk) if (!rst) begin
      #1;
      wr_en[gc] = '0;
      next_pc[gc] = issue_pc[gc] + 32'd4;
      rd_addr[gc][0] = 7'(icount[gc][issue_tid[gc]] % 16);
      if (fl_due.size() != 0 && fl_due[0] == cyc) begin
        if (wb_valid[gc]) begin
          check(wb_tid[gc] == 2'(fl_tid[0]), "write-back thread");
          wr_en[gc][0] = 1; wr_addr[gc][0] = 7'(fl_reg[0]); wr_data[gc][0] = fl_dat[0];
        end else begin
          check(fl_tid[0] == -1, "only a swapped-out thread loses its write-back");
          n_cancel++;
        end
        void'(fl_due.pop_front()); void'(fl_tid.pop_front()); void'(fl_reg.pop_front()); void'(fl_dat.pop_front());
      end else check(!wb_valid[gc], "no unexpected write-back");
      #1;
      if (issue_valid[gc]) begin
        int t, r;
        t = int'(issue_tid[gc]);
        r = int'(rd_addr[gc][0]);
        n_issue++;
        check(issue_pc[gc] == exp_pc[gc][t], "issue PC");
        if (ref_ok[gc][t][r]) check(rd_data[gc][0] == ref_rf[gc][t][r], "register read");
        exp_pc[gc][t] += 4;
        fl_due.push_back(cyc + pad); fl_tid.push_back(t);
        fl_reg.push_back(icount[gc][t] % 16); fl_dat.push_back({4'(gc), 4'(t), 24'(icount[gc][t])});
        icount[gc][t]++;
      end
      if (swap_valid[gc])
        for (int i = 0; i < fl_tid.size(); i++) if (fl_tid[i] == int'(swap_out_tid[gc])) fl_tid[i] = -1;
    end
    always @(posedge clk) if (!rst) begin
      if (wr_en[gc][0]) begin
        ref_rf[gc][wb_tid[gc]][wr_addr[gc][0][3:0]] = wr_data[gc][0];
        ref_ok[gc][wb_tid[gc]][wr_addr[gc][0][3:0]] = 1;
      end
    end
  end

  // ------------------------------------------------------ per-core port locks

  task automatic grab(input int p, input int c);
    while (busy[p][c]) @(negedge clk);
    busy[p][c] = 1;
  endtask

  // TSU responses per thread
  bit resp_have [C][T];
  task_t resp_task_q [C][T];
  tsu_status_e resp_st_q [C][T];
  always @(negedge clk) if (!rst) for (int c = 0; c < C; c++) if (tsu_resp_valid[c]) begin
    resp_have[c][tsu_resp_tid[c]] = 1;
    resp_task_q[c][tsu_resp_tid[c]] = tsu_resp_task[c];
    resp_st_q[c][tsu_resp_tid[c]] = tsu_resp_status[c];
    if (tsu_resp_status[c] == TSU_R_STOLEN) n_steal++;
    if (tsu_resp_status[c] == TSU_R_WOKEN) n_wake++;
  end

  task automatic tsu_do(input int c, input int t, input tsu_op_e op, input task_t tk, output task_t got);
    phase[c][t] = 10 + int'(op);
    grab(P_TSU, c);
    @(negedge clk);
    resp_have[c][t] = 0;
    tsu_req_valid[c] = 1; tsu_req_op[c] = op; tsu_req_tid[c] = 2'(t); tsu_req_task[c] = tk;
    forever begin #1; if (tsu_req_ready[c]) break; @(negedge clk); end
    @(negedge clk);
    tsu_req_valid[c] = 0;
    busy[P_TSU][c] = 0;
    got = '0;
    if (op == TSU_GET || op == TSU_SPILL) begin
      while (!resp_have[c][t]) @(negedge clk);
      got = resp_task_q[c][t];
    end
  endtask

  // data cache access of thread t; on a miss the port is given up while the line comes
  task automatic dc_do(input int c, input int t, input bit we, input logic [31:0] a, input logic [31:0] d,
                       output logic [31:0] rd);
    forever begin
      bit ok;
      phase[c][t] = we ? 21 : 20;
      grab(P_DC, c);
      @(negedge clk);
      dc_req[c] = 1; dc_we[c] = we; dc_addr[c] = a; dc_wdata[c] = d; dc_be[c] = 4'hF; dc_tid[c] = 2'(t);
      #1 ok = dc_ready[c];
      rd = dc_rdata[c];
      @(posedge clk);
      #1 dc_req[c] = 0;
      busy[P_DC][c] = 0;
      if (ok) return;
      @(negedge clk);
      phase[c][t] = 22;
      while (dc_miss_valid[c] && dc_miss_tid[c] == 2'(t)) @(negedge clk);
    end
  endtask

  task automatic lock_do(input int c, input int t, input sync_op_e op, input int l, output bit granted);
    phase[c][t] = 30 + int'(op);
    grab(P_SYNC, c);
    @(negedge clk);
    sync_req_valid[c] = 1; sync_req_op[c] = op; sync_req_tid[c] = 2'(t); sync_req_lock[c] = 6'(l);
    forever begin #1; if (sync_req_ready[c]) break; @(negedge clk); end
    @(negedge clk);
    sync_req_valid[c] = 0;
    granted = sync_resp_granted[c];
    busy[P_SYNC][c] = 0;
  endtask

  task automatic run_work(input int c, input int t, input logic [31:0] entry);
    int target;
    phase[c][t] = 40;
    grab(P_PC, c);
    @(negedge clk);
    pc_load[c] = 1; pc_load_tid[c] = 2'(t); pc_load_val[c] = entry;
    @(negedge clk);
    pc_load[c] = 0;
    exp_pc[c][t] = entry;
    busy[P_PC][c] = 0;
    thread_prio[c][t] = 2'($urandom_range(1, 2));
    target = icount[c][t] + WORK;
    thread_stall[c][t] = 0;
    phase[c][t] = 41;
    while (icount[c][t] < target) @(negedge clk);
    thread_stall[c][t] = 1;
  endtask

  // ------------------------------------------------------------ the workload
  int frame_code [2] = '{1, 0};             // 1: tail submits, 0: plain
  bit done [2][FW][FH];
  int n_decoded [2];
  int cur_frame = 0;
  int n_dummy_done = 0;
  task_t overflow [C][$];
  bit start = 0, start_rest = 0;

  function automatic task_t mb_task(input int f, input int x, input int y);
    return '{func: DECODE_FN, arg: {8'(f), 8'(x), 8'(y), 8'h00}};
  endfunction
  function automatic logic [31:0] rc_addr(input int f, input int x, input int y);
    return RC_BASE + 32'(f) * 32'h1000 + 32'((y * FW + x) * 4);
  endfunction
  function automatic logic [31:0] pix_addr(input int f, input int x, input int y);
    // 16 KB apart: all results share one cache set, so lines are evicted
    return PIX_BASE + 32'(f) * 32'h100 + 32'((y * FW + x) * 32'h4000);
  endfunction
  function automatic logic [31:0] pix_val(input int f, input int x, input int y);
    return {8'hA0 + 8'(f), 8'(x), 8'(y), 8'h5A};
  endfunction

  // atomic decrement of the counter of (x,y); returns 1 if it became ready
  task automatic atomic_dec(input int c, input int t, input int f, input int x, input int y, output bit ready);
    bit g;
    logic [31:0] v, dummy;
    int l;
    l = (f * FW * FH + y * FW + x) % 64;
    do lock_do(c, t, SYNC_ACQUIRE, l, g); while (!g);
    dc_do(c, t, 0, rc_addr(f, x, y), 0, v);
    check(v != 0 && v <= 2, "reference counter in range");
    dc_do(c, t, 1, rc_addr(f, x, y), v - 1, dummy);
    lock_do(c, t, SYNC_RELEASE, l, g);
    check(g, "lock released by its owner");
    ready = (v == 1);
  endtask

  task automatic decode_mb(input int c, input int t, input int f, input int x, input int y);
    logic [31:0] v, dummy;
    check(!done[f][x][y], "macroblock decoded once");
    if (x > 0) check(done[f][x-1][y], "left neighbour done first");
    if (y > 0 && x + 1 < FW) check(done[f][x+1][y-1], "upper-right neighbour done first");
    run_work(c, t, DECODE_FN + 32'((y * FW + x) * 256));
    if (x > 0) begin
      dc_do(c, t, 0, pix_addr(f, x - 1, y), 0, v);
      check(v == pix_val(f, x - 1, y), "left result through the caches");
    end
    if (y > 0 && x + 1 < FW) begin
      dc_do(c, t, 0, pix_addr(f, x + 1, y - 1), 0, v);
      check(v == pix_val(f, x + 1, y - 1), "upper-right result through the caches");
    end
    dc_do(c, t, 1, pix_addr(f, x, y), pix_val(f, x, y), dummy);
    done[f][x][y] = 1;
    n_decoded[f]++;
  endtask

  task automatic handle_irq(input int c, input int t);
    task_t got;
    while (tsu_irq_full[c]) begin
      tsu_do(c, t, TSU_SPILL, '0, got);
      if (got != '0) begin overflow[c].push_back(got); n_spill++; end
    end
  endtask

  // near-empty interrupt handler of each core: it also runs when all the
  // core's threads are blocked, so restores do not need a response
  for (genvar gc = 0; gc < C; gc++) begin : g_irq
    initial begin
      task_t dummy;
      wait (start);
      forever begin
        @(negedge clk);
        if (tsu_irq_empty[gc] && overflow[gc].size() != 0) begin
          tsu_do(gc, 0, TSU_RESTORE, overflow[gc].pop_back(), dummy);
          n_restore++;
        end
      end
    end
  end

  task automatic thread_main(input int c, input int t);
    task_t tk, dummy;
    // core 0 starts alone, so its four threads share the extra tasks
    if (c == 0) wait (start); else wait (start_rest);
    forever begin
      handle_irq(c, t);
      tsu_do(c, t, TSU_GET, '0, tk);
      if (tk.func == DUMMY_FN) begin
        logic [31:0] v;
        run_work(c, t, DUMMY_FN);
        for (int i = 0; i < 4; i++) begin
          logic [31:0] a;
          a = TAB_BASE + 32'($urandom_range(0, 255) * 4);
          dc_do(c, t, 0, a, 0, v);
          check(v == {a[29:6], 4'h0, a[5:2]}, "table word through the cache");
        end
        run_work(c, t, DUMMY_FN + 32'h100);
        n_dummy_done++;
      end else begin
        int f, x, y;
        bit r1, r2;
        f = int'(tk.arg[31:24]); x = int'(tk.arg[23:16]); y = int'(tk.arg[15:8]);
        forever begin
          decode_mb(c, t, f, x, y);
          r1 = 0; r2 = 0;
          if (x + 1 < FW) atomic_dec(c, t, f, x + 1, y, r1);
          if (x > 0 && y + 1 < FH) atomic_dec(c, t, f, x - 1, y + 1, r2);
          if (frame_code[f] == 1) begin
            // tail submits: continue with a ready successor, submit the other
            if (r1 && r2) begin tsu_do(c, t, TSU_SUBMIT, mb_task(f, x - 1, y + 1), dummy); x += 1; end
            else if (r1) x += 1;
            else if (r2) begin x -= 1; y += 1; end
            else break;
          end else begin
            if (r1) tsu_do(c, t, TSU_SUBMIT, mb_task(f, x + 1, y), dummy);
            if (r2) tsu_do(c, t, TSU_SUBMIT, mb_task(f, x - 1, y + 1), dummy);
            break;
          end
        end
      end
    end
  endtask

  for (genvar gc = 0; gc < C; gc++) begin : g_core
    for (genvar gt = 0; gt < T; gt++) begin : g_thr
      initial thread_main(gc, gt);
    end
  end

  // preload the reference counters: (x,y) waits for (x-1,y) and (x+1,y-1)
  task automatic preload(input int f);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        logic [31:0] a;
        int n;
        a = rc_addr(f, x, y);
        n = (x > 0 ? 1 : 0) + ((y > 0 && x + 1 < FW) ? 1 : 0);
        if (!u_mem.lines.exists(int'(a >> 6))) u_mem.lines[int'(a >> 6)] = '0;
        u_mem.lines[int'(a >> 6)][a[5:2]*32 +: 32] = 32'(n);
      end
  endtask

  initial begin
    task_t dummy;
    rst = 1; fg_count = 3'd2; pad = 2;
    tsu_req_valid = '0; sync_req_valid = '0; dc_req = '0; dc_we = '0; pc_load = '0;
    for (int c = 0; c < C; c++) begin
      thread_stall[c] = '1; blk_q[c] = '0;
      tsu_req_op[c] = TSU_GET; tsu_req_tid[c] = 0; tsu_req_task[c] = '0;
      sync_req_op[c] = SYNC_NOP; sync_req_tid[c] = 0; sync_req_lock[c] = 0;
      dc_addr[c] = 0; dc_wdata[c] = 0; dc_be[c] = 0; dc_tid[c] = 0;
      pc_load_tid[c] = 0; pc_load_val[c] = 0; next_pc[c] = 0; wr_en[c] = '0;
      for (int p = 0; p < NRD; p++) rd_addr[c][p] = 0;
      for (int p = 0; p < NWR; p++) begin wr_addr[c][p] = 0; wr_data[c][p] = 0; end
      busy[P_TSU][c] = 0; busy[P_DC][c] = 0; busy[P_SYNC][c] = 0; busy[P_PC][c] = 0;
      for (int t = 0; t < T; t++) begin
        thread_prio[c][t] = 2'd1; icount[c][t] = 0; exp_pc[c][t] = 0; resp_have[c][t] = 0;
        for (int r = 0; r < 16; r++) ref_ok[c][t][r] = 0;
      end
    end
    n_decoded[0] = 0; n_decoded[1] = 0;
    preload(0); preload(1);
    repeat (3) @(negedge clk);
    rst = 0;
    // overfill queue 0 before the threads start
    for (int i = 0; i < NDUMMY; i++) tsu_do(0, 0, TSU_SUBMIT, '{func: DUMMY_FN, arg: 32'(i)}, dummy);
    check(tsu_irq_full[0], "queue 0 near full");
    // frame 0: tail-submit code, SSI with 2 foreground threads
    tsu_do(0, 0, TSU_SUBMIT, mb_task(0, 0, 0), dummy);
    start = 1;
    repeat (300) @(negedge clk);
    start_rest = 1;
    wait (n_decoded[0] == FW * FH && n_dummy_done == NDUMMY);
    $display("frame 0 done at cycle %0d", cyc);
    // let everything settle: all threads end up blocked on the TSU
    repeat (200) @(negedge clk);
    // frame 1: plain code, static interleaving over all 4 threads
    fg_count = 3'd4; pad = 4;
    repeat (2) @(negedge clk);
    cur_frame = 1;
    tsu_do(0, 0, TSU_SUBMIT, mb_task(1, 0, 0), dummy);
    wait (n_decoded[1] == FW * FH);
    $display("frame 1 done at cycle %0d", cyc);
    repeat (20) @(negedge clk);
    // all counters must be zero: read them back through core 5's cache
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < FH; y++)
        for (int x = 0; x < FW; x++) begin
          logic [31:0] v;
          if (x == 0 && y == 0) continue;
          dc_do(5, 0, 0, rc_addr(f, x, y), 0, v);
          check(v == 0, "reference counter reached zero");
        end
    $display("issued=%0d swaps=%0d priority_swaps=%0d mode_switches=%0d cancelled_writebacks=%0d",
             n_issue, n_swap, n_prio_swap, n_mode, n_cancel);
    $display("steals=%0d blocks=%0d wakes=%0d irq_full=%0d irq_empty=%0d spills=%0d restores=%0d",
             n_steal, n_block, n_wake, n_irq_full, n_irq_empty, n_spill, n_restore);
    $display("cache misses=%0d writebacks=%0d cache_to_cache=%0d upgrades=%0d hit_under_miss=%0d locks_refused=%0d",
             n_miss, n_wb, n_c2c, n_upgr, n_hum, n_refused);
    check(n_swap > 0, "thread swap happened");
    check(n_prio_swap > 0, "priority swap happened");
    check(n_mode > 0, "mode switch happened");
    check(n_steal > 0, "task steal happened");
    check(n_block > 0, "thread blocked on the TSU");
    check(n_wake > 0, "blocked thread woken most-blocked-first");
    check(n_irq_full > 0 && n_spill > 0, "near-full interrupt and spill");
    check(n_irq_empty > 0 && n_restore > 0, "near-empty interrupt and restore");
    check(n_miss > 0, "cache miss");
    check(n_wb > 0, "dirty write-back");
    check(n_c2c > 0, "cache-to-cache transfer");
    check(n_upgr > 0, "upgrade");
    check(n_refused > 0, "lock refused");
    check(n_hum > 0, "hit under miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
