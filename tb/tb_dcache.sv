// tb_dcache: self-checking test of the data cache at its default size
// (64 KB, 64-byte lines, 4 ways), two caches on the coherent bus with a
// 40-cycle shared memory model.
// Directed: a load miss takes the memory latency and leaves the line
// Exclusive; the reload hits in one cycle with the right word; a store to an
// Exclusive line hits; a load of that line by the other cache is supplied
// from the dirty copy and leaves both Shared; a store to a Shared line
// upgrades and invalidates the other copy; five lines of one set force a
// dirty eviction. Random: both caches load and store over a small set of
// conflicting lines; every load must return the last value stored anywhere.
// Accesses are driven at the falling edge and held until cpu_ready; some load
// misses are given up (the thread switched away), which lets other threads'
// hits run under the outstanding miss, and a completed store miss is always
// replayed, as the cache requires.
module tb_dcache;
  import mmsys_pkg::*;
  localparam int N = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst;

  // CPU ports
  logic [N-1:0] cpu_req, cpu_we, cpu_ready, miss_valid;
  logic [31:0] cpu_addr [N], cpu_wdata [N], cpu_rdata [N];
  logic [3:0] cpu_be [N];
  logic [1:0] cpu_tid [N], miss_tid [N];
  // bus wiring
  logic [N-1:0] bus_req, bus_gnt, bus_done, snoop_valid, snoop_hit, snoop_dirty;
  bus_op_e bus_op [N], snoop_op;
  logic [LADDR_W-1:0] bus_addr [N], snoop_addr, mem_addr;
  logic [LINE_W-1:0] bus_wdata [N], snoop_data [N], bus_rdata, mem_wdata, mem_rdata;
  logic bus_shared, mem_req, mem_we, mem_ack;

  for (genvar i = 0; i < N; i++) begin : g_c
    dcache u_dc (
      .clk, .rst,
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]), .cpu_wdata(cpu_wdata[i]),
      .cpu_be(cpu_be[i]), .cpu_tid(cpu_tid[i]), .cpu_ready(cpu_ready[i]), .cpu_rdata(cpu_rdata[i]),
      .miss_valid(miss_valid[i]), .miss_tid(miss_tid[i]),
      .bus_req(bus_req[i]), .bus_op(bus_op[i]), .bus_addr(bus_addr[i]), .bus_wdata(bus_wdata[i]),
      .bus_gnt(bus_gnt[i]), .bus_done(bus_done[i]), .bus_rdata, .bus_shared,
      .snoop_valid(snoop_valid[i]), .snoop_op, .snoop_addr,
      .snoop_hit(snoop_hit[i]), .snoop_dirty(snoop_dirty[i]), .snoop_data(snoop_data[i])
    );
  end
  coh_bus #(.NUM_CACHES(N)) u_bus (.*);
  shared_mem_model u_mem (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_c2c = 0, n_upgr = 0, n_hum = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: hits=%0d misses=%0d req=%b ready=%b miss=%b ms0=%0d ms1=%0d bs=%0d memreq=%0d cnt=%0d ack=%0d", n_hit, n_miss, cpu_req, cpu_ready, miss_valid,
             g_c[0].u_dc.ms_q, g_c[1].u_dc.ms_q, u_bus.bs_q, mem_req, u_mem.cnt, mem_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference memory (word address -> value); unwritten words follow the model's pattern
  logic [31:0] ref_mem [int];
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    if (ref_mem.exists(int'(a >> 2))) return ref_mem[int'(a >> 2)];
    return {a[29:6], 8'(a[5:2])};
  endfunction

  // event counters
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) if (bus_gnt[i]) begin
      if (bus_op[i] == BUS_WB) n_wb++;
      if (bus_op[i] == BUS_UPGR) n_upgr++;
    end
    for (int i = 0; i < N; i++) if (snoop_valid[i] && snoop_dirty[i]) n_c2c++;
    for (int i = 0; i < N; i++) if (cpu_ready[i] && miss_valid[i]) n_hum++;
  end

  // one access from cache i, retried until it completes; returns cycles taken
  task automatic access(input int i, input bit we, input logic [31:0] a, input logic [31:0] d,
                        output logic [31:0] rd, output int cycles, input bit may_abort = 0);
    int t0;
    @(negedge clk);
    cpu_req[i] = 1; cpu_we[i] = we; cpu_addr[i] = a; cpu_wdata[i] = d; cpu_be[i] = 4'hF;
    cpu_tid[i] = 2'($urandom);
    t0 = cyc;
    forever begin
      #1;
      if (cpu_ready[i]) break;
      if (may_abort && !we) begin
        // the thread is switched out on its load miss and gives the load up;
        // another thread uses the cache meanwhile
        @(posedge clk);
        #1 cpu_req[i] = 0;
        cycles = -1;
        return;
      end
      @(negedge clk);
    end
    rd = cpu_rdata[i];
    cycles = cyc - t0;
    if (cycles == 0) n_hit++; else n_miss++;
    checks++;
    if (!we && rd != ref_rd(a)) begin
      failures++;
      if (failures < 10) $display("FAIL cache %0d load %h got %h exp %h (cycle %0d)", i, a, rd, ref_rd(a), cyc);
    end
    @(posedge clk);
    if (we) ref_mem[int'(a >> 2)] = d;
    #1 cpu_req[i] = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic mesi_e state_of(input int i, input logic [31:0] a);
    // peek at the line state through the hierarchy (tag compare done here)
    mesi_e s;
    s = MESI_I;
    for (int w = 0; w < 4; w++) begin
      case (i)
        0: if (g_c[0].u_dc.st_q[a[13:6]][w] != MESI_I && g_c[0].u_dc.tag_q[a[13:6]][w] == a[31:14]) s = g_c[0].u_dc.st_q[a[13:6]][w];
        default: if (g_c[1].u_dc.st_q[a[13:6]][w] != MESI_I && g_c[1].u_dc.tag_q[a[13:6]][w] == a[31:14]) s = g_c[1].u_dc.st_q[a[13:6]][w];
      endcase
    end
    return s;
  endfunction

  bit rdone [N];
  task automatic rand_loop(input int i, input int n);
    logic [31:0] rd; int cy;
    for (int k = 0; k < n; k++) begin
      logic [31:0] a;
      // 6 tags in set 3 (more than the 4 ways) and 2 tags in set 9
      a = ($urandom_range(0, 3) != 0) ? {18'($urandom_range(1, 6)), 8'd3, 4'($urandom), 2'b00}
                                      : {18'($urandom_range(1, 2)), 8'd9, 4'($urandom), 2'b00};
      access(i, ($urandom_range(0, 2) == 0), a, $urandom, rd, cy, ($urandom_range(0, 3) == 0));
    end
    rdone[i] = 1;
  endtask

  initial begin
    logic [31:0] rd; int cy;
    rst = 1; cpu_req = '0; cpu_we = '0;
    for (int i = 0; i < N; i++) begin cpu_addr[i] = 0; cpu_wdata[i] = 0; cpu_be[i] = 0; cpu_tid[i] = 0; rdone[i] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    // load miss
    access(0, 0, 32'h0001_0040, 0, rd, cy);
    $display("load miss took %0d cycles", cy);
    check(cy >= 40 && cy <= 46, "load miss latency: 40-cycle reload plus bus overhead");
    check(state_of(0, 32'h0001_0040) == MESI_E, "exclusive after private read");
    access(0, 0, 32'h0001_0044, 0, rd, cy);
    check(cy == 0, "hit in the same cycle");
    access(0, 1, 32'h0001_0048, 32'h1234_5678, rd, cy);
    check(cy == 0 && state_of(0, 32'h0001_0040) == MESI_M, "store hit on E, line Modified");
    access(1, 0, 32'h0001_0048, 0, rd, cy);
    check(rd == 32'h1234_5678, "other cache reads the dirty word");
    check(state_of(0, 32'h0001_0040) == MESI_S && state_of(1, 32'h0001_0040) == MESI_S, "both Shared");
    access(1, 1, 32'h0001_004C, 32'hCAFE_F00D, rd, cy);
    check(state_of(1, 32'h0001_0040) == MESI_M && state_of(0, 32'h0001_0040) == MESI_I, "upgrade invalidates");
    access(0, 0, 32'h0001_004C, 0, rd, cy);
    check(rd == 32'hCAFE_F00D, "read after invalidation");
    // dirty eviction: 5 lines of set 5, all written
    for (int k = 0; k < 5; k++) access(0, 1, {18'(k + 1), 8'd5, 6'd0}, 32'(k), rd, cy);
    check(n_wb >= 1, "dirty victim written back");
    for (int k = 0; k < 5; k++) access(0, 0, {18'(k + 1), 8'd5, 6'd0}, 0, rd, cy);
    // random coherence traffic
    fork
      rand_loop(0, 3000);
      rand_loop(1, 3000);
    join
    $display("hits=%0d misses=%0d writebacks=%0d cache_to_cache=%0d upgrades=%0d hit_under_miss=%0d",
             n_hit, n_miss, n_wb, n_c2c, n_upgr, n_hum);
    check(n_wb > 0 && n_c2c > 0 && n_upgr > 0 && n_hum > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
