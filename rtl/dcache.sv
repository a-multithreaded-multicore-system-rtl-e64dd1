// dcache: per-core L1 data cache, write-back, allocate on write miss, kept
// coherent with the other cores' caches by MESI snooping.
//
// Organisation (defaults): 64 KB, 64-byte lines, 4-way set associative, so
// 256 sets; 32-bit byte addresses, 32-bit word accesses with byte enables.
// A line is Invalid, Shared, Exclusive or Modified.
//
// CPU side: a request (cpu_req, cpu_we, cpu_addr, cpu_wdata, cpu_be,
// cpu_tid) is served in the same cycle when it hits: cpu_ready is high and a
// load's word is on cpu_rdata. A load hit needs S/E/M, a store hit needs E or
// M (E becomes M). Otherwise cpu_ready stays low and, if the miss engine is
// free, the miss is started: the line is fetched (BUS_RD for a load,
// BUS_RDX for a store, BUS_UPGR for a store to a Shared line), after writing
// back a Modified victim (BUS_WB). The requesting thread is reported on
// miss_valid/miss_tid until the line is installed. The missed access itself
// is completed when the line arrives (a store is merged into the line, a
// load's word is kept in a per-thread result register); the core stalls the
// thread and replays the same access afterwards, and the replay is answered
// at once from that register if address and direction match. Completing at
// fill time guarantees progress even when another cache takes the line away
// before the replay. Any other access of the thread discards the register;
// a kept load value is also discarded when another cache takes ownership of
// the line or another thread stores to the word. While a miss is
// outstanding, other threads' hits are still served (hit under miss); other
// misses wait. No CPU access is served in a cycle with a snoop or a fill,
// nor to the set of the outstanding miss.
//
// Bus side: bus_req/bus_op/bus_addr/bus_wdata stay up until bus_gnt; the bus
// answers with bus_done (and the line on bus_rdata, bus_shared telling whether
// another cache kept a copy). Snoops (snoop_valid/op/addr) are answered in
// the same cycle: snoop_hit if the line is present, snoop_dirty plus the line
// on snoop_data if it is Modified. At the edge the line goes to Shared on a
// BUS_RD snoop, and to Invalid on BUS_RDX or BUS_UPGR.
//
// Replacement: an invalid way if there is one, else round robin per set.
// The 64 KB / 64 B / 4-way / write-back / MESI / allocate-on-write-miss
// parameters follow the evaluated system; the replay protocol, hit under
// miss and the replacement policy are this design's choices. Synchronous
// active-high reset invalidates all lines.
module dcache
  import mmsys_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 65536,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned NUM_THREADS = 4,
  localparam int unsigned SETS       = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned SET_W      = $clog2(SETS),
  localparam int unsigned WAY_W      = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W      = LADDR_W - SET_W,
  localparam int unsigned WOFF_W     = $clog2(LINE_BYTES / 4),
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  // CPU side
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [WORD_W-1:0]  cpu_addr,
  input  logic [WORD_W-1:0]  cpu_wdata,
  input  logic [3:0]         cpu_be,
  input  logic [TID_W-1:0]   cpu_tid,
  output logic               cpu_ready,
  output logic [WORD_W-1:0]  cpu_rdata,
  output logic               miss_valid,
  output logic [TID_W-1:0]   miss_tid,
  // bus side: own transactions
  output logic               bus_req,
  output bus_op_e            bus_op,
  output logic [LADDR_W-1:0] bus_addr,
  output logic [LINE_W-1:0]  bus_wdata,
  input  logic               bus_gnt,
  input  logic               bus_done,
  input  logic [LINE_W-1:0]  bus_rdata,
  input  logic               bus_shared,
  // bus side: snoops
  input  logic               snoop_valid,
  input  bus_op_e            snoop_op,
  input  logic [LADDR_W-1:0] snoop_addr,
  output logic               snoop_hit,
  output logic               snoop_dirty,
  output logic [LINE_W-1:0]  snoop_data
);

  // ------------------------------------------------------------- arrays
  logic [TAG_W-1:0]  tag_q  [SETS][WAYS];
  mesi_e             st_q   [SETS][WAYS];
  logic [LINE_W-1:0] data_q [SETS][WAYS];
  logic [WAY_W-1:0]  rr_q   [SETS];

  // ------------------------------------------------------- CPU lookup
  logic [LADDR_W-1:0] c_line;
  logic [SET_W-1:0]   c_set;
  logic [TAG_W-1:0]   c_tag;
  logic [WOFF_W-1:0]  c_woff;
  assign c_line = cpu_addr[WORD_W-1 -: LADDR_W];
  assign c_set  = c_line[SET_W-1:0];
  assign c_tag  = c_line[LADDR_W-1:SET_W];
  assign c_woff = cpu_addr[WOFF_W+1:2];

  logic             c_hit;
  logic [WAY_W-1:0] c_way;
  mesi_e            c_st;
  always_comb begin
    c_hit = 1'b0;
    c_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (st_q[c_set][w] != MESI_I && tag_q[c_set][w] == c_tag) begin
        c_hit = 1'b1;
        c_way = WAY_W'(w);
      end
    c_st = c_hit ? st_q[c_set][c_way] : MESI_I;
  end

  // ----------------------------------------------------- snoop lookup
  logic [SET_W-1:0] s_set;
  logic [TAG_W-1:0] s_tag;
  logic [WAY_W-1:0] s_way;
  assign s_set = snoop_addr[SET_W-1:0];
  assign s_tag = snoop_addr[LADDR_W-1:SET_W];
  always_comb begin
    snoop_hit = 1'b0;
    s_way     = '0;
    for (int w = 0; w < WAYS; w++)
      if (st_q[s_set][w] != MESI_I && tag_q[s_set][w] == s_tag) begin
        snoop_hit = snoop_valid;
        s_way     = WAY_W'(w);
      end
    snoop_dirty = snoop_hit && (st_q[s_set][s_way] == MESI_M);
    snoop_data  = data_q[s_set][s_way];
  end

  // ------------------------------------------------------ miss engine
  typedef enum logic [1:0] {M_IDLE, M_DECIDE, M_WB, M_FILL} mstate_e;
  mstate_e            ms_q;
  logic [LADDR_W-1:0] m_line_q;
  logic               m_we_q;
  logic [TID_W-1:0]   m_tid_q;
  logic [WOFF_W-1:0]  m_woff_q;
  logic [WORD_W-1:0]  m_wdata_q;
  logic [3:0]         m_be_q;
  // completed misses waiting for their replay, one per thread
  logic [NUM_THREADS-1:0] done_q;
  logic [WORD_W-1:0]      done_rdata_q [NUM_THREADS];
  logic [WORD_W-3:0]      done_waddr_q [NUM_THREADS];
  logic [NUM_THREADS-1:0] done_we_q;

  logic [SET_W-1:0] m_set;
  logic [TAG_W-1:0] m_tag;
  assign m_set = m_line_q[SET_W-1:0];
  assign m_tag = m_line_q[LADDR_W-1:SET_W];

  // look the missing line up again (snoops may have changed the set)
  logic             m_hit;
  logic [WAY_W-1:0] m_hway;
  logic             m_inv_found;
  logic [WAY_W-1:0] m_inv_way;
  logic [WAY_W-1:0] m_victim;
  always_comb begin
    m_hit = 1'b0; m_hway = '0; m_inv_found = 1'b0; m_inv_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_q[m_set][w] != MESI_I && tag_q[m_set][w] == m_tag) begin
        m_hit = 1'b1; m_hway = WAY_W'(w);
      end
      if (st_q[m_set][w] == MESI_I && !m_inv_found) begin
        m_inv_found = 1'b1; m_inv_way = WAY_W'(w);
      end
    end
    m_victim = m_hit ? m_hway : (m_inv_found ? m_inv_way : rr_q[m_set]);
  end

  logic fill_req_q;    // waiting for bus_done of a fill
  logic wb_req_q;      // waiting for bus_done of a write-back
  logic             upgrade;    // the line is here (Shared), only ownership is missing
  logic [WAY_W-1:0] fill_way_q;
  logic [WAY_W-1:0] wb_way_q;     // victim chosen when the write-back was decided
  logic             need_wb;
  assign upgrade = m_hit && m_we_q;
  assign need_wb = !m_hit && (st_q[m_set][m_victim] == MESI_M);

  always_comb begin
    bus_req   = 1'b0;
    bus_op    = BUS_RD;
    bus_addr  = m_line_q;
    bus_wdata = data_q[m_set][m_victim];
    unique case (ms_q)
      M_WB: begin
        bus_req   = (st_q[m_set][wb_way_q] == MESI_M) && !wb_req_q;
        bus_op    = BUS_WB;
        bus_addr  = {tag_q[m_set][wb_way_q], m_set};
        bus_wdata = data_q[m_set][wb_way_q];
      end
      M_FILL: begin
        bus_req = !fill_req_q;
        bus_op  = upgrade ? BUS_UPGR : (m_we_q ? BUS_RDX : BUS_RD);
      end
      default: ;
    endcase
  end

  logic fill_now;      // own line arrives this cycle
  logic wb_now;        // own write-back completes this cycle
  bus_op_e fill_op_q;
  assign fill_now = bus_done && fill_req_q;
  assign wb_now   = bus_done && wb_req_q;

  // ------------------------------------------------------- CPU service
  logic can_serve;
  logic hit_ok;
  logic replay_done;   // the replay of a miss completed at fill time
  assign replay_done = cpu_req && done_q[cpu_tid] && (done_waddr_q[cpu_tid] == cpu_addr[WORD_W-1:2])
                       && (done_we_q[cpu_tid] == cpu_we);
  // no access to the set the miss engine is working on (its victim may be
  // leaving), and none while a snoop or a fill changes the arrays
  assign can_serve = !snoop_valid && !fill_now && !(ms_q != M_IDLE && c_set == m_set);
  assign hit_ok    = c_hit && (!cpu_we || c_st == MESI_E || c_st == MESI_M);
  assign cpu_ready = replay_done || (cpu_req && can_serve && hit_ok);
  assign cpu_rdata = replay_done ? done_rdata_q[cpu_tid] : data_q[c_set][c_way][c_woff*32 +: 32];
  assign miss_valid = (ms_q != M_IDLE);
  assign miss_tid   = m_tid_q;

  logic start_miss;
  assign start_miss = cpu_req && !replay_done && can_serve && !hit_ok && (ms_q == M_IDLE);

  // the line as installed by a fill: fetched (or, for an upgrade, the copy
  // already here) with the missed store merged in
  logic [LINE_W-1:0] fill_line;
  always_comb begin
    fill_line = (fill_op_q == BUS_UPGR) ? data_q[m_set][fill_way_q] : bus_rdata;
    if (m_we_q)
      for (int b = 0; b < 4; b++)
        if (m_be_q[b]) fill_line[m_woff_q*32 + b*8 +: 8] = m_wdata_q[b*8 +: 8];
  end

  // --------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      ms_q       <= M_IDLE;
      fill_req_q <= 1'b0;
      wb_req_q   <= 1'b0;
      done_q     <= '0;
    end else begin
      // a completed miss is consumed by the thread's next access (its replay,
      // or anything else if the thread gave the access up); a kept load
      // value is also dropped when the word may change
      for (int t = 0; t < NUM_THREADS; t++) begin
        if (cpu_req && cpu_tid == TID_W'(t)) done_q[t] <= 1'b0;
        if (!done_we_q[t] && snoop_valid && (snoop_op == BUS_RDX || snoop_op == BUS_UPGR)
            && snoop_addr == done_waddr_q[t][WORD_W-3 -: LADDR_W]) done_q[t] <= 1'b0;
        if (!done_we_q[t] && cpu_ready && !replay_done && cpu_we
            && done_waddr_q[t] == cpu_addr[WORD_W-1:2]) done_q[t] <= 1'b0;
      end
      if (fill_now) done_q[m_tid_q] <= 1'b1;
      unique case (ms_q)
        M_IDLE: if (start_miss) ms_q <= M_DECIDE;
        M_DECIDE: ms_q <= need_wb ? M_WB : M_FILL;
        M_WB: begin
          if (bus_gnt) wb_req_q <= 1'b1;
          else if (!bus_req && !wb_req_q) ms_q <= M_DECIDE;   // victim taken by a snoop
          if (wb_now) begin wb_req_q <= 1'b0; ms_q <= M_DECIDE; end
        end
        M_FILL: begin
          if (bus_gnt) fill_req_q <= 1'b1;
          if (fill_now) begin fill_req_q <= 1'b0; ms_q <= M_IDLE; end
        end
        default: ms_q <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (start_miss) begin
      m_line_q <= c_line;
      m_we_q   <= cpu_we;
      m_tid_q  <= cpu_tid;
      m_woff_q  <= c_woff;
      m_wdata_q <= cpu_wdata;
      m_be_q    <= cpu_be;
    end
    if (fill_now) begin
      done_rdata_q[m_tid_q] <= fill_line[m_woff_q*32 +: 32];
      done_waddr_q[m_tid_q] <= {m_line_q, m_woff_q};
      done_we_q[m_tid_q]    <= m_we_q;
    end
    if (ms_q == M_DECIDE) wb_way_q <= m_victim;
    if (ms_q == M_FILL && bus_gnt) begin
      fill_way_q <= m_victim;
      fill_op_q  <= bus_op;
    end
  end

  // ---------------------------------------------------- array updates
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SETS; s++) begin
        rr_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) st_q[s][w] <= MESI_I;
      end
    end else begin
      // snoops from other caches' transactions
      if (snoop_hit) begin
        if (snoop_op == BUS_RD) st_q[s_set][s_way] <= MESI_S;
        else if (snoop_op == BUS_RDX || snoop_op == BUS_UPGR) st_q[s_set][s_way] <= MESI_I;
      end
      // own write-back done: the victim is now clean and can be dropped
      if (wb_now) st_q[m_set][wb_way_q] <= MESI_I;
      // own fill / upgrade done, with the missed access performed
      if (fill_now) begin
        data_q[m_set][fill_way_q] <= fill_line;
        if (fill_op_q == BUS_UPGR) st_q[m_set][fill_way_q] <= MESI_M;
        else begin
          tag_q[m_set][fill_way_q] <= m_tag;
          st_q[m_set][fill_way_q]  <= (fill_op_q == BUS_RDX) ? MESI_M
                                     : (bus_shared ? MESI_S : MESI_E);
          rr_q[m_set] <= rr_q[m_set] + 1'b1;
        end
      end
      // CPU store hit
      if (cpu_ready && !replay_done && cpu_we) begin
        st_q[c_set][c_way] <= MESI_M;
        for (int b = 0; b < 4; b++)
          if (cpu_be[b]) data_q[c_set][c_way][c_woff*32 + b*8 +: 8] <= cpu_wdata[b*8 +: 8];
      end
    end
  end

endmodule
