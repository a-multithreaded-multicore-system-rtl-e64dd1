// coh_bus: snooping bus that connects the cores' data caches to the shared
// memory and keeps them coherent (MESI).
//
// One transaction at a time, atomic from grant to completion:
//   1. A round-robin arbiter grants one requesting cache (bus_gnt pulse). In
//      that same cycle the transaction is broadcast as a snoop to every other
//      cache, which answers with hit / dirty / line data.
//   2. BUS_RD, BUS_RDX: if another cache held the line Modified, that cache
//      supplies it and the line is also written to memory; otherwise the line
//      is read from memory. BUS_WB writes the line to memory. BUS_UPGR needs
//      no memory access.
//   3. bus_done is pulsed to the requester with the line (bus_rdata) and
//      bus_shared, set when another cache kept a copy (BUS_RD only). The bus
//      then stays quiet for one more cycle so the requester can replay the
//      access that missed.
// Memory port: mem_req/mem_we/mem_addr/mem_wdata are held until mem_ack,
// which also carries mem_rdata for reads; the memory's latency (a fixed 40
// cycles in the evaluated system) is the memory's own. The bus protocol,
// the arbitration and the cache-to-cache transfer are this design's
// choices; the evaluated system only states write-back caches kept coherent
// with MESI. Synchronous active-high reset.
module coh_bus
  import mmsys_pkg::*;
#(
  parameter int unsigned NUM_CACHES = 16,
  localparam int unsigned IDX_W     = (NUM_CACHES > 1) ? $clog2(NUM_CACHES) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  // cache requests
  input  logic [NUM_CACHES-1:0] bus_req,
  input  bus_op_e               bus_op    [NUM_CACHES],
  input  logic [LADDR_W-1:0]    bus_addr  [NUM_CACHES],
  input  logic [LINE_W-1:0]     bus_wdata [NUM_CACHES],
  output logic [NUM_CACHES-1:0] bus_gnt,
  output logic [NUM_CACHES-1:0] bus_done,
  output logic [LINE_W-1:0]     bus_rdata,
  output logic                  bus_shared,
  // snoops
  output logic [NUM_CACHES-1:0] snoop_valid,
  output bus_op_e               snoop_op,
  output logic [LADDR_W-1:0]    snoop_addr,
  input  logic [NUM_CACHES-1:0] snoop_hit,
  input  logic [NUM_CACHES-1:0] snoop_dirty,
  input  logic [LINE_W-1:0]     snoop_data [NUM_CACHES],
  // shared memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [LADDR_W-1:0]    mem_addr,
  output logic [LINE_W-1:0]     mem_wdata,
  input  logic                  mem_ack,
  input  logic [LINE_W-1:0]     mem_rdata
);

  typedef enum logic [1:0] {B_IDLE, B_MEM, B_RESP} bstate_e;
  bstate_e bs_q;

  logic             arb_valid;
  logic [IDX_W-1:0] arb_idx;
  logic quiet;   // no grant while a requester installs its line or replays its access
  logic done_q;
  rr_arbiter #(.N(NUM_CACHES)) u_arb (
    .clk, .rst,
    .req     (bus_req & {NUM_CACHES{bs_q == B_IDLE && quiet}}),
    .advance (1'b1),
    .gnt_valid (arb_valid), .gnt_idx (arb_idx)
  );

  logic grant;
  assign quiet = (bus_done == '0) && !done_q;
  assign grant = (bs_q == B_IDLE) && arb_valid && quiet;

  always_comb begin
    bus_gnt     = '0;
    snoop_valid = '0;
    if (grant) begin
      bus_gnt[arb_idx] = 1'b1;
      snoop_valid      = ~(NUM_CACHES'(1) << arb_idx);
    end
  end
  assign snoop_op   = bus_op[arb_idx];
  assign snoop_addr = bus_addr[arb_idx];

  // snoop answers
  logic              any_hit, any_dirty;
  logic [LINE_W-1:0] dirty_line;
  always_comb begin
    any_hit    = 1'b0;
    any_dirty  = 1'b0;
    dirty_line = '0;
    for (int i = 0; i < NUM_CACHES; i++) begin
      if (snoop_valid[i] && snoop_hit[i]) any_hit = 1'b1;
      if (snoop_valid[i] && snoop_dirty[i]) begin
        any_dirty  = 1'b1;
        dirty_line = snoop_data[i];
      end
    end
  end

  // transaction registers
  logic [IDX_W-1:0]   own_q;
  logic [LADDR_W-1:0] addr_q;
  logic [LINE_W-1:0]  line_q;
  logic               shared_q;
  logic               we_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bs_q     <= B_IDLE;
      bus_done <= '0;
    end else begin
      bus_done <= '0;
      unique case (bs_q)
        B_IDLE: if (grant) begin
          own_q    <= arb_idx;
          addr_q   <= bus_addr[arb_idx];
          shared_q <= any_hit && (bus_op[arb_idx] == BUS_RD);
          if (bus_op[arb_idx] == BUS_UPGR) begin
            bs_q <= B_RESP;
          end else if (bus_op[arb_idx] == BUS_WB) begin
            we_q <= 1'b1; line_q <= bus_wdata[arb_idx]; bs_q <= B_MEM;
          end else if (any_dirty) begin
            we_q <= 1'b1; line_q <= dirty_line; bs_q <= B_MEM;
          end else begin
            we_q <= 1'b0; bs_q <= B_MEM;
          end
        end
        B_MEM: if (mem_ack) begin
          if (!we_q) line_q <= mem_rdata;
          bs_q <= B_RESP;
        end
        B_RESP: begin
          bus_done[own_q] <= 1'b1;
          bs_q <= B_IDLE;
        end
        default: bs_q <= B_IDLE;
      endcase
    end
  end

  // No grant (hence no snoop) is given in the cycle bus_done is high, so a
  // requester never installs a line while it is snooped, nor in the cycle
  // after, so the requester's replayed access finds the line before another
  // cache can take it away again (this prevents two caches from stealing a
  // line back and forth without either using it).
  always_ff @(posedge clk) begin
    if (rst) done_q <= 1'b0;
    else     done_q <= (bus_done != '0);
  end
  assign bus_rdata  = line_q;
  assign bus_shared = shared_q;
  assign mem_req    = (bs_q == B_MEM);
  assign mem_we     = we_q;
  assign mem_addr   = addr_q;
  assign mem_wdata  = line_q;

endmodule
