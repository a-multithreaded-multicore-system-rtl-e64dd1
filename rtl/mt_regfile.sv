// mt_regfile: multi-ported register file for an N-way multithreaded core in
// which, each cycle, one thread reads and one thread writes.
//
// With blocked, static interleaved and subset static interleaved (SSI)
// multithreading, all reads in a cycle come from one hardware thread and all
// write-backs in a cycle belong to one hardware thread. The write-port and
// read-port multiplexers of an ordinary standard-cell register file can then
// be shared by all threads: each register cell is replaced by NUM_THREADS
// registers, a de-multiplexer steered by the writing thread ID in front of
// them and a multiplexer steered by the reading thread ID behind them. This
// module is built exactly that way: per register a write multiplexer over the
// write ports, a thread cell of NUM_THREADS registers, and per read port a
// register-select multiplexer over the cell outputs.
//
// Interface: wr_tid and the NUM_WR write ports (wr_en/wr_addr/wr_data) are
// written at the rising clock edge. rd_tid and the NUM_RD read addresses give
// rd_data combinationally (same cycle). If two write ports name the same
// register in one cycle, the higher-numbered port wins (this design's choice).
// A write and a read of the same register in one cycle return the old value.
// The registers are not reset, as in a register file built from plain
// flip-flops; software writes a register before reading it.
//
// Defaults: 4 threads as in the evaluated system; 128 registers of 32 bits,
// 15 read and 5 write ports as in the 5-issue TM3270 core the system builds
// on (two operands and a guard per issue slot).
module mt_regfile #(
  parameter int unsigned NUM_THREADS = 4,
  parameter int unsigned NUM_REGS    = 128,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned NUM_RD      = 15,
  parameter int unsigned NUM_WR      = 5,
  localparam int unsigned TID_W      = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned ADDR_W     = $clog2(NUM_REGS)
) (
  input  logic                  clk,
  // write side: one writing thread, NUM_WR ports
  input  logic [TID_W-1:0]      wr_tid,
  input  logic [NUM_WR-1:0]     wr_en,
  input  logic [ADDR_W-1:0]     wr_addr [NUM_WR],
  input  logic [DATA_W-1:0]     wr_data [NUM_WR],
  // read side: one reading thread, NUM_RD ports
  input  logic [TID_W-1:0]      rd_tid,
  input  logic [ADDR_W-1:0]     rd_addr [NUM_RD],
  output logic [DATA_W-1:0]     rd_data [NUM_RD]
);

  // thread cells: NUM_THREADS registers per architectural register
  logic [DATA_W-1:0] tcell [NUM_REGS][NUM_THREADS];

  // per-register write multiplexer (shared by all threads)
  logic [NUM_REGS-1:0] reg_we;
  logic [DATA_W-1:0]   reg_wd [NUM_REGS];

  always_comb begin
    for (int r = 0; r < NUM_REGS; r++) begin
      reg_we[r] = 1'b0;
      reg_wd[r] = '0;
      for (int p = 0; p < NUM_WR; p++) begin
        if (wr_en[p] && (wr_addr[p] == ADDR_W'(r))) begin
          reg_we[r] = 1'b1;
          reg_wd[r] = wr_data[p];
        end
      end
    end
  end

  // de-multiplexer on the writing thread ID
  always_ff @(posedge clk) begin
    for (int r = 0; r < NUM_REGS; r++) begin
      if (reg_we[r]) tcell[r][wr_tid] <= reg_wd[r];
    end
  end

  // multiplexer on the reading thread ID, one per register (shared by all read ports)
  logic [DATA_W-1:0] cell_out [NUM_REGS];
  always_comb begin
    for (int r = 0; r < NUM_REGS; r++) cell_out[r] = tcell[r][rd_tid];
  end

  // read-port multiplexers
  always_comb begin
    for (int p = 0; p < NUM_RD; p++) rd_data[p] = cell_out[rd_addr[p]];
  end

endmodule
