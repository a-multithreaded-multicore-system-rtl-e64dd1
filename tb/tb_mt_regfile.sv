// tb_mt_regfile: self-checking test of the multithreaded register file.
// Random writes (one writing thread per cycle, up to 5 ports, including two
// ports on the same register) and random reads (one reading thread, 15
// ports) are compared against a reference array kept per thread. It also
// checks that a write by one thread leaves the other threads' copies alone.
module tb_mt_regfile;
  localparam int T = 4, R = 128, W = 32, NRD = 15, NWR = 5;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]   wr_tid, rd_tid;
  logic [NWR-1:0] wr_en;
  logic [6:0]   wr_addr [NWR];
  logic [W-1:0] wr_data [NWR];
  logic [6:0]   rd_addr [NRD];
  logic [W-1:0] rd_data [NRD];

  mt_regfile dut (.*);

  logic [W-1:0] ref_rf [T][R];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(input logic [1:0] tid, input logic [NWR-1:0] en,
                          input logic [6:0] a [NWR], input logic [W-1:0] d [NWR]);
    @(negedge clk);
    wr_tid = tid; wr_en = en; wr_addr = a; wr_data = d;
    @(posedge clk);
    for (int p = 0; p < NWR; p++) if (en[p]) ref_rf[tid][a[p]] = d[p];
    @(negedge clk);
    wr_en = '0;
  endtask

  task automatic check_reads(input logic [1:0] tid);
    rd_tid = tid;
    for (int p = 0; p < NRD; p++) rd_addr[p] = 7'($urandom_range(0, R-1));
    #1;
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rd_data[p] !== ref_rf[tid][rd_addr[p]]) begin
        failures++;
        if (failures < 10) $display("FAIL read t%0d r%0d got %h exp %h", tid, rd_addr[p], rd_data[p], ref_rf[tid][rd_addr[p]]);
      end
    end
  endtask

  initial begin
    logic [6:0]   a [NWR];
    logic [W-1:0] d [NWR];
    wr_en = '0; wr_tid = '0; rd_tid = '0;
    for (int p = 0; p < NWR; p++) begin wr_addr[p] = '0; wr_data[p] = '0; end
    for (int p = 0; p < NRD; p++) rd_addr[p] = '0;
    // initialise every register of every thread, distinct per thread
    for (int t = 0; t < T; t++)
      for (int r = 0; r < R; r += NWR) begin
        for (int p = 0; p < NWR; p++) begin
          a[p] = 7'((r + p) % R);
          d[p] = {8'(t), 8'(r + p), 16'hA5A5};
        end
        do_write(2'(t), '1, a, d);
      end
    for (int t = 0; t < T; t++) repeat (4) check_reads(2'(t));
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < NWR; p++) begin
        a[p] = 7'($urandom_range(0, R-1));
        d[p] = $urandom;
      end
      if (i % 7 == 0) a[NWR-1] = a[0];   // same register on two ports: higher port wins
      do_write(2'($urandom_range(0, T-1)), NWR'($urandom), a, d);
      check_reads(2'($urandom_range(0, T-1)));
    end
    // isolation: thread 2 writes register 5; threads 0,1,3 keep their value
    a = '{default: 7'd5}; d = '{default: 32'hDEADBEEF};
    do_write(2'd2, 5'b00001, a, d);
    for (int t = 0; t < T; t++) begin
      rd_tid = 2'(t); rd_addr[0] = 7'd5; #1;
      checks++;
      if ((rd_data[0] == 32'hDEADBEEF) != (t == 2)) begin
        failures++; $display("FAIL isolation thread %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
