// tb_latency_pad: self-checking test of the latency padding stages.
// With a natural latency of 3 and up to 4 interleaved threads, the padded
// latency must be 3, 4, 3, 4 for 1, 2, 3, 4 foreground threads (the next
// multiple of the interleave factor). Each case sends a stream of tagged
// entries and checks that each comes out exactly that many cycles later, with
// its thread ID and data intact. A flush must remove exactly the in-flight
// entries of the flushed thread.
module tb_latency_pad;
  localparam int T = 4, LAT = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [2:0] fg_count;
  logic in_valid, flush_valid, out_valid;
  logic [1:0] in_tid, flush_tid, out_tid;
  logic [31:0] in_data, out_data;
  logic [2:0] pad_lat;

  latency_pad #(.NUM_THREADS(T), .OP_LAT(LAT), .DATA_W(32)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output queue: cycle of appearance, tid, data
  int exp_cyc [$];
  logic [1:0] exp_tid [$];
  logic [31:0] exp_dat [$];
  int n_flushed = 0;

  // monitor: sample in the middle of a cycle
  always @(negedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (exp_cyc.size() == 0) begin failures++; $display("FAIL unexpected output %h", out_data); end
      else begin
        if (exp_cyc[0] != cyc || exp_tid[0] != out_tid || exp_dat[0] != out_data) begin
          failures++;
          $display("FAIL out at %0d tid %0d data %h, exp at %0d tid %0d data %h", cyc, out_tid, out_data, exp_cyc[0], exp_tid[0], exp_dat[0]);
        end
        void'(exp_cyc.pop_front()); void'(exp_tid.pop_front()); void'(exp_dat.pop_front());
      end
    end else if (exp_cyc.size() != 0 && exp_cyc[0] <= cyc) begin
      failures++; checks++;
      $display("FAIL missing output exp at %0d", exp_cyc[0]);
      void'(exp_cyc.pop_front()); void'(exp_tid.pop_front()); void'(exp_dat.pop_front());
    end
  end

  initial begin
    int want [5] = '{0, 3, 4, 3, 4};
    rst = 1; in_valid = 0; flush_valid = 0; in_tid = 0; flush_tid = 0; in_data = 0; fg_count = 1;
    repeat (3) @(negedge clk); rst = 0;
    for (int m = 1; m <= 4; m++) begin
      fg_count = 3'(m);
      #1 checks++;
      if (int'(pad_lat) != want[m]) begin failures++; $display("FAIL pad_lat m=%0d got %0d", m, pad_lat); end
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_tid = 2'(i % m);
        in_data = $urandom;
        // the entry presented in cycle c is sampled at edge c and appears after edge c+P-1
        if (in_valid) begin
          exp_cyc.push_back(cyc + want[m]); exp_tid.push_back(in_tid); exp_dat.push_back(in_data);
        end
      end
      @(negedge clk); in_valid = 0;
      repeat (6) @(negedge clk);
    end
    // flush: with m=4 (latency 4), fill with threads 0..3 then flush thread 1
    fg_count = 3'd4;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      in_valid = 1; in_tid = 2'(i); in_data = 32'(100 + i);
      if (i != 1) begin exp_cyc.push_back(cyc + 4); exp_tid.push_back(in_tid); exp_dat.push_back(in_data); end
    end
    @(negedge clk); in_valid = 0; flush_valid = 1; flush_tid = 2'd1;
    @(negedge clk); flush_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
