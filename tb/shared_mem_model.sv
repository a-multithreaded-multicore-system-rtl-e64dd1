// shared_mem_model: behavioural model of the shared memory behind the data
// caches, for simulation only. Each line read or written takes a fixed
// LAT cycles (40 by default, the average miss latency of the evaluated
// system): a request held on mem_req is acknowledged LAT cycles after it
// appears, for one cycle. Unwritten lines read back as a pattern derived from
// their address (word k of line a holds {a[23:0], k[7:0]}).
module shared_mem_model
  import mmsys_pkg::*;
#(
  parameter int LAT = 40
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               mem_req,
  input  logic               mem_we,
  input  logic [LADDR_W-1:0] mem_addr,
  input  logic [LINE_W-1:0]  mem_wdata,
  output logic               mem_ack,
  output logic [LINE_W-1:0]  mem_rdata
);
  logic [LINE_W-1:0] lines [int];
  int cnt;
  int n_reads = 0, n_writes = 0;

  function automatic logic [LINE_W-1:0] init_line(input logic [LADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int k = 0; k < LINE_W / 32; k++) l[k*32 +: 32] = {a[23:0], 8'(k)};
    return l;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= 0;
      mem_ack <= 1'b0;
    end else begin
      mem_ack <= 1'b0;
      if (mem_req && !mem_ack) begin
        if (cnt == LAT - 1) begin
          cnt <= 0;
          mem_ack <= 1'b1;
          if (mem_we) begin
            lines[int'(mem_addr)] = mem_wdata;
            n_writes++;
          end else begin
            mem_rdata <= lines.exists(int'(mem_addr)) ? lines[int'(mem_addr)] : init_line(mem_addr);
            n_reads++;
          end
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
