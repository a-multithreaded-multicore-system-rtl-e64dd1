// rr_arbiter: round-robin arbiter used by the shared units (task scheduling
// unit, synchronization unit) to serve one requesting core per cycle.
//
// Combinational grant: among the asserted bits of req, the first one at or
// after the rotating pointer wins. When advance is high the pointer moves to
// the position after the granted requester at the next rising edge, so every
// requester that keeps asking is served within N grants. Synchronous,
// active-high reset puts the pointer at 0. The scheme is this design's
// choice; the shared units only need some fair serialisation.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     req,
  input  logic             advance,
  output logic             gnt_valid,
  output logic [IDX_W-1:0] gnt_idx
);

  logic [IDX_W-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && gnt_valid) ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

endmodule
