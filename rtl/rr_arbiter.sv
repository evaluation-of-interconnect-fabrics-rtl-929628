// rr_arbiter: round-robin arbiter, the arbitration scheme of every arbiter
// in the cluster interconnects.
//
// The grant is combinational: among the set request bits it picks the
// first one at or after the priority pointer. When `advance` is high (the
// granted transfer was accepted) the pointer moves to the requester just
// after the granted one, so that requester gets the lowest priority next.
// Interface: req[N] in, gnt[N] one-hot out, gnt_idx its index, gnt_valid
// when any request is set. Timing: zero-latency grant, pointer updated at
// the clock edge. The round-robin policy is from the design description;
// the pointer form is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req,
  input  logic             advance,
  output logic [N-1:0]     gnt,
  output logic [IDX_W-1:0] gnt_idx,
  output logic             gnt_valid
);

  logic [IDX_W-1:0] ptr_q;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr_q) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IDX_W'(i);
        gnt[i]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (advance && gnt_valid) begin
      ptr_q <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
    end
  end

endmodule
