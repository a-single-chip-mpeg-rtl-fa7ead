// rr_arbiter: fair round-robin arbiter.
// The requester after the one granted last has the highest priority, so every
// requester waits at most N-1 grants (the bounded worst-case latency the shared main
// bus relies on). Combinational grant from `req`; the priority pointer moves only
// when `advance` is high (the grant is taken). Reset leaves requester 0 first.
// Ports: req[N] in, advance in, gnt[N] one-hot out, gnt_idx out, gnt_valid out.
module rr_arbiter #(
  parameter int unsigned N = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last_q;   // index granted last

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(i);
        gnt[i]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= IW'(N-1);
    else if (advance && gnt_valid)   last_q <= gnt_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
