// opa_rr_arb: round-robin arbiter.
//
// The router model uses round-robin arbitration everywhere: the input arbiter
// picking a VL, the central-buffer and output arbiters picking an input, and
// the output-port VL scheduler. The requester after the last one served has
// the highest priority. gnt is one-hot and combinational from req in the same
// cycle. When adv is high with a grant, the priority moves past the granted
// requester at the next clock. After reset requester 0 has the highest
// priority.
module opa_rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         adv,
  output logic [N-1:0]                 gnt,
  output logic [(N>1?$clog2(N):1)-1:0] gnt_idx,
  output logic                         any
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // last requester served

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (!any && req[i]) begin
        any     = 1'b1;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          last <= IW'(N - 1);
    else if (adv && any) last <= gnt_idx;
  end

endmodule
