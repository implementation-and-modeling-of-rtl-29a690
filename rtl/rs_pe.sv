// rs_pe: processing element of the inversionless Berlekamp algorithm (iBA).
//
// One PE performs, for one polynomial index i, the update of one iteration r:
//   delta_i(r+1) = gamma(r) * delta_(i+1)(r) + theta_i(r) * delta_0(r)
//   theta_i(r+1) = MC(r) ? delta_(i+1)(r) : theta_i(r)
// The two GF(2^M) multipliers and the adder form the calculation unit, the critical path of the
// key-equation solver. With PIPE = 1 the two products are registered before the adder (the
// "fully pipelined" calculation unit), so both outputs appear PIPE clocks after the inputs; with
// PIPE = 0 the PE is purely combinational. The PE keeps no state of its own: in the
// resource-shared solver the delta and theta registers of the original PE live in the register
// chains around it, which is what lets one PE serve many indices in turn.
//
// Following the design: the update equations, the multiplexer choosing theta and the
// multiplier/adder calculation unit. Own choice: where the pipeline register sits (after the
// multipliers) and that theta is delayed by the same PIPE stages to stay aligned with delta.
module rs_pe
  import rs_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D,
  parameter int PIPE = 1          // 0 or 1 register stages inside the calculation unit
) (
  input  logic         clk,
  input  logic [M-1:0] d_next,    // delta_(i+1)(r)
  input  logic [M-1:0] theta,     // theta_i(r)
  input  logic [M-1:0] d0,        // delta_0(r), broadcast by the control element
  input  logic [M-1:0] gamma,     // gamma(r), broadcast
  input  logic         mc,        // MC(r), broadcast
  output logic [M-1:0] d_out,     // delta_i(r+1), PIPE clocks later
  output logic [M-1:0] theta_out  // theta_i(r+1), PIPE clocks later
);

  logic [M-1:0] p_gam, p_th, th_nxt;

  always_comb begin
    gf_t a, b;
    a      = gf_mul(gf_t'(gamma), gf_t'(d_next), M, POLY);
    b      = gf_mul(gf_t'(theta), gf_t'(d0), M, POLY);
    p_gam  = a[M-1:0];
    p_th   = b[M-1:0];
    th_nxt = mc ? d_next : theta;
  end

  if (PIPE == 0) begin : g_comb
    assign d_out     = p_gam ^ p_th;
    assign theta_out = th_nxt;
  end else begin : g_pipe
    logic [M-1:0] p_gam_q, p_th_q, th_q;
    always_ff @(posedge clk) begin
      p_gam_q <= p_gam;
      p_th_q  <= p_th;
      th_q    <= th_nxt;
    end
    assign d_out     = p_gam_q ^ p_th_q;
    assign theta_out = th_q;
  end

endmodule
