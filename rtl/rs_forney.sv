// rs_forney: Forney algorithm, turning the Chien-search sums into error values.
//
// For each codeword position the Chien search supplies Lambda_even, Lambda_odd and the
// (scaled) Omega, all evaluated at X^-1. The position is in error when
// Lambda(X^-1) = Lambda_even + Lambda_odd = 0, and its error value is then
// e = Omega / Lambda_odd; otherwise e = 0. The division is a lookup of 1/Lambda_odd in the
// inverter ROM followed by one GF multiplication.
// Pipeline: clock 1 reads the ROM (synchronous) while the root flag and Omega are registered
// alongside; clock 2 multiplies and registers e. Latency is 2 clocks from in_valid to
// out_valid, with the first/last markers passed along.
//
// Following the design: root test, ROM inversion of Lambda_odd, multiplication. Own choice:
// the two-stage pipeline.
module rs_forney
  import rs_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,
  input  logic         in_last,
  input  logic [M-1:0] lam_even,
  input  logic [M-1:0] lam_odd,
  input  logic [M-1:0] om_val,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic         out_err,     // this position is an error location
  output logic [M-1:0] out_e        // error value to add to the received symbol
);

  logic [M-1:0] inv_q, om_q;
  logic         root_q, v_q, f_q, l_q;

  rs_inv_rom #(.M(M), .POLY(POLY)) u_rom (.clk, .addr(lam_odd), .data(inv_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      f_q       <= 1'b0;
      l_q       <= 1'b0;
      root_q    <= 1'b0;
      om_q      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_err   <= 1'b0;
      out_e     <= '0;
    end else begin
      v_q    <= in_valid;
      f_q    <= in_first;
      l_q    <= in_last;
      root_q <= in_valid && ((lam_even ^ lam_odd) == '0);
      om_q   <= om_val;
      out_valid <= v_q;
      out_first <= f_q;
      out_last  <= l_q;
      out_err   <= root_q;
      if (root_q) begin
        gf_t p;
        p     = gf_mul(gf_t'(om_q), gf_t'(inv_q), M, POLY);
        out_e <= p[M-1:0];
      end else begin
        out_e <= '0;
      end
    end
  end

endmodule
