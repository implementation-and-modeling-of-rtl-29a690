// rs_chien: Chien search, evaluating the key-equation results at every codeword position.
//
// A symbol error at position j (coefficient of x^j, j = N-1 received first) has the locator
// X = alpha^j and makes Lambda(X^-1) = 0. The block steps j from N-1 down to 0, one position
// per clock, keeping one register per coefficient: term_k holds Lambda_k * alpha^(-k*j) and is
// multiplied by the constant alpha^k each clock. Even and odd terms are summed separately,
// so Lambda(X^-1) = even + odd and Lambda_odd(X^-1) = odd, which is what the Forney step
// needs. In the same way Omega is evaluated with the extra constant factor X^-(2t+FCR) folded
// into its start values and step constants, so that the error value is simply
// Omega_scaled / Lambda_odd. The start values alpha^(-k(N-1)) handle shortened codes.
//
// Interface: load (one clock) takes lambda/omega; from the next clock on, N positions are
// evaluated; for each, out_valid is high with the sums registered, out_first marks
// position N-1 and out_last position 0. A load may coincide with the last position of the
// previous scan (codewords back to back); that position is still output.
//
// Following the design: Chien search over Lambda, the split into Lambda_odd for the Forney
// step, the constant-factor adaptation of the Forney formula. Own choice: evaluating Omega in
// the same parallel-register way and folding the constant factor into it.
module rs_chien
  import rs_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D,
  parameter int N    = 255,
  parameter int T    = 8,
  parameter int FCR  = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] lambda [T+1],
  input  logic [M-1:0] omega  [T],
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [M-1:0] lam_even,
  output logic [M-1:0] lam_odd,
  output logic [M-1:0] om_val
);

  localparam int Q1 = (1 << M) - 1;
  localparam int CW = $clog2(N + 1);

  logic [M-1:0]  lt [T+1];   // Lambda terms
  logic [M-1:0]  ot [T];     // Omega terms
  logic          run;
  logic [CW-1:0] pos;        // positions evaluated so far

  // start exponent -(k*(N-1)) and step exponent k for Lambda; shifted by 2t+FCR for Omega
  function automatic int lam_start(input int k);
    return Q1 - ((k * (N-1)) % Q1);
  endfunction
  function automatic int om_exp(input int k);
    return k + 2*T + FCR;
  endfunction
  function automatic int om_start(input int k);
    return Q1 - ((om_exp(k) * (N-1)) % Q1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      pos <= '0;
      for (int k = 0; k <= T; k++) lt[k] <= '0;
      for (int k = 0; k < T; k++)  ot[k] <= '0;
    end else if (load) begin
      run <= 1'b1;
      pos <= '0;
      for (int k = 0; k <= T; k++) begin
        gf_t v;
        v     = gf_mul(gf_t'(lambda[k]), gf_alpha_pow(lam_start(k), M, POLY), M, POLY);
        lt[k] <= v[M-1:0];
      end
      for (int k = 0; k < T; k++) begin
        gf_t v;
        v     = gf_mul(gf_t'(omega[k]), gf_alpha_pow(om_start(k), M, POLY), M, POLY);
        ot[k] <= v[M-1:0];
      end
    end else if (run) begin
      pos <= pos + 1'b1;
      if (pos == CW'(N-1)) run <= 1'b0;
      for (int k = 0; k <= T; k++) begin
        gf_t v;
        v     = gf_mul(gf_t'(lt[k]), gf_alpha_pow(k, M, POLY), M, POLY);
        lt[k] <= v[M-1:0];
      end
      for (int k = 0; k < T; k++) begin
        gf_t v;
        v     = gf_mul(gf_t'(ot[k]), gf_alpha_pow(om_exp(k), M, POLY), M, POLY);
        ot[k] <= v[M-1:0];
      end
    end
  end

  // sums of the current terms, registered at the output
  logic [M-1:0] se, so, sw;
  always_comb begin
    se = '0;
    so = '0;
    sw = '0;
    for (int k = 0; k <= T; k++)
      if (k % 2 == 0) se = se ^ lt[k];
      else            so = so ^ lt[k];
    for (int k = 0; k < T; k++) sw = sw ^ ot[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      lam_even  <= '0;
      lam_odd   <= '0;
      om_val    <= '0;
    end else begin
      out_valid <= run;
      out_first <= run && (pos == '0);
      out_last  <= run && (pos == CW'(N-1));
      lam_even  <= se;
      lam_odd   <= so;
      om_val    <= sw;
    end
  end

endmodule
