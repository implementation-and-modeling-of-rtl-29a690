// rs_syndrome: syndrome computation, one multiply-accumulate (MAC) unit per syndrome.
//
// The 2t syndromes S_i = r(alpha^(FCR+i)), i = 0..2t-1, are evaluated by Horner's rule while the
// codeword streams in, highest-degree symbol r_(N-1) first: every accepted symbol updates each
// accumulator as acc_i <- acc_i * alpha^(FCR+i) + r. All 2t MAC units run in parallel, so the
// block accepts one symbol per clock. After the N-th symbol of a codeword the final sums are
// copied into the output registers and syn_valid pulses for one cycle, one clock after that
// symbol; the outputs then stay stable until the next codeword completes (at least N cycles).
// Symbols are counted internally, so codewords must arrive back to back in multiples of N;
// in_valid may drop between symbols.
//
// Following the design: 2t parallel MAC units with constant multipliers, Horner evaluation.
// Own choices: the symbol order (highest degree first), the internal symbol counter and the
// FCR parameter (the design evaluates the syndromes at alpha^0 .. alpha^(2t-1), FCR = 0).
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int M    = 8,        // symbol width
  parameter int POLY = 'h11D,    // primitive polynomial
  parameter int N    = 255,      // codeword length (shortened codes: N < 2^M-1)
  parameter int T    = 8,        // correctable symbol errors
  parameter int FCR  = 0         // first root of the generator polynomial is alpha^FCR
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] in_data,
  output logic         syn_valid,
  output logic [M-1:0] syn [2*T]
);

  localparam int CW = $clog2(N);

  logic [CW-1:0] cnt;
  logic [M-1:0]  acc [2*T];
  logic [M-1:0]  nxt [2*T];

  wire first = (cnt == '0);
  wire last  = (cnt == CW'(N-1));

  // Horner step for every MAC unit: constant multiply and add (XOR).
  always_comb begin
    for (int i = 0; i < 2*T; i++) begin
      gf_t prod;
      prod   = gf_mul(gf_t'(acc[i]), gf_alpha_pow(FCR + i, M, POLY), M, POLY);
      nxt[i] = (first ? '0 : prod[M-1:0]) ^ in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      syn_valid <= 1'b0;
      for (int i = 0; i < 2*T; i++) begin
        acc[i] <= '0;
        syn[i] <= '0;
      end
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        cnt <= last ? '0 : cnt + 1'b1;
        for (int i = 0; i < 2*T; i++) acc[i] <= nxt[i];
        if (last) begin
          for (int i = 0; i < 2*T; i++) syn[i] <= nxt[i];
          syn_valid <= 1'b1;
        end
      end
    end
  end

endmodule
