// rs_ce: control element of the inversionless Berlekamp algorithm.
//
// Holds the per-iteration values every PE needs: delta_0(r), gamma(r) and the counter k(r), and
// derives the control signal MC(r) = (delta_0(r) != 0) && (k(r) >= 0). At the end of an
// iteration (en) it applies
//   MC = 1: gamma(r+1) = delta_0(r), k(r+1) = -(k(r)+1)
//   MC = 0: gamma(r+1) = gamma(r),   k(r+1) = k(r)+1
// and loads delta_0(r+1), which the PE of index 0 produced during the iteration (d0_next).
// init starts a new key-equation solution: delta_0 = S_0, gamma = 1, k = 0.
// MC, gamma and d0 are stable for a whole iteration and change one clock after en.
//
// Following the design: the update rules and the MC condition. Own choice: k is a
// two's-complement counter wide enough for |k| <= 2t, and the init/en controls.
module rs_ce #(
  parameter int M = 8,
  parameter int T = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [M-1:0] init_d0,
  input  logic         en,
  input  logic [M-1:0] d0_next,
  output logic [M-1:0] d0,
  output logic [M-1:0] gamma,
  output logic         mc
);

  localparam int KW = $clog2(2*T + 1) + 2;

  localparam logic signed [KW-1:0] K_ONE = KW'(1);

  logic signed [KW-1:0] k;

  assign mc = (d0 != '0) && (k >= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d0    <= '0;
      gamma <= M'(1);
      k     <= '0;
    end else if (init) begin
      d0    <= init_d0;
      gamma <= M'(1);
      k     <= '0;
    end else if (en) begin
      d0 <= d0_next;
      if (mc) begin
        gamma <= d0;
        k     <= -(k + K_ONE);
      end else begin
        k     <= k + K_ONE;
      end
    end
  end

endmodule
