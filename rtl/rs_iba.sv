// rs_iba: key-equation solver, inversionless Berlekamp algorithm with resource sharing.
//
// The algorithm works on the 3t+1 coefficients delta_0..delta_3t and the helper polynomial
// theta_0..theta_3t. They start as delta = theta = (S_0..S_2t-1, 0.., 1) and after 2t
// iterations delta_t..delta_2t hold the error locator Lambda_0..Lambda_t and delta_0..delta_t-1
// the error evaluator Omega_0..Omega_t-1 (both scaled by the same constant, which cancels in
// the Forney division).
//
// Rather than one PE per index, NPE shared PEs process the indices 0..3t-1 in groups of NPE,
// one group per clock, lowest indices first; the cheap rs_pe_last handles index 3t. NPE is
// the smallest number that keeps up with the syndrome stream, ceil(2t(3t+1)/(2^M-1)); for
// M = 8, t = 8 that is 2 PEs instead of 25. One iteration takes G = ceil(3t/NPE) clocks and a
// codeword 2t*G clocks (192 for t = 8), below the N clocks the syndrome block needs for the
// next codeword.
//
// The delta and theta values circulate in two register chains of G-PIPE groups; together with
// the PIPE stages in the PEs a group needs exactly G clocks to come round, so it reaches the
// chain head when the next iteration needs it. Processing index i needs the old delta_(i+1):
// within a group it is the neighbour PE's input, for the top PE it is the first value of the
// next group (chain position 1), and for index 3t-1 it is the register of rs_pe_last (the
// multiplexer controlled by the position in the iteration). Because the lowest group goes
// first, delta_0(r+1) leaves PE 0 at the start of iteration r and is ready in the control
// element when iteration r+1 starts. Iteration 0 reads its operands directly from the
// syndrome inputs, which must stay stable for G clocks after start.
//
// Interface: pulse start for one clock with syn valid; done pulses for one clock when lambda
// and omega are valid (2t*G + PIPE + 1 clocks after start). lambda/omega then hold until the
// next solution completes. busy is high from the clock after start until done.
//
// Following the design: the iBA equations, the number of shared PEs, the register chains, the
// control element inside the PE handling index 0, the separate last PE, the pipelined
// calculation unit. Own choices: the exact schedule (group order, chain length, the operand
// source in iteration 0) and the start/done handshake.
module rs_iba
  import rs_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D,
  parameter int T    = 8,
  parameter int NPE  = (2*T*(3*T+1) + (1 << M) - 2) / ((1 << M) - 1),
  parameter int PIPE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] syn    [2*T],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] lambda [T+1],
  output logic [M-1:0] omega  [T]
);

  localparam int NE = 3*T;                    // indices served by the shared PEs
  localparam int G  = (NE + NPE - 1) / NPE;   // clocks per iteration
  localparam int NS = G * NPE;                // PE slots per iteration (>= NE)
  localparam int RL = G - PIPE;               // register-chain length in groups
  localparam int CW = $clog2(G + 1);
  localparam int RW = $clog2(2*T + 1);

  if (RL < 2) begin : g_bad_sharing
    $error("rs_iba: NPE too large for the shared schedule (need ceil(3T/NPE) >= PIPE+2)");
  end

  // ---------------- iteration / group counters ----------------
  logic          issuing;
  logic [RW-1:0] r;
  logic [CW-1:0] c;
  wire           iter_end = issuing && (c == CW'(G-1));
  wire           last_it  = (r == RW'(2*T-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      r       <= '0;
      c       <= '0;
    end else if (start) begin
      issuing <= 1'b1;
      r       <= '0;
      c       <= '0;
    end else if (issuing) begin
      if (iter_end) begin
        c <= '0;
        r <= r + 1'b1;
        if (last_it) issuing <= 1'b0;
      end else begin
        c <= c + 1'b1;
      end
    end
  end

  // ---------------- control element and last PE ----------------
  logic [M-1:0] d0, gamma, d0_next, d0_next_q, pl_d;
  logic         mc, pl_hold;

  rs_ce #(.M(M), .T(T)) u_ce (
    .clk, .rst_n, .init(start), .init_d0(syn[0]), .en(iter_end), .d0_next,
    .d0, .gamma, .mc
  );

  rs_pe_last #(.M(M)) u_pe_last (
    .clk, .rst_n, .init(start), .en(iter_end), .mc, .d0, .d(pl_d), .hold(pl_hold)
  );

  // ---------------- operand selection ----------------
  logic [M-1:0] init_v  [NS+1];       // start values delta(0) = theta(0) per index
  logic [M-1:0] ring_d  [RL][NPE];
  logic [M-1:0] ring_th [RL][NPE];
  logic [M-1:0] cur_d   [NPE];
  logic [M-1:0] pe_dn   [NPE];
  logic [M-1:0] pe_th   [NPE];
  logic [M-1:0] pe_d_o  [NPE];
  logic [M-1:0] pe_th_o [NPE];
  logic [M-1:0] nxt_first;
  logic         sel_last [NPE];       // slot j is index 3t-1: take delta_3t from rs_pe_last

  always_comb begin
    for (int e = 0; e <= NS; e++) init_v[e] = (e < 2*T) ? syn[e] : '0;
    nxt_first = (r == '0) ? init_v[int'(c)*NPE + NPE] : ring_d[1][0];
    for (int j = 0; j < NPE; j++) cur_d[j] = (r == '0) ? init_v[int'(c)*NPE + j] : ring_d[0][j];
    for (int j = 0; j < NPE; j++) begin
      int i;
      i           = int'(c)*NPE + j;
      sel_last[j] = (i + 1 == NE);
      pe_dn[j]    = (j < NPE-1) ? cur_d[(j < NPE-1) ? j+1 : j] : nxt_first;
      pe_th[j]    = (r == '0) ? init_v[i] : ring_th[0][j];
      if (sel_last[j]) pe_dn[j] = pl_d;
      if (i >= NE) begin                // padding slot beyond index 3t-1
        pe_dn[j] = '0;
        pe_th[j] = '0;
      end
    end
  end

  for (genvar j = 0; j < NPE; j++) begin : g_pe
    rs_pe #(.M(M), .POLY(POLY), .PIPE(PIPE)) u_pe (
      .clk, .d_next(pe_dn[j]), .theta(pe_th[j]), .d0, .gamma, .mc,
      .d_out(pe_d_o[j]), .theta_out(pe_th_o[j])
    );
  end

  // register chains: the PE results enter at the tail, the head feeds the PEs
  always_ff @(posedge clk) begin
    for (int k = 0; k < RL-1; k++) begin
      ring_d[k]  <= ring_d[k+1];
      ring_th[k] <= ring_th[k+1];
    end
    ring_d[RL-1]  <= pe_d_o;
    ring_th[RL-1] <= pe_th_o;
  end

  // ---------------- tags travelling with the PE pipeline ----------------
  logic          tag_v    [PIPE+1];
  logic          tag_last [PIPE+1];
  logic [CW-1:0] tag_g    [PIPE+1];

  assign tag_v[0]    = issuing;
  assign tag_last[0] = last_it;
  assign tag_g[0]    = c;

  for (genvar s = 1; s <= PIPE; s++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tag_v[s]    <= 1'b0;
        tag_last[s] <= 1'b0;
        tag_g[s]    <= '0;
      end else begin
        tag_v[s]    <= tag_v[s-1];
        tag_last[s] <= tag_last[s-1];
        tag_g[s]    <= tag_g[s-1];
      end
    end
  end

  wire           out_v    = tag_v[PIPE];
  wire           out_last = tag_last[PIPE];
  wire [CW-1:0]  out_g    = tag_g[PIPE];
  wire           cap_d0   = out_v && (out_g == '0);

  // delta_0(r+1) leaves PE 0 with group 0; keep it until the iteration ends
  assign d0_next = cap_d0 ? pe_d_o[0] : d0_next_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d0_next_q <= '0;
    else if (cap_d0) d0_next_q <= pe_d_o[0];
  end

  // ---------------- results ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int e = 0; e < T; e++)  omega[e]  <= '0;
      for (int e = 0; e <= T; e++) lambda[e] <= '0;
    end else begin
      done <= out_v && out_last && (out_g == CW'(G-1));
      if (out_v && out_last) begin
        for (int e = 0; e < T; e++)
          if (out_g == CW'(e / NPE)) omega[e] <= pe_d_o[e % NPE];
        for (int e = 0; e <= T; e++)
          if (out_g == CW'((T + e) / NPE)) lambda[e] <= pe_d_o[(T + e) % NPE];
      end
    end
  end

  always_comb begin
    busy = issuing;
    for (int s = 1; s <= PIPE; s++) busy = busy | tag_v[s];
  end

  // a new solution may only start once the previous one has finished
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("rs_iba: start while busy");

endmodule
