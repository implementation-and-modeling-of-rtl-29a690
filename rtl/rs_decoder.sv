// rs_decoder: parametrizable Reed-Solomon decoder, RS(N, N-2T) over GF(2^M).
//
// The received word streams in one symbol per clock, highest-degree symbol first, and leaves
// corrected in the same order. Four stages work on consecutive codewords at the same time:
//   1. rs_syndrome: 2T parallel MAC units compute the syndromes while the word arrives;
//   2. rs_iba: the key equation is solved by the inversionless Berlekamp algorithm on a few
//      shared processing elements (2 for T = 8), giving Lambda and Omega;
//   3. rs_chien: the Chien search evaluates Lambda and Omega at each position;
//   4. rs_forney: roots of Lambda are error locations, Omega / Lambda_odd (inverter ROM and
//      one multiplier) the error values.
// Meanwhile rs_fifo holds the received symbols, and each is added (XOR) to its error value as
// it leaves. Up to T symbol errors per word are corrected; with more the output is not
// guaranteed (failures are not flagged).
//
// Interface: in_valid/in_data accept one symbol; words are counted internally, so the input
// must be a sequence of whole N-symbol words (gaps between symbols are allowed). The output
// gives out_valid/out_data with out_first and out_last marking each word's first and last
// symbol, out_err marking a corrected symbol, and out_nerr, valid with out_last, the number
// of corrected symbols of the word. A word's first corrected symbol appears
// N + 2T*ceil(3T/NPE) + PIPE + 6 clocks after its first symbol is accepted (454 for the
// default RS(255,239), gap-free input), and the symbol rate is one per clock.
//
// Following the design: the block structure, the Galois-field algorithms, resource sharing in
// the key-equation solver, the inverter ROM. Own choices: the primitive polynomial default
// (x^8+x^4+x^3+x^2+1), the generator roots alpha^FCR.., the symbol order, the streaming
// interface, the FIFO depth and the error counter.
module rs_decoder #(
  parameter int M     = 8,
  parameter int POLY  = 'h11D,
  parameter int N     = 255,
  parameter int T     = 8,
  parameter int FCR   = 0,
  parameter int NPE   = (2*T*(3*T+1) + (1 << M) - 2) / ((1 << M) - 1),
  parameter int PIPE  = 1,
  parameter int DEPTH = 1 << $clog2(2*N)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [M-1:0]              in_data,
  output logic                      out_valid,
  output logic [M-1:0]              out_data,
  output logic                      out_first,
  output logic                      out_last,
  output logic                      out_err,
  output logic [$clog2(T+2)-1:0]    out_nerr
);

  localparam int KEQ_CYCLES = 2*T*((3*T + NPE - 1) / NPE) + PIPE + 1;
  if (KEQ_CYCLES > N) begin : g_too_slow
    $error("rs_decoder: key equation needs more clocks than a codeword lasts; raise NPE");
  end

  // ---------------- syndromes ----------------
  logic         syn_valid;
  logic [M-1:0] syn [2*T];

  rs_syndrome #(.M(M), .POLY(POLY), .N(N), .T(T), .FCR(FCR)) u_syn (
    .clk, .rst_n, .in_valid, .in_data, .syn_valid, .syn
  );

  // ---------------- key equation ----------------
  logic         keq_busy, keq_done;
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega  [T];

  rs_iba #(.M(M), .POLY(POLY), .T(T), .NPE(NPE), .PIPE(PIPE)) u_iba (
    .clk, .rst_n, .start(syn_valid), .syn, .busy(keq_busy), .done(keq_done), .lambda, .omega
  );

  // ---------------- Chien search and Forney ----------------
  logic         ch_valid, ch_first, ch_last;
  logic [M-1:0] ch_even, ch_odd, ch_om;

  rs_chien #(.M(M), .POLY(POLY), .N(N), .T(T), .FCR(FCR)) u_chien (
    .clk, .rst_n, .load(keq_done), .lambda, .omega,
    .out_valid(ch_valid), .out_first(ch_first), .out_last(ch_last),
    .lam_even(ch_even), .lam_odd(ch_odd), .om_val(ch_om)
  );

  logic         fy_valid, fy_first, fy_last, fy_err;
  logic [M-1:0] fy_e;

  rs_forney #(.M(M), .POLY(POLY)) u_forney (
    .clk, .rst_n, .in_valid(ch_valid), .in_first(ch_first), .in_last(ch_last),
    .lam_even(ch_even), .lam_odd(ch_odd), .om_val(ch_om),
    .out_valid(fy_valid), .out_first(fy_first), .out_last(fy_last),
    .out_err(fy_err), .out_e(fy_e)
  );

  // ---------------- FIFO RAM ----------------
  // read one clock after the Chien output so the symbol meets its error value (Forney
  // latency 2, RAM read latency 1)
  logic                       rd_en;
  logic [M-1:0]               rd_data;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_en <= 1'b0;
    else        rd_en <= ch_valid;
  end

  rs_fifo #(.W(M), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(in_valid), .wr_data(in_data), .rd_en, .rd_data, .count(fifo_count)
  );

  // ---------------- correction adder and error count ----------------
  logic [$clog2(T+2)-1:0] nerr_acc;
  logic [$clog2(T+2)-1:0] nerr_now;

  always_comb begin
    nerr_now = (fy_first ? '0 : nerr_acc);
    if (fy_err && nerr_now != '1) nerr_now = nerr_now + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_err   <= 1'b0;
      out_nerr  <= '0;
      nerr_acc  <= '0;
    end else begin
      out_valid <= fy_valid;
      out_first <= fy_valid && fy_first;
      out_last  <= fy_valid && fy_last;
      out_err   <= fy_valid && fy_err;
      out_data  <= rd_data ^ fy_e;
      if (fy_valid) begin
        nerr_acc <= nerr_now;
        if (fy_last) out_nerr <= nerr_now;
      end
    end
  end

  // a new word's syndromes may only arrive once the previous key equation is solved, and the
  // FIFO must never overflow; both follow from the KEQ_CYCLES <= N rule and the depth choice
  assert property (@(posedge clk) disable iff (!rst_n) syn_valid |-> !keq_busy)
    else $error("rs_decoder: key-equation solver still busy");
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> int'(fifo_count) < DEPTH)
    else $error("rs_decoder: FIFO overflow");

endmodule
