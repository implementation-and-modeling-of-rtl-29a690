// rs_dec_harness: stimulus and checker for one rs_decoder instance.
//
// Sends NWORDS random codewords (systematic RS(N, N-2T) encoding from rs_ref_pkg), each with
// a chosen number of symbol errors at random positions, highest-degree symbol first. The
// error counts cycle through 0, T, and random values 1..T, so both a clean word and a
// word with the maximum correctable number of errors always occur. With GAPS = 1 the input
// valid drops at random (about one clock in eight) during odd-numbered words; even-numbered
// words follow without any gap, so words also arrive exactly N clocks apart. Every output symbol is compared with the
// transmitted codeword, out_err with the error positions, out_first/out_last with the word
// boundaries and out_nerr with the number of errors. The latency from the first accepted
// symbol to the first output symbol is checked against LATENCY when the first word is
// sent without gaps. done rises once all words have come out.
module rs_dec_harness
  import rs_ref_pkg::*;
#(
  parameter int M       = 8,
  parameter int POLY    = 'h11D,
  parameter int N       = 255,
  parameter int T       = 8,
  parameter int FCR     = 0,
  parameter int NWORDS  = 6,
  parameter bit GAPS    = 1,
  parameter int LATENCY = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   in_valid,
  output logic [M-1:0]           in_data,
  input  logic                   out_valid,
  input  logic [M-1:0]           out_data,
  input  logic                   out_first,
  input  logic                   out_last,
  input  logic                   out_err,
  input  logic [$clog2(T+2)-1:0] out_nerr,
  output logic                   done,
  output int                     checks,
  output int                     failures,
  output int                     n_gaps,
  output int                     n_clean,
  output int                     n_full
);

  int cw_q  [NWORDS][];    // transmitted codewords
  int err_q [NWORDS][];    // error pattern (0 = no error)
  int nerr_q[NWORDS];
  longint cyc;
  longint t_first_in, t_first_out;

  initial begin
    gf_init(M, POLY);
    for (int w = 0; w < NWORDS; w++) begin
      int cw[];
      int nerr;
      cw = new[N];
      for (int j = 0; j < N; j++) cw[j] = (j < 2*T) ? 0 : int'($urandom_range((1 << M) - 1));
      encode(N, T, FCR, cw);
      cw_q[w] = cw;
      nerr = (w % 3 == 0) ? 0 : (w % 3 == 1) ? T : int'($urandom_range(T, 1));
      nerr_q[w] = nerr;
      err_q[w] = new[N];
      foreach (err_q[w][j]) err_q[w][j] = 0;
      for (int e = 0; e < nerr; e++) begin
        int p;
        do p = int'($urandom_range(N-1)); while (err_q[w][p] != 0);
        err_q[w][p] = int'($urandom_range((1 << M) - 1, 1));
      end
      if (nerr == 0) n_clean++;
      if (nerr == T) n_full++;
    end
  end

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // ---------------- stimulus ----------------
  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    n_gaps   = 0;
    t_first_in = -1;
    @(posedge rst_n);
    @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      for (int j = N - 1; j >= 0; j--) begin
        while (GAPS && w % 2 == 1 && $urandom_range(7) == 0) begin
          in_valid <= 1'b0;
          n_gaps++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= M'(cw_q[w][j] ^ err_q[w][j]);
        @(posedge clk);
        if (t_first_in < 0) t_first_in = cyc;
      end
    end
    in_valid <= 1'b0;
  end

  // ---------------- checker ----------------
  int ow, oj, ocount;
  initial begin
    ow = 0; oj = N - 1; ocount = 0; done = 0; checks = 0; failures = 0;
    t_first_out = -1;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && ow < NWORDS) begin
      if (t_first_out < 0) begin
        t_first_out = cyc;
        if (LATENCY > 0) begin
          checks++;
          if (t_first_out - t_first_in != LATENCY) begin
            failures++;
            $display("latency %0d, expected %0d", t_first_out - t_first_in, LATENCY);
          end
        end
      end
      checks++;
      if (int'(out_data) != cw_q[ow][oj]) begin
        failures++;
        if (failures < 10)
          $display("word %0d pos %0d: got %0h expected %0h", ow, oj, out_data, cw_q[ow][oj]);
      end
      checks++;
      if (out_err != (err_q[ow][oj] != 0)) begin
        failures++;
        if (failures < 10) $display("word %0d pos %0d: error flag %0b", ow, oj, out_err);
      end
      checks++;
      if (out_first != (oj == N - 1) || out_last != (oj == 0)) begin
        failures++;
        if (failures < 10) $display("word %0d pos %0d: boundary flags wrong", ow, oj);
      end
      if (oj == 0) begin
        checks++;
        if (int'(out_nerr) != nerr_q[ow]) begin
          failures++;
          $display("word %0d: nerr %0d expected %0d", ow, out_nerr, nerr_q[ow]);
        end
        ow++;
        oj = N - 1;
        if (ow == NWORDS) done = 1;
      end else oj--;
    end
  end

endmodule
