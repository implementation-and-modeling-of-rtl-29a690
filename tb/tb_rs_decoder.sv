// tb_rs_decoder: end-to-end test of rs_decoder at its default size, RS(255,239) over GF(2^8).
//
// Eight codewords stream through the decoder, the first without input gaps (its latency is
// checked); odd-numbered words have random input gaps, even-numbered ones follow gap-free,
// so words also arrive exactly 255 clocks apart. Error counts per word are 0, 8 and random.
// rs_dec_harness checks every output symbol. Besides, the test counts how often the
// internal mechanisms of the key-equation solver occur and fails if one never does:
// iterations with MC = 1 (register swap) and MC = 0, the hold signal of the last PE
// dropping, the last-PE operand multiplexer being selected, a new word's syndromes being
// computed while the previous word's key equation is solved, a Chien load in the last clock
// of the previous scan (words exactly N clocks apart), and input gaps.
module tb_rs_decoder;

  localparam int M = 8, N = 255, T = 8, NPE = 2, PIPE = 1;
  localparam int G = (3*T + NPE - 1) / NPE;
  localparam int NWORDS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   in_valid, out_valid, out_first, out_last, out_err;
  logic [M-1:0]           in_data, out_data;
  logic [$clog2(T+2)-1:0] out_nerr;

  rs_decoder u_dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_first, .out_last,
    .out_err, .out_nerr
  );

  logic done;
  int   checks, failures, n_gaps, n_clean, n_full;

  rs_dec_harness #(.M(M), .N(N), .T(T), .NWORDS(NWORDS), .GAPS(1),
                   .LATENCY(N + 2*T*G + PIPE + 6)) u_h (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_first, .out_last,
    .out_err, .out_nerr, .done, .checks, .failures, .n_gaps, .n_clean, .n_full
  );

  // mechanism counters (observed inside the key-equation solver)
  int n_mc1, n_mc0, n_hold_drop, n_last_mux, n_overlap, n_b2b;
  logic hold_q;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_iba.iter_end &&  u_dut.u_iba.mc) n_mc1++;
    if (u_dut.u_iba.iter_end && !u_dut.u_iba.mc) n_mc0++;
    if (hold_q && !u_dut.u_iba.pl_hold) n_hold_drop++;
    hold_q <= u_dut.u_iba.pl_hold;
    if (u_dut.u_iba.issuing && u_dut.u_iba.sel_last[NPE-1]) n_last_mux++;
    if (u_dut.u_iba.busy && in_valid) n_overlap++;
    if (u_dut.u_chien.load && u_dut.u_chien.run) n_b2b++;
  end

  task automatic need(input string what, input int n);
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    hold_q = 1'b0;
    n_mc1 = 0; n_mc0 = 0; n_hold_drop = 0; n_last_mux = 0; n_overlap = 0; n_b2b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    need("MC=1 iterations", n_mc1);
    need("MC=0 iterations", n_mc0);
    need("last-PE hold drops", n_hold_drop);
    need("last-PE operand selections", n_last_mux);
    need("syndrome/key-equation overlap cycles", n_overlap);
    need("Chien loads in the last clock of a scan (back-to-back words)", n_b2b);
    need("input gaps", n_gaps);
    need("clean words", n_clean);
    need("words with T errors", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 9, failures);
    $finish;
  end

  initial begin
    repeat (NWORDS * N * 2 + 5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
