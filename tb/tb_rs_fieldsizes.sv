// tb_rs_fieldsizes: runs the decoder over other symbol widths of the supported range.
//
//   RS(7,5),     t = 1 over GF(2^3), x^3+x+1,  PIPE = 0 (combinational calculation unit;
//                                    with a pipeline stage the 2-clock iteration is too short)
//   RS(15,11),   t = 2 over GF(2^4), x^4+x+1   (2 shared PEs)
//   RS(511,495), t = 8 over GF(2^9), x^9+x^4+1 (1 shared PE, 24 clocks per iteration)
// Each instance decodes six words with 0, t and random numbers of errors (input gaps in
// odd-numbered words, the others gap-free and back to back) and checks every output symbol
// and the first-word latency.
module tb_rs_fieldsizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 6;

  // ---------------- RS(7,5), m = 3 ----------------
  localparam int A_N = 7, A_T = 1, A_NPE = 2;
  logic       a_iv, a_ov, a_of, a_ol, a_oe, a_done;
  logic [2:0] a_id, a_od;
  logic [$clog2(A_T+2)-1:0] a_nerr;
  int a_checks, a_fail, a_gaps, a_clean, a_full;

  rs_decoder #(.M(3), .POLY('hB), .N(A_N), .T(A_T), .PIPE(0)) u_a (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_data(a_od),
    .out_first(a_of), .out_last(a_ol), .out_err(a_oe), .out_nerr(a_nerr)
  );
  rs_dec_harness #(.M(3), .POLY('hB), .N(A_N), .T(A_T), .NWORDS(NW),
                   .LATENCY(A_N + 2*A_T*((3*A_T + A_NPE - 1)/A_NPE) + 6)) u_ha (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_data(a_od),
    .out_first(a_of), .out_last(a_ol), .out_err(a_oe), .out_nerr(a_nerr), .done(a_done),
    .checks(a_checks), .failures(a_fail), .n_gaps(a_gaps), .n_clean(a_clean), .n_full(a_full)
  );

  // ---------------- RS(15,11), m = 4 ----------------
  localparam int B_N = 15, B_T = 2, B_NPE = 2;
  logic       b_iv, b_ov, b_of, b_ol, b_oe, b_done;
  logic [3:0] b_id, b_od;
  logic [$clog2(B_T+2)-1:0] b_nerr;
  int b_checks, b_fail, b_gaps, b_clean, b_full;

  rs_decoder #(.M(4), .POLY('h13), .N(B_N), .T(B_T)) u_b (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_data(b_od),
    .out_first(b_of), .out_last(b_ol), .out_err(b_oe), .out_nerr(b_nerr)
  );
  rs_dec_harness #(.M(4), .POLY('h13), .N(B_N), .T(B_T), .NWORDS(NW),
                   .LATENCY(B_N + 2*B_T*((3*B_T + B_NPE - 1)/B_NPE) + 7)) u_hb (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_data(b_od),
    .out_first(b_of), .out_last(b_ol), .out_err(b_oe), .out_nerr(b_nerr), .done(b_done),
    .checks(b_checks), .failures(b_fail), .n_gaps(b_gaps), .n_clean(b_clean), .n_full(b_full)
  );

  // ---------------- RS(511,495), m = 9 ----------------
  localparam int C_N = 511, C_T = 8, C_NPE = 1;
  logic       c_iv, c_ov, c_of, c_ol, c_oe, c_done;
  logic [8:0] c_id, c_od;
  logic [$clog2(C_T+2)-1:0] c_nerr;
  int c_checks, c_fail, c_gaps, c_clean, c_full;

  rs_decoder #(.M(9), .POLY('h211), .N(C_N), .T(C_T)) u_c (
    .clk, .rst_n, .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od),
    .out_first(c_of), .out_last(c_ol), .out_err(c_oe), .out_nerr(c_nerr)
  );
  rs_dec_harness #(.M(9), .POLY('h211), .N(C_N), .T(C_T), .NWORDS(NW),
                   .LATENCY(C_N + 2*C_T*((3*C_T + C_NPE - 1)/C_NPE) + 7)) u_hc (
    .clk, .rst_n, .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od),
    .out_first(c_of), .out_last(c_ol), .out_err(c_oe), .out_nerr(c_nerr), .done(c_done),
    .checks(c_checks), .failures(c_fail), .n_gaps(c_gaps), .n_clean(c_clean), .n_full(c_full)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done && c_done);
    $display("RS(7,5):     checks %0d failures %0d", a_checks, a_fail);
    $display("RS(15,11):   checks %0d failures %0d", b_checks, b_fail);
    $display("RS(511,495): checks %0d failures %0d", c_checks, c_fail);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_fail + b_fail + c_fail);
    $finish;
  end

  initial begin
    repeat (NW * 511 * 3 + 5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_fail + b_fail + c_fail + 1);
    $finish;
  end

endmodule
