// tb_rs_workloads: runs the decoder on the other codes it is meant to be configured for.
//
//   RS(255,223), t = 16 over GF(2^8)  (CCSDS code; 7 shared PEs by the sharing formula)
//   RS(204,188), t = 8  over GF(2^8)  (DVB code, shortened from 255; 2 shared PEs)
//   RS(31,25),   t = 3  over GF(2^5)  (small field, primitive polynomial x^5+x^2+1, 3 PEs,
//                                      one more than the sharing formula gives, so that the
//                                      key equation fits into a 31-clock codeword)
// Each instance decodes six words with 0, t and random numbers of errors, with input gaps
// in odd-numbered words and gap-free, back-to-back even-numbered words, and checks every
// output symbol and the first-word latency
// N + 2t*ceil(3t/NPE) + PIPE + 6.
module tb_rs_workloads;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 6;

  // ---------------- RS(255,223) ----------------
  localparam int A_N = 255, A_T = 16, A_NPE = 7;
  logic       a_iv, a_ov, a_of, a_ol, a_oe, a_done;
  logic [7:0] a_id, a_od;
  logic [$clog2(A_T+2)-1:0] a_nerr;
  int a_checks, a_fail, a_gaps, a_clean, a_full;

  rs_decoder #(.M(8), .N(A_N), .T(A_T)) u_a (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_data(a_od),
    .out_first(a_of), .out_last(a_ol), .out_err(a_oe), .out_nerr(a_nerr)
  );
  rs_dec_harness #(.M(8), .N(A_N), .T(A_T), .NWORDS(NW),
                   .LATENCY(A_N + 2*A_T*((3*A_T + A_NPE - 1)/A_NPE) + 7)) u_ha (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .out_valid(a_ov), .out_data(a_od),
    .out_first(a_of), .out_last(a_ol), .out_err(a_oe), .out_nerr(a_nerr), .done(a_done),
    .checks(a_checks), .failures(a_fail), .n_gaps(a_gaps), .n_clean(a_clean), .n_full(a_full)
  );

  // ---------------- RS(204,188) ----------------
  localparam int B_N = 204, B_T = 8, B_NPE = 2;
  logic       b_iv, b_ov, b_of, b_ol, b_oe, b_done;
  logic [7:0] b_id, b_od;
  logic [$clog2(B_T+2)-1:0] b_nerr;
  int b_checks, b_fail, b_gaps, b_clean, b_full;

  rs_decoder #(.M(8), .N(B_N), .T(B_T)) u_b (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_data(b_od),
    .out_first(b_of), .out_last(b_ol), .out_err(b_oe), .out_nerr(b_nerr)
  );
  rs_dec_harness #(.M(8), .N(B_N), .T(B_T), .NWORDS(NW),
                   .LATENCY(B_N + 2*B_T*((3*B_T + B_NPE - 1)/B_NPE) + 7)) u_hb (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .out_valid(b_ov), .out_data(b_od),
    .out_first(b_of), .out_last(b_ol), .out_err(b_oe), .out_nerr(b_nerr), .done(b_done),
    .checks(b_checks), .failures(b_fail), .n_gaps(b_gaps), .n_clean(b_clean), .n_full(b_full)
  );

  // ---------------- RS(31,25) over GF(2^5) ----------------
  localparam int C_N = 31, C_T = 3, C_NPE = 3;
  logic       c_iv, c_ov, c_of, c_ol, c_oe, c_done;
  logic [4:0] c_id, c_od;
  logic [$clog2(C_T+2)-1:0] c_nerr;
  int c_checks, c_fail, c_gaps, c_clean, c_full;

  rs_decoder #(.M(5), .POLY('h25), .N(C_N), .T(C_T), .NPE(C_NPE)) u_c (
    .clk, .rst_n, .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od),
    .out_first(c_of), .out_last(c_ol), .out_err(c_oe), .out_nerr(c_nerr)
  );
  rs_dec_harness #(.M(5), .POLY('h25), .N(C_N), .T(C_T), .NWORDS(NW),
                   .LATENCY(C_N + 2*C_T*((3*C_T + C_NPE - 1)/C_NPE) + 7)) u_hc (
    .clk, .rst_n, .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od),
    .out_first(c_of), .out_last(c_ol), .out_err(c_oe), .out_nerr(c_nerr), .done(c_done),
    .checks(c_checks), .failures(c_fail), .n_gaps(c_gaps), .n_clean(c_clean), .n_full(c_full)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done && c_done);
    $display("RS(255,223): checks %0d failures %0d", a_checks, a_fail);
    $display("RS(204,188): checks %0d failures %0d", b_checks, b_fail);
    $display("RS(31,25):   checks %0d failures %0d", c_checks, c_fail);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_fail + b_fail + c_fail);
    $finish;
  end

  initial begin
    repeat (NW * 255 * 3 + 5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_fail + b_fail + c_fail + 1);
    $finish;
  end

endmodule
