// tb_rs_forney: checks the Forney stage with random Chien-search sums.
//
// Every clock a random triple (Lambda_even, Lambda_odd, Omega) is applied, in a third of the
// clocks with Lambda_even = Lambda_odd so that the position is a root. Two clocks later
// out_err must flag the root and out_e must be Omega / Lambda_odd there and 0 elsewhere;
// valid/first/last must arrive with the same two-clock delay.
module tb_rs_forney;
  import rs_ref_pkg::*;

  localparam int M = 8, POLY = 'h11D;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid, in_first, in_last, out_valid, out_first, out_last, out_err;
  logic [M-1:0] lam_even, lam_odd, om_val, out_e;

  rs_forney #(.M(M), .POLY(POLY)) u_dut (.*);

  int checks = 0, failures = 0, n_roots = 0;
  int q_e[$], q_f[$];

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; lam_even = 0; lam_odd = 0; om_val = 0;
    gf_init(M, POLY);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      bit root;
      @(negedge clk);
      if (k >= 2) begin
        int ee, ff;
        ee = q_e.pop_front(); ff = q_f.pop_front();
        checks++;
        if (int'(out_e) != ee || out_err != ff[0] || out_valid != ff[1] ||
            out_first != ff[2] || out_last != ff[3]) begin
          failures++;
          if (failures < 10) $display("step %0d: e %0h/%0h flags %0b%0b%0b%0b/%0h", k, out_e, ee,
                                      out_last, out_first, out_valid, out_err, ff);
        end
      end
      in_valid = ($urandom_range(7) != 0);
      in_first = 1'($urandom); in_last = 1'($urandom);
      lam_odd  = M'($urandom); om_val = M'($urandom);
      lam_even = ($urandom_range(2) == 0) ? lam_odd : M'($urandom);
      root = in_valid && (lam_even == lam_odd);
      if (root) n_roots++;
      q_e.push_back(root ? mul(int'(om_val), inv(int'(lam_odd))) : 0);
      q_f.push_back({in_last, in_first, in_valid, root});
    end
    checks++;
    if (n_roots == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
