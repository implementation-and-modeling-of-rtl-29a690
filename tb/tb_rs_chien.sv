// tb_rs_chien: checks the Chien search on a shortened code, N = 204, T = 8 over GF(2^8).
//
// Random Lambda and Omega polynomials are loaded, every other scan immediately after the
// previous one (load in its last clock); for each of the N positions j (from N-1
// down to 0) the registered outputs must equal the even and odd parts of Lambda(alpha^-j)
// and Omega(alpha^-j) * alpha^(-j*2T), computed by rs_ref_pkg. out_valid must last exactly N
// clocks, starting two clocks after load, with out_first/out_last on the end positions.
module tb_rs_chien;
  import rs_ref_pkg::*;

  localparam int M = 8, POLY = 'h11D, N = 204, T = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load, out_valid, out_first, out_last;
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega [T];
  logic [M-1:0] lam_even, lam_odd, om_val;

  rs_chien #(.M(M), .POLY(POLY), .N(N), .T(T)) u_dut (.*);

  int checks = 0, failures = 0;

  localparam int K = 6;
  int lam_all [K][T+1];
  int om_all  [K][T];

  task automatic apply(input int k);
    for (int i = 0; i <= T; i++) lambda[i] = M'(lam_all[k][i]);
    for (int i = 0; i < T; i++)  omega[i]  = M'(om_all[k][i]);
  endtask

  // even-numbered scans are followed by a load in their last clock (back to back)
  initial begin
    int le[], lo[], om[];
    int x;
    bit pending;
    load = 0;
    foreach (lambda[i]) lambda[i] = 0;
    foreach (omega[i]) omega[i] = 0;
    gf_init(M, POLY);
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i <= T; i++) lam_all[k][i] = int'($urandom_range(255));
      for (int i = 0; i < T; i++)  om_all[k][i]  = int'($urandom_range(255));
    end
    pending = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++) begin
      le = new[T+1]; lo = new[T+1]; om = new[T];
      for (int i = 0; i <= T; i++) begin
        le[i] = (i % 2 == 0) ? lam_all[k][i] : 0;
        lo[i] = (i % 2 == 1) ? lam_all[k][i] : 0;
      end
      for (int i = 0; i < T; i++) om[i] = om_all[k][i];
      if (!pending) begin
        @(negedge clk); apply(k); load = 1;
        @(negedge clk); load = 0;
        checks++;
        if (out_valid) begin failures++; $display("valid too early"); end
      end
      pending = 0;
      for (int j = N - 1; j >= 0; j--) begin
        @(negedge clk);
        x = apow(-j);
        checks++;
        if (!out_valid || out_first != (j == N-1) || out_last != (j == 0)) begin
          failures++; $display("scan %0d flags wrong at %0d", k, j);
        end
        checks++;
        if (int'(lam_even) != peval(le, x) || int'(lam_odd) != peval(lo, x) ||
            int'(om_val) != mul(peval(om, x), apow(-j * 2 * T))) begin
          failures++;
          if (failures < 10) $display("scan %0d pos %0d: %0h %0h %0h", k, j, lam_even, lam_odd, om_val);
        end
        if (j == 1 && k % 2 == 0 && k < K - 1) begin apply(k + 1); load = 1; pending = 1; end
        if (j == 0) load = 0;
      end
      if (!pending) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("valid too long"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
