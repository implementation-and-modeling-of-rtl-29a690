// tb_rs_iba: checks the resource-shared key-equation solver, T = 8 over GF(2^8), 2 PEs.
//
// For 40 error patterns of 0 to 8 errors on the all-zero codeword (a valid codeword) the
// syndromes are computed by rs_ref_pkg and the solver is started. Lambda and Omega must
// equal the unshared reference algorithm, Lambda must vanish at X^-1 for every error
// locator X, done must come exactly 2T*G + PIPE + 1 = 194 clocks after start, and busy
// must be high in between.
module tb_rs_iba;
  import rs_ref_pkg::*;

  localparam int M = 8, POLY = 'h11D, N = 255, T = 8, NPE = 2, PIPE = 1;
  localparam int G = (3*T + NPE - 1) / NPE;
  localparam int LAT = 2*T*G + PIPE + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  logic [M-1:0] syn [2*T];
  logic [M-1:0] lambda [T+1];
  logic [M-1:0] omega [T];

  rs_iba #(.M(M), .POLY(POLY), .T(T), .NPE(NPE), .PIPE(PIPE)) u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int e[], s[], lam[], om[], lv[];
    int nerr, cycles;
    start = 0;
    foreach (syn[i]) syn[i] = 0;
    gf_init(M, POLY);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 40; k++) begin
      nerr = k % (T + 1);
      e = new[N];
      foreach (e[j]) e[j] = 0;
      for (int q = 0; q < nerr; q++) begin
        int p;
        do p = int'($urandom_range(N-1)); while (e[p] != 0);
        e[p] = int'($urandom_range(255, 1));
      end
      syndromes(e, T, 0, s);
      key_equation(s, T, lam, om);
      for (int i = 0; i < 2*T; i++) syn[i] = M'(s[i]);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cycles = 1;
      while (!done) begin
        checks++;
        if (!busy) begin failures++; $display("busy low while solving"); end
        @(posedge clk); #1;
        cycles++;
        if (cycles > 1000) break;
      end
      checks++;
      if (cycles != LAT) begin failures++; $display("latency %0d expected %0d", cycles, LAT); end
      for (int i = 0; i <= T; i++) begin
        checks++;
        if (int'(lambda[i]) != lam[i]) begin
          failures++; $display("pattern %0d Lambda%0d %0h expected %0h", k, i, lambda[i], lam[i]);
        end
      end
      for (int i = 0; i < T; i++) begin
        checks++;
        if (int'(omega[i]) != om[i]) begin
          failures++; $display("pattern %0d Omega%0d %0h expected %0h", k, i, omega[i], om[i]);
        end
      end
      lv = new[T+1];
      foreach (lv[i]) lv[i] = int'(lambda[i]);
      foreach (e[j]) if (e[j] != 0) begin
        checks++;
        if (peval(lv, apow(-j)) != 0) begin failures++; $display("no root at %0d", j); end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
