// tb_rs_syndrome: checks rs_syndrome against syndromes computed by rs_ref_pkg.
//
// Sends 5 words of N = 255 symbols, back to back apart from random gaps: valid codewords with
// and without errors and fully random words. After each word the 2T = 16 syndromes must equal
// r(alpha^i) and syn_valid must pulse exactly one clock after the last symbol; an all-zero
// syndrome set is expected for the error-free codewords.
module tb_rs_syndrome;
  import rs_ref_pkg::*;

  localparam int M = 8, POLY = 'h11D, N = 255, T = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid, syn_valid;
  logic [M-1:0] in_data;
  logic [M-1:0] syn [2*T];

  rs_syndrome #(.M(M), .POLY(POLY), .N(N), .T(T)) u_dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int w[], s[];
    in_valid = 0; in_data = 0;
    gf_init(M, POLY);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 5; k++) begin
      w = new[N];
      for (int j = 0; j < N; j++) w[j] = (j < 2*T) ? 0 : int'($urandom_range(255));
      if (k != 2) encode(N, T, 0, w);
      if (k >= 3) for (int e = 0; e < 3; e++) begin
        int p;
        p = int'($urandom_range(N-1));
        w[p] ^= int'($urandom_range(255, 1));
      end
      syndromes(w, T, 0, s);
      for (int j = N - 1; j >= 0; j--) begin
        while ($urandom_range(9) == 0) begin in_valid = 0; @(posedge clk); #1; end
        in_valid = 1; in_data = M'(w[j]);
        @(posedge clk);
        #1;
        checks++;
        if (syn_valid != (j == 0)) begin
          failures++; $display("word %0d symbol %0d: syn_valid = %0b", k, j, syn_valid);
        end
      end
      in_valid = 0;
      for (int i = 0; i < 2*T; i++) begin
        checks++;
        if (int'(syn[i]) != s[i]) begin
          failures++;
          $display("word %0d S%0d = %0h expected %0h", k, i, syn[i], s[i]);
        end
        if (k < 2) begin checks++; if (syn[i] != 0) failures++; end
      end
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
