// tb_rs_pe: checks one iBA processing element with the pipelined calculation unit (PIPE = 1).
//
// Random operands are applied every clock; one clock later delta_out must equal
// gamma*delta_next + theta*delta_0 and theta_out must equal delta_next when MC = 1, theta
// otherwise, with the products from the reference tables of rs_ref_pkg.
module tb_rs_pe;
  import rs_ref_pkg::*;

  localparam int M = 8, POLY = 'h11D;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] d_next, theta, d0, gamma, d_out, theta_out;
  logic         mc;

  rs_pe #(.M(M), .POLY(POLY), .PIPE(1)) u_dut (.*);

  int checks = 0, failures = 0;
  int exp_d, exp_t;

  initial begin
    gf_init(M, POLY);
    for (int k = 0; k < 2000; k++) begin
      d_next = M'($urandom); theta = M'($urandom); d0 = M'($urandom);
      gamma = M'($urandom);  mc = 1'($urandom);
      if (k % 17 == 0) d0 = 0;
      exp_d = mul(int'(gamma), int'(d_next)) ^ mul(int'(theta), int'(d0));
      exp_t = mc ? int'(d_next) : int'(theta);
      @(posedge clk);
      #1;
      checks += 2;
      if (int'(d_out) != exp_d) begin failures++; $display("delta mismatch %0h %0h", d_out, exp_d); end
      if (int'(theta_out) != exp_t) begin failures++; $display("theta mismatch"); end
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
