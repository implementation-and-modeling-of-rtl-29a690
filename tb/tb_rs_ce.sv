// tb_rs_ce: checks the control element against a behavioural model of the iBA control rules.
//
// After init: delta_0 = S_0, gamma = 1, k = 0. Each enabled step: MC = (delta_0 != 0 and
// k >= 0); with MC = 1 gamma takes delta_0 and k becomes -(k+1), otherwise k increments;
// delta_0 takes the supplied next value. delta_0 is zero in about a quarter of the steps so
// both MC values occur often. MC, gamma and delta_0 are compared every clock.
module tb_rs_ce;
  localparam int M = 8, T = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         init, en, mc;
  logic [M-1:0] init_d0, d0_next, d0, gamma;

  rs_ce #(.M(M), .T(T)) u_dut (.*);

  int checks = 0, failures = 0;
  int m_d0, m_g, m_k, n_mc1 = 0;
  bit m_mc;

  initial begin
    init = 0; en = 0; init_d0 = 0; d0_next = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      init = 1; init_d0 = ($urandom_range(3) == 0) ? 0 : M'($urandom);
      m_d0 = int'(init_d0); m_g = 1; m_k = 0;
      @(posedge clk); #1; init = 0;
      for (int s = 0; s < 2*T; s++) begin
        m_mc = (m_d0 != 0) && (m_k >= 0);
        checks++;
        if (mc != m_mc || int'(d0) != m_d0 || int'(gamma) != m_g) begin
          failures++;
          $display("run %0d step %0d: mc %0b/%0b d0 %0h/%0h gamma %0h/%0h", run, s, mc, m_mc,
                   d0, m_d0, gamma, m_g);
        end
        en = 1'($urandom_range(3) != 0);
        d0_next = ($urandom_range(3) == 0) ? 0 : M'($urandom);
        if (en) begin
          if (m_mc) begin m_g = m_d0; m_k = -(m_k + 1); n_mc1++; end
          else m_k = m_k + 1;
          m_d0 = int'(d0_next);
        end
        @(posedge clk); #1;
      end
      en = 0;
    end
    checks++;
    if (n_mc1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
