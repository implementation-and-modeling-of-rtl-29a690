// tb_rs_pe_last: checks the simplified last PE against a behavioural model.
//
// After init the register must hold 1 and hold must be high. On each enabled step the new
// value is delta_0 while hold is high and 0 afterwards; hold falls at the first step with
// MC = 1 and stays low. Random steps with and without enable are applied.
module tb_rs_pe_last;
  localparam int M = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         init, en, mc, hold;
  logic [M-1:0] d0, d;

  rs_pe_last #(.M(M)) u_dut (.*);

  int checks = 0, failures = 0;
  int md, mh;

  initial begin
    init = 0; en = 0; mc = 0; d0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      init = 1; @(posedge clk); #1; init = 0;
      md = 1; mh = 1;
      checks++;
      if (int'(d) != 1 || !hold) begin failures++; $display("bad init"); end
      for (int s = 0; s < 16; s++) begin
        en = 1'($urandom); mc = ($urandom_range(4) == 0); d0 = M'($urandom);
        if (en) begin md = mh ? int'(d0) : 0; mh = mh & !mc; end
        @(posedge clk); #1;
        checks++;
        if (int'(d) != md || hold != 1'(mh)) begin
          failures++;
          $display("run %0d step %0d: d=%0h/%0h hold=%0b/%0d", run, s, d, md, hold, mh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
