// tb_rs_fifo: checks the FIFO RAM against a queue model with DEPTH = 16.
//
// Random writes and reads (never writing when full, never reading when empty) for 5000
// clocks, with phases biased towards filling and towards draining so that the full and
// empty ends and pointer wrap-around are all reached. Read data (one clock after rd_en) and
// count are compared with the model.
module tb_rs_fifo;
  localparam int W = 8, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  rs_fifo #(.W(W), .DEPTH(DEPTH)) u_dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  int q[$];
  int expect_rd;
  bit rd_pend;

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0; rd_pend = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int bias;
      @(negedge clk);
      if (rd_pend) begin
        checks++;
        if (int'(rd_data) != expect_rd) begin failures++; $display("data %0h/%0h", rd_data, expect_rd); end
      end
      checks++;
      if (int'(count) != q.size()) begin failures++; $display("count %0d/%0d", count, q.size()); end
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      bias = ((k / 200) % 2 == 0) ? 6 : 2;
      wr_en = (q.size() < DEPTH) && ($urandom_range(7) < bias);
      rd_en = (q.size() > 0) && ($urandom_range(7) < 8 - bias);
      wr_data = W'($urandom);
      rd_pend = rd_en;
      if (rd_en) expect_rd = q.pop_front();
      if (wr_en) q.push_back(int'(wr_data));
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full/empty not reached"); end
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
