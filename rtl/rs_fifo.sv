// rs_fifo: FIFO RAM holding the received symbols until their corrections are ready.
//
// A dual-port RAM of DEPTH words of W bits with write and read pointers. wr_en stores wr_data;
// rd_en reads the oldest word, which appears on rd_data one clock later (synchronous RAM
// read). count gives the number of stored words. The decoder needs it to hold one codeword
// plus the symbols that arrive while that codeword's key equation is solved (less than 2N
// symbols); the default depth 512 covers N = 255. Writing when full or reading when empty is
// a usage error, checked by assertions.
//
// Following the design: a FIFO RAM delaying the received word. Own choices: the depth, the
// pointer organisation and the synchronous read.
module rs_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = $clog2(DEPTH);
  localparam int CNW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
    if (rd_en) rd_data <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + CNW'(wr_en) - CNW'(rd_en);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (int'(count) < DEPTH) || rd_en)
    else $error("rs_fifo: write while full");
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != 0)
    else $error("rs_fifo: read while empty");

endmodule
