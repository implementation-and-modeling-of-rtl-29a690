// rs_pe_last: simplified last processing element, index 3t of the iBA.
//
// For i = 3t the PE input delta_(3t+1) is always zero, and theta_3t starts at 1 and becomes 0
// for good the first time MC is 1. The update therefore reduces to
//   delta_3t(r+1) = hold(r) ? delta_0(r) : 0,      hold(r+1) = hold(r) & ~MC(r)
// which needs no multiplier: a hold register, a multiplexer and the delta register. init loads
// the start values delta_3t = 1 and hold = 1; en applies one iteration (in the resource-shared
// solver, once per iteration at its last clock). d is the registered delta_3t(r).
//
// Following the design: the hold signal, the multiplexer between delta_0 and zero, the output
// register. Own choice: the init and en controls.
module rs_pe_last #(
  parameter int M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic         mc,
  input  logic [M-1:0] d0,
  output logic [M-1:0] d,
  output logic         hold
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d    <= '0;
      hold <= 1'b0;
    end else if (init) begin
      d    <= M'(1);
      hold <= 1'b1;
    end else if (en) begin
      d    <= hold ? d0 : '0;
      hold <= hold & ~mc;
    end
  end

endmodule
