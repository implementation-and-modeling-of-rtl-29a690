// rs_inv_rom: inverter ROM, a^-1 in GF(2^M) (0 maps to 0).
//
// The Forney division Omega / Lambda_odd is done as a table lookup of 1/Lambda_odd followed by
// a multiplication. The table has 2^M words of M bits. Its contents are generated when the
// ROM is elaborated from the primitive polynomial: walking the powers alpha^e, e = 0..2^M-2,
// the word at address alpha^e receives alpha^((2^M-1-e) mod (2^M-1)). The read is
// synchronous (address registered into a ROM output register, one clock latency), the way an
// FPGA embedded memory block behaves; this ROM is what limits the clock of the whole decoder.
//
// Following the design: a ROM holding the inverses. Own choice: the synchronous read.
module rs_inv_rom
  import rs_pkg::*;
#(
  parameter int M    = 8,
  parameter int POLY = 'h11D
) (
  input  logic         clk,
  input  logic [M-1:0] addr,
  output logic [M-1:0] data
);

  localparam int Q = 1 << M;

  logic [M-1:0] rom [Q];

  initial begin
    gf_t a;
    logic [M-1:0] pw [Q];
    a = gf_t'(1);
    for (int e = 0; e < Q-1; e++) begin
      pw[e] = a[M-1:0];
      a     = gf_mul(a, gf_t'(2), M, POLY);
    end
    rom[0] = '0;
    for (int e = 0; e < Q-1; e++) rom[pw[e]] = pw[(Q-1-e) % (Q-1)];
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
