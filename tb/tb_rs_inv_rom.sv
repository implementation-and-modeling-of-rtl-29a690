// tb_rs_inv_rom: checks every word of the inverter ROM for GF(2^8) and GF(2^5).
//
// For each address a the registered output, one clock later, must satisfy a * data = 1
// (products from rs_ref_pkg tables), and address 0 must read 0.
module tb_rs_inv_rom;
  import rs_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] addr8, data8;
  logic [4:0] addr5, data5;

  rs_inv_rom #(.M(8), .POLY('h11D)) u_dut8 (.clk, .addr(addr8), .data(data8));
  rs_inv_rom #(.M(5), .POLY('h25))  u_dut5 (.clk, .addr(addr5), .data(data5));

  int checks = 0, failures = 0;

  initial begin
    gf_init(8, 'h11D);
    for (int a = 0; a < 256; a++) begin
      addr8 = 8'(a);
      @(posedge clk); #1;
      checks++;
      if ((a == 0) ? (data8 != 0) : (mul(a, int'(data8)) != 1)) begin
        failures++; $display("GF(2^8) inverse of %0h: %0h", a, data8);
      end
    end
    gf_init(5, 'h25);
    for (int a = 0; a < 32; a++) begin
      addr5 = 5'(a);
      @(posedge clk); #1;
      checks++;
      if ((a == 0) ? (data5 != 0) : (mul(a, int'(data5)) != 1)) begin
        failures++; $display("GF(2^5) inverse of %0h: %0h", a, data5);
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
