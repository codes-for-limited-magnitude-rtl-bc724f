// tb_secdaec_encoder: checks the (28,22) SEC-DAEC parity bits against the
// H matrix held in the reference package (column order p1..p6, then data),
// for all one-hot inputs and random inputs.
module tb_secdaec_encoder;
  import ipdaec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [21:0] u;
  logic [5:0]  p;

  secdaec_encoder dut (.u(u), .p(p));

  function automatic logic [5:0] ref_p(input logic [21:0] v);
    logic [5:0] r = '0;
    for (int row = 1; row <= 6; row++)
      for (int q = 1; q <= 22; q++)
        if (hcol(row, 6 + q)) r[row-1] ^= v[q-1];
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3022; n++) begin
      u = (n < 22) ? 22'(1) << n : 22'($urandom);
      @(posedge clk);
      checks++;
      if (p !== ref_p(u)) begin
        failures++;
        $display("FAIL u=%h p=%b expected %b", u, p, ref_p(u));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
