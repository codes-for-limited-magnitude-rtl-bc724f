// tb_secdaec_syndrome: a valid codeword gives a zero syndrome; an error on
// data position q gives column 6+q of H, an error on parity bit r gives the
// unit vector r, an in-cell double adjacent error gives the XOR of the two
// columns.
module tb_secdaec_syndrome;
  import ipdaec_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [21:0] u;
  logic [5:0]  p, s;

  secdaec_syndrome dut (.u_rd(u), .p_rd(p), .s(s));

  function automatic logic [5:0] col(input int c1);
    logic [5:0] v;
    for (int r = 1; r <= 6; r++) v[r-1] = hcol(r, c1);
    return v;
  endfunction

  function automatic logic [5:0] ref_p(input logic [21:0] v);
    logic [5:0] r = '0;
    for (int q = 1; q <= 22; q++) if (v[q-1]) r ^= col(6 + q);
    return r;
  endfunction

  task automatic check(input string what, input logic [5:0] exp);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: s=%b expected %b", what, s, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] base;
    int q, kind;
    for (int n = 0; n < 3000; n++) begin
      base = 22'($urandom);
      kind = n % 4;
      q = $urandom_range(1, 22);
      u = base; p = ref_p(base);
      case (kind)
        1: u[q-1] ^= 1'b1;
        2: p[(q-1) % 6] ^= 1'b1;
        3: begin q = 2 * ((q - 1) / 2) + 1; u[q-1] ^= 1'b1; u[q] ^= 1'b1; end
        default: ;
      endcase
      @(posedge clk);
      case (kind)
        0: check("clean", '0);
        1: check("single data", col(6 + q));
        2: check("single parity", 6'(1) << ((q - 1) % 6));
        default: check("cell DAE", col(6 + q) ^ col(7 + q));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
