// tb_ip_syndrome: checks the interleaved parity syndrome.
// The worked example (8 data bits, t=3, data 10010111, parity 111) gives
// syndrome 000 when error free and 111 when d1..d3 are flipped. Random
// errors confined to t adjacent bits must give their pattern rotated into
// place; the IP-DAEC default (t=1 over 10 bits) is checked the same way.
module tb_ip_syndrome;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] d8;  logic [2:0] p8, s8;
  logic [9:0] d10; logic [0:0] p10, s10;

  ip_syndrome #(.K(8), .T(3)) u_k8  (.d_rd(d8),  .p_rd(p8),  .s(s8));
  ip_syndrome                 u_def (.d_rd(d10), .p_rd(p10), .s(s10));

  function automatic logic [2:0] par3(input logic [7:0] v);
    logic [2:0] p = '0;
    for (int m = 0; m < 8; m++) p[m % 3] ^= v[m];
    return p;
  endfunction

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
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
    logic [7:0] data, e;
    int pos, len;
    d10 = '0; p10 = '0;
    d8 = 8'b10010111; p8 = 3'b111;
    #1 check("example error free", 4'(s8), 4'b000);
    d8 = 8'b10010000;
    #1 check("example d1..d3 flipped", 4'(s8), 4'b111);
    for (int n = 0; n < 3000; n++) begin
      data = 8'($urandom);
      pos = $urandom_range(0, 7);
      len = $urandom_range(0, 3);
      e = 8'((((1 << len) - 1) & $urandom) << pos);
      d8 = data ^ e;
      p8 = par3(data);
      d10 = 10'($urandom);
      p10 = ^d10;
      if (n % 2 == 1) begin d10[pos] ^= 1'b1; end
      @(posedge clk);
      check("K8T3 burst", 4'(s8), 4'(par3(e)));
      check("K10T1", 4'(s10), 4'(n % 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
