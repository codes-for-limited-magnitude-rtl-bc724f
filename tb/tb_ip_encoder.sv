// tb_ip_encoder: checks the interleaved parity generator.
// Three instances: t=3 over 8 bits (the worked example "10010111" must give
// parity 111), the IP-DAEC default (t=1 over 10 bits) and t=4 over 13 bits,
// each against Eq. p_i = d_i ^ d_{i+t} ^ ... evaluated on random data.
module tb_ip_encoder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  d8;   logic [2:0] p8;
  logic [9:0]  d10;  logic [0:0] p10;
  logic [12:0] d13;  logic [3:0] p13;

  ip_encoder #(.K(8),  .T(3)) u_k8  (.d(d8),  .p(p8));
  ip_encoder                  u_def (.d(d10), .p(p10));
  ip_encoder #(.K(13), .T(4)) u_k13 (.d(d13), .p(p13));

  // Eq. (1), 1-based: p_i = XOR of d_{i+jt}.
  function automatic logic [15:0] ref_ip(input logic [15:0] dv, input int k, input int t);
    logic [15:0] p = '0;
    for (int i = 1; i <= t; i++)
      for (int m = i; m <= k; m += t) p[i-1] ^= dv[m-1];
    return p;
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    // Worked example: data d8..d1 = 10010111 gives p3 p2 p1 = 111.
    d8 = 8'b10010111; d10 = '0; d13 = '0;
    #1 check("fig example", 16'(p8), 16'b111);
    for (int n = 0; n < 2000; n++) begin
      d8 = 8'($urandom); d10 = 10'($urandom); d13 = 13'($urandom);
      @(posedge clk);
      check("K8T3",  16'(p8),  ref_ip(16'(d8),  8, 3));
      check("K10T1", 16'(p10), ref_ip(16'(d10), 10, 1));
      check("K13T4", 16'(p13), ref_ip(16'(d13), 13, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
