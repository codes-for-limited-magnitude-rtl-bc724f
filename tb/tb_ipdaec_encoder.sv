// tb_ipdaec_encoder: the 13-cell stored word must match the reference
// encoding (IP bit over d3, d6, ..., d30; SEC-DAEC parity from H; cells laid
// out as d1..d32, p_ip, p1..p6) for the worked example data 0xFFFFFFFB,
// all-zero, all-one, one-hot and random data.
module tb_ipdaec_encoder;
  import ipdaec_ref_pkg::*;
  import ipdaec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  data_t     data;
  codeword_t cw;

  ipdaec_encoder dut (.data(data), .cw(cw));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3035; n++) begin
      if (n == 0)      data = 32'hFFFF_FFFB;
      else if (n == 1) data = '0;
      else if (n == 2) data = '1;
      else if (n < 35) data = 32'(1) << (n - 3);
      else             data = $urandom;
      @(posedge clk);
      checks++;
      if (39'(cw) !== ref_encode(data)) begin
        failures++;
        $display("FAIL data=%h cw=%h expected %h", data, 39'(cw), ref_encode(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
