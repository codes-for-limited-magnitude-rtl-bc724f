// tb_ipdaec_decoder: every cell of encoded random words is moved by -4..+4
// levels (saturating at the ends of the level range) and decoded.
//   magnitude 1..3 : the original data, correct_data = 1 (status CORRECTED
//                    for a data cell, PARITY_CELL for a parity cell);
//   magnitude 4    : only the upper bit moves; in a data cell this is
//                    detected but not correctable (data as read,
//                    correct_data = 0), in a parity cell the data is intact.
// The worked example (data 0xFFFFFFFB, cell d3..d1 moved from 011 to 100 by a
// magnitude-1 error) must give the original data and correct_data = 1.
module tb_ipdaec_decoder;
  import ipdaec_ref_pkg::*;
  import ipdaec_pkg::*;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  logic clk = 0;
  always #5 clk = ~clk;

  codeword_t   cw;
  data_t       data;
  logic        correct_data;
  dec_status_t status;

  ipdaec_decoder dut (.cw(cw), .data(data), .correct_data(correct_data), .status(status));

  task automatic expect_out(input string what, input logic [31:0] ed, input logic ec,
                            input dec_status_t es);
    checks++;
    seen[es]++;
    if (data !== ed || correct_data !== ec || status !== es) begin
      failures++;
      $display("FAIL %s: data=%h cd=%b st=%0d expected %h %b %0d",
               what, data, correct_data, status, ed, ec, es);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    logic [38:0] good, bad;
    int m;
    // Worked example.
    w = 32'hFFFF_FFFB;
    good = ref_encode(w);
    cw = codeword_t'(good);
    @(posedge clk) expect_out("example clean", w, 1'b1, DEC_CLEAN);
    bad = ref_shift(good, 0, 1);
    checks++;
    if (bad[2:0] !== 3'b100) begin failures++; $display("FAIL example cell"); end
    cw = codeword_t'(bad);
    @(posedge clk) expect_out("example mag-1", w, 1'b1, DEC_CORRECTED);

    for (int n = 0; n < 400; n++) begin
      w = (n == 0) ? '0 : (n == 1) ? '1 : $urandom;
      good = ref_encode(w);
      cw = codeword_t'(good);
      @(posedge clk) expect_out("clean", w, 1'b1, DEC_CLEAN);
      for (int c = 0; c < 13; c++)
        for (int dl = -4; dl <= 4; dl++) begin
          if (dl == 0) continue;
          bad = ref_shift(good, c, dl);
          m = int'(bad[3*c +: 3]) - int'(good[3*c +: 3]);
          if (m < 0) m = -m;
          if (m == 0) continue;
          cw = codeword_t'(bad);
          @(posedge clk);
          if (m <= 3)
            expect_out("mag1-3", w, 1'b1, (c < 11) ? DEC_CORRECTED : DEC_PARITY_CELL);
          else if (c < 11)
            expect_out("mag4 data cell", ref_raw_data(bad), 1'b0, DEC_UNCORR);
          else
            expect_out("mag4 parity cell", w, 1'b1, DEC_PARITY_CELL);
        end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL status %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
