// tb_error_locator: all 64 syndromes are fed to the locator and compared with
// a search over the 33 correctable data-cell errors (two single-bit errors
// and one double adjacent error per cell) and over the errors confined to a
// parity cell. The document's worked decoding example is also replayed: on
// the cell holding d1..d3 a double error on d1,d2 must be located as cell 0.
module tb_error_locator;
  import ipdaec_ref_pkg::*;
  import ipdaec_pkg::dec_status_t;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0]        s;
  logic [10:0]       hit;
  logic [10:0][1:0]  pat;
  logic              par_err, unmatched;

  error_locator dut (.s(s), .hit(hit), .pat(pat), .par_err(par_err), .unmatched(unmatched));

  function automatic logic [5:0] col(input int c1);
    logic [5:0] v;
    for (int r = 1; r <= 6; r++) v[r-1] = hcol(r, c1);
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0]      e_hit;
    logic [10:0][1:0] e_pat;
    logic             e_par, e_unm;
    int n_loc = 0;
    for (int v = 0; v < 64; v++) begin
      s = 6'(v);
      e_hit = '0; e_pat = '0;
      for (int c = 0; c < 11; c++) begin
        if (s == col(7 + 2*c))                       begin e_hit[c] = 1; e_pat[c] = 2'b01; end
        if (s == col(8 + 2*c))                       begin e_hit[c] = 1; e_pat[c] = 2'b10; end
        if (s == (col(7 + 2*c) ^ col(8 + 2*c)))      begin e_hit[c] = 1; e_pat[c] = 2'b11; end
      end
      e_par = (s != 0) && ((s[5:3] == 0) || (s[2:0] == 0));
      e_unm = (s != 0) && (e_hit == 0) && !e_par;
      if (e_hit != 0) n_loc++;
      @(posedge clk);
      checks++;
      if (hit !== e_hit || pat !== e_pat || par_err !== e_par || unmatched !== e_unm) begin
        failures++;
        $display("FAIL s=%b hit=%b pat=%h par=%b unm=%b expected %b %h %b %b",
                 s, hit, pat, par_err, unmatched, e_hit, e_pat, e_par, e_unm);
      end
    end
    // Every one of the 33 correctable patterns must have its own syndrome.
    checks++;
    if (n_loc != 33) begin
      failures++;
      $display("FAIL %0d locatable syndromes, expected 33", n_loc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
