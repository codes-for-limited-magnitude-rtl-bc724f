// tb_error_corrector: random read cells with at most one located cell; the
// located cell must be XORed with {IP syndrome, pattern} and the others left
// alone; correct_data and status must follow the decision flow (clean,
// corrected, parity-cell error, uncorrectable).
module tb_error_corrector;
  import ipdaec_pkg::*;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  logic clk = 0;
  always #5 clk = ~clk;

  logic [10:0][2:0] cells_rd, cells_out;
  logic [0:0]       ip_syn;
  logic             sd_zero, par_err, correct_data;
  logic [10:0]      hit;
  logic [10:0][1:0] pat;
  dec_status_t      status;

  error_corrector dut (.cells_rd(cells_rd), .ip_syn(ip_syn), .sd_zero(sd_zero), .hit(hit),
                       .pat(pat), .par_err(par_err), .cells_out(cells_out),
                       .correct_data(correct_data), .status(status));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [10:0][2:0] exp_cells;
    dec_status_t      exp_st;
    int c, mode;
    for (int n = 0; n < 4000; n++) begin
      cells_rd = 33'({$urandom, $urandom});
      ip_syn = 1'($urandom);
      pat = 22'($urandom);
      mode = n % 4;
      hit = '0; sd_zero = 1'b0; par_err = 1'b0;
      c = $urandom_range(0, 10);
      case (mode)
        0: sd_zero = 1'b1;                    // clean or IP-only error
        1: hit[c] = 1'b1;                     // located data cell
        2: par_err = 1'b1;                    // parity cell
        default: ;                            // syndrome matches nothing
      endcase
      exp_cells = cells_rd;
      if (mode == 1) exp_cells[c] = cells_rd[c] ^ {ip_syn, pat[c]};
      if (mode == 0)      exp_st = (ip_syn == 0) ? DEC_CLEAN : DEC_UNCORR;
      else if (mode == 1) exp_st = DEC_CORRECTED;
      else if (mode == 2) exp_st = (ip_syn == 0) ? DEC_PARITY_CELL : DEC_UNCORR;
      else                exp_st = DEC_UNCORR;
      @(posedge clk);
      checks++;
      seen[exp_st]++;
      if (cells_out !== exp_cells || status !== exp_st ||
          correct_data !== (exp_st != DEC_UNCORR)) begin
        failures++;
        $display("FAIL mode %0d: out=%h exp=%h status=%0d exp=%0d cd=%b",
                 mode, cells_out, exp_cells, status, exp_st, correct_data);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL status %0d never produced", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
