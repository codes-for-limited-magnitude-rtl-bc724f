// tb_ipdaec_mlc_memory: end-to-end test of the protected MLC memory at its
// default size. Each operation writes a random word, moves one cell of it by
// -4..+4 levels (or leaves it clean), reads it back and checks rd_data,
// correct_data and rd_status against the reference encoding, as well as the
// one-cycle read latency. Each mechanism of the code is counted and must
// occur: clean read, correction of the lowest bit only, of the second lowest
// bit only, of both low bits, of an upper bit through the IP syndrome, an
// error confined to a parity cell, an uncorrectable error that is detected,
// a level shift clipped at the end of the level range, and back-to-back
// reads.
module tb_ipdaec_mlc_memory;
  import ipdaec_ref_pkg::*;
  import ipdaec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n, wr_en, rd_en, rd_valid, correct_data, inj_en;
  logic [3:0]        wr_addr, rd_addr, inj_addr, inj_cell;
  data_t             wr_data, rd_data;
  dec_status_t       rd_status;
  logic signed [3:0] inj_delta;

  ipdaec_mlc_memory dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_valid(rd_valid), .rd_data(rd_data),
    .correct_data(correct_data), .rd_status(rd_status),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_cell(inj_cell), .inj_delta(inj_delta));

  typedef enum int {M_CLEAN, M_LOW, M_SECOND, M_BOTH, M_UPPER, M_PARITY, M_UNCORR,
                    M_SAT, M_B2B, M_COUNT} mech_e;
  int seen [M_COUNT];
  logic [38:0] stored [16];
  logic [31:0] orig [16];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected read result of word a, from its original data and stored cells.
  task automatic check_read(input logic [3:0] a);
    logic [31:0] ed;
    logic        ec;
    dec_status_t es;
    logic [38:0] good, diff;
    int c, m;
    good = ref_encode(orig[a]);
    diff = good ^ stored[a];
    c = -1; m = 0;
    for (int k = 0; k < 13; k++)
      if (diff[3*k +: 3] != 0) begin
        c = k;
        m = int'(stored[a][3*k +: 3]) - int'(good[3*k +: 3]);
        if (m < 0) m = -m;
      end
    if (c < 0)           begin ed = orig[a]; ec = 1; es = DEC_CLEAN; end
    else if (m <= 3)     begin ed = orig[a]; ec = 1; es = (c < 11) ? DEC_CORRECTED : DEC_PARITY_CELL; end
    else if (c < 11)     begin ed = ref_raw_data(stored[a]); ec = 0; es = DEC_UNCORR; end
    else                 begin ed = orig[a]; ec = 1; es = DEC_PARITY_CELL; end
    checks++;
    if (rd_valid !== 1'b1 || rd_data !== ed || correct_data !== ec || rd_status !== es) begin
      failures++;
      $display("FAIL read %0d: v=%b data=%h cd=%b st=%0d expected %h %b %0d",
               a, rd_valid, rd_data, correct_data, rd_status, ed, ec, es);
    end
    if (c < 0) seen[M_CLEAN]++;
    else if (es == DEC_CORRECTED) begin
      if (diff[3*c +: 2] == 2'b01) seen[M_LOW]++;
      if (diff[3*c +: 2] == 2'b10) seen[M_SECOND]++;
      if (diff[3*c +: 2] == 2'b11) seen[M_BOTH]++;
      if (diff[3*c+2] && c < 10)   seen[M_UPPER]++;
    end
    else if (es == DEC_PARITY_CELL) seen[M_PARITY]++;
    else seen[M_UNCORR]++;
  endtask

  task automatic write_word(input logic [3:0] a, input logic [31:0] w);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = w;
    orig[a] = w; stored[a] = ref_encode(w);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic inject(input logic [3:0] a, input int c, input int dl);
    int lvl;
    @(negedge clk);
    inj_en = 1; inj_addr = a; inj_cell = 4'(c); inj_delta = 4'(dl);
    lvl = int'(stored[a][3*c +: 3]) + dl;
    if (lvl < 0 || lvl > 7) seen[M_SAT]++;
    stored[a] = ref_shift(stored[a], c, dl);
    @(negedge clk);
    inj_en = 0;
  endtask

  initial begin
    int dl, lat;
    logic [3:0] a;
    foreach (seen[k]) seen[k] = 0;
    rst_n = 0; wr_en = 0; rd_en = 0; inj_en = 0;
    wr_addr = 0; rd_addr = 0; inj_addr = 0; inj_cell = 0; inj_delta = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) write_word(4'(k), $urandom);

    // Back-to-back reads of the whole memory, one per clock.
    @(negedge clk);
    for (int k = 0; k < 16; k++) begin
      rd_en = 1; rd_addr = 4'(k);
      @(negedge clk);
      check_read(4'(k));
      seen[M_B2B]++;
    end
    rd_en = 0;

    for (int n = 0; n < 4000; n++) begin
      a = 4'($urandom_range(0, 15));
      write_word(a, (n % 7 == 0) ? 32'hFFFF_FFFB : $urandom);
      if (n % 9 != 0) begin
        dl = $urandom_range(1, 4);
        if ($urandom_range(0, 1) == 1) dl = -dl;
        inject(a, $urandom_range(0, 12), dl);
      end
      // Read with latency measurement.
      @(negedge clk);
      rd_en = 1; rd_addr = a;
      @(negedge clk);
      rd_en = 0;
      lat = 1;
      while (!rd_valid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL read latency %0d", lat); end
      check_read(a);
    end

    for (int k = 0; k < M_COUNT; k++) begin
      checks++;
      $display("mechanism %s: %0d", mech_e'(k), seen[k]);
      if (seen[k] == 0) begin failures++; $display("FAIL mechanism %s never occurred", mech_e'(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
