// tb_mlc_memory: word writes and synchronous reads (data and rvalid exactly
// one clock after re), level shifts by the injection port including
// saturation at level 0 and level 7, and a write that coincides with an
// injection into the same word (the write wins). A shadow array is the
// reference.
module tb_mlc_memory;
  int checks = 0, failures = 0;
  int n_sat = 0, n_coll = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n, we, re, rvalid, inj_en;
  logic [3:0]        waddr, raddr, inj_addr;
  logic [12:0][2:0]  wdata, rdata;
  logic [3:0]        inj_cell;
  logic signed [3:0] inj_delta;

  mlc_memory dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                  .re(re), .raddr(raddr), .rvalid(rvalid), .rdata(rdata),
                  .inj_en(inj_en), .inj_addr(inj_addr), .inj_cell(inj_cell),
                  .inj_delta(inj_delta));

  logic [12:0][2:0] shadow [16];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [3:0] a);
    re <= 1'b1; raddr <= a;
    @(posedge clk);
    re <= 1'b0;
    #1;
    checks++;
    if (rvalid !== 1'b1 || rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read %0d: rvalid=%b data=%h expected %h", a, rvalid, rdata, shadow[a]);
    end
    @(posedge clk);
    #1;
    checks++;
    if (rvalid !== 1'b0) begin failures++; $display("FAIL rvalid held"); end
  endtask

  initial begin
    int lvl;
    rst_n = 0; we = 0; re = 0; inj_en = 0;
    waddr = 0; raddr = 0; inj_addr = 0; inj_cell = 0; inj_delta = 0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (rvalid !== 1'b0) begin failures++; $display("FAIL rvalid in reset"); end
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = 39'({$urandom, $urandom});
      shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 16; a++) begin @(negedge clk); read_check(4'(a)); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      inj_en = 1;
      inj_addr = 4'($urandom_range(0, 15));
      inj_cell = 4'($urandom_range(0, 12));
      inj_delta = 4'($urandom_range(0, 14) - 7);
      we = (n % 10 == 0);
      waddr = (n % 20 == 0) ? inj_addr : 4'($urandom_range(0, 15));
      wdata = 39'({$urandom, $urandom});
      if (we) shadow[waddr] = wdata;
      if (we && waddr == inj_addr) n_coll++;
      else begin
        lvl = int'(shadow[inj_addr][inj_cell]) + int'(inj_delta);
        if (lvl < 0 || lvl > 7) n_sat++;
        if (lvl < 0) lvl = 0;
        if (lvl > 7) lvl = 7;
        shadow[inj_addr][inj_cell] = 3'(lvl);
      end
      @(negedge clk);
      inj_en = 0; we = 0;
      read_check(inj_addr);
    end
    checks += 2;
    if (n_sat == 0)  begin failures++; $display("FAIL no saturation"); end
    if (n_coll == 0) begin failures++; $display("FAIL no write/inject collision"); end
    $display("saturations=%0d collisions=%0d", n_sat, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
