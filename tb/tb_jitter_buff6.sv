// Testbench for jitter_buff6.
//
// The expected register for each of the 64 PN values is rebuilt from run
// lists (source, count) in PN order for each distribution, and the
// per-register totals are compared with the published histogram counts
// (normal 4/5/10/26/10/5/4, modified 2/4/10/32/10/4/2, nearly even 9 each
// with one extra for c). Known samples are shifted in, and for every
// distribution and PN value the output and tap index are checked. The
// shift enable is checked to hold the registers.
module tb_jitter_buff6;
  import access_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0;
  logic [13:0] din = '0;
  logic [5:0] sel = '0;
  dist6_e dist_sel = DIST_NORMAL;
  logic [13:0] dout;
  logic [2:0] tap;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  jitter_buff6 #(.DATA_W(14)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int exp_src [4][64];

  task automatic runs(input int d, input int src[], input int cnt[]);
    int p;
    p = 0;
    foreach (src[i]) for (int k = 0; k < cnt[i]; k++) begin
      exp_src[d][p] = src[i];
      p++;
    end
    if (p != 64) begin
      failures++;
      $display("FAIL: table %0d has %0d entries", d, p);
    end
  endtask

  // value held by source s when the newest register holds base+5 and din = base+6
  function automatic logic [13:0] val(input int s, input int base);
    return 14'(base + 6 - s);
  endfunction

  initial begin
    int hist [7];
    int want [4][7];
    runs(0, '{0, 6, 1, 5, 4, 2, 3}, '{4, 4, 5, 5, 10, 10, 26});
    runs(1, '{0, 6, 5, 1, 2, 4, 2, 4, 2, 4, 2, 4, 3}, '{2, 2, 4, 4, 5, 7, 3, 1, 1, 1, 1, 1, 32});
    runs(2, '{0, 1, 2, 3, 4, 5, 6, 3}, '{9, 9, 9, 9, 9, 9, 9, 1});
    runs(3, '{3}, '{64});
    want[0] = '{4, 5, 10, 26, 10, 5, 4};
    want[1] = '{2, 4, 10, 32, 10, 4, 2};
    want[2] = '{9, 9, 9, 10, 9, 9, 9};
    want[3] = '{0, 0, 0, 64, 0, 0, 0};
    for (int d = 0; d < 4; d++) begin
      for (int s = 0; s < 7; s++) hist[s] = 0;
      for (int v = 0; v < 64; v++) hist[exp_src[d][v]]++;
      for (int s = 0; s < 7; s++)
        check(hist[s] == want[d][s], $sformatf("dist %0d reg %0d count %0d", d, s, hist[s]));
    end

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // shift in 1000..1005 so that f=1000 ... a=1005, din = 1006
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      din = 14'(1000 + i);
      shift_en = 1'b1;
    end
    @(negedge clk);
    shift_en = 1'b0;
    din = 14'd1006;
    for (int d = 0; d < 4; d++) begin
      dist_sel = dist6_e'(d);
      for (int v = 0; v < 64; v++) begin
        sel = 6'(v);
        #1;
        check(tap == 3'(exp_src[d][v]), $sformatf("dist %0d sel %0d tap %0d exp %0d", d, v, tap, exp_src[d][v]));
        check(dout == val(exp_src[d][v], 1000), $sformatf("dist %0d sel %0d dout %0d", d, v, dout));
      end
    end
    // registers hold while shift_en is low
    @(negedge clk);
    @(negedge clk);
    dist_sel = DIST_SINGLE;
    #1;
    check(dout == 14'd1003, "hold: c keeps its value");
    // one more shift moves everything along
    shift_en = 1'b1;
    @(negedge clk);
    shift_en = 1'b0;
    #1;
    check(dout == 14'd1004, "shift: c takes b");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
