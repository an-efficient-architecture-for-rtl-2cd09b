// Testbench for jitter_uniform.
//
// Fills the 25 registers with known values and checks, for each window
// length and each PN value 1..511, the chosen register against the
// published range table, rebuilt here from (register, number of values)
// runs in PN order. It also checks the per-register shares: 3 registers
// 170/171/170, 5 registers 102/102/103/102/102, 13 registers 39 or 40,
// 25 registers 20 or 21, every register of the window used.
module tb_jitter_uniform;
  import access_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0;
  logic [13:0] din = '0;
  logic [8:0] sel = '0;
  nregs_e nregs = REGS_3;
  logic [13:0] dout;
  logic [4:0] tap;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  jitter_uniform #(.DATA_W(14)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
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

  int exp_reg [4][512];

  task automatic runs(input int n, input int regs[], input int cnt[]);
    int p;
    p = 1;
    foreach (regs[i]) for (int k = 0; k < cnt[i]; k++) begin
      exp_reg[n][p] = regs[i];
      p++;
    end
    if (p != 512) begin
      failures++;
      $display("FAIL: table %0d ends at %0d", n, p);
    end
  endtask

  initial begin
    int r25 [25];
    int c25 [25];
    int hist [25];
    int sizes [4];
    sizes = '{3, 5, 13, 25};
    runs(0, '{0, 2, 1}, '{170, 171, 170});
    runs(1, '{0, 1, 2, 3, 4}, '{102, 102, 103, 102, 102});
    runs(2, '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12},
            '{39, 39, 39, 39, 40, 40, 39, 40, 40, 39, 39, 39, 39});
    // 25: h..r 21 each, then a..g 20 each, then s..y 20 each
    for (int i = 0; i < 11; i++) begin r25[i] = 7 + i; c25[i] = 21; end
    for (int i = 0; i < 7; i++)  begin r25[11 + i] = i; c25[11 + i] = 20; end
    for (int i = 0; i < 7; i++)  begin r25[18 + i] = 18 + i; c25[18 + i] = 20; end
    runs(3, r25, c25);

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // after 25 shifts register k holds 500 + 24 - k
    for (int i = 0; i < 25; i++) begin
      @(negedge clk);
      din = 14'(500 + i);
      shift_en = 1'b1;
    end
    @(negedge clk);
    shift_en = 1'b0;
    for (int n = 0; n < 4; n++) begin
      nregs = nregs_e'(n);
      for (int s = 0; s < 25; s++) hist[s] = 0;
      for (int v = 1; v < 512; v++) begin
        sel = 9'(v);
        #1;
        hist[tap]++;
        check(int'(tap) == exp_reg[n][v] && dout == 14'(524 - exp_reg[n][v]),
              $sformatf("nregs %0d sel %0d tap %0d exp %0d", sizes[n], v, tap, exp_reg[n][v]));
      end
      for (int s = 0; s < 25; s++) begin
        if (s < sizes[n])
          check(hist[s] >= 511 / sizes[n] && hist[s] <= 511 / sizes[n] + 1,
                $sformatf("nregs %0d reg %0d share %0d", sizes[n], s, hist[s]));
        else
          check(hist[s] == 0, $sformatf("nregs %0d reg %0d outside window used", sizes[n], s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
