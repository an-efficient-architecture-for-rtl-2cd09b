// Testbench for pn_generator: every order from 3 to 10.
//
// The serial output of a Fibonacci LFSR for P(x) = x^n + sum x^k + 1
// obeys o[t+n] = o[t] ^ XOR_k o[t+k]. The bench records the output bits
// and checks them against that recurrence, which it derives from the list
// of exponents of each polynomial (not from the RTL's tap masks). It also
// checks that the state visits all 2^n - 1 non-zero values, returns to the
// seed after exactly 2^n - 1 steps, starts from the seed 1, and holds
// while en is low.
module tb_pn_generator;

  localparam int NGEN = 8;
  localparam int MAXLEN = 1023;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  // Middle exponents k of each polynomial, 0 = none.
  function automatic int mid_exp(input int order, input int j);
    case (order)
      3: return (j == 0) ? 1 : 0;
      4: return (j == 0) ? 1 : 0;
      5: return (j == 0) ? 2 : 0;
      6: return (j == 0) ? 1 : 0;
      7: return (j == 0) ? 1 : 0;
      8: return (j == 0) ? 4 : (j == 1) ? 3 : (j == 2) ? 2 : 0;
      9: return (j == 0) ? 4 : 0;
      10: return (j == 0) ? 3 : 0;
      default: return 0;
    endcase
  endfunction

  logic [9:0] st   [NGEN];
  logic       bo   [NGEN];

  for (genvar g = 0; g < NGEN; g++) begin : g_dut
    logic [g+2:0] s;
    pn_generator #(.ORDER(g + 3)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .state(s), .bit_out(bo[g])
    );
    assign st[g] = 10'(s);
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  bit obits [NGEN][2*MAXLEN+20];
  bit seen  [NGEN][1024];
  int period [NGEN];

  initial begin
    for (int g = 0; g < NGEN; g++) begin
      period[g] = 0;
      for (int v = 0; v < 1024; v++) seen[g][v] = 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int g = 0; g < NGEN; g++) check(st[g] == 10'd1, $sformatf("order %0d seed", g + 3));
    // hold while en is low
    repeat (3) @(posedge clk);
    #1;
    for (int g = 0; g < NGEN; g++) check(st[g] == 10'd1, $sformatf("order %0d hold", g + 3));
    en = 1'b1;
    for (int t = 0; t < 2 * MAXLEN + 20; t++) begin
      for (int g = 0; g < NGEN; g++) begin
        obits[g][t] = bo[g];
        if (t > 0 && period[g] == 0 && st[g] == 10'd1) period[g] = t;
        if (t < (1 << (g + 3)) - 1) seen[g][st[g]] = 1'b1;
      end
      @(posedge clk);
      #1;
    end
    for (int g = 0; g < NGEN; g++) begin
      int n, len, bad, nseen;
      n = g + 3;
      len = (1 << n) - 1;
      check(period[g] == len, $sformatf("order %0d period %0d expected %0d", n, period[g], len));
      nseen = 0;
      for (int v = 1; v < 1024; v++) nseen += seen[g][v];
      check(nseen == len && !seen[g][0], $sformatf("order %0d visits %0d states", n, nseen));
      bad = 0;
      for (int t = 0; t + n < 2 * MAXLEN + 20; t++) begin
        bit e;
        e = obits[g][t];
        for (int j = 0; j < 3; j++) if (mid_exp(n, j) != 0) e ^= obits[g][t + mid_exp(n, j)];
        if (obits[g][t + n] != e) bad++;
      end
      check(bad == 0, $sformatf("order %0d recurrence mismatches %0d", n, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
