// Testbench for sinc_interp.
//
// 1. Impulse: one sample of value 1000 with zeros around it. The output
//    must trace 1000 * h[n], with h computed here from the window formula
//    using real arithmetic, starting 1 clock after the sample is taken and
//    passing the centre tap 8 clocks after it.
// 2. DC: a constant input must give a Q12 output within 3 % of
//    input * 4096 on every clock once the delay line is full.
// 3. Original samples are kept: at the position of each input sample
//    the output equals the sample in Q12 within the rounding of the
//    neighbours' contributions (a slow ramp is used).
module tb_sinc_interp;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [13:0] din = '0;
  logic signed [31:0] dout;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sinc_interp #(.IN_W(14), .OUT_W(32), .L(4)) dut (.*);

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

  function automatic int coef(input int n);
    real x, s, w;
    x = real'(n) / 4.0;
    s = (n == 0) ? 1.0 : $sin(3.14159265358979 * x) / (3.14159265358979 * x);
    w = 0.5 + 0.5 * $cos(3.14159265358979 * real'(n) / 8.0);
    return int'($floor(4096.0 * s * w + 0.5));
  endfunction

  // Drive one clock: the sample enters the filter at this posedge.
  task automatic step(input bit v, input int x);
    @(negedge clk);
    in_valid = v;
    din = 14'(x);
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 1. impulse
    step(1'b1, 1000);
    for (int k = 0; k < 16; k++) begin
      int e;
      step(1'b0, 0);
      e = (k < 15) ? 1000 * coef(k - 7) : 0;
      check(dout == e, $sformatf("impulse k=%0d dout %0d exp %0d", k, dout, e));
    end
    // 2. DC
    for (int t = 0; t < 60; t++) begin
      step((t % 4) == 0, 2000);
      if (t >= 20)
        check(dout >= 2000 * 4096 * 97 / 100 && dout <= 2000 * 4096 * 103 / 100,
              $sformatf("DC t=%0d dout %0d", t, dout));
    end
    // 3. ramp: samples 0, 40, 80, ... every 4th clock
    for (int t = 0; t < 200; t++) begin
      step((t % 4) == 0, (t / 4) * 40);
      // the sample taken at clock t0 = t - 8 sits on the centre tap now
      if (t >= 40 && ((t - 8) % 4) == 0) begin
        int e;
        e = ((t - 8) / 4) * 40 * 4096;
        check(dout >= e - 40 * 4096 / 20 && dout <= e + 40 * 4096 / 20,
              $sformatf("ramp t=%0d dout %0d exp %0d", t, dout, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
