// Noise-level testbench for access_top at its default parameters: how much
// noise the uniform sampler adds to a 10 MHz tone for each window length,
// the 6-register sampler for each of its distributions, and the multi-PN
// sampler for each PN order.
//
// The cell-side I input carries a tone of amplitude A = 4000 at 6.25
// samples per period (10 MHz at 62.5 Msps). Once per ADC sample the bench
// reads the base-side I DAC word y and projects it onto the tone:
//   C = mean(y * exp(-j*theta*s)),  theta = 2*pi/6.25, s = sample index
// The coherent (tone) power is 2|C|^2 and the noise power is
// N = mean(y^2) - 2|C|^2. The 9th-order PN repeats every 511 clocks and
// the tone pattern every 25 samples; these are co-prime, so over 12775
// samples every pairing of PN state and tone phase is seen once and the
// averages are exact rather than statistical. The 6th-order PN (63 states)
// is measured over 8 x 63 x 25 samples for the same reason.
//
// Expected value: if the output is the sample k places back with
// probability w_k, then
//   N = (A^2/2) * (1 - |c|^2),  c = sum_k w_k * exp(-j*theta*k)
// For a uniform window of n registers one ADC sample apart, w_k = 1/n for
// k < n. For the 6-register sampler, k = 0 is the incoming sample and
// 1..6 the registers a..f, and w_k is the number of the 63 non-zero PN
// values that pick that source (the published counts per 64 values, less
// the value 0 that the PN never takes).
// The bench checks, for every window and distribution:
//  - the measured noise is within 2 % of this formula;
//  - the noise grows from 3 to 5 to 13 registers;
//  - with 25 registers (four whole tone periods) the tone is suppressed,
//    i.e. its coherent power falls below 1 % of the output power.
//  - the single distribution (a fixed delay) adds no noise;
//  - multi-PN: the outer registers, one 250 MHz clock (theta/4) either
//    side of the middle one, each have weight 1/P for a PN period P. The
//    noise must fall by P / ((P-1)/2), about 2, from one order to the
//    next (within 10 %), and lie between 70 % and 105 % of
//    the formula. The interpolating filter is not an ideal fractional
//    delay at 10 MHz, so neighbouring interpolated values are slightly
//    closer than theta/4 apart and the noise comes out about 20 % lower.
// It also checks that pass-through gives no noise, which validates the
// method. The ratio of noise from 3 to 5 registers is printed in dB.
module tb_noise_levels;
  import access_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real AMP = 4000.0;
  localparam real THETA = 2.0 * PI / 6.25;
  localparam int NMEAS = 511 * 25;
  localparam int WARMUP = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pll_locked = 1'b1;
  logic ext_clk = 1'b0;
  logic [3:0] sw = 4'b0000;
  mode_e nus_mode = MODE_BYPASS;
  dist6_e dist_sel = DIST_NORMAL;
  logic [2:0] pn_order_sel = 3'd0;
  logic [13:0] cell_adc_i = '0, cell_adc_q = '0, base_adc_i = '0, base_adc_q = '0;
  logic cell_otr_a = 1'b0, cell_otr_b = 1'b0, base_otr_a = 1'b0, base_otr_b = 1'b0;
  logic [13:0] cell_dac_i, cell_dac_q, base_dac_i, base_dac_q;
  logic adc_clk_en, dac_wr_en, dac_mode;
  logic [7:0] ledr, ledb, ledg;
  logic [6:0] hex0, hex1;
  logic hex0_dp, hex1_dp;
  logic [4:0] tap_cell_i, tap_cell_q, tap_base_i, tap_base_q;
  int checks = 0;
  int failures = 0;

  always #2 clk = ~clk;

  access_top dut (.*);

  initial begin
    repeat (6000000) @(posedge clk);
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

  // ADC model: tone on cell I, new sample right after each sampling instant
  int nsamp = 0;
  always @(posedge clk) begin
    if (rst_n && adc_clk_en) begin
      #1;
      nsamp++;
      cell_adc_i <= 14'($rtoi(AMP * $sin(THETA * real'(nsamp))));
    end
  end

  // accumulators, one reading of the DAC per ADC sample
  bit measuring = 1'b0;
  int nacc;
  real sum_sq, sum_re, sum_im;
  always @(posedge clk) begin
    if (rst_n && adc_clk_en) begin
      #2;
      if (measuring) begin
        real y;
        y = real'(signed'(base_dac_i));
        sum_sq += y * y;
        sum_re += y * $cos(THETA * real'(nsamp));
        sum_im -= y * $sin(THETA * real'(nsamp));
        nacc++;
      end
    end
  end

  task automatic measure(input int nmeas, output real noise, output real coherent, output real total);
    real cre, cim;
    repeat (WARMUP) @(posedge adc_clk_en);
    nacc = 0;
    sum_sq = 0.0;
    sum_re = 0.0;
    sum_im = 0.0;
    measuring = 1'b1;
    wait (nacc == nmeas);
    measuring = 1'b0;
    cre = sum_re / real'(nmeas);
    cim = sum_im / real'(nmeas);
    total = sum_sq / real'(nmeas);
    coherent = 2.0 * (cre * cre + cim * cim);
    noise = total - coherent;
  endtask

  // w[k] = weight of the sample k places back, sum of weights = wsum
  function automatic real expected_noise(input real w[], input real wsum);
    real re, im;
    re = 0.0;
    im = 0.0;
    foreach (w[k]) begin
      re += w[k] * $cos(THETA * real'(k));
      im -= w[k] * $sin(THETA * real'(k));
    end
    re /= wsum;
    im /= wsum;
    return (AMP * AMP / 2.0) * (1.0 - re * re - im * im);
  endfunction

  function automatic real uniform_noise(input int n);
    real w[];
    w = new[n];
    foreach (w[k]) w[k] = 1.0;
    return expected_noise(w, real'(n));
  endfunction

  initial begin
    real noise, coherent, total, exp_n;
    real nwin [4];
    real nmpn [8];
    int size [4] = '{3, 5, 13, 25};
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // pass-through: the measurement sees no noise
    sw = 4'b0000;
    measure(NMEAS, noise, coherent, total);
    $display("pass-through: tone power %0.1f, noise %0.3f", coherent, noise);
    check(noise < 1.0 && coherent > 0.99 * AMP * AMP / 2.0, "pass-through is noise-free");

    sw[3] = 1'b1;
    nus_mode = MODE_UNIFORM;
    for (int w = 0; w < 4; w++) begin
      sw[1:0] = 2'(w);
      measure(NMEAS, noise, coherent, total);
      exp_n = uniform_noise(size[w]);
      nwin[w] = noise;
      $display("%2d registers: tone power %10.1f  noise %10.1f  expected %10.1f  (%0.2f dB below A^2/2)",
               size[w], coherent, noise, exp_n, 10.0 * $log10((AMP * AMP / 2.0) / noise));
      check(noise > 0.98 * exp_n && noise < 1.02 * exp_n,
            $sformatf("%0d registers: noise %0.1f expected %0.1f", size[w], noise, exp_n));
    end
    check(nwin[1] > nwin[0] && nwin[2] > nwin[1], "noise grows with the window");
    check(coherent < 0.01 * total, "25 registers suppress the tone");
    $display("noise increase from 3 to 5 registers: %0.2f dB", 10.0 * $log10(nwin[1] / nwin[0]));

    // 6-register sampler: weights of din, a..f among PN values 1..63
    nus_mode = MODE_BUFF6;
    for (int d = 0; d < 4; d++) begin
      real wts[];
      string nm;
      case (d)
        0: begin wts = '{3.0, 5.0, 10.0, 26.0, 10.0, 5.0, 4.0}; nm = "normal"; end
        1: begin wts = '{1.0, 4.0, 10.0, 32.0, 10.0, 4.0, 2.0}; nm = "tight"; end
        2: begin wts = '{8.0, 9.0, 9.0, 10.0, 9.0, 9.0, 9.0}; nm = "even"; end
        default: begin wts = '{0.0, 0.0, 0.0, 63.0, 0.0, 0.0, 0.0}; nm = "single"; end
      endcase
      dist_sel = dist6_e'(d);
      measure(8 * 63 * 25, noise, coherent, total);
      exp_n = expected_noise(wts, 63.0);
      $display("6 registers, %-6s: tone power %10.1f  noise %10.1f  expected %10.1f",
               nm, coherent, noise, exp_n);
      if (d == 3) check(noise < 1.0, "single distribution adds no noise");
      else check(noise > 0.98 * exp_n && noise < 1.02 * exp_n,
                 $sformatf("%s distribution: noise %0.1f expected %0.1f", nm, noise, exp_n));
    end

    // multi-PN sampler on the interpolated stream: registers a, b, c are
    // one 250 MHz clock apart; a and c are each used once per PN period
    nus_mode = MODE_MULTIPN;
    for (int o = 0; o < 8; o++) begin
      int per, reps;
      per = (1 << (o + 3)) - 1;
      reps = (4096 + per - 1) / per;
      pn_order_sel = 3'(o);
      measure(25 * per * reps, noise, coherent, total);
      begin
        real th, cm;
        th = THETA / 4.0;
        cm = 1.0 - 2.0 * (1.0 - $cos(th)) / real'(per);
        exp_n = total * (1.0 - cm * cm);
      end
      nmpn[o] = noise;
      $display("multi-PN order %2d: tone power %10.1f  noise %8.1f  small-offset estimate %8.1f  (%0.2f dB below tone)",
               o + 3, coherent, noise, exp_n, 10.0 * $log10(coherent / noise));
      check(noise > 0.7 * exp_n && noise < 1.05 * exp_n,
            $sformatf("multi-PN order %0d: noise %0.1f estimate %0.1f", o + 3, noise, exp_n));
      if (o > 0) begin
        real step;
        step = nmpn[o - 1] / noise;
        check(step > 0.9 * real'(per) / real'((per - 1) / 2) && step < 1.1 * real'(per) / real'((per - 1) / 2),
              $sformatf("multi-PN order %0d: noise falls by %0.2f from the order below", o + 3, step));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
