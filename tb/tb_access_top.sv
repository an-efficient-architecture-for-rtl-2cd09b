// End-to-end testbench for access_top at its default parameters.
//
// The four ADC inputs carry different signals: the cell-side I lane a
// 10 MHz-like tone (amplitude 4000, 6.25 samples per period) and the other
// three distinct DC levels, so that any crossed or swapped lane shows. The
// bench then steps through every operating setting of the pass-through:
//
//   transparent pass-through (switch 3 off), both links, I and Q
//   6-register sampler with each of its four distributions
//   multi-PN sampler with each PN order 3..10
//   uniform sampler with windows of 3, 5, 13 and 25 registers
//   ADC out-of-range flags on the LEDs and seven-segment displays
//
// For each it checks the DAC words (exact for pass-through; DC lanes keep
// their level within the interpolation ripple of 3 %; the tone lane stays
// within its amplitude), the converter strobes (ADC every 4th clock, DAC
// every 2nd), and counts how often the setting produced a DAC word from a
// register other than the one it used before (a sampling-point jump).
// Every setting must have been exercised: one that never happened counts
// as a failure.
module tb_access_top;
  import access_pkg::*;

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

  always #2 clk = ~clk;   // 250 MHz
  always #50 ext_clk = ~ext_clk;

  access_top dut (.*);

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
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  localparam logic signed [13:0] DC_CQ = -14'sd2000;
  localparam logic signed [13:0] DC_BI = 14'sd3000;
  localparam logic signed [13:0] DC_BQ = -14'sd500;

  // ADC model: new samples right after each sampling instant
  int nsamp = 0;
  logic signed [13:0] last_tone = '0, prev_tone = '0, prev2_tone = '0;
  always @(posedge clk) begin
    if (rst_n && adc_clk_en) begin
      #1;
      nsamp++;
      prev2_tone = prev_tone;
      prev_tone = last_tone;
      last_tone = 14'($rtoi(4000.0 * $sin(2.0 * 3.14159265358979 * real'(nsamp) / 6.25)));
      cell_adc_i <= last_tone;
      cell_adc_q <= DC_CQ;
      base_adc_i <= DC_BI;
      base_adc_q <= DC_BQ;
    end
  end

  // strobe periods
  int adc_cnt = 0, dac_cnt = 0, adc_gap = 0, dac_gap = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      adc_gap++;
      dac_gap++;
      if (adc_clk_en) begin
        if (adc_cnt > 0) check(adc_gap == 4, "ADC strobe every 4 clocks");
        adc_cnt++;
        adc_gap = 0;
      end
      if (dac_wr_en) begin
        if (dac_cnt > 0) check(dac_gap == 2, "DAC strobe every 2 clocks");
        dac_cnt++;
        dac_gap = 0;
      end
    end
  end

  function automatic bit near(input logic [13:0] v, input logic signed [13:0] target);
    int d, tol;
    d = int'(signed'(v)) - int'(target);
    tol = (target < 0 ? -int'(target) : int'(target)) * 3 / 100 + 2;
    return (d <= tol) && (d >= -tol);
  endfunction

  // Run one setting for n clocks, checking each DAC word. Returns the
  // number of sampling-point jumps seen on the cell-side I lane.
  task automatic run_setting(input string name, input int n, input bit exact, output int jumps);
    logic [4:0] prev_tap;
    int settle;
    jumps = 0;
    prev_tap = 5'd31;
    settle = 40;
    repeat (n) begin
      @(posedge clk);
      #2;
      if (dac_wr_en) begin
        if (settle > 0) begin
          settle--;
        end else begin
          if (exact) begin
            check(base_dac_i == 14'(prev_tone) || base_dac_i == 14'(prev2_tone),
                  $sformatf("%s: cell I -> base I %0d", name, signed'(base_dac_i)));
            check(base_dac_q == DC_CQ, $sformatf("%s: cell Q -> base Q", name));
            check(cell_dac_i == DC_BI, $sformatf("%s: base I -> cell I", name));
            check(cell_dac_q == DC_BQ, $sformatf("%s: base Q -> cell Q", name));
          end else begin
            check(near(base_dac_q, DC_CQ), $sformatf("%s: base Q level %0d", name, signed'(base_dac_q)));
            check(near(cell_dac_i, DC_BI), $sformatf("%s: cell I level %0d", name, signed'(cell_dac_i)));
            check(near(cell_dac_q, DC_BQ), $sformatf("%s: cell Q level %0d", name, signed'(cell_dac_q)));
            check(signed'(base_dac_i) <= 4200 && signed'(base_dac_i) >= -4200,
                  $sformatf("%s: tone lane within amplitude %0d", name, signed'(base_dac_i)));
          end
          if (tap_cell_i != prev_tap && prev_tap != 5'd31) jumps++;
          prev_tap = tap_cell_i;
        end
      end
    end
  endtask

  int happened [string];

  initial begin
    int j;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // transparent pass-through
    sw = 4'b0000;
    run_setting("pass-through", 400, 1'b1, j);
    happened["pass-through"] = (dac_cnt > 100) ? 1 : 0;
    check(dac_mode == 1'b1, "DAC in dual-port mode");

    // 6-register sampler
    sw[3] = 1'b1;
    nus_mode = MODE_BUFF6;
    for (int d = 0; d < 4; d++) begin
      dist_sel = dist6_e'(d);
      run_setting($sformatf("buff6 dist %0d", d), 1200, 1'b0, j);
      if (d == 3) happened["buff6 single (no jumps)"] = (j == 0);
      else happened[$sformatf("buff6 dist %0d jumps", d)] = j;
    end

    // multi-PN sampler, every order
    nus_mode = MODE_MULTIPN;
    for (int o = 0; o < 8; o++) begin
      pn_order_sel = 3'(o);
      run_setting($sformatf("multipn order %0d", o + 3), (o < 5) ? 1200 : 4400, 1'b0, j);
      happened[$sformatf("multipn order %0d jumps", o + 3)] = j;
    end

    // uniform sampler, every window
    nus_mode = MODE_UNIFORM;
    for (int n = 0; n < 4; n++) begin
      sw[1:0] = 2'(n);
      run_setting($sformatf("uniform window %0d", n), 1200, 1'b0, j);
      happened[$sformatf("uniform window %0d jumps", n)] = j;
    end

    // back to pass-through: the links recover at once
    sw = 4'b0000;
    run_setting("pass-through again", 200, 1'b1, j);

    // out-of-range indicators
    cell_otr_a = 1'b1; base_otr_b = 1'b1;
    #1;
    check(ledr[1:0] == 2'b10 && ledb[1:0] == 2'b01, "OTR flags on LEDs (active low)");
    check(hex0 == ~7'b1111111 && hex1 == ~7'b0000110, "OTR digits: cell 8, base 1");
    check(ledr[3] == pll_locked && ledr[7] == ext_clk && hex0_dp && hex1_dp, "lock, reference and points");
    happened["out-of-range display"] = 1;
    cell_otr_a = 1'b0; base_otr_b = 1'b0;
    #1;
    check(hex0 == ~7'b0111111 && hex1 == ~7'b0111111, "in range: both digits 0");

    foreach (happened[k]) begin
      $display("mechanism %-28s : %0d", k, happened[k]);
      check(happened[k] > 0, $sformatf("mechanism never happened: %s", k));
    end
    check(happened.num() == 18, $sformatf("%0d mechanisms counted", happened.num()));
    $display("ADC samples %0d, DAC words %0d", adc_cnt, dac_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
