// Testbench for link_channel.
//
// The bench keeps its own model of the lane's sample history: the raw ADC
// samples through six registers (6-register mode) and through 25 registers
// (uniform mode), and an interpolated stream computed with the
// windowed-sinc formula in real arithmetic through three registers. The
// lane reports which register produced each DAC word (tap); every DAC word
// must equal the model's value of that register in one of the last three
// clocks (the lane's pipeline delay), narrowed from Q12 for the
// interpolating mode. The bench also checks:
//  - bypass: DAC word = latest ADC sample, exactly, and tap = 31;
//  - 6-register single distribution: always register c (tap 3);
//  - the windows: taps stay inside the chosen window and all its
//    registers are used; the multi-PN sampler uses a and c only at the
//    PN values 1 and 2, so a and c occur 2/7 of the time with order 3;
//  - DAC strobe every second clock, ADC samples every fourth.
module tb_link_channel;
  import access_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adc_valid = 1'b0;
  logic [13:0] adc_data = '0;
  logic jitter_en = 1'b0;
  mode_e mode = MODE_BYPASS;
  dist6_e dist_sel = DIST_NORMAL;
  logic [2:0] pn_order_sel = 3'd0;
  nregs_e nregs = REGS_3;
  logic dac_valid;
  logic [13:0] dac_data;
  logic [4:0] tap;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  link_channel dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
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

  function automatic longint coef(input int n);
    real x, s, w;
    x = real'(n) / 4.0;
    s = (n == 0) ? 1.0 : $sin(3.14159265358979 * x) / (3.14159265358979 * x);
    w = 0.5 + 0.5 * $cos(3.14159265358979 * real'(n) / 8.0);
    return longint'($floor(4096.0 * s * w + 0.5));
  endfunction

  function automatic logic [13:0] narrow(input longint w);
    longint s;
    s = w >>> 12;
    if (s > 8191) s = 8191;
    if (s < -8192) s = -8192;
    return 14'(s);
  endfunction

  // ---------------------------------------------------------- model
  longint raw [7];        // raw[0] = newest ADC sample (din), raw[1..6] = a..f
  longint line [15];      // stuffed delay line
  longint interp_m;       // filter output register
  longint wide [25];      // a..y of the wide chain
  longint rawu [25];      // a..y of the uniform chain, a newest
  logic [13:0] hold_m;
  // snapshots of the values that could drive the output, per clock
  logic [13:0] snap_raw  [4][7];
  logic [13:0] snap_wide [4][25];
  logic [13:0] snap_uni  [4][25];
  logic [13:0] snap_hold [4];
  int cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      longint acc;
      // shift snapshots (value as seen during the clock that just ended)
      for (int d = 3; d > 0; d--) begin
        snap_raw[d] = snap_raw[d-1];
        snap_wide[d] = snap_wide[d-1];
        snap_uni[d] = snap_uni[d-1];
        snap_hold[d] = snap_hold[d-1];
      end
      for (int i = 0; i < 7; i++) snap_raw[0][i] = (i == 0) ? adc_data : 14'(raw[i]);
      for (int i = 0; i < 25; i++) snap_wide[0][i] = narrow(wide[i]);
      for (int i = 0; i < 25; i++) snap_uni[0][i] = 14'(rawu[i]);
      snap_hold[0] = hold_m;
      // advance the model
      for (int i = 24; i > 0; i--) wide[i] = wide[i-1];
      wide[0] = interp_m;
      acc = 0;
      for (int i = 0; i < 15; i++) acc += line[i] * coef(i - 7);
      interp_m = acc;
      for (int i = 14; i > 0; i--) line[i] = line[i-1];
      line[0] = adc_valid ? longint'(signed'(adc_data)) : 0;
      if (adc_valid) begin
        for (int i = 6; i > 1; i--) raw[i] = raw[i-1];
        raw[1] = longint'(adc_data);
        for (int i = 24; i > 0; i--) rawu[i] = rawu[i-1];
        rawu[0] = longint'(adc_data);
        hold_m = adc_data;
      end
      cyc++;
    end
  end

  initial begin
    for (int i = 0; i < 7; i++) raw[i] = 0;
    for (int i = 0; i < 15; i++) line[i] = 0;
    for (int i = 0; i < 25; i++) wide[i] = 0;
    for (int i = 0; i < 25; i++) rawu[i] = 0;
    interp_m = 0;
    hold_m = '0;
    for (int d = 0; d < 4; d++) begin
      snap_hold[d] = '0;
      for (int i = 0; i < 7; i++) snap_raw[d][i] = '0;
      for (int i = 0; i < 25; i++) snap_wide[d][i] = '0;
      for (int i = 0; i < 25; i++) snap_uni[d][i] = '0;
    end
  end

  // ADC: a 10 MHz-like tone, 62.5 Msps, amplitude 6000 (period 6.25 samples)
  int phase = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      phase <= (phase + 1) % 4;
      adc_valid <= (phase == 3);
      if (phase == 3)
        adc_data <= 14'($rtoi(6000.0 * $sin(2.0 * 3.14159265358979 * real'(cyc / 4) / 6.25)));
    end
  end

  // ------------------------------------------------------- checking
  int hist [32];
  int nvalid, last_valid_cyc;

  task automatic run(input int ncycles, input int skip);
    for (int s = 0; s < 32; s++) hist[s] = 0;
    nvalid = 0;
    repeat (ncycles) begin
      @(posedge clk);
      #1;
      if (dac_valid) begin
        bit ok;
        if (skip > 0) begin
          skip--;
        end else begin
          nvalid++;
          if (last_valid_cyc >= 0) check(cyc - last_valid_cyc == 2, "DAC strobe every 2 clocks");
          last_valid_cyc = cyc;
          hist[tap]++;
          ok = 1'b0;
          for (int d = 0; d < 4; d++) begin
            if (!jitter_en || mode == MODE_BYPASS) ok |= (tap == 5'd31 && dac_data == snap_hold[d]);
            else if (mode == MODE_BUFF6) ok |= (tap <= 5'd6 && dac_data == snap_raw[d][tap]);
            else if (mode == MODE_UNIFORM) ok |= (tap <= 5'd24 && dac_data == snap_uni[d][tap]);
            else ok |= (tap <= 5'd2 && dac_data == snap_wide[d][tap]);
          end
          check(ok, $sformatf("mode %0d dist %0d nregs %0d tap %0d dac %0d", mode, dist_sel, nregs, tap, dac_data));
        end
      end
    end
  endtask

  initial begin
    last_valid_cyc = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // bypass, exact: the word is the ADC sample held one clock earlier
    jitter_en = 1'b0;
    run(400, 4);
    check(hist[31] == nvalid && nvalid > 150, "bypass uses only the held sample");

    // 6-register sampler, each distribution
    jitter_en = 1'b1;
    mode = MODE_BUFF6;
    for (int d = 0; d < 4; d++) begin
      dist_sel = dist6_e'(d);
      last_valid_cyc = -1;
      run(800, 3);
      if (d == 3) check(hist[3] == nvalid, "single distribution always picks c");
      else begin
        int used;
        used = 0;
        for (int s = 0; s <= 6; s++) used += (hist[s] > 0);
        check(used == 7, $sformatf("dist %0d uses all 7 sources (%0d)", d, used));
        check(hist[3] >= hist[0] && hist[3] >= hist[6], $sformatf("dist %0d favours c", d));
      end
    end

    // multi-PN sampler, every PN order
    mode = MODE_MULTIPN;
    for (int o = 0; o < 8; o++) begin
      pn_order_sel = 3'(o);
      last_valid_cyc = -1;
      run(2200, 3);
      check(hist[0] + hist[1] + hist[2] == nvalid, $sformatf("order %0d taps within a..c", o + 3));
      check(hist[1] > hist[0] && hist[1] > hist[2], $sformatf("order %0d favours b", o + 3));
      if (o == 0)
        // PN and DAC both periodic: 7-state PN seen every 2nd clock still
        // walks all 7 states, so a and c get 1/7 each
        check(hist[0] * 7 >= nvalid - 7 && hist[0] * 7 <= nvalid + 7, $sformatf("order 3 share of a %0d/%0d", hist[0], nvalid));
    end

    // uniform sampler, each window
    mode = MODE_UNIFORM;
    for (int n = 0; n < 4; n++) begin
      int size, used, outside;
      nregs = nregs_e'(n);
      size = (n == 0) ? 3 : (n == 1) ? 5 : (n == 2) ? 13 : 25;
      last_valid_cyc = -1;
      run(2200, 3);
      used = 0;
      outside = 0;
      for (int s = 0; s < 32; s++) begin
        if (s < size) used += (hist[s] > 0);
        else outside += hist[s];
      end
      check(used == size && outside == 0, $sformatf("window %0d: used %0d outside %0d", size, used, outside));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
