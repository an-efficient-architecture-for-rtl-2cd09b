// One I or Q lane of one link: ADC sample in, DAC sample out, with an
// optional non-uniform-sampling noise injector in between.
//
// All logic runs on one processing clock (250 MHz in the document's
// build). The ADC delivers a sample every fourth clock (adc_valid) and the
// DAC takes one every second clock (dac_valid). Four sources can drive the
// DAC; which one is set by jitter_en (switch 3) and mode:
//
//   bypass    the latest ADC sample, held (jitter_en low, or MODE_BYPASS)
//   BUFF6     jitter_buff6 on the raw ADC stream: six registers shifted
//             once per ADC sample, picked by a 6th-order PN generator that
//             advances every clock, i.e. faster than the signal
//   MULTIPN   sinc_interp (x4 zero-stuffing + sinc FIR), then the
//             3-register jitter_multi_pn, picked by a PN generator of order
//             3 + pn_order_sel; registers and PN advance every clock
//   UNIFORM   jitter_uniform on the raw ADC stream: 25 registers shifted
//             once per ADC sample, a 3/5/13/25-register window (nregs),
//             picked by the 9th-order PN generator, which advances every
//             clock. 25 registers then hold four periods of a 10 MHz tone.
//
// The wide interpolated words of MULTIPN are brought back to 14 bits
// (Q12 -> integer, saturated). The chosen word is registered and
// downsampled by DAC_DIV (keep one in two) for the DAC. tap reports which register produced the
// current DAC word (BUFF6: 0 = din, 1..6 = a..f; MULTIPN: 0..2 = a..c;
// UNIFORM: 0..24 = a..y; bypass: 31).
//
// The three injectors, the rates and the x4 / x2 factors follow the
// document, where each injector was a separate FPGA build. Having all of
// them in one lane behind a run-time mode input, sharing one set of PN
// generators, running the first experiment's PN at the processing clock
// (the document used 125 or 200 MHz) and sending its output at the DAC
// rate of the later experiments are this design's choices. The document
// says its later experiments modified the signal at the 250 MHz rate, but
// also that its uniform sampler's registers held whole ADC samples (four
// 10 MHz periods in 25 registers) and fed it the raw samples with the ADC
// clock; UNIFORM follows the latter.
//
// Latency, ADC sample to the DAC word that first carries it: bypass 2-3
// clocks; BUFF6 and UNIFORM add the chosen register's depth in ADC
// samples; MULTIPN adds the 8-clock filter delay plus the register depth.
module link_channel
  import access_pkg::*;
#(
  parameter int DATA_W   = access_pkg::SAMPLE_W,
  parameter int WORD_W   = access_pkg::WIDE_W,
  parameter int DAC_DIV  = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adc_valid,
  input  logic [DATA_W-1:0] adc_data,
  input  logic                jitter_en,
  input  mode_e               mode,
  input  dist6_e              dist_sel,
  input  logic [2:0]          pn_order_sel,
  input  nregs_e              nregs,
  output logic                dac_valid,
  output logic [DATA_W-1:0] dac_data,
  output logic [4:0]          tap
);

  localparam int NPN = PN_MAX_ORDER - PN_MIN_ORDER + 1;  // 8 generators
  localparam logic [4:0] TAP_BYPASS = 5'd31;

  // ---------------------------------------------------------------- PN
  logic [PN_MAX_ORDER-1:0] pn_state [NPN];

  for (genvar g = 0; g < NPN; g++) begin : g_pn
    logic [PN_MIN_ORDER+g-1:0] st;
    logic                      unused_bit;
    pn_generator #(.ORDER(PN_MIN_ORDER + g)) u_pn (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (1'b1),
      .state  (st),
      .bit_out(unused_bit)
    );
    assign pn_state[g] = PN_MAX_ORDER'(st);
  end

  // ---------------------------------------------------------- bypass
  logic [DATA_W-1:0] adc_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         adc_hold <= '0;
    else if (adc_valid) adc_hold <= adc_data;
  end

  // ----------------------------------------------------------- BUFF6
  logic [DATA_W-1:0] buff6_out;
  logic [2:0]          buff6_tap;

  jitter_buff6 #(.DATA_W(DATA_W)) u_buff6 (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(adc_valid),
    .din     (adc_data),
    .sel     (pn_state[6-PN_MIN_ORDER][5:0]),
    .dist_sel    (dist_sel),
    .dout    (buff6_out),
    .tap     (buff6_tap)
  );

  // ---------------------------------------------------- interpolation
  logic signed [WORD_W-1:0] interp;

  sinc_interp #(.IN_W(DATA_W), .OUT_W(WORD_W), .L(4)) u_interp (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(adc_valid),
    .din     (adc_data),
    .dout    (interp)
  );

  // --------------------------------------------------------- MULTIPN
  logic [WORD_W-1:0] multi_out;
  logic [1:0]        multi_tap;

  jitter_multi_pn #(.DATA_W(WORD_W), .SEL_W(PN_MAX_ORDER)) u_multi (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(1'b1),
    .din     (interp),
    .sel     (pn_state[pn_order_sel]),
    .dout    (multi_out),
    .tap     (multi_tap)
  );

  // --------------------------------------------------------- UNIFORM
  logic [DATA_W-1:0] uni_out;
  logic [4:0]        uni_tap;

  jitter_uniform #(.DATA_W(DATA_W)) u_uniform (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(adc_valid),
    .din     (adc_data),
    .sel     (pn_state[9-PN_MIN_ORDER][8:0]),
    .nregs   (nregs),
    .dout    (uni_out),
    .tap     (uni_tap)
  );

  // Q12 wide word back to a saturated sample.
  function automatic logic [DATA_W-1:0] narrow(input logic [WORD_W-1:0] w);
    logic signed [WORD_W-1:0] s;
    s = signed'(w) >>> COEF_FRAC;
    if (s > WORD_W'(2**(DATA_W-1) - 1))     return {1'b0, {(DATA_W-1){1'b1}}};
    else if (s < -WORD_W'(2**(DATA_W-1)))   return {1'b1, {(DATA_W-1){1'b0}}};
    else                                      return s[DATA_W-1:0];
  endfunction

  // ----------------------------------------------------------- select
  logic [DATA_W-1:0] sel_data, sel_q;
  logic [4:0]          sel_tap, tap_q;

  always_comb begin
    if (!jitter_en) begin
      sel_data = adc_hold;
      sel_tap  = TAP_BYPASS;
    end else begin
      unique case (mode)
        MODE_BUFF6:   begin sel_data = buff6_out;         sel_tap = 5'(buff6_tap); end
        MODE_MULTIPN: begin sel_data = narrow(multi_out); sel_tap = 5'(multi_tap); end
        MODE_UNIFORM: begin sel_data = uni_out;           sel_tap = uni_tap;       end
        default:      begin sel_data = adc_hold;          sel_tap = TAP_BYPASS;    end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      tap_q <= TAP_BYPASS;
    end else begin
      sel_q <= sel_data;
      tap_q <= sel_tap;
    end
  end

  // ------------------------------------------------------ downsample
  logic tap_valid_unused;

  downsample #(.DATA_W(DATA_W), .LENGTH(DAC_DIV)) u_ds_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (sel_q),
    .dout     (dac_data),
    .out_valid(dac_valid)
  );

  downsample #(.DATA_W(5), .LENGTH(DAC_DIV)) u_ds_tap (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (tap_q),
    .dout     (tap),
    .out_valid(tap_valid_unused)
  );

endmodule
