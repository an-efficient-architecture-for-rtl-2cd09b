// x4 zero-stuffing upsampler with a sinc interpolation filter.
//
// The ADC delivers a sample every L clocks (in_valid high). The stuffed
// stream carries that sample in the cycle it arrives and zero in the L-1
// cycles between, which is upsampling by L with zero padding. A 15-tap FIR
// with windowed-sinc coefficients then fills the gaps, so that one smooth
// wide sample leaves per clock:
//
//   h[n] = round(2^12 * sinc(n/4) * (1 + cos(pi*n/8)) / 2),  n = -7..7,
//   sinc(x) = sin(pi*x)/(pi*x)
//
// h[0] = 4096 and h[+-4] = 0, so each input sample reappears exactly (in
// Q12) at its own position and the samples between are interpolated; the
// gain of each of the four polyphase branches is within 2.5 % of 1.0 in Q12.
//
// The document says only that the stream was upsampled by 4, zero-padded
// and passed through a sinc(x) filter; the tap count, the Hann window, the
// Q12 scale and the two's-complement samples are this design's choices.
// Timing: the stuffed sample enters the delay line at a clock edge and the
// filtered sum is registered at the next, so an impulse on din appears at
// the centre tap h[0] on dout 8 clocks after the edge that took it.
module sinc_interp #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 32,
  parameter int L     = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  localparam int NTAPS = 15;
  localparam int COEF_W = 14;
  localparam logic signed [COEF_W-1:0] H [NTAPS] = '{
    -14'sd20, -14'sd127, -14'sd228, 14'sd0, 14'sd850, 14'sd2226, 14'sd3547, 14'sd4096,
    14'sd3547, 14'sd2226, 14'sd850, 14'sd0, -14'sd228, -14'sd127, -14'sd20
  };

  logic signed [IN_W-1:0]  line [NTAPS];
  logic signed [OUT_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) line[i] <= '0;
    end else begin
      line[0] <= in_valid ? din : '0;
      for (int i = 1; i < NTAPS; i++) line[i] <= line[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NTAPS; i++) acc = acc + OUT_W'(line[i] * H[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= acc;
  end

  initial assert (L == 4) else $error("sinc_interp: coefficients are designed for L = 4");

endmodule
