// Downsampler: keeps one sample in every LENGTH clocks and holds it.
//
// A counter runs 0..LENGTH-1 on the fast clock; in the cycle it reaches
// LENGTH-1 the input is captured into the output register, and out_valid
// is high for the cycle after, while the new value is first on dout. The
// held value is what the DAC writes at its slower rate (LENGTH = 2 turns
// the 250 MHz processing stream into the 125 MHz DAC stream).
//
// The count-and-capture behaviour and LENGTH = 2 follow the document. The
// document captures on a pulse derived from a counter on the falling clock
// edge; here the capture is a clock enable on the same rising edge, and
// the counter width is derived from LENGTH.
module downsample #(
  parameter int DATA_W = 14,
  parameter int LENGTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              out_valid
);

  localparam int CNT_W = (LENGTH > 1) ? $clog2(LENGTH) : 1;

  logic [CNT_W-1:0] count;
  logic             pulse;

  assign pulse = (count == CNT_W'(LENGTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      dout      <= '0;
      out_valid <= 1'b0;
    end else begin
      count     <= pulse ? '0 : count + 1'b1;
      out_valid <= pulse;
      if (pulse) dout <= din;
    end
  end

endmodule
