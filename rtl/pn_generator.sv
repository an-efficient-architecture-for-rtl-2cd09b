// PN generator: maximal-length linear feedback shift register.
//
// A chain of ORDER one-bit stages shifts from the input stage (a) toward
// the output stage; the input stage is loaded with the XOR of the tap stages
// named by the primitive polynomial of that order (access_pkg::pn_taps), so
// the register walks through all 2^ORDER - 1 non-zero states before it
// repeats (7 for order 3 up to 1023 for order 10). The whole state, read as
// a number {a, b, ..., last}, is what the noise injectors use to pick a
// register; bit_out is the last stage, the serial PN sequence.
//
// Interface: state advances by one step on each clock with en high. Reset
// seeds the last stage with 1 and clears the others, as the document seeds
// its generators. The polynomials and the seed follow the document; the
// synchronous enable and the active-low reset are this design's choice.
module pn_generator
  import access_pkg::*;
#(
  parameter int ORDER = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [ORDER-1:0] state,
  output logic             bit_out
);

  localparam logic [PN_MAX_ORDER-1:0] TAPS = pn_taps(ORDER);

  logic feedback;

  always_comb begin
    feedback = 1'b0;
    for (int i = 1; i <= ORDER; i++) begin
      if (TAPS[i-1]) feedback = feedback ^ state[ORDER-i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= ORDER'(1);
    else if (en) state <= {feedback, state[ORDER-1:1]};
  end

  assign bit_out = state[0];

  initial begin
    assert (ORDER >= PN_MIN_ORDER && ORDER <= PN_MAX_ORDER)
      else $error("pn_generator: ORDER %0d has no polynomial", ORDER);
  end

  // The all-zero state would lock the register; it must never be reached.
  assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
