// Three-register non-uniform sampler for PN generators of any order.
//
// The interpolated sample stream shifts through registers a, b, c. The PN
// value selects the output register: value 1 picks a, value 2 picks c and
// every other value picks the middle register b. Values 1 and 2 occur in
// the state sequence of every PN order, so a generator of period P sends
// a and c once each per period and b P-2 times: a longer PN sequence
// concentrates the output on b. This follows the document; the register
// tap output is this design's addition for observation.
//
// Interface: registers shift on clk when shift_en is high; dout and tap
// (0..2 = a..c) are combinational from sel and the registers.
module jitter_multi_pn #(
  parameter int DATA_W = 32,
  parameter int SEL_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [DATA_W-1:0] din,
  input  logic [SEL_W-1:0]  sel,
  output logic [DATA_W-1:0] dout,
  output logic [1:0]        tap
);

  logic [DATA_W-1:0] regs [3];  // regs[0] = a, regs[1] = b, regs[2] = c

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) regs[i] <= '0;
    end else if (shift_en) begin
      regs[0] <= din;
      regs[1] <= regs[0];
      regs[2] <= regs[1];
    end
  end

  always_comb begin
    if      (sel == SEL_W'(1)) tap = 2'd0;
    else if (sel == SEL_W'(2)) tap = 2'd2;
    else                       tap = 2'd1;
    dout = regs[tap];
  end

endmodule
