// Uniform-window non-uniform sampler with 3, 5, 13 or 25 registers.
//
// The sample stream shifts through registers a..y (25 of them, a newest).
// A 9-bit PN value, which runs through 1..511, is split into near-equal
// ranges, one per register of the chosen window, so each register of the
// window is picked about equally often and the output may come from
// anywhere in it. A longer window holds more of the signal period and adds
// more noise. Ranges (PN values, inclusive):
//
//   3 registers   1-170 a, 171-341 c, 342-511 b
//   5 registers   1-102 a, 103-204 b, 205-307 c, 308-409 d, 410-511 e
//   13 registers  39 or 40 values each, a..m in order, bounds
//                 39 78 117 156 196 236 275 315 355 394 433 472 511
//   25 registers  1-231 h..r in runs of 21, 232-371 a..g in runs of 20,
//                 372-511 s..y in runs of 20
//
// The ranges follow the document (value 0 never occurs; it goes to the
// first range). In the document each window length was a separate module;
// here one 25-register chain serves all four and nregs picks the ranges
// at run time. Interface: registers shift when shift_en is high; dout and
// tap (0..24 = a..y) are combinational.
module jitter_uniform
  import access_pkg::*;
#(
  parameter int DATA_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [DATA_W-1:0] din,
  input  logic [8:0]        sel,
  input  nregs_e            nregs,
  output logic [DATA_W-1:0] dout,
  output logic [4:0]        tap
);

  localparam int NREGS_MAX = 25;

  logic [DATA_W-1:0] regs [NREGS_MAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS_MAX; i++) regs[i] <= '0;
    end else if (shift_en) begin
      regs[0] <= din;
      for (int i = 1; i < NREGS_MAX; i++) regs[i] <= regs[i-1];
    end
  end

  // Upper bounds of the 13-register ranges.
  localparam int unsigned BOUND13 [13] =
    '{39, 78, 117, 156, 196, 236, 275, 315, 355, 394, 433, 472, 511};

  function automatic logic [4:0] pick(input nregs_e n, input int unsigned v);
    int unsigned idx;
    case (n)
      REGS_3:
        if      (v <= 170) idx = 0;
        else if (v <= 341) idx = 2;
        else               idx = 1;
      REGS_5:
        if      (v <= 102) idx = 0;
        else if (v <= 204) idx = 1;
        else if (v <= 307) idx = 2;
        else if (v <= 409) idx = 3;
        else               idx = 4;
      REGS_13: begin
        idx = 0;
        for (int i = 0; i < 12; i++) if (v > BOUND13[i]) idx = i + 1;
      end
      default:
        if      (v == 0)   idx = 7;
        else if (v <= 231) idx = 7 + (v - 1) / 21;
        else if (v <= 371) idx = (v - 232) / 20;
        else               idx = 18 + (v - 372) / 20;
    endcase
    return 5'(idx);
  endfunction

  always_comb begin
    tap  = pick(nregs, int'(sel));
    dout = regs[tap];
  end

endmodule
