// Six-register non-uniform sampler (the first noise experiment).
//
// The ADC sample stream shifts through registers a..f (a newest). A 6-bit
// PN value chooses one of seven sources, din or a..f, through a 7:1
// multiplexer, so the output is an earlier or later sample picked at
// random; sample order is not kept, which is what adds the noise. The
// mapping of the 64 PN values to the sources gives the distribution:
//
//   DIST_NORMAL  din 4, a 5, b 10, c 26, d 10, e 5, f 4   (values per 64)
//   DIST_TIGHT   din 2, a 4, b 10, c 32, d 10, e 4, f 2
//   DIST_EVEN    din 9, a 9, b 9, c 10, d 9, e 9, f 9
//   DIST_SINGLE  c 64 (plain uniform sampling, three samples late)
//
// The counts and which PN values map to which register follow the
// document's tables; there each distribution was a separate build, here
// it is a run-time input. Interface: registers shift on clk when shift_en
// is high; dout and tap (0 = din, 1..6 = a..f) are combinational from sel,
// dist_sel and the registers.
module jitter_buff6
  import access_pkg::*;
#(
  parameter int DATA_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [DATA_W-1:0] din,
  input  logic [5:0]        sel,
  input  dist6_e            dist_sel,
  output logic [DATA_W-1:0] dout,
  output logic [2:0]        tap
);

  logic [DATA_W-1:0] regs [1:6];  // regs[1] = a ... regs[6] = f

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 6; i++) regs[i] <= '0;
    end else if (shift_en) begin
      regs[1] <= din;
      for (int i = 2; i <= 6; i++) regs[i] <= regs[i-1];
    end
  end

  // Source index for a PN value: 0 = din, 1..6 = a..f.
  function automatic logic [2:0] pick(input dist6_e d, input int unsigned v);
    case (d)
      DIST_NORMAL:
        if      (v <= 3)  return 3'd0;
        else if (v <= 7)  return 3'd6;
        else if (v <= 12) return 3'd1;
        else if (v <= 17) return 3'd5;
        else if (v <= 27) return 3'd4;
        else if (v <= 37) return 3'd2;
        else              return 3'd3;
      DIST_TIGHT:
        if      (v <= 1)  return 3'd0;
        else if (v <= 3)  return 3'd6;
        else if (v <= 7)  return 3'd5;
        else if (v <= 11) return 3'd1;
        else if (v <= 16) return 3'd2;
        else if (v <= 23) return 3'd4;
        else if (v <= 26) return 3'd2;
        else if (v <= 31) return (v[0] ? 3'd4 : 3'd2);  // 27..31 alternate d, b
        else              return 3'd3;
      DIST_EVEN:
        if (v == 63) return 3'd3;
        else         return 3'(v / 9);
      default:
        return 3'd3;
    endcase
  endfunction

  always_comb begin
    tap  = pick(dist_sel, int'(sel));
    dout = (tap == 3'd0) ? din : regs[tap];
  end

endmodule
