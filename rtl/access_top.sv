// Channel-access pass-through: the FPGA core that sits between a base
// station and a mobile and relays both links through digital hardware.
//
// Each side of the FPGA has a daughter board with two ADCs and two DACs.
// The RF front ends bring the received link down to an intermediate
// frequency as separate I and Q signals; the ADCs sample them, and the
// FPGA sends every sample to the DACs of the opposite board, which feed
// the modulator toward the other party:
//
//   cell  ADC I/Q  --link_channel x2-->  base DAC I/Q   (reverse link)
//   base  ADC I/Q  --link_channel x2-->  cell DAC I/Q   (forward link)
//
// With sw[3] low the samples pass unchanged, so both parties see the
// system as a transparent piece of cable. With sw[3] high every lane adds
// noise by non-uniform sampling; nus_mode picks the injector (see
// link_channel), sw[1:0] the window of the uniform injector (3, 5, 13 or
// 25 registers), dist_sel the distribution of the 6-register injector, and
// pn_order_sel the PN order (3 + value) of the multi-PN injector. sw[2]
// has no function.
//
// Clocking: one processing clock clk (250 MHz in the document's build).
// adc_clk_en is high one clock in ADC_DIV (62.5 MHz ADC rate): the ADCs
// are sampled at that instant and the adc inputs must hold the new
// samples in that cycle. dac_wr_en is high one clock in DAC_DIV (125 MHz
// DAC rate) with new DAC words on the outputs. The document derives these
// rates from a PLL; here they are clock enables of one clock.
//
// Status: ledr/ledb show, from bit 7 down, the external reference, four
// constant-on bits with the PLL lock flag at bit 3, and the inverted
// out-of-range flags of ADC channel A (ledr) or B (ledb) of the base
// (bit 1) and cell (bit 0) boards. ledg[7] is the inverted sample-rate
// enable, the others are on. hex1/hex0 show {OTR_A,0,0,OTR_B} of the base
// and cell boards. The LED and display layout follows the document; the
// extra control inputs for the mode, distribution and PN order, the
// injection on both I and Q, and the two's-complement samples are this
// design's own.
module access_top
  import access_pkg::*;
#(
  parameter int DATA_W   = access_pkg::SAMPLE_W,
  parameter int ADC_DIV  = 4,
  parameter int DAC_DIV  = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pll_locked,
  input  logic                ext_clk,
  input  logic [3:0]          sw,
  input  mode_e               nus_mode,
  input  dist6_e              dist_sel,
  input  logic [2:0]          pn_order_sel,
  // cell (mobile) side board
  input  logic [DATA_W-1:0] cell_adc_i,
  input  logic [DATA_W-1:0] cell_adc_q,
  input  logic                cell_otr_a,
  input  logic                cell_otr_b,
  output logic [DATA_W-1:0] cell_dac_i,
  output logic [DATA_W-1:0] cell_dac_q,
  // base station side board
  input  logic [DATA_W-1:0] base_adc_i,
  input  logic [DATA_W-1:0] base_adc_q,
  input  logic                base_otr_a,
  input  logic                base_otr_b,
  output logic [DATA_W-1:0] base_dac_i,
  output logic [DATA_W-1:0] base_dac_q,
  // converter timing
  output logic                adc_clk_en,
  output logic                dac_wr_en,
  output logic                dac_mode,
  // status
  output logic [7:0]          ledr,
  output logic [7:0]          ledb,
  output logic [7:0]          ledg,
  output logic [6:0]          hex0,
  output logic [6:0]          hex1,
  output logic                hex0_dp,
  output logic                hex1_dp,
  // which register drives each lane's current DAC word
  output logic [4:0]          tap_cell_i,
  output logic [4:0]          tap_cell_q,
  output logic [4:0]          tap_base_i,
  output logic [4:0]          tap_base_q
);

  localparam int DIV_W = (ADC_DIV > 1) ? $clog2(ADC_DIV) : 1;

  // ------------------------------------------------ ADC sampling rate
  logic [DIV_W-1:0] div_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= (div_cnt == DIV_W'(ADC_DIV - 1)) ? '0 : div_cnt + 1'b1;
  end

  assign adc_clk_en = (div_cnt == DIV_W'(ADC_DIV - 1));

  // ---------------------------------------------------------- lanes
  nregs_e nregs;
  assign nregs = nregs_e'(sw[1:0]);

  logic [3:0] lane_valid;

  link_channel #(.DATA_W(DATA_W), .DAC_DIV(DAC_DIV)) u_rev_i (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_clk_en), .adc_data(cell_adc_i),
    .jitter_en(sw[3]), .mode(nus_mode), .dist_sel(dist_sel), .pn_order_sel(pn_order_sel), .nregs(nregs),
    .dac_valid(lane_valid[0]), .dac_data(base_dac_i), .tap(tap_cell_i)
  );

  link_channel #(.DATA_W(DATA_W), .DAC_DIV(DAC_DIV)) u_rev_q (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_clk_en), .adc_data(cell_adc_q),
    .jitter_en(sw[3]), .mode(nus_mode), .dist_sel(dist_sel), .pn_order_sel(pn_order_sel), .nregs(nregs),
    .dac_valid(lane_valid[1]), .dac_data(base_dac_q), .tap(tap_cell_q)
  );

  link_channel #(.DATA_W(DATA_W), .DAC_DIV(DAC_DIV)) u_fwd_i (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_clk_en), .adc_data(base_adc_i),
    .jitter_en(sw[3]), .mode(nus_mode), .dist_sel(dist_sel), .pn_order_sel(pn_order_sel), .nregs(nregs),
    .dac_valid(lane_valid[2]), .dac_data(cell_dac_i), .tap(tap_base_i)
  );

  link_channel #(.DATA_W(DATA_W), .DAC_DIV(DAC_DIV)) u_fwd_q (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_clk_en), .adc_data(base_adc_q),
    .jitter_en(sw[3]), .mode(nus_mode), .dist_sel(dist_sel), .pn_order_sel(pn_order_sel), .nregs(nregs),
    .dac_valid(lane_valid[3]), .dac_data(cell_dac_q), .tap(tap_base_q)
  );

  // All four lanes share reset and counters, so their strobes coincide.
  assign dac_wr_en = lane_valid[0];
  assign dac_mode  = 1'b1;  // dual-port DAC mode

  assert property (@(posedge clk) disable iff (!rst_n) lane_valid == {4{lane_valid[0]}});

  // --------------------------------------------------------- status
  assign ledr = {ext_clk, 1'b1, 1'b1, 1'b1, pll_locked, 1'b1, ~base_otr_a, ~cell_otr_a};
  assign ledb = {ext_clk, 1'b1, 1'b1, 1'b1, pll_locked, 1'b1, ~base_otr_b, ~cell_otr_b};
  assign ledg = {~adc_clk_en, 7'b111_1111};

  seg7_decode u_hex_base (.value({base_otr_a, 1'b0, 1'b0, base_otr_b}), .seg_n(hex1));
  seg7_decode u_hex_cell (.value({cell_otr_a, 1'b0, 1'b0, cell_otr_b}), .seg_n(hex0));

  assign hex0_dp = 1'b1;
  assign hex1_dp = 1'b1;

endmodule
