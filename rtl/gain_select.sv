// gain_select: high/low gain sample selection with look-ahead.
//
// The two ADC streams (high gain and low gain) each enter a lookahead_fifo.
// The sample being decided on sits LOOK_AHEAD entries behind the newest one,
// so the high-gain FIFO shows LOOK_AHEAD samples after it and LOOK_BACK
// samples before it. If any high-gain sample in that window of
// LOOK_AHEAD+1+LOOK_BACK samples is saturated (equal to SAT_LEVEL) the
// low-gain value is sent, otherwise the high-gain value, together with a
// gain bit (dtu_pkg::gain_e, 1 = low gain). A pulse is thereby switched to low
// gain a few samples before it saturates and stays there until a few samples
// after, instead of flipping gain in the middle of its edges.
// The rule "high gain unless a saturated sample lies in a window around the
// current one" and the gain bit follow the LiTE-DTU description; the window size, the
// saturation level and the polarity of the gain bit are this design's.
//
// Timing: one sample in and one out per clock. An ADC sample captured at
// clock edge t is on `sample` after edge t+LOOK_AHEAD+1 (the look-ahead
// delay plus one output register). sample_valid rises with the first sample
// captured after reset and then stays high.
module gain_select
  import dtu_pkg::*;
#(
  parameter int unsigned LOOK_AHEAD = 2,
  parameter int unsigned LOOK_BACK  = 5,
  parameter logic [ADC_W-1:0] SAT_LEVEL = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ADC_W-1:0] adc_hg,
  input  logic [ADC_W-1:0] adc_lg,
  output logic             sample_valid,
  output sample_t          sample,
  output logic             window_sat     // current decision is low gain
);

  localparam int unsigned WIN = LOOK_AHEAD + 1 + LOOK_BACK;

  logic [WIN-1:0][ADC_W-1:0]        hg_taps;
  logic [LOOK_AHEAD:0][ADC_W-1:0]   lg_taps;

  lookahead_fifo #(.DEPTH(WIN), .W(ADC_W)) u_fifo_hg (
    .clk, .rst_n, .din(adc_hg), .taps(hg_taps));

  lookahead_fifo #(.DEPTH(LOOK_AHEAD + 1), .W(ADC_W)) u_fifo_lg (
    .clk, .rst_n, .din(adc_lg), .taps(lg_taps));

  always_comb begin
    window_sat = 1'b0;
    for (int i = 0; i < int'(WIN); i++)
      if (hg_taps[i] == SAT_LEVEL) window_sat = 1'b1;
  end

  // samples seen since reset, saturating once the current tap is filled
  logic [$clog2(LOOK_AHEAD + 2)-1:0] fill;
  logic                              cur_ok;
  assign cur_ok = (int'(fill) == int'(LOOK_AHEAD) + 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill         <= '0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      if (!cur_ok) fill <= fill + 1'b1;
      sample_valid <= cur_ok;
      if (window_sat) sample <= '{gain: GAIN_LOW,  value: lg_taps[LOOK_AHEAD]};
      else            sample <= '{gain: GAIN_HIGH, value: hg_taps[LOOK_AHEAD]};
    end
  end

endmodule
