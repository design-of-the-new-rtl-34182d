// lite_dtu: digital core of the LiTE-DTU data transmission unit of one
// calorimeter channel.
//
// Two 12-bit ADCs (high and low gain of the trans-impedance preamplifier)
// deliver one sample each per 160 MHz clock. The core turns the pair into
// one compressed, framed word stream for a 1.28 Gb/s link:
//   gain_select      picks the high-gain sample unless a saturated high-gain
//                    sample lies in a window around it (look-ahead FIFOs),
//                    and tags the 13-bit sample with a gain bit;
//   huffman_encoder  packs baseline samples five per 32-bit word and signal
//                    samples two per word, with incomplete-group formats;
//   frame_builder    appends a trailer with sample count, CRC12 and frame
//                    number after every FRAME_WORDS data words;
//   output_fifo      absorbs signal bursts, which produce words faster than
//                    the link drains them;
//   serializer       sends the words LANE_W bits per clock and fills empty
//                    word slots with synchronization words.
// The chain and the word formats follow the LiTE-DTU description; sizes not given there
// (window, frame length, FIFO depth, link slice width) are this design's
// defaults and are parameters.
//
// Timing: no back-pressure anywhere; a sample enters every clock. An ADC
// sample reaches the encoder LOOK_AHEAD+1 clocks after it is captured, its word reaches the
// FIFO one clock later and the link after the words queued ahead of it.
// fifo_overflow is sticky until reset; fifo_level is the FIFO occupancy.
module lite_dtu
  import dtu_pkg::*;
#(
  parameter int unsigned LOOK_AHEAD  = 2,
  parameter int unsigned LOOK_BACK   = 5,
  parameter int unsigned FRAME_WORDS = 50,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned LANE_W      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  adc_hg,
  input  logic [ADC_W-1:0]  adc_lg,
  output logic [LANE_W-1:0] ser_data,
  output logic              ser_word_start,
  output logic              ser_is_sync,
  output logic              fifo_overflow,
  output logic [7:0]        frame_num,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level
);

  logic        smp_valid;
  sample_t     smp;

  logic        enc_valid;
  logic [31:0] enc_word;
  logic [2:0]  enc_nsamp;

  logic [1:0]       fb_wr_en;
  logic [1:0][31:0] fb_wr_data;

  logic        fifo_rd, fifo_empty;
  logic [31:0] fifo_data;

  gain_select #(.LOOK_AHEAD(LOOK_AHEAD), .LOOK_BACK(LOOK_BACK)) u_gain_select (
    .clk, .rst_n, .adc_hg, .adc_lg,
    .sample_valid(smp_valid), .sample(smp), .window_sat());

  huffman_encoder u_encoder (
    .clk, .rst_n,
    .in_valid(smp_valid), .in_sample(smp),
    .out_valid(enc_valid), .out_word(enc_word), .out_nsamp(enc_nsamp));

  frame_builder #(.FRAME_WORDS(FRAME_WORDS)) u_frame_builder (
    .clk, .rst_n,
    .in_valid(enc_valid), .in_word(enc_word), .in_nsamp(enc_nsamp),
    .wr_en(fb_wr_en), .wr_data(fb_wr_data), .frame_num(frame_num));

  output_fifo #(.DEPTH(FIFO_DEPTH), .W(32)) u_fifo (
    .clk, .rst_n,
    .wr_en(fb_wr_en), .wr_data(fb_wr_data),
    .rd_en(fifo_rd), .rd_data(fifo_data), .empty(fifo_empty),
    .overflow(fifo_overflow), .level(fifo_level));

  serializer #(.LANE_W(LANE_W)) u_serializer (
    .clk, .rst_n,
    .fifo_empty(fifo_empty), .fifo_data(fifo_data), .fifo_rd(fifo_rd),
    .ser_data(ser_data), .word_start(ser_word_start), .is_sync(ser_is_sync));

endmodule
