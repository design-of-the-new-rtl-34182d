// frame_builder: cuts the word stream into frames and closes each frame with
// a trailer word.
//
// Data words from the encoder pass straight to write slot 0 of the output
// FIFO. The builder counts the data words and the samples they carry and
// runs a CRC-12 over the words. With the FRAME_WORDS-th data word it writes,
// in the same clock, the trailer {11, 01, samples(8), CRC12, frame(8)} to
// write slot 1, clears the counters and the CRC and advances the 8-bit frame
// number. The trailer and its three fields follow the LiTE-DTU description; the fixed
// frame length of FRAME_WORDS data words (50 words hold at most 250 samples,
// which fits the 8-bit count) and the same-clock trailer are this design's.
//
// Timing: combinational from in_* to wr_en/wr_data (no added latency); the
// counters and CRC update on the clock edge.
module frame_builder
  import dtu_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_word,
  input  logic [2:0]       in_nsamp,
  output logic [1:0]       wr_en,       // [0] data word, [1] trailer
  output logic [1:0][31:0] wr_data,
  output logic [7:0]       frame_num    // number of the frame being filled
);

  logic [$clog2(FRAME_WORDS+1)-1:0] nwords;
  logic [7:0]                       nsamp;
  logic [11:0]                      crc, crc_next;
  logic                             last;
  logic [7:0]                       nsamp_total;

  assign last        = in_valid && (int'(nwords) == int'(FRAME_WORDS) - 1);
  assign nsamp_total = nsamp + 8'(in_nsamp);

  crc12 u_crc (
    .clk, .rst_n,
    .clear   (last),
    .en      (in_valid),
    .data    (in_word),
    .crc     (crc),
    .crc_next(crc_next));

  assign wr_en      = {last, in_valid};
  assign wr_data[0] = in_word;
  assign wr_data[1] = {HDR_TRAILER, nsamp_total, crc_next, frame_num};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nwords    <= '0;
      nsamp     <= '0;
      frame_num <= '0;
    end else if (last) begin
      nwords    <= '0;
      nsamp     <= '0;
      frame_num <= frame_num + 8'd1;
    end else if (in_valid) begin
      nwords <= nwords + 1'b1;
      nsamp  <= nsamp_total;
    end
  end

  // an 8-bit sample count must not wrap inside a frame
  initial assert (FRAME_WORDS * BASE_PER_WORD <= 255)
    else $error("FRAME_WORDS too large for the 8-bit sample count");

endmodule
