// dtu_pkg: types and constants shared by the LiTE-DTU digital blocks.
//
// The 32-bit word formats follow the data format of the LiTE-DTU link:
//   baseline quintet      01 | s4 | s3 | s2 | s1 | s0          (5 x 6 bit)
//   incomplete baseline   10 | N  | s3/0 | s2/0 | s1/0 | s0    (N = 1..4, 6-bit field)
//   signal couple         001010 | s1 | s0                     (2 x 13 bit)
//   single signal         001011 | 0101010101010 | s0
//   trailer               11 | 01 | samples(8) | CRC12 | frame(8)
//   synchronization       1110 | 0101...01 (28 bit)
// The headers and field widths are those of the format; the slot order
// (earliest sample in the least significant slot), the N field width and the
// CRC polynomial are this design's choices.
package dtu_pkg;

  localparam int unsigned ADC_W    = 12;         // ADC resolution
  localparam int unsigned SAMPLE_W = ADC_W + 1;  // gain bit + value
  localparam int unsigned BASE_W   = 6;          // baseline sample width
  localparam int unsigned WORD_W   = 32;         // link word width
  localparam int unsigned BASE_PER_WORD = 5;

  // gain bit carried with every selected sample
  typedef enum logic {GAIN_HIGH = 1'b0, GAIN_LOW = 1'b1} gain_e;

  typedef struct packed {
    gain_e             gain;
    logic [ADC_W-1:0]  value;
  } sample_t;

  localparam logic [1:0]  HDR_BASE      = 2'b01;
  localparam logic [1:0]  HDR_BASE_PART = 2'b10;
  localparam logic [5:0]  HDR_SIG       = 6'b001010;
  localparam logic [5:0]  HDR_SIG_PART  = 6'b001011;
  localparam logic [12:0] SIG_FILLER    = 13'b0101010101010;
  localparam logic [3:0]  HDR_TRAILER   = 4'b1101;
  localparam logic [31:0] SYNC_WORD     = {4'b1110, 28'h5555555};

  localparam logic [11:0] CRC12_POLY    = 12'h80F;  // x^12+x^11+x^3+x^2+x+1

  // A sample is a baseline sample when it comes from the high gain and
  // needs no more than 6 bits.
  function automatic logic is_baseline(sample_t s);
    return (s.gain == GAIN_HIGH) && (s.value < 12'(1 << BASE_W));
  endfunction

  // CRC-12 of one 32-bit word, MSB first, starting from crc_in.
  function automatic logic [11:0] crc12_word(logic [11:0] crc_in, logic [31:0] d,
                                             logic [11:0] poly);
    logic [11:0] c;
    c = crc_in;
    for (int i = 31; i >= 0; i--) begin
      if (c[11] ^ d[i]) c = (c << 1) ^ poly;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
