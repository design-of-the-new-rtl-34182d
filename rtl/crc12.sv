// crc12: CRC-12 accumulator over 32-bit words.
//
// The frame trailer carries a CRC12 of the frame's data words. The LiTE-DTU
// description does not give the polynomial; this design uses x^12+x^11+x^3+x^2+x+1
// (POLY = 12'h80F), starts from zero and feeds each word MSB first. A whole
// word is absorbed per clock (32 serial steps unrolled by
// dtu_pkg::crc12_word).
//
// Timing: crc_next = CRC of the stored value extended by `data`, available
// combinationally in the same clock; on the clock edge the register takes
// crc_next when en is high. clear restarts the register at zero and has
// priority over en; the frame builder raises it with the frame's last word,
// whose CRC it takes from crc_next.
module crc12
  import dtu_pkg::*;
#(
  parameter logic [11:0] POLY = CRC12_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [31:0] data,
  output logic [11:0] crc,
  output logic [11:0] crc_next
);

  assign crc_next = crc12_word(crc, data, POLY);

  always_ff @(posedge clk) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= crc_next;
  end

endmodule
