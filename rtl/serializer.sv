// serializer: sends 32-bit words on the output link, LANE_W bits per clock.
//
// At every word boundary the serializer loads the head of the output FIFO,
// or, when the FIFO is empty, the synchronization word
// {1110, 0101...01} so that the link never idles. The loaded word is then
// shifted out most significant bits first, LANE_W bits per clock, taking
// 32/LANE_W clocks. Sending a sync word whenever no data is available is the
// LiTE-DTU description's rule; the slice width (8 bits per 160 MHz clock = 1.28 Gb/s)
// and MSB-first order are this design's. The final bit-serial stage that
// runs at LANE_W times the clock rate is a full-custom circuit and is not
// part of this logic: ser_data is its parallel input.
//
// Timing: fifo_rd is combinational and pops in the clock the word is
// loaded; the first slice of that word appears on ser_data in the next
// clock, flagged by word_start. is_sync marks slices of a sync word.
module serializer
  import dtu_pkg::*;
#(
  parameter int unsigned LANE_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fifo_empty,
  input  logic [31:0]       fifo_data,
  output logic              fifo_rd,
  output logic [LANE_W-1:0] ser_data,
  output logic              word_start,
  output logic              is_sync
);

  localparam int unsigned SLICES = WORD_W / LANE_W;

  logic [31:0]                       shreg;
  logic [$clog2(SLICES+1)-1:0]       left;   // slices still to send after the current one
  logic                              load;

  assign load     = (left == '0);
  assign fifo_rd  = load && !fifo_empty;
  assign ser_data = shreg[31 -: LANE_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg      <= SYNC_WORD;
      left       <= '0;
      word_start <= 1'b0;
      is_sync    <= 1'b1;
    end else if (load) begin
      shreg      <= fifo_empty ? SYNC_WORD : fifo_data;
      left       <= ($bits(left))'(SLICES - 1);
      word_start <= 1'b1;
      is_sync    <= fifo_empty;
    end else begin
      shreg      <= shreg << LANE_W;
      left       <= left - 1'b1;
      word_start <= 1'b0;
    end
  end

  // the FIFO is popped only when it holds a word, and only at word boundaries
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_rd |-> (!fifo_empty && load));

  initial assert (WORD_W % LANE_W == 0) else $error("LANE_W must divide 32");

endmodule
