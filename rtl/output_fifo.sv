// output_fifo: word FIFO between the frame builder and the serializer.
//
// Up to two words are written per clock (slot 0 before slot 1, so a frame's
// last data word precedes its trailer) and one is read. A word that finds no
// room is dropped and sets the sticky `overflow` flag; slot 0 is served
// first. The FIFO itself follows the LiTE-DTU description; its depth, the two write slots
// and the drop-on-full policy are this design's.
//
// Timing: rd_data is the head word, valid whenever empty is low; rd_en pops
// it on the clock edge. Writes are visible to the reader in the next clock.
// A pop and writes in the same clock are allowed; the room a pop frees is
// available only from the next clock.
module output_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          wr_en,
  input  logic [1:0][W-1:0]   wr_data,
  input  logic                rd_en,
  output logic [W-1:0]        rd_data,
  output logic                empty,
  output logic                overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [1:0]    acc;          // which slots are stored
  logic [1:0]    nacc;
  logic          pop;

  assign empty   = (level == '0);
  assign rd_data = mem[rd_ptr];
  assign pop     = rd_en && !empty;

  always_comb begin
    acc = '0;
    if (wr_en[0] && int'(level) < int'(DEPTH))         acc[0] = 1'b1;
    if (wr_en[1] && int'(level) + int'(acc[0]) < int'(DEPTH)) acc[1] = 1'b1;
    nacc = 2'(acc[0]) + 2'(acc[1]);
  end

  always_ff @(posedge clk) begin
    if (acc[0]) mem[wr_ptr] <= wr_data[0];
    if (acc[1]) mem[AW'(wr_ptr + AW'(acc[0]))] <= wr_data[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      wr_ptr <= AW'(wr_ptr + AW'(nacc));
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      level <= level + ($bits(level))'(nacc) - ($bits(level))'(pop);
      if ((wr_en & ~acc) != '0) overflow <= 1'b1;
    end
  end

  a_level_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(level) <= int'(DEPTH));
  a_empty_head: assert property (@(posedge clk) disable iff (!rst_n)
    empty |-> !pop);

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

endmodule
