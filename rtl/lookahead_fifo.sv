// lookahead_fifo: sample FIFO of one ADC stream with look-ahead access.
//
// Each ADC delivers one sample per clock into its own FIFO; the gain
// selection reads the FIFO at a fixed distance behind the write side, so the
// FIFO always holds DEPTH samples. It is built as a chain of DEPTH registers
// and every entry is visible on `taps`: taps[0] is the newest sample (written
// in the previous clock), taps[DEPTH-1] the oldest. Reading a sample k entries
// in from the newest end gives the decision logic k samples of look-ahead.
// The LiTE-DTU description names the two FIFOs and their look-ahead role; the depth,
// the shift-register structure and the zero fill at reset are this design's.
//
// Timing: din is registered into taps[0] on every rising clk edge.
module lookahead_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 12
) (
  input  logic                clk,
  input  logic                rst_n,   // synchronous, active low
  input  logic [W-1:0]        din,
  output logic [DEPTH-1:0][W-1:0] taps
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else begin
      taps[0] <= din;
      for (int i = 1; i < int'(DEPTH); i++) taps[i] <= taps[i-1];
    end
  end

endmodule
