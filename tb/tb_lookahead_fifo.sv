// tb_lookahead_fifo: checks that every tap of the look-ahead FIFO holds the
// sample written the corresponding number of clocks ago (zero after reset).
module tb_lookahead_fifo;
  localparam int DEPTH = 6;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din;
  logic [DEPTH-1:0][W-1:0] taps;
  int checks = 0, failures = 0;
  logic [W-1:0] hist[$];

  lookahead_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < DEPTH; i++) hist.push_front('0);
    for (int n = 0; n < 300; n++) begin
      din = W'($urandom);
      @(posedge clk);
      hist.push_front(din);
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (taps[i] !== hist[i]) begin
          failures++;
          if (failures < 10) $display("n=%0d tap %0d: got %h want %h", n, i, taps[i], hist[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
