// tb_serializer: a queue stands in for the output FIFO and is filled in
// random bursts. The testbench rebuilds 32-bit words from the LANE_W-bit
// slices and checks that a word starts every 32/LANE_W clocks, that each
// word is the next queued word or, when the queue was empty at the word
// boundary, the sync word, and that the FIFO is popped only at boundaries.
module tb_serializer;
  localparam int LANE_W = 8;
  localparam int SL = 32 / LANE_W;
  localparam logic [31:0] SYNC = 32'hE5555555;
  logic clk = 0, rst_n = 0;
  logic fifo_empty, fifo_rd;
  logic [31:0] fifo_data;
  logic [LANE_W-1:0] ser_data;
  logic word_start, is_sync;
  int checks = 0, failures = 0;
  int n_sync = 0, n_data = 0;
  logic [31:0] q[$];
  logic [31:0] expw[$];

  serializer #(.LANE_W(LANE_W)) dut (.*);

  always #5 clk = ~clk;
  function automatic void show_head();
    fifo_empty = (q.size() == 0);
    fifo_data  = (q.size() > 0) ? q[0] : 32'h0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int cyc = 0, slice = 0;
    logic [31:0] acc;
    bit acc_sync;
    bit boundary;
    show_head();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      // bursts of words, then silence
      if ((n / 200) % 2 == 0 && $urandom_range(0, 99) < 40) q.push_back($urandom);
      show_head();
      #1;
      boundary = (cyc % SL == 0);
      checks++;
      if (fifo_rd !== (boundary && q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d fifo_rd=%0b boundary=%0b", n, fifo_rd, boundary);
      end
      if (boundary) expw.push_back(q.size() > 0 ? q[0] : SYNC);
      @(posedge clk);
      if (fifo_rd && q.size() > 0) void'(q.pop_front());
      cyc++;
      @(negedge clk);
      show_head();
      // collect the slice now on the output
      checks++;
      if (word_start !== ((cyc - 1) % SL == 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d word_start=%0b", n, word_start);
      end
      if (word_start) begin acc = '0; slice = 0; acc_sync = is_sync; end
      acc = (acc << LANE_W) | 32'(ser_data);
      slice++;
      if (slice == SL) begin
        checks++;
        if (expw.size() == 0 || acc !== expw[0] || acc_sync !== (expw[0] == SYNC)) begin
          failures++;
          if (failures < 10) $display("n=%0d word %h sync=%0b want %h", n, acc, acc_sync,
                                      (expw.size() > 0) ? expw[0] : 0);
        end
        if (acc == SYNC) n_sync++; else n_data++;
        if (expw.size() > 0) void'(expw.pop_front());
      end
    end
    checks++;
    if (n_sync == 0 || n_data == 0) begin failures++; $display("no sync or no data word"); end
    $display("data words %0d, sync words %0d", n_data, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
