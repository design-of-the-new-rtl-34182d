// tb_output_fifo: random writes of zero, one or two words per clock and
// random reads, phases that fill the FIFO to overflow and drain it empty.
// A queue model checks the head word, empty, level, which words were
// dropped and the sticky overflow flag.
module tb_output_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_en;
  logic [1:0][31:0] wr_data;
  logic rd_en;
  logic [31:0] rd_data;
  logic empty, overflow;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  int drops = 0, fulls = 0, empties = 0;
  logic [31:0] q[$];
  bit ovf = 0;

  output_fifo #(.DEPTH(DEPTH), .W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wp, rp;
    int room;
    bit pop;
    wr_en = '0; wr_data = '0; rd_en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      // phases: writer faster than reader, then slower
      wp = ((n / 500) % 2 == 1) ? 20 : 70;
      rp = ((n / 500) % 2 == 1) ? 80 : 30;
      wr_en[0] = $urandom_range(0, 99) < wp;
      wr_en[1] = $urandom_range(0, 99) < wp / 2;
      wr_data  = {$urandom, $urandom};
      rd_en    = $urandom_range(0, 99) < rp;
      #1;
      checks += 3;
      if (empty !== (q.size() == 0)) begin failures++; $display("n=%0d empty", n); end
      if (int'(level) != q.size()) begin failures++; $display("n=%0d level %0d want %0d", n, level, q.size()); end
      if (q.size() > 0 && rd_data !== q[0]) begin
        failures++;
        if (failures < 10) $display("n=%0d head %h want %h", n, rd_data, q[0]);
      end
      if (q.size() == 0) empties++;
      if (q.size() == DEPTH) fulls++;
      @(posedge clk);
      // the room a pop frees is usable only from the next clock
      room = DEPTH - q.size();
      pop = rd_en && q.size() > 0;
      for (int s = 0; s < 2; s++)
        if (wr_en[s]) begin
          if (room > 0) begin q.push_back(wr_data[s]); room--; end
          else begin ovf = 1; drops++; end
        end
      if (pop) void'(q.pop_front());
      @(negedge clk);
      checks++;
      if (overflow !== ovf) begin failures++; $display("n=%0d overflow %0b want %0b", n, overflow, ovf); end
    end
    checks++;
    if (drops == 0 || fulls == 0 || empties == 0) begin
      failures++; $display("full, empty or overflow never reached");
    end
    $display("dropped %0d, full %0d clocks, empty %0d clocks", drops, fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
