// tb_lite_dtu_pedestal: link bandwidth with a pedestal-only input.
//
// Every sample is a 6-bit baseline sample, the common case on a calorimeter
// channel. Five samples fill a 32-bit word and a trailer follows every
// FRAME_WORDS data words, so the stream needs 51 words per 250 clocks while
// the link sends one word per 32/LANE_W = 4 clocks (62.5 words). The rest,
// 11.5 words per 250 clocks (18.4 %), must be sync words. The test checks
// the measured share of sync words, that every sample arrives in order with
// its value, and that the output FIFO never holds more than two words.
module tb_lite_dtu_pedestal;
  import dtu_pkg::*;
  localparam int N = 25000, SL = 4;
  localparam logic [31:0] SYNC = 32'hE5555555;

  logic clk = 0, rst_n = 0;
  logic [11:0] adc_hg, adc_lg;
  logic [7:0] ser_data;
  logic ser_word_start, ser_is_sync, fifo_overflow;
  logic [7:0] frame_num;
  logic [4:0] fifo_level;

  lite_dtu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_words = 0, n_sync = 0, n_trailer = 0, nout = 0, max_level = 0;
  logic [5:0] sent[$];

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] acc;
  int slice = 0;
  bit started = 0, counting = 0;

  always @(negedge clk) if (rst_n) begin
    if (int'(fifo_level) > max_level) max_level = int'(fifo_level);
    if (ser_word_start) begin started = 1; slice = 0; acc = '0; end
    if (started) begin
      acc = (acc << 8) | 32'(ser_data);
      slice++;
      if (slice == SL) begin
        slice = 0;
        if (counting) n_words++;
        if (acc == SYNC) begin
          if (counting) n_sync++;
        end else if (acc[31:28] == 4'b1101) begin
          n_trailer++;
        end else begin
          checks++;
          if (acc[31:30] != 2'b01) begin
            failures++;
            $display("unexpected word %h", acc);
          end else
            for (int i = 0; i < 5; i++) begin
              checks++;
              if (nout >= sent.size() || acc[6*i +: 6] != sent[nout]) begin
                failures++;
                if (failures < 10) $display("sample %0d wrong", nout);
              end
              nout++;
            end
        end
      end
    end
  end

  initial begin
    int pct;
    adc_hg = '0; adc_lg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      adc_hg = 12'($urandom_range(0, 63));
      adc_lg = 12'($urandom_range(0, 6));
      sent.push_back(adc_hg[5:0]);
      if (n == 1000) counting = 1;
      @(negedge clk);
    end
    counting = 0;
    // sync share in tenths of a percent; expected 184
    pct = n_sync * 1000 / n_words;
    $display("link words %0d, sync %0d (%0d.%0d %%), trailers %0d, samples %0d, max FIFO level %0d",
             n_words, n_sync, pct / 10, pct % 10, n_trailer, nout, max_level);
    checks += 4;
    if (pct < 174 || pct > 194) begin failures++; $display("sync share off"); end
    if (nout < N - 20) begin failures++; $display("samples missing"); end
    if (max_level > 2) begin failures++; $display("FIFO level too high"); end
    if (fifo_overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
