// tb_lite_dtu: end-to-end test of the LiTE-DTU core at its default
// parameters.
//
// The ADC inputs carry a pedestal with noise and calorimeter-like pulses of
// eight samples, some of them large enough to saturate the high-gain ADC.
// The testbench decodes the link: it rebuilds 32-bit words from the
// serializer slices, unpacks baseline and signal words into samples and
// compares them, in order, with samples chosen by its own gain-selection
// model (any saturated high-gain sample from 5 before to 2 after -> low
// gain). Each trailer is checked for its sample count, CRC-12 (long
// division), frame number and frame length. After the main phase the stream
// returns to pedestal long enough that every sample must have left on the
// link, which shows the link keeps up with one sample per clock. A last
// phase sends only signal samples, which produce words faster than the link
// drains them, and must overflow the output FIFO.
// Mechanisms counted (each must occur): low-gain selection, full and
// partial baseline words, signal couples and single signal words, trailers,
// sync words and FIFO overflow.
module tb_lite_dtu;
  import dtu_pkg::*;
  localparam int LA = 2, LB = 5, FW = 50, LANE = 8, SL = 32 / LANE;
  localparam int N1 = 20000;         // main phase, samples
  localparam int N2 = 400;           // pedestal drain phase
  localparam int N3 = 300;           // overflow phase
  localparam logic [31:0] SYNC = 32'hE5555555;

  logic clk = 0, rst_n = 0;
  logic [11:0] adc_hg, adc_lg;
  logic [LANE-1:0] ser_data;
  logic ser_word_start, ser_is_sync, fifo_overflow;
  logic [7:0] frame_num;
  logic [4:0] fifo_level;

  lite_dtu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_low = 0, n_qfull = 0, n_qpart = 0, n_couple = 0, n_single = 0;
  int n_trailer = 0, n_sync = 0, n_ovf = 0, max_level = 0;

  initial begin
    repeat (N1 + N2 + N3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("[%0t] %s", $time, msg);
  endtask

  // ---------------- stimulus and reference gain selection ----------------
  logic [11:0] xh[$], xl[$];
  int nin = 0;

  function automatic sample_t expected(int k);
    bit lowg = 0;
    for (int j = k - LB; j <= k + LA; j++)
      if (j >= 0 && xh[j] == 12'hFFF) lowg = 1;
    return lowg ? sample_t'{gain: GAIN_LOW, value: xl[k]}
                : sample_t'{gain: GAIN_HIGH, value: xh[k]};
  endfunction

  int shape[8] = '{10, 60, 100, 80, 50, 30, 15, 5};   // percent of peak
  int pulse_pos = -1, pulse_amp = 0, next_pulse = 30;

  task automatic gen_sample(int phase);
    int ped, h, l;
    ped = 10 + $urandom_range(0, 20);
    h = ped; l = ped / 10;
    if (phase == 0) begin
      if (pulse_pos < 0 && nin >= next_pulse) begin
        pulse_pos = 0;
        case ($urandom_range(0, 3))
          0: pulse_amp = $urandom_range(60, 400);       // small signal
          1: pulse_amp = $urandom_range(400, 3500);     // high gain, unsaturated
          default: pulse_amp = $urandom_range(4500, 30000); // saturates high gain
        endcase
      end
      if (pulse_pos >= 0) begin
        h = ped + pulse_amp * shape[pulse_pos] / 100;
        l = ped / 10 + pulse_amp * shape[pulse_pos] / 1000;
        pulse_pos++;
        if (pulse_pos == 8) begin
          pulse_pos = -1;
          next_pulse = nin + $urandom_range(100, 600);
        end
      end
    end else if (phase == 2) begin
      h = $urandom_range(100, 4000);
      l = h / 10;
    end
    if (h > 4095) h = 4095;
    if (l > 4095) l = 4095;
    adc_hg = 12'(h); adc_lg = 12'(l);
    xh.push_back(adc_hg); xl.push_back(adc_lg);
    nin++;
  endtask

  // ---------------- link decoder ----------------
  int nout = 0;                 // samples decoded so far
  bit checking = 1;
  bit ovf_phase = 0;
  bit msg[$];                   // bits of the frame's data words
  int f_words = 0, f_samps = 0, f_num = 0;

  function automatic logic [11:0] ref_crc(bit m[$]);
    bit r[$];
    logic [11:0] out;
    localparam logic [12:0] P = 13'h180F;
    r = m;
    for (int i = 0; i < 12; i++) r.push_back(0);
    for (int i = 0; i + 12 < r.size(); i++)
      if (r[i]) for (int j = 0; j <= 12; j++) r[i+j] ^= P[12-j];
    for (int j = 0; j < 12; j++) out[11-j] = r[r.size()-12+j];
    return out;
  endfunction

  task automatic got_sample(logic g, logic [11:0] v);
    sample_t e;
    if (nout >= nin) begin fail("more samples decoded than sent"); return; end
    e = expected(nout);
    checks++;
    if (e.gain !== gain_e'(g) || e.value !== v)
      fail($sformatf("sample %0d: got g=%0b v=%0d want g=%0b v=%0d", nout, g, v, e.gain, e.value));
    if (g) n_low++;
    nout++;
  endtask

  task automatic data_word(logic [31:0] w);
    for (int i = 31; i >= 0; i--) msg.push_back(w[i]);
    f_words++;
    if (w[31:30] == 2'b01) begin
      n_qfull++;
      for (int i = 0; i < 5; i++) got_sample(1'b0, 12'(w[6*i +: 6]));
      f_samps += 5;
    end else if (w[31:30] == 2'b10) begin
      n_qpart++;
      checks++;
      if (w[29:24] < 1 || w[29:24] > 4) fail($sformatf("bad count in %h", w));
      for (int i = 0; i < int'(w[29:24]) && i < 4; i++) got_sample(1'b0, 12'(w[6*i +: 6]));
      for (int i = int'(w[29:24]); i < 4; i++) if (w[6*i +: 6] != 0) fail("unused slot not zero");
      f_samps += int'(w[29:24]);
    end else if (w[31:26] == 6'b001010) begin
      n_couple++;
      got_sample(w[12], w[11:0]);
      got_sample(w[25], w[24:13]);
      f_samps += 2;
    end else if (w[31:26] == 6'b001011) begin
      n_single++;
      checks++;
      if (w[25:13] != 13'b0101010101010) fail("bad filler");
      got_sample(w[12], w[11:0]);
      f_samps += 1;
    end else fail($sformatf("unknown word %h", w));
  endtask

  task automatic trailer(logic [31:0] w);
    n_trailer++;
    checks += 4;
    if (f_words != FW) fail($sformatf("frame of %0d words", f_words));
    if (int'(w[27:20]) != f_samps) fail($sformatf("trailer count %0d want %0d", w[27:20], f_samps));
    if (w[19:8] !== ref_crc(msg)) fail($sformatf("trailer crc %h want %h", w[19:8], ref_crc(msg)));
    if (int'(w[7:0]) != f_num) fail($sformatf("frame number %0d want %0d", w[7:0], f_num));
    msg.delete(); f_words = 0; f_samps = 0; f_num = (f_num + 1) % 256;
  endtask

  logic [31:0] acc;
  int slice = 0;
  bit started = 0;

  always @(negedge clk) if (rst_n) begin
    if (fifo_overflow) checking = 0;
    if (!ovf_phase && int'(fifo_level) > max_level) max_level = int'(fifo_level);
    if (ser_word_start) begin started = 1; slice = 0; acc = '0; end
    if (started) begin
      acc = (acc << LANE) | 32'(ser_data);
      slice++;
      if (slice == SL) begin
        slice = 0;
        if (acc == SYNC) begin
          n_sync++;
          checks++;
          if (!ser_is_sync) fail("sync word not flagged");
        end else if (checking) begin
          if (acc[31:28] == 4'b1101) trailer(acc);
          else data_word(acc);
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    adc_hg = '0; adc_lg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N1; n++) begin gen_sample(0); @(negedge clk); end
    for (int n = 0; n < N2; n++) begin gen_sample(1); @(negedge clk); end
    // every sample of the main phase must have been sent by now
    checks++;
    if (nout < N1) fail($sformatf("only %0d of %0d samples left on the link", nout, N1));
    checks++;
    if (fifo_overflow) fail("overflow during normal data taking");
    ovf_phase = 1;
    for (int n = 0; n < N3; n++) begin
      gen_sample(2);
      @(negedge clk);
      if (fifo_overflow) n_ovf++;
    end
    checks++;
    if (!fifo_overflow) fail("signal-only stream did not overflow the FIFO");
    $display("samples sent %0d decoded %0d; max FIFO level before overflow phase %0d", nin, nout, max_level);
    $display("low-gain %0d, quintets %0d, partial quintets %0d, couples %0d, singles %0d",
             n_low, n_qfull, n_qpart, n_couple, n_single);
    $display("trailers %0d, sync words %0d, clocks in overflow %0d", n_trailer, n_sync, n_ovf);
    checks++;
    if (n_low == 0 || n_qfull == 0 || n_qpart == 0 || n_couple == 0 || n_single == 0 ||
        n_trailer == 0 || n_sync == 0 || n_ovf == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
