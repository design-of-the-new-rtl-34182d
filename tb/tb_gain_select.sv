// tb_gain_select: random high-gain stream with scattered saturated samples.
// A reference model recomputes, for every input sample, whether any
// high-gain sample from LOOK_BACK before to LOOK_AHEAD after it is
// saturated, and checks the selected value, the gain bit, sample_valid and
// the latency of LOOK_AHEAD+1 clocks.
module tb_gain_select;
  import dtu_pkg::*;
  localparam int LA = 2, LB = 5;
  logic clk = 0, rst_n = 0;
  logic [11:0] adc_hg, adc_lg;
  logic sample_valid, window_sat;
  sample_t sample;
  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0;
  logic [11:0] xh[int], xl[int];
  int cnt = 0;

  gain_select #(.LOOK_AHEAD(LA), .LOOK_BACK(LB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit sat_at(int k);
    if (k < 0 || !xh.exists(k)) return 0;
    return xh[k] == 12'hFFF;
  endfunction

  task automatic check();
    int k;
    bit lowg;
    k = cnt - LA - 2;
    checks++;
    if (sample_valid !== (k >= 0)) begin
      failures++;
      $display("cnt=%0d valid=%0b expected %0b", cnt, sample_valid, k >= 0);
    end
    if (k < 0) return;
    lowg = 0;
    for (int j = k - LB; j <= k + LA; j++) if (sat_at(j)) lowg = 1;
    if (lowg) n_low++; else n_high++;
    checks++;
    if (sample.gain !== (lowg ? GAIN_LOW : GAIN_HIGH) ||
        sample.value !== (lowg ? xl[k] : xh[k])) begin
      failures++;
      if (failures < 10)
        $display("k=%0d got g=%0b v=%h want g=%0b v=%h", k, sample.gain, sample.value,
                 lowg, lowg ? xl[k] : xh[k]);
    end
  endtask

  initial begin
    adc_hg = '0; adc_lg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // mostly noise, sometimes a saturated sample or a saturated run
      if ($urandom_range(0, 99) < 4) adc_hg = 12'hFFF;
      else if (n % 300 > 150 && n % 300 < 156) adc_hg = 12'hFFF;
      else adc_hg = 12'($urandom_range(0, 4094));
      adc_lg = 12'($urandom);
      xh[n] = adc_hg; xl[n] = adc_lg;
      @(posedge clk);
      cnt++;
      @(negedge clk);
      check();
    end
    checks++;
    if (n_low < 100 || n_high < 100) begin
      failures++;
      $display("too few decisions of one kind: low=%0d high=%0d", n_low, n_high);
    end
    $display("low-gain samples %0d, high-gain samples %0d", n_low, n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
