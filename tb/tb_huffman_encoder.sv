// tb_huffman_encoder: drives runs of baseline and signal samples of random
// lengths and checks every output word, its sample count and its timing
// (one clock after the sample that completes or closes it) against a
// reference packer kept as sample queues. Counts each of the four formats.
module tb_huffman_encoder;
  import dtu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  sample_t in_sample;
  logic out_valid;
  logic [31:0] out_word;
  logic [2:0] out_nsamp;
  int checks = 0, failures = 0;
  int n_full_b = 0, n_part_b = 0, n_couple = 0, n_single = 0;

  huffman_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [12:0] bq[$];   // open baseline group (values)
  logic [12:0] sq[$];   // open signal group (gain,value)

  // word the reference emits for this sample, if any
  function automatic bit ref_step(sample_t s, output logic [31:0] w, output int ns);
    bit base;
    base = (s.gain == GAIN_HIGH) && (s.value <= 63);
    w = '0; ns = 0;
    if (base) begin
      if (sq.size() == 1) begin
        w = {6'b001011, 13'b0101010101010, sq[0]}; ns = 1; sq.delete();
      end
      bq.push_back(s);
      if (bq.size() == 5) begin
        w = {2'b01, bq[4][5:0], bq[3][5:0], bq[2][5:0], bq[1][5:0], bq[0][5:0]};
        ns = 5; bq.delete();
      end
    end else begin
      if (bq.size() > 0) begin
        w = {2'b10, 6'(bq.size()), 18'h0, bq[0][5:0]};
        for (int i = 1; i < bq.size(); i++) w[6*i +: 6] = bq[i][5:0];
        ns = bq.size(); bq.delete();
      end
      sq.push_back(s);
      if (sq.size() == 2) begin
        w = {6'b001010, sq[1], sq[0]}; ns = 2; sq.delete();
      end
    end
    return ns != 0;
  endfunction

  sample_t gen;
  int run_left = 0;
  bit run_base = 1;

  initial begin
    logic [31:0] ew;
    int ens;
    bit exp_v;
    in_valid = 0; in_sample = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      if (run_left == 0) begin
        run_base = ($urandom_range(0, 1) == 1);
        run_left = $urandom_range(1, 12);
      end
      run_left--;
      in_valid = ($urandom_range(0, 9) != 0);
      if (run_base) gen = '{gain: GAIN_HIGH, value: 12'($urandom_range(0, 63))};
      else if ($urandom_range(0, 3) == 0) gen = '{gain: GAIN_LOW, value: 12'($urandom_range(0, 63))};
      else gen = '{gain: GAIN_HIGH, value: 12'($urandom_range(64, 4095))};
      in_sample = gen;
      exp_v = 0;
      if (in_valid) exp_v = ref_step(gen, ew, ens);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("n=%0d out_valid=%0b want %0b", n, out_valid, exp_v);
      end else if (exp_v) begin
        checks++;
        if (out_word !== ew || int'(out_nsamp) != ens) begin
          failures++;
          if (failures < 10) $display("n=%0d word %h/%0d want %h/%0d", n, out_word, out_nsamp, ew, ens);
        end
        case (ew[31:30])
          2'b01: n_full_b++;
          2'b10: n_part_b++;
          default: if (ew[31:26] == 6'b001010) n_couple++; else n_single++;
        endcase
      end
    end
    checks++;
    if (n_full_b == 0 || n_part_b == 0 || n_couple == 0 || n_single == 0) begin
      failures++;
      $display("a format was never produced");
    end
    $display("quintets %0d, partial quintets %0d, couples %0d, single signals %0d",
             n_full_b, n_part_b, n_couple, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
