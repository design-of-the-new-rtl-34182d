// tb_frame_builder: random data words with random sample counts and gaps.
// Checks that every data word is passed on slot 0 unchanged, that exactly
// the FRAME_WORDS-th word of each frame comes with a trailer on slot 1, and
// that the trailer holds 1101, the frame's sample count, the CRC-12 of the
// frame's words (long-division reference) and the frame number.
module tb_frame_builder;
  localparam int FW = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [31:0] in_word;
  logic [2:0] in_nsamp;
  logic [1:0] wr_en;
  logic [1:0][31:0] wr_data;
  logic [7:0] frame_num;
  int checks = 0, failures = 0;
  int trailers = 0;

  frame_builder #(.FRAME_WORDS(FW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  initial begin
    bit msg[$];
    automatic int nw = 0, ns = 0, fnum = 0;
    logic [31:0] exp_tr;
    in_valid = 0; in_word = '0; in_nsamp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      in_valid = $urandom_range(0, 2) != 0;
      in_word  = $urandom;
      in_nsamp = 3'($urandom_range(1, 5));
      #1;
      checks++;
      if (wr_en[0] !== in_valid || (in_valid && wr_data[0] !== in_word)) begin
        failures++;
        if (failures < 10) $display("n=%0d data slot wrong", n);
      end
      if (in_valid) begin
        for (int i = 31; i >= 0; i--) msg.push_back(in_word[i]);
        nw++; ns += int'(in_nsamp);
      end
      checks++;
      if (wr_en[1] !== (in_valid && nw == FW)) begin
        failures++;
        if (failures < 10) $display("n=%0d trailer enable %0b at word %0d", n, wr_en[1], nw);
      end
      if (in_valid && nw == FW) begin
        exp_tr = {4'b1101, 8'(ns), ref_crc(msg), 8'(fnum)};
        checks++;
        if (wr_data[1] !== exp_tr) begin
          failures++;
          if (failures < 10) $display("n=%0d trailer %h want %h", n, wr_data[1], exp_tr);
        end
        trailers++;
        msg.delete(); nw = 0; ns = 0; fnum = (fnum + 1) % 256;
      end
      @(posedge clk);
      @(negedge clk);
    end
    checks++;
    if (trailers < 100) begin failures++; $display("only %0d trailers", trailers); end
    $display("%0d frames", trailers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
