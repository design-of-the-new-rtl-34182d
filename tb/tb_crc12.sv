// tb_crc12: feeds random words to the CRC-12 accumulator, with random gaps
// and clears, and compares crc and crc_next with a reference that computes
// the remainder of (message * x^12) divided by x^12+x^11+x^3+x^2+x+1 by
// long division over the whole bit string of the message.
module tb_crc12;
  logic clk = 0, rst_n = 0;
  logic clear, en;
  logic [31:0] data;
  logic [11:0] crc, crc_next;
  int checks = 0, failures = 0;
  bit msg[$];

  crc12 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    bit m2[$];
    clear = 0; en = 0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // a single known word: CRC of 32'h1 is x^12 mod P = P - x^12 = 0x80F
    data = 32'h1; en = 1;
    #1 checks++;
    if (crc_next !== 12'h80F) begin failures++; $display("crc of 1: %h", crc_next); end
    en = 0;
    for (int n = 0; n < 600; n++) begin
      en = $urandom_range(0, 3) != 0;
      clear = $urandom_range(0, 19) == 0;
      data = $urandom;
      #1;
      m2 = msg;
      for (int i = 31; i >= 0; i--) m2.push_back(data[i]);
      checks += 2;
      if (crc !== ref_crc(msg)) begin
        failures++;
        if (failures < 10) $display("n=%0d crc %h want %h", n, crc, ref_crc(msg));
      end
      if (crc_next !== ref_crc(m2)) begin
        failures++;
        if (failures < 10) $display("n=%0d crc_next %h want %h", n, crc_next, ref_crc(m2));
      end
      @(posedge clk);
      if (clear) msg.delete();
      else if (en) msg = m2;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
