// huffman_encoder: variable-length packing of the selected samples into
// 32-bit words.
//
// Each selected sample is either a baseline sample (high gain and below 64,
// so 6 bits suffice) or a 13-bit signal sample. Baseline samples are
// collected in quintets and sent as {01, s4, s3, s2, s1, s0}; signal samples
// in couples sent as {001010, s1, s0}. When a sample of the other kind
// arrives before a group is full, the partial group is closed with its
// incomplete format: {10, N, s3/0, s2/0, s1/0, s0} for 1..4 baseline samples
// (unused slots zero) or {001011, 0101010101010, s0} for a single signal
// sample. The earliest sample always sits in the least significant slot.
// The two sample classes, the headers and the group sizes follow the LiTE-DTU
// word format; the slot order, the 6-bit N field and the rule that a
// change of sample kind closes a group are this design's reading of it.
//
// Timing: one sample accepted per clock, no back-pressure. At most one word
// leaves per clock, registered: the word that a sample completes or closes
// is on out_word in the clock after that sample's in_valid. out_nsamp gives
// the number of samples the word carries (1..5).
module huffman_encoder
  import dtu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_sample,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic [2:0]  out_nsamp
);

  logic [2:0]                      base_cnt;   // baseline samples held (0..4)
  logic [3:0][BASE_W-1:0]          base_buf;   // held baseline samples, [0] earliest
  logic                            sig_pend;   // one signal sample held
  logic [SAMPLE_W-1:0]             sig_buf;

  logic                            in_base;
  assign in_base = is_baseline(in_sample);

  // partial baseline word from whatever is held
  function automatic logic [31:0] base_partial(logic [2:0] n, logic [3:0][BASE_W-1:0] b);
    logic [3:0][BASE_W-1:0] slots;
    for (int i = 0; i < 4; i++) slots[i] = (i < int'(n)) ? b[i] : '0;
    return {HDR_BASE_PART, 6'(n), slots};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_cnt  <= '0;
      base_buf  <= '0;
      sig_pend  <= 1'b0;
      sig_buf   <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      out_nsamp <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_base) begin
          if (sig_pend) begin
            // a lone signal sample is closed by a baseline sample
            out_valid <= 1'b1;
            out_word  <= {HDR_SIG_PART, SIG_FILLER, sig_buf};
            out_nsamp <= 3'd1;
            sig_pend  <= 1'b0;
          end
          if (base_cnt == 3'd4) begin
            out_valid <= 1'b1;
            out_word  <= {HDR_BASE, in_sample.value[BASE_W-1:0], base_buf};
            out_nsamp <= 3'd5;
            base_cnt  <= '0;
          end else begin
            base_buf[base_cnt[1:0]] <= in_sample.value[BASE_W-1:0];
            base_cnt <= base_cnt + 3'd1;
          end
        end else begin
          if (base_cnt != '0) begin
            // an unfinished quintet is closed by a signal sample
            out_valid <= 1'b1;
            out_word  <= base_partial(base_cnt, base_buf);
            out_nsamp <= base_cnt;
            base_cnt  <= '0;
          end
          if (sig_pend) begin
            out_valid <= 1'b1;
            out_word  <= {HDR_SIG, in_sample, sig_buf};
            out_nsamp <= 3'd2;
            sig_pend  <= 1'b0;
          end else begin
            sig_buf  <= in_sample;
            sig_pend <= 1'b1;
          end
        end
      end
    end
  end

  // A baseline quintet and a signal couple are never both open.
  a_one_group_open: assert property (@(posedge clk) disable iff (!rst_n)
    !(sig_pend && base_cnt != '0));

endmodule
