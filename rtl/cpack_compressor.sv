// cpack_compressor: lossless block compressor of the memory controller.
//
// Compresses one block of up to 32 words (a 128-byte block, or the shorter
// packed form of a block whose floating-point LSBs were truncated) into a
// bit string of dictionary codes (see mc_comp_pkg for the six code patterns).
// Throughput is two words (64 bits) per cycle and the pipeline has three
// stages, as the compressor the design assumes:
//   stage 1  code the two words of a pair against the dictionary, the second
//            word seeing the dictionary as updated by the first;
//   stage 2  join the two codes of the pair into one bit string;
//   stage 3  append the pair's string to the output buffer.
// Interface: start (one cycle, with words/nwords) begins a block; busy is high
// until done pulses; out_bits/out_len hold the result from done until the
// next start. nwords must be even, 2..32. done rises nwords/2 + 2 clock
// edges after the edge that samples start: the first pair is coded in the
// next cycle and leaves the three stages two edges later.
// The code patterns follow the cache compression algorithm the scheme is
// built on; the bit layout of the codes and the pipeline split are this
// design's choices.
module cpack_compressor
  import mc_comp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  blk_t        words,
  input  logic [5:0]  nwords,
  output logic        busy,
  output logic        done,
  output logic [CBUF_BITS-1:0] out_bits,
  output logic [10:0] out_len
);
  localparam int unsigned PAIR_BITS = 2 * MAX_CODE_BITS;

  blk_t                 in_q;
  logic [5:0]           nwords_q;
  logic [4:0]           pair_idx;      // next pair to code
  logic                 issuing;
  dict_st_t             dict_q;

  // stage 1 outputs
  logic                     s1_v, s1_last;
  logic [MAX_CODE_BITS-1:0] s1_c0, s1_c1;
  logic [5:0]               s1_l0, s1_l1;
  // stage 2 outputs
  logic                 s2_v, s2_last;
  logic [PAIR_BITS-1:0] s2_code;
  logic [6:0]           s2_len;

  // stage 1 combinational coding of the current pair
  step_t r0, r1;
  word_t w0, w1;

  assign w0 = in_q[{pair_idx, 1'b0} * 32 +: 32];
  assign w1 = in_q[{pair_idx, 1'b1} * 32 +: 32];
  assign r0 = cpack_step(w0, dict_q);
  assign r1 = cpack_step(w1, r0.st);

  assign busy = issuing || s1_v || s2_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      pair_idx <= '0;
      dict_q   <= '0;
      s1_v     <= 1'b0;
      s1_last  <= 1'b0;
      s2_v     <= 1'b0;
      s2_last  <= 1'b0;
      done     <= 1'b0;
      out_len  <= '0;
      out_bits <= '0;
      in_q     <= '0;
      nwords_q <= '0;
      s1_c0 <= '0; s1_c1 <= '0; s1_l0 <= '0; s1_l1 <= '0;
      s2_code <= '0; s2_len <= '0;
    end else begin
      done <= 1'b0;
      // pair issue and stage 1
      if (start && !busy) begin
        issuing  <= 1'b1;
        pair_idx <= '0;
        in_q     <= words;
        nwords_q <= nwords;
        dict_q   <= '0;
        out_bits <= '0;
        out_len  <= '0;
        s1_v     <= 1'b0;
      end else if (issuing) begin
        dict_q   <= r1.st;
        s1_c0 <= r0.code; s1_l0 <= r0.len;
        s1_c1 <= r1.code; s1_l1 <= r1.len;
        s1_v     <= 1'b1;
        s1_last  <= ({pair_idx, 1'b0} + 6'd2 >= nwords_q);
        pair_idx <= pair_idx + 5'd1;
        if ({pair_idx, 1'b0} + 6'd2 >= nwords_q) issuing <= 1'b0;
      end else begin
        s1_v <= 1'b0;
      end
      // stage 2: join the pair
      s2_v    <= s1_v;
      s2_last <= s1_last;
      if (s1_v) begin
        s2_code <= PAIR_BITS'(s1_c0) | (PAIR_BITS'(s1_c1) << s1_l0);
        s2_len  <= 7'(s1_l0) + 7'(s1_l1);
      end
      // stage 3: append
      if (s2_v) begin
        out_bits <= out_bits | (CBUF_BITS'(s2_code) << out_len);
        out_len  <= out_len + 11'(s2_len);
        if (s2_last) done <= 1'b1;
      end
    end
  end
endmodule
