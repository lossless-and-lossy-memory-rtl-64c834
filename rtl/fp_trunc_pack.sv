// fp_trunc_pack: lossy front end of the write path.
//
// Drops the k least-significant bits of every 32-bit single-precision value
// of a 128-byte block (k = 0, 8, 12 or 16, selected by the 2-bit trunc code
// the programmer attaches to an array when it is copied to the GPU) and packs
// what remains into 32-k words (128, 96, 80 or 64 bytes), which are then
// given to the lossless compressor. Purely combinational.
// Layout for k > 0: words 0..15 hold the upper 16 bits (sign, exponent, top
// mantissa bits) of values 2j and 2j+1 as {hi[2j+1], hi[2j]}; from bit 512 on
// follow the remaining (16-k)-bit low parts, value i at bit 512 + i*(16-k).
// Keeping the upper halves word aligned lets the dictionary coder find the
// repeats between neighbouring values, which a plain back-to-back packing of
// (32-k)-bit fields would hide. k = 0 leaves the block unchanged.
// Dropping LSBs of FP data before lossless compression, the 8-LSB example
// (128 B -> 96 B) and the 2-bit record of the truncation come from the scheme;
// the set of four amounts and the layout are this design's choices.
module fp_trunc_pack
  import mc_comp_pkg::*;
(
  input  blk_t       in_words,
  input  logic [1:0] trunc,
  output blk_t       out_words,
  output logic [5:0] nwords
);
  always_comb begin
    out_words = '0;
    nwords    = 6'(trunc_words(trunc));
    if (trunc == 2'd0) begin
      out_words = in_words;
    end else begin
      for (int i = 0; i < 32; i++) out_words[i*16 +: 16] = in_words[i*32 + 16 +: 16];
      case (trunc)
        2'd1: for (int i = 0; i < 32; i++) out_words[512 + i*8 +: 8] = in_words[i*32 + 8  +: 8];
        2'd2: for (int i = 0; i < 32; i++) out_words[512 + i*4 +: 4] = in_words[i*32 + 12 +: 4];
        default: ;
      endcase
    end
  end
endmodule
