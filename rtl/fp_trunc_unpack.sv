// fp_trunc_unpack: lossy back end of the read path.
//
// Inverse of fp_trunc_pack: rebuilds the 32 values of a 128-byte block from
// the packed form (upper 16-bit halves in words 0..15, the (16-k)-bit low
// parts from bit 512 on) and returns each value with its k dropped LSBs
// reading as zero. k is 0, 8, 12 or 16 for trunc = 0..3, taken from the
// block's metadata entry; k = 0 passes the block unchanged. Combinational.
// Filling the dropped bits with zeros is this design's choice; the scheme only
// says the low bits are not brought in from memory.
module fp_trunc_unpack
  import mc_comp_pkg::*;
(
  input  blk_t       in_words,
  input  logic [1:0] trunc,
  output blk_t       out_words
);
  always_comb begin
    out_words = '0;
    if (trunc == 2'd0) begin
      out_words = in_words;
    end else begin
      for (int i = 0; i < 32; i++) out_words[i*32 + 16 +: 16] = in_words[i*16 +: 16];
      case (trunc)
        2'd1: for (int i = 0; i < 32; i++) out_words[i*32 + 8  +: 8] = in_words[512 + i*8 +: 8];
        2'd2: for (int i = 0; i < 32; i++) out_words[i*32 + 12 +: 4] = in_words[512 + i*4 +: 4];
        default: ;
      endcase
    end
  end
endmodule
