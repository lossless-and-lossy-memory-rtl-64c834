// cpack_decompressor: lossless block decompressor of the memory controller.
//
// Rebuilds a block of up to 32 words from the code string written by
// cpack_compressor while its 16-byte chunks are still arriving from DRAM.
// start (with nwords, the words to decode, and nchunks, the chunks the block
// occupies) opens a block; the chunks are written in order, at most one per
// cycle, on the chunk write port (in_we, in_idx, in_chunk), before or after
// start. Each cycle the decoder peels G = BYTES_PER_CYCLE/4 codes (G words;
// four words, 16 bytes, by default) off the input at its read pointer,
// updating the dictionary after each one exactly as the compressor did,
// provided at least G x 34 bits (G longest codes) have been loaded beyond the
// pointer or the whole block is in. Words of the last group beyond nwords
// are not written. So
// decoding overlaps the DRAM bursts and finishes soon after the last chunk.
// done pulses in the cycle after the last group; out_words (word i in bits
// [32i+31:32i]) holds the block until the next start. Chunks for the next
// block may be written from the cycle done is high.
// Timing: with all chunks loaded, done rises ceil(nwords/G) clock edges after
// the edge that samples start (8 for a full block at 16 bytes per cycle);
// otherwise at most ceil(nwords/G) edges after the edge that loads the last
// chunk.
// The default of 16 bytes per cycle is the decompressor throughput the
// scheme assumes, and 4, 8 and 32 are the other rates it studies; decoding
// during chunk arrival and the buffer organisation are this design's choices. Not pipelined: a new start is taken only when
// busy is low.
module cpack_decompressor
  import mc_comp_pkg::*;
#(
  parameter int unsigned BYTES_PER_CYCLE = 16   // 4, 8, 16 or 32
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_we,
  input  logic [2:0] in_idx,
  input  chunk_t     in_chunk,
  input  logic       start,
  input  logic [5:0] nwords,
  input  logic [3:0] nchunks,
  output logic       busy,
  output logic       done,
  output blk_t       out_words
);
  localparam int unsigned G          = BYTES_PER_CYCLE / 4;   // words per cycle
  localparam int unsigned GROUP_BITS = G * MAX_CODE_BITS;

  logic [BLK_BITS-1:0] load_q;     // chunks of the block, LSB first
  logic [3:0]          nload;      // chunks loaded so far
  logic [3:0]          nchunks_q;
  logic [10:0]         rptr;       // next code bit to decode
  dict_st_t            dict_q;
  logic [5:0]          nwords_q;
  logic [5:0]          widx;       // next word to decode
  logic                run;

  step_t      r [G];
  logic [8:0] off [G+1];
  logic [BLK_BITS-1:0] win;        // input seen from the read pointer
  logic [11:0] loaded_bits;
  logic        go;

  assign win         = load_q >> rptr;
  assign loaded_bits = {nload, 7'd0} + 12'd0;
  assign go          = run && ((nload >= nchunks_q) ||
                               (loaded_bits >= 12'(rptr) + 12'(GROUP_BITS)));

  always_comb begin
    dict_st_t st;
    st     = dict_q;
    off[0] = '0;
    for (int k = 0; k < G; k++) begin
      r[k]     = cpack_unstep(MAX_CODE_BITS'(win >> off[k]), st);
      st       = r[k].st;
      off[k+1] = off[k] + 9'(r[k].len);
    end
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q    <= '0;
      nload     <= '0;
      nchunks_q <= '0;
      rptr      <= '0;
      dict_q    <= '0;
      nwords_q  <= '0;
      widx      <= '0;
      run       <= 1'b0;
      done      <= 1'b0;
      out_words <= '0;
    end else begin
      done <= 1'b0;
      if (in_we) begin
        load_q[in_idx * CHUNK_BITS +: CHUNK_BITS] <= in_chunk;
        nload <= nload + 4'd1;
      end
      if (start && !run) begin
        dict_q    <= '0;
        nwords_q  <= nwords;
        nchunks_q <= nchunks;
        rptr      <= '0;
        widx      <= '0;
        run       <= 1'b1;
        out_words <= '0;
      end else if (go) begin
        for (int k = 0; k < G; k++)
          if (7'(widx) + 7'(k) < 7'(nwords_q))
            out_words[(7'(widx) + 7'(k)) * 32 +: 32] <= r[k].w;
        dict_q <= r[G-1].st;
        rptr   <= rptr + 11'(off[G]);
        widx   <= widx + 6'(G);
        if (7'(widx) + 7'(G) >= 7'(nwords_q)) begin
          run   <= 1'b0;
          done  <= 1'b1;
          nload <= in_we ? 4'd1 : 4'd0;   // next block's chunks count afresh
        end
      end
    end
  end

  initial assert (BYTES_PER_CYCLE inside {4, 8, 16, 32})
    else $error("BYTES_PER_CYCLE must be 4, 8, 16 or 32");
endmodule
