// mc_comp_pkg: types, constants and the shared word coder of the compressing
// memory controller.
//
// A 128-byte data block is 32 words of 32 bits. On the DRAM side it occupies
// eight 16-byte chunks (one GDDR3 burst of four 4-byte transfers each). The
// compressed form of a block uses N of those chunks, 1 <= N <= 7; a block that
// does not shrink is stored raw.
//
// Metadata entry per 128-byte block (the layout of the fields is this design's
// choice; their meaning follows the compression scheme):
//   [2:0] nm1   number of stored 16-byte chunks minus one (valid when comp=1)
//   [3]   comp  1 = block stored compressed
//   [5:4] trunc lossy setting: 0 = none, 1 = 8, 2 = 12, 3 = 16 mantissa LSBs dropped
//   [7:6] unused, zero
// An all-zero entry (the reset state of the metadata region) means "raw,
// uncompressed, eight chunks", so memory that was never written through the
// compressor reads back correctly.
//
// Word coder: each 32-bit word is coded against a 16-entry FIFO dictionary of
// recent words with one of six patterns (zero word, zero upper 24 bits, full
// match, match of upper 24 or upper 16 bits, or a literal word). Codes are
// packed least-significant bit first: a 2-bit prefix in the lowest bits, for
// prefix 2'b11 a further 2-bit sub-code, then the dictionary index, then the
// literal bits. The compressor and the decompressor both call cpack_step so
// they update their dictionaries identically.
package mc_comp_pkg;

  localparam int unsigned WORDS_PER_BLK = 32;
  localparam int unsigned BLK_BITS      = 1024;
  localparam int unsigned CHUNK_BITS    = 128;
  localparam int unsigned DICT_SIZE     = 16;
  localparam int unsigned MAX_CODE_BITS = 34;
  // worst case: 32 literal words
  localparam int unsigned CBUF_BITS     = WORDS_PER_BLK * MAX_CODE_BITS;

  typedef logic [BLK_BITS-1:0]   blk_t;
  typedef logic [CHUNK_BITS-1:0] chunk_t;
  typedef logic [31:0]           word_t;

  typedef struct packed {
    logic [1:0] rsvd;
    logic [1:0] trunc;
    logic       comp;
    logic [2:0] nm1;
  } md_entry_t;

  // address spaces seen by the memory controller
  typedef enum logic [1:0] {
    SP_GLOBAL  = 2'd0,
    SP_TEXTURE = 2'd1,
    SP_LOCAL   = 2'd2,
    SP_CONST   = 2'd3
  } space_e;

  // request kinds presented to the DRAM controller
  typedef enum logic [1:0] {
    DK_RD    = 2'd0,   // data read of nchunks chunks
    DK_WR    = 2'd1,   // data write of nchunks chunks
    DK_MD_RD = 2'd2,   // metadata line read (answer on the metadata network)
    DK_MD_WR = 2'd3    // metadata line write-back
  } dram_kind_e;

  // one request to the DRAM controller; data carries the first nchunks
  // chunks of a write (chunk k in bits [128k+127:128k])
  typedef struct packed {
    dram_kind_e  kind;
    logic [31:0] addr;      // byte address of the 128-byte block or MD line
    logic [3:0]  nchunks;   // 16-byte chunks to move, 1..8
    logic [3:0]  tag;       // MSHR entry of a metadata read
    blk_t        data;
  } dram_req_t;

  // kinds of read tracked between request and response side
  typedef enum logic [1:0] {
    TK_G      = 2'd0,   // global/texture read for an SM (g_rd)
    TK_L      = 2'd1,   // local/constant read, bypasses compression (l_rd)
    TK_PAIRED = 2'd2    // read half of a partial-write read-modify-write (g_rdpaired)
  } trk_kind_e;

  // one-cycle event pulses of the controller, for statistics
  typedef struct packed {
    logic md_hit;       // request-side metadata lookup hit
    logic md_miss;      // request-side metadata lookup miss (full 8-chunk read sent)
    logic mshr_merge;   // a miss merged into an MSHR entry already in flight
    logic md_stall;     // read data waiting at the decompressor for its metadata
    logic wr_md_stall;  // write waiting for its metadata line
    logic md_evict;     // dirty metadata line written back
    logic short_read;   // read sent for fewer than 8 chunks
    logic decomp;       // compressed block decompressed
    logic comp_wr;      // block written compressed
    logic raw_wr;       // global block written uncompressed
    logic lossy_wr;     // block written with LSBs truncated
    logic rmw;          // partial write turned into read-modify-write
    logic bypass;       // local/constant access bypassing compression
  } mc_ev_t;

  typedef enum logic [2:0] {
    P_ZZZZ = 3'd0,
    P_XXXX = 3'd1,
    P_MMMM = 3'd2,
    P_MMXX = 3'd3,
    P_ZZZX = 3'd4,
    P_MMMX = 3'd5
  } pat_e;

  // number of mantissa LSBs removed for each trunc code
  function automatic int unsigned trunc_bits(logic [1:0] t);
    case (t)
      2'd1:    return 8;
      2'd2:    return 12;
      2'd3:    return 16;
      default: return 0;
    endcase
  endfunction

  // number of 32-bit words a block occupies after truncation and packing
  function automatic int unsigned trunc_words(logic [1:0] t);
    return WORDS_PER_BLK - trunc_bits(t);
  endfunction

  // number of 16-byte chunks a block occupies raw (not compressed)
  function automatic int unsigned raw_chunks(logic [1:0] t);
    return trunc_words(t) / 4;
  endfunction

  // chunks to fetch for a block whose metadata entry is e
  function automatic logic [3:0] entry_chunks(md_entry_t e);
    if (e.comp) return {1'b0, e.nm1} + 4'd1;
    return 4'(raw_chunks(e.trunc));
  endfunction

  // dictionary state: entries, valid bits, FIFO write pointer
  typedef struct packed {
    logic [DICT_SIZE-1:0][31:0] d;
    logic [DICT_SIZE-1:0]       v;
    logic [3:0]                 p;
  } dict_st_t;

  typedef struct packed {
    dict_st_t                 st;
    logic [MAX_CODE_BITS-1:0] code;   // LSB-first code bits
    logic [5:0]               len;    // code length in bits
    word_t                    w;      // decoded word (decoder only)
  } step_t;

  function automatic dict_st_t dict_push(dict_st_t s, word_t w);
    dict_st_t r;
    r = s;
    r.d[s.p] = w;
    r.v[s.p] = 1'b1;
    r.p      = s.p + 4'd1;
    return r;
  endfunction

  // Code one word against the dictionary and update the dictionary.
  function automatic step_t cpack_step(word_t w, dict_st_t s);
    step_t      r;
    logic       full_hit, hi24_hit, hi16_hit;
    logic [3:0] full_idx, hi24_idx, hi16_idx;
    full_hit = 1'b0; hi24_hit = 1'b0; hi16_hit = 1'b0;
    full_idx = '0;   hi24_idx = '0;   hi16_idx = '0;
    // lowest matching index wins
    for (int i = DICT_SIZE - 1; i >= 0; i--) begin
      if (s.v[i] && s.d[i] == w)               begin full_hit = 1'b1; full_idx = 4'(i); end
      if (s.v[i] && s.d[i][31:8] == w[31:8])   begin hi24_hit = 1'b1; hi24_idx = 4'(i); end
      if (s.v[i] && s.d[i][31:16] == w[31:16]) begin hi16_hit = 1'b1; hi16_idx = 4'(i); end
    end
    r      = '0;
    r.st   = s;
    r.w    = w;
    if (w == '0) begin
      r.code[1:0] = 2'b00; r.len = 6'd2;
    end else if (full_hit) begin
      r.code[5:0] = {full_idx, 2'b10}; r.len = 6'd6;
    end else if (w[31:8] == '0) begin
      r.code[11:0] = {w[7:0], 2'b01, 2'b11}; r.len = 6'd12;
    end else begin
      if (hi24_hit) begin
        r.code[15:0] = {w[7:0], hi24_idx, 2'b10, 2'b11}; r.len = 6'd16;
      end else if (hi16_hit) begin
        r.code[23:0] = {w[15:0], hi16_idx, 2'b00, 2'b11}; r.len = 6'd24;
      end else begin
        r.code[33:0] = {w, 2'b01}; r.len = 6'd34;
      end
      // partial matches and literals enter the dictionary (FIFO replacement)
      r.st = dict_push(s, w);
    end
    return r;
  endfunction

  // Decode one word from the low bits of bits; update the dictionary.
  function automatic step_t cpack_unstep(logic [MAX_CODE_BITS-1:0] bits, dict_st_t s);
    step_t r;
    logic  push;
    push   = 1'b0;
    r      = '0;
    r.st   = s;
    r.code = bits;
    case (bits[1:0])
      2'b00: begin r.w = '0; r.len = 6'd2; end
      2'b01: begin r.w = bits[33:2]; r.len = 6'd34; push = 1'b1; end
      2'b10: begin r.w = s.d[bits[5:2]]; r.len = 6'd6; end
      default: begin
        case (bits[3:2])
          2'b01:   begin r.w = {24'h0, bits[11:4]}; r.len = 6'd12; end
          2'b10:   begin r.w = {s.d[bits[7:4]][31:8], bits[15:8]}; r.len = 6'd16; push = 1'b1; end
          default: begin r.w = {s.d[bits[7:4]][31:16], bits[23:8]}; r.len = 6'd24; push = 1'b1; end
        endcase
      end
    endcase
    if (push) r.st = dict_push(s, r.w);
    return r;
  endfunction

endpackage
