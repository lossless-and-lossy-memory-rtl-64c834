// mc_comp: memory controller front end with memory I/O link compression.
//
// Placed between the on-chip interconnect (streaming multiprocessors and the
// DMA engine) and an existing DRAM controller, it keeps global and texture
// data compressed in DRAM so that a 128-byte block moves over the memory link
// as N <= 8 16-byte chunks instead of 8. Each block still owns its full
// 128-byte slot in DRAM; only bandwidth and latency are saved, not capacity.
//
// Request side (one request at a time):
//  * local/constant reads and writes bypass compression (8 chunks);
//  * a global/texture read looks up the block's metadata in md_cache; the
//    request size modifier turns a hit into an N-chunk read, a miss into a
//    full 8-chunk read plus a metadata line fetch through md_mshr;
//  * a full-block global write is LSB-truncated (if its trunc code asks for
//    it) and compressed; the smaller of compressed and raw form is written
//    and the metadata entry updated if it changed (waiting for the metadata
//    line if it is not cached, and for older reads still lacking metadata);
//  * a partial global write is first read as g_rdpaired through the normal
//    read path, merged byte by byte with the write data, then written as a
//    full block.
// Response side: data chunks from DRAM wait in pre_decompQ. The oldest read
// (tracked in order) waits for its metadata if it did not have it when sent,
// takes the chunks the metadata says are valid, runs them through the
// decompressor (compressed blocks; it is opened as soon as the entry is
// known and decodes while the chunks arrive) and the LSB re-expansion
// (truncated blocks), and returns the 128-byte block through rd_respQ, or
// through g_rdpaired_respQ to the request side for a read-modify-write.
// Metadata responses arrive on their own port (a separate network), so they
// are never blocked behind data waiting for metadata. Metadata requests take
// priority over data requests towards DRAM.
//
// Interfaces use valid/ready handshakes. The DRAM controller must return
// read data chunks in request order on dram_rd_*, and metadata lines on
// md_resp_* tagged with the MSHR entry of the request. ev gives one-cycle
// event pulses for statistics.
// DEC_BYTES_PER_CYCLE sets the decompressor rate (16 bytes per cycle by
// default; 4, 8 and 32 are the other rates the scheme evaluates).
// The structure follows the scheme's memory controller; the one-request-at-a-
// time request side, the in-order response side, queue depths not given by
// the scheme and the address split are this design's choices.
module mc_comp
  import mc_comp_pkg::*;
#(
  parameter int unsigned MD_LINES        = 32,
  parameter int unsigned MSHR_ENTRIES    = 10,
  parameter int unsigned PREDECOMP_DEPTH = 32,   // 16-byte entries
  parameter int unsigned RESPQ_BLOCKS    = 4,    // 128-byte entries (32 x 16 B)
  parameter int unsigned REQQ_DEPTH      = 8,
  parameter int unsigned TRACK_DEPTH     = 8,
  parameter logic [31:0] MD_BASE         = 32'hFE00_0000,
  parameter int unsigned DEC_BYTES_PER_CYCLE = 16  // decompressor rate: 4, 8, 16 or 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // requests from SMs / DMA
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_write,
  input  space_e      req_space,
  input  logic [31:0] req_addr,
  input  logic [127:0] req_mask,    // byte enables of a write
  input  blk_t        req_data,
  input  logic [1:0]  req_trunc,    // lossy setting of a global write
  input  logic [7:0]  req_id,
  // read responses
  output logic        resp_valid,
  input  logic        resp_ready,
  output logic [7:0]  resp_id,
  output blk_t        resp_data,
  // DRAM controller requests
  output logic        dram_req_valid,
  input  logic        dram_req_ready,
  output dram_req_t   dram_req,
  // DRAM read data, in request order
  input  logic        dram_rd_valid,
  output logic        dram_rd_ready,
  input  chunk_t      dram_rd_chunk,
  // metadata line responses
  input  logic        md_resp_valid,
  output logic        md_resp_ready,
  input  logic [3:0]  md_resp_tag,
  input  blk_t        md_resp_line,
  // statistics
  output mc_ev_t      ev
);
  localparam int unsigned LADDR_W = 18;
  localparam int unsigned SLOT_W  = 7;

  typedef struct packed {
    trk_kind_e          kind;
    logic [7:0]         id;
    logic [LADDR_W-1:0] line;
    logic [SLOT_W-1:0]  slot;
    logic               md_known;
    md_entry_t          entry;
    logic [3:0]         nfetch;
  } trk_t;

  typedef struct packed {
    logic [7:0] id;
    blk_t       data;
  } resp_t;

  // ---------------------------------------------------------------- blocks
  // md cache
  logic [LADDR_W-1:0] a_line, b_line, u_line, f_line, ev_line;
  logic [SLOT_W-1:0]  a_slot, b_slot, u_slot;
  logic               a_touch, a_hit, b_hit, u_valid, f_valid, ev_valid;
  md_entry_t          a_entry, b_entry, u_entry;
  blk_t               ev_data;

  md_cache #(.LINES(MD_LINES), .LINE_BITS(BLK_BITS), .LADDR_W(LADDR_W)) u_md_cache (
    .clk, .rst_n,
    .a_line, .a_slot, .a_touch, .a_hit, .a_entry,
    .b_line, .b_slot, .b_hit, .b_entry,
    .u_valid, .u_line, .u_slot, .u_entry,
    .f_valid, .f_line, .f_data(md_resp_line),
    .ev_valid, .ev_line, .ev_data
  );

  // MSHR
  logic               mq_valid, mq_ready, mq_merged;
  logic [LADDR_W-1:0] mq_line;
  logic               mrd_valid, mrd_ready;
  logic [LADDR_W-1:0] mrd_line;
  logic [3:0]         mrd_tag;
  logic               pend_hit;
  logic [$clog2(MSHR_ENTRIES+1)-1:0] mshr_used;

  md_mshr #(.ENTRIES(MSHR_ENTRIES), .LADDR_W(LADDR_W), .TAG_W(4)) u_md_mshr (
    .clk, .rst_n,
    .q_valid(mq_valid), .q_line(mq_line), .q_ready(mq_ready), .q_merged(mq_merged),
    .md_rd_valid(mrd_valid), .md_rd_ready(mrd_ready), .md_rd_line(mrd_line), .md_rd_tag(mrd_tag),
    .resp_valid(md_resp_valid && md_resp_ready), .resp_tag(md_resp_tag), .fill_line(f_line),
    .pend_line(b_line), .pend_hit, .used(mshr_used)
  );

  // metadata write-back queue
  logic               wbq_in_ready, wbq_out_valid, wbq_out_ready;
  logic [LADDR_W+BLK_BITS-1:0] wbq_out;
  logic [1:0]         wbq_count;

  sync_fifo #(.WIDTH(LADDR_W + BLK_BITS), .DEPTH(2)) u_md_wbq (
    .clk, .rst_n,
    .in_valid(ev_valid), .in_ready(wbq_in_ready), .in_data({ev_line, ev_data}),
    .out_valid(wbq_out_valid), .out_ready(wbq_out_ready), .out_data(wbq_out),
    .count(wbq_count)
  );

  assign md_resp_ready = wbq_in_ready && !u_valid;
  assign f_valid       = md_resp_valid && md_resp_ready;

  // rd/wr request queue
  logic      rwq_in_valid, rwq_in_ready, rwq_out_valid, rwq_out_ready;
  dram_req_t rwq_in, rwq_out;
  logic [$clog2(REQQ_DEPTH+1)-1:0] rwq_count;

  sync_fifo #(.WIDTH($bits(dram_req_t)), .DEPTH(REQQ_DEPTH)) u_rw_reqq (
    .clk, .rst_n,
    .in_valid(rwq_in_valid), .in_ready(rwq_in_ready), .in_data(rwq_in),
    .out_valid(rwq_out_valid), .out_ready(rwq_out_ready), .out_data(rwq_out),
    .count(rwq_count)
  );

  dram_req_arb #(.MD_BASE(MD_BASE), .LADDR_W(LADDR_W)) u_arb (
    .wb_valid(wbq_out_valid), .wb_ready(wbq_out_ready),
    .wb_line(wbq_out[BLK_BITS +: LADDR_W]), .wb_data(wbq_out[BLK_BITS-1:0]),
    .md_valid(mrd_valid), .md_ready(mrd_ready), .md_line(mrd_line), .md_tag(mrd_tag),
    .rw_valid(rwq_out_valid), .rw_ready(rwq_out_ready), .rw_req(rwq_out),
    .dram_valid(dram_req_valid), .dram_ready(dram_req_ready), .dram_req
  );

  // read tracking queue
  logic trk_in_valid, trk_in_ready, trk_out_valid, trk_out_ready;
  trk_t trk_in, trk_out;
  logic [$clog2(TRACK_DEPTH+1)-1:0] trk_count;

  sync_fifo #(.WIDTH($bits(trk_t)), .DEPTH(TRACK_DEPTH)) u_trackq (
    .clk, .rst_n,
    .in_valid(trk_in_valid), .in_ready(trk_in_ready), .in_data(trk_in),
    .out_valid(trk_out_valid), .out_ready(trk_out_ready), .out_data(trk_out),
    .count(trk_count)
  );

  // pre-decompression queue
  logic   pdq_out_valid, pdq_out_ready;
  chunk_t pdq_out;
  logic [$clog2(PREDECOMP_DEPTH+1)-1:0] pdq_count;

  sync_fifo #(.WIDTH(CHUNK_BITS), .DEPTH(PREDECOMP_DEPTH)) u_pre_decompq (
    .clk, .rst_n,
    .in_valid(dram_rd_valid), .in_ready(dram_rd_ready), .in_data(dram_rd_chunk),
    .out_valid(pdq_out_valid), .out_ready(pdq_out_ready), .out_data(pdq_out),
    .count(pdq_count)
  );

  // read response queue
  logic  rsq_in_valid, rsq_in_ready;
  resp_t rsq_in, rsq_out;
  logic [$clog2(RESPQ_BLOCKS+1)-1:0] rsq_count;

  sync_fifo #(.WIDTH($bits(resp_t)), .DEPTH(RESPQ_BLOCKS)) u_rd_respq (
    .clk, .rst_n,
    .in_valid(rsq_in_valid), .in_ready(rsq_in_ready), .in_data(rsq_in),
    .out_valid(resp_valid), .out_ready(resp_ready), .out_data(rsq_out),
    .count(rsq_count)
  );
  assign resp_id   = rsq_out.id;
  assign resp_data = rsq_out.data;


  // compressor with lossy packing in front
  logic       comp_start, comp_busy, comp_done;
  blk_t       packed_words;
  logic [5:0] packed_n;
  logic [CBUF_BITS-1:0] comp_bits;
  logic [10:0] comp_len;

  // decompressor with lossy re-expansion behind
  logic       dec_we, dec_start, dec_busy, dec_done;
  logic [2:0] dec_idx;
  logic [5:0] dec_nwords;
  logic [3:0] dec_nchunks;
  blk_t       dec_out, res_src, res_words;

  // ---------------------------------------------------------- request side
  typedef enum logic [2:0] {
    F_IDLE, F_LWR, F_RD, F_RMW_WAIT, F_COMP, F_COMP_WAIT, F_WR_UPD
  } fstate_e;

  fstate_e      fst;
  logic         r_paired;
  space_e       r_space;
  logic [31:0]  r_addr;
  logic [127:0] r_mask;
  blk_t         r_data;
  logic [1:0]   r_trunc;
  logic [7:0]   r_id;
  blk_t         w_data;
  logic [3:0]   w_n;
  md_entry_t    w_entry;
  logic [7:0]   pend_unknown;     // reads sent without metadata, not yet resolved

  logic         r_bypass;
  logic [3:0]   rs_nchunks;
  logic         rs_known;
  logic         fe_mq_valid, be_mq_valid;
  logic [LADDR_W-1:0] be_mq_line;
  logic         rd_fire, wr_fire, pr_valid, unk_resolve;

  // g_rdpaired response queue: decompressed old data of a read-modify-write,
  // on its way back to the request side
  logic pq_in_valid, pq_in_ready;
  blk_t pq_out;
  logic [$clog2(RESPQ_BLOCKS+1)-1:0] pq_count;

  sync_fifo #(.WIDTH(BLK_BITS), .DEPTH(RESPQ_BLOCKS)) u_rdpaired_respq (
    .clk, .rst_n,
    .in_valid(pq_in_valid), .in_ready(pq_in_ready), .in_data(res_words),
    .out_valid(pr_valid), .out_ready(fst == F_RMW_WAIT), .out_data(pq_out),
    .count(pq_count)
  );
  blk_t         merged;

  assign r_bypass = (r_space == SP_LOCAL) || (r_space == SP_CONST);
  assign a_line   = r_addr[31:7+SLOT_W];
  assign a_slot   = r_addr[7 +: SLOT_W];
  assign u_line   = a_line;
  assign u_slot   = a_slot;
  assign u_entry  = w_entry;

  reqsize_mod u_reqsize_mod (
    .bypass(r_bypass), .md_hit(a_hit), .md_entry(a_entry),
    .nchunks(rs_nchunks), .md_known(rs_known)
  );

  fp_trunc_pack u_trunc_pack (
    .in_words(r_data), .trunc(r_trunc), .out_words(packed_words), .nwords(packed_n)
  );

  cpack_compressor u_comp (
    .clk, .rst_n, .start(comp_start), .words(packed_words), .nwords(packed_n),
    .busy(comp_busy), .done(comp_done), .out_bits(comp_bits), .out_len(comp_len)
  );

  // MSHR allocation: the response side has priority
  assign mq_valid = be_mq_valid || fe_mq_valid;
  assign mq_line  = be_mq_valid ? be_mq_line : a_line;

  logic fe_mq_ok;
  assign fe_mq_ok = mq_ready && !be_mq_valid;

  // compressed size in chunks
  logic [3:0] c_chunks, raw_n;
  assign c_chunks = 4'((comp_len + 11'd127) >> 7);
  assign raw_n    = 4'(raw_chunks(r_trunc));

  always_comb begin
    for (int b = 0; b < 128; b++)
      merged[b*8 +: 8] = r_mask[b] ? r_data[b*8 +: 8] : pq_out[b*8 +: 8];
  end

  always_comb begin
    req_ready    = (fst == F_IDLE);
    rwq_in_valid = 1'b0;
    rwq_in       = '0;
    trk_in_valid = 1'b0;
    trk_in       = '0;
    fe_mq_valid  = 1'b0;
    a_touch      = 1'b0;
    u_valid      = 1'b0;
    comp_start   = 1'b0;
    rd_fire      = 1'b0;
    wr_fire      = 1'b0;
    rwq_in.addr  = {r_addr[31:7], 7'd0};
    case (fst)
      F_LWR: begin
        rwq_in_valid   = 1'b1;
        rwq_in.kind    = DK_WR;
        rwq_in.nchunks = 4'd8;
        rwq_in.data    = r_data;
      end
      F_RD: begin
        trk_in.kind     = r_bypass ? TK_L : (r_paired ? TK_PAIRED : TK_G);
        trk_in.id       = r_id;
        trk_in.line     = a_line;
        trk_in.slot     = a_slot;
        trk_in.md_known = rs_known;
        trk_in.entry    = r_bypass ? '0 : a_entry;
        trk_in.nfetch   = rs_nchunks;
        rwq_in.kind     = DK_RD;
        rwq_in.nchunks  = rs_nchunks;
        if (rwq_in_ready && trk_in_ready && (rs_known || fe_mq_ok)) begin
          rd_fire      = 1'b1;
          rwq_in_valid = 1'b1;
          trk_in_valid = 1'b1;
          fe_mq_valid  = !rs_known;
          a_touch      = 1'b1;
        end
      end
      F_COMP: comp_start = 1'b1;
      F_WR_UPD: begin
        rwq_in.kind    = DK_WR;
        rwq_in.nchunks = w_n;
        rwq_in.data    = w_data;
        if (pend_unknown == '0) begin
          if (a_hit) begin
            if (rwq_in_ready) begin
              rwq_in_valid = 1'b1;
              wr_fire      = 1'b1;
              // the entry (and the line's dirty bit) changes only if needed
              u_valid      = (a_entry != w_entry);
            end
          end else begin
            fe_mq_valid = fe_mq_ok;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst      <= F_IDLE;
      r_paired <= 1'b0;
      r_space  <= SP_GLOBAL;
      r_addr   <= '0;
      r_mask   <= '0;
      r_data   <= '0;
      r_trunc  <= '0;
      r_id     <= '0;
      w_data   <= '0;
      w_n      <= '0;
      w_entry  <= '0;
    end else begin
      case (fst)
        F_IDLE: if (req_valid) begin
          r_space  <= req_space;
          r_addr   <= req_addr;
          r_mask   <= req_mask;
          r_data   <= req_data;
          r_trunc  <= req_trunc;
          r_id     <= req_id;
          r_paired <= 1'b0;
          if (req_space == SP_LOCAL || req_space == SP_CONST)
            fst <= req_write ? F_LWR : F_RD;
          else if (!req_write)
            fst <= F_RD;
          else if (&req_mask)
            fst <= F_COMP;
          else begin
            r_paired <= 1'b1;
            fst      <= F_RD;
          end
        end
        F_LWR: if (rwq_in_ready) fst <= F_IDLE;
        F_RD:  if (rd_fire) fst <= r_paired ? F_RMW_WAIT : F_IDLE;
        F_RMW_WAIT: if (pr_valid) begin
          r_data <= merged;
          fst    <= F_COMP;
        end
        F_COMP: if (!comp_busy) fst <= F_COMP_WAIT;
        F_COMP_WAIT: if (comp_done) begin
          if (c_chunks < raw_n) begin
            w_data  <= comp_bits[BLK_BITS-1:0];
            w_n     <= c_chunks;
            w_entry <= '{rsvd: 2'b00, trunc: r_trunc, comp: 1'b1, nm1: 3'(c_chunks - 4'd1)};
          end else begin
            w_data  <= packed_words;
            w_n     <= raw_n;
            w_entry <= '{rsvd: 2'b00, trunc: r_trunc, comp: 1'b0, nm1: 3'd0};
          end
          fst <= F_WR_UPD;
        end
        F_WR_UPD: if (wr_fire) fst <= F_IDLE;
        default: fst <= F_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------- response side
  typedef enum logic [1:0] { B_IDLE, B_LOAD, B_DEC, B_OUT } bstate_e;

  bstate_e    bst;
  trk_kind_e  c_kind;
  logic [7:0] c_id;
  md_entry_t  c_entry;
  logic [3:0] c_nfetch, c_nuse, c_k;
  blk_t       raw_q;

  assign b_line = trk_out.line;
  assign b_slot = trk_out.slot;

  logic      head_ready, dec_fin;
  md_entry_t h_entry;                 // metadata entry of the head read
  assign head_ready = trk_out_valid && (trk_out.md_known || b_hit);
  assign h_entry    = trk_out.md_known ? trk_out.entry : b_entry;

  always_comb begin
    trk_out_ready = 1'b0;
    be_mq_valid   = 1'b0;
    be_mq_line    = trk_out.line;
    unk_resolve   = 1'b0;
    pdq_out_ready = 1'b0;
    dec_we        = 1'b0;
    dec_idx       = c_k[2:0];
    dec_start     = 1'b0;
    dec_nwords    = 6'(trunc_words(h_entry.trunc));
    dec_nchunks   = entry_chunks(h_entry);
    rsq_in_valid  = 1'b0;
    rsq_in.id     = c_id;
    rsq_in.data   = res_words;
    pq_in_valid   = 1'b0;
    case (bst)
      B_IDLE: if (trk_out_valid) begin
        if (head_ready) begin
          trk_out_ready = 1'b1;
          unk_resolve   = !trk_out.md_known;
          // the decompressor is opened now and decodes as chunks arrive
          dec_start     = (trk_out.kind != TK_L) && h_entry.comp;
        end else if (!pend_hit) begin
          // metadata line was evicted again before this read got it
          be_mq_valid = 1'b1;
        end
      end
      B_LOAD: begin
        pdq_out_ready = 1'b1;
        dec_we        = pdq_out_valid && (c_k < c_nuse) && (c_kind != TK_L) && c_entry.comp;
      end
      B_OUT: begin
        if (c_kind == TK_PAIRED) pq_in_valid = 1'b1;
        else                     rsq_in_valid = 1'b1;
      end
      default: ;
    endcase
  end

  cpack_decompressor #(.BYTES_PER_CYCLE(DEC_BYTES_PER_CYCLE)) u_decomp (
    .clk, .rst_n, .in_we(dec_we), .in_idx(dec_idx), .in_chunk(pdq_out),
    .start(dec_start), .nwords(dec_nwords), .nchunks(dec_nchunks),
    .busy(dec_busy), .done(dec_done), .out_words(dec_out)
  );

  assign res_src = (c_kind != TK_L && c_entry.comp) ? dec_out : raw_q;

  fp_trunc_unpack u_trunc_unpack (
    .in_words(res_src), .trunc(c_kind == TK_L ? 2'd0 : c_entry.trunc), .out_words(res_words)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst      <= B_IDLE;
      c_kind   <= TK_G;
      c_id     <= '0;
      c_entry  <= '0;
      c_nfetch <= '0;
      c_nuse   <= '0;
      c_k      <= '0;
      raw_q    <= '0;
      dec_fin  <= 1'b0;
    end else begin
      if (dec_done) dec_fin <= 1'b1;
      case (bst)
        B_IDLE: if (head_ready) begin
          c_kind   <= trk_out.kind;
          c_id     <= trk_out.id;
          c_entry  <= h_entry;
          c_nfetch <= trk_out.nfetch;
          c_nuse   <= (trk_out.kind == TK_L) ? 4'd8 : entry_chunks(h_entry);
          c_k      <= '0;
          raw_q    <= '0;
          dec_fin  <= 1'b0;
          bst      <= B_LOAD;
        end
        B_LOAD: if (pdq_out_valid) begin
          if (c_k < c_nuse) raw_q[c_k[2:0] * CHUNK_BITS +: CHUNK_BITS] <= pdq_out;
          c_k <= c_k + 4'd1;
          if (c_k + 4'd1 == c_nfetch) begin
            c_k <= '0;
            bst <= (c_kind != TK_L && c_entry.comp) ? B_DEC : B_OUT;
          end
        end
        B_DEC: if (dec_fin || dec_done) bst <= B_OUT;
        B_OUT: if ((pq_in_valid && pq_in_ready) || (rsq_in_valid && rsq_in_ready)) bst <= B_IDLE;
        default: bst <= B_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_unknown <= '0;
    else pend_unknown <= pend_unknown + 8'(rd_fire && !rs_known) - 8'(unk_resolve);
  end

  // ------------------------------------------------------------ statistics
  always_comb begin
    ev             = '0;
    ev.md_hit      = rd_fire && !r_bypass && a_hit;
    ev.md_miss     = rd_fire && !r_bypass && !a_hit;
    ev.mshr_merge  = rd_fire && !rs_known && mq_merged;
    ev.md_stall    = (bst == B_IDLE) && trk_out_valid && !head_ready;
    ev.wr_md_stall = (fst == F_WR_UPD) && !wr_fire;
    ev.md_evict    = ev_valid;
    ev.short_read  = rd_fire && rs_nchunks < 4'd8;
    ev.decomp      = dec_done;
    ev.comp_wr     = wr_fire && w_entry.comp;
    ev.raw_wr      = wr_fire && !w_entry.comp;
    ev.lossy_wr    = wr_fire && w_entry.trunc != 2'd0;
    ev.rmw         = (fst == F_RMW_WAIT) && pr_valid;
    ev.bypass      = (rd_fire && r_bypass) || ((fst == F_LWR) && rwq_in_ready);
  end

  // handshake rules
  assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !dec_busy)
    else $error("decompressor started while busy");
  assert property (@(posedge clk) disable iff (!rst_n)
    pr_valid |-> fst == F_RMW_WAIT);
  assert property (@(posedge clk) disable iff (!rst_n)
    dram_req_valid && !dram_req_ready |=> dram_req_valid);
endmodule
