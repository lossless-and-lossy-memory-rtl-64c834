// gddr_model: behavioural model of the DRAM controller and GDDR3 memory seen
// by mc_comp. Not synthesizable; for simulation only.
//
// Requests are accepted in order and take effect at acceptance: a write
// updates the memory at once, a read takes a snapshot of the chunks it asks
// for. Read data chunks (16 bytes each) are returned in request order, no
// earlier than LAT cycles after the request was accepted and at most one per
// BEAT cycles (a GDDR3 burst of four transfers on a 4-byte bus moves one
// chunk in four controller cycles), so link time grows with the chunk count. Metadata
// line reads are answered on a separate response port (whole 128-byte line
// with the request's tag) after LAT cycles, independent of the data returns,
// like a separate virtual network. Memory that was never written reads as zero.
// Counters report the data chunks moved, to measure link traffic.
module gddr_model
  import mc_comp_pkg::*;
#(
  parameter int unsigned LAT  = 12,
  parameter int unsigned BEAT = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  dram_req_t req,
  output logic      rd_valid,
  input  logic      rd_ready,
  output chunk_t    rd_chunk,
  output logic      md_valid,
  input  logic      md_ready,
  output logic [3:0] md_tag,
  output blk_t      md_line
);
  typedef struct { longint unsigned t; chunk_t c; } rd_item_t;
  typedef struct { longint unsigned t; logic [3:0] tag; blk_t l; } md_item_t;

  chunk_t   mem [logic [27:0]];
  rd_item_t rq [$];
  md_item_t mq [$];
  longint unsigned cyc, last_t;
  int unsigned data_rd_chunks, data_wr_chunks, md_rd_lines, md_wr_lines;

  assign req_ready = 1'b1;

  function automatic chunk_t peek(logic [27:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= 0;
      last_t    = 0;
      rd_valid <= 1'b0;
      md_valid <= 1'b0;
      rd_chunk <= '0;
      md_tag   <= '0;
      md_line  <= '0;
      rq.delete();
      mq.delete();
      data_rd_chunks = 0; data_wr_chunks = 0; md_rd_lines = 0; md_wr_lines = 0;
    end else begin
      cyc <= cyc + 1;
      if (req_valid && req_ready) begin
        case (req.kind)
          DK_RD: for (int k = 0; k < int'(req.nchunks); k++) begin
            last_t = (cyc + LAT > last_t + BEAT) ? cyc + LAT : last_t + BEAT;
            rq.push_back('{last_t, peek(req.addr[31:4] + 28'(k))});
            data_rd_chunks++;
          end
          DK_WR: for (int k = 0; k < int'(req.nchunks); k++) begin
            mem[req.addr[31:4] + 28'(k)] = req.data[k*128 +: 128];
            data_wr_chunks++;
          end
          DK_MD_RD: begin
            blk_t l;
            for (int k = 0; k < 8; k++) l[k*128 +: 128] = peek(req.addr[31:4] + 28'(k));
            mq.push_back('{cyc + LAT, req.tag, l});
            md_rd_lines++;
          end
          default: begin
            for (int k = 0; k < 8; k++) mem[req.addr[31:4] + 28'(k)] = req.data[k*128 +: 128];
            md_wr_lines++;
          end
        endcase
      end
      if (rd_valid && rd_ready) void'(rq.pop_front());
      if (md_valid && md_ready) void'(mq.pop_front());
      // present the next heads (after any pop above)
      if (rq.size() > 0 && rq[0].t <= cyc) begin
        rd_valid <= 1'b1; rd_chunk <= rq[0].c;
      end else begin
        rd_valid <= 1'b0;
      end
      if (mq.size() > 0 && mq[0].t <= cyc) begin
        md_valid <= 1'b1; md_tag <= mq[0].tag; md_line <= mq[0].l;
      end else begin
        md_valid <= 1'b0;
      end
    end
  end
endmodule
