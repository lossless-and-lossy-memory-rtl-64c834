// dram_req_arb: selects the next request for the DRAM controller.
//
// Three sources compete for the single request port of the DRAM controller:
// dirty metadata lines evicted from md_cache (md_wr), metadata line reads
// from the MSHR (md_rd), and the data read/write queue (rd/wr_reqQ). Metadata
// requests always go first, so a read that is waiting for its metadata waits
// as little as possible; among them write-backs precede reads, so that a line
// written back and then missed again is read after its write. Fixed
// priority, combinational; the winner's ready is dram_ready.
// Metadata lines live in a reserved region starting at MD_BASE: line L is at
// MD_BASE + 128*L.
// Priority of metadata over data follows the scheme; the order between the
// two metadata sources and the base address are this design's choices.
module dram_req_arb
  import mc_comp_pkg::*;
#(
  parameter logic [31:0] MD_BASE = 32'hFE00_0000,
  parameter int unsigned LADDR_W = 18
) (
  input  logic               wb_valid,
  output logic               wb_ready,
  input  logic [LADDR_W-1:0] wb_line,
  input  blk_t               wb_data,
  input  logic               md_valid,
  output logic               md_ready,
  input  logic [LADDR_W-1:0] md_line,
  input  logic [3:0]         md_tag,
  input  logic               rw_valid,
  output logic               rw_ready,
  input  dram_req_t          rw_req,
  output logic               dram_valid,
  input  logic               dram_ready,
  output dram_req_t          dram_req
);
  always_comb begin
    wb_ready = 1'b0; md_ready = 1'b0; rw_ready = 1'b0;
    dram_req = '0;
    dram_valid = wb_valid || md_valid || rw_valid;
    if (wb_valid) begin
      wb_ready         = dram_ready;
      dram_req.kind    = DK_MD_WR;
      dram_req.addr    = MD_BASE + {7'(0), wb_line, 7'(0)};
      dram_req.nchunks = 4'd8;
      dram_req.data    = wb_data;
    end else if (md_valid) begin
      md_ready         = dram_ready;
      dram_req.kind    = DK_MD_RD;
      dram_req.addr    = MD_BASE + {7'(0), md_line, 7'(0)};
      dram_req.nchunks = 4'd8;
      dram_req.tag     = md_tag;
    end else if (rw_valid) begin
      rw_ready = dram_ready;
      dram_req = rw_req;
    end
  end
endmodule
