// reqsize_mod: request size modifier.
//
// Sits between an incoming 128-byte read and the DRAM request queue and sets
// how many 16-byte chunks the DRAM controller fetches. With the block's
// metadata known (md_hit), a compressed block needs only its N stored chunks,
// an uncompressed one its raw size (8 chunks, or fewer when its FP LSBs were
// truncated). When the metadata is not on chip the read is sent at once for
// the full 8 chunks rather than waiting for the metadata, so the DRAM
// bandwidth is never left idle; md_known tells the response side that the
// data must wait for the metadata before decompression. Local and constant
// space reads (bypass) always fetch 8 chunks. Combinational.
// All of this behaviour follows the scheme.
module reqsize_mod
  import mc_comp_pkg::*;
(
  input  logic      bypass,
  input  logic      md_hit,
  input  md_entry_t md_entry,
  output logic [3:0] nchunks,
  output logic      md_known
);
  always_comb begin
    md_known = bypass || md_hit;
    if (bypass || !md_hit) nchunks = 4'd8;
    else                   nchunks = entry_chunks(md_entry);
  end
endmodule
