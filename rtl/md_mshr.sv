// md_mshr: miss status handling registers for the metadata cache.
//
// Tracks metadata lines that missed in md_cache and are being fetched from
// the reserved metadata region of DRAM, so that a line is requested only once
// however many data requests miss on it while it is in flight.
// Each of the ENTRIES entries holds a line address, a valid bit and an issued
// bit. Ports:
//   allocation (q_*): a missing line address. If a valid entry already holds
//     it the request merges (q_merged); otherwise a free entry is taken.
//     q_ready is low only when the line is new and every entry is in use.
//   issue (md_rd_*): the lowest valid entry not yet sent is offered to the
//     DRAM request arbiter, with its entry number as tag; it is marked issued
//     on md_rd_valid && md_rd_ready.
//   fill (resp_*): the metadata response network returns a line with the tag
//     of its entry; fill_line gives that entry's line address combinationally
//     and the entry is freed at the clock edge.
//   pend_*: combinational query whether a line is in flight.
// The MSHR table, its 10 entries and the suppression of duplicate requests
// follow the scheme; the first-free allocation and lowest-first issue order
// are this design's choices.
module md_mshr #(
  parameter int unsigned ENTRIES = 10,
  parameter int unsigned LADDR_W = 18,
  parameter int unsigned TAG_W   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               q_valid,
  input  logic [LADDR_W-1:0] q_line,
  output logic               q_ready,
  output logic               q_merged,
  output logic               md_rd_valid,
  input  logic               md_rd_ready,
  output logic [LADDR_W-1:0] md_rd_line,
  output logic [TAG_W-1:0]   md_rd_tag,
  input  logic               resp_valid,
  input  logic [TAG_W-1:0]   resp_tag,
  output logic [LADDR_W-1:0] fill_line,
  input  logic [LADDR_W-1:0] pend_line,
  output logic               pend_hit,
  output logic [$clog2(ENTRIES+1)-1:0] used
);
  logic [LADDR_W-1:0] line_q   [ENTRIES];
  logic [ENTRIES-1:0] valid_q, issued_q;

  logic               match, have_free, have_iss;
  logic [TAG_W-1:0]   free_idx, iss_idx;

  always_comb begin
    match = 1'b0; have_free = 1'b0; have_iss = 1'b0; pend_hit = 1'b0;
    free_idx = '0; iss_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid_q[i] && line_q[i] == q_line)    match = 1'b1;
      if (valid_q[i] && line_q[i] == pend_line) pend_hit = 1'b1;
      if (!valid_q[i]) begin have_free = 1'b1; free_idx = TAG_W'(i); end
      if (valid_q[i] && !issued_q[i]) begin have_iss = 1'b1; iss_idx = TAG_W'(i); end
    end
  end

  assign q_ready     = match || have_free;
  assign q_merged    = q_valid && match;
  assign md_rd_valid = have_iss;
  assign md_rd_tag   = iss_idx;
  assign md_rd_line  = line_q[iss_idx];
  assign fill_line   = line_q[resp_tag];

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++) used = used + $bits(used)'(valid_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      issued_q <= '0;
      for (int i = 0; i < ENTRIES; i++) line_q[i] <= '0;
    end else begin
      if (md_rd_valid && md_rd_ready) issued_q[iss_idx] <= 1'b1;
      if (resp_valid) begin
        valid_q[resp_tag]  <= 1'b0;
        issued_q[resp_tag] <= 1'b0;
      end
      if (q_valid && !match && have_free) begin
        valid_q[free_idx]  <= 1'b1;
        issued_q[free_idx] <= 1'b0;
        line_q[free_idx]   <= q_line;
      end
    end
  end

  // a response only ever returns for an entry that was sent
  assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> (valid_q[resp_tag] && issued_q[resp_tag]));
endmodule
