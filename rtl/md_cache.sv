// md_cache: on-chip cache of compression metadata, one per memory controller.
//
// Metadata for every 128-byte data block lives in a reserved DRAM region;
// this cache keeps the most recently used 128-byte metadata lines on chip.
// Organisation: LINES lines of LINE_BITS bits, 2-way set associative
// (LINES/2 sets), one LRU bit per set, write-back with a dirty bit per line.
// A line holds ENTRIES = LINE_BITS/8 one-byte entries (md_entry_t), so entry
// s of line L describes data block L*ENTRIES + s.
// Ports:
//   two lookup ports (a_*, b_*): combinational hit and entry for a line
//     address and slot; a_touch marks the way most recently used;
//   update port (u_*): writes one entry of a resident line and sets its dirty
//     bit (the caller only updates on a hit);
//   fill port (f_*): installs a line returned from DRAM into the invalid way,
//     else the LRU way. If the victim is valid and dirty, ev_valid is high in
//     the same cycle with its line address and data, for write-back.
// Everything changes at the clock edge; lookups see the state before it.
// Two-way associativity, the 32 lines and the 128-byte line size follow the
// scheme; the one-byte entry, LRU replacement and write-back policy are this
// design's choices.
module md_cache
  import mc_comp_pkg::*;
#(
  parameter int unsigned LINES     = 32,
  parameter int unsigned LINE_BITS = 1024,
  parameter int unsigned LADDR_W   = 18      // metadata line address width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup port A (request side)
  input  logic [LADDR_W-1:0]   a_line,
  input  logic [$clog2(LINE_BITS/8)-1:0] a_slot,
  input  logic                 a_touch,
  output logic                 a_hit,
  output md_entry_t            a_entry,
  // lookup port B (response side)
  input  logic [LADDR_W-1:0]   b_line,
  input  logic [$clog2(LINE_BITS/8)-1:0] b_slot,
  output logic                 b_hit,
  output md_entry_t            b_entry,
  // entry update
  input  logic                 u_valid,
  input  logic [LADDR_W-1:0]   u_line,
  input  logic [$clog2(LINE_BITS/8)-1:0] u_slot,
  input  md_entry_t            u_entry,
  // line fill
  input  logic                 f_valid,
  input  logic [LADDR_W-1:0]   f_line,
  input  logic [LINE_BITS-1:0] f_data,
  // dirty victim
  output logic                 ev_valid,
  output logic [LADDR_W-1:0]   ev_line,
  output logic [LINE_BITS-1:0] ev_data
);
  localparam int unsigned SETS  = LINES / 2;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = LADDR_W - SET_W;

  logic [LINE_BITS-1:0] data_q  [SETS][2];
  logic [TAG_W-1:0]     tag_q   [SETS][2];
  logic                 valid_q [SETS][2];
  logic                 dirty_q [SETS][2];
  logic                 lru_q   [SETS];     // way to replace next

  function automatic logic [SET_W-1:0] set_of(logic [LADDR_W-1:0] l);
    return l[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [LADDR_W-1:0] l);
    return l[LADDR_W-1:SET_W];
  endfunction

  logic a_way, b_way, u_way, u_hit;

  always_comb begin
    a_hit = 1'b0; a_way = 1'b0;
    b_hit = 1'b0; b_way = 1'b0;
    u_hit = 1'b0; u_way = 1'b0;
    for (int w = 0; w < 2; w++) begin
      if (valid_q[set_of(a_line)][w] && tag_q[set_of(a_line)][w] == tag_of(a_line)) begin
        a_hit = 1'b1; a_way = 1'(w);
      end
      if (valid_q[set_of(b_line)][w] && tag_q[set_of(b_line)][w] == tag_of(b_line)) begin
        b_hit = 1'b1; b_way = 1'(w);
      end
      if (valid_q[set_of(u_line)][w] && tag_q[set_of(u_line)][w] == tag_of(u_line)) begin
        u_hit = 1'b1; u_way = 1'(w);
      end
    end
    a_entry = a_hit ? md_entry_t'(data_q[set_of(a_line)][a_way][a_slot*8 +: 8]) : '0;
    b_entry = b_hit ? md_entry_t'(data_q[set_of(b_line)][b_way][b_slot*8 +: 8]) : '0;
  end

  // fill victim
  logic [SET_W-1:0] f_set;
  logic             f_way;
  assign f_set = set_of(f_line);
  always_comb begin
    if (!valid_q[f_set][0])      f_way = 1'b0;
    else if (!valid_q[f_set][1]) f_way = 1'b1;
    else                         f_way = lru_q[f_set];
  end
  assign ev_valid = f_valid && valid_q[f_set][f_way] && dirty_q[f_set][f_way];
  assign ev_line  = {tag_q[f_set][f_way], f_set};
  assign ev_data  = data_q[f_set][f_way];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < 2; w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
        end
      end
    end else begin
      if (a_touch && a_hit) lru_q[set_of(a_line)] <= ~a_way;
      if (u_valid && u_hit) begin
        dirty_q[set_of(u_line)][u_way] <= 1'b1;
        lru_q[set_of(u_line)]          <= ~u_way;
      end
      if (f_valid) begin
        valid_q[f_set][f_way] <= 1'b1;
        dirty_q[f_set][f_way] <= 1'b0;
        tag_q[f_set][f_way]   <= tag_of(f_line);
        lru_q[f_set]          <= ~f_way;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (u_valid && u_hit) data_q[set_of(u_line)][u_way][u_slot*8 +: 8] <= u_entry;
    if (f_valid) data_q[f_set][f_way] <= f_data;
  end

  // an update and a fill never target the same line in one cycle
  assert property (@(posedge clk) disable iff (!rst_n)
    !(u_valid && f_valid && u_line == f_line));
endmodule
