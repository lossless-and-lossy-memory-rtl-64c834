// sync_fifo: single-clock first-in first-out queue.
//
// Used for the physical queues of the compressing memory controller (the
// request queue towards the DRAM controller, the queue of read data waiting
// for decompression, the read response queue and the read tracking queue).
// Storage is a register array of DEPTH entries of WIDTH bits with read and
// write pointers and an occupancy counter. Valid/ready handshake on both sides:
// a word is written when in_valid && in_ready, read when out_valid && out_ready.
// out_data shows the head entry combinationally (first-word fall-through).
// Reset empties the queue. Depths are set by the instantiating module.
module sync_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rptr, wptr;
  logic             do_wr, do_rd;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_data;
  end

  // a full queue never takes a word, an empty one never gives one
  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);
endmodule
