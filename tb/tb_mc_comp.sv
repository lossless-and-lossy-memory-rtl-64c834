// tb_mc_comp: end-to-end test of the compressing memory controller, at the
// default parameters, against the gddr_model DRAM.
//
// Traffic: DMA-style full-block global writes of data of several kinds
// (zero, small integers, values sharing their upper bits, random, FP values
// with 8/12/16 truncated LSBs), spread over more metadata lines than the
// metadata cache holds and mapping to the same sets so dirty lines are
// evicted; global and texture reads of them (hits give short reads, misses
// give full reads that wait for metadata, with MSHR merging for neighbours);
// partial global writes (read-modify-write); local and constant accesses
// that bypass compression. Every read is compared with a reference memory
// kept here (truncated LSBs read back as zeros). The DRAM traffic of reads of
// compressible blocks is checked to be below 8 chunks. Every mechanism the
// controller implements is counted and must occur at least once.
module tb_mc_comp;
  import mc_comp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, req_write;
  space_e      req_space;
  logic [31:0] req_addr;
  logic [127:0] req_mask;
  blk_t        req_data;
  logic [1:0]  req_trunc;
  logic [7:0]  req_id;
  logic        resp_valid, resp_ready;
  logic [7:0]  resp_id;
  blk_t        resp_data;
  logic        dram_req_valid, dram_req_ready;
  dram_req_t   dram_req;
  logic        dram_rd_valid, dram_rd_ready;
  chunk_t      dram_rd_chunk;
  logic        md_resp_valid, md_resp_ready;
  logic [3:0]  md_resp_tag;
  blk_t        md_resp_line;
  mc_ev_t      ev;

  mc_comp dut (.*);

  gddr_model #(.LAT(12)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_chunk(dram_rd_chunk),
    .md_valid(md_resp_valid), .md_ready(md_resp_ready), .md_tag(md_resp_tag), .md_line(md_resp_line)
  );

  int checks = 0, failures = 0;
  int n_ev [13];
  string ev_name [13] = '{"md_hit", "md_miss", "mshr_merge", "md_stall", "wr_md_stall",
                          "md_evict", "short_read", "decomp", "comp_wr", "raw_wr",
                          "lossy_wr", "rmw", "bypass"};

  always @(posedge clk) if (rst_n) begin
    if (ev.md_hit)      n_ev[0]++;
    if (ev.md_miss)     n_ev[1]++;
    if (ev.mshr_merge)  n_ev[2]++;
    if (ev.md_stall)    n_ev[3]++;
    if (ev.wr_md_stall) n_ev[4]++;
    if (ev.md_evict)    n_ev[5]++;
    if (ev.short_read)  n_ev[6]++;
    if (ev.decomp)      n_ev[7]++;
    if (ev.comp_wr)     n_ev[8]++;
    if (ev.raw_wr)      n_ev[9]++;
    if (ev.lossy_wr)    n_ev[10]++;
    if (ev.rmw)         n_ev[11]++;
    if (ev.bypass)      n_ev[12]++;
  end

  // reference memory: block address -> expected 128-byte content
  blk_t ref_mem [logic [24:0]];
  typedef struct { logic [7:0] id; blk_t d; logic [31:0] a; } exp_t;
  exp_t exp_q [$];
  logic [7:0] next_id = 8'd0;

  function automatic blk_t ref_rd(logic [31:0] a);
    return ref_mem.exists(a[31:7]) ? ref_mem[a[31:7]] : '0;
  endfunction

  function automatic blk_t clear_lsbs(blk_t d, logic [1:0] t);
    blk_t r = d;
    for (int i = 0; i < 32; i++)
      for (int b = 0; b < int'(trunc_bits(t)); b++) r[i*32 + b] = 1'b0;
    return r;
  endfunction

  // data kinds
  function automatic blk_t gen_block(int kind, int unsigned seed);
    blk_t d;
    int unsigned s = seed;
    for (int i = 0; i < 32; i++) begin
      s = s * 1103515245 + 12345;
      case (kind)
        0: d[i*32 +: 32] = '0;
        1: d[i*32 +: 32] = 32'(s[23:16]);                      // small integers
        2: d[i*32 +: 32] = {16'h4120, 8'(i % 3), s[23:16]};    // shared upper bits
        3: d[i*32 +: 32] = {s[15:0], s[31:16]} ^ (s * 32'h9E37_79B9); // random
        default: d[i*32 +: 32] = {9'h07F, s[30:8]};            // FP in [1,2)
      endcase
    end
    return d;
  endfunction

  task automatic send(input logic wr, input space_e sp, input logic [31:0] a,
                      input blk_t d, input logic [127:0] m, input logic [1:0] t);
    req_valid <= 1'b1; req_write <= wr; req_space <= sp; req_addr <= a;
    req_data <= d; req_mask <= m; req_trunc <= t; req_id <= next_id;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
    if (!wr) begin
      exp_q.push_back('{next_id, ref_rd(a), a});
    end else if (&m) begin
      ref_mem[a[31:7]] = (sp == SP_LOCAL || sp == SP_CONST) ? d : clear_lsbs(d, t);
    end else begin
      blk_t o = ref_rd(a);
      for (int b = 0; b < 128; b++) if (m[b]) o[b*8 +: 8] = d[b*8 +: 8];
      ref_mem[a[31:7]] = clear_lsbs(o, t);
    end
    next_id <= next_id + 8'd1;
    @(posedge clk);
  endtask

  task automatic wr_full(input logic [31:0] a, input blk_t d, input logic [1:0] t);
    send(1'b1, SP_GLOBAL, a, d, '1, t);
  endtask
  task automatic rd(input space_e sp, input logic [31:0] a);
    send(1'b0, sp, a, '0, '0, 2'd0);
  endtask

  // response checker
  assign resp_ready = 1'b1;
  always @(posedge clk) if (rst_n && resp_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected response id %0d", resp_id);
    end else begin
      e = exp_q.pop_front();
      if (resp_id !== e.id || resp_data !== e.d) begin
        failures++;
        $display("FAIL: read id %0d addr %h: got id %0d data %h, want %h",
                 e.id, e.a, resp_id, resp_data[127:0], e.d[127:0]);
      end
    end
  end

  task automatic drain();
    int n = 0;
    while (exp_q.size() != 0 && n < 20000) begin @(posedge clk); n++; end
    repeat (40) @(posedge clk);
  endtask

  initial begin
    int unsigned rd0;
    logic [31:0] a;
    req_valid = 1'b0; req_write = 1'b0; req_space = SP_GLOBAL; req_addr = '0;
    req_mask = '0; req_data = '0; req_trunc = '0; req_id = '0;
    foreach (n_ev[i]) n_ev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. DMA copy: blocks of every data kind, in 4 metadata lines of one set
    //    (stride 16 x 16 KB) plus lines of other sets, to force evictions
    for (int l = 0; l < 4; l++)
      for (int b = 0; b < 6; b++) begin
        a = 32'(l) * 32'h0004_0000 + 32'(b) * 32'h80;
        wr_full(a, gen_block(b % 5, 32'(l * 100 + b)), (b % 5 == 4) ? 2'(1 + l % 3) : 2'd0);
      end
    for (int b = 0; b < 8; b++)
      wr_full(32'h0000_4000 + 32'(b) * 32'h80, gen_block(b % 4, 32'(777 + b)), 2'd0);

    // 2. read back: recently used lines hit, the evicted ones miss; neighbours
    //    in a missing line merge in the MSHR
    for (int l = 0; l < 4; l++)
      for (int b = 0; b < 6; b++)
        rd((b % 2) ? SP_TEXTURE : SP_GLOBAL, 32'(l) * 32'h0004_0000 + 32'(b) * 32'h80);
    drain();

    // 3. compressible block read with metadata on chip: fewer chunks on the link
    wr_full(32'h0000_8000, gen_block(1, 5), 2'd0);
    rd(SP_GLOBAL, 32'h0000_8000);
    drain();
    rd0 = u_dram.data_rd_chunks;
    rd(SP_GLOBAL, 32'h0000_8000);
    drain();
    checks++;
    if (u_dram.data_rd_chunks - rd0 >= 8) begin
      failures++; $display("FAIL: compressible block read used %0d chunks", u_dram.data_rd_chunks - rd0);
    end

    // 4. partial writes (read-modify-write) on compressed and raw blocks
    send(1'b1, SP_GLOBAL, 32'h0000_0080, gen_block(3, 99), 128'h0000_0000_0000_0000_0000_0000_FFFF_00F0, 2'd0);
    send(1'b1, SP_GLOBAL, 32'h0000_0180, gen_block(1, 98), {64'h0, 64'hFF00_0000_0000_00FF}, 2'd0);
    send(1'b1, SP_GLOBAL, 32'h0000_9000, gen_block(2, 97), {96'h0, 32'hFFFF_FFFF}, 2'd0);
    rd(SP_GLOBAL, 32'h0000_0080);
    rd(SP_GLOBAL, 32'h0000_0180);
    rd(SP_GLOBAL, 32'h0000_9000);

    // 5. local / constant space: bypass
    send(1'b1, SP_LOCAL, 32'h0010_0000, gen_block(3, 55), '1, 2'd0);
    send(1'b1, SP_CONST, 32'h0010_0080, gen_block(1, 56), '1, 2'd0);
    rd(SP_LOCAL, 32'h0010_0000);
    rd(SP_CONST, 32'h0010_0080);
    rd(SP_LOCAL, 32'h0020_0000);        // never written

    // 6. mixed random traffic
    for (int i = 0; i < 60; i++) begin
      int unsigned r;
      r = $urandom;
      a = {12'h000, 4'(r[3:0]), 2'b00, 7'(r[10:4]), 7'h00} + 32'(r[13:12]) * 32'h0004_0000;
      case (r[17:15])
        0, 1: wr_full(a, gen_block(int'(r[20:18]) % 5, r), 2'(r[22:21]));
        2:    send(1'b1, SP_GLOBAL, a, gen_block(int'(r[20:18]) % 5, r), {$urandom, $urandom, $urandom, $urandom}, 2'd0);
        default: rd(SP_GLOBAL, a);
      endcase
    end
    drain();

    for (int i = 0; i < 13; i++) begin
      checks++;
      if (n_ev[i] == 0) begin
        failures++; $display("FAIL: mechanism %s never happened", ev_name[i]);
      end else $display("mechanism %-12s x %0d", ev_name[i], n_ev[i]);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d reads unanswered", exp_q.size()); end
    $display("DRAM data chunks read %0d written %0d, metadata lines read %0d written %0d",
             u_dram.data_rd_chunks, u_dram.data_wr_chunks, u_dram.md_rd_lines, u_dram.md_wr_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
