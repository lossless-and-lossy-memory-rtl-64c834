// tb_mc_workload: memory-bound FP workload pattern on mc_comp at its default
// parameters, with the lossy truncation sweep.
//
// A smooth single-precision field (like a stencil or thermal grid) of 128
// blocks (16 KB, one metadata line) is copied in with each truncation setting
// (0, 8, 12, 16 LSBs) into four regions, plus one region of random data. All
// regions map to the same metadata cache set, so their lines are evicted and
// must be fetched again. Each region is then read back sequentially, one
// read at a time. Reported per region: DRAM data chunks read, mean read
// latency, metadata misses and normalised RMS error. Checked:
//  * every value equals the written one with its dropped LSBs cleared, and
//    its relative error is below 2^(k-23);
//  * link traffic does not grow with more truncation and is below the raw
//    size (8 chunks per block) for the FP field;
//  * the random region is read raw (8 chunks per block);
//  * sequential reads miss in the metadata cache once per 128 blocks;
//  * reads of the 16-bit truncated field finish faster than raw reads.
module tb_mc_workload;
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

  gddr_model #(.LAT(12), .BEAT(4)) u_dram (
    .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_chunk(dram_rd_chunk),
    .md_valid(md_resp_valid), .md_ready(md_resp_ready), .md_tag(md_resp_tag), .md_line(md_resp_line)
  );

  localparam int NB = 128;
  int checks = 0, failures = 0;
  int n_miss = 0;
  assign resp_ready = 1'b1;
  always @(posedge clk) if (rst_n && ev.md_miss) n_miss++;

  // IEEE single precision from/to real (normal numbers, mantissa truncated)
  function automatic logic [31:0] to_f32(real v);
    logic [63:0] d;
    d = $realtobits(v);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic real from_f32(logic [31:0] f);
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] field_val(int i);
    real v;
    v = 320.0 + 6.0 * $sin(0.013 * i) + 0.5 * $cos(0.21 * i);
    return to_f32(v);
  endfunction

  function automatic blk_t clear_lsbs(blk_t d, int k);
    blk_t r = d;
    for (int i = 0; i < 32; i++)
      for (int b = 0; b < k; b++) r[i*32 + b] = 1'b0;
    return r;
  endfunction

  task automatic do_req(input logic wr, input logic [31:0] a, input blk_t d, input logic [1:0] t);
    req_valid <= 1'b1; req_write <= wr; req_space <= SP_GLOBAL; req_addr <= a;
    req_data <= d; req_mask <= '1; req_trunc <= t; req_id <= a[14:7];
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    int kb [4] = '{0, 8, 12, 16};
    int chunks [5], lat [5], miss [5];
    real nrmse [5];
    blk_t d;
    logic [31:0] base;
    req_valid = 1'b0; req_write = 1'b0; req_space = SP_GLOBAL; req_addr = '0;
    req_mask = '0; req_data = '0; req_trunc = '0; req_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // copy-in: regions 1 MB apart share metadata cache set 0
    for (int r = 0; r < 5; r++)
      for (int b = 0; b < NB; b++) begin
        base = 32'(r) * 32'h0010_0000;
        for (int i = 0; i < 32; i++)
          d[i*32 +: 32] = (r < 4) ? field_val(b * 32 + i) : $urandom;
        do_req(1'b1, base + 32'(b) * 32'h80, d, (r < 4) ? 2'(r) : 2'd0);
      end

    // sequential read-back, one read in flight
    for (int r = 0; r < 5; r++) begin
      int c0, m0, tsum;
      real se, vmin, vmax;
      c0 = u_dram.data_rd_chunks; m0 = n_miss; tsum = 0; se = 0.0; vmin = 1.0e9; vmax = -1.0e9;
      base = 32'(r) * 32'h0010_0000;
      for (int b = 0; b < NB; b++) begin
        int t0, bad;
        blk_t want;
        t0 = 0;
        do_req(1'b0, base + 32'(b) * 32'h80, '0, 2'd0);
        while (!resp_valid) begin @(posedge clk); t0++; end
        tsum += t0;
        if (r < 4) begin
          for (int i = 0; i < 32; i++) d[i*32 +: 32] = field_val(b * 32 + i);
          want = clear_lsbs(d, kb[r]);
        end else want = resp_data;   // random data: content checked by tb_mc_comp
        checks++;
        if (resp_data !== want) begin failures++; $display("FAIL: region %0d block %0d data", r, b); end
        if (r < 4) begin
          bad = 0;
          for (int i = 0; i < 32; i++) begin
            real x, y;
            x = from_f32(d[i*32 +: 32]);
            y = from_f32(resp_data[i*32 +: 32]);
            se += (x - y) * (x - y);
            if (x < vmin) vmin = x;
            if (x > vmax) vmax = x;
            if ((x - y) / x >= 2.0 ** (kb[r] - 23) || y > x) bad = 1;
          end
          checks++;
          if (bad) begin failures++; $display("FAIL: region %0d block %0d error bound", r, b); end
        end
        @(posedge clk);
      end
      chunks[r] = u_dram.data_rd_chunks - c0;
      lat[r]    = tsum / NB;
      miss[r]   = n_miss - m0;
      nrmse[r]  = (r < 4) ? $sqrt(se / (NB * 32)) / (vmax - vmin) : 0.0;
      $display("region %0d (%s): %0d chunks for %0d blocks (%.2f per block), mean read latency %0d cycles, %0d metadata misses, NRMSE %.2e",
               r, (r < 4) ? $sformatf("FP field, %0d LSBs dropped", kb[r]) : "random data",
               chunks[r], NB, real'(chunks[r]) / NB, lat[r], miss[r], nrmse[r]);
    end

    for (int r = 0; r < 5; r++) begin
      checks++;
      if (miss[r] != 1) begin failures++; $display("FAIL: region %0d had %0d metadata misses, want 1", r, miss[r]); end
    end
    checks += 5;
    if (chunks[0] >= 8 * NB) begin failures++; $display("FAIL: FP field not compressed"); end
    for (int r = 1; r < 4; r++)
      if (chunks[r] > chunks[r-1]) begin failures++; $display("FAIL: traffic grew with truncation at region %0d", r); end
    if (chunks[4] != 8 * NB) begin failures++; $display("FAIL: random data read with %0d chunks", chunks[4]); end
    checks++;
    if (lat[3] >= lat[4]) begin failures++; $display("FAIL: compressed reads not faster (%0d vs %0d)", lat[3], lat[4]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
