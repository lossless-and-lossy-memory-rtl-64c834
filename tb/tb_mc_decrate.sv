// tb_mc_decrate: decompressor throughput sweep on mc_comp.
//
// Four controllers run side by side, identical except for the decompressor
// rate: 4, 8, 16 (the default) and 32 bytes per cycle. Each gets the same
// workload: 128 blocks (16 KB) of a smooth single-precision field are copied
// in losslessly, then read back as a stream of global reads issued as fast as
// the controller takes them, so the decompressor's throughput limits the
// read bandwidth when it is slower than the DRAM link. Each controller has
// its own DRAM model (12-cycle latency, one 16-byte chunk per 4 cycles).
// Reported per rate: cycles to read the whole region and link chunks read.
// Checked:
//  * every read returns the written block, in request order, at every rate;
//  * link traffic is the same at every rate (the rate changes time only);
//  * the read time does not grow with the rate, and 4 bytes per cycle is
//    slower than 16 bytes per cycle (at 4 bytes per cycle decoding a
//    compressed block takes longer than its chunks take to arrive).
module tb_mc_decrate;
  import mc_comp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 128;
  localparam int RATE [4] = '{4, 8, 16, 32};

  int checks = 0, failures = 0;
  int rd_cycles [4], rd_chunks [4];
  logic fin [4];

  // IEEE single precision from real (normal numbers, mantissa truncated)
  function automatic logic [31:0] to_f32(real v);
    logic [63:0] d;
    d = $realtobits(v);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic blk_t field_blk(int b);
    blk_t d;
    for (int i = 0; i < 32; i++)
      d[i*32 +: 32] = to_f32(320.0 + 6.0 * $sin(0.013 * (b * 32 + i)) + 0.5 * $cos(0.21 * (b * 32 + i)));
    return d;
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_rate
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
    int          n_resp;

    mc_comp #(.DEC_BYTES_PER_CYCLE(RATE[g])) dut (.*);

    gddr_model #(.LAT(12), .BEAT(4)) u_dram (
      .clk, .rst_n, .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
      .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_chunk(dram_rd_chunk),
      .md_valid(md_resp_valid), .md_ready(md_resp_ready), .md_tag(md_resp_tag), .md_line(md_resp_line)
    );

    assign resp_ready = 1'b1;

    // responses: in order, each equal to the block written
    always @(posedge clk) if (rst_n && resp_valid) begin
      checks++;
      if (resp_id != 8'(n_resp) || resp_data !== field_blk(n_resp)) begin
        failures++;
        $display("FAIL: rate %0d read %0d returned id %0d with wrong data", RATE[g], n_resp, resp_id);
      end
      n_resp++;
    end

    initial begin
      int t0, c0;
      fin[g] = 1'b0;
      n_resp = 0;
      req_valid = 1'b0; req_write = 1'b0; req_space = SP_GLOBAL; req_addr = '0;
      req_mask = '1; req_data = '0; req_trunc = '0; req_id = '0;
      repeat (3) @(posedge clk);
      @(posedge clk);
      // copy-in
      for (int b = 0; b < NB; b++) begin
        req_valid <= 1'b1; req_write <= 1'b1; req_addr <= 32'(b) * 32'h80;
        req_data <= field_blk(b); req_id <= 8'(b);
        @(posedge clk);
        while (!req_ready) @(posedge clk);
      end
      req_valid <= 1'b0;
      repeat (100) @(posedge clk);
      // streamed read-back
      t0 = 0;
      c0 = u_dram.data_rd_chunks;
      n_resp = 0;
      for (int b = 0; b < NB; b++) begin
        req_valid <= 1'b1; req_write <= 1'b0; req_addr <= 32'(b) * 32'h80; req_id <= 8'(b);
        @(posedge clk); t0++;
        while (!req_ready) begin @(posedge clk); t0++; end
      end
      req_valid <= 1'b0;
      while (n_resp < NB) begin @(posedge clk); t0++; end
      rd_cycles[g] = t0;
      rd_chunks[g] = u_dram.data_rd_chunks - c0;
      fin[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int g = 0; g < 4; g++)
      $display("decompressor %0d bytes/cycle: %0d blocks read in %0d cycles (%.1f per block), %0d link chunks",
               RATE[g], NB, rd_cycles[g], real'(rd_cycles[g]) / NB, rd_chunks[g]);
    for (int g = 1; g < 4; g++) begin
      checks += 2;
      if (rd_chunks[g] != rd_chunks[0]) begin
        failures++; $display("FAIL: link traffic differs at %0d bytes/cycle", RATE[g]);
      end
      if (rd_cycles[g] > rd_cycles[g-1]) begin
        failures++; $display("FAIL: reads slower at %0d than at %0d bytes/cycle", RATE[g], RATE[g-1]);
      end
    end
    checks++;
    if (rd_cycles[0] <= rd_cycles[2]) begin
      failures++; $display("FAIL: 4 bytes/cycle not slower than 16 bytes/cycle");
    end
    checks++;
    if (rd_chunks[0] >= 8 * NB) begin failures++; $display("FAIL: field not compressed"); end
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
