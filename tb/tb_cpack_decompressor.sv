// tb_cpack_decompressor: checks cpack_decompressor on code strings made by
// the reference coder, at all four rates side by side (4, 8, 16 and 32
// bytes, i.e. G = 1, 2, 4 and 8 words, per cycle; the same inputs go to each).
// Pass 1 loads the compressed chunks one per cycle before start; each block
// is compared word by word with the original and done must rise
// ceil(nwords/G) clock edges after the edge that samples start (8 for a full
// block at the default 16 bytes per cycle). Pass 2 gives start first and then
// feeds the chunks with 0 to 4 idle cycles between them, as DRAM bursts would
// arrive; the block must again decode exactly, done must come after the last
// chunk and at most ceil(nwords/G) edges after it, and at the default rate
// decoding must overlap the arrival on some blocks (done sooner than
// nwords/4 edges after the last chunk).
module tb_cpack_decompressor;
  import mc_comp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_we, start;
  logic       busy [4], done [4];
  logic [2:0] in_idx;
  chunk_t     in_chunk;
  logic [5:0] nwords;
  logic [3:0] nchunks;
  blk_t       out_words [4];
  localparam int RATE [4] = '{4, 8, 16, 32};

  for (genvar g = 0; g < 4; g++) begin : g_dut
    cpack_decompressor #(.BYTES_PER_CYCLE(RATE[g])) dut (
      .clk, .rst_n, .in_we, .in_idx, .in_chunk, .start, .nwords, .nchunks,
      .busy(busy[g]), .done(done[g]), .out_words(out_words[g]));
  end

  function automatic int want_cyc(int nw, int g);
    return (nw + RATE[g] / 4 - 1) / (RATE[g] / 4);
  endfunction

  int checks = 0, failures = 0;
  int ecnt = 0;
  always @(posedge clk) ecnt <= ecnt + 1;

  // ---- reference coder, written independently of the RTL: a 16-entry FIFO
  // dictionary, LSB-first codes as documented in mc_comp_pkg
  typedef bit [1087:0] cbits_t;

  function automatic void put(ref cbits_t b, ref int pos, input longint unsigned v, input int n);
    for (int i = 0; i < n; i++) b[pos + i] = v[i];
    pos += n;
  endfunction

  function automatic void encode(input bit [31:0] w [32], input int n,
                                 output cbits_t bits, output int len);
    bit [31:0] d [16];
    bit        dv [16];
    int        wp = 0;
    bits = '0; len = 0;
    foreach (dv[i]) dv[i] = 0;
    for (int k = 0; k < n; k++) begin
      int fm = -1, m24 = -1, m16 = -1;
      for (int i = 0; i < 16; i++) if (dv[i]) begin
        if (fm  < 0 && d[i] == w[k]) fm = i;
        if (m24 < 0 && d[i][31:8] == w[k][31:8]) m24 = i;
        if (m16 < 0 && d[i][31:16] == w[k][31:16]) m16 = i;
      end
      if (w[k] == 0) put(bits, len, 0, 2);
      else if (fm >= 0) begin put(bits, len, 2, 2); put(bits, len, fm, 4); end
      else if (w[k][31:8] == 0) begin put(bits, len, 3, 2); put(bits, len, 1, 2); put(bits, len, w[k][7:0], 8); end
      else begin
        if (m24 >= 0) begin put(bits, len, 3, 2); put(bits, len, 2, 2); put(bits, len, m24, 4); put(bits, len, w[k][7:0], 8); end
        else if (m16 >= 0) begin put(bits, len, 3, 2); put(bits, len, 0, 2); put(bits, len, m16, 4); put(bits, len, w[k][15:0], 16); end
        else begin put(bits, len, 1, 2); put(bits, len, w[k], 32); end
        d[wp] = w[k]; dv[wp] = 1; wp = (wp + 1) % 16;
      end
    end
  endfunction

  function automatic void gen_words(input int kind, output bit [31:0] w [32]);
    for (int i = 0; i < 32; i++) begin
      bit [31:0] r = $urandom;
      case (kind)
        0: w[i] = 0;
        1: w[i] = r % 256;
        2: w[i] = {16'h3F80, r[7:0] % 4, r[15:8]};
        3: w[i] = (i % 4 == 0) ? r : w[i - (i % 4)];
        4: w[i] = (r[1:0] == 0) ? 0 : r;
        default: w[i] = r;
      endcase
    end
  endfunction


  initial begin
    bit [31:0] w [32];
    cbits_t    rb;
    int        rl, cyc, nch, ok;
    int        nw [4] = '{16, 20, 24, 32};
    int        last, overlap;
    int        dc [4];
    in_we = 0; in_idx = '0; in_chunk = '0; start = 0; nwords = 6'd32; nchunks = 4'd8;
    overlap = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 120; t++) begin
      gen_words(t % 5, w);      // classes that fit in 8 chunks
      nwords = 6'(nw[(t / 5) % 4]);
      encode(w, int'(nwords), rb, rl);
      nch = (rl + 127) / 128;
      if (nch > 8) continue;
      nchunks = 4'(nch);
      for (int k = 0; k < nch; k++) begin
        in_we <= 1'b1; in_idx <= 3'(k); in_chunk <= rb[k*128 +: 128];
        @(posedge clk);
      end
      in_we <= 1'b0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      foreach (dc[g]) dc[g] = -1;
      #1;
      while (cyc < 40 && (dc[0] < 0 || dc[1] < 0 || dc[2] < 0 || dc[3] < 0)) begin
        @(posedge clk); #1; cyc++;
        foreach (dc[g]) if (done[g] && dc[g] < 0) dc[g] = cyc;
      end
      for (int g = 0; g < 4; g++) begin
        ok = 1;
        for (int i = 0; i < int'(nwords); i++) if (out_words[g][i*32 +: 32] != w[i]) ok = 0;
        checks += 2;
        if (!ok) begin failures++; $display("FAIL: rate %0d block %0d decoded wrongly", RATE[g], t); end
        if (dc[g] != want_cyc(int'(nwords), g)) begin
          failures++;
          $display("FAIL: rate %0d block %0d done %0d cycles after start, want %0d",
                   RATE[g], t, dc[g], want_cyc(int'(nwords), g));
        end
      end
    end
    // pass 2: chunks streamed in after start
    for (int t = 0; t < 200; t++) begin
      gen_words(t % 5, w);
      nwords = 6'(nw[(t / 5) % 4]);
      encode(w, int'(nwords), rb, rl);
      nch = (rl + 127) / 128;
      if (nch > 8) continue;
      nchunks = 4'(nch);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      fork
        begin
          for (int k = 0; k < nch; k++) begin
            if ((t + k) % 5 != 0) begin
              in_we <= 1'b0;
              repeat ((t + k) % 5) @(posedge clk);
            end
            in_we <= 1'b1; in_idx <= 3'(k); in_chunk <= rb[k*128 +: 128];
            @(posedge clk);
            #1;
            last = ecnt;
          end
          in_we <= 1'b0;
        end
        begin
          #1;
          cyc = 0;
          foreach (dc[g]) dc[g] = -1;
          while (cyc < 100 && (dc[0] < 0 || dc[1] < 0 || dc[2] < 0 || dc[3] < 0)) begin
            @(posedge clk); #1; cyc++;
            foreach (dc[g]) if (done[g] && dc[g] < 0) dc[g] = ecnt;
          end
        end
      join
      for (int g = 0; g < 4; g++) begin
        ok = 1;
        for (int i = 0; i < int'(nwords); i++) if (out_words[g][i*32 +: 32] != w[i]) ok = 0;
        checks += 2;
        if (!ok) begin failures++; $display("FAIL: rate %0d streamed block %0d decoded wrongly", RATE[g], t); end
        if (dc[g] <= last || dc[g] - last > want_cyc(int'(nwords), g)) begin
          failures++;
          $display("FAIL: rate %0d streamed block %0d done %0d edges after last chunk, want 1..%0d",
                   RATE[g], t, dc[g] - last, want_cyc(int'(nwords), g));
        end
      end
      if (dc[2] - last < int'(nwords) / 4) overlap++;
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL: decoding never overlapped chunk arrival"); end
    $display("overlapped blocks: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
