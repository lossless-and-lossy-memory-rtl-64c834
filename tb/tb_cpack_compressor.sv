// tb_cpack_compressor: checks cpack_compressor against the reference coder.
// Blocks of 16, 20, 24 and 32 words of six data classes are compressed; the
// code string and its length must equal the reference, and done must come
// nwords/2 + 3 cycles after start (two words per cycle, 3-stage pipeline).
module tb_cpack_compressor;
  import mc_comp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, busy, done;
  blk_t       words;
  logic [5:0] nwords;
  logic [CBUF_BITS-1:0] out_bits;
  logic [10:0] out_len;

  cpack_compressor dut (.*);

  int checks = 0, failures = 0;

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
    int        rl, cyc;
    int        nw [4] = '{16, 20, 24, 32};
    start = 0; words = '0; nwords = 6'd32;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 120; t++) begin
      gen_words(t % 6, w);
      for (int i = 0; i < 32; i++) words[i*32 +: 32] = w[i];
      nwords = 6'(nw[(t / 6) % 4]);
      encode(w, int'(nwords), rb, rl);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      #1;
      while (!done && cyc < 100) begin @(posedge clk); #1; cyc++; end
      checks += 3;
      if (out_len != 11'(rl)) begin
        failures++; $display("FAIL: block %0d length %0d want %0d", t, out_len, rl);
      end
      if (out_bits != CBUF_BITS'(rb)) begin
        failures++; $display("FAIL: block %0d code bits differ", t);
      end
      if (cyc != int'(nwords) / 2 + 2) begin
        failures++; $display("FAIL: block %0d done %0d cycles after start, want %0d", t, cyc, nwords / 2 + 2);
      end
      @(posedge clk);
    end
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
