// tb_fp_trunc: checks fp_trunc_pack and fp_trunc_unpack.
// For each truncation code and random blocks: the packed word count must be
// 32, 24, 20 or 16; for k > 0 the upper 16 bits of value i must sit at bit
// 16i and its remaining 16-k kept bits at bit 512 + i*(16-k); the bits above
// the packed data must be zero; unpacking must give back every
// word with its k LSBs cleared.
module tb_fp_trunc;
  import mc_comp_pkg::*;

  blk_t       in_words, packed_w, unpacked;
  logic [1:0] trunc;
  logic [5:0] nwords;

  fp_trunc_pack   u_pack   (.in_words, .trunc, .out_words(packed_w), .nwords);
  fp_trunc_unpack u_unpack (.in_words(packed_w), .trunc, .out_words(unpacked));

  int checks = 0, failures = 0;
  int kb [4] = '{0, 8, 12, 16};

  initial begin
    for (int t = 0; t < 200; t++) begin
      int k, f, bad;
      for (int i = 0; i < 32; i++) in_words[i*32 +: 32] = $urandom;
      trunc = 2'(t % 4);
      k = kb[t % 4];
      f = 32 - k;
      #1;
      checks += 4;
      if (int'(nwords) != 32 - k) begin failures++; $display("FAIL: nwords %0d for k=%0d", nwords, k); end
      bad = 0;
      for (int i = 0; i < 32; i++)
        for (int b = 0; b < f; b++) begin
          // k = 0: identity; else upper halves first, then the low parts
          int pos;
          pos = (k == 0) ? i*32 + b : (b >= f - 16 ? i*16 + (b - (f - 16)) : 512 + i*(16 - k) + b);
          if (packed_w[pos] !== in_words[i*32 + k + b]) bad = 1;
        end
      if (bad) begin failures++; $display("FAIL: packing k=%0d", k); end
      bad = 0;
      for (int b = 32 * f; b < 1024; b++) if (packed_w[b] !== 1'b0) bad = 1;
      if (bad) begin failures++; $display("FAIL: packed tail not zero k=%0d", k); end
      bad = 0;
      for (int i = 0; i < 32; i++)
        for (int b = 0; b < 32; b++)
          if (unpacked[i*32 + b] !== ((b < k) ? 1'b0 : in_words[i*32 + b])) bad = 1;
      if (bad) begin failures++; $display("FAIL: unpacking k=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
