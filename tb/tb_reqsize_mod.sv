// tb_reqsize_mod: exhaustive check of the request size modifier over all
// metadata entries, hit/miss and bypass: bypass or miss -> 8 chunks; hit on a
// compressed entry -> nm1+1; hit on a raw entry -> 8, 6, 5 or 4 chunks for
// truncation codes 0..3. md_known is high for bypass or hit.
module tb_reqsize_mod;
  import mc_comp_pkg::*;

  logic       bypass, md_hit, md_known;
  md_entry_t  md_entry;
  logic [3:0] nchunks;

  reqsize_mod dut (.*);

  int checks = 0, failures = 0;
  int raw [4] = '{8, 6, 5, 4};

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int want;
      md_entry = md_entry_t'(v[7:0]);
      md_hit   = v[8];
      bypass   = v[9];
      #1;
      if (bypass || !md_hit) want = 8;
      else if (v[3]) want = int'(v[2:0]) + 1;
      else want = raw[v[5:4]];
      checks += 2;
      if (int'(nchunks) != want) begin failures++; $display("FAIL: v=%h nchunks %0d want %0d", v, nchunks, want); end
      if (md_known != (bypass || md_hit)) begin failures++; $display("FAIL: v=%h md_known", v); end
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
