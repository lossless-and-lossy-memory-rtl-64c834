// tb_dram_req_arb: random check of the DRAM request arbiter. With any mix of
// requesters the winner must be metadata write-back, then metadata read, then
// the data queue; only the winner sees ready, and only when the DRAM is ready;
// metadata addresses must be MD_BASE + 128 * line.
module tb_dram_req_arb;
  import mc_comp_pkg::*;

  logic        wb_valid, wb_ready, md_valid, md_ready, rw_valid, rw_ready;
  logic        dram_valid, dram_ready;
  logic [17:0] wb_line, md_line;
  logic [3:0]  md_tag;
  blk_t        wb_data;
  dram_req_t   rw_req, dram_req;

  dram_req_arb #(.MD_BASE(32'hFE00_0000)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] r;
      r = $urandom;
      wb_valid = r[0]; md_valid = r[1]; rw_valid = r[2]; dram_ready = r[3];
      wb_line = 18'($urandom); md_line = 18'($urandom); md_tag = 4'($urandom);
      wb_data = {32{$urandom}};
      rw_req = '0; rw_req.kind = r[4] ? DK_WR : DK_RD; rw_req.addr = $urandom;
      rw_req.nchunks = 4'(r[7:5]) + 4'd1;
      #1;
      checks += 3;
      if (dram_valid != (wb_valid || md_valid || rw_valid)) begin failures++; $display("FAIL: valid"); end
      if (wb_valid) begin
        if (dram_req.kind != DK_MD_WR || dram_req.addr != 32'hFE00_0000 + {7'd0, wb_line, 7'd0} ||
            dram_req.data != wb_data || wb_ready != dram_ready || md_ready || rw_ready) begin
          failures++; $display("FAIL: write-back selection");
        end
      end else if (md_valid) begin
        if (dram_req.kind != DK_MD_RD || dram_req.addr != 32'hFE00_0000 + {7'd0, md_line, 7'd0} ||
            dram_req.tag != md_tag || md_ready != dram_ready || wb_ready || rw_ready) begin
          failures++; $display("FAIL: metadata read selection");
        end
      end else if (rw_valid) begin
        if (dram_req != rw_req || rw_ready != dram_ready || wb_ready || md_ready) begin
          failures++; $display("FAIL: data selection");
        end
      end
      if (dram_valid && dram_req.nchunks == 4'd0) begin failures++; $display("FAIL: zero chunks"); end
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
