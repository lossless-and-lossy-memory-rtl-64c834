// tb_md_mshr: random metadata misses, issues and responses against a model of
// the MSHR table (10 entries). Checks merging of a line already in flight,
// refusal only when the line is new and the table is full, that each line is
// issued exactly once, lowest entry first, that a response returns the
// entry's line, and the pend_hit query and occupancy.
module tb_md_mshr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        q_valid, q_ready, q_merged, md_rd_valid, md_rd_ready, resp_valid, pend_hit;
  logic [17:0] q_line, md_rd_line, fill_line, pend_line;
  logic [3:0]  md_rd_tag, resp_tag;
  logic [3:0]  used;

  md_mshr #(.ENTRIES(10), .LADDR_W(18), .TAG_W(4)) dut (.*);

  logic        m_v [10], m_iss [10];
  logic [17:0] m_l [10];
  int checks = 0, failures = 0, n_merge = 0, n_full = 0, n_issue = 0;

  initial begin
    q_valid = 0; q_line = '0; md_rd_ready = 0; resp_valid = 0; resp_tag = '0; pend_line = '0;
    foreach (m_v[i]) begin m_v[i] = 0; m_iss[i] = 0; m_l[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int match, fr, iss, nused, sent[$];
      @(negedge clk);
      q_valid     = ($urandom % 2) == 0;
      q_line      = 18'($urandom % 16);
      pend_line   = 18'($urandom % 16);
      md_rd_ready = ($urandom % 3) == 0;
      sent = {};
      for (int i = 0; i < 10; i++) if (m_v[i] && m_iss[i]) sent.push_back(i);
      resp_valid  = sent.size() > 0 && ($urandom % 4) == 0;
      resp_tag    = resp_valid ? 4'(sent[$urandom % sent.size()]) : '0;
      #1;
      match = 0; fr = -1; iss = -1; nused = 0;
      for (int i = 9; i >= 0; i--) begin
        if (m_v[i] && m_l[i] == q_line) match = 1;
        if (!m_v[i]) fr = i;
        if (m_v[i] && !m_iss[i]) iss = i;
      end
      for (int i = 0; i < 10; i++) nused += int'(m_v[i]);
      checks += 5;
      if (q_ready != (match || fr >= 0)) begin failures++; $display("FAIL: q_ready"); end
      if (q_merged != (q_valid && match)) begin failures++; $display("FAIL: q_merged"); end
      if (md_rd_valid != (iss >= 0) || (iss >= 0 && (md_rd_tag != 4'(iss) || md_rd_line != m_l[iss]))) begin
        failures++; $display("FAIL: issue");
      end
      if (int'(used) != nused) begin failures++; $display("FAIL: used %0d want %0d", used, nused); end
      begin
        int ph;
        ph = 0;
        for (int i = 0; i < 10; i++) if (m_v[i] && m_l[i] == pend_line) ph = 1;
        if (pend_hit != ph[0]) begin failures++; $display("FAIL: pend_hit"); end
      end
      if (resp_valid) begin
        checks++;
        if (fill_line != m_l[resp_tag]) begin failures++; $display("FAIL: fill_line"); end
      end
      if (q_valid && match) n_merge++;
      if (q_valid && !match && fr < 0) n_full++;
      // model update
      if (md_rd_valid && md_rd_ready && iss >= 0) begin m_iss[iss] = 1; n_issue++; end
      if (resp_valid) begin m_v[resp_tag] = 0; m_iss[resp_tag] = 0; end
      if (q_valid && !match && fr >= 0) begin m_v[fr] = 1; m_iss[fr] = 0; m_l[fr] = q_line; end
      @(posedge clk);
    end
    checks++;
    if (n_merge == 0 || n_full == 0 || n_issue == 0) begin
      failures++; $display("FAIL: merge %0d full %0d issue %0d", n_merge, n_full, n_issue);
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
