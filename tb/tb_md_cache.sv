// tb_md_cache: random fills, entry updates and lookups of a small md_cache
// (8 lines, 4 sets) against a model of a 2-way LRU write-back cache.
// Checks hit/miss and entries on both lookup ports, and on every fill the
// choice of victim and whether it is written back (line address and data).
module tb_md_cache;
  import mc_comp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int LADDR_W = 6;
  logic [LADDR_W-1:0] a_line, b_line, u_line, f_line, ev_line;
  logic [6:0]  a_slot, b_slot, u_slot;
  logic        a_touch, a_hit, b_hit, u_valid, f_valid, ev_valid;
  md_entry_t   a_entry, b_entry, u_entry;
  blk_t        f_data, ev_data;

  md_cache #(.LINES(8), .LINE_BITS(1024), .LADDR_W(LADDR_W)) dut (.*);

  // model
  logic [3:0] m_tag [4][2];
  logic       m_val [4][2], m_dirty [4][2], m_lru [4];
  blk_t       m_data [4][2];

  int checks = 0, failures = 0, n_ev = 0, n_hit = 0;

  function automatic int m_way(logic [LADDR_W-1:0] l);
    for (int w = 0; w < 2; w++) if (m_val[l[1:0]][w] && m_tag[l[1:0]][w] == l[5:2]) return w;
    return -1;
  endfunction

  initial begin
    a_line = '0; b_line = '0; u_line = '0; f_line = '0; a_slot = '0; b_slot = '0; u_slot = '0;
    a_touch = 0; u_valid = 0; f_valid = 0; u_entry = '0; f_data = '0;
    for (int s = 0; s < 4; s++) begin
      m_lru[s] = 0;
      for (int w = 0; w < 2; w++) begin m_val[s][w] = 0; m_dirty[s][w] = 0; m_tag[s][w] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int op, wa, wb;
      @(negedge clk);
      a_touch = 0; u_valid = 0; f_valid = 0;
      a_line = LADDR_W'($urandom % 12); a_slot = 7'($urandom);
      b_line = LADDR_W'($urandom % 12); b_slot = 7'($urandom);
      op = $urandom % 3;
      #1;
      // lookups
      wa = m_way(a_line); wb = m_way(b_line);
      checks += 2;
      if (a_hit != (wa >= 0) || (wa >= 0 && a_entry != md_entry_t'(m_data[a_line[1:0]][wa][a_slot*8 +: 8]))) begin
        failures++; $display("FAIL: port A line %0d", a_line);
      end
      if (b_hit != (wb >= 0) || (wb >= 0 && b_entry != md_entry_t'(m_data[b_line[1:0]][wb][b_slot*8 +: 8]))) begin
        failures++; $display("FAIL: port B line %0d", b_line);
      end
      if (wa >= 0) n_hit++;
      if (op == 0 && wa >= 0) begin
        a_touch = 1;
        m_lru[a_line[1:0]] = ~1'(wa);
      end else if (op == 1 && wa >= 0) begin
        u_valid = 1; u_line = a_line; u_slot = a_slot; u_entry = md_entry_t'($urandom);
        m_data[a_line[1:0]][wa][a_slot*8 +: 8] = u_entry;
        m_dirty[a_line[1:0]][wa] = 1;
        m_lru[a_line[1:0]] = ~1'(wa);
      end else if (wa < 0) begin
        int s, v;
        f_valid = 1; f_line = a_line; f_data = {32{$urandom}};
        s = a_line[1:0];
        v = !m_val[s][0] ? 0 : (!m_val[s][1] ? 1 : int'(m_lru[s]));
        #1;
        checks++;
        if (ev_valid != (m_val[s][v] && m_dirty[s][v])) begin
          failures++; $display("FAIL: write-back flag on fill of line %0d", a_line);
        end else if (ev_valid) begin
          n_ev++;
          checks++;
          if (ev_line != {m_tag[s][v], 2'(s)} || ev_data != m_data[s][v]) begin
            failures++; $display("FAIL: victim line/data");
          end
        end
        m_val[s][v] = 1; m_dirty[s][v] = 0; m_tag[s][v] = a_line[5:2]; m_data[s][v] = f_data;
        m_lru[s] = ~1'(v);
      end
      @(posedge clk);
    end
    checks++;
    if (n_ev == 0 || n_hit == 0) begin failures++; $display("FAIL: no write-back or no hit exercised"); end
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
