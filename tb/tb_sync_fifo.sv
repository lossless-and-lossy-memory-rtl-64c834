// tb_sync_fifo: random push/pop traffic against a queue model; checks order,
// data, the count, full (no in_ready at DEPTH) and empty (no out_valid at 0).
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 5;
  logic        in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0]  count;

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model [$];

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0 ^ (t > 1500 && t < 1700);
      out_ready = ($urandom % 3) == 0 || (t > 1500 && t < 1700);
      in_data   = 16'($urandom);
      #1;
      checks += 3;
      if (int'(count) != model.size()) begin failures++; $display("FAIL: count %0d want %0d", count, model.size()); end
      if (in_ready != (model.size() < DEPTH)) begin failures++; $display("FAIL: in_ready"); end
      if (out_valid != (model.size() > 0)) begin failures++; $display("FAIL: out_valid"); end
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("FAIL: data %h want %h", out_data, model[0]); end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
