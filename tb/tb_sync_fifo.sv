// tb_sync_fifo: pushes a random stream through the FIFO with random
// back-pressure on both sides and compares the output order and the count
// against a queue kept by the testbench.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [3:0] count;
  logic [15:0] q[$];
  int full_seen = 0;

  sync_fifo #(.W(16), .DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = 16'($urandom);
      out_ready = ($urandom % (c < 1500 ? 4 : 2)) == 0;
      #1;
      checks++;
      if (out_valid != (q.size() != 0) || in_ready != (q.size() != 8) || count != 4'(q.size())) begin
        failures++;
        $display("status mismatch size=%0d count=%0d", q.size(), count);
      end
      if (!in_ready) full_seen++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("data mismatch"); end
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
