// tb_rr_arbiter: random requests with and without priority flags. A
// reference model predicts the grant: the first requester after the last
// granted one, taken from the priority requesters if there are any.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 5;
  logic [N-1:0] req, prio, grant;
  logic advance, valid;
  int last = 0, prio_wins = 0;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] eff, exp_g;
    req = 0; prio = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = N'($urandom); prio = N'($urandom) & N'($urandom); advance = $urandom % 4 != 0;
      #1;
      eff = ((req & prio) != 0) ? (req & prio) : req;
      exp_g = 0;
      for (int k = 1; k <= N; k++)
        if (exp_g == 0 && eff[(last + k) % N]) exp_g[(last + k) % N] = 1;
      checks++;
      if (grant != exp_g || valid != (req != 0)) begin
        failures++; $display("c=%0d req=%b prio=%b grant=%b exp=%b", c, req, prio, grant, exp_g);
      end
      if ((req & prio) != 0 && (req & ~prio) != 0) prio_wins++;
      if (advance && exp_g != 0)
        for (int i = 0; i < N; i++) if (exp_g[i]) last = i;
    end
    checks++;
    if (prio_wins == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
