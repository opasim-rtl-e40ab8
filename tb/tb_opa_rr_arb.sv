// tb_opa_rr_arb: random test of the round-robin arbiter (5 requesters).
//
// A reference keeps its own "last served" pointer and computes the expected
// grant: the first requester after the pointer, wrapping around. Random
// request patterns and random `adv` run for 3000 cycles. The test also checks
// fairness: with all requesters active and adv high, each is served once in
// every 5 cycles.
module tb_opa_rr_arb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  logic adv = 0, any;
  logic [2:0] gnt_idx;

  opa_rr_arb #(.N(N)) dut (.clk, .rst_n, .req, .adv, .gnt, .gnt_idx, .any);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int last = N - 1;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int exp_i;
      @(negedge clk);
      req = (c >= 2000 && c < 2100) ? '1 : N'($urandom);
      adv = (c >= 2000 && c < 2100) ? 1'b1 : 1'($urandom);
      #1;
      exp_i = -1;
      for (int k = 1; k <= N; k++)
        if (exp_i < 0 && req[(last + k) % N]) exp_i = (last + k) % N;
      check(any == (exp_i >= 0), "any");
      if (exp_i >= 0) begin
        check(gnt == N'(1) << exp_i, "one-hot grant");
        check(int'(gnt_idx) == exp_i, "grant index");
        if (c >= 2000 && c < 2100) check(exp_i == (last + 1) % N, "fair rotation under full load");
        if (adv) last = exp_i;
      end else check(gnt == '0, "no grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
