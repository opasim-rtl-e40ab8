// tb_opa_credit_mirror: random test of the sender-side credit view.
//
// A reference downstream buffer (4 VLs, 8 cells of 4 flits, 2 reserved and 5
// maximum cells per VL, 8-flit packets) takes the flits the sender emits. It
// frees a cell after all 4 of its flits have been consumed, and returns the
// credit. The sender starts a packet only when `admit` allows it, and the
// test checks `admit` against the admission rule worked out from the
// reference occupancy. The reference also checks that it never overflows.
module tb_opa_credit_mirror;
  import opa_pkg::*;
  localparam int NV = 4, QS = 32, FPC = 4, EX = 2, MX = 5, PK = 8, CELLS = QS / FPC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic send_valid = 0, credit_valid = 0;
  logic [VL_W-1:0] send_vl = 0, credit_vl = 0;
  logic [NV-1:0] admit;

  opa_credit_mirror #(.NUM_VL(NV), .QUEUE_SIZE(QS), .FLITS_PER_CREDIT(FPC), .EXCL_CREDITS(EX),
    .MAX_CREDITS(MX), .PKT_FLITS(PK)) dut (.clk, .rst_n, .send_valid, .send_vl, .credit_valid,
    .credit_vl, .admit);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int wr [NV], rd [NV];   // flits written to / consumed from the reference buffer
  function automatic int used(int v); return (wr[v] + FPC - 1) / FPC - rd[v] / FPC; endfunction
  function automatic int freec(); int f; f = CELLS; for (int v = 0; v < NV; v++) f -= used(v); return f; endfunction
  function automatic logic adm(int v);
    int need, def; need = PK / FPC; def = 0;
    for (int u = 0; u < NV; u++) if (u != v && used(u) < EX) def += EX - used(u);
    if (used(v) + need > MX || freec() < need) return 0;
    if (used(v) + need <= EX) return 1;
    return freec() - need >= def;
  endfunction

  int left = 0, cur = 0, n_block = 0, n_pkts = 0;
  initial begin
    for (int v = 0; v < NV; v++) begin wr[v] = 0; rd[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int cv;
      @(negedge clk);
      #1;
      for (int v = 0; v < NV; v++) check(admit[v] == adm(v), "admit matches reference");
      // downstream consumes a flit now and then; a credit when a cell empties
      credit_valid = 0;
      cv = $urandom_range(NV-1);
      if (rd[cv] < wr[cv] && $urandom_range(2) == 0) begin
        if ((rd[cv] % FPC) == FPC - 1) begin credit_valid = 1; credit_vl = VL_W'(cv); end
        rd[cv]++;
      end
      send_valid = 0;
      if (left == 0) begin
        cur = $urandom_range(NV-1);
        if (admit[cur]) begin left = PK; n_pkts++; end else n_block++;
      end
      if (left > 0) begin
        send_valid = 1; send_vl = VL_W'(cur); left--;
        wr[cur]++;
        check(freec() >= 0 && used(cur) <= MX, "downstream never overflows");
      end
    end
    $display("packets %0d, blocked attempts %0d", n_pkts, n_block);
    check(n_block > 0 && n_pkts > 10, "both admission outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
