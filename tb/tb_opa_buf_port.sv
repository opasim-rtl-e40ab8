// tb_opa_buf_port: random test of a buffer port (4 VLs, 8 cells, 4-flit
// packets, 3 flits per cycle out, header delay 6, body delay 2).
//
// Packets of 1 to 4 flits on random VLs are written one flit per cycle, each
// started only when the port has room for it. A reference keeps one queue
// per VL with ready times and the arbiter's pointer. It checks the request
// (the first VL after the last one tried whose head is a ready header, and
// that header's output port). A random allocator grants about half the
// requests. After a grant, the test checks every cycle of the stream: the
// number of flits (the ready flits at the head, at most 3, never past the
// tail) and their contents. It also checks the port goes idle after the
// tail.
module tb_opa_buf_port;
  import opa_pkg::*;
  localparam int NV = 4, QS = 32, EX = 2, MX = 5, PK = 4, RW = 3, HD = 6, BD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  logic [VL_W-1:0] wr_vl = 0, req_vl;
  logic [CNT_W-1:0] wr_cnt = 0;
  flit_t [MAX_SPEEDUP-1:0] wr_flit = '0;
  logic [NV-1:0] can_accept;
  logic cell_freed, req_valid, grant = 0, busy;
  logic [VL_W-1:0] cell_freed_vl;
  logic [PORT_W-1:0] req_oport;
  bundle_t xfer;

  opa_buf_port #(.NUM_VL(NV), .QUEUE_SIZE(QS), .EXCL_CREDITS(EX), .MAX_CREDITS(MX),
    .PKT_FLITS(PK), .WR_W(1), .RD_W(RW), .HDR_DELAY(HD), .BODY_DELAY(BD)) dut (
    .clk, .rst_n, .now, .wr_vl, .wr_cnt, .wr_flit, .can_accept, .cell_freed, .cell_freed_vl,
    .req_valid, .req_vl, .req_oport, .grant, .xfer, .busy);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  flit_t qf [NV][$];
  time_t qt [NV][$];
  int last = NV - 1, conn_vl = -1, n_pkts_out = 0, n_multi = 0;
  logic connected = 0;
  // writer state
  int w_left = 0, w_vl = 0, w_len = 0, w_idx = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      int exp_v, n;
      @(negedge clk);
      now = now + 1;
      #1;
      // ---- request check
      exp_v = -1;
      if (!connected)
        for (int k = 1; k <= NV; k++) begin
          int v; v = (last + k) % NV;
          if (exp_v < 0 && qf[v].size() != 0 && qf[v][0].head && time_reached(now, qt[v][0])) exp_v = v;
        end
      check(req_valid == (exp_v >= 0), "request valid");
      if (exp_v >= 0) begin
        check(int'(req_vl) == exp_v, "round-robin VL choice");
        check(req_oport == qf[exp_v][0].oport, "requested port");
      end
      // ---- stream check
      n = 0;
      if (connected) begin
        for (int i = 0; i < RW && i < qf[conn_vl].size(); i++) begin
          if (n == i && time_reached(now, qt[conn_vl][i]) && (i == 0 || !qf[conn_vl][i-1].tail)) n++;
        end
        if (n > 1) n_multi++;
      end
      check(int'(xfer.cnt) == n, "flits streamed this cycle");
      for (int i = 0; i < n; i++) check(xfer.f[i] == qf[conn_vl][i], "streamed flit");
      // ---- allocator and writer decisions
      grant = req_valid && $urandom_range(1);
      wr_cnt = 0;
      if (w_left == 0 && $urandom_range(2) != 0) begin
        int v; v = $urandom_range(NV-1);
        if (can_accept[v]) begin w_vl = v; w_len = $urandom_range(1, PK); w_left = w_len; w_idx = 0; end
      end
      if (w_left > 0) begin
        wr_cnt = 1; wr_vl = VL_W'(w_vl);
        wr_flit[0] = flit_t'({$urandom, $urandom, $urandom});
        wr_flit[0].vl = VL_W'(w_vl);
        wr_flit[0].head = (w_idx == 0);
        wr_flit[0].tail = (w_idx == w_len - 1);
        w_idx++; w_left--;
      end
      #1;
      // ---- model update for the coming edge
      for (int i = 0; i < n; i++) begin
        if (qf[conn_vl][0].tail) begin connected = 0; n_pkts_out++; end
        void'(qf[conn_vl].pop_front()); void'(qt[conn_vl].pop_front());
      end
      if (exp_v >= 0) begin
        last = exp_v;
        if (grant) begin connected = 1; conn_vl = exp_v; end
      end
      if (wr_cnt != 0) begin
        qf[w_vl].push_back(wr_flit[0]);
        qt[w_vl].push_back(now + (wr_flit[0].head ? HD : BD));
      end
    end
    $display("packets out %0d, multi-flit cycles %0d", n_pkts_out, n_multi);
    check(n_pkts_out > 100 && n_multi > 0, "traffic flowed at the speed-up");
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
