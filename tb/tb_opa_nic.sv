// tb_opa_nic: network interface test (node 3, 4 VLs, 4-flit packets, a
// downstream buffer of 8 cells with 2 reserved and 5 maximum per VL).
//
// Transmit: random messages are handed in. The test rebuilds the expected
// flit stream from the message list (packet split, header fields, body
// index, source, sequence number, head/tail marks) and compares every
// transmitted flit. The downstream buffer is modelled from flit counts. For
// a while it returns no credits, so the NIC must stall. The test checks the
// buffer is never overrun and that the stall happened. Receive: random flits
// on random VLs. A credit must come back for every 4th flit of a VL, and a
// header's rx_latency must be the age of its injection stamp.
module tb_opa_nic;
  import opa_pkg::*;
  localparam int NV = 4, QS = 32, FPC = 4, EX = 2, MX = 5, PK = 4, CELLS = QS / FPC, ME = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  logic msg_valid = 0, msg_ready, tx_valid, tx_credit_valid = 0, rx_valid = 0, rx_credit_valid;
  logic [NODE_W-1:0] msg_dest = 0;
  logic [VL_W-1:0] msg_vl = 0, tx_credit_vl = 0, rx_credit_vl;
  logic [15:0] msg_len = 0;
  flit_t tx_flit, rx_flit = '0;
  time_t rx_latency;

  opa_nic #(.NODE_ID(ME), .NUM_VL(NV), .DS_QUEUE_SIZE(QS), .FLITS_PER_CREDIT(FPC),
    .EXCL_CREDITS(EX), .MAX_CREDITS(MX), .PKT_FLITS(PK)) dut (.clk, .rst_n, .now,
    .msg_valid, .msg_ready, .msg_dest, .msg_vl, .msg_len, .tx_valid, .tx_flit,
    .tx_credit_valid, .tx_credit_vl, .rx_valid, .rx_flit, .rx_credit_valid, .rx_credit_vl, .rx_latency);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  // expected transmit stream
  typedef struct { logic head, tail; int vl, dest, len, idx, seq; } exp_t;
  exp_t ex [$];
  int seq = 0;
  task automatic expect_msg(int d, int v, int len);
    int left; left = len;
    while (left > 0) begin
      int pl; pl = left > PK ? PK : left;
      for (int i = 0; i < pl; i++) begin
        exp_t e;
        e.head = (i == 0); e.tail = (i == pl - 1); e.vl = v; e.dest = d; e.len = pl; e.idx = i; e.seq = seq;
        ex.push_back(e);
      end
      seq++; left -= pl;
    end
  endtask

  int wr [NV], rd [NV], rxc [NV];
  function automatic int used(int v); return (wr[v] + FPC - 1) / FPC - rd[v] / FPC; endfunction
  function automatic int freec(); int f; f = CELLS; for (int v = 0; v < NV; v++) f -= used(v); return f; endfunction
  int n_stall = 0, n_tx = 0;
  logic credits_on = 1;
  time_t inj;

  // transmit checker and downstream model
  always @(posedge clk) if (rst_n) begin
    if (tx_valid) begin
      exp_t e;
      n_tx++;
      check(ex.size() != 0, "flit expected");
      if (ex.size() != 0) begin
        e = ex.pop_front();
        check(tx_flit.head == e.head && tx_flit.tail == e.tail, "head/tail marks");
        check(int'(tx_flit.vl) == e.vl, "VL");
        if (e.head) begin
          check(tx_flit.data[31:0] == {16'(e.len), 8'(ME), 8'(e.dest)}, "header fields");
          check(tx_flit.data[63:32] == now, "injection stamp");
          inj = now;
        end else begin
          check(tx_flit.data == {inj, 16'(e.seq), 8'(ME), 8'(e.idx)}, "body fields");
        end
        wr[e.vl]++;
        check(freec() >= 0 && used(e.vl) <= MX, "downstream not overrun");
      end
    end
  end

  initial begin
    for (int v = 0; v < NV; v++) begin wr[v] = 0; rd[v] = 0; rxc[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      // messages
      for (int m = 0; m < 60; m++) begin
        int d, v, len;
        d = $urandom_range(255); v = $urandom_range(NV-1); len = $urandom_range(1, 11);
        @(negedge clk);
        msg_valid = 1; msg_dest = NODE_W'(d); msg_vl = VL_W'(v); msg_len = 16'(len);
        expect_msg(d, v, len);
        @(posedge clk); while (!msg_ready) @(posedge clk);
        @(negedge clk) msg_valid = 0;
      end
      // downstream consumes flits and returns credits (none during cycles 300..600)
      for (int c = 0; c < 3000; c++) begin
        int v;
        @(negedge clk);
        now = now + 1;
        tx_credit_valid = 0;
        credits_on = !(c >= 300 && c < 600);
        if (dut.has_msg && !dut.in_pkt && !dut.admit[dut.vl]) n_stall++;
        v = $urandom_range(NV-1);
        if (credits_on && rd[v] < wr[v]) begin
          if (rd[v] % FPC == FPC - 1) begin tx_credit_valid = 1; tx_credit_vl = VL_W'(v); end
          rd[v]++;
        end
        // receive side
        rx_valid = 1'($urandom);
        rx_flit = flit_t'({$urandom, $urandom, $urandom});
        rx_flit.data[63:32] = now - time_t'($urandom_range(500));
        #1;
        if (rx_valid) begin
          int rv; rv = int'(rx_flit.vl);
          check(rx_credit_valid == (rxc[rv] % FPC == FPC - 1), "receive credit every 4 flits");
          if (rx_credit_valid) check(int'(rx_credit_vl) == rv, "receive credit VL");
          check(rx_latency == now - time_t'(rx_flit.data[63:32]), "receive latency");
          rxc[rv]++;
        end else check(!rx_credit_valid, "no credit without a flit");
      end
    join
    check(ex.size() == 0, "all message flits sent");
    $display("flits sent %0d, credit stall cycles %0d", n_tx, n_stall);
    check(n_stall > 0, "credit stall happened");
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
