// tb_opa_input_port: input port test (8-port router, 4 VLs, 8 cells, 4-flit
// packets, RT=3, SB=4, AT=2).
//
// First a lone header: its request must appear exactly SB+RT+AT cycles after
// it arrives, naming the port the routing table gives. Then random packets
// arrive one flit per cycle on random VLs toward random nodes. Part of the
// routing table is reprogrammed first. The sender respects the credits the
// port returns. A granting allocator takes every request. The test checks
// each request's output port against a reference table, that every packet
// comes out whole and in order per VL at up to 3 flits per cycle, and that
// one credit per 4 flits of a VL is returned.
module tb_opa_input_port;
  import opa_pkg::*;
  localparam int NP = 8, NV = 4, QS = 32, EX = 2, MX = 5, PK = 4, RT = 3, SB = 4, AT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  logic in_valid = 0, credit_valid, cfg_we = 0, req_valid, grant, busy;
  flit_t in_flit = '0;
  logic [VL_W-1:0] credit_vl, req_vl;
  logic [NODE_W-1:0] cfg_node = 0;
  logic [PORT_W-1:0] cfg_port = 0, req_oport;
  bundle_t xfer;

  opa_input_port #(.NUM_PORTS(NP), .NUM_VL(NV), .QUEUE_SIZE(QS), .EXCL_CREDITS(EX),
    .MAX_CREDITS(MX), .PKT_FLITS(PK), .RT_LAT(RT), .SB_LAT(SB), .AT_LAT(AT)) dut (
    .clk, .rst_n, .now, .in_valid, .in_flit, .credit_valid, .credit_vl, .cfg_we, .cfg_node,
    .cfg_port, .req_valid, .req_vl, .req_oport, .grant, .xfer, .busy);
  assign grant = req_valid;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  int rt [256];
  flit_t sent [NV][$];
  int wr [NV], cred [NV], out_flits = 0, sent_flits = 0;
  logic conn = 0; int conn_vl = 0;

  // output side checker
  always @(posedge clk) if (rst_n) begin
    if (credit_valid) cred[credit_vl]++;
    if (req_valid) begin
      check(sent[req_vl].size() != 0 && sent[req_vl][0].head, "request for a header");
      if (sent[req_vl].size() != 0)
        check(int'(req_oport) == rt[sent[req_vl][0].data[7:0]], "routed port");
    end
    check(xfer.cnt <= 3, "at most 3 flits per cycle");
    for (int i = 0; i < int'(xfer.cnt); i++) begin
      flit_t e;
      e = sent[conn_vl].pop_front();
      check(xfer.f[i].data == e.data && xfer.f[i].tail == e.tail && xfer.f[i].head == e.head, "flit out in order");
      out_flits++;
      if (xfer.f[i].tail) conn = 0;
    end
    if (req_valid && grant) begin conn = 1; conn_vl = int'(req_vl); end
  end

  task automatic send_pkt(int v, int dest, int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_flit = flit_t'({$urandom, $urandom, $urandom});
      in_flit.vl = VL_W'(v); in_flit.head = (i == 0); in_flit.tail = (i == len - 1);
      if (i == 0) in_flit.data[7:0] = 8'(dest);
      sent[v].push_back(in_flit);
      wr[v]++; sent_flits++;
    end
    @(negedge clk) in_valid = 0;
  endtask

  always @(negedge clk) now <= now + 1;

  initial begin
    for (int n = 0; n < 256; n++) rt[n] = n % NP;
    for (int v = 0; v < NV; v++) begin wr[v] = 0; cred[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone header latency
    begin
      time_t t0, t1;
      fork
        send_pkt(1, 5, 1);
        begin @(negedge clk); @(posedge clk); t0 = now; end
      join
      while (!req_valid) @(posedge clk);
      t1 = now;
      check(t1 - t0 == time_t'(SB + RT + AT), "header request after SB+RT+AT");
      $display("request %0d cycles after arrival (expected %0d)", t1 - t0, SB + RT + AT);
    end
    // reprogram some routes
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_node = NODE_W'($urandom_range(15)); cfg_port = PORT_W'($urandom_range(NP-1));
      rt[cfg_node] = int'(cfg_port);
    end
    @(negedge clk) cfg_we = 0;
    // random packets under credit flow control (at most 2 cells per VL in flight)
    for (int k = 0; k < 300; k++) begin
      int v;
      v = $urandom_range(NV-1);
      while ((wr[v] + 3) / 4 - cred[v] + 1 > 2) @(negedge clk);
      send_pkt(v, $urandom_range(15), $urandom_range(1, PK));
    end
    repeat (50) @(posedge clk);
    check(out_flits == sent_flits, "every flit came out");
    for (int v = 0; v < NV; v++) check(cred[v] == wr[v] / 4, "one credit per 4 flits");
    $display("flits %0d out of %0d", out_flits, sent_flits);
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
