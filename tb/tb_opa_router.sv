// tb_opa_router: router test with 8 ports (2 MPorts of 4, 2 central links
// each, so 4 central buffers), 4 VLs, 8 cells of 4 flits, 2 reserved and 5
// maximum cells per VL, 4-flit packets, RT=2, SB=3, AT=2, X=1.
//
// The testbench plays both neighbours of every port. A sender per input
// keeps its own credit count of the router's input buffer and sends a
// header only when a whole packet fits. It then sends one flit per cycle.
// A receiver per output stores flits, drains them at a random pace, and
// returns one credit per freed cell. The checks:
// - exact header latency with no contention: SB+RT+AT+1+X+SB for a turn
//   inside an MPort and SB+RT+AT+1+X+AT+1+X+SB through the central
//   crossbar (the +1 is the cycle from each grant to the first move);
// - a rewritten routing-table entry redirects its destination;
// - under random traffic every packet arrives whole, at the port its
//   routing entry names. Packets turning inside an MPort keep their order
//   per source, VL and destination. Packets through the central crossbar
//   may take different central buffers and overtake each other, so for them
//   the test checks that each arrives exactly once and counts overtakes;
// - no receiver VL goes over its maximum and no receiver over its size.
module tb_opa_router;
  import opa_pkg::*;
  localparam int NP = 8, NV = 4, QS = 32, FPC = 4, EX = 2, MX = 5, PK = 4;
  localparam int RT = 2, SB = 3, AT = 2, XL = 1, CELLS = QS / FPC;
  localparam int LAT_LOCAL   = SB + RT + AT + 1 + XL + SB;
  localparam int LAT_CENTRAL = SB + RT + AT + 1 + XL + AT + 1 + XL + SB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(negedge clk) cyc <= cyc + 1;

  logic  [NP-1:0] in_valid = '0, in_credit_valid, out_valid, out_credit_valid = '0;
  flit_t [NP-1:0] in_flit = '0, out_flit;
  logic  [NP-1:0][VL_W-1:0] in_credit_vl, out_credit_vl = '0;
  logic cfg_we = 0;
  logic [PORT_W-1:0] cfg_iport = '0, cfg_port = '0;
  logic [NODE_W-1:0] cfg_node = '0;

  opa_router #(.NUM_PORTS(NP), .NUM_VL(NV), .QUEUE_SIZE(QS), .FLITS_PER_CREDIT(FPC),
    .EXCL_CREDITS(EX), .MAX_CREDITS(MX), .PKT_FLITS(PK),
    .RT_LAT(RT), .SB_LAT(SB), .AT_LAT(AT), .X_LAT(XL)) dut (
    .clk, .rst_n, .in_valid, .in_flit, .in_credit_valid, .in_credit_vl,
    .out_valid, .out_flit, .out_credit_valid, .out_credit_vl,
    .cfg_we, .cfg_iport, .cfg_node, .cfg_port);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  function automatic logic admit(int sent [NV], int cred [NV], int v);
    int used [NV]; int free, def;
    free = CELLS; def = 0;
    for (int u = 0; u < NV; u++) begin used[u] = (sent[u] + FPC - 1) / FPC - cred[u]; free -= used[u]; end
    for (int u = 0; u < NV; u++) if (u != v && used[u] < EX) def += EX - used[u];
    return cell_admit(used[v], free, def, (PK + FPC - 1) / FPC, EX, MX);
  endfunction

  // senders
  typedef struct { int dst; int vl; int len; } pkt_t;
  pkt_t sq [NP][$];
  int s_sent [NP][NV], s_cred [NP][NV];
  int s_idx [NP]; logic s_open [NP];
  int seq_tx [NP][NV][256], seq_rx [NP][NV][256];
  int n_sent = 0, n_recv = 0, n_overtake = 0;
  bit got [NP][NV][16][1024];
  // receivers
  int r_sent [NP][NV], r_read [NP][NV], r_held [NP][NV];
  logic r_open [NP]; int r_src [NP], r_vl [NP], r_len [NP], r_idx [NP], r_dst [NP];
  int r_cq [NP][$];
  int route [256];
  int t_head; int last_hdr_cycle [NP];

  task automatic step();
    // at the negative edge: drive senders and receiver credits
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = 0; in_flit[p] = '0;
      if (sq[p].size() != 0) begin
        pkt_t k; k = sq[p][0];
        if (s_open[p] || admit(s_sent[p], s_cred[p], k.vl)) begin
          flit_t f; f = '0;
          f.head = (s_idx[p] == 0); f.tail = (s_idx[p] == k.len - 1); f.vl = VL_W'(k.vl);
          f.data = {16'(seq_tx[p][k.vl][k.dst]), 16'(k.len), 8'(p), 8'(s_idx[p]), 8'(0), 8'(k.dst)};
          in_valid[p] = 1; in_flit[p] = f;
          s_sent[p][k.vl]++;
          s_open[p] = !f.tail; s_idx[p]++;
          if (f.tail) begin seq_tx[p][k.vl][k.dst]++; void'(sq[p].pop_front()); s_idx[p] = 0; n_sent++; end
        end
      end
      out_credit_valid[p] = 0;
      if (r_cq[p].size() != 0) begin out_credit_valid[p] = 1; out_credit_vl[p] = VL_W'(r_cq[p].pop_front()); end
      // receiver drains one flit now and then
      if ($urandom_range(99) < 40) begin
        int u; u = $urandom_range(NV-1);
        if (r_held[p][u] > 0) begin
          r_held[p][u]--; r_read[p][u]++;
          if (r_read[p][u] % FPC == 0) r_cq[p].push_back(u);
        end
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (in_credit_valid[p]) s_cred[p][int'(in_credit_vl[p])]++;
      if (out_valid[p]) begin
        flit_t f; int v, used, tot;
        f = out_flit[p]; v = int'(f.vl);
        if (f.head) begin
          check(!r_open[p], "header inside an open packet");
          r_dst[p] = int'(f.data[7:0]); r_idx[p] = 0; r_src[p] = int'(f.data[31:24]);
          r_len[p] = int'(f.data[47:32]); r_vl[p] = v; r_open[p] = 1;
          check(route[r_dst[p]] == p, "packet leaves at its routed port");
          if (r_src[p] / 4 == p / 4)
            check(int'(f.data[63:48]) == seq_rx[r_src[p]][v][r_dst[p]], "packet order per source, VL and destination");
          else begin
            int q; q = int'(f.data[63:48]);
            check(!got[r_src[p]][v][r_dst[p]][q], "central turn: packet arrives once");
            got[r_src[p]][v][r_dst[p]][q] = 1;
            if (q != seq_rx[r_src[p]][v][r_dst[p]]) n_overtake++;
          end
          last_hdr_cycle[p] = cyc;
        end
        check(r_open[p] && v == r_vl[p], "flit belongs to the open packet");
        check(int'(f.data[23:16]) == r_idx[p] && int'(f.data[31:24]) == r_src[p], "flit index and source");
        check(f.tail == (r_idx[p] == r_len[p] - 1), "tail position");
        r_idx[p]++;
        if (f.tail) begin r_open[p] = 0; seq_rx[r_src[p]][v][r_dst[p]]++; n_recv++; end
        r_sent[p][v]++; r_held[p][v]++;
        used = 0; tot = 0;
        for (int u = 0; u < NV; u++) begin
          int c; c = (r_sent[p][u] + FPC - 1) / FPC - r_read[p][u] / FPC;
          tot += c; if (u == v) used = c;
        end
        check(used <= MX && tot <= CELLS, "receiver buffer within its limits");
      end
    end
  end

  function automatic logic pending();
    for (int p = 0; p < NP; p++) if (sq[p].size() != 0) return 1;
    return 0;
  endfunction

  task automatic lone(input int s, input int d, input int v, input int exp, input string what);
    int t0;
    sq[s].push_back('{d, v, 2});
    @(negedge clk); step(); t0 = cyc + 1;   // cyc moves on at this edge
    while (n_recv != n_sent || sq[s].size() != 0) begin @(negedge clk); step(); end
    check(last_hdr_cycle[route[d]] - t0 == exp, what);
    $display("%s: %0d cycles (expected %0d)", what, last_hdr_cycle[route[d]] - t0, exp);
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      s_idx[p] = 0; s_open[p] = 0; r_open[p] = 0; r_idx[p] = 0; last_hdr_cycle[p] = 0;
      for (int v = 0; v < NV; v++) begin
        s_sent[p][v] = 0; s_cred[p][v] = 0; r_sent[p][v] = 0; r_read[p][v] = 0; r_held[p][v] = 0;
        for (int d = 0; d < 256; d++) begin seq_tx[p][v][d] = 0; seq_rx[p][v][d] = 0; end
      end
    end
    for (int n = 0; n < 256; n++) route[n] = n % NP;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(negedge clk);
    lone(0, 1, 0, LAT_LOCAL, "header latency, turn inside the MPort");
    lone(1, 6, 2, LAT_CENTRAL, "header latency, turn through the central crossbar");
    // reprogram: at input 3, node 9 goes to port 6 instead of 1
    @(negedge clk) begin cfg_we = 1; cfg_iport = 3; cfg_node = 9; cfg_port = 6; end
    @(negedge clk) cfg_we = 0;
    route[9] = 6;
    sq[3].push_back('{9, 1, 3});
    while (n_recv != n_sent || sq[3].size() != 0) begin @(negedge clk); step(); end
    check(last_hdr_cycle[6] > last_hdr_cycle[1], "rewritten entry redirects");
    // random traffic (destinations 0..7 use the reset table at every input)
    for (int k = 0; k < 150; k++)
      for (int p = 0; p < NP; p++) sq[p].push_back('{$urandom_range(NP-1), $urandom_range(NV-1), $urandom_range(1, PK)});
    for (int k = 0; k < 40; k++)   // hot spot
      for (int p = 0; p < NP; p++) sq[p].push_back('{3, $urandom_range(NV-1), PK});
    begin
      int t; t = 0;
      while ((n_recv != n_sent || pending()) && t < 60000) begin
        @(negedge clk); step(); t++;
      end
    end
    $display("packets sent %0d, received %0d, central-turn packets overtaking an earlier one %0d", n_sent, n_recv, n_overtake);
    check(n_sent == 3 + NP * 190 && n_recv == n_sent, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
