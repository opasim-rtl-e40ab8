// tb_opa_system_full: the system at its default size (48 ports, 8 VLs,
// 256-flit queues, 16-flit packets, latencies RT=32, SB=50, AT=16, X=2,
// FLY=8).
//
// Checks the exact no-contention header latency of a turn inside an MPort and
// of a turn through the central crossbar. Then it runs a few rounds of the
// no-contention pattern (node x sends to node (x+1) mod 48) and of uniform
// random traffic, with a scoreboard on every delivered flit.
module tb_opa_system_full;
  import opa_pkg::*;

  localparam int unsigned NP = DEF_NUM_PORTS, NV = DEF_NUM_VL, PK = DEF_PACKET_SIZE;
  localparam int unsigned RT = DEF_RT_LAT, SB = DEF_SB_LAT, AT = DEF_AT_LAT, XL = DEF_X_LAT, FLY = DEF_FLY_LAT;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [NP-1:0]             msg_valid, msg_ready, rx_valid;
  logic  [NP-1:0][NODE_W-1:0] msg_dest;
  logic  [NP-1:0][VL_W-1:0]   msg_vl;
  logic  [NP-1:0][15:0]       msg_len;
  flit_t [NP-1:0]             rx_flit;
  time_t [NP-1:0]             rx_latency;

  opa_system u_dut (
    .clk, .rst_n, .msg_valid, .msg_ready, .msg_dest, .msg_vl, .msg_len,
    .rx_valid, .rx_flit, .rx_latency,
    .cfg_we(1'b0), .cfg_iport('0), .cfg_node('0), .cfg_port('0)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- scoreboard
  int sent_pkts [NP][NP];     // [src][dst]
  int recv_pkts [NP][NP];
  int sent_flits = 0, recv_flits = 0;
  int multi_pkt_msgs = 0;
  // receive state per node
  logic        r_in  [NP];
  logic [15:0] r_len [NP], r_idx [NP];
  logic [7:0]  r_src [NP];
  logic [31:0] r_inj [NP];
  time_t       last_latency [NP];
  // packet sequence numbers as seen at the source, per src (NIC counts per node)
  int          pkt_src_seq_dst [NP][$];   // for each src: destination of packet k

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NP; n++) if (rx_valid[n]) begin
      recv_flits++;
      if (rx_flit[n].head) begin
        check(!r_in[n], "header while a packet is open");
        check(rx_flit[n].data[7:0] == 8'(n), "header delivered to its destination");
        r_src[n] = rx_flit[n].data[15:8];
        r_len[n] = rx_flit[n].data[31:16];
        r_inj[n] = rx_flit[n].data[63:32];
        r_idx[n] = 16'd1;
        last_latency[n] = rx_latency[n];
        r_in[n]  = !rx_flit[n].tail;
        check(rx_flit[n].tail == (r_len[n] == 16'd1), "one-flit packet tail");
        if (rx_flit[n].tail) recv_pkts[r_src[n]][n]++;
      end else begin
        check(r_in[n], "body flit inside a packet");
        check(rx_flit[n].data[15:8] == r_src[n], "body source");
        check(rx_flit[n].data[7:0] == r_idx[n][7:0], "body flit order");
        check(rx_flit[n].data[63:32] == r_inj[n], "body injection time");
        check(rx_flit[n].tail == (r_idx[n] == r_len[n] - 16'd1), "tail position");
        if (rx_flit[n].tail) begin
          // body flits carry the sender's packet number: check per-VL order
          int s; logic [15:0] sq;
          s  = int'(r_src[n]);
          sq = rx_flit[n].data[31:16];
          check(pkt_src_seq_dst[s][sq] == n, "packet number matches destination");
          recv_pkts[s][n]++;
          r_in[n] = 1'b0;
        end
        r_idx[n]++;
      end
    end
  end

  // ---------------------------------------------------------------- mechanisms
  int n_local = 0, n_central = 0, n_both_links = 0, n_sa_conflict = 0, n_va_retry = 0;
  int n_obuf_full = 0, n_credit_stall = 0, n_vl_switch = 0;
  logic [NP-1:0] nic_stall;
  for (genvar n = 0; n < NP; n++) begin : g_mon
    assign nic_stall[n] = u_dut.g_node[n].u_nic.has_msg && !u_dut.g_node[n].u_nic.in_pkt
                          && !u_dut.g_node[n].u_nic.admit[u_dut.g_node[n].u_nic.vl];
  end
  logic [VL_W-1:0] prev_vl [NP];
  logic            prev_vl_ok [NP];
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++) begin
      if (u_dut.u_router.o_loc_grant[o] != 0) n_local++;
      if (u_dut.u_router.o_cen_grant[o] != 0) n_central++;
      if ($countones({u_dut.u_router.o_loc_req[o], u_dut.u_router.o_cen_req[o]}) > 1) n_sa_conflict++;
      if (u_dut.u_router.out_valid[o] && u_dut.u_router.out_flit[o].head) begin
        if (prev_vl_ok[o] && prev_vl[o] != u_dut.u_router.out_flit[o].vl) n_vl_switch++;
        prev_vl[o] = u_dut.u_router.out_flit[o].vl;
        prev_vl_ok[o] = 1'b1;
      end
    end
    for (int i = 0; i < NP; i++)
      if (u_dut.u_router.i_req_valid[i] && !u_dut.u_router.i_grant[i]) n_va_retry++;
    n_credit_stall += $countones(nic_stall);
  end
  for (genvar o = 0; o < NP; o++) begin : g_mon_o
    always @(posedge clk)
      if (rst_n && u_dut.u_router.g_out[o].u_out.can_accept != '1) n_obuf_full++;
  end

  // ---------------------------------------------------------------- stimulus
  typedef struct { int dst; int vl; int len; } msg_t;
  msg_t q [NP][$];

  task automatic post(input int s, input int d, input int v, input int len);
    msg_t m;
    int left;
    m.dst = d; m.vl = v; m.len = len;
    q[s].push_back(m);
    if (len > PK) multi_pkt_msgs++;
    left = len;
    while (left > 0) begin
      sent_pkts[s][d]++;
      pkt_src_seq_dst[s].push_back(d);
      left -= (left > PK) ? PK : left;
    end
    sent_flits += len;
  endtask

  logic [NP-1:0] hs;
  always @(posedge clk) hs <= msg_valid & msg_ready;
  always @(negedge clk)
    for (int n = 0; n < NP; n++) begin
      if (hs[n]) void'(q[n].pop_front());
      msg_valid[n] <= rst_n && q[n].size() != 0;
      msg_dest[n]  <= (q[n].size() != 0) ? NODE_W'(q[n][0].dst) : '0;
      msg_vl[n]    <= (q[n].size() != 0) ? VL_W'(q[n][0].vl) : '0;
      msg_len[n]   <= (q[n].size() != 0) ? 16'(q[n][0].len) : '0;
    end

  function automatic logic all_done();
    for (int s = 0; s < NP; s++) begin
      if (q[s].size() != 0) return 1'b0;
      for (int d = 0; d < NP; d++) if (sent_pkts[s][d] != recv_pkts[s][d]) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic drain(input int limit);
    int t;
    t = 0;
    while (!all_done() && t < limit) begin @(posedge clk); t++; end
    check(all_done(), "all packets delivered");
  endtask

  localparam int LAT_LOCAL   = 2*FLY + SB + RT + AT + 1 + XL + SB;
  localparam int LAT_CENTRAL = 2*FLY + SB + RT + AT + 1 + XL + AT + 1 + XL + SB;

  initial begin
    for (int n = 0; n < NP; n++) begin
      r_in[n] = 0; r_len[n] = 0; r_idx[n] = 0; r_src[n] = 0; r_inj[n] = 0;
      prev_vl[n] = 0; prev_vl_ok[n] = 0; last_latency[n] = 0;
      for (int d = 0; d < NP; d++) begin sent_pkts[n][d] = 0; recv_pkts[n][d] = 0; end
    end
    msg_valid = '0; hs = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // phase 1: latency without contention
    post(0, 1, 0, 1);
    drain(200);
    check(last_latency[1] == time_t'(LAT_LOCAL), "header latency, turn inside the MPort");
    $display("local latency %0d (expected %0d)", last_latency[1], LAT_LOCAL);
    post(0, 5, 1, 4);
    drain(200);
    check(last_latency[5] == time_t'(LAT_CENTRAL), "header latency, turn through the central crossbar");
    $display("central latency %0d (expected %0d)", last_latency[5], LAT_CENTRAL);
    // phase 2: no-contention pattern, node x -> (x+1) mod NP
    for (int k = 0; k < 4; k++)
      for (int s = 0; s < NP; s++) post(s, (s + 1) % NP, k % NV, PK);
    drain(5000);
    // phase 3: uniform random traffic
    for (int k = 0; k < 3; k++)
      for (int s = 0; s < NP; s++) post(s, $urandom_range(NP-1), $urandom_range(NV-1), $urandom_range(1, 2*PK));
    drain(20000);
    check(sent_flits == recv_flits, "flit count");
    $display("sent %0d flits, received %0d", sent_flits, recv_flits);
    $display("local turns %0d, central turns %0d, SA conflicts %0d, VA retries %0d, credit stalls %0d",
             n_local, n_central, n_sa_conflict, n_va_retry, n_credit_stall);
    check(n_local > 0, "local turn happened");
    check(n_central > 0, "central turn happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
