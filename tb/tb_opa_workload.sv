// tb_opa_workload: the evaluated workloads on the system at its default size
// (one 48-port router with 48 NICs, 8 VLs, 256-flit buffers, 16-flit
// packets, default stage latencies).
//
// Each node has a message source: every cycle it creates a 16-flit message
// with probability rate/16, so the offered load is `rate` flits per cycle
// per node. At rate 1.0 the source is saturated instead: it refills its
// queue every cycle. The source queue holds at most 32 waiting messages.
// Each message's VL is drawn at random.
//   1. No contention: node x sends to node (x+1) mod 48 at 1 flit/cycle/node.
//      Every header must arrive with exactly the no-contention latency (167
//      cycles for a turn inside an MPort, 186 through the central crossbar).
//      The accepted throughput must be at least 0.95 flits/cycle/node.
//   2. Uniform traffic: destinations uniform over the other 47 nodes, at
//      offered loads 0.1, 0.4, 0.7 and 1.0. The test prints the accepted
//      throughput and the mean header latency of each point. It checks that
//      throughput follows the load below saturation and that no latency is
//      below the no-contention value. Latency must grow with the load.
// Each point has a warm-up and then a measurement window. Between points the
// sources stop and the network drains completely. A light scoreboard checks
// that every flit arrives at its destination, inside a whole packet.
module tb_opa_workload;
  import opa_pkg::*;

  localparam int NP = DEF_NUM_PORTS, NV = DEF_NUM_VL, PK = DEF_PACKET_SIZE;
  localparam int LAT_LOCAL   = 2*DEF_FLY_LAT + DEF_SB_LAT + DEF_RT_LAT + DEF_AT_LAT + 1 + DEF_X_LAT + DEF_SB_LAT;
  localparam int LAT_CENTRAL = LAT_LOCAL + DEF_AT_LAT + 1 + DEF_X_LAT;
  localparam int WARM = 1500, MEAS = 3000, QMAX = 32;

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // sources
  int   q_dst [NP][$];
  int   q_vl  [NP][$];
  int   pattern = 0;         // 0 none, 1 no contention, 2 uniform
  int   rate_pm = 0;         // offered load in flits/cycle/node, per mille
  longint sent_flits = 0, recv_flits = 0;

  logic [NP-1:0] hs;
  always @(posedge clk) hs <= msg_valid & msg_ready;
  always @(negedge clk) begin
    for (int n = 0; n < NP; n++) begin
      if (hs[n]) begin void'(q_dst[n].pop_front()); void'(q_vl[n].pop_front()); end
      if (pattern != 0 && q_dst[n].size() < QMAX &&
          (rate_pm >= 1000 || $urandom_range(PK * 1000 - 1) < rate_pm)) begin
        int d;
        if (pattern == 1) d = (n + 1) % NP;
        else begin d = $urandom_range(NP - 2); if (d >= n) d++; end
        q_dst[n].push_back(d); q_vl[n].push_back($urandom_range(NV-1));
        sent_flits += PK;
      end
      msg_valid[n] <= rst_n && q_dst[n].size() != 0;
      msg_dest[n]  <= (q_dst[n].size() != 0) ? NODE_W'(q_dst[n][0]) : '0;
      msg_vl[n]    <= (q_dst[n].size() != 0) ? VL_W'(q_vl[n][0]) : '0;
      msg_len[n]   <= 16'(PK);
    end
  end

  // receivers and measurement
  logic measuring = 0;
  longint win_flits = 0, win_hdrs = 0, win_lat = 0;
  int lat_min = 0, n_exact = 0, n_inexact = 0;
  logic r_in [NP]; int r_idx [NP], r_src [NP];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NP; n++) if (rx_valid[n]) begin
      recv_flits++;
      if (measuring) win_flits++;
      if (rx_flit[n].head) begin
        int exp;
        check(!r_in[n] && rx_flit[n].data[7:0] == 8'(n), "header arrives at its destination");
        r_in[n] = 1; r_idx[n] = 1; r_src[n] = int'(rx_flit[n].data[15:8]);
        if (lat_min == 0 || int'(rx_latency[n]) < lat_min) lat_min = int'(rx_latency[n]);
        if (measuring) begin win_hdrs++; win_lat += rx_latency[n]; end
        if (pattern == 1) begin
          exp = (r_src[n] / 4 == n / 4) ? LAT_LOCAL : LAT_CENTRAL;
          if (int'(rx_latency[n]) == exp) n_exact++; else n_inexact++;
        end
      end else begin
        check(r_in[n] && int'(rx_flit[n].data[15:8]) == r_src[n] && int'(rx_flit[n].data[7:0]) == r_idx[n],
              "body flit inside its packet");
        r_idx[n]++;
      end
      if (rx_flit[n].tail) begin check(r_idx[n] == PK, "packet length"); r_in[n] = 0; end
    end
  end

  function automatic logic idle();
    for (int n = 0; n < NP; n++) if (q_dst[n].size() != 0) return 0;
    return sent_flits == recv_flits;
  endfunction

  task automatic run_point(input int pat, input int pm, output real thr, output real lat);
    pattern = pat; rate_pm = pm;
    repeat (WARM) @(posedge clk);
    win_flits = 0; win_hdrs = 0; win_lat = 0; measuring = 1;
    repeat (MEAS) @(posedge clk);
    measuring = 0; pattern = 0;
    thr = real'(win_flits) / real'(MEAS) / real'(NP);
    lat = (win_hdrs != 0) ? real'(win_lat) / real'(win_hdrs) : 0.0;
    begin
      int t; t = 0;
      while (!idle() && t < 20000) begin @(posedge clk); t++; end
      check(idle(), "network drains after the point");
    end
  endtask

  initial begin
    real thr, lat, thr_u [4], lat_u [4];
    int pms [4];
    pms = '{100, 400, 700, 1000};
    for (int n = 0; n < NP; n++) begin r_in[n] = 0; r_idx[n] = 0; r_src[n] = 0; end
    msg_valid = '0; hs = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // 1. no contention
    run_point(1, 1000, thr, lat);
    $display("no contention, offered 1.00: accepted %0.3f flits/cycle/node, mean latency %0.1f cycles, headers at exact latency %0d, others %0d",
             thr, lat, n_exact, n_inexact);
    check(thr >= 0.95, "no-contention throughput at least 0.95");
    check(n_inexact == 0 && n_exact > 0, "no-contention headers all at the exact latency");
    // 2. uniform
    for (int k = 0; k < 4; k++) begin
      run_point(2, pms[k], thr_u[k], lat_u[k]);
      $display("uniform, offered %0.2f: accepted %0.3f flits/cycle/node, mean latency %0.1f cycles",
               real'(pms[k]) / 1000.0, thr_u[k], lat_u[k]);
    end
    check(thr_u[0] > 0.08 && thr_u[0] < 0.12, "uniform throughput follows a light load");
    check(thr_u[3] >= thr_u[1] * 0.9, "throughput does not collapse at saturation");
    check(lat_u[3] > lat_u[0], "latency grows with the load");
    check(lat_min >= LAT_LOCAL, "no header faster than the no-contention latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
