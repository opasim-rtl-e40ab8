// tb_opa_central_xbar: central crossbar test (4 central buffers, 8 output
// lines, 4 VLs, 8 cells, 4-flit packets, X=1, AT=3).
//
// A lone header written into a central buffer must be requested exactly
// X+AT cycles later. Then random packets enter the buffers at up to 3 flits
// per cycle. A reference of output arbiters grants requests for free
// outputs at random and steers each output line to its granted buffer. The
// test checks that requests name a header at the head of one of the
// buffer's VLs with that header's output port. Every output line must carry
// exactly the granted packet, in order, at most 4 flits a cycle, and 4-flit
// cycles must occur.
module tb_opa_central_xbar;
  import opa_pkg::*;
  localparam int NC = 4, NP = 8, NV = 4, QS = 32, EX = 2, MX = 5, PK = 4, AT = 3, XL = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  bundle_t [NC-1:0] c_in = '0;
  logic [NC-1:0][NV-1:0] c_can_accept;
  logic [NC-1:0] c_req_valid, c_grant = '0, c_busy;
  logic [NC-1:0][VL_W-1:0] c_req_vl;
  logic [NC-1:0][PORT_W-1:0] c_req_oport;
  logic [NP-1:0] out_sel_valid = '0;
  logic [NP-1:0][1:0] out_sel = '0;
  bundle_t [NP-1:0] out_line;

  opa_central_xbar #(.NUM_CBUF(NC), .NUM_PORTS(NP), .NUM_VL(NV), .QUEUE_SIZE(QS),
    .EXCL_CREDITS(EX), .MAX_CREDITS(MX), .PKT_FLITS(PK), .AT_LAT(AT), .X_LAT(XL)) dut (
    .clk, .rst_n, .now, .c_in, .c_can_accept, .c_req_valid, .c_req_vl, .c_req_oport,
    .c_grant, .c_busy, .out_sel_valid, .out_sel, .out_line);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  flit_t q [NC][NV][$];
  int wleft [NC], wvl [NC], wlen [NC], widx [NC];
  logic oconn [NP]; int osrc [NP], ovl [NP];
  logic cconn [NC];
  int n_pkts = 0, n_four = 0, in_flits = 0, out_flits = 0;

  always @(negedge clk) now <= now + 1;

  initial begin
    for (int c = 0; c < NC; c++) begin wleft[c] = 0; cconn[c] = 0; end
    for (int o = 0; o < NP; o++) oconn[o] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone header
    begin
      time_t t0;
      @(negedge clk);
      c_in[2].cnt = 1; c_in[2].f[0] = '0; c_in[2].f[0].head = 1; c_in[2].f[0].tail = 1;
      c_in[2].f[0].vl = 1; c_in[2].f[0].oport = 6;
      @(posedge clk) t0 = now;
      @(negedge clk) c_in = '0;
      while (!c_req_valid[2]) @(posedge clk);
      check(now - t0 == time_t'(XL + AT), "central request after X+AT");
      check(c_req_oport[2] == 6 && c_req_vl[2] == 1, "central request fields");
      $display("central request %0d cycles after write (expected %0d)", now - t0, XL + AT);
      @(negedge clk) c_grant[2] = 1;
      @(negedge clk) c_grant = '0; out_sel_valid[6] = 1; out_sel[6] = 2;
      #1 check(out_line[6].cnt == 1 && out_line[6].f[0].tail, "lone packet out");
      @(negedge clk) out_sel_valid = '0;
    end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      #1;
      // requests and grants
      c_grant = '0;
      for (int c = 0; c < NC; c++) begin
        if (c_req_valid[c]) begin
          int v; v = int'(c_req_vl[c]);
          check(!cconn[c], "no request while streaming");
          check(q[c][v].size() != 0 && q[c][v][0].head && q[c][v][0].oport == c_req_oport[c], "request matches a header");
          if (!oconn[c_req_oport[c]] && $urandom_range(1)) begin
            c_grant[c] = 1; oconn[c_req_oport[c]] = 1; osrc[c_req_oport[c]] = c; ovl[c_req_oport[c]] = v;
            cconn[c] = 1;
          end
        end
      end
      for (int o = 0; o < NP; o++) begin
        out_sel_valid[o] = oconn[o] && !(c_grant[osrc[o]]);
        out_sel[o] = 2'(osrc[o]);
      end
      #1;
      // output lines
      for (int o = 0; o < NP; o++) begin
        if (oconn[o]) begin
          int c, v; c = osrc[o]; v = ovl[o];
          check(out_line[o].cnt <= 4, "at most 4 flits per cycle");
          if (out_line[o].cnt == 4) n_four++;
          for (int i = 0; i < int'(out_line[o].cnt); i++) begin
            flit_t e; e = q[c][v].pop_front();
            check(out_line[o].f[i] == e, "output line flit");
            out_flits++;
            if (e.tail) begin oconn[o] = 0; cconn[c] = 0; n_pkts++; end
          end
        end else check(out_line[o] == '0 || !out_sel_valid[o], "idle line");
      end
      // writers
      for (int c = 0; c < NC; c++) begin
        c_in[c].cnt = 0;
        if (wleft[c] == 0 && $urandom_range(1)) begin
          int v; v = $urandom_range(NV-1);
          if (c_can_accept[c][v]) begin wleft[c] = $urandom_range(1, PK); wlen[c] = wleft[c]; widx[c] = 0; wvl[c] = v; end
        end
        if (wleft[c] > 0) begin
          int k; k = $urandom_range(1, 3); if (k > wleft[c]) k = wleft[c];
          c_in[c].cnt = CNT_W'(k);
          for (int i = 0; i < k; i++) begin
            c_in[c].f[i] = flit_t'({$urandom, $urandom, $urandom});
            c_in[c].f[i].vl = VL_W'(wvl[c]);
            c_in[c].f[i].head = (widx[c] == 0); c_in[c].f[i].tail = (widx[c] == wlen[c] - 1);
            c_in[c].f[i].oport = PORT_W'($urandom_range(NP-1));
            q[c][wvl[c]].push_back(c_in[c].f[i]);
            widx[c]++; in_flits++;
          end
          wleft[c] -= k;
        end
      end
    end
    $display("packets out %0d, 4-flit cycles %0d, flits in %0d out %0d", n_pkts, n_four, in_flits, out_flits);
    check(n_pkts > 200 && n_four > 0, "traffic at the central speed-up");
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
