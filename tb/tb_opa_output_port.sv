// tb_opa_output_port: output port test (4 local and 4 central sources,
// 4 VLs, 8 cells of 4 flits, 2 reserved and 5 maximum cells per VL, 4-flit
// packets, X=1, SB=2).
//
// First a lone packet measures the delay from grant to link: the header must
// leave X+SB cycles after it is written. Then the 8 sources send random
// packets (1 to 4 flits, random VL). They request the port, wait for the
// grant, and stream up to 3 (local) or 4 (central) flits a cycle, sometimes
// fewer or none. The downstream buffer is a model that drains slowly in
// some phases and quickly in others. It returns one credit per freed
// cell. The checks:
// - the crossbar selects point at the granted source, and there is at most
//   one grant at a time;
// - each flit leaves in order within its VL, and not before X+SB cycles
//   after it was written;
// - the link carries one packet at a time;
// - a header only leaves when the downstream buffer admits a whole packet
//   on its VL;
// - the link is never idle while a flit could leave;
// - every source is served, VLs alternate, and credit stalls do happen.
module tb_opa_output_port;
  import opa_pkg::*;
  localparam int P = 4, NC = 4, NS = P + NC, NV = 4, QS = 32, FPC = 4, EX = 2, MX = 5, PK = 4;
  localparam int SB = 2, XL = 1, CELLS = QS / FPC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;

  logic [P-1:0] loc_req = '0, loc_grant;
  logic [P-1:0][VL_W-1:0] loc_vl = '0;
  logic [NC-1:0] cen_req = '0, cen_grant;
  logic [NC-1:0][VL_W-1:0] cen_vl = '0;
  logic loc_sel_valid, cen_sel_valid;
  logic [1:0] loc_sel, cen_sel;
  bundle_t loc_in = '0, cen_in = '0;
  logic out_valid;
  flit_t out_flit;
  logic credit_valid = 0;
  logic [VL_W-1:0] credit_vl = '0;

  opa_output_port #(.NUM_CBUF(NC), .PORTS_PER_MPORT(P), .NUM_VL(NV), .QUEUE_SIZE(QS),
    .DS_QUEUE_SIZE(QS), .FLITS_PER_CREDIT(FPC), .EXCL_CREDITS(EX), .MAX_CREDITS(MX),
    .PKT_FLITS(PK), .SB_LAT(SB), .X_LAT(XL)) dut (
    .clk, .rst_n, .now, .loc_req, .loc_vl, .cen_req, .cen_vl, .loc_grant, .cen_grant,
    .loc_sel_valid, .loc_sel, .cen_sel_valid, .cen_sel, .loc_in, .cen_in,
    .out_valid, .out_flit, .credit_valid, .credit_vl);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  // sources
  int s_len [NS], s_vl [NS], s_idx [NS], s_left_pkts [NS], s_served [NS];
  logic s_has [NS], s_granted [NS];
  // expected flits per VL and their ready times
  flit_t e_f [NV][$];
  time_t e_t [NV][$];
  // downstream model, as seen by the sender
  int ds_sent [NV], ds_cred [NV], ds_held [NV], ds_read [NV];
  int cred_q [$];
  logic tx_open = 0; int tx_vl = 0;
  int n_pkts_out = 0, n_vl_switch = 0, n_credit_block = 0, last_out_vl = -1;
  int dr_pct = 30;

  function automatic int ds_used(int v);
    return (ds_sent[v] + FPC - 1) / FPC - ds_cred[v];
  endfunction
  function automatic logic ds_admit(int v);
    int free, def;
    free = CELLS; def = 0;
    for (int u = 0; u < NV; u++) begin
      free -= ds_used(u);
      if (u != v && ds_used(u) < EX) def += EX - ds_used(u);
    end
    return cell_admit(ds_used(v), free, def, (PK + FPC - 1) / FPC, EX, MX);
  endfunction

  function automatic flit_t mk(int s, int i);
    flit_t f;
    f = '0;
    f.head = (i == 0); f.tail = (i == s_len[s] - 1); f.vl = VL_W'(s_vl[s]);
    f.data = {32'(s_served[s]), 16'(s), 16'(i)};
    return f;
  endfunction

  always @(negedge clk) now <= now + 1;

  task automatic step();
    // one cycle, called right after the negative edge
    int gl, gc;
    // requests from sources with a packet waiting
    for (int s = 0; s < NS; s++) begin
      if (!s_has[s] && s_left_pkts[s] > 0 && $urandom_range(3) == 0) begin
        s_has[s] = 1; s_granted[s] = 0; s_idx[s] = 0;
        s_len[s] = $urandom_range(1, PK); s_vl[s] = $urandom_range(NV-1);
      end
    end
    for (int i = 0; i < P; i++) begin loc_req[i] = s_has[i] && !s_granted[i]; loc_vl[i] = VL_W'(s_vl[i]); end
    for (int c = 0; c < NC; c++) begin cen_req[c] = s_has[P+c] && !s_granted[P+c]; cen_vl[c] = VL_W'(s_vl[P+c]); end
    // lines from the source the port selected
    loc_in = '0; cen_in = '0;
    #1;
    for (int s = 0; s < NS; s++) begin
      logic sel;
      sel = (s < P) ? (loc_sel_valid && loc_sel == 2'(s)) : (cen_sel_valid && cen_sel == 2'(s - P));
      check(sel == (s_has[s] && s_granted[s]), "line select matches the granted source");
      if (sel) begin
        int k; bundle_t b;
        k = $urandom_range(0, (s < P) ? 3 : 4);
        if (k > s_len[s] - s_idx[s]) k = s_len[s] - s_idx[s];
        b = '0; b.cnt = CNT_W'(k);
        for (int i = 0; i < k; i++) begin
          b.f[i] = mk(s, s_idx[s]);
          e_f[s_vl[s]].push_back(b.f[i]);
          e_t[s_vl[s]].push_back(now + XL + SB);
          s_idx[s]++;
        end
        if (s < P) loc_in = b; else cen_in = b;
        if (s_idx[s] == s_len[s]) begin s_has[s] = 0; s_left_pkts[s]--; s_served[s]++; end
      end
    end
    // credit for a cell freed downstream
    credit_valid = 0;
    if (cred_q.size() != 0) begin credit_valid = 1; credit_vl = VL_W'(cred_q.pop_front()); end
    #1;
    gl = $countones(loc_grant); gc = $countones(cen_grant);
    check(gl + gc <= 1, "one grant at a time");
    for (int i = 0; i < P; i++) if (loc_grant[i]) begin check(loc_req[i], "grant has a request"); s_granted[i] = 1; end
    for (int c = 0; c < NC; c++) if (cen_grant[c]) begin check(cen_req[c], "grant has a request"); s_granted[P+c] = 1; end
    // link
    begin
      logic can_go; int v;
      can_go = 0;
      if (tx_open) can_go = e_f[tx_vl].size() != 0 && time_reached(now, e_t[tx_vl][0]);
      else
        for (int u = 0; u < NV; u++)
          if (e_f[u].size() != 0 && time_reached(now, e_t[u][0]) && e_f[u][0].head) begin
            if (ds_admit(u)) can_go = 1; else n_credit_block++;
          end
      check(out_valid == can_go, "link busy exactly when a flit can leave");
      if (out_valid) begin
        v = int'(out_flit.vl);
        check(e_f[v].size() != 0 && out_flit == e_f[v][0], "flit order within a VL");
        if (e_f[v].size() != 0) begin
          check(time_reached(now, e_t[v][0]), "flit leaves after X+SB");
          void'(e_f[v].pop_front()); void'(e_t[v].pop_front());
        end
        if (tx_open) check(v == tx_vl, "one packet at a time on the link");
        else begin
          check(out_flit.head && ds_admit(v), "header only with room downstream");
          if (last_out_vl >= 0 && last_out_vl != v) n_vl_switch++;
          last_out_vl = v;
        end
        tx_open = !out_flit.tail; tx_vl = v;
        if (out_flit.tail) n_pkts_out++;
        ds_sent[v]++; ds_held[v]++;
        check(ds_used(v) <= MX, "downstream VL within its maximum");
      end
      if (credit_valid) ds_cred[int'(credit_vl)]++;
    end
    // downstream drains one flit now and then
    if ($urandom_range(99) < dr_pct) begin
      int u; u = $urandom_range(NV-1);
      if (ds_held[u] > 0) begin
        ds_held[u]--; ds_read[u]++;
        if (ds_read[u] % FPC == 0) cred_q.push_back(u);
      end
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin s_has[s] = 0; s_granted[s] = 0; s_left_pkts[s] = 0; s_served[s] = 0; end
    for (int v = 0; v < NV; v++) begin ds_sent[v] = 0; ds_cred[v] = 0; ds_held[v] = 0; ds_read[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone packet: source 5 (central), latency from write to link
    begin
      time_t tw;
      s_left_pkts[5] = 1;
      while (!s_has[5]) begin @(negedge clk); step(); end
      while (s_idx[5] == 0) begin @(negedge clk); step(); tw = now; end
      while (!out_valid) begin @(negedge clk); step(); end
      check(now - tw == time_t'(XL + SB), "header on the link X+SB after the write");
      $display("header on the link %0d cycles after the write (expected %0d)", now - tw, XL + SB);
    end
    for (int s = 0; s < NS; s++) s_left_pkts[s] = 120;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      dr_pct = ((cyc / 1500) % 2) ? 90 : 25;
      @(negedge clk); step();
    end
    for (int s = 0; s < NS; s++) begin
      check(s_left_pkts[s] == 0, "every source served");
      check(e_f[s % NV].size() == 0, "every flit left");
    end
    $display("packets out %0d, VL switches %0d, credit-blocked headers %0d", n_pkts_out, n_vl_switch, n_credit_block);
    check(n_pkts_out == NS * 120 + 1, "packet count");
    check(n_vl_switch > 0 && n_credit_block > 0, "VL switching and credit blocking happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
