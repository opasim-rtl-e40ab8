// tb_opa_damq: random test of the shared-VL buffer against a reference model.
//
// The model keeps one queue per VL with each flit's ready time, and counts
// cells from the flits written and read per VL: cells held = ceil(written/4)
// - floor(read/4). From that it derives, on its own, the expected free space,
// the admission of a whole packet per VL (reserved and maximum credits), the
// released cells, and the flits and ready flags the buffer must show. Writes
// of 1 to 4 flits and reads of up to 4 flits on random VLs run for several
// thousand cycles. Sizes: 4 VLs, 8 cells of 4 flits, 2 reserved and 5 maximum
// cells per VL, 4-flit packets, header delay 3, body delay 1.
module tb_opa_damq;
  import opa_pkg::*;

  localparam int unsigned NV = 4, QS = 32, FPC = 4, EX = 2, MX = 5, PK = 4;
  localparam int unsigned HD = 3, BD = 1, CELLS = QS / FPC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;

  logic [VL_W-1:0] wr_vl = 0, rd_vl = 0;
  logic [CNT_W-1:0] wr_cnt = 0, rd_cnt = 0;
  flit_t [MAX_SPEEDUP-1:0] wr_flit = '0, pk_flit, head_flit;
  logic [MAX_SPEEDUP-1:0] pk_ready;
  logic [NV-1:0] head_valid, head_ready, can_accept;
  logic cell_freed;
  logic [VL_W-1:0] cell_freed_vl;
  logic [$clog2(CELLS+1)-1:0] free_cells;

  opa_damq #(.NUM_VL(NV), .QUEUE_SIZE(QS), .FLITS_PER_CREDIT(FPC), .EXCL_CREDITS(EX),
             .MAX_CREDITS(MX), .PKT_FLITS(PK), .WR_W(4), .RD_W(4),
             .HDR_DELAY(HD), .BODY_DELAY(BD)) dut (
    .clk, .rst_n, .now, .wr_vl, .wr_cnt, .wr_flit, .rd_vl, .rd_cnt, .pk_flit, .pk_ready,
    .head_flit, .head_valid, .head_ready, .can_accept, .cell_freed, .cell_freed_vl, .free_cells);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  flit_t q_f [NV][$];
  time_t q_t [NV][$];
  int    wcount [NV], rcount [NV];
  int    n_freed = 0, n_refused = 0;

  function automatic int used_cells(int v);
    return (wcount[v] + FPC - 1) / FPC - rcount[v] / FPC;
  endfunction
  function automatic int free_model();
    int f; f = CELLS;
    for (int v = 0; v < NV; v++) f -= used_cells(v);
    return f;
  endfunction
  function automatic logic admit_model(int v);
    int need, def, f;
    need = (PK + FPC - 1) / FPC;
    def = 0;
    for (int u = 0; u < NV; u++) if (u != v && used_cells(u) < EX) def += EX - used_cells(u);
    f = free_model();
    if (used_cells(v) + need > MX) return 0;
    if (f < need) return 0;
    if (used_cells(v) + need <= EX) return 1;
    return (f - need) >= def;
  endfunction

  logic [15:0] tag = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int wv, wk, rv, rk, nready;
      logic expect_free;
      @(negedge clk);
      now = now + 1;
      // write: only when the buffer admits a packet on that VL
      wv = $urandom_range(NV-1);
      wk = ($urandom_range(99) < ((cyc / 1000) % 2 ? 70 : 35)) ? $urandom_range(1, 4) : 0;
      #1;
      if (!can_accept[wv]) begin wk = 0; n_refused++; end
      wr_vl = VL_W'(wv); wr_cnt = CNT_W'(wk);
      for (int i = 0; i < 4; i++) begin
        wr_flit[i] = '0;
        wr_flit[i].head = ($urandom_range(3) == 0);
        wr_flit[i].vl = VL_W'(wv);
        wr_flit[i].data = {48'(tag), 16'(i)};
      end
      tag++;
      // read: pop a random number of the ready flits at the head of a VL
      rv = $urandom_range(NV-1);
      nready = 0;
      for (int i = 0; i < 4 && i < q_f[rv].size(); i++)
        if (nready == i && time_reached(now, q_t[rv][i])) nready++;
      rk = (nready > 0) ? $urandom_range(nready) : 0;
      rd_vl = VL_W'(rv); rd_cnt = CNT_W'(rk);
      #1;
      // compare outputs with the model
      check(int'(free_cells) == free_model(), "free cells");
      for (int v = 0; v < NV; v++) begin
        check(can_accept[v] == admit_model(v), "packet admission");
        check(head_valid[v] == (q_f[v].size() != 0), "head valid");
        if (q_f[v].size() != 0) begin
          check(head_flit[v] == q_f[v][0], "head flit");
          check(head_ready[v] == time_reached(now, q_t[v][0]), "head ready");
        end
      end
      for (int i = 0; i < 4; i++) begin
        logic er;
        er = (i < q_f[rv].size()) && time_reached(now, q_t[rv][i]);
        check(pk_ready[i] == er, "peek ready");
        if (i < q_f[rv].size()) check(pk_flit[i] == q_f[rv][i], "peek flit");
      end
      expect_free = (rk > 0) && ((rcount[rv] + rk) / FPC > rcount[rv] / FPC);
      check(cell_freed == expect_free, "cell released");
      if (expect_free) begin check(cell_freed_vl == VL_W'(rv), "released VL"); n_freed++; end
      // update the model as of the coming clock edge
      for (int i = 0; i < rk; i++) begin void'(q_f[rv].pop_front()); void'(q_t[rv].pop_front()); end
      rcount[rv] += rk;
      for (int i = 0; i < wk; i++) begin
        q_f[wv].push_back(wr_flit[i]);
        q_t[wv].push_back(now + (wr_flit[i].head ? HD : BD));
      end
      wcount[wv] += wk;
    end
    $display("cells released %0d, writes refused %0d", n_freed, n_refused);
    check(n_freed > 100, "cells were recycled");
    check(n_refused > 0, "admission refused a VL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NV; v++) begin wcount[v] = 0; rcount[v] = 0; end
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
