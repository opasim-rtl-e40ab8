// tb_opa_mport_xbar: random test of the 4:6 MPort crossbar (MPort 0 of an
// 8-port router, 4 VLs).
//
// Idle inputs request random output ports. Ports 0..3 are local, 4..7 are
// in the other MPort and need a central link. A reference holds the two
// central links' round-robin pointers and locks. It checks which inputs are
// granted: only requests for another MPort whose VL has room in that central
// buffer, never one input on both links, link 1 taking only what link 0 left.
// A granted input then streams random bundles until a tail. The test checks
// that each central link carries exactly its locked input's bundles and is
// released after the tail, and that the local lines carry the input the
// output ports select.
module tb_opa_mport_xbar;
  import opa_pkg::*;
  localparam int P = 4, CL = 2, NV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0] in_req_valid = 0, in_cgrant, loc_sel_valid = 0;
  logic [P-1:0][VL_W-1:0] in_req_vl = '0;
  logic [P-1:0][PORT_W-1:0] in_req_oport = '0;
  bundle_t [P-1:0] in_xfer = '0, loc_out;
  logic [P-1:0][1:0] loc_sel = '0;
  logic [CL-1:0][NV-1:0] c_can_accept = '0;
  bundle_t [CL-1:0] c_out;

  opa_mport_xbar #(.MPORT_ID(0), .PORTS_PER_MPORT(P), .CLINKS(CL), .NUM_VL(NV)) dut (
    .clk, .rst_n, .in_req_valid, .in_req_vl, .in_req_oport, .in_xfer, .in_cgrant,
    .loc_sel_valid, .loc_sel, .loc_out, .c_can_accept, .c_out);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int last [CL];
  logic lk [CL]; int src [CL];
  logic busy [P];
  int n_grants = 0, n_both = 0, n_blocked = 0;

  initial begin
    for (int l = 0; l < CL; l++) begin last[l] = P - 1; lk[l] = 0; src[l] = 0; end
    for (int i = 0; i < P; i++) busy[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      logic [P-1:0] taken, eg;
      int gl [CL];
      @(negedge clk);
      c_can_accept = (CL*NV)'($urandom) | (CL*NV)'($urandom);
      for (int i = 0; i < P; i++) begin
        in_req_valid[i] = !busy[i] && $urandom_range(1);
        in_req_vl[i]    = VL_W'($urandom_range(NV-1));
        in_req_oport[i] = PORT_W'($urandom_range(7));
        in_xfer[i] = bundle_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        in_xfer[i].cnt = busy[i] ? CNT_W'($urandom_range(3)) : '0;
        for (int k = 0; k < MAX_SPEEDUP; k++) in_xfer[i].f[k].tail = 1'b0;
        if (in_xfer[i].cnt != 0 && $urandom_range(3) == 0) in_xfer[i].f[in_xfer[i].cnt - 1].tail = 1'b1;
        loc_sel_valid[i] = 1'($urandom);
        loc_sel[i] = 2'($urandom);
      end
      #1;
      // reference central arbitration
      taken = '0; eg = '0;
      for (int l = 0; l < CL; l++) begin
        gl[l] = -1;
        if (!lk[l])
          for (int k = 1; k <= P; k++) begin
            int i; i = (last[l] + k) % P;
            if (gl[l] < 0 && in_req_valid[i] && !taken[i] && in_req_oport[i] >= 4 && c_can_accept[l][in_req_vl[i]])
              gl[l] = i;
          end
        if (gl[l] >= 0) begin taken[gl[l]] = 1; eg[gl[l]] = 1; end
      end
      check(in_cgrant == eg, "central grants");
      for (int i = 0; i < P; i++)
        if (in_req_valid[i] && in_req_oport[i] >= 4 && !eg[i]) n_blocked++;
      for (int l = 0; l < CL; l++) begin
        if (lk[l]) check(c_out[l] == in_xfer[src[l]], "central link carries its input");
        else       check(c_out[l] == '0, "idle central link");
      end
      for (int j = 0; j < P; j++)
        check(loc_out[j] == (loc_sel_valid[j] ? in_xfer[loc_sel[j]] : '0), "local line");
      if (eg != 0) n_grants++;
      if (lk[0] && lk[1]) n_both++;
      // model update
      for (int l = 0; l < CL; l++) begin
        if (lk[l] && bundle_has_tail(in_xfer[src[l]])) begin lk[l] = 0; busy[src[l]] = 0; end
        else if (!lk[l] && gl[l] >= 0) begin lk[l] = 1; src[l] = gl[l]; last[l] = gl[l]; busy[gl[l]] = 1; end
      end
    end
    $display("grant cycles %0d, both links busy %0d, blocked requests %0d", n_grants, n_both, n_blocked);
    check(n_both > 0 && n_blocked > 0, "both links and blocking exercised");
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
