// opa_router: the OPA router model (48 ports by default).
//
// Ports are grouped in MPorts of PORTS_PER_MPORT (4). A packet entering input
// port i is stored in i's input buffer, routed, and then moved as a whole
// packet in one of two ways:
//   * if the output port is in the same MPort: input buffer -> MPort
//     crossbar -> output buffer (one allocation);
//   * otherwise: input buffer -> MPort crossbar -> a central buffer of the
//     same MPort -> central crossbar -> output buffer (two allocations).
// Allocation is in two steps. Each buffer's input arbiter picks a VL (VA).
// The central-buffer arbiters (in opa_mport_xbar) and the output arbiters (in
// opa_output_port) then pick among the buffers requesting them (SA). A grant
// holds the path until the tail flit has crossed. Input -> output/central
// moves 3 flits per cycle, central -> output 4. Every link port moves 1 flit
// per cycle, with credit flow control per VL.
//
// Order: packets turning inside an MPort keep their order per input, VL and
// output. Packets through the central crossbar may use either of the MPort's
// two central buffers, so a later packet can overtake an earlier one.
//
// Latency of a header with no contention, in cycles: SB+RT+AT (input) + 1 +
// X + SB (output) for a local turn. For a turn through the central crossbar
// it is SB+RT+AT + 1 + X+AT + 1 + X+SB. Each 1 is the cycle between a grant
// and the first flit crossing, which is this design's choice. The FLY time
// of the links is added by opa_link. Defaults are RT=32, SB=50, AT=16, X=2.
//
// Interface: in_* is the receive side of each port (flits in, credits back to
// the upstream sender) and out_* the transmit side (flits out, credits from
// the downstream receiver). Downstream receivers are assumed to be buffers of
// QUEUE_SIZE flits that free cells like opa_damq. cfg_* writes entry cfg_node
// of input port cfg_iport's routing table.
module opa_router
  import opa_pkg::*;
#(
  parameter int unsigned NUM_PORTS        = DEF_NUM_PORTS,
  parameter int unsigned PORTS_PER_MPORT  = DEF_PORTS_PER_MPORT,
  parameter int unsigned CLINKS           = DEF_CLINKS_PER_MPORT,
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned RT_LAT           = DEF_RT_LAT,
  parameter int unsigned SB_LAT           = DEF_SB_LAT,
  parameter int unsigned AT_LAT           = DEF_AT_LAT,
  parameter int unsigned X_LAT            = DEF_X_LAT
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // receive side of every port
  input  logic  [NUM_PORTS-1:0]           in_valid,
  input  flit_t [NUM_PORTS-1:0]           in_flit,
  output logic  [NUM_PORTS-1:0]           in_credit_valid,
  output logic  [NUM_PORTS-1:0][VL_W-1:0] in_credit_vl,
  // transmit side of every port
  output logic  [NUM_PORTS-1:0]           out_valid,
  output flit_t [NUM_PORTS-1:0]           out_flit,
  input  logic  [NUM_PORTS-1:0]           out_credit_valid,
  input  logic  [NUM_PORTS-1:0][VL_W-1:0] out_credit_vl,
  // routing tables
  input  logic                            cfg_we,
  input  logic  [PORT_W-1:0]              cfg_iport,
  input  logic  [NODE_W-1:0]              cfg_node,
  input  logic  [PORT_W-1:0]              cfg_port
);
  localparam int unsigned P   = PORTS_PER_MPORT;
  localparam int unsigned NM  = NUM_PORTS / P;
  localparam int unsigned NC  = NM * CLINKS;
  localparam int unsigned PW  = $clog2(P);
  localparam int unsigned CW  = $clog2(NC);

  // the port count must fill whole MPorts, and at least two of them
  if (NUM_PORTS % PORTS_PER_MPORT != 0 || NUM_PORTS < 2 * PORTS_PER_MPORT) begin : g_bad_size
    $error("opa_router: NUM_PORTS must be a multiple of PORTS_PER_MPORT, at least two MPorts");
  end

  time_t now;
  always_ff @(posedge clk)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  // input ports
  logic    [NUM_PORTS-1:0]             i_req_valid, i_grant, i_busy, i_cgrant;
  logic    [NUM_PORTS-1:0][VL_W-1:0]   i_req_vl;
  logic    [NUM_PORTS-1:0][PORT_W-1:0] i_req_oport;
  bundle_t [NUM_PORTS-1:0]             i_xfer;
  // central crossbar
  bundle_t [NC-1:0]                    c_in;
  logic    [NC-1:0][NUM_VL-1:0]        c_can_accept;
  logic    [NC-1:0]                    c_req_valid, c_grant, c_busy;
  logic    [NC-1:0][VL_W-1:0]          c_req_vl;
  logic    [NC-1:0][PORT_W-1:0]        c_req_oport;
  // output ports
  logic    [NUM_PORTS-1:0][P-1:0]      o_loc_req, o_loc_grant;
  logic    [NUM_PORTS-1:0][NC-1:0]     o_cen_req, o_cen_grant;
  logic    [NUM_PORTS-1:0][P-1:0][VL_W-1:0] o_loc_vl;
  logic    [NUM_PORTS-1:0]             o_loc_sel_valid, o_cen_sel_valid;
  logic    [NUM_PORTS-1:0][PW-1:0]     o_loc_sel;
  logic    [NUM_PORTS-1:0][CW-1:0]     o_cen_sel;
  bundle_t [NUM_PORTS-1:0]             o_loc_in, o_cen_in;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    opa_input_port #(
      .NUM_PORTS(NUM_PORTS), .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE),
      .FLITS_PER_CREDIT(FLITS_PER_CREDIT), .EXCL_CREDITS(EXCL_CREDITS),
      .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
      .RT_LAT(RT_LAT), .SB_LAT(SB_LAT), .AT_LAT(AT_LAT)
    ) u_in (
      .clk, .rst_n, .now,
      .in_valid(in_valid[i]), .in_flit(in_flit[i]),
      .credit_valid(in_credit_valid[i]), .credit_vl(in_credit_vl[i]),
      .cfg_we(cfg_we && cfg_iport == PORT_W'(i)), .cfg_node, .cfg_port,
      .req_valid(i_req_valid[i]), .req_vl(i_req_vl[i]), .req_oport(i_req_oport[i]),
      .grant(i_grant[i]), .xfer(i_xfer[i]), .busy(i_busy[i])
    );
  end

  for (genvar m = 0; m < NM; m++) begin : g_mport
    logic [P-1:0] loc_sel_valid;
    logic [P-1:0][PW-1:0] loc_sel;
    bundle_t [P-1:0] loc_out;
    bundle_t [CLINKS-1:0] c_out;
    for (genvar j = 0; j < P; j++) begin : g_sel
      assign loc_sel_valid[j] = o_loc_sel_valid[m*P+j];
      assign loc_sel[j]       = o_loc_sel[m*P+j];
      assign o_loc_in[m*P+j]  = loc_out[j];
    end
    for (genvar l = 0; l < CLINKS; l++) begin : g_cl
      assign c_in[m*CLINKS+l] = c_out[l];
    end
    opa_mport_xbar #(
      .MPORT_ID(m), .PORTS_PER_MPORT(P), .CLINKS(CLINKS), .NUM_VL(NUM_VL)
    ) u_mx (
      .clk, .rst_n,
      .in_req_valid(i_req_valid[m*P +: P]), .in_req_vl(i_req_vl[m*P +: P]),
      .in_req_oport(i_req_oport[m*P +: P]), .in_xfer(i_xfer[m*P +: P]),
      .in_cgrant(i_cgrant[m*P +: P]),
      .loc_sel_valid, .loc_sel, .loc_out,
      .c_can_accept(c_can_accept[m*CLINKS +: CLINKS]), .c_out
    );
  end

  opa_central_xbar #(
    .NUM_CBUF(NC), .NUM_PORTS(NUM_PORTS), .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE),
    .FLITS_PER_CREDIT(FLITS_PER_CREDIT), .EXCL_CREDITS(EXCL_CREDITS),
    .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS), .AT_LAT(AT_LAT), .X_LAT(X_LAT)
  ) u_cx (
    .clk, .rst_n, .now,
    .c_in, .c_can_accept,
    .c_req_valid, .c_req_vl, .c_req_oport, .c_grant, .c_busy,
    .out_sel_valid(o_cen_sel_valid), .out_sel(o_cen_sel), .out_line(o_cen_in)
  );

  // request steering: each request names exactly one output port
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int j = 0; j < P; j++) begin
        o_loc_req[o][j] = i_req_valid[(o/P)*P+j] && (int'(i_req_oport[(o/P)*P+j]) == o);
        o_loc_vl[o][j]  = i_req_vl[(o/P)*P+j];
      end
      for (int c = 0; c < NC; c++)
        o_cen_req[o][c] = c_req_valid[c] && (int'(c_req_oport[c]) == o);
    end
    for (int i = 0; i < NUM_PORTS; i++) begin
      i_grant[i] = i_cgrant[i];
      for (int j = 0; j < P; j++)
        i_grant[i] = i_grant[i] | o_loc_grant[(i/P)*P+j][i%P];
    end
    for (int c = 0; c < NC; c++) begin
      c_grant[c] = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) c_grant[c] = c_grant[c] | o_cen_grant[o][c];
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    opa_output_port #(
      .NUM_CBUF(NC), .PORTS_PER_MPORT(P), .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE),
      .DS_QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
      .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
      .SB_LAT(SB_LAT), .X_LAT(X_LAT)
    ) u_out (
      .clk, .rst_n, .now,
      .loc_req(o_loc_req[o]), .loc_vl(o_loc_vl[o]),
      .cen_req(o_cen_req[o]), .cen_vl(c_req_vl),
      .loc_grant(o_loc_grant[o]), .cen_grant(o_cen_grant[o]),
      .loc_sel_valid(o_loc_sel_valid[o]), .loc_sel(o_loc_sel[o]),
      .cen_sel_valid(o_cen_sel_valid[o]), .cen_sel(o_cen_sel[o]),
      .loc_in(o_loc_in[o]), .cen_in(o_cen_in[o]),
      .out_valid(out_valid[o]), .out_flit(out_flit[o]),
      .credit_valid(out_credit_valid[o]), .credit_vl(out_credit_vl[o])
    );
  end

  // a buffer is granted by at most one arbiter per cycle
  always_ff @(posedge clk)
    if (rst_n)
      for (int o = 0; o < NUM_PORTS; o++)
        assert ($onehot0(o_loc_grant[o])) else $error("opa_router: double local grant");

endmodule
