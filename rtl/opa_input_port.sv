// opa_input_port: one router input port (input buffer, routing unit, input
// arbiter).
//
// Flits come from the link, at most one per cycle (in_valid/in_flit), and
// are stored in the shared-VL input buffer under their VL. A header flit is
// routed on the way in: the routing unit turns its destination node into an
// output port, kept in the flit's oport field. The model's latencies are
// added to the ready stamps: body flits become ready SB_LAT cycles after
// arrival, header flits SB_LAT + RT_LAT + AT_LAT cycles after (storing,
// routing, then the arbitration delay before the header can win the
// allocator). Charging AT before the grant rather than after is this
// design's choice.
//
// Toward the MPort crossbar the port is an opa_buf_port: it requests the
// output port of its chosen VL's header and, once granted, streams the packet
// at MPORT_SPEEDUP (3) flits per cycle. Every cell (credit) the buffer frees
// is returned to the upstream sender on credit_valid/credit_vl in the same
// cycle.
module opa_input_port
  import opa_pkg::*;
#(
  parameter int unsigned NUM_PORTS        = DEF_NUM_PORTS,
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned RT_LAT           = DEF_RT_LAT,
  parameter int unsigned SB_LAT           = DEF_SB_LAT,
  parameter int unsigned AT_LAT           = DEF_AT_LAT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  // link side
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              credit_valid,
  output logic [VL_W-1:0]   credit_vl,
  // routing table configuration
  input  logic              cfg_we,
  input  logic [NODE_W-1:0] cfg_node,
  input  logic [PORT_W-1:0] cfg_port,
  // allocation and crossbar side
  output logic              req_valid,
  output logic [VL_W-1:0]   req_vl,
  output logic [PORT_W-1:0] req_oport,
  input  logic              grant,
  output bundle_t           xfer,
  output logic              busy
);
  logic [PORT_W-1:0]       rt_port;
  flit_t [MAX_SPEEDUP-1:0] wr_flit;

  opa_route_unit #(.NUM_PORTS(NUM_PORTS)) u_rt (
    .clk, .rst_n, .cfg_we, .cfg_node, .cfg_port,
    .dest(hdr_dest(in_flit.data)), .oport(rt_port)
  );

  always_comb begin
    wr_flit = '0;
    wr_flit[0] = in_flit;
    wr_flit[0].oport = in_flit.head ? rt_port : '0;
  end

  opa_buf_port #(
    .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
    .WR_W(1), .RD_W(MPORT_SPEEDUP),
    .HDR_DELAY(SB_LAT + RT_LAT + AT_LAT), .BODY_DELAY(SB_LAT)
  ) u_port (
    .clk, .rst_n, .now,
    .wr_vl(in_flit.vl), .wr_cnt(CNT_W'(in_valid)), .wr_flit,
    .can_accept(), .cell_freed(credit_valid), .cell_freed_vl(credit_vl),
    .req_valid, .req_vl, .req_oport, .grant, .xfer, .busy
  );

endmodule
