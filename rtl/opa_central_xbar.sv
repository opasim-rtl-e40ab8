// opa_central_xbar: central crossbar with its buffers (24:48 by default).
//
// Each MPort has CLINKS (2) links into the central crossbar, and each link
// ends in a central buffer that holds flits of all VLs in shared storage.
// Central buffers take up to MPORT_SPEEDUP (3) flits per cycle. They run a
// virtual-allocation step of their own, since the central ports have VLs
// too. Toward the output buffers they stream up to CENTRAL_SPEEDUP (4) flits
// per cycle.
//
// The central buffers add no storing latency (they are treated as ideal
// buffers). Flits arriving from the MPort crossbar become ready X_LAT cycles
// after they are written, and header flits X_LAT + AT_LAT cycles after, for
// the second allocation.
//
// Each central buffer presents one request (VL, output port) to the output
// arbiters. grant comes back from the output port that chose it. Output line
// o carries the bundle of the central buffer that output port o has locked
// (out_sel_valid/out_sel).
module opa_central_xbar
  import opa_pkg::*;
#(
  parameter int unsigned NUM_CBUF         = DEF_NUM_PORTS / DEF_PORTS_PER_MPORT * DEF_CLINKS_PER_MPORT,
  parameter int unsigned NUM_PORTS        = DEF_NUM_PORTS,
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned AT_LAT           = DEF_AT_LAT,
  parameter int unsigned X_LAT            = DEF_X_LAT
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  time_t                                  now,
  // from the MPort crossbars
  input  bundle_t [NUM_CBUF-1:0]                 c_in,
  output logic    [NUM_CBUF-1:0][NUM_VL-1:0]     c_can_accept,
  // allocation toward the output ports
  output logic    [NUM_CBUF-1:0]                 c_req_valid,
  output logic    [NUM_CBUF-1:0][VL_W-1:0]       c_req_vl,
  output logic    [NUM_CBUF-1:0][PORT_W-1:0]     c_req_oport,
  input  logic    [NUM_CBUF-1:0]                 c_grant,
  output logic    [NUM_CBUF-1:0]                 c_busy,
  // output lines
  input  logic    [NUM_PORTS-1:0]                out_sel_valid,
  input  logic    [NUM_PORTS-1:0][$clog2(NUM_CBUF)-1:0] out_sel,
  output bundle_t [NUM_PORTS-1:0]                out_line
);
  bundle_t [NUM_CBUF-1:0] c_xfer;

  for (genvar c = 0; c < NUM_CBUF; c++) begin : g_cbuf
    opa_buf_port #(
      .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
      .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
      .WR_W(MPORT_SPEEDUP), .RD_W(CENTRAL_SPEEDUP),
      .HDR_DELAY(X_LAT + AT_LAT), .BODY_DELAY(X_LAT)
    ) u_cbuf (
      .clk, .rst_n, .now,
      .wr_vl(c_in[c].f[0].vl), .wr_cnt(c_in[c].cnt), .wr_flit(c_in[c].f),
      .can_accept(c_can_accept[c]), .cell_freed(), .cell_freed_vl(),
      .req_valid(c_req_valid[c]), .req_vl(c_req_vl[c]), .req_oport(c_req_oport[c]),
      .grant(c_grant[c]), .xfer(c_xfer[c]), .busy(c_busy[c])
    );
  end

  always_comb
    for (int o = 0; o < NUM_PORTS; o++)
      out_line[o] = out_sel_valid[o] ? c_xfer[out_sel[o]] : '0;

endmodule
