// opa_pkg: types, default sizes and shared functions of the OPA router model.
//
// The defaults are the first-generation configuration of the router model:
// 48 ports grouped in MPorts of 4, 2 central-crossbar links per MPort, 8 VLs,
// 256-flit queues, 64-bit flits, 16-flit packets, credits of 4 flits, 16
// reserved and 48 maximum credits per VL, and the stage latencies RT=32,
// SB=50, AT=16, X=2, FLY=8 cycles. Field widths (VL_W, PORT_W, NODE_W,
// TIME_W) and the header payload layout are this design's own choices.
//
// Buffer space is counted in cells. One cell holds FLITS_PER_CREDIT flits of
// one VL and is what one credit stands for, so a 256-flit queue has 64 cells.
package opa_pkg;

  // ---- default sizes --------------------------------------------------------
  localparam int unsigned DEF_NUM_PORTS       = 48;
  localparam int unsigned DEF_PORTS_PER_MPORT = 4;
  localparam int unsigned DEF_CLINKS_PER_MPORT = 2;   // links MPort -> central xbar
  localparam int unsigned DEF_NUM_VL          = 8;
  localparam int unsigned DEF_QUEUE_SIZE      = 256;  // flits
  localparam int unsigned DEF_FLITS_PER_CREDIT = 4;
  localparam int unsigned DEF_EXCL_CREDITS    = 16;   // reserved cells per VL
  localparam int unsigned DEF_MAX_CREDITS     = 48;   // cell limit per VL
  localparam int unsigned DEF_PACKET_SIZE     = 16;   // flits

  // crossbar speed-ups (flits per cycle)
  localparam int unsigned MPORT_SPEEDUP   = 3;  // input buffer -> output/central buffer
  localparam int unsigned CENTRAL_SPEEDUP = 4;  // central buffer -> output buffer
  localparam int unsigned MAX_SPEEDUP     = 4;  // width of a crossbar bundle

  // stage latencies in cycles
  localparam int unsigned DEF_RT_LAT  = 32;
  localparam int unsigned DEF_SB_LAT  = 50;
  localparam int unsigned DEF_AT_LAT  = 16;
  localparam int unsigned DEF_X_LAT   = 2;
  localparam int unsigned DEF_FLY_LAT = 8;

  // ---- field widths -----------------------------------------------------------
  localparam int unsigned FLIT_BITS = 64;
  localparam int unsigned VL_W      = 3;   // up to 8 VLs
  localparam int unsigned PORT_W    = 8;   // up to 256 router ports
  localparam int unsigned NODE_W    = 8;   // destination node identifier
  localparam int unsigned TIME_W    = 32;  // cycle time stamps
  localparam int unsigned CNT_W     = 3;   // 0..MAX_SPEEDUP flits in a bundle

  typedef logic [TIME_W-1:0] time_t;

  // A flit as it moves through the router. `oport` is written by the routing
  // unit for header flits and carried by the whole packet inside the router;
  // on a link it is don't-care.
  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [VL_W-1:0]      vl;
    logic [PORT_W-1:0]    oport;
    logic [FLIT_BITS-1:0] data;
  } flit_t;

  // Up to MAX_SPEEDUP flits of one packet crossing a crossbar in one cycle;
  // f[0] is the oldest. cnt = 0 means nothing moves.
  typedef struct packed {
    logic [CNT_W-1:0]          cnt;
    flit_t [MAX_SPEEDUP-1:0]   f;
  } bundle_t;

  // Header payload layout (this design's choice):
  //   data[7:0]   destination node     data[15:8]  source node
  //   data[31:16] packet length (flits) data[63:32] injection cycle
  // Body flits carry data[31:16] = packet sequence number, data[7:0] = flit
  // index, data[15:8] = source node, data[63:32] = injection cycle.
  function automatic logic [NODE_W-1:0] hdr_dest(input logic [FLIT_BITS-1:0] d);
    return d[NODE_W-1:0];
  endfunction

  // time comparison that tolerates counter wrap (stamps lie < 2^31 ahead)
  function automatic logic time_reached(input time_t now, input time_t stamp);
    time_t diff;
    diff = now - stamp;
    return !diff[TIME_W-1];
  endfunction

  // Admission rule shared by every buffer and every credit mirror: can VL `v`
  // take `need` more cells? It may never exceed `max_c` cells. Inside its
  // reserved `excl_c` cells it only needs free cells; beyond them it must
  // leave enough free cells for the unused reservations of the other VLs.
  function automatic logic cell_admit(
      input int unsigned used_v,       // cells held by VL v
      input int unsigned free_cells,   // unallocated cells
      input int unsigned deficit_other,// sum over other VLs of max(0, excl_c - used)
      input int unsigned need,
      input int unsigned excl_c,
      input int unsigned max_c);
    if (used_v + need > max_c)       return 1'b0;
    if (free_cells < need)           return 1'b0;
    if (used_v + need <= excl_c)     return 1'b1;
    return (free_cells - need) >= deficit_other;
  endfunction

  // does a bundle carry the tail flit of its packet?
  function automatic logic bundle_has_tail(input bundle_t b);
    logic t;
    t = 1'b0;
    for (int i = 0; i < MAX_SPEEDUP; i++)
      if (i < int'(b.cnt) && b.f[i].tail) t = 1'b1;
    return t;
  endfunction

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
