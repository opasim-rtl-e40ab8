// opa_system: a single OPA router with one NIC on each port.
//
// This is the evaluated configuration: one 48-port router (opa_router) with
// 48 end nodes. Node n sits on port n: NIC n's transmit link feeds router
// input n, and router output n feeds NIC n's receive link. Each direction of
// each link adds FLY_LAT cycles (opa_link), to flits and to returned credits.
//
// Interface per node n: msg_* hands a message (destination node, VL, length
// in flits) to NIC n. rx_valid/rx_flit/rx_latency show each flit delivered to
// node n, with the end-to-end latency of header flits. cfg_* programs the
// routing tables, whose reset contents route node n to port n.
//
// With no contention, a header's latency from injection to arrival is
// FLY (injection link) + SB+RT+AT + 1 + X + SB + FLY (delivery link) for a
// turn inside one MPort: 8+50+32+16+1+2+50+8 = 167 cycles with the defaults.
// The 1 is the cycle from a grant to the first flit moving. A turn through
// the central crossbar adds AT + 1 + X (186). The OpaSim model's formula has
// the same terms without the two grant cycles; INJ, the NIC's own injection
// time, is not modelled.
module opa_system
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
  parameter int unsigned X_LAT            = DEF_X_LAT,
  parameter int unsigned FLY_LAT          = DEF_FLY_LAT
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // messages, one interface per node
  input  logic  [NUM_PORTS-1:0]             msg_valid,
  output logic  [NUM_PORTS-1:0]             msg_ready,
  input  logic  [NUM_PORTS-1:0][NODE_W-1:0] msg_dest,
  input  logic  [NUM_PORTS-1:0][VL_W-1:0]   msg_vl,
  input  logic  [NUM_PORTS-1:0][15:0]       msg_len,
  // delivered flits
  output logic  [NUM_PORTS-1:0]             rx_valid,
  output flit_t [NUM_PORTS-1:0]             rx_flit,
  output time_t [NUM_PORTS-1:0]             rx_latency,
  // routing tables
  input  logic                              cfg_we,
  input  logic  [PORT_W-1:0]                cfg_iport,
  input  logic  [NODE_W-1:0]                cfg_node,
  input  logic  [PORT_W-1:0]                cfg_port
);
  time_t now;
  always_ff @(posedge clk)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  logic  [NUM_PORTS-1:0]           n_tx_valid, r_in_valid, r_in_cv, n_tx_cv;
  flit_t [NUM_PORTS-1:0]           n_tx_flit, r_in_flit;
  logic  [NUM_PORTS-1:0][VL_W-1:0] r_in_cvl, n_tx_cvl;
  logic  [NUM_PORTS-1:0]           r_out_valid, n_rx_cv, r_out_cv;
  flit_t [NUM_PORTS-1:0]           r_out_flit;
  logic  [NUM_PORTS-1:0][VL_W-1:0] n_rx_cvl, r_out_cvl;

  opa_router #(
    .NUM_PORTS(NUM_PORTS), .PORTS_PER_MPORT(PORTS_PER_MPORT), .CLINKS(CLINKS),
    .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
    .RT_LAT(RT_LAT), .SB_LAT(SB_LAT), .AT_LAT(AT_LAT), .X_LAT(X_LAT)
  ) u_router (
    .clk, .rst_n,
    .in_valid(r_in_valid), .in_flit(r_in_flit),
    .in_credit_valid(r_in_cv), .in_credit_vl(r_in_cvl),
    .out_valid(r_out_valid), .out_flit(r_out_flit),
    .out_credit_valid(r_out_cv), .out_credit_vl(r_out_cvl),
    .cfg_we, .cfg_iport, .cfg_node, .cfg_port
  );

  for (genvar n = 0; n < NUM_PORTS; n++) begin : g_node
    opa_nic #(
      .NODE_ID(n), .NUM_VL(NUM_VL), .DS_QUEUE_SIZE(QUEUE_SIZE),
      .FLITS_PER_CREDIT(FLITS_PER_CREDIT), .EXCL_CREDITS(EXCL_CREDITS),
      .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS)
    ) u_nic (
      .clk, .rst_n, .now,
      .msg_valid(msg_valid[n]), .msg_ready(msg_ready[n]), .msg_dest(msg_dest[n]),
      .msg_vl(msg_vl[n]), .msg_len(msg_len[n]),
      .tx_valid(n_tx_valid[n]), .tx_flit(n_tx_flit[n]),
      .tx_credit_valid(n_tx_cv[n]), .tx_credit_vl(n_tx_cvl[n]),
      .rx_valid(rx_valid[n]), .rx_flit(rx_flit[n]),
      .rx_credit_valid(n_rx_cv[n]), .rx_credit_vl(n_rx_cvl[n]),
      .rx_latency(rx_latency[n])
    );

    opa_link #(.FLY_LAT(FLY_LAT)) u_up (      // NIC -> router
      .clk, .rst_n,
      .tx_valid(n_tx_valid[n]), .tx_flit(n_tx_flit[n]),
      .rx_valid(r_in_valid[n]), .rx_flit(r_in_flit[n]),
      .rx_credit_valid(r_in_cv[n]), .rx_credit_vl(r_in_cvl[n]),
      .tx_credit_valid(n_tx_cv[n]), .tx_credit_vl(n_tx_cvl[n])
    );

    opa_link #(.FLY_LAT(FLY_LAT)) u_down (    // router -> NIC
      .clk, .rst_n,
      .tx_valid(r_out_valid[n]), .tx_flit(r_out_flit[n]),
      .rx_valid(rx_valid[n]), .rx_flit(rx_flit[n]),
      .rx_credit_valid(n_rx_cv[n]), .rx_credit_vl(n_rx_cvl[n]),
      .tx_credit_valid(r_out_cv[n]), .tx_credit_vl(r_out_cvl[n])
    );
  end

endmodule
