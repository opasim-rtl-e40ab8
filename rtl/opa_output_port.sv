// opa_output_port: one router output port (output arbiter, output buffer and
// link scheduler).
//
// Output arbiter: a round-robin arbiter over the 4 input buffers of the same
// MPort and the 24 central buffers (28 entries by default). A requester is
// eligible when its request names this port and its VL has room for a whole
// packet in the output buffer. The winner is connected from the next cycle
// until its tail flit has been written. sel_* tell the MPort crossbar or the
// central crossbar which source to put on this port's line. Writes come at up
// to 3 (local) or 4 (central) flits per cycle. Every flit becomes ready
// X_LAT + SB_LAT cycles after it is written (crossbar, then storing in the
// output buffer).
//
// Link scheduler: while no packet is being sent, a round-robin arbiter over
// the VLs picks one whose head is a ready header and whose downstream buffer
// can take a whole packet (opa_credit_mirror). The header leaves in the same
// cycle. The VL then keeps the link, one flit per cycle as its flits become
// ready, until its tail has left, and is then released. No preemption.
module opa_output_port
  import opa_pkg::*;
#(
  parameter int unsigned NUM_CBUF         = DEF_NUM_PORTS / DEF_PORTS_PER_MPORT * DEF_CLINKS_PER_MPORT,
  parameter int unsigned PORTS_PER_MPORT  = DEF_PORTS_PER_MPORT,
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned DS_QUEUE_SIZE    = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned SB_LAT           = DEF_SB_LAT,
  parameter int unsigned X_LAT            = DEF_X_LAT
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  time_t                                  now,
  // requests aimed at this port
  input  logic [PORTS_PER_MPORT-1:0]             loc_req,
  input  logic [PORTS_PER_MPORT-1:0][VL_W-1:0]   loc_vl,
  input  logic [NUM_CBUF-1:0]                    cen_req,
  input  logic [NUM_CBUF-1:0][VL_W-1:0]          cen_vl,
  output logic [PORTS_PER_MPORT-1:0]             loc_grant,
  output logic [NUM_CBUF-1:0]                    cen_grant,
  // crossbar line selection and data
  output logic                                   loc_sel_valid,
  output logic [$clog2(PORTS_PER_MPORT)-1:0]     loc_sel,
  output logic                                   cen_sel_valid,
  output logic [$clog2(NUM_CBUF)-1:0]            cen_sel,
  input  bundle_t                                loc_in,
  input  bundle_t                                cen_in,
  // link
  output logic                                   out_valid,
  output flit_t                                  out_flit,
  input  logic                                   credit_valid,
  input  logic [VL_W-1:0]                        credit_vl
);
  localparam int unsigned P  = PORTS_PER_MPORT;
  localparam int unsigned NS = P + NUM_CBUF;
  localparam int unsigned SW = $clog2(NS);
  localparam int unsigned VW = (NUM_VL > 1) ? $clog2(NUM_VL) : 1;

  // ---------------------------------------------------------------- output arbiter
  logic [NUM_VL-1:0] can_accept;
  logic [NS-1:0]     oa_req, oa_gnt;
  logic [SW-1:0]     oa_idx;
  logic              oa_any;
  logic              active;
  logic [SW-1:0]     src;
  bundle_t           wb;

  always_comb begin
    for (int i = 0; i < P; i++)
      oa_req[i] = !active && loc_req[i] && can_accept[loc_vl[i]];
    for (int c = 0; c < NUM_CBUF; c++)
      oa_req[P + c] = !active && cen_req[c] && can_accept[cen_vl[c]];
  end

  opa_rr_arb #(.N(NS)) u_oarb (
    .clk, .rst_n, .req(oa_req), .adv(oa_any), .gnt(oa_gnt), .gnt_idx(oa_idx), .any(oa_any)
  );

  assign loc_grant     = oa_gnt[P-1:0];
  assign cen_grant     = oa_gnt[NS-1:P];
  assign loc_sel_valid = active && (int'(src) < P);
  assign loc_sel       = ($clog2(P))'(src);
  assign cen_sel_valid = active && (int'(src) >= P);
  assign cen_sel       = ($clog2(NUM_CBUF))'(int'(src) - P);
  assign wb            = loc_sel_valid ? loc_in : (cen_sel_valid ? cen_in : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      src    <= '0;
    end else if (!active) begin
      if (oa_any) begin
        active <= 1'b1;
        src    <= oa_idx;
      end
    end else if (bundle_has_tail(wb)) begin
      active <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- output buffer
  flit_t [MAX_SPEEDUP-1:0] pk_flit;
  logic  [MAX_SPEEDUP-1:0] pk_ready;
  flit_t [NUM_VL-1:0]      head_flit;
  logic  [NUM_VL-1:0]      head_valid, head_ready;
  logic  [VL_W-1:0]        rd_vl;
  logic                    pop;

  opa_damq #(
    .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
    .WR_W(CENTRAL_SPEEDUP), .RD_W(1),
    .HDR_DELAY(X_LAT + SB_LAT), .BODY_DELAY(X_LAT + SB_LAT)
  ) u_obuf (
    .clk, .rst_n, .now,
    .wr_vl(wb.f[0].vl), .wr_cnt(wb.cnt), .wr_flit(wb.f),
    .rd_vl, .rd_cnt(CNT_W'(pop)), .pk_flit, .pk_ready,
    .head_flit, .head_valid, .head_ready,
    .can_accept, .cell_freed(), .cell_freed_vl(), .free_cells()
  );

  // ---------------------------------------------------------------- link scheduler
  logic [NUM_VL-1:0] admit, sc_req, sc_gnt;
  logic [VW-1:0]     sc_idx;
  logic              sc_any;
  logic              sending;
  logic [VL_W-1:0]   svl;

  opa_credit_mirror #(
    .NUM_VL(NUM_VL), .QUEUE_SIZE(DS_QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS)
  ) u_mirror (
    .clk, .rst_n, .send_valid(out_valid), .send_vl(out_flit.vl),
    .credit_valid, .credit_vl, .admit
  );

  always_comb
    for (int v = 0; v < NUM_VL; v++)
      sc_req[v] = !sending && head_valid[v] && head_ready[v] && head_flit[v].head && admit[v];

  opa_rr_arb #(.N(NUM_VL)) u_sched (
    .clk, .rst_n, .req(sc_req), .adv(sc_any), .gnt(sc_gnt), .gnt_idx(sc_idx), .any(sc_any)
  );

  assign rd_vl     = sending ? svl : VL_W'(sc_idx);
  assign pop       = sending ? pk_ready[0] : sc_any;
  assign out_valid = pop;
  assign out_flit  = pk_flit[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sending <= 1'b0;
      svl     <= '0;
    end else if (pop) begin
      sending <= !pk_flit[0].tail;
      svl     <= rd_vl;
    end
  end

endmodule
