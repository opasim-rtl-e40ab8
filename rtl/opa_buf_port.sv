// opa_buf_port: a VL buffer with its input arbiter and crossbar read side.
//
// The router uses this for the input buffers (behind the routing unit) and for
// the central-crossbar buffers. Both run the same virtual-allocation step
// (VA). While the port is idle, a round-robin arbiter over the VLs picks one
// whose head flit is a header that has reached its ready stamp. That VL's
// request (req_vl, req_oport taken from the header) goes to the switch
// allocator. The priority moves on after every attempt, granted or not, so a
// VL whose target is busy does not keep the port from trying its other VLs.
// When `grant` comes back, the port connects to that target from the next
// cycle. It then streams the packet out on `xfer`, up to RD_W ready flits a
// cycle (the crossbar speed-up), never past the tail flit, and goes idle
// after the tail. Space in the target was checked before the grant, so the
// flits are always taken.
//
// One packet at a time leaves a port. Flits that have not yet arrived or are
// not yet ready hold the stream (cut-through inside the router).
module opa_buf_port
  import opa_pkg::*;
#(
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned WR_W             = 1,
  parameter int unsigned RD_W             = MPORT_SPEEDUP,
  parameter int unsigned HDR_DELAY        = 0,
  parameter int unsigned BODY_DELAY       = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  time_t                   now,
  // fill side
  input  logic [VL_W-1:0]         wr_vl,
  input  logic [CNT_W-1:0]        wr_cnt,
  input  flit_t [MAX_SPEEDUP-1:0] wr_flit,
  output logic [NUM_VL-1:0]       can_accept,
  output logic                    cell_freed,
  output logic [VL_W-1:0]         cell_freed_vl,
  // allocation
  output logic                    req_valid,
  output logic [VL_W-1:0]         req_vl,
  output logic [PORT_W-1:0]       req_oport,
  input  logic                    grant,
  // crossbar side
  output bundle_t                 xfer,
  output logic                    busy
);
  localparam int unsigned VW = (NUM_VL > 1) ? $clog2(NUM_VL) : 1;

  flit_t [MAX_SPEEDUP-1:0] pk_flit;
  logic  [MAX_SPEEDUP-1:0] pk_ready;
  flit_t [NUM_VL-1:0]      head_flit;
  logic  [NUM_VL-1:0]      head_valid, head_ready;
  logic  [VL_W-1:0]        cvl;
  logic  [CNT_W-1:0]       rd_cnt;
  logic                    tail_out;
  logic  [NUM_VL-1:0]      cand, va_gnt;
  logic  [VW-1:0]          va_idx;
  logic                    va_any;

  opa_damq #(
    .NUM_VL(NUM_VL), .QUEUE_SIZE(QUEUE_SIZE), .FLITS_PER_CREDIT(FLITS_PER_CREDIT),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS),
    .WR_W(WR_W), .RD_W(RD_W), .HDR_DELAY(HDR_DELAY), .BODY_DELAY(BODY_DELAY)
  ) u_buf (
    .clk, .rst_n, .now,
    .wr_vl, .wr_cnt, .wr_flit,
    .rd_vl(cvl), .rd_cnt, .pk_flit, .pk_ready,
    .head_flit, .head_valid, .head_ready,
    .can_accept, .cell_freed, .cell_freed_vl, .free_cells()
  );

  // virtual allocation: round robin over VLs with a ready header
  always_comb
    for (int v = 0; v < NUM_VL; v++)
      cand[v] = !busy && head_valid[v] && head_ready[v] && head_flit[v].head;

  opa_rr_arb #(.N(NUM_VL)) u_va (
    .clk, .rst_n, .req(cand), .adv(va_any), .gnt(va_gnt), .gnt_idx(va_idx), .any(va_any)
  );

  assign req_valid = va_any;
  assign req_vl    = VL_W'(va_idx);
  assign req_oport = head_flit[va_idx].oport;

  // streaming the granted packet
  always_comb begin
    logic stop;
    stop     = !busy;
    rd_cnt   = '0;
    tail_out = 1'b0;
    for (int i = 0; i < MAX_SPEEDUP; i++) begin
      if (!stop && i < RD_W && pk_ready[i]) begin
        rd_cnt = rd_cnt + 1'b1;
        if (pk_flit[i].tail) begin
          tail_out = 1'b1;
          stop     = 1'b1;
        end
      end else begin
        stop = 1'b1;
      end
    end
    xfer.cnt = rd_cnt;
    xfer.f   = pk_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cvl  <= '0;
    end else if (!busy) begin
      if (grant) begin
        busy <= 1'b1;
        cvl  <= req_vl;
      end
    end else if (tail_out) begin
      busy <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (rst_n) assert (!grant || req_valid) else $error("opa_buf_port: grant without request");

endmodule
