// opa_mport_xbar: the 4:6 crossbar of one MPort.
//
// The 4 input buffers of an MPort reach 6 destinations: the 4 output buffers
// of the same MPort and the 2 links into the central crossbar. Each of these
// carries up to MPORT_SPEEDUP (3) flits per cycle, so the two central links
// give 2 x 3 x 12.5 GB/s = 75 GB/s.
//
// The output arbiters of the 4 local outputs live in opa_output_port. They
// tell this crossbar which input each local line carries (loc_sel_valid/
// loc_sel). The two central buffers' arbiters are here: each arbitrates
// round-robin among the 4 inputs whose requested output port is in another
// MPort and whose VL has room for a whole packet in that central buffer. If
// both central links are free in the same cycle, link 1 only sees the inputs
// that link 0 did not take. A link stays with its input until the tail
// flit has crossed.
//
// Grants are combinational in the request cycle; flits move from the next
// cycle on.
module opa_mport_xbar
  import opa_pkg::*;
#(
  parameter int unsigned MPORT_ID        = 0,
  parameter int unsigned PORTS_PER_MPORT = DEF_PORTS_PER_MPORT,
  parameter int unsigned CLINKS          = DEF_CLINKS_PER_MPORT,
  parameter int unsigned NUM_VL          = DEF_NUM_VL
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // from the input buffers of this MPort
  input  logic    [PORTS_PER_MPORT-1:0]          in_req_valid,
  input  logic    [PORTS_PER_MPORT-1:0][VL_W-1:0]   in_req_vl,
  input  logic    [PORTS_PER_MPORT-1:0][PORT_W-1:0] in_req_oport,
  input  bundle_t [PORTS_PER_MPORT-1:0]          in_xfer,
  output logic    [PORTS_PER_MPORT-1:0]          in_cgrant,   // granted by a central link
  // local output lines
  input  logic    [PORTS_PER_MPORT-1:0]          loc_sel_valid,
  input  logic    [PORTS_PER_MPORT-1:0][$clog2(PORTS_PER_MPORT)-1:0] loc_sel,
  output bundle_t [PORTS_PER_MPORT-1:0]          loc_out,
  // central links
  input  logic    [CLINKS-1:0][NUM_VL-1:0]       c_can_accept,
  output bundle_t [CLINKS-1:0]                   c_out
);
  localparam int unsigned P  = PORTS_PER_MPORT;
  localparam int unsigned PW = $clog2(P);

  logic [CLINKS-1:0]         locked;
  logic [CLINKS-1:0][PW-1:0] lock_src;
  logic [CLINKS-1:0][P-1:0]  cgnt;
  logic [CLINKS-1:0][PW-1:0] cgnt_idx;
  logic [CLINKS-1:0]         cany;

  // Central links take requests for other MPorts in turn: link l only sees
  // the inputs that links 0..l-1 did not grant in this cycle.
  for (genvar l = 0; l < CLINKS; l++) begin : g_carb
    logic [P-1:0] taken_in, taken_out, creq, gnt;
    if (l == 0) begin : g_first
      assign taken_in = '0;
    end else begin : g_next
      assign taken_in = g_carb[l-1].taken_out;
    end
    always_comb
      for (int i = 0; i < P; i++)
        creq[i] = !locked[l] && in_req_valid[i] && !taken_in[i]
                  && (int'(in_req_oport[i]) / P != MPORT_ID)
                  && c_can_accept[l][in_req_vl[i]];
    opa_rr_arb #(.N(P)) u_arb (
      .clk, .rst_n, .req(creq), .adv(cany[l]),
      .gnt, .gnt_idx(cgnt_idx[l]), .any(cany[l])
    );
    assign taken_out = taken_in | gnt;
    assign cgnt[l]   = gnt;
  end

  always_comb begin
    in_cgrant = '0;
    for (int l = 0; l < CLINKS; l++) in_cgrant = in_cgrant | cgnt[l];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked   <= '0;
      lock_src <= '0;
    end else begin
      for (int l = 0; l < CLINKS; l++) begin
        if (!locked[l] && cany[l]) begin
          locked[l]   <= 1'b1;
          lock_src[l] <= cgnt_idx[l];
        end else if (locked[l] && bundle_has_tail(in_xfer[lock_src[l]])) begin
          locked[l]   <= 1'b0;
        end
      end
    end
  end

  // data paths
  always_comb begin
    for (int j = 0; j < P; j++)
      loc_out[j] = loc_sel_valid[j] ? in_xfer[loc_sel[j]] : '0;
    for (int l = 0; l < CLINKS; l++)
      c_out[l] = locked[l] ? in_xfer[lock_src[l]] : '0;
  end

endmodule
