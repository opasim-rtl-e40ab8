// opa_route_unit: routing unit of one input buffer.
//
// The routing function of the router model is configurable to suit the
// topology. Here it is a forwarding table indexed by the destination node of
// a header flit (data[NODE_W-1:0]) that returns the router output port. The
// table is this design's choice. It is written through cfg_we/cfg_node/cfg_port.
// After reset, node n maps to port n mod NUM_PORTS, which is right for the
// evaluated single router with one node per port.
//
// The lookup is combinational. The RT latency of the model (32 cycles by
// default) is added by the input buffer to the header's ready stamp, not
// here.
module opa_route_unit
  import opa_pkg::*;
#(
  parameter int unsigned NUM_PORTS = DEF_NUM_PORTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [NODE_W-1:0] cfg_node,
  input  logic [PORT_W-1:0] cfg_port,
  input  logic [NODE_W-1:0] dest,
  output logic [PORT_W-1:0] oport
);
  localparam int unsigned NODES = 1 << NODE_W;

  logic [PORT_W-1:0] table_q [NODES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NODES; n++) table_q[n] <= PORT_W'(n % NUM_PORTS);
    end else if (cfg_we) begin
      table_q[cfg_node] <= cfg_port;
    end
  end

  assign oport = table_q[dest];

  always_ff @(posedge clk)
    if (rst_n && cfg_we)
      assert (int'(cfg_port) < NUM_PORTS) else $error("opa_route_unit: port out of range");

endmodule
