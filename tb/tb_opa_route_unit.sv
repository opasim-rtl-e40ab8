// tb_opa_route_unit: checks the reset contents of the forwarding table (node
// n -> port n mod NUM_PORTS, here 8 ports), then programs random entries and
// reads the whole table back against a reference copy.
module tb_opa_route_unit;
  import opa_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0;
  logic [NODE_W-1:0] cfg_node = 0, dest = 0;
  logic [PORT_W-1:0] cfg_port = 0, oport;

  opa_route_unit #(.NUM_PORTS(NP)) dut (.clk, .rst_n, .cfg_we, .cfg_node, .cfg_port, .dest, .oport);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int ref_t [256];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 256; n++) begin
      ref_t[n] = n % NP;
      dest = NODE_W'(n); #1;
      check(int'(oport) == ref_t[n], "reset route");
    end
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_node = NODE_W'($urandom); cfg_port = PORT_W'($urandom_range(NP-1));
      ref_t[cfg_node] = int'(cfg_port);
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 256; n++) begin
      dest = NODE_W'(n); #1;
      check(int'(oport) == ref_t[n], "programmed route");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
