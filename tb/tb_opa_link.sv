// tb_opa_link: sends random flits and credits through a link of FLY_LAT = 8
// and checks that each arrives unchanged exactly 8 cycles later, in both
// directions.
module tb_opa_link;
  import opa_pkg::*;
  localparam int FLY = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tx_valid = 0, rx_valid, rx_credit_valid = 0, tx_credit_valid;
  flit_t tx_flit = '0, rx_flit;
  logic [VL_W-1:0] rx_credit_vl = 0, tx_credit_vl;

  opa_link #(.FLY_LAT(FLY)) dut (.clk, .rst_n, .tx_valid, .tx_flit, .rx_valid, .rx_flit,
    .rx_credit_valid, .rx_credit_vl, .tx_credit_valid, .tx_credit_vl);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic  hv [int];  flit_t hf [int];
  logic  cv [int];  logic [VL_W-1:0] cvl [int];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      tx_valid = 1'($urandom); tx_flit = flit_t'({$urandom, $urandom, $urandom});
      rx_credit_valid = 1'($urandom); rx_credit_vl = VL_W'($urandom);
      hv[c] = tx_valid; hf[c] = tx_flit; cv[c] = rx_credit_valid; cvl[c] = rx_credit_vl;
      #1;
      if (c >= FLY) begin
        check(rx_valid == hv[c-FLY], "flit valid after FLY");
        if (hv[c-FLY]) check(rx_flit == hf[c-FLY], "flit data");
        check(tx_credit_valid == cv[c-FLY], "credit after FLY");
        if (cv[c-FLY]) check(tx_credit_vl == cvl[c-FLY], "credit VL");
      end else begin
        check(!rx_valid && !tx_credit_valid, "nothing before FLY cycles");
      end
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
