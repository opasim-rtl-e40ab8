// opa_link: one direction of a point-to-point link.
//
// Flits take FLY_LAT cycles to fly from the sender to the receiver (8 cycles
// by default). The credits the receiver returns take the same time back;
// charging FLY to credits too is this design's choice. Both directions are
// plain shift registers of FLY_LAT stages, and FLY_LAT = 0 is a wire. One flit
// and one credit per cycle.
module opa_link
  import opa_pkg::*;
#(
  parameter int unsigned FLY_LAT = DEF_FLY_LAT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tx_valid,
  input  flit_t           tx_flit,
  output logic            rx_valid,
  output flit_t           rx_flit,
  input  logic            rx_credit_valid,
  input  logic [VL_W-1:0] rx_credit_vl,
  output logic            tx_credit_valid,
  output logic [VL_W-1:0] tx_credit_vl
);
  if (FLY_LAT == 0) begin : g_wire
    assign rx_valid        = tx_valid;
    assign rx_flit         = tx_flit;
    assign tx_credit_valid = rx_credit_valid;
    assign tx_credit_vl    = rx_credit_vl;
  end else begin : g_pipe
    logic  [FLY_LAT-1:0]           fv, cv;
    flit_t [FLY_LAT-1:0]           ff;
    logic  [FLY_LAT-1:0][VL_W-1:0] cvl;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        fv <= '0;
        cv <= '0;
      end else begin
        fv[0] <= tx_valid;
        cv[0] <= rx_credit_valid;
        for (int s = 1; s < FLY_LAT; s++) begin
          fv[s] <= fv[s-1];
          cv[s] <= cv[s-1];
        end
      end
      ff[0]  <= tx_flit;
      cvl[0] <= rx_credit_vl;
      for (int s = 1; s < FLY_LAT; s++) begin
        ff[s]  <= ff[s-1];
        cvl[s] <= cvl[s-1];
      end
    end
    assign rx_valid        = fv[FLY_LAT-1];
    assign rx_flit         = ff[FLY_LAT-1];
    assign tx_credit_valid = cv[FLY_LAT-1];
    assign tx_credit_vl    = cvl[FLY_LAT-1];
  end

endmodule
