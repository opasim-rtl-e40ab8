// opa_credit_mirror: sender-side view of a downstream shared-VL buffer.
//
// Credit flow control on a link. The sender keeps, per VL, the number of
// downstream cells (credits) its flits occupy, and the offset of the next
// slot in that VL's open cell. A flit sent on VL v with offset 0 opens a new
// cell. Offsets advance by one per flit and wrap at FLITS_PER_CREDIT. A
// returned credit (credit_valid/credit_vl) gives back one cell. The
// downstream buffer (opa_damq) allocates and frees cells by the same rules,
// so the mirror holds its occupancy exactly, only delayed by the link.
//
// admit[v] says whether a whole maximum-size packet may start on VL v. It
// uses the same rule as the buffer: the reserved and maximum credits per VL
// (opa_pkg::cell_admit). The sender checks admit when it picks a packet, then
// sends the rest of that packet without further checks.
module opa_credit_mirror
  import opa_pkg::*;
#(
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              send_valid,
  input  logic [VL_W-1:0]   send_vl,
  input  logic              credit_valid,
  input  logic [VL_W-1:0]   credit_vl,
  output logic [NUM_VL-1:0] admit
);
  localparam int unsigned FPC   = FLITS_PER_CREDIT;
  localparam int unsigned CELLS = QUEUE_SIZE / FPC;
  localparam int unsigned UW    = $clog2(CELLS + 1);
  localparam int unsigned OW    = (FPC > 1) ? $clog2(FPC) : 1;
  localparam int unsigned NEED  = ceil_div(PKT_FLITS, FPC);

  logic [UW-1:0] used [NUM_VL];
  logic [OW-1:0] off  [NUM_VL];
  logic [UW-1:0] free_cnt;
  logic          open_cell;

  assign open_cell = send_valid && (off[send_vl] == '0);

  always_comb begin
    int unsigned deficit_all;
    deficit_all = 0;
    for (int v = 0; v < NUM_VL; v++)
      if (int'(used[v]) < EXCL_CREDITS) deficit_all += EXCL_CREDITS - int'(used[v]);
    for (int v = 0; v < NUM_VL; v++) begin
      int unsigned own;
      own = (int'(used[v]) < EXCL_CREDITS) ? EXCL_CREDITS - int'(used[v]) : 0;
      admit[v] = cell_admit(int'(used[v]), int'(free_cnt), deficit_all - own,
                            NEED, EXCL_CREDITS, MAX_CREDITS);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_cnt <= UW'(CELLS);
      for (int v = 0; v < NUM_VL; v++) begin
        used[v] <= '0;
        off[v]  <= '0;
      end
    end else begin
      free_cnt <= free_cnt - UW'(open_cell) + UW'(credit_valid);
      for (int v = 0; v < NUM_VL; v++) begin
        used[v] <= used[v] + UW'(open_cell && send_vl == VL_W'(v))
                           - UW'(credit_valid && credit_vl == VL_W'(v));
        if (send_valid && send_vl == VL_W'(v)) off[v] <= OW'((int'(off[v]) + 1) % FPC);
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n) begin
      assert (!open_cell || free_cnt != 0) else $error("opa_credit_mirror: downstream overflow");
      assert (!credit_valid || used[credit_vl] != 0) else $error("opa_credit_mirror: credit for an empty VL");
    end

endmodule
