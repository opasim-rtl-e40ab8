// opa_nic: network interface of one end node.
//
// Transmit: accepts one message at a time (msg_valid/msg_ready) with a
// destination node, a VL and a length in flits. It cuts the message into
// packets of at most PKT_FLITS flits and injects them one flit per cycle
// under credit flow control. A packet starts only when opa_credit_mirror
// says the router's input buffer can take a whole packet on that VL. The
// rest of the packet then follows back to back. The header flit carries
// destination, source, packet length and the injection cycle (layout in
// opa_pkg). Body flits carry the source, a packet sequence number, their
// index and the injection cycle.
//
// Receive: consumes every arriving flit at once and shows it on rx_valid/
// rx_flit. Like a shared-VL buffer, it returns one credit per VL for every
// FLITS_PER_CREDIT flits of that VL, so the router's credit mirror stays
// exact. For a header, rx_latency is the number of cycles since its
// injection.
//
// Message generation (the traffic model) is outside this block. The
// injection latency INJ has no value in the model, so none is added here.
module opa_nic
  import opa_pkg::*;
#(
  parameter int unsigned NODE_ID          = 0,
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned DS_QUEUE_SIZE    = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  // messages to send
  input  logic              msg_valid,
  output logic              msg_ready,
  input  logic [NODE_W-1:0] msg_dest,
  input  logic [VL_W-1:0]   msg_vl,
  input  logic [15:0]       msg_len,
  // transmit link
  output logic              tx_valid,
  output flit_t             tx_flit,
  input  logic              tx_credit_valid,
  input  logic [VL_W-1:0]   tx_credit_vl,
  // receive link
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic              rx_credit_valid,
  output logic [VL_W-1:0]   rx_credit_vl,
  output time_t             rx_latency
);
  localparam int unsigned FPC = FLITS_PER_CREDIT;
  localparam int unsigned OW  = (FPC > 1) ? $clog2(FPC) : 1;

  // ---------------------------------------------------------------- transmit
  logic              has_msg, in_pkt;
  logic [15:0]       rem, plen, idx, seq;
  logic [NODE_W-1:0] dest;
  logic [VL_W-1:0]   vl;
  time_t             inj;
  logic [NUM_VL-1:0] admit;
  logic [15:0]       next_plen;

  logic              last_flit;

  assign next_plen = (rem > 16'(PKT_FLITS)) ? 16'(PKT_FLITS) : rem;
  // the next message is taken in the cycle the current one sends its last
  // flit, so messages leave back to back
  assign last_flit = tx_valid && tx_flit.tail && (rem == (tx_flit.head ? next_plen : plen));
  assign msg_ready = !has_msg || last_flit;

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    tx_flit.vl = vl;
    if (has_msg && !in_pkt && admit[vl]) begin
      tx_valid     = 1'b1;
      tx_flit.head = 1'b1;
      tx_flit.tail = (next_plen == 16'd1);
      tx_flit.data = {now, next_plen, 8'(NODE_ID), 8'(dest)};
    end else if (in_pkt) begin
      tx_valid     = 1'b1;
      tx_flit.tail = (idx == plen - 16'd1);
      tx_flit.data = {inj, seq, 8'(NODE_ID), idx[7:0]};
    end
  end

  opa_credit_mirror #(
    .NUM_VL(NUM_VL), .QUEUE_SIZE(DS_QUEUE_SIZE), .FLITS_PER_CREDIT(FPC),
    .EXCL_CREDITS(EXCL_CREDITS), .MAX_CREDITS(MAX_CREDITS), .PKT_FLITS(PKT_FLITS)
  ) u_mirror (
    .clk, .rst_n, .send_valid(tx_valid), .send_vl(vl),
    .credit_valid(tx_credit_valid), .credit_vl(tx_credit_vl), .admit
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      has_msg <= 1'b0; in_pkt <= 1'b0;
      rem <= '0; plen <= '0; idx <= '0; seq <= '0;
      dest <= '0; vl <= '0; inj <= '0;
    end else begin
      if (tx_valid) begin
        if (tx_flit.head) begin
          plen <= next_plen;
          inj  <= now;
          idx  <= 16'd1;
        end else begin
          idx  <= idx + 16'd1;
        end
        in_pkt <= !tx_flit.tail;
        if (tx_flit.tail) begin
          seq <= seq + 16'd1;
          rem <= rem - (tx_flit.head ? next_plen : plen);
          if (last_flit) has_msg <= 1'b0;
        end
      end
      if (msg_valid && msg_ready) begin
        has_msg <= (msg_len != 0);
        rem     <= msg_len;
        dest    <= msg_dest;
        vl      <= msg_vl;
      end
    end
  end

  // ---------------------------------------------------------------- receive
  logic [OW-1:0] roff [NUM_VL];

  assign rx_credit_valid = rx_valid && (int'(roff[rx_flit.vl]) == FPC - 1);
  assign rx_credit_vl    = rx_flit.vl;
  assign rx_latency      = now - time_t'(rx_flit.data[63:32]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VL; v++) roff[v] <= '0;
    end else if (rx_valid) begin
      roff[rx_flit.vl] <= OW'((int'(roff[rx_flit.vl]) + 1) % FPC);
    end
  end

endmodule
