// opa_damq: dynamically allocated multi-VL flit buffer.
//
// The router's input, central and output buffers do not split their storage
// into fixed per-VL FIFOs. All VLs share one pool, and each VL gets at least
// a reserved share and at most a maximum share (the OpaSim model's minimum and
// maximum space per VL). How the sharing is done is this design's choice:
// storage is cut into cells of FLITS_PER_CREDIT flits, one credit each. Every
// VL keeps a linked list of cells (head cell/offset, tail cell/next free
// offset). Free cells are kept in a bitmap and the lowest one is taken.
//
// Write port: up to WR_W flits of one VL per cycle (wr_vl, wr_cnt, wr_flit[0..]).
// They may finish the open tail cell and spill into one new cell. Read port:
// the consumer selects rd_vl, sees the first RD_W flits of that VL on
// pk_flit/pk_ready, and pops rd_cnt of them in order. A cell is released, and
// cell_freed pulses with its VL, only when all its slots have been written and
// read. A half-filled tail cell stays with its VL until more flits arrive. A
// sender can therefore mirror the occupancy exactly by counting flits.
//
// Timing: each stored flit gets a ready stamp, now + HDR_DELAY for header
// flits and now + BODY_DELAY for others. pk_ready and head_ready only report
// a flit once `now` has reached its stamp. This is how the storing, routing
// and arbitration latencies are modelled. Written flits become visible the
// cycle after the write.
//
// can_accept[v] says whether VL v could take one more maximum-size packet,
// ceil(PKT_FLITS / FLITS_PER_CREDIT) cells, under opa_pkg::cell_admit. Writers
// check it once per packet, before the grant.
module opa_damq
  import opa_pkg::*;
#(
  parameter int unsigned NUM_VL           = DEF_NUM_VL,
  parameter int unsigned QUEUE_SIZE       = DEF_QUEUE_SIZE,
  parameter int unsigned FLITS_PER_CREDIT = DEF_FLITS_PER_CREDIT,
  parameter int unsigned EXCL_CREDITS     = DEF_EXCL_CREDITS,
  parameter int unsigned MAX_CREDITS      = DEF_MAX_CREDITS,
  parameter int unsigned PKT_FLITS        = DEF_PACKET_SIZE,
  parameter int unsigned WR_W             = 1,
  parameter int unsigned RD_W             = 1,
  parameter int unsigned HDR_DELAY        = 0,
  parameter int unsigned BODY_DELAY       = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  time_t                         now,
  // write
  input  logic [VL_W-1:0]               wr_vl,
  input  logic [CNT_W-1:0]              wr_cnt,
  input  flit_t [MAX_SPEEDUP-1:0]       wr_flit,
  // read
  input  logic [VL_W-1:0]               rd_vl,
  input  logic [CNT_W-1:0]              rd_cnt,
  output flit_t [MAX_SPEEDUP-1:0]       pk_flit,
  output logic  [MAX_SPEEDUP-1:0]       pk_ready,
  // per-VL head flit
  output flit_t [NUM_VL-1:0]            head_flit,
  output logic  [NUM_VL-1:0]            head_valid,
  output logic  [NUM_VL-1:0]            head_ready,
  // space
  output logic  [NUM_VL-1:0]            can_accept,
  output logic                          cell_freed,
  output logic [VL_W-1:0]               cell_freed_vl,
  output logic [$clog2(QUEUE_SIZE/FLITS_PER_CREDIT+1)-1:0] free_cells
);
  localparam int unsigned FPC   = FLITS_PER_CREDIT;
  localparam int unsigned CELLS = QUEUE_SIZE / FPC;
  localparam int unsigned SLOTS = CELLS * FPC;
  localparam int unsigned CW    = (CELLS > 1) ? $clog2(CELLS) : 1;
  localparam int unsigned OW    = (FPC > 1) ? $clog2(FPC) : 1;
  localparam int unsigned SW    = $clog2(SLOTS);
  localparam int unsigned UW    = $clog2(CELLS + 1);
  localparam int unsigned FW    = $clog2(SLOTS + 1);
  localparam int unsigned NEED  = ceil_div(PKT_FLITS, FPC);

  // storage
  flit_t          mem   [SLOTS];
  time_t          stamp [SLOTS];
  logic [CW-1:0]  nxt   [CELLS];
  logic [CELLS-1:0] free_map;
  logic [UW-1:0]  free_cnt;

  // per-VL list state
  logic [CW-1:0]  hd_cell [NUM_VL];
  logic [OW-1:0]  hd_off  [NUM_VL];
  logic [CW-1:0]  tl_cell [NUM_VL];
  logic [OW-1:0]  tl_off  [NUM_VL];   // next free slot of the open tail cell
  logic           tl_open [NUM_VL];   // tail cell has free slots
  logic [UW-1:0]  used    [NUM_VL];   // cells held
  logic [FW-1:0]  cnt     [NUM_VL];   // flits held

  // ---------------------------------------------------------------- write plan
  int unsigned    n_tail, rest;
  logic           alloc;
  logic [CW-1:0]  new_cell;
  logic [SW-1:0]  waddr [MAX_SPEEDUP];

  always_comb begin
    new_cell = '0;
    for (int c = CELLS - 1; c >= 0; c--)
      if (free_map[c]) new_cell = CW'(c);
    n_tail = 0;
    if (tl_open[wr_vl]) begin
      n_tail = FPC - int'(tl_off[wr_vl]);
      if (n_tail > int'(wr_cnt)) n_tail = int'(wr_cnt);
    end
    rest  = int'(wr_cnt) - n_tail;
    alloc = (rest > 0);
    for (int i = 0; i < MAX_SPEEDUP; i++) begin
      if (i < n_tail) waddr[i] = SW'(int'(tl_cell[wr_vl]) * FPC + int'(tl_off[wr_vl]) + i);
      else            waddr[i] = SW'(int'(new_cell) * FPC + (i - n_tail));
    end
  end

  // ---------------------------------------------------------------- read plan
  logic           do_free;
  logic [SW-1:0]  raddr [MAX_SPEEDUP];

  always_comb begin
    for (int i = 0; i < MAX_SPEEDUP; i++) begin
      if (int'(hd_off[rd_vl]) + i < FPC)
        raddr[i] = SW'(int'(hd_cell[rd_vl]) * FPC + int'(hd_off[rd_vl]) + i);
      else
        raddr[i] = SW'(int'(nxt[hd_cell[rd_vl]]) * FPC + int'(hd_off[rd_vl]) + i - FPC);
      pk_flit[i]  = mem[raddr[i]];
      pk_ready[i] = (i < RD_W) && (i < int'(cnt[rd_vl])) && time_reached(now, stamp[raddr[i]]);
    end
    do_free       = (rd_cnt != 0) && (int'(hd_off[rd_vl]) + int'(rd_cnt) >= FPC);
    cell_freed    = do_free;
    cell_freed_vl = rd_vl;
  end

  // ---------------------------------------------------------------- heads, space
  int unsigned deficit_all;
  always_comb begin
    deficit_all = 0;
    for (int v = 0; v < NUM_VL; v++)
      if (int'(used[v]) < EXCL_CREDITS) deficit_all += EXCL_CREDITS - int'(used[v]);
    for (int v = 0; v < NUM_VL; v++) begin
      int unsigned own;
      logic [SW-1:0] ha;
      own = (int'(used[v]) < EXCL_CREDITS) ? EXCL_CREDITS - int'(used[v]) : 0;
      can_accept[v] = cell_admit(int'(used[v]), int'(free_cnt), deficit_all - own,
                                 NEED, EXCL_CREDITS, MAX_CREDITS);
      ha            = SW'(int'(hd_cell[v]) * FPC + int'(hd_off[v]));
      head_flit[v]  = mem[ha];
      head_valid[v] = (cnt[v] != 0);
      head_ready[v] = (cnt[v] != 0) && time_reached(now, stamp[ha]);
    end
  end
  assign free_cells = free_cnt;

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_map <= '1;
      free_cnt <= UW'(CELLS);
      for (int v = 0; v < NUM_VL; v++) begin
        hd_cell[v] <= '0; hd_off[v] <= '0; tl_cell[v] <= '0; tl_off[v] <= '0;
        tl_open[v] <= 1'b0; used[v] <= '0; cnt[v] <= '0;
      end
    end else begin
      // storage writes
      for (int i = 0; i < MAX_SPEEDUP; i++)
        if (i < int'(wr_cnt)) begin
          mem[waddr[i]]   <= wr_flit[i];
          stamp[waddr[i]] <= now + time_t'(wr_flit[i].head ? HDR_DELAY : BODY_DELAY);
        end
      // free pool
      begin
        logic [CELLS-1:0] fm;
        fm = free_map;
        if (alloc)   fm[new_cell] = 1'b0;
        if (do_free) fm[hd_cell[rd_vl]] = 1'b1;
        free_map <= fm;
        free_cnt <= free_cnt - UW'(alloc) + UW'(do_free);
      end
      // write side of the lists
      if (wr_cnt != 0) begin
        if (alloc) begin
          if (used[wr_vl] != 0) nxt[tl_cell[wr_vl]] <= new_cell;
          tl_cell[wr_vl] <= new_cell;
          tl_off[wr_vl]  <= OW'(rest % FPC);
          tl_open[wr_vl] <= (rest < FPC);
        end else begin
          tl_off[wr_vl]  <= OW'((int'(tl_off[wr_vl]) + int'(wr_cnt)) % FPC);
          tl_open[wr_vl] <= (int'(tl_off[wr_vl]) + int'(wr_cnt) < FPC);
        end
      end
      // read side of the lists
      for (int v = 0; v < NUM_VL; v++) begin
        logic wv, rv;
        wv = (wr_cnt != 0) && (wr_vl == VL_W'(v));
        rv = (rd_cnt != 0) && (rd_vl == VL_W'(v));
        cnt[v]  <= cnt[v] + (wv ? FW'(wr_cnt) : '0) - (rv ? FW'(rd_cnt) : '0);
        used[v] <= used[v] + UW'(wv && alloc) - UW'(rv && do_free);
        if (rv) begin
          if (do_free) begin
            hd_cell[v] <= (hd_cell[v] == tl_cell[v] && wv && alloc) ? new_cell : nxt[hd_cell[v]];
            hd_off[v]  <= OW'(int'(hd_off[v]) + int'(rd_cnt) - FPC);
          end else begin
            hd_off[v]  <= OW'(int'(hd_off[v]) + int'(rd_cnt));
          end
        end else if (wv && alloc && used[v] == 0) begin
          hd_cell[v] <= new_cell;
          hd_off[v]  <= '0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- rules
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(wr_cnt) <= WR_W) else $error("opa_damq: write wider than WR_W");
      assert (!alloc || free_cnt != 0) else $error("opa_damq: write with no free cell");
      assert (rd_cnt == 0 || pk_ready[rd_cnt-1]) else $error("opa_damq: pop of a flit not ready");
    end
  end

endmodule
