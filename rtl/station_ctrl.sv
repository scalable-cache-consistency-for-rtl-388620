// station_ctrl: station controller. It owns the station bus and this
// station's segment of the local ring, and holds the station-level filters.
//
// Station bus, one packet per cycle, chosen in this order:
//   1. a packet removed from the local ring for this station (requests and
//      replies addressed here, and WI copies that pass the incoming filter);
//      ring delivery always takes precedence over on-station transfers;
//   2. a WI formed here from a WIP that must not leave the station;
//   3. a module's packet, round-robin among the modules that request the bus
//      (the arbitration policy is this design's choice).
// Modules are only granted when the outbound queue has room, so nothing on
// the bus is ever dropped.
//
// Ring segment: each cycle the packet on ring_in is either removed (it is for
// this station) or passed on to ring_out; a WI is copied onto the bus and
// passed on. When the segment leaves empty, the head of the outbound queue is
// put on the ring, so packets join the ring only into free slots.
//
// Filters: incoming, a WI on the local ring is copied onto the bus only if
// bit STATION of its local field is set. Outgoing, a WIP from this station
// whose mask has both fields zero (all copies are on this station) is turned
// into a WI here and never reaches the ring. IN_FILTER_EN / OUT_FILTER_EN = 0
// give the unfiltered behaviour for comparison. The outbound queue depth
// defaults to processors x outstanding requests (64 x 1).
module station_ctrl
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] RING          = '0,
  parameter logic [STA_W-1:0]  STATION       = '0,
  parameter int unsigned       OUTQ_DEPTH    = NUM_PROCS,
  parameter bit                IN_FILTER_EN  = 1'b1,
  parameter bit                OUT_FILTER_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  // modules of this station
  input  logic [MODS_PER_STATION-1:0] mod_out_valid,
  input  pkt_t                        mod_out_pkt [MODS_PER_STATION],
  output logic [MODS_PER_STATION-1:0] mod_grant,
  output pkt_t                        bus_pkt,
  // local ring segment
  input  pkt_t ring_in,
  output pkt_t ring_out,
  // event strobes for monitoring
  output logic ev_wi_copy,     // WI copied onto the station bus
  output logic ev_wi_block,    // WI blocked by the incoming filter
  output logic ev_wip_local,   // WIP stopped at this station (outgoing filter)
  output logic ev_ring_wait    // outbound packet waits for a free ring slot
);
  localparam int unsigned BQ_DEPTH = 2;

  // ---- ring input classification -----------------------------------------
  wire rin_req  = ring_in.valid && ring_in.ptype inside {PK_READ, PK_WRITE, PK_RDATA, PK_NACK};
  wire rin_here = rin_req && ring_in.dst.ring == RING && ring_in.dst.station == STATION;
  wire rin_wi   = ring_in.valid && ring_in.ptype == PK_WI;
  wire wi_pass  = rin_wi && (!IN_FILTER_EN || ring_in.mask.local_f[STATION]);
  wire deliver  = rin_here || wi_pass;
  wire pass     = ring_in.valid && !rin_here;

  assign ev_wi_copy  = wi_pass;
  assign ev_wi_block = rin_wi && !wi_pass;

  // ---- queues ------------------------------------------------------------
  pkt_t bq_head, oq_head, bq_in, oq_in;
  logic bq_push, bq_pop, bq_empty, bq_full;
  logic oq_push, oq_pop, oq_empty, oq_full;
  logic [$clog2(BQ_DEPTH+1)-1:0]   bq_count;
  logic [$clog2(OUTQ_DEPTH+1)-1:0] oq_count;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n, .push(bq_push), .wr_data(bq_in), .pop(bq_pop),
    .rd_data(bq_head), .empty(bq_empty), .full(bq_full), .count(bq_count));

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(OUTQ_DEPTH)) u_oq (
    .clk, .rst_n, .push(oq_push), .wr_data(oq_in), .pop(oq_pop),
    .rd_data(oq_head), .empty(oq_empty), .full(oq_full), .count(oq_count));

  // ---- bus arbitration ---------------------------------------------------
  logic [MOD_W-1:0] rr_q;
  logic             mod_win;
  logic [MOD_W-1:0] win_idx;

  always_comb begin
    mod_win = 1'b0;
    win_idx = '0;
    for (int k = 0; k < int'(MODS_PER_STATION); k++) begin
      int unsigned i;
      i = (int'(rr_q) + k) % MODS_PER_STATION;
      if (!mod_win && mod_out_valid[i]) begin
        mod_win = 1'b1;
        win_idx = MOD_W'(i);
      end
    end
  end

  wire  mod_slot = !deliver && bq_empty && !oq_full && !bq_full;
  pkt_t mpkt;
  assign mpkt = mod_out_pkt[win_idx];

  always_comb begin
    mod_grant = '0;
    if (mod_slot && mod_win) mod_grant[win_idx] = 1'b1;
  end

  assign bq_pop = !deliver && !bq_empty;

  always_comb begin
    if (deliver)            bus_pkt = ring_in;
    else if (!bq_empty)     bus_pkt = bq_head;
    else if (mod_slot && mod_win) bus_pkt = mpkt;
    else                    bus_pkt = '0;
  end

  // ---- packets leaving the station --------------------------------------
  wire granted  = mod_slot && mod_win;
  wire m_wip    = granted && mpkt.ptype == PK_WIP;
  wire wip_stop = m_wip && OUT_FILTER_EN && mpkt.mask == '0;
  wire m_remote = granted && mpkt.ptype != PK_WIP
                  && !(mpkt.dst.ring == RING && mpkt.dst.station == STATION);

  assign ev_wip_local = wip_stop;

  always_comb begin
    bq_push = wip_stop;
    bq_in   = mpkt;
    bq_in.ptype = PK_WI;
    oq_push = (m_wip && !wip_stop) || m_remote;
    oq_in   = mpkt;
  end

  assign oq_pop       = !pass && !oq_empty;
  assign ev_ring_wait = pass && !oq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_out <= '0;
      rr_q     <= '0;
    end else begin
      if (pass)          ring_out <= ring_in;
      else if (oq_pop)   ring_out <= oq_head;
      else               ring_out <= '0;
      if (granted)
        rr_q <= (win_idx == MOD_W'(MODS_PER_STATION - 1)) ? '0 : win_idx + 1'b1;
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mod_grant))
    else $error("more than one bus grant");
endmodule
