// inter_ring_if: inter-ring interface joining local ring RING to the central
// ring. It owns one segment of each ring and two FIFOs (up: local to central,
// down: central to local) that absorb collisions on the output segments.
//
// From the local ring (the last station's segment):
//   * requests/replies for another ring go to the up FIFO, those for this
//     ring continue round the local ring;
//   * every WI is removed here (this interface formed every WI on its ring);
//   * a WIP whose central field is zero (all copies on this ring: outgoing
//     filter) becomes a WI and is sent round the local ring; any other WIP
//     becomes a WI for the central ring and goes to the up FIFO.
// From the central ring (the previous interface's segment):
//   * requests/replies for this ring go to the down FIFO, others pass;
//   * a WI whose home ring (address bits) is this ring has been round the
//     whole central ring: it is removed, and a copy goes down this ring so it
//     returns to the memory; any other WI passes on, and a copy goes down if
//     bit RING of its central field is set (incoming filter).
// The central ring has priority on the central output, as the architecture
// prescribes; giving the local ring priority on the local output is this
// design's choice. The FIFOs wait for free slots. FIFO depth defaults to
// processors x outstanding requests (64 x 1), which bounds the packets in
// flight, so no flow control is needed; an assertion checks it.
module inter_ring_if
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] RING          = '0,
  parameter int unsigned       FIFO_DEPTH    = NUM_PROCS,
  parameter bit                IN_FILTER_EN  = 1'b1,
  parameter bit                OUT_FILTER_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t local_in,
  output pkt_t local_out,
  input  pkt_t central_in,
  output pkt_t central_out,
  // event strobes for monitoring
  output logic ev_wip_ring,    // WIP stopped at ring level (outgoing filter)
  output logic ev_wip_central, // WIP converted into a central-ring WI
  output logic ev_wi_down,     // WI copied down into this ring
  output logic ev_wi_block,    // WI kept out of this ring (incoming filter)
  output logic ev_fifo_wait    // a FIFO head waits for a busy segment
);
  // ---- local input -------------------------------------------------------
  wire l_req    = local_in.valid && local_in.ptype inside {PK_READ, PK_WRITE, PK_RDATA, PK_NACK};
  wire l_up_req = l_req && local_in.dst.ring != RING;
  wire l_wip    = local_in.valid && local_in.ptype == PK_WIP;
  wire l_wip_lo = l_wip && OUT_FILTER_EN && local_in.mask.central == '0;
  wire l_pass   = (l_req && !l_up_req) || l_wip_lo;

  // ---- central input -----------------------------------------------------
  wire c_req     = central_in.valid && central_in.ptype inside {PK_READ, PK_WRITE, PK_RDATA, PK_NACK};
  wire c_down_rq = c_req && central_in.dst.ring == RING;
  wire c_wi      = central_in.valid && central_in.ptype == PK_WI;
  wire c_wi_home = c_wi && central_in.addr.ring == RING;
  wire c_wi_copy = c_wi && (c_wi_home || !IN_FILTER_EN || central_in.mask.central[RING]);
  wire c_pass    = central_in.valid && !c_down_rq && !c_wi_home;

  assign ev_wip_ring    = l_wip_lo;
  assign ev_wip_central = l_wip && !l_wip_lo;
  assign ev_wi_down     = c_wi_copy;
  assign ev_wi_block    = c_wi && !c_wi_copy;

  // ---- FIFOs -------------------------------------------------------------
  pkt_t up_in, up_head, dn_in, dn_head;
  logic up_push, up_pop, up_empty, up_full;
  logic dn_push, dn_pop, dn_empty, dn_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] up_count, dn_count;

  always_comb begin
    up_push = l_up_req || (l_wip && !l_wip_lo);
    up_in   = local_in;
    if (l_wip) up_in.ptype = PK_WI;
    dn_push = c_down_rq || c_wi_copy;
    dn_in   = central_in;
  end

  assign up_pop = !c_pass && !up_empty;
  assign dn_pop = !l_pass && !dn_empty;
  assign ev_fifo_wait = (c_pass && !up_empty) || (l_pass && !dn_empty);

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_up (
    .clk, .rst_n, .push(up_push), .wr_data(up_in), .pop(up_pop),
    .rd_data(up_head), .empty(up_empty), .full(up_full), .count(up_count));

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_dn (
    .clk, .rst_n, .push(dn_push), .wr_data(dn_in), .pop(dn_pop),
    .rd_data(dn_head), .empty(dn_empty), .full(dn_full), .count(dn_count));

  // ---- output segments ---------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_out   <= '0;
      central_out <= '0;
    end else begin
      if (c_pass)       central_out <= central_in;
      else if (up_pop)  central_out <= up_head;
      else              central_out <= '0;

      if (l_pass) begin
        local_out <= local_in;
        if (l_wip_lo) local_out.ptype <= PK_WI;
      end else if (dn_pop) local_out <= dn_head;
      else                 local_out <= '0;
    end
  end
endmodule
