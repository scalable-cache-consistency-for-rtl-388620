// mem_module: memory module of one station, with the per-block state of the
// invalidating write-through protocol.
//
// Per cache-line-sized block it holds the data word, the filter bit mask
// (see mask_maint) and a lock counter counting WI packets still outstanding
// for writes to that block. Requests taken from the station bus enter a
// request queue of QDEPTH entries; a request arriving while the queue is full
// is answered with a NACK so the processor retransmits it. The queue head is
// served in order, one per cycle:
//   * READ : held while the block is locked (counter non-zero), then a
//            read-data reply is queued and the mask gains the reader's path;
//   * WRITE: performed at once even if the block is locked, the counter is
//            incremented, a WIP packet carrying the mask is queued, and the
//            mask is reset to the writer's path.
// A WI packet seen on the bus for a block of this module decrements the
// block's counter; WI packets are never queued or refused. Waiting reads hold
// the queue head (in-order service), which is this design's choice.
//
// Interface: bus_in is the packet on the station bus this cycle. out_valid /
// out_pkt present the head of the reply queue; out_grant pops it. The reply
// queue holds NUM_PROCS entries: each processor has at most one request in
// flight, so it cannot overflow. Masks and counters reset to zero; data
// words are not reset.
module mem_module
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] RING          = '0,
  parameter logic [STA_W-1:0]  STATION       = '0,
  parameter int unsigned       QDEPTH        = 4,
  parameter int unsigned       OUTQ_DEPTH    = NUM_PROCS,
  parameter bit                OUT_FILTER_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t bus_in,
  output logic out_valid,
  output pkt_t out_pkt,
  input  logic out_grant,
  // event strobes for monitoring
  output logic ev_nack,        // a request was refused
  output logic ev_lock_stall,  // a read waits on a locked block this cycle
  output logic ev_unlock       // a WI returned and a counter reached zero
);
  localparam int unsigned LOCK_W = $clog2(NUM_PROCS + 1);

  logic [DATA_W-1:0] data_q [MEM_LINES];
  fmask_t            mask_q [MEM_LINES];
  logic [LOCK_W-1:0] lock_q [MEM_LINES];

  // ---- request queue ---------------------------------------------------------
  pkt_t inq_head;
  logic inq_empty, inq_full, inq_push, inq_pop;
  logic [$clog2(QDEPTH+1)-1:0] inq_count;

  wire for_me = bus_in.valid && bus_in.dst.ring == RING && bus_in.dst.station == STATION
                && bus_in.dst.module_id == MOD_W'(MEM_MOD)
                && (bus_in.ptype == PK_READ || bus_in.ptype == PK_WRITE);
  wire wi_home = bus_in.valid && bus_in.ptype == PK_WI
                 && bus_in.addr.ring == RING && bus_in.addr.station == STATION;

  assign inq_push = for_me && !inq_full;
  assign ev_nack  = for_me && inq_full;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(QDEPTH)) u_inq (
    .clk, .rst_n, .push(inq_push), .wr_data(bus_in), .pop(inq_pop),
    .rd_data(inq_head), .empty(inq_empty), .full(inq_full), .count(inq_count));

  // ---- reply queue -------------------------------------------------------
  pkt_t outq_in;
  logic outq_push, outq_empty, outq_full;
  logic [$clog2(OUTQ_DEPTH+1)-1:0] outq_count;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n, .push(outq_push), .wr_data(outq_in), .pop(out_grant),
    .rd_data(out_pkt), .empty(outq_empty), .full(outq_full), .count(outq_count));

  assign out_valid = !outq_empty;

  // ---- serving the queue head -------------------------------------------
  wire [IDX_W-1:0] hidx     = inq_head.addr.index;
  wire             h_write  = inq_head.ptype == PK_WRITE;
  wire             h_locked = lock_q[hidx] != '0;
  fmask_t          mm_new, mm_wip;

  mask_maint #(.HOME_RING(RING), .HOME_STATION(STATION), .OUT_FILTER_EN(OUT_FILTER_EN)) u_mm (
    .stored(mask_q[hidx]), .is_write(h_write),
    .req_ring(inq_head.src.ring), .req_station(inq_head.src.station),
    .new_stored(mm_new), .wip_mask(mm_wip));

  wire can_serve = !inq_empty && !ev_nack && !outq_full;
  assign inq_pop       = can_serve && (h_write || !h_locked);
  assign ev_lock_stall = can_serve && !h_write && h_locked;

  always_comb begin
    outq_push = 1'b0;
    outq_in   = '0;
    if (ev_nack) begin
      outq_push       = 1'b1;
      outq_in.valid   = 1'b1;
      outq_in.ptype   = PK_NACK;
      outq_in.src     = '{ring: RING, station: STATION, module_id: MOD_W'(MEM_MOD)};
      outq_in.dst     = bus_in.src;
      outq_in.addr    = bus_in.addr;
    end else if (inq_pop) begin
      outq_push       = 1'b1;
      outq_in.valid   = 1'b1;
      outq_in.addr    = inq_head.addr;
      if (h_write) begin
        outq_in.ptype = PK_WIP;
        outq_in.src   = inq_head.src;      // writer, so its WI unblocks it
        outq_in.data  = inq_head.data;
        outq_in.mask  = mm_wip;
      end else begin
        outq_in.ptype = PK_RDATA;
        outq_in.src   = '{ring: RING, station: STATION, module_id: MOD_W'(MEM_MOD)};
        outq_in.dst   = inq_head.src;
        outq_in.data  = data_q[hidx];
      end
    end
  end

  wire [IDX_W-1:0] widx = bus_in.addr.index;
  assign ev_unlock = wi_home && lock_q[widx] == LOCK_W'(1)
                     && !(inq_pop && h_write && hidx == widx);

  wire do_inc = inq_pop && h_write;
  wire same   = do_inc && wi_home && hidx == widx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MEM_LINES; i++) begin
        mask_q[i] <= '0;
        lock_q[i] <= '0;
      end
    end else begin
      if (inq_pop) mask_q[hidx] <= mm_new;
      // lock counter: +1 for a performed write, -1 for a returning WI
      if (!same) begin
        if (do_inc) lock_q[hidx] <= lock_q[hidx] + 1'b1;
        if (wi_home && lock_q[widx] != '0) lock_q[widx] <= lock_q[widx] - 1'b1;
      end
    end
  end

  // data words are not reset: contents are undefined until first written
  always_ff @(posedge clk) begin
    if (do_inc) data_q[hidx] <= inq_head.data;
  end

  a_wi_for_unlocked: assert property (@(posedge clk) disable iff (!rst_n)
                                      wi_home |-> lock_q[widx] != '0
                                                  || (inq_pop && h_write && hidx == widx))
    else $error("WI returned for a block that is not locked");
endmodule
