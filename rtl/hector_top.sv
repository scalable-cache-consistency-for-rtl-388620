// hector_top: two-level ring multiprocessor with hardware cache consistency
// by limited broadcast of invalidations.
//
// NUM_RINGS local rings hang off one central ring through inter-ring
// interfaces; each local ring carries STATIONS_PER_RING stations (default
// 4 x 4 x 4 = 64 processors, 16 memory modules). Local ring r runs
//   interface r -> station 0 -> station 1 -> ... -> station S-1 -> interface r
// and the central ring runs interface 0 -> 1 -> ... -> R-1 -> 0. Every node
// moves one packet per ring per cycle.
//
// A write travels to its home memory, which locks the block and sends a WIP
// packet upwards with the block's filter mask. The WIP is turned into a WI at
// the lowest level covering every station that may hold a copy (station,
// local ring or central ring: outgoing filter). The WI is broadcast down from
// there, entering only the rings and stations whose mask bits are set
// (incoming filter). The WI reaching the writer's station completes the
// write; the WI reaching the home memory unlocks the block.
//
// Ports: processors are outside the design. Processor g = (r*S + s)*P + p
// (ring r, station s, slot p) uses element g of the cpu_* ports; the block
// address in cpu_req_addr names its home memory in its top bits. The ev_*
// outputs are event strobes for monitoring only.
module hector_top
  import hector_pkg::*;
#(
  parameter int unsigned CACHE_LINES   = 64,
  parameter int unsigned MEM_QDEPTH    = 4,
  parameter int unsigned FIFO_DEPTH    = NUM_PROCS,
  parameter bit          IN_FILTER_EN  = 1'b1,
  parameter bit          OUT_FILTER_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NUM_PROCS-1:0] cpu_req_valid,
  input  logic [NUM_PROCS-1:0] cpu_req_write,
  input  addr_t                cpu_req_addr   [NUM_PROCS],
  input  logic [DATA_W-1:0]    cpu_req_wdata  [NUM_PROCS],
  output logic [NUM_PROCS-1:0] cpu_req_ready,
  output logic [NUM_PROCS-1:0] cpu_resp_valid,
  output logic [DATA_W-1:0]    cpu_resp_rdata [NUM_PROCS],
  // monitoring: per processor
  output logic [NUM_PROCS-1:0] ev_hit,
  output logic [NUM_PROCS-1:0] ev_miss,
  output logic [NUM_PROCS-1:0] ev_inval,
  output logic [NUM_PROCS-1:0] ev_retry,
  // monitoring: per station
  output logic [NUM_STATIONS-1:0] ev_nack,
  output logic [NUM_STATIONS-1:0] ev_lock_stall,
  output logic [NUM_STATIONS-1:0] ev_unlock,
  output logic [NUM_STATIONS-1:0] ev_wi_copy,
  output logic [NUM_STATIONS-1:0] ev_wi_block,
  output logic [NUM_STATIONS-1:0] ev_wip_station,
  output logic [NUM_STATIONS-1:0] ev_ring_wait,
  // monitoring: per inter-ring interface
  output logic [NUM_RINGS-1:0] ev_wip_ring,
  output logic [NUM_RINGS-1:0] ev_wip_central,
  output logic [NUM_RINGS-1:0] ev_wi_down,
  output logic [NUM_RINGS-1:0] ev_wi_ring_block,
  output logic [NUM_RINGS-1:0] ev_fifo_wait
);
  localparam int unsigned S = STATIONS_PER_RING;
  localparam int unsigned P = PROCS_PER_STATION;

  pkt_t central_seg [NUM_RINGS];           // output segment of interface r
  pkt_t local_seg   [NUM_RINGS][S + 1];    // [r][0]: interface, [r][s+1]: station s

  for (genvar r = 0; r < int'(NUM_RINGS); r++) begin : g_ring
    inter_ring_if #(.RING(RING_W'(r)), .FIFO_DEPTH(FIFO_DEPTH),
                    .IN_FILTER_EN(IN_FILTER_EN), .OUT_FILTER_EN(OUT_FILTER_EN)) u_iri (
      .clk, .rst_n,
      .local_in   (local_seg[r][S]),
      .local_out  (local_seg[r][0]),
      .central_in (central_seg[(r + NUM_RINGS - 1) % NUM_RINGS]),
      .central_out(central_seg[r]),
      .ev_wip_ring   (ev_wip_ring[r]),
      .ev_wip_central(ev_wip_central[r]),
      .ev_wi_down    (ev_wi_down[r]),
      .ev_wi_block   (ev_wi_ring_block[r]),
      .ev_fifo_wait  (ev_fifo_wait[r]));

    for (genvar s = 0; s < int'(S); s++) begin : g_sta
      localparam int unsigned ST = r * S + s;
      localparam int unsigned G0 = ST * P;
      addr_t             addr_l  [P];
      logic [DATA_W-1:0] wdata_l [P];
      logic [DATA_W-1:0] rdata_l [P];

      for (genvar p = 0; p < int'(P); p++) begin : g_map
        assign addr_l[p]              = cpu_req_addr[G0 + p];
        assign wdata_l[p]             = cpu_req_wdata[G0 + p];
        assign cpu_resp_rdata[G0 + p] = rdata_l[p];
      end

      station #(.RING(RING_W'(r)), .STATION(STA_W'(s)), .CACHE_LINES(CACHE_LINES),
                .MEM_QDEPTH(MEM_QDEPTH), .OUTQ_DEPTH(FIFO_DEPTH),
                .IN_FILTER_EN(IN_FILTER_EN), .OUT_FILTER_EN(OUT_FILTER_EN)) u_sta (
        .clk, .rst_n,
        .cpu_req_valid (cpu_req_valid[G0 +: P]),
        .cpu_req_write (cpu_req_write[G0 +: P]),
        .cpu_req_addr  (addr_l),
        .cpu_req_wdata (wdata_l),
        .cpu_req_ready (cpu_req_ready[G0 +: P]),
        .cpu_resp_valid(cpu_resp_valid[G0 +: P]),
        .cpu_resp_rdata(rdata_l),
        .ring_in  (local_seg[r][s]),
        .ring_out (local_seg[r][s + 1]),
        .ev_hit   (ev_hit[G0 +: P]),
        .ev_miss  (ev_miss[G0 +: P]),
        .ev_inval (ev_inval[G0 +: P]),
        .ev_retry (ev_retry[G0 +: P]),
        .ev_nack       (ev_nack[ST]),
        .ev_lock_stall (ev_lock_stall[ST]),
        .ev_unlock     (ev_unlock[ST]),
        .ev_wi_copy    (ev_wi_copy[ST]),
        .ev_wi_block   (ev_wi_block[ST]),
        .ev_wip_local  (ev_wip_station[ST]),
        .ev_ring_wait  (ev_ring_wait[ST]));
    end
  end
endmodule
