// station: one station of the hierarchy. PROCS_PER_STATION processor modules
// and one memory module share the station bus, which the station controller
// drives; the controller also owns this station's local ring segment.
//
// Module slots on the bus: 0 .. PROCS_PER_STATION-1 are the processor
// modules, slot PROCS_PER_STATION is the memory module. The memory of station
// (RING, STATION) holds every block whose address carries that ring and
// station number in its top bits. Per-module event strobes are brought out
// for monitoring; they have no function inside the design.
module station
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] RING          = '0,
  parameter logic [STA_W-1:0]  STATION       = '0,
  parameter int unsigned       CACHE_LINES   = 64,
  parameter int unsigned       MEM_QDEPTH    = 4,
  parameter int unsigned       OUTQ_DEPTH    = NUM_PROCS,
  parameter bit                IN_FILTER_EN  = 1'b1,
  parameter bit                OUT_FILTER_EN = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  // processors of this station
  input  logic [PROCS_PER_STATION-1:0] cpu_req_valid,
  input  logic [PROCS_PER_STATION-1:0] cpu_req_write,
  input  addr_t                        cpu_req_addr  [PROCS_PER_STATION],
  input  logic [DATA_W-1:0]            cpu_req_wdata [PROCS_PER_STATION],
  output logic [PROCS_PER_STATION-1:0] cpu_req_ready,
  output logic [PROCS_PER_STATION-1:0] cpu_resp_valid,
  output logic [DATA_W-1:0]            cpu_resp_rdata [PROCS_PER_STATION],
  // local ring segment
  input  pkt_t ring_in,
  output pkt_t ring_out,
  // monitoring
  output logic [PROCS_PER_STATION-1:0] ev_hit,
  output logic [PROCS_PER_STATION-1:0] ev_miss,
  output logic [PROCS_PER_STATION-1:0] ev_inval,
  output logic [PROCS_PER_STATION-1:0] ev_retry,
  output logic ev_nack,
  output logic ev_lock_stall,
  output logic ev_unlock,
  output logic ev_wi_copy,
  output logic ev_wi_block,
  output logic ev_wip_local,
  output logic ev_ring_wait
);
  logic [MODS_PER_STATION-1:0] mod_valid, mod_grant;
  pkt_t                        mod_pkt [MODS_PER_STATION];
  pkt_t                        bus_pkt;

  for (genvar p = 0; p < int'(PROCS_PER_STATION); p++) begin : g_proc
    proc_module #(.RING(RING), .STATION(STATION), .PROC(MOD_W'(p)),
                  .CACHE_LINES(CACHE_LINES)) u_proc (
      .clk, .rst_n,
      .cpu_req_valid (cpu_req_valid[p]),
      .cpu_req_write (cpu_req_write[p]),
      .cpu_req_addr  (cpu_req_addr[p]),
      .cpu_req_wdata (cpu_req_wdata[p]),
      .cpu_req_ready (cpu_req_ready[p]),
      .cpu_resp_valid(cpu_resp_valid[p]),
      .cpu_resp_rdata(cpu_resp_rdata[p]),
      .bus_in   (bus_pkt),
      .out_valid(mod_valid[p]),
      .out_pkt  (mod_pkt[p]),
      .out_grant(mod_grant[p]),
      .ev_hit   (ev_hit[p]),
      .ev_miss  (ev_miss[p]),
      .ev_inval (ev_inval[p]),
      .ev_retry (ev_retry[p]));
  end

  mem_module #(.RING(RING), .STATION(STATION), .QDEPTH(MEM_QDEPTH),
               .OUTQ_DEPTH(OUTQ_DEPTH), .OUT_FILTER_EN(OUT_FILTER_EN)) u_mem (
    .clk, .rst_n,
    .bus_in   (bus_pkt),
    .out_valid(mod_valid[MEM_MOD]),
    .out_pkt  (mod_pkt[MEM_MOD]),
    .out_grant(mod_grant[MEM_MOD]),
    .ev_nack, .ev_lock_stall, .ev_unlock);

  station_ctrl #(.RING(RING), .STATION(STATION), .OUTQ_DEPTH(OUTQ_DEPTH),
                 .IN_FILTER_EN(IN_FILTER_EN), .OUT_FILTER_EN(OUT_FILTER_EN)) u_sc (
    .clk, .rst_n,
    .mod_out_valid(mod_valid),
    .mod_out_pkt  (mod_pkt),
    .mod_grant    (mod_grant),
    .bus_pkt      (bus_pkt),
    .ring_in, .ring_out,
    .ev_wi_copy, .ev_wi_block, .ev_wip_local, .ev_ring_wait);
endmodule
