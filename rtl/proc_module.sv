// proc_module: processor module minus the processor: a write-through,
// invalidating cache, its controller and the communication submodule that
// talks to the station bus.
//
// The cache is direct-mapped with CACHE_LINES one-word blocks (size and
// organisation are this design's choice). The processor side is a simple
// request/response port; one request is accepted at a time:
//   * read hit : answered on the next cycle;
//   * read miss: a READ packet goes to the home memory of the address; the
//                reply fills the cache and is returned to the processor;
//   * write    : the cached copy (if any) is updated, a WRITE packet is sent
//                to the home memory (no allocate on a write miss), and the
//                processor stays blocked until the WI packet that carries this
//                module's ID is seen on the station bus. That WI completes
//                the write (cpu_resp_valid pulses).
// A NACK from a memory makes the module retransmit the same request. Every WI
// on the bus is snooped: a matching valid line is invalidated unless the WI
// carries this module's own ID (the writer keeps its copy).
//
// Interface: bus_in is the station bus packet of this cycle; out_valid /
// out_pkt request the bus and out_grant says it was taken this cycle.
module proc_module
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] RING        = '0,
  parameter logic [STA_W-1:0]  STATION     = '0,
  parameter logic [MOD_W-1:0]  PROC        = '0,
  parameter int unsigned       CACHE_LINES = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              cpu_req_valid,
  input  logic              cpu_req_write,
  input  addr_t             cpu_req_addr,
  input  logic [DATA_W-1:0] cpu_req_wdata,
  output logic              cpu_req_ready,
  output logic              cpu_resp_valid,
  output logic [DATA_W-1:0] cpu_resp_rdata,
  // station bus side
  input  pkt_t              bus_in,
  output logic              out_valid,
  output pkt_t              out_pkt,
  input  logic              out_grant,
  // event strobes for monitoring
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_inval,
  output logic              ev_retry
);
  localparam int unsigned CIDX_W = $clog2(CACHE_LINES);
  localparam int unsigned TAG_W  = ADDR_W - CIDX_W;

  localparam node_id_t ME = '{ring: RING, station: STATION, module_id: PROC};

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT_RD, S_WAIT_WI} state_e;
  state_e state_q;

  logic              valid_q [CACHE_LINES];
  logic [TAG_W-1:0]  tag_q   [CACHE_LINES];
  logic [DATA_W-1:0] data_q  [CACHE_LINES];

  pkt_t req_q;

  wire [CIDX_W-1:0] c_idx = cpu_req_addr[CIDX_W-1:0];
  wire [TAG_W-1:0]  c_tag = cpu_req_addr[ADDR_W-1:CIDX_W];
  wire              c_hit = valid_q[c_idx] && tag_q[c_idx] == c_tag;

  wire [CIDX_W-1:0] b_idx = bus_in.addr[CIDX_W-1:0];
  wire [TAG_W-1:0]  b_tag = bus_in.addr[ADDR_W-1:CIDX_W];

  wire to_me   = bus_in.valid && bus_in.dst == ME;
  wire got_rd  = to_me && bus_in.ptype == PK_RDATA && state_q == S_WAIT_RD;
  wire got_nak = to_me && bus_in.ptype == PK_NACK
                 && (state_q == S_WAIT_RD || state_q == S_WAIT_WI);
  wire is_wi   = bus_in.valid && bus_in.ptype == PK_WI;
  wire own_wi  = is_wi && bus_in.src == ME && state_q == S_WAIT_WI;

  assign cpu_req_ready = state_q == S_IDLE;
  wire   accept        = cpu_req_valid && cpu_req_ready;

  assign out_valid = state_q == S_SEND;
  assign out_pkt   = req_q;

  assign ev_hit   = accept && !cpu_req_write && c_hit;
  assign ev_miss  = accept && !cpu_req_write && !c_hit;
  assign ev_inval = is_wi && bus_in.src != ME && valid_q[b_idx] && tag_q[b_idx] == b_tag;
  assign ev_retry = got_nak;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= S_IDLE;
      req_q          <= '0;
      cpu_resp_valid <= 1'b0;
      cpu_resp_rdata <= '0;
      for (int i = 0; i < CACHE_LINES; i++) valid_q[i] <= 1'b0;
    end else begin
      cpu_resp_valid <= 1'b0;
      // snooping: invalidate copies written by another processor
      if (ev_inval) valid_q[b_idx] <= 1'b0;
      unique case (state_q)
        S_IDLE: if (accept) begin
          req_q.valid <= 1'b1;
          req_q.src   <= ME;
          req_q.dst   <= '{ring: cpu_req_addr.ring, station: cpu_req_addr.station,
                           module_id: MOD_W'(MEM_MOD)};
          req_q.addr  <= cpu_req_addr;
          req_q.data  <= cpu_req_wdata;
          req_q.mask  <= '0;
          if (cpu_req_write) begin
            req_q.ptype <= PK_WRITE;
            if (c_hit) data_q[c_idx] <= cpu_req_wdata;
            state_q <= S_SEND;
          end else if (c_hit) begin
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= data_q[c_idx];
          end else begin
            req_q.ptype <= PK_READ;
            state_q <= S_SEND;
          end
        end
        S_SEND: if (out_grant)
          state_q <= (req_q.ptype == PK_WRITE) ? S_WAIT_WI : S_WAIT_RD;
        S_WAIT_RD: begin
          if (got_rd) begin
            valid_q[b_idx] <= 1'b1;
            tag_q[b_idx]   <= b_tag;
            data_q[b_idx]  <= bus_in.data;
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= bus_in.data;
            state_q        <= S_IDLE;
          end else if (got_nak) state_q <= S_SEND;
        end
        S_WAIT_WI: begin
          if (own_wi) begin
            cpu_resp_valid <= 1'b1;
            cpu_resp_rdata <= req_q.data;
            state_q        <= S_IDLE;
          end else if (got_nak) state_q <= S_SEND;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
