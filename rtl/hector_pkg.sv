// hector_pkg: shared topology constants, packet format and filter bit-mask
// helpers for a two-level ring multiprocessor kept consistent by a
// write-through invalidating protocol with limited broadcast.
//
// Topology follows the balanced 4 x 4 x 4 machine (one central ring, four
// local rings, four stations per ring, four processors per station). Each
// station additionally holds one memory module (a choice of this design; the
// architecture allows separate memory modules on a station).
//
// A packet is one bit-parallel word that moves one ring segment or one bus
// transfer per clock. Invalidation packets carry the filter bit mask in the
// same word, so they are no wider than data packets.
//
// Filter bit mask: {central field, local field}. Bit r of the central field
// lets a write-invalidate (WI) descend into local ring r; bit s of the local
// field lets it onto station s of any local ring it reaches. The height the
// write-invalidate-pending (WIP) packet must climb is encoded by zeroing the
// fields above it: central field zero means "stop at the home local ring",
// both fields zero means "stop at the home station".
package hector_pkg;

  // ---- topology -----------------------------------------------------------
  localparam int unsigned NUM_RINGS          = 4;  // local rings on the central ring
  localparam int unsigned STATIONS_PER_RING  = 4;  // stations on each local ring
  localparam int unsigned PROCS_PER_STATION  = 4;  // processor modules per station
  localparam int unsigned MODS_PER_STATION   = PROCS_PER_STATION + 1; // + memory
  localparam int unsigned NUM_PROCS          = NUM_RINGS * STATIONS_PER_RING * PROCS_PER_STATION;
  localparam int unsigned NUM_STATIONS       = NUM_RINGS * STATIONS_PER_RING;

  localparam int unsigned RING_W = (NUM_RINGS > 1) ? $clog2(NUM_RINGS) : 1;
  localparam int unsigned STA_W  = (STATIONS_PER_RING > 1) ? $clog2(STATIONS_PER_RING) : 1;
  localparam int unsigned MOD_W  = $clog2(MODS_PER_STATION);
  localparam int unsigned MEM_MOD = PROCS_PER_STATION; // module slot of the memory

  // ---- memory -------------------------------------------------------------
  localparam int unsigned MEM_LINES = 256;  // cache-line-sized blocks per memory module
  localparam int unsigned IDX_W     = $clog2(MEM_LINES);
  localparam int unsigned ADDR_W    = RING_W + STA_W + IDX_W; // global block address
  localparam int unsigned DATA_W    = 32;   // one word per block

  typedef struct packed {
    logic [RING_W-1:0] ring;
    logic [STA_W-1:0]  station;
    logic [MOD_W-1:0]  module_id;
  } node_id_t;

  // The home memory of a block is given by the top bits of its address.
  typedef struct packed {
    logic [RING_W-1:0] ring;
    logic [STA_W-1:0]  station;
    logic [IDX_W-1:0]  index;
  } addr_t;

  typedef struct packed {
    logic [NUM_RINGS-1:0]         central;
    logic [STATIONS_PER_RING-1:0] local_f;
  } fmask_t;

  typedef enum logic [2:0] {
    PK_READ  = 3'd0,  // processor -> memory read request
    PK_WRITE = 3'd1,  // processor -> memory write request (write-through)
    PK_RDATA = 3'd2,  // memory -> processor read response
    PK_NACK  = 3'd3,  // memory -> processor: queue full, retransmit
    PK_WIP   = 3'd4,  // write-invalidate-pending, climbing from the memory
    PK_WI    = 3'd5   // write-invalidate, broadcast downwards
  } ptype_e;

  typedef struct packed {
    logic               valid;
    ptype_e             ptype;
    node_id_t           src;   // requester; for WIP/WI the writing processor
    node_id_t           dst;   // destination module (unused for WIP/WI)
    addr_t              addr;
    logic [DATA_W-1:0]  data;
    fmask_t             mask;  // filter bit mask (WIP/WI only)
  } pkt_t;

  localparam int unsigned PKT_W = $bits(pkt_t);

  // Path bits needed for a WI to reach station (r, s).
  function automatic fmask_t path_bits(input logic [RING_W-1:0] r,
                                       input logic [STA_W-1:0]  s);
    fmask_t m;
    m = '0;
    m.central[r] = 1'b1;
    m.local_f[s] = 1'b1;
    return m;
  endfunction

  // Zero the fields above the lowest common ancestor of all marked stations
  // and the home station (h_r, h_s). The raw mask must contain the home path.
  function automatic fmask_t encode_height(input fmask_t raw,
                                           input logic [RING_W-1:0] h_r,
                                           input logic [STA_W-1:0]  h_s);
    fmask_t m;
    fmask_t home;
    m    = raw;
    home = path_bits(h_r, h_s);
    if (m.central == home.central) begin
      m.central = '0;
      if (m.local_f == home.local_f) m.local_f = '0;
    end
    return m;
  endfunction

  // Restore the zeroed fields of a stored mask (inverse of encode_height).
  function automatic fmask_t decode_height(input fmask_t enc,
                                           input logic [RING_W-1:0] h_r,
                                           input logic [STA_W-1:0]  h_s);
    fmask_t m;
    m = enc;
    m.central[h_r] = 1'b1;
    m.local_f[h_s] = 1'b1;
    return m;
  endfunction

endpackage
