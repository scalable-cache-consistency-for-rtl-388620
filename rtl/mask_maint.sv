// mask_maint: filter bit-mask maintenance for one memory block.
//
// The memory module keeps one mask per cache-line-sized block, stored in the
// height-encoded form of hector_pkg (fields above the needed height zeroed).
// This purely combinational unit computes, for the request being served:
//   * read : the stored mask gains the reader's path (its local-ring bit and
//            its station bit), so a later write reaches the reader's station;
//   * write: the mask sent in the WIP packet is the stored mask plus the
//            writer's path (the WI must reach the writer to unblock it), and
//            the stored mask is reset to the path between the memory and the
//            writer.
// The home path (the memory's own ring and station) is always implied, as the
// WI must come back to the memory to unlock the location. Evictions do not
// touch the mask. When OUT_FILTER_EN is 0 the WIP carries the full mask with
// no height encoding, so every WIP climbs to the central ring (the scenario
// without outgoing filters).
module mask_maint
  import hector_pkg::*;
#(
  parameter logic [RING_W-1:0] HOME_RING     = '0,
  parameter logic [STA_W-1:0]  HOME_STATION  = '0,
  parameter bit                OUT_FILTER_EN = 1'b1
) (
  input  fmask_t            stored,      // mask currently stored for the block
  input  logic              is_write,    // 1: write access, 0: read access
  input  logic [RING_W-1:0] req_ring,    // requester's local ring
  input  logic [STA_W-1:0]  req_station, // requester's station on that ring
  output fmask_t            new_stored,  // mask to store back
  output fmask_t            wip_mask     // mask for the WIP packet (writes)
);
  fmask_t raw;
  fmask_t req_path;
  fmask_t home_path;

  always_comb begin
    req_path  = path_bits(req_ring, req_station);
    home_path = path_bits(HOME_RING, HOME_STATION);
    raw       = decode_height(stored, HOME_RING, HOME_STATION) | req_path;
    if (is_write) begin
      wip_mask   = OUT_FILTER_EN ? encode_height(raw, HOME_RING, HOME_STATION) : raw;
      new_stored = encode_height(home_path | req_path, HOME_RING, HOME_STATION);
    end else begin
      wip_mask   = '0;
      new_stored = encode_height(raw, HOME_RING, HOME_STATION);
    end
  end
endmodule
