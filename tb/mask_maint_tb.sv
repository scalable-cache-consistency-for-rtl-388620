// mask_maint_tb: checks the filter bit-mask maintenance against an
// independent model. The model keeps, per block, the plain set of stations
// that may hold a copy (one bit per station, 16 bits) and derives the
// expected field mask and height from that set: the central field lists the
// rings with marked stations, the local field the station numbers in use,
// and fields above the lowest common ancestor of the set and the home are
// zero. Includes a small example of a mask with copies on two
// stations of different rings. Home is ring 1, station 2.
module mask_maint_tb;
  import hector_pkg::*;

  localparam logic [RING_W-1:0] HR = 1;
  localparam logic [STA_W-1:0]  HS = 2;

  fmask_t            stored, new_stored, wip_mask;
  logic              is_write;
  logic [RING_W-1:0] req_ring;
  logic [STA_W-1:0]  req_station;

  mask_maint #(.HOME_RING(HR), .HOME_STATION(HS)) dut (.*);

  int checks = 0, failures = 0;

  // expected encoded mask for a set of stations (home always included)
  function automatic fmask_t model(input logic [NUM_STATIONS-1:0] set);
    fmask_t m;
    logic [NUM_STATIONS-1:0] s;
    bit same_ring, same_station;
    m = '0;
    s = set;
    s[HR * STATIONS_PER_RING + HS] = 1'b1;
    same_ring = 1; same_station = 1;
    for (int i = 0; i < int'(NUM_STATIONS); i++) if (s[i]) begin
      m.central[i / STATIONS_PER_RING] = 1'b1;
      m.local_f[i % STATIONS_PER_RING] = 1'b1;
      if (i / STATIONS_PER_RING != HR) same_ring = 0;
      if (i != HR * STATIONS_PER_RING + HS) same_station = 0;
    end
    if (same_ring) m.central = '0;
    if (same_station) m.local_f = '0;
    return m;
  endfunction

  initial begin
    logic [NUM_STATIONS-1:0] set;
    fmask_t exp_m;
    fmask_t ex;
    set = '0;
    stored = '0;
    for (int n = 0; n < 3000; n++) begin
      automatic int st = $urandom_range(NUM_STATIONS-1);
      // bias towards the home ring so all three heights occur
      if ($urandom_range(2) == 0) st = HR * STATIONS_PER_RING + $urandom_range(STATIONS_PER_RING-1);
      if ($urandom_range(3) == 0) st = HR * STATIONS_PER_RING + HS;
      is_write    = ($urandom_range(3) == 0);
      req_ring    = RING_W'(st / STATIONS_PER_RING);
      req_station = STA_W'(st % STATIONS_PER_RING);
      #1;
      set[st] = 1'b1;
      if (is_write) begin
        exp_m = model(set);
        checks++;
        if (wip_mask !== exp_m) begin
          failures++;
          $display("FAIL: WIP mask %b expected %b (set %b)", wip_mask, exp_m, set);
        end
        set = '0;
        set[st] = 1'b1;
      end
      exp_m = model(set);
      checks++;
      if (new_stored !== exp_m) begin
        failures++;
        $display("FAIL: stored mask %b expected %b (set %b)", new_stored, exp_m, set);
      end
      stored = new_stored;
    end
    // Worked example: copies on ring 0 station 1 and ring 2 station 0,
    // home ring 1 station 2: rings {0,1,2}, stations {0,1,2}.
    stored = '0; is_write = 0; req_ring = 0; req_station = 1; #1;
    stored = new_stored; req_ring = 2; req_station = 0; #1;
    stored = new_stored; is_write = 1; req_ring = 1; req_station = 2; #1;
    ex.central = 4'b0111; ex.local_f = 4'b0111;
    checks++;
    if (wip_mask !== ex) begin
      failures++;
      $display("FAIL: example WIP mask %b expected %b", wip_mask, ex);
    end
    checks++;
    if (new_stored !== fmask_t'(0)) begin
      failures++;
      $display("FAIL: home writer should leave a station-level (zero) mask, got %b", new_stored);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
