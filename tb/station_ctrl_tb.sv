// station_ctrl_tb: station controller of ring 1, station 2, with modules and
// ring neighbours played by the testbench. Checks, cycle by cycle: delivery
// from the ring takes the bus in the same cycle and no module is granted;
// the incoming filter copies a WI onto the bus only when bit 2 of its local
// field is set, and the WI always continues on the ring; an on-station packet
// stays on the bus; an off-station packet enters the ring two cycles after its
// grant (through the outbound queue) when the slot is free and waits while packets pass; a WIP with a zero
// mask becomes a WI on this bus and never reaches the ring, other WIPs go to
// the ring; round-robin grants visit all five modules in turn.
module station_ctrl_tb;
  import hector_pkg::*;

  localparam int M = MODS_PER_STATION;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] mod_out_valid = '0, mod_grant;
  pkt_t mod_out_pkt [M];
  pkt_t bus_pkt, ring_in = '0, ring_out;
  logic ev_wi_copy, ev_wi_block, ev_wip_local, ev_ring_wait;

  station_ctrl #(.RING(1), .STATION(2)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic pkt_t mk(input ptype_e t, input int dr, input int ds, input int dm,
                              input logic [DATA_W-1:0] d);
    pkt_t p = '0;
    p.valid = 1; p.ptype = t; p.dst = '{ring: RING_W'(dr), station: STA_W'(ds), module_id: MOD_W'(dm)};
    p.src = '{ring: 1, station: 2, module_id: 0};
    p.addr = '{ring: 1, station: 2, index: 8'h10};
    p.data = d;
    return p;
  endfunction

  initial begin
    pkt_t p, q;
    foreach (mod_out_pkt[i]) mod_out_pkt[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. ring delivery wins the bus over a waiting module
    @(negedge clk);
    p = mk(PK_RDATA, 1, 2, 1, 32'hD1);
    ring_in = p;
    mod_out_valid[0] = 1; mod_out_pkt[0] = mk(PK_READ, 1, 2, 4, 32'hA0);
    #1 chk(bus_pkt == p && mod_grant == '0, "ring delivery must own the bus");
    @(negedge clk);
    ring_in = '0;
    chk(ring_out.valid == 0, "delivered packet leaves the ring");
    #1 chk(mod_grant == 5'b00001 && bus_pkt == mod_out_pkt[0], "module granted when bus free");
    @(negedge clk);
    mod_out_valid = '0;
    chk(ring_out.valid == 0, "on-station packet must not enter the ring");

    // 2. incoming filter
    p = mk(PK_WI, 0, 0, 0, 0); p.mask.local_f = 4'b0100;
    ring_in = p;
    #1 chk(bus_pkt == p && ev_wi_copy, "WI with station bit set copied to bus");
    @(negedge clk);
    chk(ring_out == p, "WI continues on the ring");
    p.mask.local_f = 4'b1011;
    ring_in = p;
    #1 chk(!bus_pkt.valid && ev_wi_block, "WI without station bit blocked");
    @(negedge clk);
    chk(ring_out == p, "blocked WI still continues on the ring");
    ring_in = '0;

    // 3. off-station packet waits for a free slot
    q = mk(PK_READ, 3, 0, 4, 32'hB0);
    p = mk(PK_READ, 0, 1, 4, 32'hC0);        // passing packet
    mod_out_valid[3] = 1; mod_out_pkt[3] = q;
    ring_in = p;
    #1 chk(mod_grant == 5'b01000, "off-station packet granted");
    @(negedge clk);
    mod_out_valid = '0;
    chk(ring_out == p, "passing packet keeps its slot");
    ring_in = p;                              // ring busy one more cycle
    #1 chk(ev_ring_wait, "outbound packet waits");
    @(negedge clk);
    chk(ring_out == p, "still passing");
    ring_in = '0;
    @(negedge clk);
    chk(ring_out == q, "outbound packet joins the free slot");

    // 4. outgoing filter at station level
    p = mk(PK_WIP, 0, 0, 0, 32'hE0); p.mask = '0;
    mod_out_valid[4] = 1; mod_out_pkt[4] = p;
    #1 chk(mod_grant == 5'b10000 && ev_wip_local, "WIP with zero mask stopped here");
    @(negedge clk);
    mod_out_valid = '0;
    q = p; q.ptype = PK_WI;
    #1 chk(bus_pkt == q, "station-level WI on the bus the next cycle");
    @(negedge clk);
    chk(ring_out.valid == 0, "station-level WIP never reaches the ring");
    p.mask.local_f = 4'b0110;
    mod_out_valid[4] = 1; mod_out_pkt[4] = p;
    @(negedge clk);
    mod_out_valid = '0;
    chk(ring_out.valid == 0, "queued packet reaches the ring one cycle later");
    @(negedge clk);
    chk(ring_out == p, "ring-level WIP sent onto the ring");

    // 5. round robin
    for (int i = 0; i < M; i++) mod_out_pkt[i] = mk(PK_READ, 1, 2, 4, 32'(i));
    mod_out_valid = '1;
    begin
      int order [$];
      for (int k = 0; k < 2 * M; k++) begin
        #1;
        for (int i = 0; i < M; i++) if (mod_grant[i]) order.push_back(i);
        @(negedge clk);
      end
      chk(order.size() == 2 * M, "one grant per cycle");
      for (int k = 1; k < order.size(); k++)
        chk(order[k] == (order[k-1] + 1) % M, "grants rotate");
    end
    mod_out_valid = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
