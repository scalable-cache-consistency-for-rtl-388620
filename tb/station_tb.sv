// station_tb: one station (ring 0, station 0) with four processor modules and
// its memory, the rest of the ring played by the testbench. Checked: a block
// homed here and shared only here is written with a station-level WIP that
// never reaches the ring, and the other processors then read the new value;
// all four processors writing the same home block at once complete and
// agree afterwards; a read of a remote block leaves on the ring as a READ to
// the right station and the reply from the ring completes it; a WI arriving
// on the ring with this station's bit invalidates the remote copy.
module station_tb;
  import hector_pkg::*;

  localparam int P = PROCS_PER_STATION;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0]      cpu_req_valid = '0, cpu_req_write = '0, cpu_req_ready, cpu_resp_valid;
  addr_t             cpu_req_addr [P];
  logic [DATA_W-1:0] cpu_req_wdata [P], cpu_resp_rdata [P];
  pkt_t              ring_in = '0, ring_out;
  logic [P-1:0]      ev_hit, ev_miss, ev_inval, ev_retry;
  logic ev_nack, ev_lock_stall, ev_unlock, ev_wi_copy, ev_wi_block, ev_wip_local, ev_ring_wait;

  station #(.RING(0), .STATION(0)) dut (.*);

  int checks = 0, failures = 0;
  pkt_t on_ring [$];
  int n_wip_local = 0;
  always @(posedge clk) if (rst_n) begin
    if (ring_out.valid) on_ring.push_back(ring_out);
    n_wip_local += int'(ev_wip_local);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input int p, input bit wr, input addr_t a, input logic [DATA_W-1:0] wd,
                    output logic [DATA_W-1:0] rd);
    int n = 0;
    @(negedge clk);
    cpu_req_valid[p] = 1; cpu_req_write[p] = wr; cpu_req_addr[p] = a; cpu_req_wdata[p] = wd;
    while (!cpu_req_ready[p]) @(negedge clk);
    @(negedge clk);
    cpu_req_valid[p] = 0;
    while (!cpu_resp_valid[p] && n < 500) begin @(negedge clk); n++; end
    chk(n < 500, $sformatf("processor %0d request completes", p));
    rd = cpu_resp_rdata[p];
  endtask

  initial begin
    addr_t h, r;
    logic [DATA_W-1:0] v;
    foreach (cpu_req_addr[i]) begin cpu_req_addr[i] = '0; cpu_req_wdata[i] = '0; end
    h = '{ring: 0, station: 0, index: 8'h04};
    r = '{ring: 1, station: 0, index: 8'h07};
    repeat (3) @(posedge clk);
    rst_n = 1;

    op(0, 1, h, 32'h0000_00A1, v);
    for (int p = 1; p < P; p++) begin
      op(p, 0, h, '0, v);
      chk(v == 32'h0000_00A1, $sformatf("processor %0d reads first value (%h)", p, v));
    end
    op(0, 1, h, 32'h0000_00A2, v);
    for (int p = 0; p < P; p++) begin
      op(p, 0, h, '0, v);
      chk(v == 32'h0000_00A2, $sformatf("processor %0d reads second value (%h)", p, v));
    end
    chk(n_wip_local == 2, $sformatf("two station-level WIPs (%0d)", n_wip_local));
    chk(on_ring.size() == 0, "on-station traffic must not use the ring");

    // all four write the same block concurrently
    for (int p = 0; p < P; p++) fork
      automatic int pp = p;
      begin logic [DATA_W-1:0] d; op(pp, 1, h, 32'hB0 + 32'(pp), d); end
    join_none
    wait fork;
    begin
      logic [DATA_W-1:0] first;
      op(0, 0, h, '0, first);
      chk(first >= 32'hB0 && first <= 32'hB3, "final value is one of the written ones");
      for (int p = 1; p < P; p++) begin
        op(p, 0, h, '0, v);
        chk(v == first, $sformatf("processor %0d agrees (%h vs %h)", p, v, first));
      end
    end

    // remote read through the ring
    fork
      op(2, 0, r, '0, v);
      begin
        pkt_t q, rep;
        while (on_ring.size() == 0) @(negedge clk);
        q = on_ring.pop_front();
        chk(q.ptype == PK_READ && q.dst.ring == 1 && q.dst.station == 0 && q.addr == r,
            "remote read leaves on the ring");
        @(negedge clk);
        rep = '0; rep.valid = 1; rep.ptype = PK_RDATA; rep.dst = q.src;
        rep.src = q.dst; rep.addr = r; rep.data = 32'h0000_0C01;
        ring_in = rep;
        @(negedge clk);
        ring_in = '0;
      end
    join
    chk(v == 32'h0000_0C01, "remote read data");
    op(2, 0, r, '0, v);
    chk(v == 32'h0000_0C01 && on_ring.size() == 0, "remote block now cached");
    // WI from the ring for the remote block
    @(negedge clk);
    ring_in = '0; ring_in.valid = 1; ring_in.ptype = PK_WI; ring_in.addr = r;
    ring_in.src = '{ring: 3, station: 1, module_id: 0};
    ring_in.mask.central = 4'b0011; ring_in.mask.local_f = 4'b0001;
    @(negedge clk);
    ring_in = '0;
    repeat (2) @(negedge clk);
    on_ring.delete();
    fork
      op(2, 0, r, '0, v);
      begin
        pkt_t q, rep;
        while (on_ring.size() == 0) @(negedge clk);
        q = on_ring.pop_front();
        chk(q.ptype == PK_READ, "invalidated copy is fetched again");
        @(negedge clk);
        rep = '0; rep.valid = 1; rep.ptype = PK_RDATA; rep.dst = q.src;
        rep.src = q.dst; rep.addr = r; rep.data = 32'h0000_0C02;
        ring_in = rep;
        @(negedge clk);
        ring_in = '0;
      end
    join
    chk(v == 32'h0000_0C02, "new remote data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
