// hector_top_tb: end-to-end test of the full 64-processor machine at its
// default parameters.
//
// The processors are modelled by one process each driving the cpu_* ports.
// Phase 1 (directed) makes one block's sharers move from the home station to
// the home ring and then to a remote ring, so that the WIP is stopped at
// station level, at ring level, and climbs to the central ring; after each
// write the sharers must read the new value (their copies were invalidated).
// Phase 2 (rounds) lets a different random writer update each block in every
// round, all concurrently, then lets all 64 processors read random blocks;
// every read must return that round's value. Phase 3 mixes concurrent writes
// and reads of the same blocks (locks, NACKs, ring contention); reads must
// return one of the values in play, and after the machine goes quiet every
// processor must read the same value for each block.
// Each mechanism's event strobe is counted, and a mechanism that never
// happened counts as a failure. A watchdog ends a hung run.
module hector_top_tb;
  import hector_pkg::*;

  localparam int unsigned NP = NUM_PROCS;
  localparam int ROUNDS      = 12;
  localparam int NBLK        = 24;   // blocks used in phases 2 and 3
  localparam int SETTLE      = 200;  // cycles for a broadcast to finish
  // Idle-machine bound for one write: every local ring hop (S+1 per local
  // ring crossed, three crossings), every central hop (R per crossing, two
  // crossings), two cycles per queue passed (station outbound queue, IRI
  // FIFOs, memory queues: ten) and one per bus transfer (four).
  localparam int LAT_BOUND   = 3 * (STATIONS_PER_RING + 1) + 2 * NUM_RINGS + 2 * 10 + 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0]     cpu_req_valid = '0, cpu_req_write = '0;
  addr_t             cpu_req_addr  [NP];
  logic [DATA_W-1:0] cpu_req_wdata [NP];
  logic [NP-1:0]     cpu_req_ready, cpu_resp_valid;
  logic [DATA_W-1:0] cpu_resp_rdata [NP];
  logic [NP-1:0]     ev_hit, ev_miss, ev_inval, ev_retry;
  logic [NUM_STATIONS-1:0] ev_nack, ev_lock_stall, ev_unlock, ev_wi_copy, ev_wi_block,
                           ev_wip_station, ev_ring_wait;
  logic [NUM_RINGS-1:0] ev_wip_ring, ev_wip_central, ev_wi_down, ev_wi_ring_block, ev_fifo_wait;

  hector_top dut (.*);

  int checks = 0, failures = 0;

  // ---- event counters ------------------------------------------------------
  localparam int NEV = 15;
  string ev_name [NEV] = '{"read hit", "read miss", "invalidation", "NACK retry",
                           "memory NACK", "read held by lock", "unlock",
                           "WI onto station bus", "WI blocked at station",
                           "WIP stopped at station", "station waits for ring slot",
                           "WIP stopped at local ring", "WIP to central ring",
                           "WI copied into ring", "WI blocked at ring"};
  longint ev_cnt [NEV];
  longint fifo_wait_cnt = 0;

  initial foreach (ev_cnt[i]) ev_cnt[i] = 0;
  always @(posedge clk) if (rst_n) begin
    ev_cnt[0]  += $countones(ev_hit);
    ev_cnt[1]  += $countones(ev_miss);
    ev_cnt[2]  += $countones(ev_inval);
    ev_cnt[3]  += $countones(ev_retry);
    ev_cnt[4]  += $countones(ev_nack);
    ev_cnt[5]  += $countones(ev_lock_stall);
    ev_cnt[6]  += $countones(ev_unlock);
    ev_cnt[7]  += $countones(ev_wi_copy);
    ev_cnt[8]  += $countones(ev_wi_block);
    ev_cnt[9]  += $countones(ev_wip_station);
    ev_cnt[10] += $countones(ev_ring_wait);
    ev_cnt[11] += $countones(ev_wip_ring);
    ev_cnt[12] += $countones(ev_wip_central);
    ev_cnt[13] += $countones(ev_wi_down);
    ev_cnt[14] += $countones(ev_wi_ring_block);
    fifo_wait_cnt += $countones(ev_fifo_wait);
  end

  // ---- processor model -----------------------------------------------------
  function automatic int gid(int r, int s, int p);
    return (r * STATIONS_PER_RING + s) * PROCS_PER_STATION + p;
  endfunction

  function automatic addr_t mk_addr(int r, int s, int idx);
    addr_t a;
    a.ring = RING_W'(r); a.station = STA_W'(s); a.index = IDX_W'(idx);
    return a;
  endfunction

  int last_lat;   // cycles from acceptance to response of the last op

  task automatic op(input int p, input bit wr, input addr_t a,
                    input logic [DATA_W-1:0] wd, output logic [DATA_W-1:0] rd);
    int n = 0;
    @(negedge clk);
    cpu_req_valid[p] = 1'b1;
    cpu_req_write[p] = wr;
    cpu_req_addr[p]  = a;
    cpu_req_wdata[p] = wd;
    while (!cpu_req_ready[p]) @(negedge clk);
    @(negedge clk);
    cpu_req_valid[p] = 1'b0;
    while (!cpu_resp_valid[p] && n < 20000) begin
      @(negedge clk);
      n++;
    end
    if (n >= 20000) begin
      failures++;
      $display("FAIL: processor %0d op on %h never completed", p, a);
    end
    last_lat = n + 1;
    rd = cpu_resp_rdata[p];
  endtask

  task automatic check_read(input int p, input addr_t a, input logic [DATA_W-1:0] exp);
    logic [DATA_W-1:0] v;
    op(p, 1'b0, a, '0, v);
    checks++;
    if (v !== exp) begin
      failures++;
      $display("FAIL: processor %0d read %h = %h, expected %h", p, a, v, exp);
    end
  endtask

  task automatic do_write(input int p, input addr_t a, input logic [DATA_W-1:0] v);
    logic [DATA_W-1:0] dummy;
    op(p, 1'b1, a, v, dummy);
  endtask

  // A write completes when its WI reaches the writer's station; other
  // stations' copies may still be in the course of being invalidated. Tests
  // that read on other processors after a write wait for the broadcast to end.
  task automatic settle();
    repeat (SETTLE) @(posedge clk);
  endtask

  addr_t blk [NBLK];
  logic [DATA_W-1:0] cur [NBLK];

  // ---- stimulus --------------------------------------------------------------
  initial begin
    addr_t a0;
    logic [DATA_W-1:0] t;
    foreach (cpu_req_addr[i]) begin cpu_req_addr[i] = '0; cpu_req_wdata[i] = '0; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // -- phase 1: sharers at station, ring and central level --------------
    a0 = mk_addr(0, 0, 1);
    do_write(gid(0,0,0), a0, 32'h1000_0001);
    settle();
    check_read(gid(0,0,1), a0, 32'h1000_0001);   // same-station sharer
    do_write(gid(0,0,0), a0, 32'h1000_0002);      // WIP stops at the station
    settle();
    check_read(gid(0,0,1), a0, 32'h1000_0002);
    check_read(gid(0,0,0), a0, 32'h1000_0002);   // writer kept its copy
    check_read(gid(0,2,3), a0, 32'h1000_0002);   // sharer on the home ring
    do_write(gid(0,0,0), a0, 32'h1000_0003);      // WIP stops at the local ring
    settle();
    check_read(gid(0,2,3), a0, 32'h1000_0003);
    check_read(gid(2,1,0), a0, 32'h1000_0003);   // sharer on a remote ring
    do_write(gid(3,3,2), a0, 32'h1000_0004);      // remote writer: central ring
    // On an idle machine the write needs at most: the request across two
    // local rings and the central ring, the WIP up one local ring and once
    // round the central ring, and the WI down one local ring.
    checks++;
    $display("  idle central-level write took %0d cycles (bound %0d)", last_lat, LAT_BOUND);
    if (last_lat > LAT_BOUND) begin
      failures++;
      $display("FAIL: central-level write took %0d cycles, bound %0d", last_lat, LAT_BOUND);
    end
    settle();
    check_read(gid(2,1,0), a0, 32'h1000_0004);
    check_read(gid(0,0,1), a0, 32'h1000_0004);
    check_read(gid(3,3,2), a0, 32'h1000_0004);
    checks++;
    if (ev_cnt[9] == 0 || ev_cnt[11] == 0 || ev_cnt[12] == 0) begin
      failures++;
      $display("FAIL: directed phase did not stop WIPs at all three heights");
    end

    // -- phase 2: rounds of concurrent writes, then concurrent reads -------
    for (int b = 0; b < NBLK; b++) begin
      blk[b] = mk_addr($urandom_range(NUM_RINGS-1), $urandom_range(STATIONS_PER_RING-1),
                       16 + b);
    end
    for (int rd_i = 0; rd_i < ROUNDS; rd_i++) begin
      int writer [NBLK];
      for (int b = 0; b < NBLK; b++) begin
        writer[b] = $urandom_range(NP-1);
        cur[b]    = {8'(rd_i), 8'(b), 16'($urandom)};
      end
      // one writer per block; a processor writing several blocks does them in turn
      for (int p = 0; p < int'(NP); p++) begin
        fork
          automatic int pp = p;
          begin
            for (int b = 0; b < NBLK; b++)
              if (writer[b] == pp) do_write(pp, blk[b], cur[b]);
          end
        join_none
      end
      wait fork;
      settle();
      for (int p = 0; p < int'(NP); p++) begin
        fork
          automatic int pp = p;
          begin
            for (int k = 0; k < 4; k++) begin
              automatic int b = $urandom_range(NBLK-1);
              check_read(pp, blk[b], cur[b]);
            end
          end
        join_none
      end
      wait fork;
    end

    // -- phase 3: writes and reads of the same blocks at the same time -----
    begin
      logic [DATA_W-1:0] alt [NBLK];
      for (int b = 0; b < NBLK; b++) alt[b] = 32'hA000_0000 | 32'(b);
      for (int p = 0; p < int'(NP); p++) begin
        fork
          automatic int pp = p;
          begin
            for (int k = 0; k < 6; k++) begin
              automatic int b = (pp + k) % 4;   // heavy traffic on 4 blocks
              logic [DATA_W-1:0] v;
              if (pp % 8 == 0 && k == 0) begin
                do_write(pp, blk[b], alt[b]);
              end else begin
                op(pp, 1'b0, blk[b], '0, v);
                checks++;
                if (v !== cur[b] && v !== alt[b]) begin
                  failures++;
                  $display("FAIL: processor %0d read %h = %h, not a written value",
                           pp, blk[b], v);
                end
              end
            end
          end
        join_none
      end
      wait fork;
      repeat (400) @(posedge clk);
      // quiet machine: every processor must agree on every block
      for (int b = 0; b < 4; b++) begin
        logic [DATA_W-1:0] ref_v;
        op(0, 1'b0, blk[b], '0, ref_v);
        checks++;
        if (ref_v !== cur[b] && ref_v !== alt[b]) begin
          failures++;
          $display("FAIL: block %h holds %h, not a written value", blk[b], ref_v);
        end
        for (int p = 1; p < int'(NP); p++) check_read(p, blk[b], ref_v);
      end
    end

    // -- every mechanism must have happened --------------------------------
    for (int i = 0; i < NEV; i++) begin
      checks++;
      $display("  %-28s %0d", ev_name[i], ev_cnt[i]);
      if (ev_cnt[i] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never happened", ev_name[i]);
      end
    end
    checks++;
    $display("  %-28s %0d", "FIFO waits for ring slot", fifo_wait_cnt);
    if (fifo_wait_cnt == 0) begin
      failures++;
      $display("FAIL: no inter-ring FIFO ever waited");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
