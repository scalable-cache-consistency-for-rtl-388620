// workload_mix_tb: synthetic reference streams with the operation mixes of
// the six 64-processor application traces (Simple, Speech, Weather, SOR,
// MP3D, Water) run on the full 4 x 4 x 4 machine at its default parameters.
//
// The original address traces are not reproducible here, so each processor
// draws its references from the published mix: shared reads and writes go to
// a pool of SHARED blocks spread over all memories; private reads and writes
// go to blocks homed on the processor's own station that no one else uses; a
// read-modify-write is a read followed by a write of the same shared block
// (no atomicity); instruction fetches are not modelled (they would hit in an
// instruction cache). Every block is initialised first.
//
// Checks: every read returns a value that was written to that block; after
// each application the machine goes quiet and all processors must read the
// same value of every shared block. Reported per application: mean access
// latency in cycles and how far the WIPs climbed (station, local ring,
// central ring), which shows the outgoing filters limiting broadcasts.
module workload_mix_tb;
  import hector_pkg::*;

  localparam int unsigned NP = NUM_PROCS;
  localparam int REFS   = 40;   // references per processor per application
  localparam int SHARED = 32;   // shared blocks

  logic clk = 1'b0, rst_n = 1'b0;
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
  longint n_sta = 0, n_ring = 0, n_cen = 0;
  always @(posedge clk) if (rst_n) begin
    n_sta  += $countones(ev_wip_station);
    n_ring += $countones(ev_wip_ring);
    n_cen  += $countones(ev_wip_central);
  end

  // mix in tenths of a percent: rmw, private read, private write, shared read, shared write
  string app_name [6] = '{"Simple", "Speech", "Weather", "SOR", "MP3D", "Water"};
  int    app_mix  [6][5] = '{
    '{134, 192,  99, 148,  17},
    '{  0,   0,   0, 782, 218},
    '{  8, 402,  70,  85,  20},
    '{  0,   0,   0, 308,  77},
    '{ 10, 259,  91, 388, 252},
    '{  2, 610, 233, 139,  16}};

  addr_t shared_blk [SHARED];
  logic [DATA_W-1:0] written [int][$];   // all values written, per block
  longint lat_sum = 0, lat_n = 0;

  function automatic int key(addr_t a);
    return int'(a);
  endfunction

  task automatic op(input int p, input bit wr, input addr_t a,
                    input logic [DATA_W-1:0] wd, output logic [DATA_W-1:0] rd);
    int n = 0;
    @(negedge clk);
    cpu_req_valid[p] = 1'b1; cpu_req_write[p] = wr; cpu_req_addr[p] = a; cpu_req_wdata[p] = wd;
    while (!cpu_req_ready[p]) @(negedge clk);
    @(negedge clk);
    cpu_req_valid[p] = 1'b0;
    while (!cpu_resp_valid[p] && n < 20000) begin @(negedge clk); n++; end
    if (n >= 20000) begin failures++; $display("FAIL: processor %0d hung", p); end
    lat_sum += n + 1;
    lat_n++;
    rd = cpu_resp_rdata[p];
  endtask

  task automatic wr(input int p, input addr_t a, input logic [DATA_W-1:0] v);
    logic [DATA_W-1:0] d;
    written[key(a)].push_back(v);   // recorded before issue: readers may see it early
    op(p, 1'b1, a, v, d);
  endtask

  task automatic rd_check(input int p, input addr_t a);
    logic [DATA_W-1:0] v;
    bit ok = 0;
    op(p, 1'b0, a, '0, v);
    foreach (written[key(a)][i]) if (written[key(a)][i] == v) ok = 1;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: processor %0d read %h = %h, never written", p, a, v);
    end
  endtask

  function automatic addr_t priv_blk(int p, int k);
    addr_t a;
    int st = p / PROCS_PER_STATION;
    a.ring    = RING_W'(st / STATIONS_PER_RING);
    a.station = STA_W'(st % STATIONS_PER_RING);
    a.index   = IDX_W'(128 + (p % PROCS_PER_STATION) * 8 + k);
    return a;
  endfunction

  // one processor's reference stream for application a_i
  task automatic run_proc(input int pp, input int a_i);
    int tot, x;
    addr_t sa, pa;
    logic [DATA_W-1:0] v;
    tot = app_mix[a_i][0] + app_mix[a_i][1] + app_mix[a_i][2] + app_mix[a_i][3] + app_mix[a_i][4];
    for (int k = 0; k < REFS; k++) begin
      x  = $urandom_range(tot - 1);
      sa = shared_blk[$urandom_range(SHARED - 1)];
      pa = priv_blk(pp, $urandom_range(3));
      v  = {8'(a_i), 8'(pp), 16'(k)};
      if (x < app_mix[a_i][0]) begin
        rd_check(pp, sa);
        wr(pp, sa, v);
      end else if (x < app_mix[a_i][0] + app_mix[a_i][1]) rd_check(pp, pa);
      else if (x < app_mix[a_i][0] + app_mix[a_i][1] + app_mix[a_i][2]) wr(pp, pa, v);
      else if (x < tot - app_mix[a_i][4]) rd_check(pp, sa);
      else wr(pp, sa, v);
    end
  endtask

  initial begin
    foreach (cpu_req_addr[i]) begin cpu_req_addr[i] = '0; cpu_req_wdata[i] = '0; end
    for (int b = 0; b < SHARED; b++)
      shared_blk[b] = '{ring: RING_W'(b % NUM_RINGS), station: STA_W'((b / NUM_RINGS) % STATIONS_PER_RING),
                        index: IDX_W'(64 + b)};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // initialise shared blocks and each processor's private blocks
    for (int b = 0; b < SHARED; b++) wr(0, shared_blk[b], 32'hF000_0000 | 32'(b));
    for (int p = 0; p < int'(NP); p++) fork
      automatic int pp = p;
      for (int k = 0; k < 4; k++) wr(pp, priv_blk(pp, k), 32'hE000_0000 | 32'(pp * 8 + k));
    join_none
    wait fork;

    for (int ai = 0; ai < 6; ai++) begin
      longint s0, r0, c0;
      s0 = n_sta; r0 = n_ring; c0 = n_cen;
      lat_sum = 0; lat_n = 0;
      for (int p = 0; p < int'(NP); p++) fork
        automatic int pp = p;
        automatic int a_i = ai;
        run_proc(pp, a_i);
      join_none
      wait fork;
      $display("%-8s mean latency %0d.%01d cycles over %0d accesses; WIP stopped at station %0d, local ring %0d, central ring %0d",
               app_name[ai], lat_sum / lat_n, (lat_sum * 10 / lat_n) % 10, lat_n,
               n_sta - s0, n_ring - r0, n_cen - c0);
      repeat (300) @(posedge clk);
      // quiet machine: all processors agree on a sample of shared blocks
      for (int b = 0; b < SHARED; b += 4) begin
        logic [DATA_W-1:0] ref_v, v;
        op(0, 1'b0, shared_blk[b], '0, ref_v);
        for (int p = 1; p < int'(NP); p += 3) begin
          op(p, 1'b0, shared_blk[b], '0, v);
          checks++;
          if (v !== ref_v) begin
            failures++;
            $display("FAIL: %s: processor %0d sees %h for %h, processor 0 sees %h",
                     app_name[ai], p, v, shared_blk[b], ref_v);
          end
        end
      end
    end
    checks++;
    if (n_sta == 0 || n_ring == 0 || n_cen == 0) begin
      failures++;
      $display("FAIL: WIPs did not stop at every level");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
