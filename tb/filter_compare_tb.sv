// filter_compare_tb: the same reference stream run on three builds of the
// 64-processor machine: no filters, incoming filters only, and incoming plus
// outgoing filters (the full design). This mirrors the comparison of the
// invalidating protocol with and without filters.
//
// The stream is generated once and replayed on each build. Each processor
// makes REFS references with the Weather operation mix (private reads and
// writes to blocks on its own station, shared reads and writes to a pool of
// blocks). Correctness is checked on every build (reads return written
// values, all processors agree once quiet). Measured per build: WI packets
// copied onto station buses, WIs kept off stations and rings, WIPs reaching
// the central ring, and the mean write latency. Checked: incoming filters
// reduce the WI copies onto station buses, and outgoing filters reduce the
// WIPs reaching the central ring and the mean write latency.
module filter_compare_tb;
  import hector_pkg::*;

  localparam int unsigned NP = NUM_PROCS;
  localparam int NCFG   = 3;
  localparam int REFS   = 40;
  localparam int SHARED = 32;
  // Weather mix in tenths of a percent: private read, private write, shared read, shared write
  localparam int MIX_PR = 402, MIX_PW = 70, MIX_SR = 85, MIX_SW = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0]     req_valid [NCFG], req_write [NCFG], req_ready [NCFG], resp_valid [NCFG];
  addr_t             req_addr  [NCFG][NP];
  logic [DATA_W-1:0] req_wdata [NCFG][NP], resp_rdata [NCFG][NP];
  logic [NUM_STATIONS-1:0] wi_copy [NCFG];
  logic [NUM_RINGS-1:0]    wip_central [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [NP-1:0] e_hit, e_miss, e_inval, e_retry;
    logic [NUM_STATIONS-1:0] e_nack, e_ls, e_unl, e_blk, e_wips, e_rw;
    logic [NUM_RINGS-1:0] e_wipr, e_down, e_rblk, e_fw;
    hector_top #(.IN_FILTER_EN(c >= 1), .OUT_FILTER_EN(c == 2)) dut (
      .clk, .rst_n,
      .cpu_req_valid(req_valid[c]), .cpu_req_write(req_write[c]),
      .cpu_req_addr(req_addr[c]), .cpu_req_wdata(req_wdata[c]),
      .cpu_req_ready(req_ready[c]), .cpu_resp_valid(resp_valid[c]),
      .cpu_resp_rdata(resp_rdata[c]),
      .ev_hit(e_hit), .ev_miss(e_miss), .ev_inval(e_inval), .ev_retry(e_retry),
      .ev_nack(e_nack), .ev_lock_stall(e_ls), .ev_unlock(e_unl),
      .ev_wi_copy(wi_copy[c]), .ev_wi_block(e_blk), .ev_wip_station(e_wips),
      .ev_ring_wait(e_rw), .ev_wip_ring(e_wipr), .ev_wip_central(wip_central[c]),
      .ev_wi_down(e_down), .ev_wi_ring_block(e_rblk), .ev_fifo_wait(e_fw));
  end

  int checks = 0, failures = 0;
  longint n_copy [NCFG], n_central [NCFG], wlat_sum [NCFG], wlat_n [NCFG];

  int cur_cfg = 0;   // build currently running
  always @(posedge clk) if (rst_n) begin
    n_copy[cur_cfg]    += $countones(wi_copy[cur_cfg]);
    n_central[cur_cfg] += $countones(wip_central[cur_cfg]);
  end

  // the stream: kind 0 read, 1 write
  bit                is_wr  [NP][REFS];
  addr_t             s_addr [NP][REFS];
  logic [DATA_W-1:0] s_val  [NP][REFS];
  addr_t             shared_blk [SHARED];
  logic [DATA_W-1:0] written [int][$];

  task automatic op(input int c, input int p, input bit wr, input addr_t a,
                    input logic [DATA_W-1:0] wd, output logic [DATA_W-1:0] rd);
    int n = 0;
    @(negedge clk);
    req_valid[c][p] = 1'b1; req_write[c][p] = wr; req_addr[c][p] = a; req_wdata[c][p] = wd;
    while (!req_ready[c][p]) @(negedge clk);
    @(negedge clk);
    req_valid[c][p] = 1'b0;
    while (!resp_valid[c][p] && n < 20000) begin @(negedge clk); n++; end
    if (n >= 20000) begin failures++; $display("FAIL: build %0d processor %0d hung", c, p); end
    if (wr) begin wlat_sum[c] += n + 1; wlat_n[c]++; end
    rd = resp_rdata[c][p];
  endtask

  task automatic run_proc(input int c, input int p);
    logic [DATA_W-1:0] v;
    for (int k = 0; k < REFS; k++) begin
      if (is_wr[p][k]) op(c, p, 1'b1, s_addr[p][k], s_val[p][k], v);
      else begin
        bit ok = 0;
        op(c, p, 1'b0, s_addr[p][k], '0, v);
        foreach (written[int'(s_addr[p][k])][i]) if (written[int'(s_addr[p][k])][i] == v) ok = 1;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL: build %0d processor %0d read %h = %h, never written", c, p, s_addr[p][k], v);
        end
      end
    end
  endtask

  function automatic addr_t priv_blk(int p, int k);
    addr_t a;
    int st = p / PROCS_PER_STATION;
    a.ring = RING_W'(st / STATIONS_PER_RING); a.station = STA_W'(st % STATIONS_PER_RING);
    a.index = IDX_W'(128 + (p % PROCS_PER_STATION) * 8 + k);
    return a;
  endfunction

  initial begin
    logic [DATA_W-1:0] v;
    for (int c = 0; c < NCFG; c++) begin
      req_valid[c] = '0; req_write[c] = '0;
      foreach (req_addr[c][p]) begin req_addr[c][p] = '0; req_wdata[c][p] = '0; end
      n_copy[c] = 0; n_central[c] = 0; wlat_sum[c] = 0; wlat_n[c] = 0;
    end
    for (int b = 0; b < SHARED; b++)
      shared_blk[b] = '{ring: RING_W'(b % NUM_RINGS), station: STA_W'((b / NUM_RINGS) % STATIONS_PER_RING),
                        index: IDX_W'(64 + b)};
    // initial values, then the stream
    for (int b = 0; b < SHARED; b++) written[int'(shared_blk[b])].push_back(32'hF000_0000 | 32'(b));
    for (int p = 0; p < int'(NP); p++)
      for (int k = 0; k < 4; k++) written[int'(priv_blk(p, k))].push_back(32'hE000_0000 | 32'(p * 8 + k));
    for (int p = 0; p < int'(NP); p++)
      for (int k = 0; k < REFS; k++) begin
        int x;
        x = $urandom_range(MIX_PR + MIX_PW + MIX_SR + MIX_SW - 1);
        is_wr[p][k]  = (x >= MIX_PR && x < MIX_PR + MIX_PW) || x >= MIX_PR + MIX_PW + MIX_SR;
        s_addr[p][k] = (x < MIX_PR + MIX_PW) ? priv_blk(p, $urandom_range(3))
                                             : shared_blk[$urandom_range(SHARED - 1)];
        s_val[p][k]  = {8'hC0, 8'(p), 16'(k)};
        if (is_wr[p][k]) written[int'(s_addr[p][k])].push_back(s_val[p][k]);
      end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    for (int c = 0; c < NCFG; c++) begin
      cur_cfg = c;
      // initialise this build's memories (not counted)
      for (int b = 0; b < SHARED; b++) op(c, 0, 1'b1, shared_blk[b], 32'hF000_0000 | 32'(b), v);
      for (int p = 0; p < int'(NP); p++) fork
        automatic int pp = p;
        automatic int cc = c;
        for (int k = 0; k < 4; k++) op(cc, pp, 1'b1, priv_blk(pp, k), 32'hE000_0000 | 32'(pp * 8 + k), v);
      join_none
      wait fork;
      repeat (300) @(posedge clk);
      n_copy[c] = 0; n_central[c] = 0; wlat_sum[c] = 0; wlat_n[c] = 0;
      for (int p = 0; p < int'(NP); p++) fork
        automatic int pp = p;
        automatic int cc = c;
        run_proc(cc, pp);
      join_none
      wait fork;
      repeat (300) @(posedge clk);
      for (int b = 0; b < SHARED; b += 4) begin
        logic [DATA_W-1:0] ref_v, w;
        op(c, 0, 1'b0, shared_blk[b], '0, ref_v);
        for (int p = 5; p < int'(NP); p += 7) begin
          op(c, p, 1'b0, shared_blk[b], '0, w);
          checks++;
          if (w !== ref_v) begin
            failures++;
            $display("FAIL: build %0d processor %0d disagrees on %h", c, p, shared_blk[b]);
          end
        end
      end
      $display("build %0d (incoming %0d, outgoing %0d): WI copies onto station buses %0d, WIPs to central ring %0d, mean write latency %0d cycles",
               c, c >= 1, c == 2, n_copy[c], n_central[c], wlat_sum[c] / wlat_n[c]);
    end
    checks++;
    if (!(n_copy[1] < n_copy[0])) begin
      failures++; $display("FAIL: incoming filters did not reduce station WI copies");
    end
    checks++;
    if (!(n_central[2] < n_central[1])) begin
      failures++; $display("FAIL: outgoing filters did not reduce central-ring WIPs");
    end
    checks++;
    if (!(wlat_sum[2] * wlat_n[1] < wlat_sum[1] * wlat_n[2])) begin
      failures++; $display("FAIL: outgoing filters did not reduce write latency");
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
