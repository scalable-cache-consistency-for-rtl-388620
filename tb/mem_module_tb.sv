// mem_module_tb: drives the memory module of station (ring 1, station 2)
// with bus packets and checks its replies. Covered: write performed and a WIP
// with the expected mask and writer ID; read held while the block is locked
// and released by the returning WI; two writes to one block needing two WIs
// before the lock clears; NACK when the request queue (depth 4) is full; the
// WIP mask growing with remote readers. The reply queue is drained by a grant
// that is sometimes withheld.
module mem_module_tb;
  import hector_pkg::*;

  localparam logic [RING_W-1:0] HR = 1;
  localparam logic [STA_W-1:0]  HS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pkt_t bus_in = '0, out_pkt;
  logic out_valid, out_grant;
  logic ev_nack, ev_lock_stall, ev_unlock;
  bit   grant_en = 1'b1;

  mem_module #(.RING(HR), .STATION(HS)) dut (.*);

  assign out_grant = out_valid && grant_en;

  int checks = 0, failures = 0;
  pkt_t got [$];
  int nstall = 0, nunlock = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_grant) got.push_back(out_pkt);
    nstall  += int'(ev_lock_stall);
    nunlock += int'(ev_unlock);
  end

  function automatic node_id_t nid(int r, int s, int m);
    node_id_t n;
    n.ring = RING_W'(r); n.station = STA_W'(s); n.module_id = MOD_W'(m);
    return n;
  endfunction

  localparam node_id_t MEM = '{ring: HR, station: HS, module_id: MOD_W'(MEM_MOD)};

  function automatic addr_t blk(int idx);
    addr_t a;
    a.ring = HR; a.station = HS; a.index = IDX_W'(idx);
    return a;
  endfunction

  task automatic send(input ptype_e t, input node_id_t src, input addr_t a,
                      input logic [DATA_W-1:0] d);
    @(negedge clk);
    bus_in       = '0;
    bus_in.valid = 1'b1;
    bus_in.ptype = t;
    bus_in.src   = src;
    bus_in.dst   = MEM;
    bus_in.addr  = a;
    bus_in.data  = d;
    @(negedge clk);
    bus_in = '0;
  endtask

  task automatic send_wi(input node_id_t writer, input addr_t a);
    @(negedge clk);
    bus_in       = '0;
    bus_in.valid = 1'b1;
    bus_in.ptype = PK_WI;
    bus_in.src   = writer;
    bus_in.addr  = a;
    @(negedge clk);
    bus_in = '0;
  endtask

  task automatic expect_pkt(input ptype_e t, input node_id_t who, input addr_t a,
                            input logic [DATA_W-1:0] d, input fmask_t m, input bit chk_m);
    int n = 0;
    while (got.size() == 0 && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (got.size() == 0) begin
      failures++;
      $display("FAIL: expected %s, nothing came", t.name());
      return;
    end
    begin
      pkt_t p = got.pop_front();
      node_id_t pw = (t == PK_WIP) ? p.src : p.dst;
      if (p.ptype != t || pw != who || p.addr != a || (t != PK_NACK && p.data != d)
          || (chk_m && p.mask != m)) begin
        failures++;
        $display("FAIL: got %s to %h addr %h data %h mask %b; expected %s %h %h %h %b",
                 p.ptype.name(), pw, p.addr, p.data, p.mask, t.name(), who, a, d, m);
      end
    end
  endtask

  task automatic expect_none(input int cycles);
    repeat (cycles) @(negedge clk);
    checks++;
    if (got.size() != 0) begin
      failures++;
      $display("FAIL: unexpected %s while block locked", got[0].ptype.name());
      got.delete();
    end
  endtask

  initial begin
    fmask_t m;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. home-station writer: WIP mask zero (station level)
    send(PK_WRITE, nid(1,2,0), blk(5), 32'hCAFE_0001);
    expect_pkt(PK_WIP, nid(1,2,0), blk(5), 32'hCAFE_0001, '0, 1);
    // 2. read while locked waits, WI releases it
    send(PK_READ, nid(3,0,1), blk(5), '0);
    expect_none(10);
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL: no lock stall seen"); end
    send_wi(nid(1,2,0), blk(5));
    expect_pkt(PK_RDATA, nid(3,0,1), blk(5), 32'hCAFE_0001, '0, 0);
    checks++;
    if (nunlock != 1) begin failures++; $display("FAIL: unlock count %0d", nunlock); end
    // 3. reader on ring 3 station 0, then a writer on ring 1 station 1
    send(PK_WRITE, nid(1,1,3), blk(5), 32'hCAFE_0002);
    m = '0; m.central = 4'b1010; m.local_f = 4'b0111;
    expect_pkt(PK_WIP, nid(1,1,3), blk(5), 32'hCAFE_0002, m, 1);
    // 4. a second write while locked is performed; two WIs are needed
    send(PK_WRITE, nid(1,2,3), blk(5), 32'hCAFE_0003);
    m = '0; m.local_f = 4'b0110;            // ring level: stations 1 and 2
    expect_pkt(PK_WIP, nid(1,2,3), blk(5), 32'hCAFE_0003, m, 1);
    send(PK_READ, nid(0,0,0), blk(5), '0);
    send_wi(nid(1,1,3), blk(5));
    expect_none(10);
    send_wi(nid(1,2,3), blk(5));
    expect_pkt(PK_RDATA, nid(0,0,0), blk(5), 32'hCAFE_0003, '0, 0);
    // 5. queue overflow: hold a read on a locked block, fill the queue
    send(PK_WRITE, nid(1,2,1), blk(9), 32'h0000_0009);
    expect_pkt(PK_WIP, nid(1,2,1), blk(9), 32'h0000_0009, '0, 1);
    for (int i = 0; i < 6; i++) send(PK_READ, nid(2, i % 4, i % 4), blk(9), '0);
    // the head read is held, so the first 4 are queued and the last 2 refused
    expect_pkt(PK_NACK, nid(2,0,0), blk(9), '0, '0, 0);
    expect_pkt(PK_NACK, nid(2,1,1), blk(9), '0, '0, 0);
    expect_none(5);
    send_wi(nid(1,2,1), blk(9));
    for (int i = 0; i < 4; i++) begin
      automatic int k = i;
      expect_pkt(PK_RDATA, nid(2, k, k), blk(9), 32'h0000_0009, '0, 0);
    end
    // 6. replies wait while the grant is withheld
    grant_en = 1'b0;
    send(PK_READ, nid(0,1,2), blk(5), '0);
    expect_none(5);
    grant_en = 1'b1;
    expect_pkt(PK_RDATA, nid(0,1,2), blk(5), 32'hCAFE_0003, '0, 0);
    // 7. after the ring-2 reads, the next write's mask covers rings 1 and 2
    send(PK_WRITE, nid(1,2,0), blk(9), 32'h0000_000A);
    m = '0; m.central = 4'b0110; m.local_f = 4'b1111;
    expect_pkt(PK_WIP, nid(1,2,0), blk(9), 32'h0000_000A, m, 1);
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
