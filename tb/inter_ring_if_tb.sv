// inter_ring_if_tb: inter-ring interface of local ring 2. Packets are fed on
// both ring inputs and everything leaving on both outputs is collected; the
// expected output streams (contents and order) are built by the testbench
// from the routing rules: requests climb or descend by destination ring, WIs
// on the local ring are removed, a WIP with a zero central field turns round
// as a local WI, other WIPs become central WIs, central WIs pass on and are
// copied down when bit 2 of the central field is set, and a WI whose home is
// ring 2 is removed from the central ring and copied down. Also checked: a
// pass-through packet takes one cycle, and the central ring has priority
// over the up FIFO (the FIFO waits while central packets pass).
module inter_ring_if_tb;
  import hector_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pkt_t local_in = '0, central_in = '0, local_out, central_out;
  logic ev_wip_ring, ev_wip_central, ev_wi_down, ev_wi_block, ev_fifo_wait;

  inter_ring_if #(.RING(2)) dut (.*);

  int checks = 0, failures = 0;
  pkt_t got_c [$], got_l [$], exp_c [$], exp_l [$];
  int n_wait = 0;

  always @(posedge clk) if (rst_n) begin
    if (central_out.valid) got_c.push_back(central_out);
    if (local_out.valid)   got_l.push_back(local_out);
    n_wait += int'(ev_fifo_wait);
  end

  function automatic pkt_t mk(input ptype_e t, input int dr, input int hr,
                              input logic [NUM_RINGS-1:0] cf, input logic [DATA_W-1:0] d);
    pkt_t p = '0;
    p.valid = 1; p.ptype = t;
    p.dst  = '{ring: RING_W'(dr), station: 1, module_id: 2};
    p.src  = '{ring: 3, station: 0, module_id: 1};
    p.addr = '{ring: RING_W'(hr), station: 3, index: IDX_W'(d)};
    p.data = d;
    p.mask.central = cf;
    p.mask.local_f = 4'b0101;
    return p;
  endfunction

  function automatic pkt_t as_wi(input pkt_t p);
    pkt_t q = p;
    q.ptype = PK_WI;
    return q;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pkt_t p;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // local side
    @(negedge clk); p = mk(PK_READ, 0, 0, 0, 1);  local_in = p; exp_c.push_back(p);
    @(negedge clk); p = mk(PK_RDATA, 2, 0, 0, 2); local_in = p; exp_l.push_back(p);
    @(negedge clk); chk(local_out == p, "same-ring packet passes in one cycle");
                    p = mk(PK_WI, 0, 2, 4'b0100, 3); local_in = p;               // removed
    @(negedge clk); p = mk(PK_WIP, 0, 2, 4'b0000, 4); local_in = p; exp_l.push_back(as_wi(p));
    @(negedge clk); p = mk(PK_WIP, 0, 2, 4'b0101, 5); local_in = p; exp_c.push_back(as_wi(p));
    @(negedge clk); local_in = '0;
    repeat (4) @(negedge clk);

    // central side
    p = mk(PK_WRITE, 2, 1, 0, 6); central_in = p; exp_l.push_back(p);
    @(negedge clk); p = mk(PK_WRITE, 3, 1, 0, 7); central_in = p; exp_c.push_back(p);
    @(negedge clk); p = mk(PK_WI, 0, 0, 4'b0101, 8); central_in = p;
                    exp_c.push_back(p); exp_l.push_back(p);                      // copied
    @(negedge clk); p = mk(PK_WI, 0, 0, 4'b1011, 9); central_in = p;
                    exp_c.push_back(p);                                          // filtered
    @(negedge clk); p = mk(PK_WI, 0, 2, 4'b0110, 10); central_in = p;
                    exp_l.push_back(p);                                          // home: removed
    @(negedge clk); central_in = '0;
    repeat (4) @(negedge clk);

    // priority: central traffic passes while a local packet waits to climb
    p = mk(PK_READ, 1, 0, 0, 11); local_in = p;
    for (int i = 0; i < 5; i++) begin
      pkt_t c;
      c = mk(PK_READ, 0, 0, 0, 12 + i);
      central_in = c; exp_c.push_back(c);
      @(negedge clk);
      local_in = '0;
    end
    central_in = '0;
    exp_c.push_back(p);
    repeat (6) @(negedge clk);
    chk(n_wait >= 4, $sformatf("up FIFO should wait behind central traffic (%0d)", n_wait));

    chk(got_c.size() == exp_c.size(), $sformatf("central count %0d expected %0d",
                                                got_c.size(), exp_c.size()));
    chk(got_l.size() == exp_l.size(), $sformatf("local count %0d expected %0d",
                                                got_l.size(), exp_l.size()));
    for (int i = 0; i < exp_c.size() && i < got_c.size(); i++)
      chk(got_c[i] == exp_c[i], $sformatf("central #%0d: %s data %0d, expected %s data %0d", i,
          got_c[i].ptype.name(), got_c[i].data, exp_c[i].ptype.name(), exp_c[i].data));
    for (int i = 0; i < exp_l.size() && i < got_l.size(); i++)
      chk(got_l[i] == exp_l[i], $sformatf("local #%0d: %s data %0d, expected %s data %0d", i,
          got_l[i].ptype.name(), got_l[i].data, exp_l[i].ptype.name(), exp_l[i].data));
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
