// proc_module_tb: processor module (ring 2, station 1, slot 3) with the
// station bus played by the testbench. Covered: read miss sends a READ to the
// block's home memory and the reply fills the cache; read hit answered one
// cycle after acceptance with no bus traffic; write sends a WRITE and keeps
// the processor blocked until the WI carrying its own ID (a WI from another
// writer does not release it) and the writer keeps its updated copy; a WI
// from another processor invalidates the copy; a NACK causes retransmission.
module proc_module_tb;
  import hector_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam node_id_t ME    = '{ring: 2, station: 1, module_id: 3};
  localparam node_id_t OTHER = '{ring: 0, station: 3, module_id: 1};

  logic              cpu_req_valid = 0, cpu_req_write = 0;
  addr_t             cpu_req_addr = '0;
  logic [DATA_W-1:0] cpu_req_wdata = '0;
  logic              cpu_req_ready, cpu_resp_valid;
  logic [DATA_W-1:0] cpu_resp_rdata;
  pkt_t              bus_in = '0, out_pkt;
  logic              out_valid, out_grant;
  logic              ev_hit, ev_miss, ev_inval, ev_retry;

  proc_module #(.RING(2), .STATION(1), .PROC(3)) dut (.*);

  assign out_grant = out_valid;

  int checks = 0, failures = 0;
  pkt_t sent [$];
  always @(posedge clk) if (rst_n && out_grant) sent.push_back(out_pkt);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input bit wr, input addr_t a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_addr = a; cpu_req_wdata = d;
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic bus(input ptype_e t, input node_id_t src, input node_id_t dst,
                     input addr_t a, input logic [DATA_W-1:0] d);
    @(negedge clk);
    bus_in = '0; bus_in.valid = 1; bus_in.ptype = t; bus_in.src = src; bus_in.dst = dst;
    bus_in.addr = a; bus_in.data = d;
    @(negedge clk);
    bus_in = '0;
  endtask

  task automatic wait_sent(input ptype_e t, input addr_t a);
    int n = 0;
    while (sent.size() == 0 && n < 50) begin @(negedge clk); n++; end
    chk(sent.size() == 1, $sformatf("exactly one packet expected, %0d sent", sent.size()));
    if (sent.size() > 0) begin
      pkt_t p = sent.pop_front();
      chk(p.ptype == t && p.addr == a && p.src == ME && p.dst.ring == a.ring
          && p.dst.station == a.station && p.dst.module_id == MOD_W'(MEM_MOD),
          $sformatf("bad request packet %s %h", p.ptype.name(), p.addr));
    end
    sent.delete();
  endtask

  task automatic read_hit(input addr_t a, input logic [DATA_W-1:0] exp);
    issue(0, a, '0);           // returns at the negedge after acceptance
    chk(cpu_resp_valid && cpu_resp_rdata == exp,
        $sformatf("read hit %h: valid %0d data %h expected %h (1-cycle latency)",
                  a, cpu_resp_valid, cpu_resp_rdata, exp));
    repeat (3) @(negedge clk);
    chk(sent.size() == 0, "read hit must not use the bus");
  endtask

  addr_t a1, a2;
  initial begin
    a1 = '{ring: 1, station: 3, index: 8'h21};
    a2 = '{ring: 2, station: 1, index: 8'h61};   // same cache index as a1
    repeat (3) @(posedge clk);
    rst_n = 1;

    // read miss, NACK, retransmission, reply
    issue(0, a1, '0);
    wait_sent(PK_READ, a1);
    bus(PK_NACK, '{ring: 1, station: 3, module_id: MOD_W'(MEM_MOD)}, ME, a1, '0);
    wait_sent(PK_READ, a1);
    chk(!cpu_req_ready, "processor must wait for the read reply");
    bus(PK_RDATA, '{ring: 1, station: 3, module_id: MOD_W'(MEM_MOD)}, ME, a1, 32'h1111_2222);
    chk(cpu_resp_valid && cpu_resp_rdata == 32'h1111_2222, "read miss data");
    read_hit(a1, 32'h1111_2222);

    // write: blocked until own WI
    issue(1, a1, 32'h3333_4444);
    wait_sent(PK_WRITE, a1);
    bus(PK_WI, OTHER, '0, a2, '0);                    // someone else's WI
    repeat (3) @(negedge clk);
    chk(!cpu_req_ready && !cpu_resp_valid, "foreign WI must not release the writer");
    bus(PK_WI, ME, '0, a1, '0);
    chk(cpu_resp_valid, "own WI completes the write");
    @(negedge clk);
    chk(cpu_req_ready, "processor released after its WI");
    read_hit(a1, 32'h3333_4444);                      // writer kept its copy

    // another processor's WI invalidates the copy
    bus(PK_WI, OTHER, '0, a1, '0);
    issue(0, a1, '0);
    wait_sent(PK_READ, a1);
    bus(PK_RDATA, '{ring: 1, station: 3, module_id: MOD_W'(MEM_MOD)}, ME, a1, 32'h5555_6666);
    chk(cpu_resp_rdata == 32'h5555_6666, "refetched data");
    // a WI for another block mapping to the same line does not invalidate
    bus(PK_WI, OTHER, '0, a2, '0);
    read_hit(a1, 32'h5555_6666);
    // write miss: no allocation, next read misses
    issue(1, a2, 32'h7777_8888);
    wait_sent(PK_WRITE, a2);
    bus(PK_WI, ME, '0, a2, '0);
    read_hit(a1, 32'h5555_6666);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
