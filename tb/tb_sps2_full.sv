// Full-size testbench: sps2_top with every parameter at its default (4 nodes, 64 KB PL1,
// 0.5 MB 4-way PL2, 2 MB 8-way SL2) and main memory with its 200-cycle latency. After the
// initialisation sweep it runs a directed sequence that touches each kind of transfer:
// a load miss served by memory, a PL1 hit, a store upgrade, a cache-to-cache transfer of a
// modified line (which becomes owned), a store that invalidates the other copies, PL1
// conflict misses that push lines to PL2 and a PL2 hit, an S2 line pushed to the SL2 and
// then read by another node through its SL2 read port without a bus command. Every load is
// checked against a reference image, and the latencies of a PL1 hit, a PL2 hit, an SL2 read
// and a memory miss are checked.
module tb_sps2_full;
  import sps2_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready;
  logic [N-1:0] cpu_req = '0, cpu_we = '0, cpu_ready;
  addr_t [N-1:0] cpu_addr = '0; word_t [N-1:0] cpu_wdata = '0, cpu_rdata;
  logic mem_req, mem_we, mem_ack; laddr_t mem_laddr; line_t mem_wdata, mem_rdata;

  sps2_top dut (.*);
  mem_model u_mem (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  word_t gold [addr_t];
  function automatic word_t gold_of(addr_t a);
    if (gold.exists(a)) return gold[a];
    return u_mem.init_word(a[ADDR_W-1:OFF_W], int'(a[5:3]));
  endfunction

  task automatic access(int n, logic we, addr_t a, word_t d, output int lat);
    @(negedge clk);
    cpu_req[n] = 1; cpu_we[n] = we; cpu_addr[n] = a; cpu_wdata[n] = d;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!cpu_ready[n]);
    if (!we) chk(cpu_rdata[n] == gold_of(a), $sformatf("node %0d load %h", n, a));
    else gold[a] = d;
    cpu_req[n] = 0;
  endtask

  int n_rdhit = 0, n_cmd = 0;
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) if (dut.u_sl2.rd_done[k] && dut.u_sl2.rd_hit[k]) n_rdhit++;
    if (dut.u_bus.own_valid && dut.u_bus.st == 0) n_cmd++;
  end

  localparam addr_t A = 32'h0001_0040;
  localparam addr_t STRIDE = 32'h0000_4000;   // PL1 set size: 256 sets x 64 B

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    access(0, 0, A, 0, lat);
    chk(lat > 200, $sformatf("memory miss latency %0d", lat));
    access(0, 0, A + 8, 0, lat);
    chk(lat == 1, "PL1 hit in one cycle");
    access(0, 1, A, 64'hAAAA_0001, lat);            // S1 -> M1 via GETX
    access(1, 0, A, 0, lat);                        // M1 in node 0 supplies, becomes O
    chk(lat < 200, $sformatf("cache-to-cache transfer, latency %0d", lat));
    access(2, 1, A + 16, 64'hBBBB_0002, lat);       // GETX invalidates nodes 0 and 1
    access(0, 0, A + 16, 0, lat);
    access(3, 0, A, 0, lat);
    // five lines in one PL1 set of node 3: the first moves to PL2, then hits there
    for (int k = 1; k <= 5; k++) access(3, 1, A + STRIDE * k, 64'(k), lat);
    access(3, 0, A + STRIDE, 0, lat);
    chk(lat >= 5 + 2 && lat < 40, $sformatf("PL2 hit latency %0d", lat));
    for (int k = 1; k <= 5; k++) access(3, 0, A + STRIDE * k, 0, lat);
    // node 3's S2 copy of A was pushed to the SL2; node 1 reads it there
    begin
      int h0, c0;
      h0 = n_rdhit; c0 = n_cmd;
      access(1, 0, A + 24, 0, lat);
      chk(n_rdhit == h0 + 1 && n_cmd == c0, "load served by the SL2 read port, no bus command");
      chk(lat == 5 + 12 + 3, $sformatf("SL2 read latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
