// End-to-end testbench for sps2_top: four processors issue random loads and stores, half
// to lines private to each processor and half to lines all of them share, on caches shrunk
// so that every replacement path is taken often (PL1 2 sets x 2 ways, PL2 4 sets direct
// mapped, SL2 4 banks of 1 set x 2 ways; access times 5 and 12 cycles as in the full
// design; memory 50 cycles). A reference image of memory, updated when each store
// completes, checks every load. The test also counts each mechanism of the hierarchy and fails if one never
// happened: PL1 hits, PL2 hits, GETS, GETX, P_SL2 pushes, PUTM write-backs, lines supplied
// cache-to-cache, lines supplied by the SL2 on the bus, SL2 M2 hand-overs, loads served by
// the SL2 read ports without the bus (also with M2 hand-over), SL2 banks busy at the same
// time, SL2 victim write-backs (repS), memory reads and bus contention.
//
// Whenever the bus is idle a monitor reads every PL1, PL2 and SL2 array and checks the
// coherence invariants of the protocol for each line in use: no line in both PL1 and PL2
// of a node; at most one owner (M1, M2 or O) in all caches together; an M1, M2 or S1 copy
// is the only valid copy anywhere; an M2 line in the SL2 has no private copy. Each node's
// pair (private state, SL2 state) must be one of the twelve reachable ones (II, IS2, IM2,
// IO, S1I, S2I, S2S2, S2O, M1I, M2I, OI, OS2), and every one of the twelve must be seen.
module tb_sps2_top;
  import sps2_pkg::*;
  localparam int N = 4;
  localparam int OPS = 4000;
  localparam int L2_LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready;
  logic [N-1:0] cpu_req = '0, cpu_we = '0, cpu_ready;
  addr_t [N-1:0] cpu_addr = '0; word_t [N-1:0] cpu_wdata = '0, cpu_rdata;
  logic mem_req, mem_we, mem_ack; laddr_t mem_laddr; line_t mem_wdata, mem_rdata;

  sps2_top #(
    .N_NODES(N), .L1_SETS(2), .L1_WAYS(2), .L2_SETS(4), .L2_WAYS(1), .L2_LAT(L2_LAT),
    .SL2_SETS(4), .SL2_WAYS(2), .SL2_LAT(12)
  ) dut (.*);
  mem_model #(.LAT(50)) u_mem (.*);

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

  int n_l1hit = 0, n_pl2hit = 0, n_gets = 0, n_getx = 0, n_psl2 = 0, n_putm = 0;
  int n_c2c = 0, n_sl2sup = 0, n_sl2m2 = 0, n_repS = 0, n_contend = 0, n_done = 0;
  int n_rdhit = 0, n_rdm2 = 0, n_banks2 = 0;

  always @(posedge clk) begin
    if (dut.u_bus.own_valid && dut.u_bus.st == 0) begin
      case (dut.u_bus.own_cmd)
        BUS_GETS: n_gets++;
        BUS_GETX: n_getx++;
        BUS_PSL2: n_psl2++;
        default:  n_putm++;
      endcase
    end
    if (dut.u_bus.any_sup) n_c2c++;
    if (dut.u_sl2.done && dut.u_sl2.hit && dut.u_bus.cmd_q != BUS_PSL2) n_sl2sup++;
    for (int k = 0; k < N; k++)
      if (dut.u_sl2.rd_done[k] && dut.u_sl2.rd_hit[k]) begin
        n_rdhit++;
        if (dut.u_sl2.rd_state[k] == ST_M2) n_rdm2++;
      end
    if (dut.ready && $countones(~dut.u_sl2.b_idle) > 1) n_banks2++;
    if ((|dut.u_bus.m_done) && dut.m_sl2_m2) n_sl2m2++;
    if (dut.u_sl2.wb_valid) n_repS++;
    if ($countones(dut.bus_req) > 1) n_contend++;
  end

  // PL2 hit promoted into PL1 (node state N_L2, encoding 5, with a free PL1 way)
  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge clk)
      if (int'(dut.g_node[i].u_node.st) == 5 && dut.g_node[i].u_node.l2_hit &&
          !st_valid(dut.g_node[i].u_node.l1_vic_st)) n_pl2hit++;
  end

  // ---------------------------------------------------------------- coherence monitor
  localparam int NL = 48;                 // lines 0..47 cover every address the processors use
  cstate_t [NL-1:0] p1a [N], p2a [N];     // state of each line in each PL1 / PL2
  cstate_t [NL-1:0] sla [4];              // state of each line in each SL2 bank

  // reduced arrays: PL1 2 sets x 2 ways, PL2 4 sets x 1 way, SL2 bank 1 set x 2 ways
  for (genvar i = 0; i < N; i++) begin : g_snap
    cstate_t [NL-1:0] v1, v2;
    always_comb begin
      for (int ln = 0; ln < NL; ln++) begin
        v1[ln] = ST_I; v2[ln] = ST_I;
        for (int w = 0; w < 2; w++)
          if (dut.g_node[i].u_node.u_pl1.st_mem[ln % 2][w] != ST_I &&
              32'(dut.g_node[i].u_node.u_pl1.tag_mem[ln % 2][w]) == ln / 2)
            v1[ln] = dut.g_node[i].u_node.u_pl1.st_mem[ln % 2][w];
        if (dut.g_node[i].u_node.u_pl2.st_mem[ln % 4][0] != ST_I &&
            32'(dut.g_node[i].u_node.u_pl2.tag_mem[ln % 4][0]) == ln / 4)
          v2[ln] = dut.g_node[i].u_node.u_pl2.st_mem[ln % 4][0];
      end
    end
    assign p1a[i] = v1;
    assign p2a[i] = v2;
  end
  for (genvar b = 0; b < 4; b++) begin : g_snap_sl2
    cstate_t [NL-1:0] v;
    always_comb begin
      for (int ln = 0; ln < NL; ln++) begin
        v[ln] = ST_I;
        if (ln % 4 == b)
          for (int w = 0; w < 2; w++)
            if (dut.u_sl2.g_bank[b].u_bank.u_arr.st_mem[0][w] != ST_I &&
                32'(dut.u_sl2.g_bank[b].u_bank.u_arr.tag_mem[0][w]) == ln / 4)
              v[ln] = dut.u_sl2.g_bank[b].u_bank.u_arr.st_mem[0][w];
      end
    end
    assign sla[b] = v;
  end

  // index of a (private, SL2) pair among the twelve reachable node states, -1 if none
  function automatic int node_state(cstate_t x, cstate_t y);
    case ({x, y})
      {ST_I,  ST_I}:  return 0;   {ST_I,  ST_S2}: return 1;   {ST_I,  ST_M2}: return 2;
      {ST_I,  ST_O}:  return 3;   {ST_S1, ST_I}:  return 4;   {ST_S2, ST_I}:  return 5;
      {ST_S2, ST_S2}: return 6;   {ST_S2, ST_O}:  return 7;   {ST_M1, ST_I}:  return 8;
      {ST_M2, ST_I}:  return 9;   {ST_O,  ST_I}:  return 10;  {ST_O,  ST_S2}: return 11;
      default:        return -1;
    endcase
  endfunction

  int seen12 [12];
  int n_inv = 0, n_bad = 0;
  always @(posedge clk) begin
    if (dut.ready && dut.u_bus.st == 0 && dut.u_sl2.bus_pend == 1'b0) begin
      logic bad;
      bad = 1'b0;
      for (int ln = 0; ln < NL; ln++) begin
        int owners, valid, excl, k;
        cstate_t y, x;
        y = sla[ln % 4][ln];
        owners = (y inside {ST_M2, ST_O}) ? 1 : 0;
        valid  = (y != ST_I) ? 1 : 0;
        excl   = (y == ST_M2) ? 1 : 0;
        for (int i = 0; i < N; i++) begin
          if (p1a[i][ln] != ST_I && p2a[i][ln] != ST_I) bad = 1'b1;
          x = (p1a[i][ln] != ST_I) ? p1a[i][ln] : p2a[i][ln];
          if (x inside {ST_M1, ST_M2, ST_O}) owners++;
          if (x != ST_I) valid++;
          if (x inside {ST_M1, ST_M2, ST_S1}) excl++;
          k = node_state(x, y);
          if (k < 0) bad = 1'b1;
          else seen12[k]++;
        end
        if (owners > 1 || (excl > 0 && valid > 1)) bad = 1'b1;
        if (bad && n_bad < 5) $display("coherence violation on line %0d @%0t", ln, $time);
      end
      n_inv++;
      if (bad) n_bad++;
    end
  end

  // processors
  for (genvar i = 0; i < N; i++) begin : g_cpu
    initial begin
      int lat, ln, wd; logic we; addr_t a; word_t d;
      wait (rst_n && ready);
      for (int k = 0; k < OPS; k++) begin
        @(negedge clk);
        if ($urandom_range(0, 1)) ln = $urandom_range(0, 11);             // shared lines
        else ln = 16 + 8 * i + $urandom_range(0, 7);                      // private lines
        wd = $urandom_range(0, 7);
        we = ($urandom_range(0, 2) == 0);
        a  = addr_t'({26'(ln), 3'(wd), 3'b0});
        d  = {16'(i), 16'(k), $urandom()};
        cpu_req[i] = 1; cpu_we[i] = we; cpu_addr[i] = a; cpu_wdata[i] = d;
        lat = 0;
        do begin @(negedge clk); lat++; end while (!cpu_ready[i]);
        if (lat == 1) n_l1hit++;
        if (!we) chk(cpu_rdata[i] == gold_of(a),
                     $sformatf("node %0d load %h got %h exp %h", i, a, cpu_rdata[i], gold_of(a)));
        else gold[a] = d;
        cpu_req[i] = 0;
      end
      n_done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_done == N);
    chk(n_l1hit > 0,  "PL1 hits");
    chk(n_pl2hit > 0, "PL2 hits");
    chk(n_gets > 0,   "GETS");
    chk(n_getx > 0,   "GETX");
    chk(n_psl2 > 0,   "P_SL2 pushes");
    chk(n_putm > 0,   "PUTM write-backs");
    chk(n_c2c > 0,    "cache-to-cache supply");
    chk(n_sl2sup > 0, "SL2 supply");
    chk(n_sl2m2 > 0,  "SL2 M2 hand-over");
    chk(n_rdhit > 0,  "loads served by the SL2 read ports");
    chk(n_rdm2 > 0,   "SL2 M2 hand-over on a read port");
    chk(n_banks2 > 0, "SL2 banks working in parallel");
    chk(n_repS > 0,   "SL2 victim write-back");
    chk(u_mem.n_reads > 0, "memory reads");
    chk(n_contend > 0, "bus contention");
    chk(n_inv > 1000, "coherence monitor sampled");
    chk(n_bad == 0, $sformatf("coherence invariants: %0d violating samples of %0d", n_bad, n_inv));
    for (int k = 0; k < 12; k++) chk(seen12[k] > 0, $sformatf("reachable node state %0d seen", k));
    $display("PL1hit=%0d PL2hit=%0d GETS=%0d GETX=%0d PSL2=%0d PUTM=%0d c2c=%0d sl2sup=%0d sl2m2=%0d repS=%0d memrd=%0d memwr=%0d contention=%0d",
             n_l1hit, n_pl2hit, n_gets, n_getx, n_psl2, n_putm, n_c2c, n_sl2sup, n_sl2m2,
             n_repS, u_mem.n_reads, u_mem.n_writes, n_contend);
    $display("SL2 read port hits=%0d (M2 hand-overs %0d), cycles with two or more SL2 banks busy=%0d",
             n_rdhit, n_rdm2, n_banks2);
    begin
      string l;
      l = "";
      foreach (seen12[k]) l = {l, $sformatf(" %0d", seen12[k])};
      $display("coherence samples=%0d; line-node pairs seen per state II..OS2:%s", n_inv, l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
