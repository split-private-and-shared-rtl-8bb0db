// Self-checking testbench for node_ctrl on small private caches (PL1 2 sets x 2 ways, PL2
// 4 sets direct-mapped, PL2 access 5 cycles). The testbench plays the rest of the system:
// it grants the bus, answers GETS/GETX with line data from its own memory image (with a
// random "shared" answer), absorbs P_SL2/PUTM write-backs, and injects snoops from other
// nodes while the node is idle or waiting for the bus. It also answers the node's SL2 read
// port, with a random hit (line from the memory image, S2 or M2) or miss. Checks:
//   * every load returns the last value stored (a reference image kept here),
//   * PL1 hit latency 1 cycle, PL2 hit latency 5 + 2 cycles, no bus use on either,
//   * store to S1 issues GETX (upgrade); store to M1 needs no bus,
//   * a load that misses privately tries the SL2 read port first: a hit needs no bus, an
//     S2 fill needs GETX for a store, an M2 fill does not; a miss falls back to GETS;
//     stores never use the read port,
//   * victims leave with the right command: PUTM only for M1, P_SL2 only for S2/M2/O,
//   * a snooped dirty line is supplied with the reference value, and when nothing is
//     supplied the memory image already holds the reference value.
module tb_node_ctrl;
  import sps2_pkg::*;
  localparam int L2_LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready, cpu_req = 0, cpu_we = 0, cpu_ready;
  addr_t cpu_addr = '0; word_t cpu_wdata = '0, cpu_rdata;
  logic bus_req, bus_gnt = 0, m_valid, m_done = 0, m_shared = 0, m_sl2_m2 = 0;
  buscmd_t m_cmd; laddr_t m_laddr; cstate_t m_state; line_t m_data, m_rdata = '0;
  logic s_valid = 0, s_done, s_supply, s_shared;
  buscmd_t s_cmd = BUS_GETS; laddr_t s_laddr = '0; line_t s_data;
  logic sl2_rd_req, sl2_rd_done = 0, sl2_rd_hit = 0; laddr_t sl2_rd_laddr;
  cstate_t sl2_rd_state = ST_I; line_t sl2_rd_data = '0;

  node_ctrl #(.L1_SETS(2), .L1_WAYS(2), .L2_SETS(4), .L2_WAYS(1), .L2_LAT(L2_LAT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // reference image (latest values) and memory image (what the rest of the system holds)
  word_t gold [addr_t];
  line_t memimg [laddr_t];
  function automatic word_t gold_of(addr_t a);
    laddr_t la = a[ADDR_W-1:OFF_W];
    if (gold.exists(a)) return gold[a];
    return {32'(la), 32'hC0DE_0000 | 32'(a[5:3])};
  endfunction
  function automatic line_t mem_line(laddr_t la);
    line_t l;
    if (memimg.exists(la)) return memimg[la];
    for (int k = 0; k < 8; k++) l[k*64 +: 64] = {32'(la), 32'hC0DE_0000 | 32'(k)};
    return l;
  endfunction

  int n_gets = 0, n_getx = 0, n_psl2 = 0, n_putm = 0, n_snoop_sup = 0, n_pl2hit = 0;
  int bus_cmds = 0;
  logic force_shared = 0, use_force = 0, force_rdhit = 0; cstate_t force_rdst = ST_S2;
  int n_rd = 0, n_rdhit = 0;

  // SL2 read port of the system
  initial begin
    forever begin
      @(negedge clk);
      if (sl2_rd_req) begin
        n_rd++;
        chk(!cpu_we, "only loads use the SL2 read port");
        chk(!bus_gnt, "SL2 read port not used while owning the bus");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        sl2_rd_hit   = use_force ? force_rdhit : ($urandom_range(0, 2) == 0);
        sl2_rd_state = use_force ? force_rdst : ($urandom_range(0, 3) == 0) ? ST_M2 : ST_S2;
        sl2_rd_data  = mem_line(sl2_rd_laddr);
        sl2_rd_done  = 1;
        if (sl2_rd_hit) n_rdhit++;
        @(negedge clk);
        sl2_rd_done  = 0;
      end
    end
  end


  // snoop from another node
  task automatic snoop(buscmd_t c, laddr_t la);
    @(negedge clk);
    s_valid = 1; s_cmd = c; s_laddr = la;
    do @(negedge clk); while (!s_done);
    s_valid = 0;
    if (s_supply) begin
      n_snoop_sup++;
      for (int k = 0; k < 8; k++)
        chk(s_data[k*64 +: 64] == gold_of({la, 3'(k), 3'b0}), "snoop-supplied data is current");
      memimg[la] = s_data;
    end else begin
      // nothing supplied: the rest of the system must already hold the current line
      for (int k = 0; k < 8; k++)
        chk(mem_line(la)[k*64 +: 64] == gold_of({la, 3'(k), 3'b0}), "unsupplied line is current elsewhere");
    end
    @(posedge clk); #1;
  endtask

  // bus side of the system
  initial begin
    forever begin
      @(negedge clk);
      if (bus_req && !bus_gnt && !s_valid) begin
        if (!use_force && $urandom_range(0, 3) == 0) snoop($urandom_range(0, 1) ? BUS_GETX : BUS_GETS,
                                             laddr_t'($urandom_range(0, 15)));
        else bus_gnt = 1;
      end else if (bus_gnt && !bus_req) bus_gnt = 0;
      if (m_valid) begin
        bus_cmds++;
        chk(bus_gnt, "command only with the grant");
        case (m_cmd)
          BUS_GETS, BUS_GETX: begin
            if (m_cmd == BUS_GETS) n_gets++; else n_getx++;
            m_rdata  = mem_line(m_laddr);
            m_shared = use_force ? force_shared : 1'($urandom_range(0, 1));
            repeat (3) @(negedge clk);
          end
          BUS_PSL2: begin
            n_psl2++;
            chk(m_state inside {ST_S2, ST_M2, ST_O}, "P_SL2 carries S2/M2/O");
            if (st_dirty(m_state)) memimg[m_laddr] = m_data;
          end
          default: begin
            n_putm++;
            chk(m_state == ST_M1, "PUTM carries M1");
            memimg[m_laddr] = m_data;
          end
        endcase
        m_done = 1;
        @(negedge clk);
        m_done = 0;
      end
    end
  end

  // node state N_L2 (encoding 5) with a PL2 hit and a free PL1 way: a PL2 hit is promoted
  always @(posedge clk) if (int'(dut.st) == 5 && dut.l2_hit && !st_valid(dut.l1_vic_st)) n_pl2hit++;

  // one processor access; returns latency in cycles and number of bus commands used
  task automatic access(logic we, addr_t a, word_t d, output int lat, output int cmds);
    int c0;
    @(negedge clk);                 // one idle cycle between accesses
    c0 = bus_cmds;
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!cpu_ready);
    if (!we) chk(cpu_rdata == gold_of(a), $sformatf("load %h: got %h exp %h", a, cpu_rdata, gold_of(a)));
    else gold[a] = d;
    cpu_req = 0;
    cmds = bus_cmds - c0;
  endtask

  function automatic addr_t A(int line, int word);
    return addr_t'({26'(line), 3'(word), 3'b0});
  endfunction

  initial begin
    int lat, cmds;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(negedge clk);
    use_force = 1; force_shared = 0;
    // line 0 miss -> S1
    access(0, A(0, 1), 0, lat, cmds);
    chk(cmds == 1 && n_gets == 1, "load miss uses one GETS");
    access(0, A(0, 2), 0, lat, cmds);
    chk(lat == 1 && cmds == 0, $sformatf("PL1 hit: latency %0d", lat));
    access(1, A(0, 2), 64'h1111, lat, cmds);
    chk(cmds == 1 && n_getx == 1, "store to S1 upgrades with GETX");
    access(1, A(0, 3), 64'h2222, lat, cmds);
    chk(lat == 1 && cmds == 0, "store to M1 hits without bus");
    // lines 2 and 4 share PL1 set 0: line 0 (M1) moves to PL2 without the bus
    access(0, A(2, 0), 0, lat, cmds);
    access(0, A(4, 0), 0, lat, cmds);
    chk(cmds == 1, "M1 victim goes to empty PL2 without bus");
    // free a PL1 way with a snooped GETX on line 2, then line 0 hits in PL2
    snoop(BUS_GETX, 26'd2);
    access(0, A(0, 2), 0, lat, cmds);
    chk(lat == L2_LAT + 2 && cmds == 0, $sformatf("PL2 hit: latency %0d", lat));
    // snooped GETS on the M1 line: supplied, becomes O; a store then needs GETX
    snoop(BUS_GETS, 26'd0);
    chk(n_snoop_sup == 1, "M1 line supplied on GETS");
    access(1, A(0, 4), 64'h3333, lat, cmds);
    chk(cmds == 1, "store to O needs GETX");
    // SL2 read port: hit in S2 (no bus), store then upgrades; hit in M2, store hits
    begin
      int g0, x0, h0;
      force_rdhit = 1; force_rdst = ST_S2;
      g0 = n_gets; x0 = n_getx; h0 = n_rdhit;
      access(0, A(9, 1), 0, lat, cmds);
      chk(n_gets == g0 && n_rdhit == h0 + 1, "load served by the SL2 read port without GETS");
      access(1, A(9, 1), 64'h4444, lat, cmds);
      chk(n_getx == x0 + 1, "store to a line read from the SL2 (S2) needs GETX");
      force_rdst = ST_M2;
      x0 = n_getx;
      access(0, A(11, 0), 0, lat, cmds);
      access(1, A(11, 0), 64'h5555, lat, cmds);
      chk(n_getx == x0 && lat == 1, "M2 handed over by the SL2: store hits");
      force_rdhit = 0;
      g0 = n_gets; h0 = n_rd;
      access(0, A(13, 0), 0, lat, cmds);
      // (a node that already holds the bus for a write-back goes straight to GETS)
      chk(n_rd <= h0 + 1 && n_gets == g0 + 1, "SL2 read port miss falls back to GETS");
    end
    // random phase
    use_force = 0;
    for (int it = 0; it < 3000; it++) begin
      int ln;
      ln = $urandom_range(0, 15);
      if ($urandom_range(0, 5) == 0)
        snoop($urandom_range(0, 1) ? BUS_GETX : BUS_GETS, laddr_t'(ln));
      else
        access($urandom_range(0, 2) == 0, A(ln, $urandom_range(0, 7)), {$urandom(), $urandom()},
               lat, cmds);
    end
    chk(n_psl2 > 0 && n_putm > 0 && n_pl2hit > 0 && n_snoop_sup > 10 && n_rdhit > 50,
        "all mechanisms seen");
    $display("GETS=%0d GETX=%0d PSL2=%0d PUTM=%0d PL2hits=%0d snoop_supplies=%0d SL2reads=%0d/%0d",
             n_gets, n_getx, n_psl2, n_putm, n_pl2hit, n_snoop_sup, n_rdhit, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
