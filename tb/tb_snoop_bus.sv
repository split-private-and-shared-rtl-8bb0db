// Self-checking testbench for snoop_bus with three requesters. The testbench plays the
// nodes (requests, commands and snoop answers with random delays), the SL2 (random hit,
// state and victim write-back) and uses the behavioural memory with a 20-cycle latency.
// For every command it checks: only non-owners are snooped, the line comes from a
// supplying node before an SL2 hit before memory, m_shared and m_sl2_m2 are right, the
// SL2 gets GETS/GETX/P_SL2 and a dirty SL2 victim reaches memory, and a PUTM line reaches
// memory. A memory read takes at least the memory latency.
module tb_snoop_bus;
  import sps2_pkg::*;
  localparam int N = 3;
  localparam int MLAT = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] bus_req = '0, bus_gnt, m_valid = '0, m_done, s_valid, s_done = '0,
                s_supply = '0, s_shared = '0;
  buscmd_t [N-1:0] m_cmd = '0; laddr_t [N-1:0] m_laddr = '0; cstate_t [N-1:0] m_state = '0;
  line_t [N-1:0] m_data = '0, s_data = '0;
  line_t m_rdata; logic m_shared, m_sl2_m2; buscmd_t s_cmd; laddr_t s_laddr;
  logic sl2_ready = 1, sl2_req, sl2_done = 0, sl2_hit = 0, sl2_wb_valid = 0;
  buscmd_t sl2_cmd; laddr_t sl2_laddr, sl2_wb_laddr = '0; cstate_t sl2_state, sl2_was = ST_I;
  line_t sl2_data, sl2_rdata = '0, sl2_wb_data = '0;
  logic mem_req, mem_we, mem_ack; laddr_t mem_laddr; line_t mem_wdata, mem_rdata;

  snoop_bus #(.N(N)) dut (.*);
  mem_model #(.LAT(MLAT)) u_mem (.*);

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // answers prepared for the current command
  logic [N-1:0] a_sup, a_sh;
  line_t        a_dat [N];
  logic         a_hit, a_wb; cstate_t a_was; line_t a_sl2dat, a_wbdat; laddr_t a_wbla;
  int           sl2_seen, n_mem = 0, n_node = 0, n_sl2 = 0, n_wb = 0;

  // snoop responders: answer after a random delay
  for (genvar i = 0; i < N; i++) begin : g_snp
    initial forever begin
      @(negedge clk);
      if (s_valid[i] && !s_done[i]) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        s_done[i] = 1; s_supply[i] = a_sup[i]; s_shared[i] = a_sh[i]; s_data[i] = a_dat[i];
        @(negedge clk);
        s_done[i] = 0;
      end
    end
  end

  // SL2 responder
  initial forever begin
    @(negedge clk);
    if (sl2_req) begin
      sl2_seen++;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      sl2_done = 1; sl2_hit = a_hit; sl2_was = a_was; sl2_rdata = a_sl2dat;
      sl2_wb_valid = a_wb; sl2_wb_laddr = a_wbla; sl2_wb_data = a_wbdat;
      @(negedge clk);
      sl2_done = 0; sl2_wb_valid = 0;
    end
  end

  initial begin
    int o, t0, t1, exp_src; buscmd_t c; laddr_t la; line_t exp; logic exp_sh, exp_m2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      o  = $urandom_range(0, N-1);
      c  = buscmd_t'($urandom_range(0, 3));
      la = laddr_t'($urandom_range(0, 63));
      for (int i = 0; i < N; i++) begin
        a_sh[i]  = (i != o) && ($urandom_range(0, 2) == 0);
        a_sup[i] = a_sh[i] && ($urandom_range(0, 3) == 0);
        a_dat[i] = {16{$urandom()}};
      end
      a_hit = $urandom_range(0, 1); a_was = a_hit ? cstate_t'($urandom_range(2, 5)) : ST_I;
      if (a_was == ST_M1) a_was = ST_M2;
      a_sl2dat = {16{$urandom()}};
      a_wb = (c == BUS_PSL2) && $urandom_range(0, 1);
      a_wbla = laddr_t'($urandom_range(64, 127)); a_wbdat = {16{$urandom()}};
      sl2_seen = 0;
      @(negedge clk);
      bus_req[o] = 1;
      do @(negedge clk); while (!bus_gnt[o]);
      chk(bus_gnt == N'(1) << o, "grant to the requester only");
      m_valid[o] = 1; m_cmd[o] = c; m_laddr[o] = la; m_state[o] = ST_O;
      m_data[o] = {16{$urandom()}};
      @(negedge clk);
      m_valid[o] = 0;
      t0 = $time / 10;
      while (!m_done[o]) begin
        @(negedge clk);
        if (s_valid[o]) chk(0, "owner snooped");
      end
      t1 = $time / 10;
      chk(m_done == N'(1) << o, "done to the owner only");
      if (c == BUS_GETS || c == BUS_GETX) begin
        chk(sl2_seen == 1, "SL2 asked");
        exp_sh = (|a_sh) || a_hit;
        exp_m2 = (c == BUS_GETS) && a_hit && a_was == ST_M2;
        if (|a_sup) begin
          exp = '0;
          for (int i = 0; i < N; i++) if (a_sup[i]) exp = a_dat[i];
          n_node++;
          // with several suppliers any one of them is acceptable
          chk((a_sup[0] && m_rdata == a_dat[0]) || (a_sup[1] && m_rdata == a_dat[1]) ||
              (a_sup[2] && m_rdata == a_dat[2]), "data from a supplying node");
        end else if (a_hit) begin
          n_sl2++;
          chk(m_rdata == a_sl2dat, "data from SL2");
        end else begin
          n_mem++;
          chk(m_rdata == (u_mem.store.exists(la) ? u_mem.store[la] : u_mem.init_line(la)),
              "data from memory");
          chk(t1 - t0 >= MLAT, $sformatf("memory latency %0d", t1 - t0));
        end
        chk(m_shared == exp_sh, "m_shared");
        chk(m_sl2_m2 == exp_m2, "m_sl2_m2");
      end else if (c == BUS_PSL2) begin
        chk(sl2_seen == 1, "P_SL2 reaches SL2");
        if (a_wb) begin
          n_wb++;
          chk(u_mem.store.exists(a_wbla) && u_mem.store[a_wbla] == a_wbdat, "SL2 victim written back");
        end
      end else begin
        chk(sl2_seen == 0, "PUTM bypasses SL2");
        chk(u_mem.store.exists(la) && u_mem.store[la] == m_data[o], "PUTM line in memory");
      end
      bus_req[o] = 0;
    end
    chk(n_node > 10 && n_sl2 > 10 && n_mem > 10 && n_wb > 10, "all data sources used");
    $display("node=%0d sl2=%0d mem=%0d wb=%0d", n_node, n_sl2, n_mem, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
