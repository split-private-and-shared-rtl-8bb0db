// Self-checking testbench for sl2_ctrl: random GETS, GETX and P_SL2 requests on the bus
// port and reads on the node read ports, on a small SL2 (4 banks of 1 set x 2 ways),
// checked against a model of the SL2 state rules kept here: GETS hit returns the line (M2
// moves out), GETX hit returns and invalidates, a P_SL2 of S2 onto a held line is dropped,
// a dirty push makes the line O, a miss allocates the first free or least recently used way
// and returns a dirty victim for write-back; a read port hit gives S2, or M2 when the SL2
// held M2. Each access must finish exactly LAT = 12 cycles after it is requested. At the end
// the bus port and all four read ports access four different banks at once and must all
// finish in LAT cycles; four reads of one bank must take turns (4 x LAT), and a bus request
// to a bank that is busy must go before the read ports that also wait for it.
module tb_sl2_ctrl;
  import sps2_pkg::*;
  localparam int SETS = 4, WAYS = 2, LAT = 12, NRD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ready, req_valid = 0, done, hit, wb_valid;
  buscmd_t req_cmd = BUS_GETS; laddr_t req_laddr = '0, wb_laddr; cstate_t req_state = ST_I;
  line_t req_data = '0, rdata, wb_data; cstate_t was_state;
  logic [NRD-1:0] rd_req = '0, rd_done, rd_hit;
  laddr_t [NRD-1:0] rd_laddr = '0; cstate_t [NRD-1:0] rd_state; line_t [NRD-1:0] rd_data;

  sl2_ctrl #(.SETS(SETS), .WAYS(WAYS), .LAT(LAT), .NBANKS(4), .NRD(NRD)) dut (.*);

  laddr_t  m_la  [SETS][WAYS];
  cstate_t m_st  [SETS][WAYS];
  line_t   m_dat [SETS][WAYS];
  int      m_ord [SETS][WAYS];

  int checks = 0, failures = 0;
  int n_hit = 0, n_wb = 0, n_m2 = 0, n_rd = 0, n_rdhit = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic touch(int s, int w);
    int pos = 0;
    for (int k = 0; k < WAYS; k++) if (m_ord[s][k] == w) pos = k;
    for (int k = pos; k > 0; k--) m_ord[s][k] = m_ord[s][k-1];
    m_ord[s][0] = w;
  endtask

  initial begin
    int s, hw, vw, lat, port; logic h, f, use_rd; laddr_t la; buscmd_t c; cstate_t p;
    int fin [NRD+1]; logic [NRD-1:0] seen;
    for (int i = 0; i < SETS; i++)
      for (int j = 0; j < WAYS; j++) begin m_st[i][j] = ST_I; m_ord[i][j] = j; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int it = 0; it < 1500; it++) begin
      la = laddr_t'($urandom_range(0, 15));
      s  = int'(la[1:0]);
      case ($urandom_range(0, 3))
        0: c = BUS_GETS;
        1: c = BUS_GETX;
        default: c = BUS_PSL2;
      endcase
      case ($urandom_range(0, 2))
        0: p = ST_S2;
        1: p = ST_O;
        default: p = ST_M2;
      endcase
      use_rd = ($urandom_range(0, 3) == 0);
      port   = $urandom_range(0, NRD - 1);
      if (use_rd) c = BUS_GETS;               // a read port access is a GETS
      h = 0; hw = 0;
      for (int w = 0; w < WAYS; w++) if (!h && m_st[s][w] != ST_I && m_la[s][w] == la) begin h = 1; hw = w; end
      @(negedge clk);
      if (use_rd) begin
        n_rd++;
        rd_req[port] = 1; rd_laddr[port] = la;
        lat = 0;
        do begin @(negedge clk); lat++; end while (!rd_done[port]);
        rd_req[port] = 0;
        chk(lat == LAT, $sformatf("read port latency %0d", lat));
        chk(!done, "read port answer not shown on the bus port");
        chk(rd_hit[port] == h, $sformatf("read port hit %h", la));
        if (h) begin
          n_rdhit++;
          chk(rd_state[port] == ((m_st[s][hw] == ST_M2) ? ST_M2 : ST_S2), "read port state");
          chk(rd_data[port] == m_dat[s][hw], "read port data");
          if (m_st[s][hw] == ST_M2) m_st[s][hw] = ST_I;
          touch(s, hw);
        end
        continue;
      end
      req_valid = 1; req_cmd = c; req_laddr = la; req_state = p; req_data = {16{$urandom()}};
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      chk(lat == LAT, $sformatf("latency %0d", lat));
      chk(rd_done == '0, "bus answer not shown on a read port");
      // model
      chk(hit == h, $sformatf("hit %h", la));
      if (h) begin
        n_hit++;
        chk(was_state == m_st[s][hw], "was_state");
        if (c != BUS_PSL2) chk(rdata == m_dat[s][hw], "hit data");
      end
      chk(wb_valid == (c == BUS_PSL2 && !h && (m_st[s][m_ord[s][WAYS-1]] inside {ST_M2, ST_O})
                       && m_st[s][0] != ST_I && m_st[s][1] != ST_I), "write-back flag");
      if (c != BUS_PSL2) begin
        if (h) begin
          if (c == BUS_GETX || m_st[s][hw] == ST_M2) begin
            if (m_st[s][hw] == ST_M2) n_m2++;
            m_st[s][hw] = ST_I;
          end
          touch(s, hw);
        end
      end else if (h) begin
        if (p != ST_S2) begin m_st[s][hw] = ST_O; m_dat[s][hw] = req_data; end
        touch(s, hw);
      end else begin
        f = 0; vw = m_ord[s][WAYS-1];
        for (int w = 0; w < WAYS; w++) if (!f && m_st[s][w] == ST_I) begin f = 1; vw = w; end
        if (wb_valid) begin
          n_wb++;
          chk(wb_laddr == m_la[s][vw] && wb_data == m_dat[s][vw], "write-back line");
        end
        m_la[s][vw] = la; m_st[s][vw] = p; m_dat[s][vw] = req_data;
        touch(s, vw);
      end
    end
    chk(n_hit > 100 && n_wb > 20 && n_m2 > 10 && n_rdhit > 50, "all cases exercised");
    $display("hits=%0d writebacks=%0d m2_handovers=%0d reads=%0d read_hits=%0d",
             n_hit, n_wb, n_m2, n_rd, n_rdhit);

    // banks in parallel: bus on bank 0, read ports on banks 1, 2, 3 and 0 (+ 4)
    @(negedge clk);
    req_valid = 1; req_cmd = BUS_GETS; req_laddr = laddr_t'(32);
    for (int k = 0; k < NRD; k++) begin rd_req[k] = 1; rd_laddr[k] = laddr_t'(k + 1 + 40); end
    for (int k = 0; k <= NRD; k++) fin[k] = 0;
    seen = '0; lat = 0;
    @(negedge clk); req_valid = 0;
    while (seen != '1 || fin[NRD] == 0) begin
      lat++;
      if (done) fin[NRD] = lat;
      for (int k = 0; k < NRD; k++) if (rd_done[k]) begin fin[k] = lat; seen[k] = 1; rd_req[k] = 0; end
      @(negedge clk);
      if (lat > 100) break;
    end
    chk(fin[NRD] == LAT, $sformatf("bus access beside read ports: %0d", fin[NRD]));
    chk(fin[0] == LAT && fin[1] == LAT && fin[2] == LAT, "three other banks in parallel");
    chk(fin[3] == 2 * LAT, $sformatf("read port behind the bus in bank 0: %0d", fin[3]));

    // one bank: four reads take turns, a bus request arriving later goes next
    @(negedge clk);
    for (int k = 0; k < NRD; k++) begin rd_req[k] = 1; rd_laddr[k] = laddr_t'(4 * k + 2); end
    for (int k = 0; k <= NRD; k++) fin[k] = 0;
    seen = '0; lat = 0;
    while (seen != '1 || fin[NRD] == 0) begin
      @(negedge clk);
      lat++;
      if (lat == 2) begin req_valid = 1; req_laddr = laddr_t'(38); end
      if (lat == 3) req_valid = 0;
      if (done) fin[NRD] = lat;
      for (int k = 0; k < NRD; k++) if (rd_done[k]) begin fin[k] = lat; seen[k] = 1; rd_req[k] = 0; end
      if (lat > 200) break;
    end
    begin
      int srt [$];
      for (int k = 0; k < NRD; k++) srt.push_back(fin[k]);
      srt.sort();
      chk(srt[0] == LAT && srt[1] == 3 * LAT && srt[2] == 4 * LAT && srt[3] == 5 * LAT,
          $sformatf("reads of one bank take turns: %0d %0d %0d %0d", srt[0], srt[1], srt[2], srt[3]));
      chk(fin[NRD] == 2 * LAT, $sformatf("waiting bus request goes first: %0d", fin[NRD]));
    end
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
