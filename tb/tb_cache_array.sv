// Self-checking testbench for cache_array: random writes (tag/state, optional data, optional
// LRU touch) checked against an independent model of the set contents and of the LRU order
// kept as a most-recent-first list per set. Every lookup result (hit, way, state, data,
// victim way, victim address and state) is compared with the model.
module tb_cache_array;
  import sps2_pkg::*;

  localparam int SETS = 8;
  localparam int WAYS = 4;
  localparam int WW   = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done;
  laddr_t lk_laddr;
  logic lk_hit; logic [WW-1:0] lk_hit_way, lk_vic_way;
  cstate_t lk_hit_state, lk_vic_state; line_t lk_hit_data, lk_vic_data; laddr_t lk_vic_laddr;
  logic wr_en = 0, wr_data_en = 0, wr_touch = 0; laddr_t wr_laddr = '0;
  logic [WW-1:0] wr_way = '0; cstate_t wr_state = ST_I; line_t wr_data = '0;

  cache_array #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  // model
  laddr_t  m_la  [SETS][WAYS];
  cstate_t m_st  [SETS][WAYS];
  line_t   m_dat [SETS][WAYS];
  int      m_ord [SETS][WAYS];   // m_ord[s][0] = most recent way

  int checks = 0, failures = 0;
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_lookup(laddr_t la);
    int s; logic hit; int hw; int vw; logic found;
    s = int'(la % SETS);
    lk_laddr = la; #1;
    hit = 0; hw = 0;
    for (int w = 0; w < WAYS; w++)
      if (!hit && m_st[s][w] != ST_I && m_la[s][w] == la) begin hit = 1; hw = w; end
    found = 0; vw = m_ord[s][WAYS-1];
    for (int w = 0; w < WAYS; w++) if (!found && m_st[s][w] == ST_I) begin found = 1; vw = w; end
    chk(lk_hit == hit, $sformatf("hit %h", la));
    if (hit) begin
      chk(lk_hit_way == WW'(hw) && lk_hit_state == m_st[s][hw] && lk_hit_data == m_dat[s][hw],
          $sformatf("hit way/state/data %h", la));
    end
    chk(lk_vic_way == WW'(vw), $sformatf("victim way set %0d: got %0d exp %0d", s, lk_vic_way, vw));
    chk(lk_vic_state == m_st[s][vw], "victim state");
    if (m_st[s][vw] != ST_I)
      chk(lk_vic_laddr == m_la[s][vw] && lk_vic_data == m_dat[s][vw], "victim addr/data");
  endtask

  initial begin
    laddr_t la; int s, w, pos; cstate_t ns;
    for (int i = 0; i < SETS; i++)
      for (int j = 0; j < WAYS; j++) begin m_st[i][j] = ST_I; m_ord[i][j] = j; end
    lk_laddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // init sweep takes SETS cycles
    repeat (SETS) @(posedge clk);
    #1 chk(init_done == 1'b1, "init_done after sweep");
    for (int it = 0; it < 3000; it++) begin
      la = laddr_t'($urandom_range(0, 4*SETS*WAYS - 1));
      s  = int'(la % SETS);
      w  = $urandom_range(0, WAYS-1);
      ns = cstate_t'($urandom_range(0, 5));
      @(negedge clk);
      wr_en = 1; wr_laddr = la; wr_way = WW'(w); wr_state = ns;
      wr_data_en = $urandom_range(0, 1); wr_touch = $urandom_range(0, 1);
      wr_data = {16{$urandom()}};
      @(posedge clk); #1;
      wr_en = 0;
      m_la[s][w] = la; m_st[s][w] = ns;
      if (wr_data_en) m_dat[s][w] = wr_data;
      if (wr_touch) begin
        pos = 0;
        for (int k = 0; k < WAYS; k++) if (m_ord[s][k] == w) pos = k;
        for (int k = pos; k > 0; k--) m_ord[s][k] = m_ord[s][k-1];
        m_ord[s][0] = w;
      end
      // data of a never-written line is unknown: only compare data written here
      if (!wr_data_en && m_st[s][w] != ST_I) m_dat[s][w] = dut.dat_mem[s][w];
      check_lookup(la);
      check_lookup(laddr_t'($urandom_range(0, 4*SETS*WAYS - 1)));
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
