// Node controller: the private caches of one processor (PL1 and PL2) and the finite-state
// controller that keeps them coherent with the other nodes and the shared L2.
//
// PL1 and PL2 are exclusive: a line lives in at most one of them. The controller serves
// one processor access at a time (cpu_req held until cpu_ready; cpu_rdata valid with it):
//   * PL1 hit (a load, or a store to an M1/M2 line): done, no bus transaction.
//   * PL1 miss: after the PL2 access time (L2_LAT cycles) the PL2 is checked; a PL2 hit
//     moves the line into PL1 and the access is retried there.
//   * To make room in PL1 the victim is replaced: S1/M1 lines go to PL2 (whose own victim
//     is dropped when clean S1/S2, written to memory with PUTM when M1, or pushed to the
//     SL2 with P_SL2 when M2/O); S2/M2/O lines are pushed to the SL2 with P_SL2.
//   * A load that misses in both looks the line up in the SL2 through this node's own SL2
//     read port (sl2_rd_*), without a bus transaction; an SL2 hit fills PL1 in S2, or in
//     M2 when the SL2 hands over its M2 copy. The node answers no snoop until the line is
//     in PL1, so a snoop that follows the SL2 access always finds the copy.
//   * A miss in all three, or a store to an S1/S2/O line, needs the bus: GETS for a load,
//     GETX for a store. The filled state is S1 (only memory had it), S2 (another cache had
//     it) or M2 (the SL2 handed over its M2 copy) after GETS, and M1 or M2 after GETX.
// Every step that needs the bus first wins the bus and keeps it (bus_req high) until the
// access is done, so a whole miss, with its write-backs, is atomic. While waiting for the
// bus, and when idle, the controller answers snoops (s_valid) in one cycle: on GETS a
// dirty copy (M1/M2/O) is supplied and becomes O, S1 becomes S2; on GETX every copy is
// invalidated and a dirty one supplied. s_shared reports that the node had a valid copy.
//
// Timing: a PL1 hit completes the cycle after the request is seen; a PL2 hit L2_LAT + 2
// cycles after it and an SL2 read-port hit L2_LAT + SL2 access + 3 cycles after it, when
// no eviction is needed and the SL2 bank is free. The states, the replacement targets and the
// snoop reactions follow the document's protocol description; the handshakes, the
// one-request-at-a-time structure, the 64-bit word access, the choice of M1 versus M2
// on an upgrade (M2 unless the node held the line in S1), searching the SL2 after the PL2
// rather than alongside it, and holding snoops off during an SL2 read are this design's
// own.
module node_ctrl
  import sps2_pkg::*;
#(
  parameter int unsigned L1_SETS = 256,    // 64 KB / 64 B / 4 ways
  parameter int unsigned L1_WAYS = 4,
  parameter int unsigned L2_SETS = 2048,   // 0.5 MB / 64 B / 4 ways
  parameter int unsigned L2_WAYS = 4,
  parameter int unsigned L2_LAT  = 5,
  parameter bit          SL2_RD  = 1'b1     // use the direct SL2 read port on a load miss
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    ready,          // both arrays initialised

  // processor
  input  logic    cpu_req,
  input  logic    cpu_we,
  input  addr_t   cpu_addr,
  input  word_t   cpu_wdata,
  output logic    cpu_ready,
  output word_t   cpu_rdata,

  // bus master side
  output logic    bus_req,
  input  logic    bus_gnt,
  output logic    m_valid,
  output buscmd_t m_cmd,
  output laddr_t  m_laddr,
  output cstate_t m_state,
  output line_t   m_data,
  input  logic    m_done,
  input  line_t   m_rdata,
  input  logic    m_shared,
  input  logic    m_sl2_m2,

  // snoop side
  input  logic    s_valid,
  input  buscmd_t s_cmd,
  input  laddr_t  s_laddr,
  output logic    s_done,
  output logic    s_supply,
  output line_t   s_data,
  output logic    s_shared,

  // direct read port of the SL2
  output logic    sl2_rd_req,
  output laddr_t  sl2_rd_laddr,
  input  logic    sl2_rd_done,
  input  logic    sl2_rd_hit,
  input  cstate_t sl2_rd_state,
  input  line_t   sl2_rd_data
);

  localparam int unsigned W1 = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1;
  localparam int unsigned W2 = (L2_WAYS > 1) ? $clog2(L2_WAYS) : 1;
  localparam int unsigned CW = $clog2(L2_LAT + 1);

  typedef enum logic [3:0] {
    N_INIT, N_IDLE, N_SNOOP, N_L1, N_L2WAIT, N_L2, N_EV, N_WAITG, N_BWAIT, N_SL2RD
  } nstate_t;

  typedef enum logic [2:0] {OP_EV_L2, OP_EV_L1, OP_FILL_S, OP_FILL_X, OP_UPG} op_t;

  nstate_t st, ret_st;
  logic    own;          // this node holds the bus
  logic    l2_chk;       // PL2 access time already spent for this request
  logic    sl2_chk;      // SL2 read port already tried for this request
  logic [CW-1:0] cnt;
  op_t     op;
  laddr_t  op_laddr;
  logic [W1-1:0] op_way1;
  logic [W2-1:0] op_way2;
  cstate_t op_old;       // state of the line being upgraded

  laddr_t  cpu_laddr;
  assign cpu_laddr = cpu_addr[ADDR_W-1:OFF_W];

  // ------------------------------------------------------------------ arrays
  laddr_t        l1_lk, l2_lk;
  logic          l1_hit, l2_hit, l1_rdy, l2_rdy;
  logic [W1-1:0] l1_hit_way, l1_vic_way;
  logic [W2-1:0] l2_hit_way, l2_vic_way;
  cstate_t       l1_hit_st, l1_vic_st, l2_hit_st, l2_vic_st;
  line_t         l1_hit_dat, l1_vic_dat, l2_hit_dat, l2_vic_dat;
  laddr_t        l1_vic_la, l2_vic_la;

  logic          l1_we, l1_wde, l1_wt, l2_we, l2_wde, l2_wt;
  laddr_t        l1_wla, l2_wla;
  logic [W1-1:0] l1_wway;
  logic [W2-1:0] l2_wway;
  cstate_t       l1_wst, l2_wst;
  line_t         l1_wdat, l2_wdat;

  cache_array #(.SETS(L1_SETS), .WAYS(L1_WAYS)) u_pl1 (
    .clk, .rst_n, .init_done(l1_rdy),
    .lk_laddr(l1_lk), .lk_hit(l1_hit), .lk_hit_way(l1_hit_way), .lk_hit_state(l1_hit_st),
    .lk_hit_data(l1_hit_dat), .lk_vic_way(l1_vic_way), .lk_vic_state(l1_vic_st),
    .lk_vic_laddr(l1_vic_la), .lk_vic_data(l1_vic_dat),
    .wr_en(l1_we), .wr_laddr(l1_wla), .wr_way(l1_wway), .wr_state(l1_wst),
    .wr_data_en(l1_wde), .wr_data(l1_wdat), .wr_touch(l1_wt)
  );

  cache_array #(.SETS(L2_SETS), .WAYS(L2_WAYS)) u_pl2 (
    .clk, .rst_n, .init_done(l2_rdy),
    .lk_laddr(l2_lk), .lk_hit(l2_hit), .lk_hit_way(l2_hit_way), .lk_hit_state(l2_hit_st),
    .lk_hit_data(l2_hit_dat), .lk_vic_way(l2_vic_way), .lk_vic_state(l2_vic_st),
    .lk_vic_laddr(l2_vic_la), .lk_vic_data(l2_vic_dat),
    .wr_en(l2_we), .wr_laddr(l2_wla), .wr_way(l2_wway), .wr_state(l2_wst),
    .wr_data_en(l2_wde), .wr_data(l2_wdat), .wr_touch(l2_wt)
  );

  assign ready = l1_rdy && l2_rdy;
  assign l1_lk = (st == N_SNOOP) ? s_laddr : cpu_laddr;
  assign l2_lk = (st == N_SNOOP) ? s_laddr : (st == N_EV) ? l1_vic_la : cpu_laddr;

  // store merge: replace one word of the PL1 line
  line_t merged;
  always_comb begin
    merged = l1_hit_dat;
    merged[cpu_addr[OFF_W-1:3]*WORD_W +: WORD_W] = cpu_wdata;
  end
  assign cpu_rdata = l1_hit_dat[cpu_addr[OFF_W-1:3]*WORD_W +: WORD_W];

  // ------------------------------------------------------------------ decisions
  // What each state does this cycle, as flags consumed by the write ports and registers.
  logic    finish, go_l2wait, go_l2, go_ev, go_waitg, go_l1, go_sl2;
  logic    issue;
  buscmd_t iss_cmd;
  laddr_t  iss_laddr;
  cstate_t iss_state;
  line_t   iss_data;
  op_t     iss_op;

  always_comb begin
    finish = 1'b0; go_l2wait = 1'b0; go_l2 = 1'b0; go_ev = 1'b0; go_waitg = 1'b0;
    go_l1 = 1'b0; go_sl2 = 1'b0; issue = 1'b0;
    iss_cmd = BUS_GETS; iss_laddr = cpu_laddr; iss_state = ST_I; iss_data = l1_vic_dat;
    iss_op = OP_FILL_S;
    cpu_ready = 1'b0;
    s_done = 1'b0; s_supply = 1'b0; s_shared = 1'b0; s_data = l1_hit_dat;

    l1_we = 1'b0; l1_wla = cpu_laddr; l1_wway = l1_hit_way; l1_wst = l1_hit_st;
    l1_wde = 1'b0; l1_wdat = merged; l1_wt = 1'b0;
    l2_we = 1'b0; l2_wla = cpu_laddr; l2_wway = l2_hit_way; l2_wst = l2_hit_st;
    l2_wde = 1'b0; l2_wdat = l1_vic_dat; l2_wt = 1'b0;

    unique case (st)
      N_SNOOP: begin
        s_done = 1'b1;
        if (l1_hit) begin
          s_shared = 1'b1;
          s_supply = snoop_supplies(l1_hit_st, s_cmd);
          s_data   = l1_hit_dat;
          l1_we    = 1'b1; l1_wla = s_laddr; l1_wway = l1_hit_way;
          l1_wst   = snoop_next(l1_hit_st, s_cmd);
        end else if (l2_hit) begin
          s_shared = 1'b1;
          s_supply = snoop_supplies(l2_hit_st, s_cmd);
          s_data   = l2_hit_dat;
          l2_we    = 1'b1; l2_wla = s_laddr; l2_wway = l2_hit_way;
          l2_wst   = snoop_next(l2_hit_st, s_cmd);
        end
      end

      N_L1: begin
        if (l1_hit && (!cpu_we || st_writable(l1_hit_st))) begin
          finish    = 1'b1;
          cpu_ready = 1'b1;
          l1_we     = 1'b1; l1_wt = 1'b1;          // touch for LRU
          l1_wde    = cpu_we;                      // store hit writes the word
        end else if (l1_hit) begin                 // store to S1/S2/O: upgrade
          if (own) begin
            issue = 1'b1; iss_cmd = BUS_GETX; iss_op = OP_UPG;
          end else go_waitg = 1'b1;
        end else if (!l2_chk && L2_LAT > 1) begin
          go_l2wait = 1'b1;
        end else begin
          go_l2 = 1'b1;
        end
      end

      N_L2: begin
        if (st_valid(l1_vic_st)) begin
          go_ev = 1'b1;
        end else if (l2_hit) begin                 // promote PL2 -> PL1
          l1_we = 1'b1; l1_wway = l1_vic_way; l1_wst = l2_hit_st;
          l1_wde = 1'b1; l1_wdat = l2_hit_dat; l1_wt = 1'b1;
          l2_we = 1'b1; l2_wway = l2_hit_way; l2_wst = ST_I;
          go_l1 = 1'b1;
        end else if (own) begin
          issue  = 1'b1;
          iss_cmd = cpu_we ? BUS_GETX : BUS_GETS;
          iss_op  = cpu_we ? OP_FILL_X : OP_FILL_S;
        end else if (SL2_RD && !cpu_we && !sl2_chk) begin
          go_sl2 = 1'b1;
        end else go_waitg = 1'b1;
      end

      N_SL2RD: begin                               // PL1 way is free (checked in N_L2)
        if (sl2_rd_done && sl2_rd_hit) begin
          l1_we = 1'b1; l1_wway = l1_vic_way; l1_wst = sl2_rd_state;
          l1_wde = 1'b1; l1_wdat = sl2_rd_data; l1_wt = 1'b1;
          go_l1 = 1'b1;
        end else if (sl2_rd_done) begin
          go_waitg = 1'b1;
        end
      end

      N_EV: begin
        if (pl1_victim_to_pl2(l1_vic_st)) begin
          if (!st_valid(l2_vic_st) || pl2_victim_drop(l2_vic_st)) begin
            l2_we = 1'b1; l2_wla = l1_vic_la; l2_wway = l2_vic_way; l2_wst = l1_vic_st;
            l2_wde = 1'b1; l2_wdat = l1_vic_dat; l2_wt = 1'b1;
            l1_we = 1'b1; l1_wway = l1_vic_way; l1_wst = ST_I;
            go_l2 = 1'b1;
          end else if (own) begin                  // rep2: dirty PL2 victim leaves first
            issue = 1'b1; iss_op = OP_EV_L2;
            iss_cmd = (l2_vic_st == ST_M1) ? BUS_PUTM : BUS_PSL2;
            iss_laddr = l2_vic_la; iss_state = l2_vic_st; iss_data = l2_vic_dat;
          end else go_waitg = 1'b1;
        end else if (own) begin                    // P_SL2 of an S2/M2/O PL1 victim
          issue = 1'b1; iss_op = OP_EV_L1; iss_cmd = BUS_PSL2;
          iss_laddr = l1_vic_la; iss_state = l1_vic_st; iss_data = l1_vic_dat;
        end else go_waitg = 1'b1;
      end

      N_BWAIT: begin
        if (m_done) begin
          go_l1 = 1'b1;
          unique case (op)
            OP_EV_L2: begin
              l2_we = 1'b1; l2_wla = op_laddr; l2_wway = op_way2; l2_wst = ST_I;
            end
            OP_EV_L1: begin
              l1_we = 1'b1; l1_wla = op_laddr; l1_wway = op_way1; l1_wst = ST_I;
            end
            OP_FILL_S: begin
              l1_we = 1'b1; l1_wway = op_way1; l1_wst = gets_fill_state(m_sl2_m2, m_shared);
              l1_wde = 1'b1; l1_wdat = m_rdata; l1_wt = 1'b1;
            end
            OP_FILL_X: begin
              l1_we = 1'b1; l1_wway = op_way1; l1_wst = getx_fill_state(m_shared);
              l1_wde = 1'b1; l1_wdat = m_rdata; l1_wt = 1'b1;
            end
            default: begin                         // OP_UPG: keep own data
              l1_we = 1'b1; l1_wway = op_way1;
              l1_wst = getx_fill_state(m_shared || op_old != ST_S1); l1_wt = 1'b1;
            end
          endcase
        end
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------------ bus outputs
  assign bus_req = own || (st == N_WAITG) || (st == N_SNOOP && ret_st == N_WAITG);
  assign sl2_rd_req   = (st == N_SL2RD);
  assign sl2_rd_laddr = cpu_laddr;

  // ------------------------------------------------------------------ state register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= N_INIT; ret_st <= N_IDLE; own <= 1'b0; l2_chk <= 1'b0; sl2_chk <= 1'b0;
      cnt <= '0;
      op <= OP_FILL_S; op_laddr <= '0; op_way1 <= '0; op_way2 <= '0; op_old <= ST_I;
      m_valid <= 1'b0; m_cmd <= BUS_GETS; m_laddr <= '0; m_state <= ST_I; m_data <= '0;
    end else begin
      m_valid <= 1'b0;
      unique case (st)
        N_INIT:  if (ready) st <= N_IDLE;
        N_IDLE: begin
          if (s_valid) begin
            st <= N_SNOOP; ret_st <= N_IDLE;
          end else if (cpu_req) begin
            st <= N_L1;
          end
        end
        N_SNOOP: st <= ret_st;
        N_WAITG: begin
          if (s_valid) begin
            st <= N_SNOOP; ret_st <= N_WAITG;
          end else if (bus_gnt) begin
            own <= 1'b1; st <= N_L1;
          end
        end
        N_L2WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(L2_LAT - 1)) begin
            st <= N_L2; l2_chk <= 1'b1;
          end
        end
        N_BWAIT: if (go_l1) st <= N_L1;
        default: begin                              // N_L1, N_L2, N_EV, N_SL2RD
          if (finish) begin
            st <= N_IDLE; own <= 1'b0; l2_chk <= 1'b0; sl2_chk <= 1'b0;
          end else if (go_l2wait) begin
            st <= N_L2WAIT; cnt <= CW'(1);
          end else if (go_l2) begin
            st <= N_L2; l2_chk <= 1'b1;
          end else if (go_ev) begin
            st <= N_EV;
          end else if (go_sl2) begin
            st <= N_SL2RD; sl2_chk <= 1'b1;
          end else if (go_l1) begin
            st <= N_L1;
          end else if (go_waitg) begin
            st <= N_WAITG;
          end else if (issue) begin
            st <= N_BWAIT;
            m_valid <= 1'b1; m_cmd <= iss_cmd; m_laddr <= iss_laddr;
            m_state <= iss_state; m_data <= iss_data;
            op <= iss_op; op_old <= l1_hit_st;
            op_laddr <= iss_laddr;
            op_way1 <= (iss_op == OP_UPG) ? l1_hit_way : l1_vic_way;
            op_way2 <= l2_vic_way;
          end
        end
      endcase
    end
  end

  // ------------------------------------------------------------------ checks
  // PL1 and PL2 are exclusive.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == N_L1 || st == N_L2) |-> !(l1_hit && l2_hit))
    else $error("line present in both PL1 and PL2");
  // The bus never snoops its own owner.
  assert property (@(posedge clk) disable iff (!rst_n) s_valid |-> !own)
    else $error("snoop sent to the bus owner");
  // Only loads use the SL2 read port, and only into a free PL1 way.
  assert property (@(posedge clk) disable iff (!rst_n)
                   sl2_rd_req |-> (!cpu_we && !st_valid(l1_vic_st) && !own))
    else $error("SL2 read port used by a store or without a free PL1 way");

endmodule
