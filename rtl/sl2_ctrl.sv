// Shared L2 (SL2) controller: NBANKS line-interleaved banks behind one bus port and one
// direct read port per node.
//
// The SL2 holds lines used by two or more processors (S2, O, M2) and lines pushed out of a
// private cache by P_SL2; the state rules are in sl2_bank. Each bank serves one access at a
// time, so up to NBANKS accesses to different banks are in flight together.
//
// Bus port: GETS, GETX and P_SL2 issued by the snooping bus (req_valid pulse, one request
// outstanding). done comes LAT cycles after req_valid when the bank is free, later when the
// bank is finishing a read port access; the bus port wins over the read ports when both
// want the same free bank. A P_SL2 that displaces a dirty line returns it on wb_*.
//
// Read ports: after a PL1/PL2 read miss a node may look the line up here without a bus
// transaction. Hold rd_req[p] with rd_laddr[p] until rd_done[p]. On a hit the line is on
// rd_data[p] and rd_state[p] is the state the reader takes: S2 when the SL2 keeps S2 or O,
// M2 when the SL2 held M2 and hands it over (its copy is invalidated). A read port access is
// a GETS to the bank, so it is ordered with bus accesses to the same line by the bank.
// Read ports of the same bank are served round robin.
module sl2_ctrl
  import sps2_pkg::*;
#(
  parameter int unsigned SETS   = 4096,   // 2 MB / 64 B / 8 ways, over all banks
  parameter int unsigned WAYS   = 8,
  parameter int unsigned LAT    = 12,
  parameter int unsigned NBANKS = 4,
  parameter int unsigned NRD    = 4       // read ports, one per node
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,        // initialisation sweep finished

  // bus port
  input  logic              req_valid,
  input  buscmd_t           req_cmd,
  input  laddr_t            req_laddr,
  input  cstate_t           req_state,
  input  line_t             req_data,
  output logic              done,
  output logic              hit,
  output cstate_t           was_state,
  output line_t             rdata,
  output logic              wb_valid,
  output laddr_t            wb_laddr,
  output line_t             wb_data,

  // read ports
  input  logic    [NRD-1:0] rd_req,
  input  laddr_t  [NRD-1:0] rd_laddr,
  output logic    [NRD-1:0] rd_done,
  output logic    [NRD-1:0] rd_hit,
  output cstate_t [NRD-1:0] rd_state,
  output line_t   [NRD-1:0] rd_data
);

  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 0;
  localparam int unsigned PW = (NRD > 1) ? $clog2(NRD) : 1;

  function automatic int unsigned bank_of(laddr_t la);
    return (NBANKS > 1) ? int'(32'(la) % NBANKS) : 0;
  endfunction

  // per-bank signals
  logic    [NBANKS-1:0] b_ready, b_idle, b_req, b_done, b_hit, b_wbv;
  buscmd_t [NBANKS-1:0] b_cmd;
  laddr_t  [NBANKS-1:0] b_laddr, b_wbla;
  cstate_t [NBANKS-1:0] b_pst, b_was;
  line_t   [NBANKS-1:0] b_pdat, b_rdat, b_wbd;

  // who the access in each bank belongs to
  logic    [NBANKS-1:0] own_bus;
  logic    [PW-1:0]     own_port [NBANKS];
  logic    [PW-1:0]     rr       [NBANKS];

  // bus request waiting for its bank
  logic    bus_pend;
  buscmd_t pq_cmd;
  laddr_t  pq_laddr;
  cstate_t pq_state;
  line_t   pq_data;

  logic    [NRD-1:0] rd_busy;               // accepted, not yet answered

  // bus candidate this cycle
  logic    bc_v;
  buscmd_t bc_cmd;
  laddr_t  bc_laddr;
  cstate_t bc_state;
  line_t   bc_data;
  assign bc_v     = req_valid || bus_pend;
  assign bc_cmd   = bus_pend ? pq_cmd   : req_cmd;
  assign bc_laddr = bus_pend ? pq_laddr : req_laddr;
  assign bc_state = bus_pend ? pq_state : req_state;
  assign bc_data  = bus_pend ? pq_data  : req_data;

  // issue decisions
  logic    [NBANKS-1:0] iss_bus, iss_rd;
  logic    [PW-1:0]     iss_port [NBANKS];
  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      iss_bus[b] = 1'b0; iss_rd[b] = 1'b0; iss_port[b] = '0;
      b_req[b] = 1'b0; b_cmd[b] = BUS_GETS; b_laddr[b] = '0; b_pst[b] = ST_I; b_pdat[b] = '0;
      if (b_idle[b]) begin
        if (bc_v && bank_of(bc_laddr) == b) begin
          iss_bus[b] = 1'b1;
          b_req[b] = 1'b1; b_cmd[b] = bc_cmd; b_laddr[b] = bc_laddr;
          b_pst[b] = bc_state; b_pdat[b] = bc_data;
        end else begin
          for (int k = 0; k < NRD; k++) begin
            automatic int unsigned p = (int'(rr[b]) + k) % NRD;
            if (!iss_rd[b] && rd_req[p] && !rd_busy[p] && bank_of(rd_laddr[p]) == b) begin
              iss_rd[b] = 1'b1; iss_port[b] = PW'(p);
              b_req[b] = 1'b1; b_cmd[b] = BUS_GETS; b_laddr[b] = rd_laddr[p];
            end
          end
        end
      end
    end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    sl2_bank #(
      .SETS(SETS / NBANKS), .WAYS(WAYS), .LAT(LAT), .BANK_W(BW), .BANK_ID(b)
    ) u_bank (
      .clk, .rst_n, .ready(b_ready[b]), .idle(b_idle[b]),
      .req_valid(b_req[b]), .req_cmd(b_cmd[b]), .req_laddr(b_laddr[b]),
      .req_state(b_pst[b]), .req_data(b_pdat[b]),
      .done(b_done[b]), .hit(b_hit[b]), .was_state(b_was[b]), .rdata(b_rdat[b]),
      .wb_valid(b_wbv[b]), .wb_laddr(b_wbla[b]), .wb_data(b_wbd[b])
    );
  end

  assign ready = &b_ready;

  // answers
  always_comb begin
    done = 1'b0; hit = 1'b0; was_state = ST_I; rdata = '0;
    wb_valid = 1'b0; wb_laddr = '0; wb_data = '0;
    rd_done = '0; rd_hit = '0;
    for (int p = 0; p < NRD; p++) begin
      rd_state[p] = ST_I; rd_data[p] = '0;
    end
    for (int b = 0; b < NBANKS; b++) begin
      if (b_done[b] && own_bus[b]) begin
        done = 1'b1; hit = b_hit[b]; was_state = b_was[b]; rdata = b_rdat[b];
        wb_valid = b_wbv[b]; wb_laddr = b_wbla[b]; wb_data = b_wbd[b];
      end
      if (b_done[b] && !own_bus[b]) begin
        rd_done[own_port[b]]  = 1'b1;
        rd_hit[own_port[b]]   = b_hit[b];
        rd_state[own_port[b]] = (b_was[b] == ST_M2) ? ST_M2 : ST_S2;
        rd_data[own_port[b]]  = b_rdat[b];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_pend <= 1'b0; pq_cmd <= BUS_GETS; pq_laddr <= '0; pq_state <= ST_I; pq_data <= '0;
      rd_busy  <= '0;   own_bus <= '0;
      for (int b = 0; b < NBANKS; b++) begin
        own_port[b] <= '0; rr[b] <= '0;
      end
    end else begin
      if (req_valid && !(|iss_bus)) begin
        bus_pend <= 1'b1;
        pq_cmd <= req_cmd; pq_laddr <= req_laddr; pq_state <= req_state; pq_data <= req_data;
      end else if (|iss_bus) begin
        bus_pend <= 1'b0;
      end
      rd_busy <= rd_busy & ~rd_done;
      for (int b = 0; b < NBANKS; b++) begin
        if (iss_bus[b]) own_bus[b] <= 1'b1;
        if (iss_rd[b]) begin
          own_bus[b]  <= 1'b0;
          own_port[b] <= iss_port[b];
          rd_busy[iss_port[b]] <= 1'b1;
          rr[b] <= PW'((int'(iss_port[b]) + 1) % NRD);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> !bus_pend)
    else $error("SL2 bus request while one is still waiting");
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(b_done & own_bus))
    else $error("two SL2 banks answering the bus port");

endmodule
