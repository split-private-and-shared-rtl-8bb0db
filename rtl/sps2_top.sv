// SPS2 chip-multiprocessor memory hierarchy: N nodes, each with a private L1 (PL1) and a
// private L2 (PL2) under its own coherence controller, one shared L2 (SL2) that all nodes
// reach over the snooping bus, and the port to off-chip main memory.
//
// Data used by one processor stays in its private caches (fast PL2 hits); data used by two
// or more processors is kept once, in the SL2, instead of being replicated in every
// private L2. The SL2 has SL2_BANKS interleaved banks, a port for the bus and a read port
// per node, through which a load that misses in PL1 and PL2 is served without the bus.
// The processors and the main memory are outside this module: each node's processor port
// (cpu_*) and the memory port (mem_*) are brought out.
//
// Processor port, per node i: hold cpu_req[i] (with cpu_we, cpu_addr, cpu_wdata) until
// cpu_ready[i]; a load's word is on cpu_rdata[i] in that cycle. Addresses are byte
// addresses of 64-bit words (bits 2:0 ignored). Memory port: mem_req stays high until a
// one-cycle mem_ack; mem_laddr is a 64-byte line address; read data comes with mem_ack.
// ready rises when every cache has finished its initialisation sweep.
//
// Defaults are the document's main configuration: four nodes, 64 KB PL1 with 64-byte
// lines, 0.5 MB 4-way PL2 with 5-cycle access, 2 MB 8-way SL2 with 12-cycle access and
// four ports. PL1 associativity and the number of SL2 banks are not given by the document
// and are set to 4 here.
module sps2_top
  import sps2_pkg::*;
#(
  parameter int unsigned N_NODES = 4,
  parameter int unsigned L1_SETS = 256,
  parameter int unsigned L1_WAYS = 4,
  parameter int unsigned L2_SETS = 2048,
  parameter int unsigned L2_WAYS = 4,
  parameter int unsigned L2_LAT  = 5,
  parameter int unsigned SL2_SETS = 4096,
  parameter int unsigned SL2_WAYS = 8,
  parameter int unsigned SL2_LAT  = 12,
  parameter int unsigned SL2_BANKS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,

  input  logic  [N_NODES-1:0]     cpu_req,
  input  logic  [N_NODES-1:0]     cpu_we,
  input  addr_t [N_NODES-1:0]     cpu_addr,
  input  word_t [N_NODES-1:0]     cpu_wdata,
  output logic  [N_NODES-1:0]     cpu_ready,
  output word_t [N_NODES-1:0]     cpu_rdata,

  output logic                    mem_req,
  output logic                    mem_we,
  output laddr_t                  mem_laddr,
  output line_t                   mem_wdata,
  input  logic                    mem_ack,
  input  line_t                   mem_rdata
);

  logic    [N_NODES-1:0] bus_req, bus_gnt, m_valid, m_done, s_valid, s_done, s_supply,
                         s_shared, node_rdy;
  buscmd_t [N_NODES-1:0] m_cmd;
  laddr_t  [N_NODES-1:0] m_laddr;
  cstate_t [N_NODES-1:0] m_state;
  line_t   [N_NODES-1:0] m_data, s_data;
  line_t                 m_rdata;
  logic                  m_shared, m_sl2_m2;
  buscmd_t               s_cmd;
  laddr_t                s_laddr;

  logic    sl2_ready, sl2_req, sl2_done, sl2_hit, sl2_wb_valid;
  buscmd_t sl2_cmd;
  laddr_t  sl2_laddr, sl2_wb_laddr;
  cstate_t sl2_state, sl2_was;
  line_t   sl2_data, sl2_rdata, sl2_wb_data;

  logic    [N_NODES-1:0] rd_req, rd_done, rd_hit;
  laddr_t  [N_NODES-1:0] rd_laddr;
  cstate_t [N_NODES-1:0] rd_state;
  line_t   [N_NODES-1:0] rd_data;

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    node_ctrl #(
      .L1_SETS(L1_SETS), .L1_WAYS(L1_WAYS), .L2_SETS(L2_SETS), .L2_WAYS(L2_WAYS),
      .L2_LAT(L2_LAT)
    ) u_node (
      .clk, .rst_n, .ready(node_rdy[i]),
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]),
      .cpu_wdata(cpu_wdata[i]), .cpu_ready(cpu_ready[i]), .cpu_rdata(cpu_rdata[i]),
      .bus_req(bus_req[i]), .bus_gnt(bus_gnt[i]),
      .m_valid(m_valid[i]), .m_cmd(m_cmd[i]), .m_laddr(m_laddr[i]), .m_state(m_state[i]),
      .m_data(m_data[i]), .m_done(m_done[i]), .m_rdata, .m_shared, .m_sl2_m2,
      .s_valid(s_valid[i]), .s_cmd, .s_laddr, .s_done(s_done[i]), .s_supply(s_supply[i]),
      .s_data(s_data[i]), .s_shared(s_shared[i]),
      .sl2_rd_req(rd_req[i]), .sl2_rd_laddr(rd_laddr[i]), .sl2_rd_done(rd_done[i]),
      .sl2_rd_hit(rd_hit[i]), .sl2_rd_state(rd_state[i]), .sl2_rd_data(rd_data[i])
    );
  end

  sl2_ctrl #(
    .SETS(SL2_SETS), .WAYS(SL2_WAYS), .LAT(SL2_LAT), .NBANKS(SL2_BANKS), .NRD(N_NODES)
  ) u_sl2 (
    .clk, .rst_n, .ready(sl2_ready),
    .req_valid(sl2_req), .req_cmd(sl2_cmd), .req_laddr(sl2_laddr), .req_state(sl2_state),
    .req_data(sl2_data), .done(sl2_done), .hit(sl2_hit), .was_state(sl2_was),
    .rdata(sl2_rdata), .wb_valid(sl2_wb_valid), .wb_laddr(sl2_wb_laddr),
    .wb_data(sl2_wb_data),
    .rd_req, .rd_laddr, .rd_done, .rd_hit, .rd_state, .rd_data
  );

  snoop_bus #(.N(N_NODES)) u_bus (
    .clk, .rst_n,
    .bus_req, .bus_gnt,
    .m_valid, .m_cmd, .m_laddr, .m_state, .m_data, .m_done, .m_rdata, .m_shared, .m_sl2_m2,
    .s_valid, .s_cmd, .s_laddr, .s_done, .s_supply, .s_data, .s_shared,
    .sl2_ready, .sl2_req, .sl2_cmd, .sl2_laddr, .sl2_state, .sl2_data,
    .sl2_done, .sl2_hit, .sl2_was, .sl2_rdata, .sl2_wb_valid, .sl2_wb_laddr, .sl2_wb_data,
    .mem_req, .mem_we, .mem_laddr, .mem_wdata, .mem_ack, .mem_rdata
  );

  assign ready = (&node_rdy) && sl2_ready;

endmodule
