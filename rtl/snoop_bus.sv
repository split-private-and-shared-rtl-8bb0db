// Snooping bus connecting the nodes, the shared L2 and main memory.
//
// The bus is atomic: the arbiter (round robin) grants one node, which may then issue any
// number of commands, one at a time, until it drops bus_req. For each command (m_valid
// pulse from the owner) the bus:
//   GETS/GETX  broadcasts the command to every other node (s_valid, held per node until
//              its s_done) and sends it to the SL2 at the same time. When all have
//              answered, the data comes from a node that supplied it (dirty copy), else
//              from an SL2 hit, else from memory. m_shared tells the requester that some
//              other cache held a copy; m_sl2_m2 that the SL2 handed over an M2 line.
//   PSL2       forwards the line to the SL2; if the SL2 returns a dirty victim, the bus
//              writes that victim to memory before finishing.
//   PUTM       writes the line to memory.
// The command ends with a one-cycle m_done to the owner, m_rdata/m_shared/m_sl2_m2 valid
// with it. No grant is given before the SL2 has finished its initialisation sweep.
// Memory uses a request/acknowledge handshake: mem_req stays high until a one-cycle
// mem_ack; read data comes with mem_ack. The document describes the bus commands and who
// answers them; the handshakes and the sequencing are this design's own.
module snoop_bus
  import sps2_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic              clk,
  input  logic              rst_n,

  // arbitration
  input  logic    [N-1:0]   bus_req,
  output logic    [N-1:0]   bus_gnt,

  // commands from the owner
  input  logic    [N-1:0]   m_valid,
  input  buscmd_t [N-1:0]   m_cmd,
  input  laddr_t  [N-1:0]   m_laddr,
  input  cstate_t [N-1:0]   m_state,
  input  line_t   [N-1:0]   m_data,
  output logic    [N-1:0]   m_done,
  output line_t             m_rdata,
  output logic              m_shared,
  output logic              m_sl2_m2,

  // snoops to the nodes
  output logic    [N-1:0]   s_valid,
  output buscmd_t           s_cmd,
  output laddr_t            s_laddr,
  input  logic    [N-1:0]   s_done,
  input  logic    [N-1:0]   s_supply,
  input  line_t   [N-1:0]   s_data,
  input  logic    [N-1:0]   s_shared,

  // shared L2
  input  logic              sl2_ready,
  output logic              sl2_req,
  output buscmd_t           sl2_cmd,
  output laddr_t            sl2_laddr,
  output cstate_t           sl2_state,
  output line_t             sl2_data,
  input  logic              sl2_done,
  input  logic              sl2_hit,
  input  cstate_t           sl2_was,
  input  line_t             sl2_rdata,
  input  logic              sl2_wb_valid,
  input  laddr_t            sl2_wb_laddr,
  input  line_t             sl2_wb_data,

  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output laddr_t            mem_laddr,
  output line_t             mem_wdata,
  input  logic              mem_ack,
  input  line_t             mem_rdata
);

  typedef enum logic [2:0] {B_IDLE, B_SNOOP, B_SL2, B_MRD, B_MWR, B_DONE} bstate_t;
  bstate_t st;

  logic [N-1:0] gnt;
  bus_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req(bus_req & {N{sl2_ready}}), .gnt
  );
  assign bus_gnt = gnt;

  buscmd_t cmd_q;
  laddr_t  laddr_q;
  line_t   data_q;       // line going to memory / SL2, then the line returned
  logic    [N-1:0] pend;
  logic    sl2_pend;
  logic    node_sup, sl2_sup;
  line_t   node_dat;

  // owner's command, selected by the one-hot grant
  logic    own_valid;
  buscmd_t own_cmd;
  laddr_t  own_laddr;
  cstate_t own_state;
  line_t   own_data;
  always_comb begin
    own_valid = 1'b0; own_cmd = BUS_GETS; own_laddr = '0; own_state = ST_I; own_data = '0;
    for (int i = 0; i < N; i++) begin
      if (gnt[i]) begin
        own_valid = m_valid[i]; own_cmd = m_cmd[i]; own_laddr = m_laddr[i];
        own_state = m_state[i]; own_data = m_data[i];
      end
    end
  end

  // snoop answers arriving this cycle
  logic  any_sup;
  line_t sup_dat;
  always_comb begin
    any_sup = 1'b0; sup_dat = node_dat;
    for (int i = 0; i < N; i++) begin
      if (s_done[i] && pend[i] && s_supply[i]) begin
        any_sup = 1'b1; sup_dat = s_data[i];
      end
    end
  end

  assign s_valid   = pend;
  assign s_cmd     = cmd_q;
  assign s_laddr   = laddr_q;
  assign sl2_cmd   = cmd_q;
  assign sl2_laddr = laddr_q;
  assign sl2_data  = data_q;
  assign mem_req   = (st == B_MRD) || (st == B_MWR);
  assign mem_we    = (st == B_MWR);
  assign mem_wdata = data_q;
  assign m_rdata   = data_q;
  assign m_done    = (st == B_DONE) ? gnt : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; cmd_q <= BUS_GETS; laddr_q <= '0; data_q <= '0; pend <= '0;
      sl2_pend <= 1'b0; node_sup <= 1'b0; sl2_sup <= 1'b0; node_dat <= '0;
      m_shared <= 1'b0; m_sl2_m2 <= 1'b0; sl2_req <= 1'b0; sl2_state <= ST_I;
      mem_laddr <= '0;
    end else begin
      sl2_req <= 1'b0;
      unique case (st)
        B_IDLE: if (own_valid) begin
          cmd_q <= own_cmd; laddr_q <= own_laddr; data_q <= own_data;
          sl2_state <= own_state; mem_laddr <= own_laddr;
          m_shared <= 1'b0; m_sl2_m2 <= 1'b0; node_sup <= 1'b0; sl2_sup <= 1'b0;
          unique case (own_cmd)
            BUS_GETS, BUS_GETX: begin
              pend <= ~gnt; sl2_pend <= 1'b1; sl2_req <= 1'b1; st <= B_SNOOP;
            end
            BUS_PSL2: begin
              sl2_req <= 1'b1; st <= B_SL2;
            end
            default: st <= B_MWR;                      // BUS_PUTM
          endcase
        end
        B_SNOOP: begin
          pend <= pend & ~s_done;
          if (|(s_done & pend & s_shared)) m_shared <= 1'b1;
          if (any_sup) begin
            node_sup <= 1'b1; node_dat <= sup_dat;
          end
          if (sl2_done) begin
            sl2_pend <= 1'b0;
            if (sl2_hit) begin
              m_shared <= 1'b1; sl2_sup <= 1'b1; data_q <= sl2_rdata;
              m_sl2_m2 <= (cmd_q == BUS_GETS) && (sl2_was == ST_M2);
            end
          end
          if (pend == '0 && !sl2_pend) begin
            if (node_sup) begin
              data_q <= node_dat; st <= B_DONE;
            end else if (sl2_sup) begin
              st <= B_DONE;
            end else begin
              st <= B_MRD;
            end
          end
        end
        B_SL2: if (sl2_done) begin
          if (sl2_wb_valid) begin
            data_q <= sl2_wb_data; mem_laddr <= sl2_wb_laddr; st <= B_MWR;
          end else begin
            st <= B_DONE;
          end
        end
        B_MRD: if (mem_ack) begin
          data_q <= mem_rdata; st <= B_DONE;
        end
        B_MWR: if (mem_ack) st <= B_DONE;
        default: st <= B_IDLE;                         // B_DONE
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (|m_valid) |-> ((m_valid & ~gnt) == '0))
    else $error("bus command from a node without the grant");
  assert property (@(posedge clk) disable iff (!rst_n) (|m_valid) |-> st == B_IDLE)
    else $error("bus command while the bus is busy");

endmodule
