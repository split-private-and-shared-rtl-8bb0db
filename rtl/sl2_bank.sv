// One bank of the shared L2 (SL2).
//
// The SL2 holds lines used by two or more processors, in states S2, O or M2, and lines
// pushed out of a private cache by P_SL2. Lines are interleaved over the banks by the low
// BANK_W bits of the line address; this bank holds the lines whose low bits equal BANK_ID
// and indexes its array with the remaining bits. For each request (req_valid pulse with
// cmd, address, pushed state and data) it acts after the SRAM access time and pulses done
// LAT (at least 2) cycles after req_valid:
//   GETS  hit: returns the line; an M2 line moves to the reader (SL2 copy invalidated),
//         S2 and O stay.
//   GETX  hit: returns the line and invalidates the SL2 copy.
//   PSL2  hit: a clean (S2) push is dropped; a dirty push (O, M2) overwrites the line, O.
//         miss: the line is allocated with the pushed state; a dirty victim (M2, O) is
//         returned on wb_valid/wb_laddr/wb_data for the bus to write to memory (repS),
//         a clean victim is dropped.
// hit and was_state report the lookup result with done; idle is high when a request would
// be accepted. The 12-cycle access and the state rules follow the SPS2 protocol; the bank
// count and the interleaving are this design's choice.
module sl2_bank
  import sps2_pkg::*;
#(
  parameter int unsigned SETS    = 1024,   // sets of this bank: 2 MB / 64 B / 8 ways / 4 banks
  parameter int unsigned WAYS    = 8,
  parameter int unsigned LAT     = 12,
  parameter int unsigned BANK_W  = 2,
  parameter int unsigned BANK_ID = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    ready,        // initialisation sweep finished
  output logic    idle,

  input  logic    req_valid,
  input  buscmd_t req_cmd,
  input  laddr_t  req_laddr,
  input  cstate_t req_state,
  input  line_t   req_data,

  output logic    done,
  output logic    hit,
  output cstate_t was_state,
  output line_t   rdata,
  output logic    wb_valid,
  output laddr_t  wb_laddr,
  output line_t   wb_data
);

  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned CW = $clog2(LAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACT} sl2_st_t;
  sl2_st_t st;

  buscmd_t         cmd_q;
  laddr_t          laddr_q;
  cstate_t         pstate_q;
  line_t           pdata_q;
  logic [CW-1:0]   cnt;

  logic            lk_hit;
  logic [WW-1:0]   lk_hit_way, lk_vic_way;
  cstate_t         lk_hit_state, lk_vic_state;
  line_t           lk_hit_data, lk_vic_data;
  laddr_t          lk_vic_laddr;

  logic            wr_en, wr_data_en, wr_touch;
  logic [WW-1:0]   wr_way;
  cstate_t         wr_state;
  line_t           wr_data;

  // the array sees the line address without the bank bits
  laddr_t  arr_laddr, arr_vic_laddr;
  assign arr_laddr    = laddr_q >> BANK_W;
  assign lk_vic_laddr = (arr_vic_laddr << BANK_W) | laddr_t'(BANK_ID);
  assign idle         = (st == S_IDLE) && ready;

  cache_array #(.SETS(SETS), .WAYS(WAYS)) u_arr (
    .clk, .rst_n, .init_done(ready),
    .lk_laddr(arr_laddr), .lk_hit, .lk_hit_way, .lk_hit_state, .lk_hit_data,
    .lk_vic_way, .lk_vic_state, .lk_vic_laddr(arr_vic_laddr), .lk_vic_data,
    .wr_en, .wr_laddr(arr_laddr), .wr_way, .wr_state, .wr_data_en, .wr_data, .wr_touch
  );

  // action in S_ACT
  always_comb begin
    wr_en      = 1'b0;
    wr_way     = lk_hit_way;
    wr_state   = lk_hit_state;
    wr_data_en = 1'b0;
    wr_data    = pdata_q;
    wr_touch   = 1'b0;
    if (st == S_ACT) begin
      unique case (cmd_q)
        BUS_GETS, BUS_GETX: begin
          if (lk_hit) begin
            wr_en    = 1'b1;
            wr_state = sl2_serve_next(lk_hit_state, cmd_q);
            wr_touch = 1'b1;
          end
        end
        BUS_PSL2: begin
          wr_en      = 1'b1;
          wr_touch   = 1'b1;
          if (lk_hit) begin
            wr_state   = sl2_push_next(lk_hit_state, pstate_q);
            wr_data_en = (pstate_q != ST_S2);
          end else begin
            wr_way     = lk_vic_way;
            wr_state   = sl2_push_next(ST_I, pstate_q);
            wr_data_en = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cmd_q     <= BUS_GETS;
      laddr_q   <= '0;
      pstate_q  <= ST_I;
      pdata_q   <= '0;
      cnt       <= '0;
      done      <= 1'b0;
      hit       <= 1'b0;
      was_state <= ST_I;
      rdata     <= '0;
      wb_valid  <= 1'b0;
      wb_laddr  <= '0;
      wb_data   <= '0;
    end else begin
      done     <= 1'b0;
      wb_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (req_valid && ready) begin
          cmd_q    <= req_cmd;
          laddr_q  <= req_laddr;
          pstate_q <= req_state;
          pdata_q  <= req_data;
          cnt      <= CW'(1);
          st       <= (LAT > 2) ? S_WAIT : S_ACT;
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(LAT - 2)) st <= S_ACT;
        end
        S_ACT: begin
          done      <= 1'b1;
          hit       <= lk_hit;
          was_state <= lk_hit_state;
          rdata     <= lk_hit_data;
          if (cmd_q == BUS_PSL2 && !lk_hit && st_dirty(lk_vic_state)) begin
            wb_valid <= 1'b1;
            wb_laddr <= lk_vic_laddr;
            wb_data  <= lk_vic_data;
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (st == S_ACT && cmd_q == BUS_PSL2) |-> pstate_q inside {ST_S2, ST_O, ST_M2})
    else $error("P_SL2 carries a state the SL2 cannot hold");

endmodule
