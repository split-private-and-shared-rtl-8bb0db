// Set-associative cache store: tags, coherence states, line data and LRU order.
//
// One instance is used for each PL1, each PL2 and the SL2. A lookup is combinational: the
// caller puts a line address on lk_laddr and gets, for that set, the hit way with its state
// and data, and the replacement victim (the first invalid way, otherwise the least recently
// used one) with its tag, state and data. Writes are synchronous through a single write
// port: wr_data_en also rewrites the line data, otherwise only tag and state change;
// wr_touch makes the written way the most recently used of its set.
//
// Replacement keeps an age per way (0 = most recent). After reset a sweep walks every set,
// one per clock, marking all ways invalid and setting ages 0..WAYS-1, as an SRAM cannot be
// cleared at once; init_done rises when it is finished and writes are ignored until then.
// The document fixes sizes and associativities; LRU, the sweep and the port structure are
// this design's choices. Set WAYS = 1 for a direct-mapped cache.
module cache_array
  import sps2_pkg::*;
#(
  parameter int unsigned SETS = 256,
  parameter int unsigned WAYS = 4,
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   init_done,

  // lookup (combinational)
  input  laddr_t                 lk_laddr,
  output logic                   lk_hit,
  output logic [WW-1:0]          lk_hit_way,
  output cstate_t                lk_hit_state,
  output line_t                  lk_hit_data,
  output logic [WW-1:0]          lk_vic_way,
  output cstate_t                lk_vic_state,
  output laddr_t                 lk_vic_laddr,
  output line_t                  lk_vic_data,

  // write port
  input  logic                   wr_en,
  input  laddr_t                 wr_laddr,
  input  logic [WW-1:0]          wr_way,
  input  cstate_t                wr_state,
  input  logic                   wr_data_en,
  input  line_t                  wr_data,
  input  logic                   wr_touch
);

  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = LADDR_W - ((SETS > 1) ? $clog2(SETS) : 0);
  localparam int unsigned AGE_W = WW;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [AGE_W-1:0] age_t;

  tag_t    [WAYS-1:0] tag_mem [SETS];
  cstate_t [WAYS-1:0] st_mem  [SETS];
  age_t    [WAYS-1:0] age_mem [SETS];
  line_t   [WAYS-1:0] dat_mem [SETS];

  function automatic logic [IDX_W-1:0] idx_of(laddr_t la);
    if (SETS > 1) return IDX_W'(la[IDX_W-1:0]);
    return '0;
  endfunction

  function automatic tag_t tag_of(laddr_t la);
    return tag_t'(la >> ((SETS > 1) ? $clog2(SETS) : 0));
  endfunction

  // ---------------------------------------------------------------- lookup
  logic [IDX_W-1:0]   lk_idx;
  tag_t    [WAYS-1:0] row_tag;
  cstate_t [WAYS-1:0] row_st;
  age_t    [WAYS-1:0] row_age;
  line_t   [WAYS-1:0] row_dat;

  assign lk_idx  = idx_of(lk_laddr);
  assign row_tag = tag_mem[lk_idx];
  assign row_st  = st_mem[lk_idx];
  assign row_age = age_mem[lk_idx];
  assign row_dat = dat_mem[lk_idx];

  always_comb begin
    logic found_inv;
    lk_hit     = 1'b0;
    lk_hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_hit && row_st[w] != ST_I && row_tag[w] == tag_of(lk_laddr)) begin
        lk_hit     = 1'b1;
        lk_hit_way = WW'(w);
      end
    end
    lk_hit_state = lk_hit ? row_st[lk_hit_way] : ST_I;
    lk_hit_data  = row_dat[lk_hit_way];

    // victim: first invalid way, else the oldest
    found_inv  = 1'b0;
    lk_vic_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!found_inv && row_st[w] == ST_I) begin
        found_inv  = 1'b1;
        lk_vic_way = WW'(w);
      end
    end
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++) begin
        if (row_age[w] == age_t'(WAYS - 1)) lk_vic_way = WW'(w);
      end
    end
    lk_vic_state = row_st[lk_vic_way];
    lk_vic_data  = row_dat[lk_vic_way];
    if (SETS > 1)
      lk_vic_laddr = laddr_t'({row_tag[lk_vic_way], lk_idx});
    else
      lk_vic_laddr = laddr_t'(row_tag[lk_vic_way]);
  end

  // ---------------------------------------------------------------- init sweep
  logic [IDX_W:0] init_cnt;
  assign init_done = (init_cnt == (IDX_W+1)'(SETS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          init_cnt <= '0;
    else if (!init_done) init_cnt <= init_cnt + 1'b1;
  end

  // ---------------------------------------------------------------- write port
  logic [IDX_W-1:0] wr_idx;
  age_t             wr_old_age;
  age_t [WAYS-1:0]  new_ages;
  cstate_t [WAYS-1:0] wr_row_st;
  tag_t    [WAYS-1:0] wr_row_tag;

  assign wr_idx     = idx_of(wr_laddr);
  assign wr_old_age = age_mem[wr_idx][wr_way];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (WW'(w) == wr_way)        new_ages[w] = '0;
      else if (age_mem[wr_idx][w] < wr_old_age) new_ages[w] = age_mem[wr_idx][w] + 1'b1;
      else                         new_ages[w] = age_mem[wr_idx][w];
    end
    wr_row_st  = st_mem[wr_idx];
    wr_row_tag = tag_mem[wr_idx];
    wr_row_st[wr_way]  = wr_state;
    wr_row_tag[wr_way] = tag_of(wr_laddr);
  end

  always_ff @(posedge clk) begin
    if (!init_done) begin
      for (int w = 0; w < WAYS; w++) begin
        st_mem[init_cnt[IDX_W-1:0]][w]  <= ST_I;
        age_mem[init_cnt[IDX_W-1:0]][w] <= age_t'(w);
      end
    end else if (wr_en) begin
      st_mem[wr_idx]  <= wr_row_st;
      tag_mem[wr_idx] <= wr_row_tag;
      if (wr_data_en) dat_mem[wr_idx][wr_way] <= wr_data;
      if (wr_touch)   age_mem[wr_idx] <= new_ages;
    end
  end

endmodule
