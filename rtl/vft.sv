// vft: value frequency table for online sampling of symbol probabilities.
//
// During the sampling phase every block that passes the memory controller
// can be offered to the VFT. It walks through the block's 64 16-bit symbols,
// one per cycle, and counts how often each value occurs. The table holds 1K
// values (the number of most frequent values the E2MC code is built from) as
// 8 ways by 128 sets indexed by the low 7 symbol bits, like the c-LUT.
// After sampling, software reads the table, builds the canonical Huffman code
// and loads the c-LUT and decoder tables.
//
// This design's choices: the set-associative organisation, 32-bit saturating
// counters, and the replacement rule: a value that finds its set full
// replaces the entry with the smallest count (its count restarts at 1). A
// block offered while the previous one is still being counted is not
// sampled (sample_busy is high).
//
// Interface / timing:
//   sample_valid, sample_blk : block to count, taken when sample_busy is low;
//                              counting takes NSYM cycles.
//   clear                    : empties the table (one cycle).
//   rd_addr = {set, way}     : combinational read-out of one entry:
//                              rd_valid, rd_value (the 16-bit symbol), rd_count.
//                              The low 7 bits of rd_value are the set index,
//                              so they follow rd_addr directly; only the tag
//                              is stored.
module vft
  import e2mc_pkg::*;
#(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned SETS  = 128,
  parameter int unsigned CNT_W = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           sample_valid,
  input  block_t                         sample_blk,
  output logic                           sample_busy,
  input  logic [$clog2(SETS*WAYS)-1:0]   rd_addr,
  output logic                           rd_valid,
  output logic [SL-1:0]                  rd_value,
  output logic [CNT_W-1:0]               rd_count
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = SL - SET_W;
  localparam int unsigned K_W   = $clog2(NSYM);

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [CNT_W-1:0] cnts  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];

  block_t           blk_r;
  logic [K_W-1:0]   k;
  logic             active;

  logic [SL-1:0]    s;
  logic [SET_W-1:0] s_set;
  logic [TAG_W-1:0] s_tag;
  assign s     = blk_r[BLOCK_BITS - 1 - SL * k -: SL];
  assign s_set = s[SET_W-1:0];
  assign s_tag = s[SL-1:SET_W];

  // Find the entry to update: the matching way, else a free way, else the
  // way with the smallest count.
  logic             m_hit;
  logic [WAY_W-1:0] m_way, free_way, min_way;
  logic             free_found;
  always_comb begin
    m_hit = 1'b0;
    m_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[s_set][w] && tags[s_set][w] == s_tag) begin
        m_hit = 1'b1;
        m_way = WAY_W'(w);
      end
    free_found = 1'b0;
    free_way   = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[s_set][w]) begin
        free_found = 1'b1;
        free_way   = WAY_W'(w);
      end
    min_way = '0;
    for (int w = 1; w < WAYS; w++)
      if (cnts[s_set][w] < cnts[s_set][min_way]) min_way = WAY_W'(w);
  end

  logic [WAY_W-1:0] upd_way;
  assign upd_way = m_hit ? m_way : (free_found ? free_way : min_way);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      k      <= '0;
      blk_r  <= '0;
      for (int i = 0; i < SETS; i++) valid[i] <= '0;
    end else if (clear) begin
      active <= 1'b0;
      k      <= '0;
      for (int i = 0; i < SETS; i++) valid[i] <= '0;
    end else begin
      if (!active) begin
        if (sample_valid) begin
          blk_r  <= sample_blk;
          k      <= '0;
          active <= 1'b1;
        end
      end else begin
        valid[s_set][upd_way] <= 1'b1;
        k <= k + 1'b1;
        if (k == K_W'(NSYM - 1)) active <= 1'b0;
      end
    end
  end

  // Tags and counters: no reset, guarded by the valid bits.
  always_ff @(posedge clk) begin
    if (active && !clear) begin
      tags[s_set][upd_way] <= s_tag;
      if (m_hit) begin
        if (cnts[s_set][upd_way] != '1) cnts[s_set][upd_way] <= cnts[s_set][upd_way] + 1'b1;
      end else begin
        cnts[s_set][upd_way] <= CNT_W'(1);
      end
    end
  end

  assign sample_busy = active;

  logic [SET_W-1:0] rd_set;
  logic [WAY_W-1:0] rd_way;
  assign rd_set   = rd_addr[WAY_W +: SET_W];
  assign rd_way   = rd_addr[WAY_W-1:0];
  assign rd_valid = valid[rd_set][rd_way];
  assign rd_value = {tags[rd_set][rd_way], rd_set};
  assign rd_count = cnts[rd_set][rd_way];

endmodule
