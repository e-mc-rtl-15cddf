// clut: compressor lookup table (c-LUT) for 16-bit symbols.
//
// Holds the codeword (CW) and code length (CL) of the most frequent values as
// an 8-way set-associative table of 128 sets (1K entries), indexed by the low
// 7 bits of the symbol; the upper 9 bits are the tag. The organisation (8
// ways, 7 index bits, 1K values) follows the published E2MC compressor; the
// synchronous read and the write port layout are this design's choices.
//
// Interface / timing:
//   rd_en, sym    : lookup request. When rd_en is high the result registers
//                   hit/cw/cl take the result one cycle later; when low they hold.
//   cfg           : CFG_CLUT writes one entry (see e2mc_pkg). Writes to the same
//                   set in the lookup cycle are seen by the next lookup only.
//   Reset clears all valid bits, so every lookup misses until software loads
//   the table.
module clut
  import e2mc_pkg::*;
#(
  parameter int unsigned WAYS  = CLUT_WAYS,
  parameter int unsigned SETS  = CLUT_SETS,
  parameter int unsigned CWL   = MAX_CL
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_wr_t                  cfg,
  input  logic                     rd_en,
  input  logic [SL-1:0]            sym,
  output logic                     hit,
  output logic [CWL-1:0]           cw,
  output logic [$clog2(CWL+1)-1:0] cl
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = SL - SET_W;
  localparam int unsigned LEN_W = $clog2(CWL + 1);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [CWL-1:0]   cw;
    logic [LEN_W-1:0] cl;
  } entry_t;

  entry_t             mem   [SETS][WAYS];
  logic [WAYS-1:0]    valid [SETS];

  logic [SET_W-1:0] rd_set;
  logic [TAG_W-1:0] rd_tag;
  assign rd_set = sym[SET_W-1:0];
  assign rd_tag = sym[SL-1:SET_W];

  logic [SET_W-1:0] wr_set;
  logic [WAY_W-1:0] wr_way;
  logic             wr_en;
  assign wr_en  = cfg.we && (cfg.sel == CFG_CLUT);
  assign wr_set = cfg.addr[WAY_W +: SET_W];
  assign wr_way = cfg.addr[WAY_W-1:0];

  // Table contents (no reset needed, guarded by valid bits).
  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wr_set][wr_way] <= '{tag: cfg.data[CWL+LEN_W +: TAG_W],
                               cw:  cfg.data[LEN_W +: CWL],
                               cl:  cfg.data[LEN_W-1:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else if (wr_en) begin
      valid[wr_set][wr_way] <= cfg.data[CWL+LEN_W+TAG_W];
    end
  end

  // Tag comparison across the ways of the selected set.
  logic             m_hit;
  entry_t           m_entry;
  always_comb begin
    m_hit   = 1'b0;
    m_entry = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[rd_set][w] && mem[rd_set][w].tag == rd_tag) begin
        m_hit   = 1'b1;
        m_entry = mem[rd_set][w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit <= 1'b0;
      cw  <= '0;
      cl  <= '0;
    end else if (rd_en) begin
      hit <= m_hit;
      cw  <= m_entry.cw;
      cl  <= m_entry.cl;
    end
  end

endmodule
