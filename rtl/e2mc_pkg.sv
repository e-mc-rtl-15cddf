// e2mc_pkg: sizes, types and encodings shared by the E2MC compression path.
//
// The design compresses 128-byte memory blocks as 64 symbols of 16 bits with a
// canonical Huffman code whose codewords are at most 20 bits long (E2MC16).
// Values outside the 1K most frequent values (MFVs) are written as an escape
// codeword followed by the raw 16-bit symbol. A compressed block is split into
// 4 parallel decoding ways (PDWs) whose start bytes are stored as 7-bit
// pointers at the head of the block. The memory access granularity is 32 bytes;
// a block is kept compressed only if it fits in 96 bytes. These numbers follow
// the published E2MC scheme.
//
// Bit order (this design's choice): a block is a 1024-bit vector read MSB
// first. Symbol k is blk[1023-16k -: 16]; compressed bit i of the stream is
// cblk[1023-i]; byte b of the block is blk[1023-8b -: 8].
//
// Configuration: software writes all code tables through one write port
// (cfg_wr_t). Field layout of cfg.data per target is listed with cfg_sel_e.
package e2mc_pkg;

  localparam int unsigned SL          = 16;    // symbol length in bits
  localparam int unsigned BLOCK_BYTES = 128;
  localparam int unsigned BLOCK_BITS  = BLOCK_BYTES * 8;
  localparam int unsigned NSYM        = BLOCK_BITS / SL;  // 64 symbols
  localparam int unsigned MAX_CL      = 20;    // longest codeword
  localparam int unsigned CL_W        = $clog2(MAX_CL + 1);  // 5
  localparam int unsigned NUM_MFV     = 1024;  // most frequent values
  localparam int unsigned DLUT_DEPTH  = NUM_MFV + 1;  // MFVs plus escape slot
  localparam int unsigned IDX_W       = $clog2(DLUT_DEPTH);  // 11
  localparam int unsigned CLUT_WAYS   = 8;
  localparam int unsigned CLUT_SETS   = 128;   // indexed by symbol[6:0]
  localparam int unsigned PDW         = 4;     // parallel decoding ways
  localparam int unsigned PTR_W       = $clog2(BLOCK_BYTES);  // 7
  localparam int unsigned MAG_BYTES   = 32;    // one GDDR5 burst (32-bit bus, BL8)
  localparam int unsigned LIMIT_BYTES = 96;    // store compressed if size <= 96B
  localparam int unsigned POS_W       = 12;    // bit position in a (worst case) stream
  localparam int unsigned ADDR_W      = 32;    // byte address (4GB)
  localparam int unsigned BLK_W       = ADDR_W - $clog2(BLOCK_BYTES);  // 25

  // 2-bit metadata per block: number of 32B bursts minus one, or 11 = raw.
  localparam logic [1:0] META_RAW = 2'b11;

  typedef logic [BLOCK_BITS-1:0] block_t;

  // Bursts to move for a given metadata value (1..4).
  function automatic logic [2:0] meta_bursts(input logic [1:0] meta);
    return (meta == META_RAW) ? 3'd4 : {1'b0, meta} + 3'd1;
  endfunction

  // Configuration targets and the meaning of cfg_wr_t.addr / .data:
  //   CFG_CLUT : addr = {set[6:0], way[2:0]}; data = {valid, tag[8:0], cw[19:0], cl[4:0]}
  //   CFG_ESC  : data = {cw[19:0], cl[4:0]} of the escape (non-MFV) prefix
  //   CFG_FCW  : addr = code length l (1..20); data = {valid, fcw[19:0]} (fcw right-aligned)
  //   CFG_OFS  : addr = code length l; data = offset[19:0] (De-LUT index = CW - offset)
  //   CFG_DLUT : addr = De-LUT index; data = symbol[15:0]
  typedef enum logic [2:0] {
    CFG_CLUT = 3'd0,
    CFG_ESC  = 3'd1,
    CFG_FCW  = 3'd2,
    CFG_OFS  = 3'd3,
    CFG_DLUT = 3'd4
  } cfg_sel_e;

  typedef struct packed {
    logic        we;
    cfg_sel_e    sel;
    logic [10:0] addr;
    logic [35:0] data;
  } cfg_wr_t;

  // Operating mode of the memory controller (set by software).
  typedef enum logic {
    MODE_SAMPLE   = 1'b0,  // online sampling: store raw, feed the VFT
    MODE_COMPRESS = 1'b1   // compress writes with the loaded code
  } mode_e;

endpackage
