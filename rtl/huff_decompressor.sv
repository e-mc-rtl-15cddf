// huff_decompressor: parallel decoding of one compressed block.
//
// A compressed block starts with PDW-1 pointers P2..Pn of PTR_W bits each,
// the byte address of the first codeword of ways 2..n (the published E2MC
// block layout). This module reads the pointers, starts NWAY
// huff_decoder_unit instances at the same time, each on NSYM/NWAY symbols, and
// writes their symbols back into block order. Way 1 starts at the first byte
// after the pointer header (this design's choice, matching huff_compressor).
//
// Interface / timing:
//   cfg          : broadcast to all decoder units (same code tables).
//   start, cblk  : accepted when busy is low; cblk is registered here.
//   done, blk    : done pulses once all ways have finished; blk then holds the
//                  64 symbols (symbol k at blk[1023-16k -: 16]) until the
//                  next start. Latency is NSYM/NWAY + escapes in the longest
//                  way + 6 cycles from the start cycle (22 cycles with 4 ways and no
//                  escapes).
//   tbl_rd_len -> tbl_rd_fcw, tbl_rd_ofs : read-back of the FCW and offset
//                  tables (taken from the first unit; all hold the same code).
module huff_decompressor
  import e2mc_pkg::*;
#(
  parameter int unsigned NWAY = PDW
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_wr_t cfg,
  input  logic    start,
  input  block_t  cblk,
  output logic    busy,
  output logic    done,
  output block_t  blk,
  input  logic [$clog2(MAX_CL+1)-1:0] tbl_rd_len,
  output logic [MAX_CL:0]             tbl_rd_fcw,
  output logic [MAX_CL-1:0]           tbl_rd_ofs
);
  localparam int unsigned WAY_SYMS = NSYM / NWAY;
  localparam int unsigned HDR_RAW  = (NWAY - 1) * PTR_W;
  localparam int unsigned HDR_BITS = (HDR_RAW + 7) / 8 * 8;
  localparam int unsigned WS_W     = $clog2(WAY_SYMS + 1);

  block_t                   cblk_r;
  logic                     active, go;
  logic [NWAY-1:0]          u_busy, u_valid, u_done, finished;
  logic [SL-1:0]            u_sym [NWAY];
  logic [POS_W-1:0]         u_start [NWAY];
  logic [WS_W-1:0]          u_idx [NWAY];
  logic [MAX_CL:0]          u_rd_fcw [NWAY];
  logic [MAX_CL-1:0]        u_rd_ofs [NWAY];

  // Start bit of every way, from the pointer header.
  always_comb begin
    u_start[0] = POS_W'(HDR_BITS);
    for (int w = 1; w < NWAY; w++)
      u_start[w] = POS_W'({cblk_r[BLOCK_BITS - 1 - (w - 1) * PTR_W -: PTR_W], 3'b000});
  end

  for (genvar w = 0; w < NWAY; w++) begin : g_way
    huff_decoder_unit #(.CWL(MAX_CL), .DEPTH(DLUT_DEPTH)) u_dec (
      .clk, .rst_n, .cfg,
      .start(go), .blk(cblk_r), .start_bit(u_start[w]), .nsym(7'(WAY_SYMS)),
      .busy(u_busy[w]), .sym_valid(u_valid[w]), .sym(u_sym[w]), .done(u_done[w]),
      .tbl_rd_len, .tbl_rd_fcw(u_rd_fcw[w]), .tbl_rd_ofs(u_rd_ofs[w])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cblk_r   <= '0;
      active   <= 1'b0;
      go       <= 1'b0;
      finished <= '0;
      done     <= 1'b0;
      blk      <= '0;
      for (int w = 0; w < NWAY; w++) u_idx[w] <= '0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      if (start && !busy) begin
        cblk_r   <= cblk;
        active   <= 1'b1;
        go       <= 1'b1;
        finished <= '0;
        for (int w = 0; w < NWAY; w++) u_idx[w] <= '0;
      end else if (active) begin
        for (int w = 0; w < NWAY; w++) begin
          if (u_valid[w]) begin
            blk[BLOCK_BITS - 1 - SL * (w * WAY_SYMS + int'(u_idx[w])) -: SL] <= u_sym[w];
            u_idx[w] <= u_idx[w] + 1'b1;
          end
          if (u_done[w]) finished[w] <= 1'b1;
        end
        if ((finished | u_done) == '1) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign busy = active;

  // All units hold the same tables; read back through way 1.
  assign tbl_rd_fcw = u_rd_fcw[0];
  assign tbl_rd_ofs = u_rd_ofs[0];

endmodule
