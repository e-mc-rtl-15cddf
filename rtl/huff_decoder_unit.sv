// huff_decoder_unit: one canonical-Huffman decompressor unit (E2MC16).
//
// Decodes nsym symbols starting at bit start_bit of a compressed block, one
// symbol per cycle, in three pipeline stages as in the published E2MC
// decompressor:
//   stage 1  finds the codeword: the top MAX_CL bits W of a 2*MAX_CL-bit
//            buffer are compared in parallel with the first codeword FCW(l)
//            of every length l (top l bits of W >= FCW(l)); a priority
//            encoder takes the longest length that matches, which is the code
//            length CL of a canonical code. The buffer then shifts by CL.
//            Whenever at most MAX_CL valid bits remain, the next MAX_CL bits of
//            the block are loaded behind them (fixed-width refill).
//   stage 2  De-LUT index = CW - offset(CL).
//   stage 3  reads the De-LUT (decode lookup table) to get the symbol.
// The escape codeword (values outside the MFVs) is recognised in stage 1;
// the next cycle takes the following 16 raw bits as the symbol, which then
// bypasses the De-LUT. Valid bits per length, the separate escape register
// and the two-cycle escape are this design's choices.
//
// Interface / timing:
//   cfg                    : CFG_FCW, CFG_OFS, CFG_DLUT, CFG_ESC writes.
//   start,blk,start_bit,nsym : accepted when busy is low; blk must hold still
//                            until done.
//   sym_valid, sym         : decoded symbols in order; the first comes 4
//                            cycles after start, then one per cycle (an
//                            escaped symbol costs one extra cycle).
//   done                   : pulse with the last symbol.
//   tbl_rd_len -> tbl_rd_fcw, tbl_rd_ofs : combinational read-back of the
//                            FCW table ({valid, FCW}) and offset table at one
//                            code length, so software can check or save them.
module huff_decoder_unit
  import e2mc_pkg::*;
#(
  parameter int unsigned CWL   = MAX_CL,
  parameter int unsigned DEPTH = DLUT_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic              start,
  input  block_t            blk,
  input  logic [POS_W-1:0]  start_bit,
  input  logic [6:0]        nsym,
  output logic              busy,
  output logic              sym_valid,
  output logic [SL-1:0]     sym,
  output logic              done,
  input  logic [$clog2(CWL+1)-1:0] tbl_rd_len,
  output logic [CWL:0]      tbl_rd_fcw,
  output logic [CWL-1:0]    tbl_rd_ofs
);
  localparam int unsigned BL    = 2 * CWL;
  localparam int unsigned LEN_W = $clog2(CWL + 1);
  localparam int unsigned F_W   = $clog2(BL + 1);
  localparam int unsigned IW    = $clog2(DEPTH);

  // ---------------- tables (software readable and writable) ----------------
  logic [CWL-1:0] fcw   [1:CWL];
  logic [CWL:1]   fcw_v;
  logic [CWL-1:0] ofs   [1:CWL];
  logic [SL-1:0]  dlut  [DEPTH];
  logic [CWL-1:0] esc_cw;
  logic [LEN_W-1:0] esc_cl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcw_v  <= '0;
      esc_cw <= '0;
      esc_cl <= '0;
      for (int l = 1; l <= CWL; l++) begin
        fcw[l] <= '0;
        ofs[l] <= '0;
      end
    end else if (cfg.we) begin
      unique case (cfg.sel)
        CFG_FCW: for (int l = 1; l <= CWL; l++)
          if (cfg.addr == 11'(l)) begin
            fcw_v[l] <= cfg.data[CWL];
            fcw[l]   <= cfg.data[CWL-1:0];
          end
        CFG_OFS: for (int l = 1; l <= CWL; l++)
          if (cfg.addr == 11'(l)) ofs[l] <= cfg.data[CWL-1:0];
        CFG_ESC: begin
          esc_cw <= cfg.data[LEN_W +: CWL];
          esc_cl <= cfg.data[LEN_W-1:0];
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.sel == CFG_DLUT && cfg.addr < 11'(DEPTH))
      dlut[IW'(cfg.addr)] <= cfg.data[SL-1:0];
  end

  // ---------------- stage 1: find codeword, shift, refill ----------------
  logic [BL-1:0]    buf_q;
  logic [F_W-1:0]   fill;
  logic [POS_W-1:0] rd_ptr;
  logic [6:0]       cnt, nsym_r, out_cnt;
  logic             run, lit_pending;

  // MAX_CL bits of the block starting at stream bit p (zeros past the end).
  function automatic logic [CWL-1:0] chunk_at(input block_t b, input logic [POS_W-1:0] p);
    logic [BLOCK_BITS+CWL-1:0] wide;
    wide = {b, CWL'(0)} << p;
    return wide[BLOCK_BITS+CWL-1 -: CWL];
  endfunction

  logic [CWL-1:0]   win;
  logic [CWL:1]     match;
  logic [LEN_W-1:0] m_cl;
  logic [CWL-1:0]   m_cw;
  logic             m_esc, s1_fire;
  logic [LEN_W-1:0] consume;
  logic [BL-1:0]    nbuf;
  logic [F_W-1:0]   nfill;
  logic             refill;

  assign win = buf_q[BL-1 -: CWL];

  always_comb begin
    for (int l = 1; l <= CWL; l++)
      match[l] = fcw_v[l] && ((win >> (CWL - l)) >= fcw[l]);
    // priority encoder: longest matching length
    m_cl = '0;
    for (int l = 1; l <= CWL; l++)
      if (match[l]) m_cl = LEN_W'(l);
    m_cw  = win >> (LEN_W'(CWL) - m_cl);
    m_esc = (m_cl == esc_cl) && (m_cw == esc_cw);
  end

  assign s1_fire = run && (cnt < nsym_r);
  assign consume = !s1_fire ? '0 : (lit_pending ? LEN_W'(SL) : m_cl);

  always_comb begin
    nbuf   = buf_q << consume;
    nfill  = fill - F_W'(consume);
    refill = s1_fire && (nfill <= F_W'(CWL));
    if (refill) begin
      nbuf  = nbuf | ({chunk_at(blk, rd_ptr), CWL'(0)} >> nfill);
      nfill = nfill + F_W'(CWL);
    end
  end

  // ---------------- stage 2 / 3 registers ----------------
  logic             s2_v, s2_lit;
  logic [SL-1:0]    s2_litval;
  logic [CWL-1:0]   s2_cw;
  logic [LEN_W-1:0] s2_cl;
  logic             s3_v, s3_lit;
  logic [SL-1:0]    s3_litval;
  logic [IW-1:0]    s3_idx;
  logic [CWL-1:0]   s2_ofs;
  logic [CWL-1:0]   s2_diff;

  always_comb begin
    s2_ofs = '0;
    for (int l = 1; l <= CWL; l++)
      if (s2_cl == LEN_W'(l)) s2_ofs = ofs[l];
    s2_diff = s2_cw - s2_ofs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q       <= '0;
      fill        <= '0;
      rd_ptr      <= '0;
      cnt         <= '0;
      nsym_r      <= '0;
      out_cnt     <= '0;
      run         <= 1'b0;
      lit_pending <= 1'b0;
      s2_v        <= 1'b0;
      s2_lit      <= 1'b0;
      s2_litval   <= '0;
      s2_cw       <= '0;
      s2_cl       <= '0;
      s3_v        <= 1'b0;
      s3_lit      <= 1'b0;
      s3_litval   <= '0;
      s3_idx      <= '0;
      sym_valid   <= 1'b0;
      sym         <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // preload the first MAX_CL bits so stage 1 can decode next cycle
        buf_q       <= {chunk_at(blk, start_bit), CWL'(0)};
        fill        <= F_W'(CWL);
        rd_ptr      <= start_bit + POS_W'(CWL);
        cnt         <= '0;
        out_cnt     <= '0;
        nsym_r      <= nsym;
        run         <= (nsym != '0);
        lit_pending <= 1'b0;
        s2_v        <= 1'b0;
      end else begin
        buf_q <= nbuf;
        fill  <= nfill;
        if (refill) rd_ptr <= rd_ptr + POS_W'(CWL);
        // stage 1 result
        s2_v   <= 1'b0;
        if (s1_fire) begin
          if (lit_pending) begin
            lit_pending <= 1'b0;
            s2_v      <= 1'b1;
            s2_lit    <= 1'b1;
            s2_litval <= win[CWL-1 -: SL];
            cnt       <= cnt + 1'b1;
          end else if (m_esc) begin
            lit_pending <= 1'b1;
          end else begin
            s2_v   <= 1'b1;
            s2_lit <= 1'b0;
            s2_cw  <= m_cw;
            s2_cl  <= m_cl;
            cnt    <= cnt + 1'b1;
          end
        end
        if (run && cnt == nsym_r && !s2_v && !s3_v) run <= 1'b0;
      end
      // stage 2 -> stage 3
      s3_v      <= s2_v;
      s3_lit    <= s2_lit;
      s3_litval <= s2_litval;
      s3_idx    <= IW'(s2_diff);
      // stage 3: De-LUT read
      sym_valid <= s3_v;
      if (s3_v) begin
        sym     <= s3_lit ? s3_litval : dlut[s3_idx];
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt + 1'b1 == nsym_r) done <= 1'b1;
      end
    end
  end

  assign busy = run;

  // A valid stream always matches some codeword length.
  a_code_found: assert property (@(posedge clk) disable iff (!rst_n)
                                 (s1_fire && !lit_pending) |-> m_cl != '0);

  // Table read-back
  always_comb begin
    tbl_rd_fcw = '0;
    tbl_rd_ofs = '0;
    for (int l = 1; l <= CWL; l++)
      if (tbl_rd_len == LEN_W'(l)) begin
        tbl_rd_fcw = {fcw_v[l], fcw[l]};
        tbl_rd_ofs = ofs[l];
      end
  end

endmodule
