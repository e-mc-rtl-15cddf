// huff_compressor: Huffman compressor for one 128-byte block (E2MC16).
//
// Two pipeline stages, as in the published E2MC compressor: stage 1 reads the
// codeword (CW) and code length (CL) of the next 16-bit symbol from the c-LUT
// (clut), stage 2 places it with the codeword packer (cw_packer). A symbol
// that is not one of the most frequent values is written as the escape
// prefix followed by the raw 16 bits. The block is cut into PDW equal ways of
// symbols; the first codeword of every way after the first is byte-aligned
// and its byte address is stored as a PTR_W-bit pointer (P2..Pn) at the head
// of the compressed block. The block is kept compressed when its size,
// pointers included, is at most LIMIT_BYTES (96B), so that at least one 32B
// burst is saved; otherwise the raw block is stored.
//
// This design's choices: the escape prefix and the raw symbol take two packer
// cycles (each piece is at most MAX_CL bits, so the 2*MAX_CL buffer is
// enough); byte padding before a way takes one cycle; the pointer header is
// padded to a whole byte and way 1 starts right after it.
//
// Interface / timing:
//   cfg          : CFG_CLUT entries and the CFG_ESC escape codeword.
//   start, blk   : accepted in IDLE (busy low). Symbol k is blk[1023-16k -: 16].
//   done         : one-cycle pulse with cblk, meta and cbytes valid (they hold
//                  until the next start). Latency, from the start cycle to
//                  done, = NSYM + escapes + (PDW-1) pads + 6 cycles, i.e. 73
//                  cycles for a block of MFVs (one symbol per cycle).
//   meta         : 2'b11 raw, else number of 32B bursts minus one.
//   cbytes       : compressed size in bytes (header included), also when raw.
module huff_compressor
  import e2mc_pkg::*;
#(
  parameter int unsigned NWAY        = PDW,
  parameter int unsigned LIMIT       = LIMIT_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_wr_t           cfg,
  input  logic              start,
  input  block_t            blk,
  output logic              busy,
  output logic              done,
  output block_t            cblk,
  output logic [1:0]        meta,
  output logic [POS_W-4:0]  cbytes
);
  localparam int unsigned WAY_SYMS = NSYM / NWAY;
  localparam int unsigned HDR_RAW  = (NWAY - 1) * PTR_W;
  localparam int unsigned HDR_BITS = (HDR_RAW + 7) / 8 * 8;
  localparam int unsigned K_W      = $clog2(NSYM + 1);
  localparam int unsigned HDR_W    = (HDR_RAW > 0) ? HDR_RAW : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_FIN} state_e;
  state_e state;

  block_t           blk_r;
  logic [K_W-1:0]   k;         // next symbol to look up
  logic [K_W-1:0]   s2_idx;    // symbol in stage 2
  logic             s2_valid;
  logic [SL-1:0]    s2_sym;
  logic             phase_lit; // escape prefix sent, raw symbol next
  logic             pad_done;  // way padding already sent for s2_idx
  logic [MAX_CL-1:0] esc_cw;
  logic [CL_W-1:0]   esc_cl;
  logic [HDR_W-1:0]  hdr;

  // Escape codeword register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      esc_cw <= '0;
      esc_cl <= '0;
    end else if (cfg.we && cfg.sel == CFG_ESC) begin
      esc_cw <= cfg.data[CL_W +: MAX_CL];
      esc_cl <= cfg.data[CL_W-1:0];
    end
  end

  // Stage 1: c-LUT lookup.
  logic              stall, rd_en;
  logic              lut_hit;
  logic [MAX_CL-1:0] lut_cw;
  logic [CL_W-1:0]   lut_cl;
  logic [SL-1:0]     sym_k;

  assign sym_k = blk_r[BLOCK_BITS - 1 - SL * k[K_W-2:0] -: SL];
  assign rd_en = (state == S_RUN) && !stall;

  clut #(.WAYS(CLUT_WAYS), .SETS(CLUT_SETS), .CWL(MAX_CL)) u_clut (
    .clk, .rst_n, .cfg,
    .rd_en, .sym(sym_k),
    .hit(lut_hit), .cw(lut_cw), .cl(lut_cl)
  );

  // Stage 2: choose what the packer appends this cycle.
  logic              pk_valid, pk_flush, pk_init;
  logic [MAX_CL-1:0] pk_cw;
  logic [CL_W-1:0]   pk_cl;
  block_t            pk_fbuf;
  logic [POS_W-1:0]  pk_pos;
  logic              way_start, do_pad;
  logic [2:0]        pad_len;

  assign way_start = (s2_idx != '0) && (s2_idx % K_W'(WAY_SYMS) == '0);
  assign pad_len   = 3'(-pk_pos[2:0]);
  assign do_pad    = s2_valid && way_start && !pad_done;

  always_comb begin
    pk_valid = 1'b0;
    pk_cw    = '0;
    pk_cl    = '0;
    stall    = 1'b0;
    if (s2_valid) begin
      pk_valid = 1'b1;
      if (do_pad) begin
        pk_cl = CL_W'(pad_len);
        stall = 1'b1;
      end else if (lut_hit) begin
        pk_cw = lut_cw;
        pk_cl = lut_cl;
      end else if (!phase_lit) begin
        pk_cw = esc_cw;
        pk_cl = esc_cl;
        stall = 1'b1;
      end else begin
        pk_cw = MAX_CL'(s2_sym);
        pk_cl = CL_W'(SL);
      end
    end
  end

  assign pk_init  = start && (state == S_IDLE);
  assign pk_flush = (state == S_FLUSH);

  cw_packer #(.CWL(MAX_CL), .OUT_BITS(BLOCK_BITS), .PW(POS_W)) u_pack (
    .clk, .rst_n,
    .init(pk_init), .init_pos(POS_W'(HDR_BITS)),
    .in_valid(pk_valid), .cw(pk_cw), .cl(pk_cl),
    .flush(pk_flush),
    .fbuf(pk_fbuf), .pos(pk_pos)
  );

  // Result of the finished block.
  logic [POS_W-4:0] fin_bytes;
  logic             fin_fits;
  assign fin_bytes = (POS_W-3)'((pk_pos + POS_W'(7)) >> 3);
  assign fin_fits  = fin_bytes <= (POS_W-3)'(LIMIT);

  function automatic block_t with_header(input block_t f, input logic [HDR_W-1:0] h);
    block_t b;
    b = f;
    if (HDR_RAW > 0) b[BLOCK_BITS-1 -: HDR_W] = h;
    return b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      blk_r     <= '0;
      k         <= '0;
      s2_idx    <= '0;
      s2_valid  <= 1'b0;
      s2_sym    <= '0;
      phase_lit <= 1'b0;
      pad_done  <= 1'b0;
      hdr       <= '0;
      done      <= 1'b0;
      cblk      <= '0;
      meta      <= META_RAW;
      cbytes    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          blk_r     <= blk;
          k         <= '0;
          s2_valid  <= 1'b0;
          phase_lit <= 1'b0;
          pad_done  <= 1'b0;
          hdr       <= '0;
          state     <= S_RUN;
        end
        S_RUN: begin
          // stage 2 bookkeeping
          if (s2_valid) begin
            if (do_pad) begin
              pad_done <= 1'b1;
              for (int w = 1; w < NWAY; w++)
                if (s2_idx == K_W'(w * WAY_SYMS))
                  hdr[HDR_W - 1 - (w - 1) * PTR_W -: PTR_W] <=
                      PTR_W'((pk_pos + POS_W'(pad_len)) >> 3);
            end else if (lut_hit) begin
              pad_done <= 1'b0;
            end else if (!phase_lit) begin
              phase_lit <= 1'b1;
            end else begin
              phase_lit <= 1'b0;
              pad_done  <= 1'b0;
            end
          end
          // stage 1 advance
          if (rd_en) begin
            s2_valid <= (k < K_W'(NSYM));
            s2_sym   <= sym_k;
            s2_idx   <= k;
            if (k < K_W'(NSYM)) k <= k + 1'b1;
          end
          if (!s2_valid && k == K_W'(NSYM)) state <= S_FLUSH;
        end
        S_FLUSH: state <= S_FIN;
        S_FIN: begin
          done   <= 1'b1;
          cbytes <= fin_bytes;
          if (fin_fits) begin
            meta <= 2'(((fin_bytes - 1'b1) >> $clog2(MAG_BYTES)));
            cblk <= with_header(pk_fbuf, hdr);
          end else begin
            meta <= META_RAW;
            cblk <= blk_r;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
