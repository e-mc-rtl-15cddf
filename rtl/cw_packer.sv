// cw_packer: places variable-length codewords next to each other.
//
// Works as the codeword placement stage of the E2MC compressor: an
// intermediate buffer of BL = 2*MAX_CL bits and a write position WP. A
// codeword of length CL, zero-extended to BL bits, is shifted left by
// BL - WP - CL, ORed into the buffer, and WP grows by CL. When WP reaches
// MAX_CL the top MAX_CL bits move to the final buffer, the intermediate buffer
// shifts left by MAX_CL and WP drops by MAX_CL. This scheme is the published
// one; doing the placement and the move in the same cycle, the flush command
// and the start offset are this design's choices.
//
// Interface / timing (all registered, one codeword per cycle):
//   init, init_pos : clear everything; the first bit goes to stream position
//                    init_pos (leaves room for a block header).
//   in_valid,cw,cl : append cw[cl-1:0] (cw right-aligned, cl = 0..MAX_CL).
//                    A codeword of zeros appends padding.
//   flush          : write the bits still in the intermediate buffer to the
//                    final buffer (do not assert together with in_valid).
//   fbuf           : final buffer, stream bit i at fbuf[OUT_BITS-1-i]; bits
//                    past OUT_BITS are dropped.
//   pos            : number of stream bits so far, init_pos included.
module cw_packer
  import e2mc_pkg::*;
#(
  parameter int unsigned CWL      = MAX_CL,
  parameter int unsigned OUT_BITS = BLOCK_BITS,
  parameter int unsigned PW       = POS_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [PW-1:0]            init_pos,
  input  logic                     in_valid,
  input  logic [CWL-1:0]           cw,
  input  logic [$clog2(CWL+1)-1:0] cl,
  input  logic                     flush,
  output logic [OUT_BITS-1:0]      fbuf,
  output logic [PW-1:0]            pos
);
  localparam int unsigned BL    = 2 * CWL;
  localparam int unsigned LEN_W = $clog2(CWL + 1);
  localparam int unsigned WP_W  = $clog2(BL + 1);

  logic [BL-1:0]   ibuf;
  logic [WP_W-1:0] wp;
  logic [PW-1:0]   out_pos;

  // Placement: shift the extended codeword to its position and OR it in.
  logic [BL-1:0]   ext_cw, placed;
  logic [WP_W-1:0] wp_sum;
  always_comb begin
    ext_cw = BL'(cw) & ((BL'(1) << cl) - BL'(1));
    placed = ibuf | (ext_cw << (WP_W'(BL) - wp - WP_W'(cl)));
    wp_sum = wp + WP_W'(cl);
  end

  // Writing a MAX_CL-bit chunk to the final buffer at out_pos.
  function automatic logic [OUT_BITS-1:0] put_chunk(input logic [OUT_BITS-1:0] f,
                                                    input logic [CWL-1:0] chunk,
                                                    input logic [PW-1:0] at);
    logic [OUT_BITS+CWL-1:0] wide;
    wide = {chunk, OUT_BITS'(0)} >> at;
    if (at < PW'(OUT_BITS)) return f | wide[OUT_BITS+CWL-1:CWL];
    else return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibuf    <= '0;
      wp      <= '0;
      out_pos <= '0;
      fbuf    <= '0;
    end else if (init) begin
      ibuf    <= '0;
      wp      <= '0;
      out_pos <= init_pos;
      fbuf    <= '0;
    end else if (in_valid) begin
      if (wp_sum >= WP_W'(CWL)) begin
        fbuf    <= put_chunk(fbuf, placed[BL-1 -: CWL], out_pos);
        ibuf    <= placed << CWL;
        wp      <= wp_sum - WP_W'(CWL);
        out_pos <= out_pos + PW'(CWL);
      end else begin
        ibuf <= placed;
        wp   <= wp_sum;
      end
    end else if (flush) begin
      fbuf    <= put_chunk(fbuf, ibuf[BL-1 -: CWL], out_pos);
      ibuf    <= '0;
      wp      <= '0;
      out_pos <= out_pos + PW'(wp);
    end
  end

  assign pos = out_pos + PW'(wp);

  // WP stays below MAX_CL between codewords, so BL bits always suffice.
  a_wp_bound: assert property (@(posedge clk) disable iff (!rst_n) wp < WP_W'(CWL));
  a_cl_bound: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> cl <= LEN_W'(CWL));

endmodule
