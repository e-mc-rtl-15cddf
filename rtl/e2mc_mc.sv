// e2mc_mc: entropy-coding (E2MC) compression path of one GPU memory controller.
//
// Sits between the on-chip network / L2 side and DRAM and moves 128-byte
// blocks. Writes pass through the Huffman compressor; the metadata cache
// (MDC) records how many 32-byte bursts the stored block occupies (or that it
// is stored raw) and only that many bursts are written. Reads first ask the
// MDC for the burst count, fetch only those bursts, and decompress with
// PDW parallel decoding ways; blocks stored raw bypass the decompressor.
// Compression is transparent to the requester. This structure (compressor,
// decompressor and MDC inside the memory controller, read bypass, burst
// count from the MDC) follows the published E2MC system.
//
// Online sampling: in MODE_SAMPLE no block is compressed; writes are stored
// raw and the data of every request (write data, or read data after any
// decompression) is offered to the value frequency table (VFT), which
// software reads out through vft_rd_* to build the code and then loads the
// tables through cfg and switches to MODE_COMPRESS. So that every request
// is monitored, in MODE_SAMPLE a new request is taken only once the VFT has
// finished counting the previous block (it counts one symbol per cycle).
//
// This design's choices: one request at a time; simple valid/ready
// handshakes on every port; the DRAM port carries a whole block plus the
// number of 32-byte bursts to transfer (1..4), and the metadata port carries
// 32-byte metadata lines; ev_* are one-cycle event pulses for counting.
//
// Interface / timing:
//   req_valid/req_ready, req_write, req_addr (byte address), req_wdata
//   rsp_valid (pulse), rsp_write, rsp_rdata : completion; read data valid
//     with rsp_valid. A write takes about 73 (compression) + MDC + DRAM
//     cycles; a read of a compressed block MDC + DRAM + 22 cycles.
//   dram_req_*: block address, burst count, data (first bursts*32 bytes
//     significant); dram_rsp_valid/rdata for reads.
//   meta_req_*/meta_rsp_*: MDC line fills and write-backs.
//   tbl_rd_len -> tbl_rd_fcw ({valid, FCW}), tbl_rd_ofs: combinational
//     read-back of the decoder's FCW and offset tables, which the published
//     design makes readable as well as writable.
module e2mc_mc
  import e2mc_pkg::*;
#(
  parameter int unsigned NWAY = PDW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  cfg_wr_t             cfg,
  // request side (NoC / L2)
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_write,
  input  logic [ADDR_W-1:0]   req_addr,
  input  block_t              req_wdata,
  output logic                rsp_valid,
  output logic                rsp_write,
  output block_t              rsp_rdata,
  // DRAM data blocks
  output logic                dram_req_valid,
  input  logic                dram_req_ready,
  output logic                dram_req_write,
  output logic [BLK_W-1:0]    dram_req_blk,
  output logic [2:0]          dram_req_bursts,
  output block_t              dram_req_wdata,
  input  logic                dram_rsp_valid,
  input  block_t              dram_rsp_rdata,
  // DRAM metadata region
  output logic                meta_req_valid,
  input  logic                meta_req_ready,
  output logic                meta_req_write,
  output logic [BLK_W-8:0]    meta_req_line,
  output logic [255:0]        meta_req_wdata,
  input  logic                meta_rsp_valid,
  input  logic [255:0]        meta_rsp_rdata,
  // value frequency table read-out
  input  logic                vft_clear,
  input  logic [9:0]          vft_rd_addr,
  output logic                vft_rd_valid,
  output logic [SL-1:0]       vft_rd_value,
  output logic [31:0]         vft_rd_count,
  // FCW / offset table read-back
  input  logic [4:0]          tbl_rd_len,
  output logic [MAX_CL:0]     tbl_rd_fcw,
  output logic [MAX_CL-1:0]   tbl_rd_ofs,
  // events
  output logic                ev_compressed,
  output logic                ev_stored_raw,
  output logic                ev_decompressed,
  output logic                ev_bypass,
  output logic                ev_sampled,
  output logic                ev_mdc_miss,
  output logic                ev_mdc_wb
);
  typedef enum logic [3:0] {
    S_IDLE, S_COMP, S_MDC_REQ, S_MDC_WAIT, S_DRAM_WR, S_DRAM_RD, S_DRAM_RD_WAIT,
    S_DECOMP, S_RESP
  } state_e;
  state_e state;

  logic             r_write;
  logic [BLK_W-1:0] r_blk;
  block_t           r_data;    // write data, then read data
  block_t           r_store;   // what goes to DRAM
  logic [1:0]       r_meta;

  // ---------------- compressor ----------------
  logic       c_start, c_busy, c_done;
  block_t     c_blk;
  logic [1:0] c_meta;
  logic [POS_W-4:0] c_bytes;

  logic accept;
  assign c_start = accept && req_write && (mode == MODE_COMPRESS);

  huff_compressor #(.NWAY(NWAY), .LIMIT(LIMIT_BYTES)) u_comp (
    .clk, .rst_n, .cfg, .start(c_start), .blk(req_wdata),
    .busy(c_busy), .done(c_done), .cblk(c_blk), .meta(c_meta), .cbytes(c_bytes)
  );

  // ---------------- decompressor ----------------
  logic   d_start, d_busy, d_done;
  block_t d_blk;

  assign d_start = (state == S_DRAM_RD_WAIT) && dram_rsp_valid && (r_meta != META_RAW);

  huff_decompressor #(.NWAY(NWAY)) u_decomp (
    .clk, .rst_n, .cfg, .start(d_start), .cblk(dram_rsp_rdata),
    .busy(d_busy), .done(d_done), .blk(d_blk),
    .tbl_rd_len, .tbl_rd_fcw, .tbl_rd_ofs
  );

  // ---------------- metadata cache ----------------
  logic       m_req_valid, m_req_ready, m_rsp_valid;
  logic [1:0] m_rsp_meta;
  logic       m_hit;

  assign m_req_valid = (state == S_MDC_REQ);

  mdc #(.SIZE_BYTES(8192), .WAYS(4), .LINE_BYTES(32), .BLKW(BLK_W)) u_mdc (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_write(r_write),
    .req_blk(r_blk), .req_meta(r_meta),
    .rsp_valid(m_rsp_valid), .rsp_meta(m_rsp_meta),
    .mem_req_valid(meta_req_valid), .mem_req_ready(meta_req_ready),
    .mem_req_write(meta_req_write), .mem_req_line(meta_req_line),
    .mem_req_wdata(meta_req_wdata),
    .mem_rsp_valid(meta_rsp_valid), .mem_rsp_rdata(meta_rsp_rdata),
    .stat_hit(m_hit), .stat_miss(ev_mdc_miss), .stat_wb(ev_mdc_wb)
  );

  // ---------------- value frequency table ----------------
  logic   v_valid, v_busy;
  block_t v_blk;

  always_comb begin
    v_valid = 1'b0;
    v_blk   = req_wdata;
    if (mode == MODE_SAMPLE) begin
      if (accept && req_write) begin
        v_valid = 1'b1;
        v_blk   = req_wdata;
      end else if (state == S_DRAM_RD_WAIT && dram_rsp_valid && r_meta == META_RAW) begin
        v_valid = 1'b1;
        v_blk   = dram_rsp_rdata;
      end else if (state == S_DECOMP && d_done) begin
        v_valid = 1'b1;
        v_blk   = d_blk;
      end
    end
  end

  vft #(.WAYS(8), .SETS(128), .CNT_W(32)) u_vft (
    .clk, .rst_n, .clear(vft_clear),
    .sample_valid(v_valid), .sample_blk(v_blk), .sample_busy(v_busy),
    .rd_addr(vft_rd_addr), .rd_valid(vft_rd_valid), .rd_value(vft_rd_value),
    .rd_count(vft_rd_count)
  );

  // ---------------- request sequencing ----------------
  assign req_ready       = (state == S_IDLE) && !(mode == MODE_SAMPLE && v_busy);
  assign accept          = req_valid && req_ready;
  assign dram_req_valid  = (state == S_DRAM_WR) || (state == S_DRAM_RD);
  assign dram_req_write  = (state == S_DRAM_WR);
  assign dram_req_blk    = r_blk;
  assign dram_req_bursts = meta_bursts(r_meta);
  assign dram_req_wdata  = r_store;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      r_write         <= 1'b0;
      r_blk           <= '0;
      r_data          <= '0;
      r_store         <= '0;
      r_meta          <= META_RAW;
      rsp_valid       <= 1'b0;
      rsp_write       <= 1'b0;
      rsp_rdata       <= '0;
      ev_compressed   <= 1'b0;
      ev_stored_raw   <= 1'b0;
      ev_decompressed <= 1'b0;
      ev_bypass       <= 1'b0;
      ev_sampled      <= 1'b0;
    end else begin
      rsp_valid       <= 1'b0;
      ev_compressed   <= 1'b0;
      ev_stored_raw   <= 1'b0;
      ev_decompressed <= 1'b0;
      ev_bypass       <= 1'b0;
      ev_sampled      <= v_valid && !v_busy;
      unique case (state)
        S_IDLE: if (accept) begin
          r_write <= req_write;
          r_blk   <= req_addr[ADDR_W-1 -: BLK_W];
          r_data  <= req_wdata;
          if (req_write) begin
            if (mode == MODE_COMPRESS) begin
              state <= S_COMP;
            end else begin
              r_meta        <= META_RAW;
              r_store       <= req_wdata;
              ev_stored_raw <= 1'b1;
              state         <= S_MDC_REQ;
            end
          end else begin
            state <= S_MDC_REQ;
          end
        end
        S_COMP: if (c_done) begin
          r_meta  <= c_meta;
          r_store <= c_blk;
          if (c_meta == META_RAW) ev_stored_raw <= 1'b1;
          else ev_compressed <= 1'b1;
          state <= S_MDC_REQ;
        end
        S_MDC_REQ: if (m_req_ready) state <= S_MDC_WAIT;
        S_MDC_WAIT: if (m_rsp_valid) begin
          if (r_write) begin
            state <= S_DRAM_WR;
          end else begin
            r_meta <= m_rsp_meta;
            state  <= S_DRAM_RD;
          end
        end
        S_DRAM_WR: if (dram_req_ready) begin
          rsp_valid <= 1'b1;
          rsp_write <= 1'b1;
          state     <= S_IDLE;
        end
        S_DRAM_RD: if (dram_req_ready) state <= S_DRAM_RD_WAIT;
        S_DRAM_RD_WAIT: if (dram_rsp_valid) begin
          if (r_meta == META_RAW) begin
            r_data    <= dram_rsp_rdata;
            ev_bypass <= 1'b1;
            state     <= S_RESP;
          end else begin
            state <= S_DECOMP;
          end
        end
        S_DECOMP: if (d_done) begin
          r_data          <= d_blk;
          ev_decompressed <= 1'b1;
          state           <= S_RESP;
        end
        S_RESP: begin
          rsp_valid <= 1'b1;
          rsp_write <= 1'b0;
          rsp_rdata <= r_data;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_dram_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                (dram_req_valid && !dram_req_ready) |=> dram_req_valid);

endmodule
