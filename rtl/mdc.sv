// mdc: metadata cache of the E2MC memory controller.
//
// Every 128-byte block has 2 bits of metadata in a reserved DRAM region: the
// number of 32-byte bursts it occupies minus one, or 2'b11 when it is stored
// uncompressed. So that a read does not need two DRAM accesses, the most
// recently used metadata is cached in an 8KB, 4-way set-associative cache
// (size, associativity and encoding follow the published E2MC design).
//
// This design's choices: 32-byte lines (one DRAM burst, the metadata of 128
// consecutive blocks), so 256 lines in 64 sets; true-LRU replacement;
// write-back with write-allocate; one request at a time.
// Block address fields: blk[OFF_W-1:0] entry in the line (7 bits),
// blk[OFF_W +: SET_W] set (6 bits), the remaining upper bits the tag.
//
// Interface / timing:
//   req_valid/req_ready : request handshake (ready only when idle).
//   req_write, req_blk, req_meta : update (write) or lookup (read) of a block.
//   rsp_valid, rsp_meta : one-cycle pulse; for a lookup rsp_meta is the
//                         block's metadata, for an update it is the new value.
//                         A hit answers 2 cycles after the request is taken.
//   mem_req_*           : line write-back (mem_req_write=1) or line fill
//                         (mem_req_write=0) at line address blk >> OFF_W;
//                         held until mem_req_ready.
//   mem_rsp_valid/rdata : fill data; entry e of a line is rdata[2e+1:2e].
//   stat_hit/miss/wb    : one-cycle event pulses for performance counting.
module mdc
  import e2mc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned BLKW       = BLK_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        req_valid,
  output logic                        req_ready,
  input  logic                        req_write,
  input  logic [BLKW-1:0]             req_blk,
  input  logic [1:0]                  req_meta,
  output logic                        rsp_valid,
  output logic [1:0]                  rsp_meta,
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic                        mem_req_write,
  output logic [BLKW-$clog2(LINE_BYTES*4)-1:0] mem_req_line,
  output logic [LINE_BYTES*8-1:0]     mem_req_wdata,
  input  logic                        mem_rsp_valid,
  input  logic [LINE_BYTES*8-1:0]     mem_rsp_rdata,
  output logic                        stat_hit,
  output logic                        stat_miss,
  output logic                        stat_wb
);
  localparam int unsigned LINE_BITS = LINE_BYTES * 8;
  localparam int unsigned PER_LINE  = LINE_BITS / 2;
  localparam int unsigned OFF_W     = $clog2(PER_LINE);
  localparam int unsigned LINES     = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned SETS      = LINES / WAYS;
  localparam int unsigned SET_W     = $clog2(SETS);
  localparam int unsigned WAY_W     = $clog2(WAYS);
  localparam int unsigned TAG_W     = BLKW - OFF_W - SET_W;
  localparam int unsigned LADDR_W   = BLKW - OFF_W;

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WB, S_FILL_REQ, S_FILL_WAIT} state_e;
  state_e state;

  logic [LINE_BITS-1:0] data  [SETS][WAYS];
  logic [TAG_W-1:0]     tags  [SETS][WAYS];
  logic [WAYS-1:0]      valid [SETS];
  logic [WAYS-1:0]      dirty [SETS];
  logic [WAY_W-1:0]     age   [SETS][WAYS];

  logic                 r_write;
  logic [BLKW-1:0]      r_blk;
  logic [1:0]           r_meta;
  logic [WAY_W-1:0]     victim_r;

  logic [OFF_W-1:0]     r_off;
  logic [SET_W-1:0]     r_set;
  logic [TAG_W-1:0]     r_tag;
  assign r_off = r_blk[OFF_W-1:0];
  assign r_set = r_blk[OFF_W +: SET_W];
  assign r_tag = r_blk[BLKW-1 -: TAG_W];

  // Hit detection and victim choice for the latched request.
  logic             hit;
  logic [WAY_W-1:0] hit_way, victim;
  logic             free_found;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[r_set][w] && tags[r_set][w] == r_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    victim     = '0;
    free_found = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (age[r_set][w] == WAY_W'(WAYS - 1)) victim = WAY_W'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[r_set][w]) begin
        victim     = WAY_W'(w);
        free_found = 1'b1;
      end
  end

  logic [LINE_BITS-1:0] hit_line;
  assign hit_line = data[r_set][hit_way];

  assign req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      r_write       <= 1'b0;
      r_blk         <= '0;
      r_meta        <= '0;
      victim_r      <= '0;
      rsp_valid     <= 1'b0;
      rsp_meta      <= '0;
      mem_req_valid <= 1'b0;
      mem_req_write <= 1'b0;
      mem_req_line  <= '0;
      mem_req_wdata <= '0;
      stat_hit      <= 1'b0;
      stat_miss     <= 1'b0;
      stat_wb       <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        for (int w = 0; w < WAYS; w++) age[s][w] <= WAY_W'(w);
      end
    end else begin
      rsp_valid <= 1'b0;
      stat_hit  <= 1'b0;
      stat_miss <= 1'b0;
      stat_wb   <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          r_write <= req_write;
          r_blk   <= req_blk;
          r_meta  <= req_meta;
          state   <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (hit) begin
            stat_hit  <= 1'b1;
            rsp_valid <= 1'b1;
            if (r_write) begin
              dirty[r_set][hit_way] <= 1'b1;
              rsp_meta <= r_meta;
            end else begin
              rsp_meta <= hit_line[2*r_off +: 2];
            end
            for (int w = 0; w < WAYS; w++)
              if (age[r_set][w] < age[r_set][hit_way]) age[r_set][w] <= age[r_set][w] + 1'b1;
            age[r_set][hit_way] <= '0;
            state <= S_IDLE;
          end else begin
            stat_miss <= 1'b1;
            victim_r  <= victim;
            if (!free_found && dirty[r_set][victim]) begin
              mem_req_valid <= 1'b1;
              mem_req_write <= 1'b1;
              mem_req_line  <= LADDR_W'({tags[r_set][victim], r_set});
              mem_req_wdata <= data[r_set][victim];
              stat_wb       <= 1'b1;
              state         <= S_WB;
            end else begin
              state <= S_FILL_REQ;
            end
          end
        end
        S_WB: if (mem_req_ready) begin
          mem_req_valid <= 1'b0;
          dirty[r_set][victim_r] <= 1'b0;
          state <= S_FILL_REQ;
        end
        S_FILL_REQ: begin
          mem_req_valid <= 1'b1;
          mem_req_write <= 1'b0;
          mem_req_line  <= LADDR_W'({r_tag, r_set});
          if (mem_req_valid && mem_req_ready) begin
            mem_req_valid <= 1'b0;
            state         <= S_FILL_WAIT;
          end
        end
        S_FILL_WAIT: if (mem_rsp_valid) begin
          valid[r_set][victim_r] <= 1'b1;
          dirty[r_set][victim_r] <= 1'b0;
          state <= S_LOOKUP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Line data and tags: no reset, guarded by the valid bits.
  always_ff @(posedge clk) begin
    if (state == S_LOOKUP && hit && r_write)
      data[r_set][hit_way][2*r_off +: 2] <= r_meta;
    if (state == S_FILL_WAIT && mem_rsp_valid) begin
      data[r_set][victim_r] <= mem_rsp_rdata;
      tags[r_set][victim_r] <= r_tag;
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (mem_req_valid && !mem_req_ready) |=> mem_req_valid);

endmodule
