// tb_huff_decompressor: self-checking test of 4-way parallel decompression.
//
// Loads a 1K-MFV canonical code, builds compressed blocks with the reference
// encoder in e2mc_tb_pkg (blocks that would be stored raw are skipped),
// decompresses them and compares all 64 symbols with the original block.
// Checks the latency of a block of MFVs: NSYM/PDW symbols per way at one per
// cycle plus the pipeline, 22 cycles counted from the start cycle. Also reads
// back the FCW and offset tables.
module tb_huff_decompressor;
  import e2mc_pkg::*;
  import e2mc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic start, busy, done;
  block_t cblk, blk;
  logic [4:0] tbl_rd_len = '0;
  logic [MAX_CL:0] tbl_rd_fcw;
  logic [MAX_CL-1:0] tbl_rd_ofs;
  int checks = 0, failures = 0, n_esc_blocks = 0;

  always #5 clk = ~clk;

  huff_decompressor dut (.clk, .rst_n, .cfg, .start, .cblk, .busy, .done, .blk,
                         .tbl_rd_len, .tbl_rd_fcw, .tbl_rd_ofs);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_wr_t q[$];
    cfg = '0; start = 0; cblk = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    build_code(1024, 11);
    cfg_list(q);
    foreach (q[i]) begin
      cfg <= q[i];
      @(posedge clk);
    end
    cfg <= '0;
    @(posedge clk);
    // FCW / offset table read-back
    for (int l = 1; l <= MAX_CL; l++) begin
      logic [MAX_CL:0] ef;
      logic [MAX_CL-1:0] eo;
      tbl_expect(l, ef, eo);
      tbl_rd_len = 5'(l);
      #1;
      check(tbl_rd_fcw == ef && tbl_rd_ofs == eo, $sformatf("table read-back at length %0d", l));
    end
    for (int t = 0; t < 150; t++) begin
      block_t ob, eb;
      int eby, bits, lat, pct;
      logic [1:0] em;
      pct = (t % 3 == 0) ? 100 : (t % 3 == 1) ? 95 : 85;
      ob = gen_block(pct);
      bits = ref_compress(ob, PDW, eb, eby, em);
      if (em == META_RAW) continue;
      if (pct != 100) n_esc_blocks++;
      cblk  <= eb;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 1;
      while (!done) begin
        @(posedge clk);
        lat++;
      end
      for (int k = 0; k < NSYM; k++)
        check(sym_of(blk, k) == sym_of(ob, k),
              $sformatf("block %0d symbol %0d got %h exp %h", t, k, sym_of(blk, k), sym_of(ob, k)));
      if (pct == 100) check(lat == NSYM / PDW + 6, $sformatf("latency %0d", lat));
      @(posedge clk);
    end
    check(n_esc_blocks > 0, "no compressed block with escaped symbols");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
