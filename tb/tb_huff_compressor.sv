// tb_huff_compressor: self-checking test of the block compressor.
//
// Loads a 1K-MFV canonical code, compresses blocks with 100%, 90%, 60% and
// 0% MFV symbols and compares the compressed block, metadata and size with
// the bit-serial reference in e2mc_tb_pkg. Checks the latency of a block of
// MFVs (one symbol per cycle: NSYM + 3 way pads + 6 = 73 cycles, counted from the start cycle) and that
// both outcomes, kept compressed and stored raw, occur.
module tb_huff_compressor;
  import e2mc_pkg::*;
  import e2mc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic start, busy, done;
  block_t blk, cblk;
  logic [1:0] meta;
  logic [POS_W-4:0] cbytes;
  int checks = 0, failures = 0;
  int n_comp = 0, n_raw = 0;

  always #5 clk = ~clk;

  huff_compressor dut (.clk, .rst_n, .cfg, .start, .blk, .busy, .done, .cblk, .meta, .cbytes);

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
    cfg = '0; start = 0; blk = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    build_code(1024, 5);
    cfg_list(q);
    foreach (q[i]) begin
      cfg <= q[i];
      @(posedge clk);
    end
    cfg <= '0;
    @(posedge clk);
    for (int t = 0; t < 120; t++) begin
      block_t eb;
      int eby, bits, lat;
      logic [1:0] em;
      int pct;
      pct = (t % 4 == 0) ? 100 : (t % 4 == 1) ? 90 : (t % 4 == 2) ? 60 : 0;
      blk = gen_block(pct);
      bits = ref_compress(blk, PDW, eb, eby, em);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 1;
      while (!done) begin
        @(posedge clk);
        lat++;
      end
      check(meta == em, $sformatf("block %0d meta %0d exp %0d", t, meta, em));
      check(int'(cbytes) == eby, $sformatf("block %0d bytes %0d exp %0d", t, cbytes, eby));
      check(cblk == eb, $sformatf("block %0d compressed data differs", t));
      if (pct == 100)
        check(lat == NSYM + (PDW - 1) + 6, $sformatf("latency %0d", lat));
      if (em == META_RAW) n_raw++; else n_comp++;
      @(posedge clk);
    end
    check(n_comp > 0, "no block stayed compressed");
    check(n_raw > 0, "no block stored raw");
    $display("compressed=%0d raw=%0d", n_comp, n_raw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
