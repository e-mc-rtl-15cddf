// tb_pdw_sweep: compression and decompression with 1, 2, 4 and 8 parallel
// decoding ways (PDWs), the way counts the scheme is evaluated with.
//
// One huff_compressor / huff_decompressor pair per way count runs on the same
// blocks at the same time. For each block and way count the test checks:
//  - the compressed block, metadata and size against the reference encoder;
//  - that a block kept compressed decompresses to the original;
//  - for blocks of MFVs only, the compressor latency (64 symbols + one pad
//    cycle per extra way + 6) and the decompressor latency (64/ways + 6), both
//    counted from the start cycle, so that the decode time falls with the
//    number of ways.
module tb_pdw_sweep;
  import e2mc_pkg::*;
  import e2mc_tb_pkg::*;

  localparam int NCFG = 4;
  localparam int NW [NCFG] = '{1, 2, 4, 8};

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic c_start;
  logic d_start [NCFG];
  block_t blk_in;
  block_t d_in [NCFG];
  logic   c_done [NCFG], d_done [NCFG], c_busy [NCFG], d_busy [NCFG];
  block_t c_out [NCFG], d_out [NCFG];
  logic [1:0] c_meta [NCFG];
  logic [POS_W-4:0] c_bytes [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    huff_compressor #(.NWAY(NW[i]), .LIMIT(LIMIT_BYTES)) u_c (
      .clk, .rst_n, .cfg, .start(c_start), .blk(blk_in), .busy(c_busy[i]), .done(c_done[i]),
      .cblk(c_out[i]), .meta(c_meta[i]), .cbytes(c_bytes[i])
    );
    huff_decompressor #(.NWAY(NW[i])) u_d (
      .clk, .rst_n, .cfg, .start(d_start[i]), .cblk(d_in[i]), .busy(d_busy[i]), .done(d_done[i]),
      .blk(d_out[i]), .tbl_rd_len(5'd0), .tbl_rd_fcw(), .tbl_rd_ofs()
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_wr_t q[$];
    int c_lat [NCFG], d_lat [NCFG];
    int n_comp [NCFG];
    cfg = '0; c_start = 0; blk_in = '0;
    foreach (d_start[i]) d_start[i] = 1'b0;
    foreach (d_in[i]) d_in[i] = '0;
    foreach (n_comp[i]) n_comp[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    build_code(1024, 5);
    cfg_list(q);
    foreach (q[i]) begin
      @(negedge clk);
      cfg = q[i];
    end
    @(negedge clk);
    cfg = '0;
    for (int t = 0; t < 120; t++) begin
      block_t ob;
      int pct;
      pct = (t % 3 == 0) ? 100 : (t % 3 == 1) ? 93 : 70;
      ob = gen_block(pct);
      // ---- compress with every way count ----
      @(negedge clk);
      blk_in = ob;
      c_start = 1'b1;
      foreach (c_lat[i]) c_lat[i] = -1;
      for (int cyc = 1; cyc < 300; cyc++) begin
        @(negedge clk);
        c_start = 1'b0;
        for (int i = 0; i < NCFG; i++) if (c_done[i] && c_lat[i] < 0) c_lat[i] = cyc + 1;
        if (c_lat[0] > 0 && c_lat[1] > 0 && c_lat[2] > 0 && c_lat[3] > 0) break;
      end
      for (int i = 0; i < NCFG; i++) begin
        block_t eb;
        int eby, bits;
        logic [1:0] em;
        bits = ref_compress(ob, NW[i], eb, eby, em);
        check(c_lat[i] > 0, $sformatf("%0d ways: compressor never done", NW[i]));
        check(c_meta[i] == em, $sformatf("%0d ways: meta %0d exp %0d", NW[i], c_meta[i], em));
        check(c_out[i] == eb, $sformatf("%0d ways: compressed block differs", NW[i]));
        if (em != META_RAW) check(int'(c_bytes[i]) == eby,
                                  $sformatf("%0d ways: %0d bytes exp %0d", NW[i], c_bytes[i], eby));
        if (pct == 100) check(c_lat[i] == NSYM + NW[i] - 1 + 6,
                              $sformatf("%0d ways: compress latency %0d", NW[i], c_lat[i]));
        d_in[i] = c_out[i];
      end
      // ---- decompress those kept compressed ----
      for (int i = 0; i < NCFG; i++) d_start[i] = (c_meta[i] != META_RAW);
      foreach (d_lat[i]) d_lat[i] = (c_meta[i] == META_RAW) ? 0 : -1;
      for (int cyc = 1; cyc < 300; cyc++) begin
        @(negedge clk);
        foreach (d_start[i]) d_start[i] = 1'b0;
        for (int i = 0; i < NCFG; i++) if (d_done[i] && d_lat[i] < 0) d_lat[i] = cyc + 1;
        if (d_lat[0] >= 0 && d_lat[1] >= 0 && d_lat[2] >= 0 && d_lat[3] >= 0) break;
      end
      for (int i = 0; i < NCFG; i++) begin
        if (c_meta[i] == META_RAW) continue;
        n_comp[i]++;
        check(d_lat[i] > 0, $sformatf("%0d ways: decompressor never done", NW[i]));
        check(d_out[i] == ob, $sformatf("%0d ways: block %0d decoded wrong", NW[i], t));
        if (pct == 100) check(d_lat[i] == NSYM / NW[i] + 6,
                              $sformatf("%0d ways: decompress latency %0d", NW[i], d_lat[i]));
      end
    end
    for (int i = 0; i < NCFG; i++) begin
      $display("%0d ways: %0d blocks compressed and decoded", NW[i], n_comp[i]);
      check(n_comp[i] > 0, $sformatf("%0d ways: nothing compressed", NW[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
