// tb_e2mc_mc: end-to-end test of the compression path, at default parameters.
//
// Models DRAM (block store that keeps and returns only the transferred 32B
// bursts) and the metadata region (32B lines, initially all 2'b11), and keeps
// a reference copy of memory contents. The test runs the whole E2MC flow:
//  1. sampling mode: writes and reads of blocks built from a skewed set of
//     values; blocks are stored raw and every request is sampled by the value
//     frequency table;
//  2. the VFT is read out, the values sorted by count become the MFVs of a
//     canonical code (e2mc_tb_pkg), and the tables are loaded;
//  3. compression mode: random writes and reads over a range of blocks large
//     enough to overflow the metadata cache.
// Every read is compared with the reference memory, and every write's burst
// count with the reference encoder. Each mechanism must occur at least once:
// compressed store, raw store, decompression, read bypass, sampling, MDC
// miss, MDC write-back, and a transfer of fewer than 4 bursts. The decoder's
// FCW and offset tables are read back after loading.
module tb_e2mc_mc;
  import e2mc_pkg::*;
  import e2mc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode;
  cfg_wr_t cfg;
  logic req_valid, req_ready, req_write, rsp_valid, rsp_write;
  logic [ADDR_W-1:0] req_addr;
  block_t req_wdata, rsp_rdata;
  logic dram_req_valid, dram_req_ready, dram_req_write, dram_rsp_valid;
  logic [BLK_W-1:0] dram_req_blk;
  logic [2:0] dram_req_bursts;
  block_t dram_req_wdata, dram_rsp_rdata;
  logic meta_req_valid, meta_req_ready, meta_req_write, meta_rsp_valid;
  logic [BLK_W-8:0] meta_req_line;
  logic [255:0] meta_req_wdata, meta_rsp_rdata;
  logic vft_clear, vft_rd_valid;
  logic [9:0] vft_rd_addr;
  logic [SL-1:0] vft_rd_value;
  logic [31:0] vft_rd_count;
  logic ev_compressed, ev_stored_raw, ev_decompressed, ev_bypass, ev_sampled, ev_mdc_miss, ev_mdc_wb;

  logic [4:0] tbl_rd_len = '0;
  logic [MAX_CL:0] tbl_rd_fcw;
  logic [MAX_CL-1:0] tbl_rd_ofs;
  int checks = 0, failures = 0;
  int n_comp = 0, n_raw = 0, n_dec = 0, n_byp = 0, n_smp = 0, n_miss = 0, n_wb = 0;
  int bursts_moved = 0, bursts_raw = 0, n_short = 0;
  int exp_bursts = -1;

  block_t       dram  [logic [BLK_W-1:0]];
  logic [255:0] mline [logic [BLK_W-8:0]];
  block_t       gold  [logic [BLK_W-1:0]];

  always #5 clk = ~clk;

  e2mc_mc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // contents of a block never written
  function automatic block_t init_block(logic [BLK_W-1:0] b);
    block_t r;
    for (int k = 0; k < NSYM; k++) r[BLOCK_BITS - 1 - SL * k -: SL] = SL'(b * 7 + k);
    return r;
  endfunction

  function automatic block_t keep_bursts(block_t d, int n);
    block_t m;
    m = '0;
    for (int i = 0; i < n * 256; i++) m[BLOCK_BITS - 1 - i] = 1'b1;
    return d & m;
  endfunction

  // DRAM block model
  initial begin
    dram_req_ready = 1'b0; dram_rsp_valid = 1'b0; dram_rsp_rdata = '0;
    forever begin
      @(negedge clk);
      dram_rsp_valid = 1'b0;
      dram_req_ready = ($urandom_range(3) != 0);
      if (dram_req_valid && dram_req_ready) begin
        int n;
        logic [BLK_W-1:0] b;
        n = int'(dram_req_bursts);
        b = dram_req_blk;
        bursts_moved += n;
        bursts_raw += 4;
        if (n < 4) n_short++;
        if (dram_req_write) begin
          if (exp_bursts >= 0) check(n == exp_bursts, $sformatf("write bursts %0d exp %0d", n, exp_bursts));
          dram[b] = keep_bursts(dram_req_wdata, n);
        end else begin
          @(negedge clk);
          dram_req_ready = 1'b0;
          repeat ($urandom_range(0, 6)) @(negedge clk);
          dram_rsp_rdata = keep_bursts(dram.exists(b) ? dram[b] : init_block(b), n);
          dram_rsp_valid = 1'b1;
        end
      end
    end
  end

  // metadata region model
  initial begin
    meta_req_ready = 1'b0; meta_rsp_valid = 1'b0; meta_rsp_rdata = '0;
    forever begin
      @(negedge clk);
      meta_rsp_valid = 1'b0;
      meta_req_ready = ($urandom_range(2) != 0);
      if (meta_req_valid && meta_req_ready) begin
        if (meta_req_write) begin
          mline[meta_req_line] = meta_req_wdata;
        end else begin
          logic [BLK_W-8:0] a;
          a = meta_req_line;
          @(negedge clk);
          meta_req_ready = 1'b0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          meta_rsp_rdata = mline.exists(a) ? mline[a] : '1;
          meta_rsp_valid = 1'b1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_compressed) n_comp++;
    if (ev_stored_raw) n_raw++;
    if (ev_decompressed) n_dec++;
    if (ev_bypass) n_byp++;
    if (ev_sampled) n_smp++;
    if (ev_mdc_miss) n_miss++;
    if (ev_mdc_wb) n_wb++;
  end

  task automatic access(bit wr, logic [BLK_W-1:0] b, block_t d);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_write = wr; req_addr = {b, 7'b0}; req_wdata = d;
    @(negedge clk);
    req_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    check(rsp_write == wr, "response kind");
    if (wr) gold[b] = d;
    else check(rsp_rdata == (gold.exists(b) ? gold[b] : init_block(b)),
               $sformatf("read data of block %h", b));
  endtask

  // workload values: 700 values, skewed use
  logic [SL-1:0] wl_vals [700];
  function automatic block_t wl_block(int pct);
    block_t b;
    for (int k = 0; k < NSYM; k++) begin
      int i;
      i = ($urandom_range(1) == 0) ? $urandom_range(15) : $urandom_range(699);
      b[BLOCK_BITS - 1 - SL * k -: SL] = (int'($urandom_range(99)) < pct) ? wl_vals[i] : SL'($urandom);
    end
    return b;
  endfunction

  initial begin
    cfg_wr_t q[$];
    logic [SL-1:0] vals[$];
    int cnts[$];
    mode = MODE_SAMPLE; cfg = '0; req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    vft_clear = 0; vft_rd_addr = '0;
    for (int i = 0; i < 700; i++) wl_vals[i] = {9'(i * 5 + 17), 7'(i * 3)};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // ---- 1. sampling ----
    for (int t = 0; t < 200; t++) begin
      logic [BLK_W-1:0] b;
      b = BLK_W'($urandom_range(255));
      if ($urandom_range(2) != 0) access(1'b1, b, wl_block(97));
      else access(1'b0, b, '0);
    end
    repeat (70) @(negedge clk);
    check(n_smp == 200, $sformatf("%0d of 200 requests sampled", n_smp));
    // ---- 2. code generation from the VFT ----
    for (int a = 0; a < 1024; a++) begin
      vft_rd_addr = 10'(a);
      #1;
      if (vft_rd_valid && vft_rd_count > 1) begin
        int p;
        p = 0;
        while (p < cnts.size() && cnts[p] >= int'(vft_rd_count)) p++;
        vals.insert(p, vft_rd_value);
        cnts.insert(p, int'(vft_rd_count));
      end
    end
    check(vals.size() > 100, $sformatf("only %0d sampled values", vals.size()));
    build_code_vals(vals);
    cfg_list(q);
    foreach (q[i]) begin
      @(negedge clk);
      cfg = q[i];
    end
    @(negedge clk);
    cfg = '0;
    // FCW / offset table read-back
    for (int l = 1; l <= MAX_CL; l++) begin
      logic [MAX_CL:0] ef;
      logic [MAX_CL-1:0] eo;
      tbl_expect(l, ef, eo);
      tbl_rd_len = 5'(l);
      #1;
      check(tbl_rd_fcw == ef && tbl_rd_ofs == eo, $sformatf("table read-back at length %0d", l));
    end
    mode = MODE_COMPRESS;
    // ---- 3. compression ----
    for (int t = 0; t < 1500; t++) begin
      logic [BLK_W-1:0] b;
      // recent region plus a wide range to overflow the metadata cache
      b = ($urandom_range(1) == 0) ? BLK_W'($urandom_range(255)) : BLK_W'($urandom_range(1 << 16));
      if ($urandom_range(1) == 0) begin
        block_t d, eb;
        int eby, bits;
        logic [1:0] em;
        d = wl_block((t % 5 == 0) ? 30 : 97);
        bits = ref_compress(d, PDW, eb, eby, em);
        exp_bursts = int'(meta_bursts(em));
        access(1'b1, b, d);
        exp_bursts = -1;
      end else begin
        access(1'b0, b, '0);
      end
    end
    $display("compressed=%0d raw=%0d decompressed=%0d bypass=%0d sampled=%0d mdc_miss=%0d mdc_wb=%0d short=%0d",
             n_comp, n_raw, n_dec, n_byp, n_smp, n_miss, n_wb, n_short);
    $display("bursts moved %0d of %0d", bursts_moved, bursts_raw);
    check(n_comp > 0, "no compressed store");
    check(n_raw > 0, "no raw store");
    check(n_dec > 0, "no decompression");
    check(n_byp > 0, "no read bypass");
    check(n_smp > 0, "no sampled block");
    check(n_miss > 0, "no MDC miss");
    check(n_wb > 0, "no MDC write-back");
    check(n_short > 0, "no transfer below 4 bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
