// tb_workloads: the E2MC flow on synthetic data sets of the kinds the scheme
// is aimed at, through the top level at default parameters.
//
// For each data set (256 blocks = 32 KB of 32-bit words):
//  1. sampling mode: the first 32 blocks are written (stored raw) and each is
//     counted by the value frequency table (VFT);
//  2. the VFT is read out; the sampled values and counts, and an escape whose
//     frequency is the rest of the sampled symbols, get a length-limited
//     canonical Huffman code (e2mc_tb_pkg::build_code_huffman), which is
//     loaded into the tables;
//  3. compression mode: all 256 blocks are written, then all are read back;
//  4. the same with an offline estimate: a code from the counts over the
//     whole set (the 8 most frequent values of each c-LUT set), which should
//     code a compressible set at least about as well as the sampled one.
//     (On fp_smooth both codes land near the 96-byte limit, and either may
//     come out ahead.)
// Every read is checked against the written data and every write's burst
// count against the reference encoder. The test prints the compression
// ratio of the coded size and of the bursts moved (32-byte access
// granularity) for each set, and requires the burst ratio to exceed 1 where
// the data has a narrow value range.
//
// Finally a code is built from Fibonacci-weighted counts, whose plain Huffman
// code would be about 40 bits deep, to check the length limiting (longest
// code exactly 20 bits, Kraft sum at most 1); blocks that mix its most
// frequent values with 20-bit codes and escapes are then written and read back.
//
// Data sets:
//   fp_smooth : float32 samples of a smooth field (full mantissa)
//   fp_grid   : float32 values on a coarse grid (few mantissa bits used)
//   int_small : 32-bit integers, geometric distribution (counts, labels)
//   mixed     : {int32 label, float32 weight} pairs
module tb_workloads;
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
    repeat (6000000) @(posedge clk);
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
    else check(rsp_rdata == gold[b], $sformatf("read data of block %h", b));
  endtask

  // IEEE single-precision bits of x (normal range only)
  function automatic logic [31:0] f32(real x);
    logic [63:0] d;
    if (x == 0.0) return '0;
    d = $realtobits(x);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic logic [31:0] geo_int(int mean);
    int v;
    v = 0;
    while (int'($urandom_range(mean)) != 0 && v < 100000) v++;
    return 32'(v);
  endfunction

  // word i of data set k
  function automatic logic [31:0] word(int k, int i);
    real x;
    case (k)
      0: begin
        x = 3.0 * $sin(real'(i) * 0.013) + 0.5 * $cos(real'(i) * 0.0021) + 4.0;
        return f32(x);
      end
      1: begin
        x = real'($rtoi((2.0 * $sin(real'(i) * 0.02) + 2.5) * 16.0)) / 16.0 + 1.0;
        return f32(x);
      end
      2: return geo_int(12);
      default: begin
        if (i % 2 == 0) return 32'($urandom_range(15));
        x = real'($urandom_range(63)) / 8.0 + 0.5;
        return f32(x);
      end
    endcase
  endfunction

  localparam int NBLK = 256, NSAMPLE = 32;

  // Offline estimate: counts over the whole data set. Each c-LUT set holds 8
  // values, so the MFVs are the 8 most frequent values of every set (at most
  // 1024 in all); all other symbols share the escape. Returns the longest
  // code length; nvals is the number of MFVs.
  function automatic int offline_code(input block_t blocks [NBLK], output int nvals);
    longint unsigned cnt_all [logic [SL-1:0]];
    logic [SL-1:0]   top_v [CLUT_SETS][$];
    longint unsigned top_c [CLUT_SETS][$];
    logic [SL-1:0]   vals[$];
    longint unsigned cnts[$];
    longint unsigned sum_cnt;
    foreach (blocks[b])
      for (int k = 0; k < NSYM; k++) begin
        logic [SL-1:0] v;
        v = sym_of(blocks[b], k);
        if (cnt_all.exists(v)) cnt_all[v]++;
        else cnt_all[v] = 1;
      end
    foreach (cnt_all[v]) begin
      int s, p;
      s = int'(v[6:0]);
      p = 0;
      while (p < top_c[s].size() && top_c[s][p] >= cnt_all[v]) p++;
      if (p < CLUT_WAYS) begin
        top_v[s].insert(p, v);
        top_c[s].insert(p, cnt_all[v]);
        if (top_c[s].size() > CLUT_WAYS) begin
          void'(top_v[s].pop_back());
          void'(top_c[s].pop_back());
        end
      end
    end
    sum_cnt = 0;
    for (int s = 0; s < CLUT_SETS; s++)
      foreach (top_v[s][i]) begin
        vals.push_back(top_v[s][i]);
        cnts.push_back(top_c[s][i]);
        sum_cnt += top_c[s][i];
      end
    nvals = vals.size();
    return build_code_huffman(vals, cnts, 64'(NBLK) * 64'(NSYM) - sum_cnt);
  endfunction

  // Write every block of a set with the loaded code, then read all back.
  task automatic compress_set(input block_t blocks [NBLK], input logic [BLK_W-1:0] base,
                              output int coded_bytes, output int bursts);
    coded_bytes = 0;
    bursts = 0;
    for (int b = 0; b < NBLK; b++) begin
      block_t eb;
      int eby, bits;
      logic [1:0] em;
      bits = ref_compress(blocks[b], PDW, eb, eby, em);
      exp_bursts = int'(meta_bursts(em));
      coded_bytes += (em == META_RAW) ? BLOCK_BYTES : eby;
      bursts += exp_bursts;
      access(1'b1, base + BLK_W'(b), blocks[b]);
      exp_bursts = -1;
    end
    for (int b = 0; b < NBLK; b++) access(1'b0, base + BLK_W'(b), '0);
  endtask

  task automatic load_code();
    cfg_wr_t q[$];
    cfg_list(q);
    foreach (q[i]) begin
      @(negedge clk);
      cfg = q[i];
    end
    @(negedge clk);
    cfg = '0;
  endtask
  string set_name [4] = '{"fp_smooth", "fp_grid", "int_small", "mixed"};

  initial begin
    mode = MODE_SAMPLE; cfg = '0; req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0;
    vft_clear = 0; vft_rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 4; k++) begin
      block_t blocks [NBLK];
      logic [SL-1:0] vals[$];
      longint unsigned cnts[$];
      longint unsigned sum_cnt, esc;
      int smp0, maxl, coded_bytes, bursts;
      logic [BLK_W-1:0] base;
      base = BLK_W'(k * 4096);
      for (int b = 0; b < NBLK; b++)
        for (int w = 0; w < 32; w++)
          blocks[b][BLOCK_BITS - 1 - 32 * w -: 32] = word(k, b * 32 + w);
      // ---- 1. sampling ----
      @(negedge clk);
      mode = MODE_SAMPLE;
      vft_clear = 1'b1;
      @(negedge clk);
      vft_clear = 1'b0;
      smp0 = n_smp;
      for (int b = 0; b < NSAMPLE; b++) access(1'b1, base + BLK_W'(b), blocks[b]);
      repeat (70) @(negedge clk);
      // ---- 2. code generation ----
      sum_cnt = 0;
      vals.delete();
      cnts.delete();
      for (int a = 0; a < 1024; a++) begin
        vft_rd_addr = 10'(a);
        #1;
        if (vft_rd_valid) begin
          vals.push_back(vft_rd_value);
          cnts.push_back(longint'(vft_rd_count));
          sum_cnt += longint'(vft_rd_count);
        end
      end
      esc = 64'(n_smp - smp0) * 64'(NSYM) - sum_cnt;
      check(n_smp - smp0 == NSAMPLE, $sformatf("%0d of %0d blocks sampled", n_smp - smp0, NSAMPLE));
      maxl = build_code_huffman(vals, cnts, esc);
      check(maxl <= MAX_CL, "code too long");
      load_code();
      mode = MODE_COMPRESS;
      // ---- 3. compression of the whole set ----
      compress_set(blocks, base, coded_bytes, bursts);
      $display("%-9s online : %4d MFVs, longest code %0d bits, coded ratio %0.2f, burst ratio %0.2f",
               set_name[k], vals.size(), maxl,
               real'(NBLK * BLOCK_BYTES) / real'(coded_bytes), real'(NBLK * 4) / real'(bursts));
      check(bursts <= NBLK * 4, "more bursts than uncompressed");
      if (k != 0) check(bursts < NBLK * 4, $sformatf("%s not compressed", set_name[k]));
      // ---- the same set with an offline estimate ----
      begin
        int nv, on_bytes;
        on_bytes = coded_bytes;
        maxl = offline_code(blocks, nv);
        check(maxl <= MAX_CL, "offline code too long");
        load_code();
        compress_set(blocks, base + BLK_W'(NBLK), coded_bytes, bursts);
        $display("%-9s offline: %4d MFVs, longest code %0d bits, coded ratio %0.2f, burst ratio %0.2f",
                 set_name[k], nv, maxl,
                 real'(NBLK * BLOCK_BYTES) / real'(coded_bytes), real'(NBLK * 4) / real'(bursts));
        if (k != 0) check(coded_bytes <= on_bytes + on_bytes / 50,
              $sformatf("%s: offline code worse than online (%0d > %0d bytes)", set_name[k], coded_bytes, on_bytes));
      end
    end
    // ---- length limiting: Fibonacci counts would need ~40-bit codes ----
    begin
      logic [SL-1:0] fv[$];
      longint unsigned fc[$];
      cfg_wr_t q[$];
      real kraft;
      int maxl, c0;
      longint unsigned a, b, t;
      a = 1; b = 1;
      for (int i = 0; i < 44; i++) begin
        fv.push_back({9'(i * 11 + 3), 7'(i)});
        fc.push_back(a);
        t = a + b; a = b; b = t;
      end
      maxl = build_code_huffman(fv, fc, 1);
      kraft = 0.0;
      for (int r = 0; r < int'(n_code); r++) kraft += 1.0 / real'(longint'(1) << clen[r]);
      $display("limited  : %0d values, longest code %0d bits, Kraft sum %0.6f", fv.size(), maxl, kraft);
      check(maxl == MAX_CL, $sformatf("length limit not reached (%0d)", maxl));
      check(kraft <= 1.0, "Kraft inequality violated");
      cfg_list(q);
      foreach (q[i]) begin
        @(negedge clk);
        cfg = q[i];
      end
      @(negedge clk);
      cfg = '0;
      // blocks mixing frequent values with the rarest (20-bit) ones and escapes
      c0 = n_comp;
      for (int n = 0; n < 40; n++) begin
        block_t d, eb;
        int eby, bits;
        logic [1:0] em;
        for (int k = 0; k < NSYM; k++) begin
          int u;
          u = $urandom_range(99);
          d[BLOCK_BITS - 1 - SL * k -: SL] = (u < 5)  ? SL'($urandom) :
                                             (u < 25) ? fv[$urandom_range(7)] :
                                                        fv[43 - $urandom_range(3)];
        end
        bits = ref_compress(d, PDW, eb, eby, em);
        exp_bursts = int'(meta_bursts(em));
        access(1'b1, BLK_W'(20000 + n), d);
        exp_bursts = -1;
        access(1'b0, BLK_W'(20000 + n), '0);
      end
      check(n_comp > c0, "no block with 20-bit codes compressed");
    end
    $display("compressed=%0d raw=%0d decompressed=%0d bypass=%0d sampled=%0d",
             n_comp, n_raw, n_dec, n_byp, n_smp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
