// tb_huff_decoder_unit: self-checking test of one decompressor unit.
//
// Encodes blocks with the reference encoder of e2mc_tb_pkg as one way (no
// header, all 64 symbols) and as four ways, then lets the unit decode either
// the whole single-way stream from bit 0 or one of the four ways from the
// start bit given by its pointer. Every symbol is compared with the source
// block. For blocks of MFVs it checks one symbol per cycle (64 symbols in 64
// consecutive cycles) and the first symbol 4 cycles after start. The FCW and
// offset tables are read back and compared with the loaded code.
module tb_huff_decoder_unit;
  import e2mc_pkg::*;
  import e2mc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic start, busy, sym_valid, done;
  block_t blk;
  logic [POS_W-1:0] start_bit;
  logic [6:0] nsym;
  logic [SL-1:0] sym;
  logic [4:0] tbl_rd_len = '0;
  logic [MAX_CL:0] tbl_rd_fcw;
  logic [MAX_CL-1:0] tbl_rd_ofs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  huff_decoder_unit dut (.clk, .rst_n, .cfg, .start, .blk, .start_bit, .nsym,
                         .tbl_rd_len, .tbl_rd_fcw, .tbl_rd_ofs,
                         .busy, .sym_valid, .sym, .done);

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
    cfg = '0; start = 0; blk = '0; start_bit = '0; nsym = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    build_code(1024, 3);
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
    for (int t = 0; t < 160; t++) begin
      block_t ob, eb;
      int eby, bits, way, first_k, n, got, cyc, first_cyc, last_cyc, pct;
      logic [1:0] em;
      pct = (t % 2 == 0) ? 100 : 93;
      ob = gen_block(pct);
      if (t % 4 < 2) begin
        bits = ref_compress(ob, 1, eb, eby, em);
        if (em == META_RAW) continue;
        way = 0; first_k = 0; n = NSYM;
        start_bit <= '0;
      end else begin
        bits = ref_compress(ob, PDW, eb, eby, em);
        if (em == META_RAW) continue;
        way = t % PDW; n = NSYM / PDW; first_k = way * n;
        if (way == 0) start_bit <= POS_W'(24);
        else start_bit <= POS_W'({eb[BLOCK_BITS - 1 - (way - 1) * PTR_W -: PTR_W], 3'b000});
      end
      blk <= eb;
      nsym <= 7'(n);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      got = 0; cyc = 0; first_cyc = -1; last_cyc = -1;
      while (!done) begin
        @(posedge clk);
        cyc++;
        if (sym_valid) begin
          check(sym == sym_of(ob, first_k + got),
                $sformatf("block %0d sym %0d got %h exp %h", t, got, sym, sym_of(ob, first_k + got)));
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
          got++;
        end
      end
      check(got == n, $sformatf("block %0d delivered %0d of %0d", t, got, n));
      if (pct == 100) begin
        check(last_cyc - first_cyc == n - 1, $sformatf("rate: %0d cycles for %0d symbols", last_cyc - first_cyc + 1, n));
        check(first_cyc == 4, $sformatf("first symbol after %0d cycles", first_cyc));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
