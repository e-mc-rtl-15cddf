// tb_clut: self-checking test of the compressor lookup table.
//
// Writes random entries (random set, way, tag, codeword and length, some
// invalid) and keeps a model of the table; looks up random symbols, a share
// of them known to be present, and checks hit, codeword and length one cycle
// later. Also checks that the result registers hold while rd_en is low and
// that reset leaves the table empty.
module tb_clut;
  import e2mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cfg_wr_t cfg;
  logic rd_en, hit;
  logic [SL-1:0] sym;
  logic [MAX_CL-1:0] cw;
  logic [CL_W-1:0] cl;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  // model
  logic        m_v   [CLUT_SETS][CLUT_WAYS];
  logic [8:0]  m_tag [CLUT_SETS][CLUT_WAYS];
  logic [19:0] m_cw  [CLUT_SETS][CLUT_WAYS];
  logic [4:0]  m_cl  [CLUT_SETS][CLUT_WAYS];

  always #5 clk = ~clk;

  clut dut (.clk, .rst_n, .cfg, .rd_en, .sym, .hit, .cw, .cl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; rd_en = 0; sym = '0;
    foreach (m_v[s, w]) m_v[s][w] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // empty after reset
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); sym = SL'($urandom); rd_en = 1'b1;
      @(negedge clk); rd_en = 1'b0;
      check(!hit, "hit in an empty table");
    end
    for (int round = 0; round < 4000; round++) begin
      if ($urandom_range(2) == 0) begin
        int s, w;
        logic v, dup;
        logic [8:0] tg;
        logic [19:0] c;
        logic [4:0] l;
        s = $urandom_range(CLUT_SETS - 1); w = $urandom_range(CLUT_WAYS - 1);
        v = ($urandom_range(9) != 0); c = 20'($urandom); l = 5'($urandom_range(1, 20));
        // keep tags unique within a set
        do begin
          dup = 1'b0;
          tg = 9'($urandom);
          for (int k = 0; k < CLUT_WAYS; k++)
            if (k != w && m_v[s][k] && m_tag[s][k] == tg) dup = 1'b1;
        end while (dup);
        @(negedge clk);
        cfg = '{we: 1'b1, sel: CFG_CLUT, addr: 11'(s * 8 + w), data: {1'b0, v, tg, c, l}};
        m_v[s][w] = v; m_tag[s][w] = tg; m_cw[s][w] = c; m_cl[s][w] = l;
        @(negedge clk);
        cfg = '0;
      end else begin
        logic [SL-1:0] q;
        logic eh;
        logic [19:0] ec;
        logic [4:0] el;
        if ($urandom_range(1)) begin
          int s, w;
          s = $urandom_range(CLUT_SETS - 1); w = $urandom_range(CLUT_WAYS - 1);
          q = {m_tag[s][w], 7'(s)};
        end else q = SL'($urandom);
        eh = 0; ec = '0; el = '0;
        for (int w = 0; w < CLUT_WAYS; w++)
          if (m_v[q[6:0]][w] && m_tag[q[6:0]][w] == q[15:7]) begin
            eh = 1; ec = m_cw[q[6:0]][w]; el = m_cl[q[6:0]][w];
          end
        @(negedge clk);
        sym = q; rd_en = 1'b1;
        @(negedge clk);
        rd_en = 1'b0; sym = SL'($urandom);
        check(hit == eh, $sformatf("hit %0b exp %0b for %h", hit, eh, q));
        if (eh) begin
          check(cw == ec && cl == el, $sformatf("entry for %h", q));
          n_hit++;
        end else n_miss++;
        @(negedge clk);
        check(hit == eh && (!eh || cw == ec), "result did not hold with rd_en low");
      end
    end
    check(n_hit > 100 && n_miss > 100, "too few hits or misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
