// tb_cw_packer: self-checking test of the codeword packer.
//
// Appends random codewords of random length (0 to 20 bits) after a random
// start offset, flushes, and compares the final buffer and the bit count with
// a bit queue built alongside. Streams run both shorter and longer than the
// 1024-bit final buffer (bits beyond it must be dropped). One codeword is
// accepted every cycle.
module tb_cw_packer;
  import e2mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init, in_valid, flush;
  logic [POS_W-1:0] init_pos, pos;
  logic [MAX_CL-1:0] cw;
  logic [CL_W-1:0] cl;
  logic [BLOCK_BITS-1:0] fbuf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cw_packer dut (.clk, .rst_n, .init, .init_pos, .in_valid, .cw, .cl, .flush, .fbuf, .pos);

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
    init = 0; in_valid = 0; flush = 0; init_pos = '0; cw = '0; cl = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      bit q[$];
      logic [BLOCK_BITS-1:0] exp;
      int n, off;
      q.delete();
      off = 8 * $urandom_range(0, 3);
      n = (t % 2) ? $urandom_range(10, 60) : $urandom_range(60, 120);
      init <= 1'b1; init_pos <= POS_W'(off);
      @(posedge clk);
      init <= 1'b0;
      for (int i = 0; i < off; i++) q.push_back(0);
      for (int i = 0; i < n; i++) begin
        logic [MAX_CL-1:0] c;
        int l;
        l = $urandom_range(0, MAX_CL);
        c = MAX_CL'($urandom);           // upper bits must be ignored
        for (int b = l - 1; b >= 0; b--) q.push_back(c[b]);
        in_valid <= 1'b1; cw <= c; cl <= CL_W'(l);
        @(posedge clk);
      end
      in_valid <= 1'b0; flush <= 1'b1;
      @(posedge clk);
      flush <= 1'b0;
      #1;
      exp = '0;
      for (int i = 0; i < q.size() && i < BLOCK_BITS; i++) exp[BLOCK_BITS - 1 - i] = q[i];
      check(int'(pos) == q.size(), $sformatf("pos %0d exp %0d", pos, q.size()));
      check(fbuf == exp, $sformatf("stream %0d differs (%0d bits)", t, q.size()));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
