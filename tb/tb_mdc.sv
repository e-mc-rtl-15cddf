// tb_mdc: self-checking test of the metadata cache.
//
// Random lookups and updates over 24 metadata lines that fall into only two
// cache sets, so that hits, misses, evictions and dirty write-backs all occur.
// A line memory model answers fills after a random delay and takes
// write-backs with a random ready; the metadata region starts as all 2'b11.
// Every lookup result is compared with a reference map of block metadata, the
// hit latency (2 cycles) is checked, and each event kind must be seen.
module tb_mdc;
  import e2mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, req_write, rsp_valid;
  logic [BLK_W-1:0] req_blk;
  logic [1:0] req_meta, rsp_meta;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_rsp_valid;
  logic [17:0] mem_req_line;
  logic [255:0] mem_req_wdata, mem_rsp_rdata;
  logic stat_hit, stat_miss, stat_wb;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_wb = 0;

  logic [1:0]   ref_meta [logic [BLK_W-1:0]];
  logic [255:0] line_mem [logic [17:0]];

  always #5 clk = ~clk;

  mdc dut (.*);

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

  // Line memory model.
  initial begin
    mem_req_ready = 1'b0;
    mem_rsp_valid = 1'b0;
    mem_rsp_rdata = '0;
    forever begin
      @(negedge clk);
      mem_rsp_valid = 1'b0;
      mem_req_ready = ($urandom_range(2) != 0);
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_write) begin
          line_mem[mem_req_line] = mem_req_wdata;
        end else begin
          logic [17:0] a;
          a = mem_req_line;
          @(negedge clk);
          mem_req_ready = 1'b0;
          repeat ($urandom_range(0, 4)) @(negedge clk);
          mem_rsp_rdata = line_mem.exists(a) ? line_mem[a] : '1;
          mem_rsp_valid = 1'b1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (stat_hit) n_hit++;
    if (stat_miss) n_miss++;
    if (stat_wb) n_wb++;
  end

  initial begin
    req_valid = 0; req_write = 0; req_blk = '0; req_meta = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 6000; t++) begin
      logic [BLK_W-1:0] b;
      logic [1:0] m, e;
      int lat, misses_before;
      // line = {tag (0..11), set (0 or 1)}, entry random
      b = {BLK_W'($urandom_range(11)) << 13} | (BLK_W'($urandom_range(1)) << 7) | BLK_W'($urandom_range(127));
      m = 2'($urandom);
      @(negedge clk);
      check(req_ready, "not ready when idle");
      req_valid = 1'b1; req_blk = b; req_write = ($urandom_range(1) == 1); req_meta = m;
      @(negedge clk);  // taken at the posedge in between
      req_valid = 1'b0;
      misses_before = n_miss;
      lat = 1;
      while (!rsp_valid) begin
        @(negedge clk);
        lat++;
      end
      e = ref_meta.exists(b) ? ref_meta[b] : 2'b11;
      if (req_write) begin
        ref_meta[b] = m;
        check(rsp_meta == m, "update echo");
      end else begin
        check(rsp_meta == e, $sformatf("lookup blk %h got %0d exp %0d", b, rsp_meta, e));
      end
      if (n_miss == misses_before) check(lat == 2, $sformatf("hit latency %0d", lat));
    end
    check(n_hit > 100, "too few hits");
    check(n_miss > 100, "too few misses");
    check(n_wb > 20, "too few write-backs");
    $display("hits=%0d misses=%0d writebacks=%0d", n_hit, n_miss, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
