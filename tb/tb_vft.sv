// tb_vft: self-checking test of the value frequency table.
//
// Phase 1 samples blocks drawn from 600 values spread so that no set gets
// more than 8 distinct values, then reads out the whole table and compares
// every count with a reference map (and that every value is present).
// Phase 2 clears the table and fills one set with a frequent value followed
// by many distinct rare values: the set must stay full and the frequent
// value must survive replacement with its exact count. Also checks that a
// block takes NSYM cycles and that clear empties the table.
module tb_vft;
  import e2mc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, sample_valid, sample_busy, rd_valid;
  block_t sample_blk;
  logic [9:0] rd_addr;
  logic [SL-1:0] rd_value;
  logic [31:0] rd_count;
  int checks = 0, failures = 0;
  int ref_cnt [logic [SL-1:0]];

  always #5 clk = ~clk;

  vft dut (.*);

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

  task automatic offer(block_t b);
    int cyc;
    @(negedge clk);
    check(!sample_busy, "busy before offer");
    sample_valid = 1'b1; sample_blk = b;
    @(negedge clk);
    sample_valid = 1'b0;
    cyc = 0;
    while (sample_busy) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == NSYM, $sformatf("block took %0d cycles", cyc));
  endtask

  function automatic logic [SL-1:0] val(int i);
    // value i: set i % 128, tag 40 + i / 128 (at most 5 per set)
    return {9'(40 + i / 128), 7'(i % 128)};
  endfunction

  initial begin
    clear = 0; sample_valid = 0; sample_blk = '0; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // ---- phase 1: exact counting ----
    for (int t = 0; t < 60; t++) begin
      block_t b;
      for (int k = 0; k < NSYM; k++) begin
        logic [SL-1:0] v;
        v = val(($urandom_range(3) == 0) ? $urandom_range(599) : $urandom_range(9));
        b[BLOCK_BITS - 1 - SL * k -: SL] = v;
        if (ref_cnt.exists(v)) ref_cnt[v]++; else ref_cnt[v] = 1;
      end
      offer(b);
    end
    begin
      int found;
      found = 0;
      for (int a = 0; a < 1024; a++) begin
        rd_addr = 10'(a);
        #1;
        if (rd_valid) begin
          found++;
          check(ref_cnt.exists(rd_value) && ref_cnt[rd_value] == int'(rd_count),
                $sformatf("value %h count %0d", rd_value, rd_count));
        end
      end
      check(found == ref_cnt.num(), $sformatf("%0d entries, %0d distinct values", found, ref_cnt.num()));
    end
    // ---- clear ----
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    begin
      int any;
      any = 0;
      for (int a = 0; a < 1024; a++) begin rd_addr = 10'(a); #1; if (rd_valid) any++; end
      check(any == 0, "table not empty after clear");
    end
    // ---- phase 2: replacement keeps the frequent value ----
    begin
      block_t b;
      logic [SL-1:0] hot;
      int full, hot_cnt;
      hot = {9'd300, 7'd5};
      for (int k = 0; k < NSYM; k++) b[BLOCK_BITS - 1 - SL * k -: SL] = hot;
      offer(b);
      for (int t = 0; t < 3; t++) begin
        for (int k = 0; k < NSYM; k++) b[BLOCK_BITS - 1 - SL * k -: SL] = {9'(t * 64 + k), 7'd5};
        offer(b);
      end
      full = 0; hot_cnt = -1;
      for (int w = 0; w < 8; w++) begin
        rd_addr = 10'(5 * 8 + w);
        #1;
        if (rd_valid) full++;
        if (rd_valid && rd_value == hot) hot_cnt = int'(rd_count);
      end
      check(full == 8, "set not full");
      check(hot_cnt == NSYM, $sformatf("frequent value count %0d", hot_cnt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
