// tb_cam_lru_table -- self-checking test of cam_lru_table.
// A 12-entry, 16-bit table is driven with keys from a pool of 20, so that it
// both hits and evicts. Every cycle the search result and a random read are
// compared with the recency-list model in fvmsb_ref_pkg, and the update the
// model makes is applied to the table. Counts hits, fills and evictions.
module tb_cam_lru_table;
  import fvmsb_ref_pkg::*;
  localparam int W = 16, N = 12, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [W-1:0]  search_key = '0, rd_data, upd_data = '0;
  logic          search_hit, rd_valid, upd_en = 0, upd_hit = 0;
  logic [IW-1:0] search_idx, rd_idx = '0, upd_idx = '0;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  cam_lru_table #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    lru_table    m;
    int unsigned slot, r;
    bit          h;
    logic [W-1:0] pool[20];
    m = new(N);
    foreach (pool[p]) pool[p] = W'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      search_key = pool[$urandom_range(0, (t < 1500) ? 19 : 9)];
      rd_idx     = IW'($urandom_range(0, N - 1));
      upd_en     = ($urandom_range(0, 4) != 0);
      #1;
      h = m.lookup(32'(search_key), slot);
      check(search_hit == h, "search hit");
      if (h) check(search_idx == IW'(slot), "search slot");
      r = 32'(rd_idx);
      check(rd_valid == m.valid[r], "read valid");
      if (m.valid[r]) check(rd_data == W'(m.tag[r]), "read data");
      upd_hit  = search_hit;
      upd_idx  = search_idx;
      upd_data = search_key;
      if (upd_en) begin
        m.update(h, slot, 32'(search_key));
        if (h) hits++; else misses++;
      end
    end
    @(negedge clk);
    upd_en = 0;
    $display("t=%0t hits=%0d misses=%0d evictions=%0d", $time, hits, misses, m.evictions);
    check(hits > 100 && m.evictions > 20, "both hits and evictions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
