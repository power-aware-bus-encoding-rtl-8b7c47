// tb_fvmsb_codec -- end-to-end test of the FV-i-MSB-j codec at its default
// sizes (32-bit bus, 18-bit MSB field, 128-entry FV table, 72-entry MSB
// table). A synthetic trace of frequent words, words with frequent upper
// parts and random words goes through encoder, bus and decoder with a random
// valid pattern. Checks: every word comes out unchanged in the second cycle
// after the one in which it was presented; the bus, mode and bank equal the
// reference model's; an FV-coded word toggles exactly one bus line and an
// MSB-coded word exactly one line of the upper field. Counts each mechanism (FV code, MSB code,
// unencoded word, upper FV bank, upper MSB bank, FV and MSB evictions, idle
// cycle) and fails if one never happens. Reports bus transitions against
// those of the unencoded trace.
module tb_fvmsb_codec;
  import fvmsb_ref_pkg::*;
  localparam int DW = 32, MW = 18, LW = DW - MW, WORDS = 30000;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] in_data = '0, bus_data, out_data;
  logic          bus_valid, out_valid;
  logic [1:0]    enc_mode, enc_bank;
  int checks = 0, failures = 0;

  fvmsb_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the word presented in the previous loop iteration
  logic        v_prev;
  logic [31:0] d_prev;

  initial begin
    fvmsb_model  m;
    trace_gen    g;
    logic [31:0] code, prev_bus, prev_raw;
    int unsigned mode, bank;
    int n_mode[3], n_fv_hibank, n_msb_hibank, n_idle, n_words;
    longint raw_tr, bus_tr;
    m = new(DW, MW, 2, 2);
    g = new(MW);
    n_mode = '{0, 0, 0};
    n_fv_hibank = 0; n_msb_hibank = 0; n_idle = 0; n_words = 0;
    raw_tr = 0; bus_tr = 0;
    v_prev = 0;
    d_prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    prev_bus = '0;
    prev_raw = '0;
    for (int t = 0; t < WORDS + 2; t++) begin
      in_valid = (t < WORDS) && ($urandom_range(0, 9) != 0);
      in_data  = g.next();
      if (in_valid) m.encode(in_data, code, mode, bank);
      else if (t < WORDS) n_idle++;
      @(negedge clk);
      // decoder side: the word sampled one clock edge earlier
      check(out_valid == v_prev, "out_valid two clock edges after in_valid");
      if (v_prev) check(out_data == d_prev,
                        $sformatf("decoded %h want %h", out_data, d_prev));
      v_prev = in_valid;
      d_prev = in_data;
      // bus side: the word sampled at the last clock edge
      check(bus_valid == in_valid, "bus_valid one cycle after in_valid");
      if (in_valid) begin
        n_words++;
        check(bus_data == m.bus && enc_mode == 2'(mode) && enc_bank == 2'(bank),
              $sformatf("bus %h/%0d/%0d want %h/%0d/%0d", bus_data, enc_mode, enc_bank,
                        m.bus, mode, bank));
        n_mode[mode]++;
        if (mode == 1) begin
          check($countones(bus_data ^ prev_bus) == 1, "FV code toggles one line");
          if (bank != 0) n_fv_hibank++;
        end
        if (mode == 2) begin
          check($countones((bus_data ^ prev_bus) >> LW) == 1,
                "MSB code toggles one upper line");
          if (bank != 0) n_msb_hibank++;
        end
        bus_tr += $countones(bus_data ^ prev_bus);
        raw_tr += $countones(in_data ^ prev_raw);
        prev_bus = bus_data;
      end
      if (in_valid) prev_raw = in_data;
    end
    $display("words=%0d idle=%0d raw=%0d fv=%0d msb=%0d fv_upper_bank=%0d msb_upper_bank=%0d",
             n_words, n_idle, n_mode[0], n_mode[1], n_mode[2], n_fv_hibank, n_msb_hibank);
    $display("fv_evictions=%0d msb_evictions=%0d", m.fv.evictions, m.msb.evictions);
    $display("data-line transitions: unencoded=%0d encoded=%0d (%0.1f%% fewer)",
             raw_tr, bus_tr, 100.0 * real'(raw_tr - bus_tr) / real'(raw_tr));
    check(n_mode[0] > 0, "unencoded word happened");
    check(n_mode[1] > 0, "FV code happened");
    check(n_mode[2] > 0, "MSB code happened");
    check(n_fv_hibank > 0, "FV bank above 0 happened");
    check(n_msb_hibank > 0, "MSB bank above 0 happened");
    check(m.fv.evictions > 0, "FV eviction happened");
    check(m.msb.evictions > 0, "MSB eviction happened");
    check(n_idle > 0, "idle cycle happened");
    check(bus_tr < raw_tr, "encoded bus switches less than the unencoded trace");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
