// tb_fvmsb_configs -- runs one synthetic trace through the codec in the
// configurations compared in the evaluation: FV-MSB (I = J = 0), FV-1-MSB-2
// and FV-2-MSB-2, each with an 18-bit MSB field, and FV-2-MSB-2 with MSB
// fields of 3 to 28 bits; and, without the MSB table, plain FV-2 and plain
// FV (I = 0, one 32-entry table). For every configuration it checks that each word
// is decoded unchanged and that the encoded bus switches less than the
// unencoded stream, and prints the reduction in data-line transitions.
// The trace is synthetic, so the percentages only rank the configurations
// for this trace.
module tb_fvmsb_configs;
  import fvmsb_ref_pkg::*;
  localparam int WORDS = 20000;
  localparam int NCFG  = 12;
  localparam int CFG_MSB[NCFG] = '{18, 18, 18, 3, 8, 12, 16, 20, 24, 28, 18, 18};
  localparam int CFG_I  [NCFG] = '{0, 1, 2, 2, 2, 2, 2, 2, 2, 2, 2, 0};
  localparam int CFG_J  [NCFG] = '{0, 2, 2, 2, 2, 2, 2, 2, 2, 2, 0, 0};
  localparam bit CFG_MEN[NCFG] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] in_data = '0;
  int          n_words[NCFG], n_errors[NCFG], n_fv[NCFG], n_msb[NCFG];
  longint      raw_tr[NCFG], bus_tr[NCFG];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    codec_probe #(.MSB_W(CFG_MSB[c]), .I(CFG_I[c]), .J(CFG_J[c]),
                  .MSB_EN(CFG_MEN[c])) u_probe (
      .clk, .rst_n, .in_valid, .in_data,
      .n_words(n_words[c]), .n_errors(n_errors[c]), .n_fv(n_fv[c]), .n_msb(n_msb[c]),
      .raw_tr(raw_tr[c]), .bus_tr(bus_tr[c]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (WORDS * 2 + 1000) @(posedge clk);
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
    trace_gen g;
    int sent;
    g = new(18);
    sent = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (sent < WORDS) begin
      in_valid = ($urandom_range(0, 9) != 0);
      in_data  = g.next();
      if (in_valid) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    for (int c = 0; c < NCFG; c++) begin
      if (CFG_MEN[c])
        $display("FV-%0d-MSB-%0d, %2d-bit MSB: fv=%0d msb=%0d transitions %0d -> %0d (%0.1f%% fewer)",
                 CFG_I[c], CFG_J[c], CFG_MSB[c], n_fv[c], n_msb[c], raw_tr[c], bus_tr[c],
                 100.0 * real'(raw_tr[c] - bus_tr[c]) / real'(raw_tr[c]));
      else
        $display("FV-%0d, no MSB table: fv=%0d transitions %0d -> %0d (%0.1f%% fewer)",
                 CFG_I[c], n_fv[c], raw_tr[c], bus_tr[c],
                 100.0 * real'(raw_tr[c] - bus_tr[c]) / real'(raw_tr[c]));
      check(n_words[c] == WORDS, $sformatf("config %0d decoded %0d words", c, n_words[c]));
      check(n_errors[c] == 0, $sformatf("config %0d: %0d words decoded wrongly", c, n_errors[c]));
      check(n_fv[c] > 0 && (CFG_MEN[c] ? n_msb[c] > 0 : n_msb[c] == 0),
            $sformatf("config %0d used its tables", c));
      check(bus_tr[c] < raw_tr[c], $sformatf("config %0d reduces switching", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
