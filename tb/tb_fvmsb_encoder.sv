// tb_fvmsb_encoder -- self-checking test of fvmsb_encoder at its default
// sizes (32-bit bus, 18-bit MSB field, I = J = 2). A synthetic trace with
// frequent words and frequent upper parts is fed with a random valid
// pattern; after each word the registered bus value, mode and bank are
// compared with the reference model of fvmsb_ref_pkg, and the one-cycle
// latency of bus_valid is checked. Counts FV codes, MSB codes, unencoded
// words, upper banks used and table evictions, and fails if any never
// occurs.
module tb_fvmsb_encoder;
  import fvmsb_pkg::*;
  import fvmsb_ref_pkg::*;
  localparam int DW = 32, MW = 18;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] in_data = '0, bus_data;
  logic          bus_valid;
  enc_mode_e     enc_mode;
  logic [1:0]    enc_bank;
  int checks = 0, failures = 0;
  int n_mode[3], n_hibank = 0;

  fvmsb_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    fvmsb_model  m;
    trace_gen    g;
    logic [31:0] code;
    int unsigned mode, bank;
    m = new(DW, MW, 2, 2);
    g = new(MW);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      in_valid = ($urandom_range(0, 7) != 0);
      in_data  = g.next();
      if (in_valid) m.encode(in_data, code, mode, bank);
      @(negedge clk);
      check(bus_valid == in_valid, "bus_valid one cycle after in_valid");
      check(bus_data == m.bus, $sformatf("word %0d bus %h want %h", t, bus_data, m.bus));
      if (in_valid) begin
        check(enc_mode == enc_mode_e'(mode) && enc_bank == 2'(bank),
              $sformatf("word %0d mode/bank %0d/%0d want %0d/%0d", t, enc_mode, enc_bank,
                        mode, bank));
        n_mode[mode]++;
        if (bank != 0) n_hibank++;
      end
    end
    $display("raw=%0d fv=%0d msb=%0d upper_bank=%0d fv_evict=%0d msb_evict=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_hibank, m.fv.evictions, m.msb.evictions);
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes used");
    check(n_hibank > 0, "a bank above 0 used");
    check(m.fv.evictions > 0 && m.msb.evictions > 0, "both tables evicted entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
