// tb_fvmsb_decoder -- self-checking test of fvmsb_decoder at its default
// sizes. The reference encoder model of fvmsb_ref_pkg turns a synthetic
// trace into bus words, modes and banks, which drive the decoder with a
// random valid pattern; every decoded word is compared with the original one
// cycle later. Counts each mode received and fails if any never occurs.
module tb_fvmsb_decoder;
  import fvmsb_pkg::*;
  import fvmsb_ref_pkg::*;
  localparam int DW = 32, MW = 18;
  logic clk = 0, rst_n = 0, bus_valid = 0;
  logic [DW-1:0] bus_data = '0, out_data;
  logic          out_valid;
  enc_mode_e     enc_mode = MODE_RAW;
  logic [1:0]    enc_bank = '0;
  int checks = 0, failures = 0;
  int n_mode[3];

  fvmsb_decoder dut (.*);

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
    logic [31:0] word, code;
    int unsigned mode, bank;
    m = new(DW, MW, 2, 2);
    g = new(MW);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bus_valid = ($urandom_range(0, 7) != 0);
      word = g.next();
      if (bus_valid) begin
        m.encode(word, code, mode, bank);
        bus_data = m.bus;
        enc_mode = enc_mode_e'(mode);
        enc_bank = 2'(bank);
        n_mode[mode]++;
      end else begin
        bus_data = DW'($urandom);   // bus lines are ignored while not valid
      end
      @(negedge clk);
      check(out_valid == bus_valid, "out_valid one cycle after bus_valid");
      if (bus_valid)
        check(out_data == word, $sformatf("word %0d decoded %h want %h (mode %0d)", t,
                                          out_data, word, mode));
    end
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
