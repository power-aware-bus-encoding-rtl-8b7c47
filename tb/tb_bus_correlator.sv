// tb_bus_correlator -- self-checking test of bus_correlator.
// Drives random codes with a random enable and compares the bus, one cycle
// later, with a running XOR kept in the testbench. Also checks that a
// one-hot code changes exactly one bus line.
module tb_bus_correlator;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] code = '0, bus, exp_bus;
  int checks = 0, failures = 0;

  bus_correlator #(.W(W)) dut (.clk, .rst_n, .en, .code, .bus);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    logic [W-1:0] prev_bus;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(bus == '0, "bus is zero after reset");
    exp_bus = '0;
    for (int t = 0; t < 2000; t++) begin
      en   = ($urandom_range(0, 3) != 0);
      code = (t % 2 == 1) ? W'(1) << $urandom_range(0, W - 1) : W'($urandom);
      prev_bus = bus;
      @(negedge clk);
      if (en) exp_bus ^= code;
      check(bus == exp_bus, $sformatf("bus %h expected %h", bus, exp_bus));
      if (en && (t % 2 == 1)) check($countones(bus ^ prev_bus) == 1, "one-hot code toggles one line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
