// tb_bus_decorrelator -- self-checking test of bus_decorrelator.
// Feeds random bus words with a random enable and checks that the code is the
// XOR of the present word and the last accepted one (zero after reset).
module tb_bus_decorrelator;
  localparam int W = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] bus_in = '0, code, last;
  int checks = 0, failures = 0;

  bus_decorrelator #(.W(W)) dut (.clk, .rst_n, .en, .bus_in, .code);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en     = ($urandom_range(0, 3) != 0);
      bus_in = W'($urandom);
      #1;
      check(code == (bus_in ^ last), $sformatf("code %h expected %h", code, bus_in ^ last));
      if (en) last = bus_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
