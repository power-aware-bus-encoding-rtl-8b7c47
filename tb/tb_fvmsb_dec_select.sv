// tb_fvmsb_dec_select -- self-checking test of the decoder selection logic
// at its default sizes. For a random mode and slot the testbench builds the
// code word the encoder would send, plays both tables by returning a fixed
// scramble of the requested slot number, and checks the slot numbers, hit
// flags and rebuilt data word.
module tb_fvmsb_dec_select;
  import fvmsb_pkg::*;
  localparam int DW = 32, MW = 18, LW = DW - MW;
  logic [DW-1:0] code, fv_rd_data, data, exp_data, lo;
  logic [MW-1:0] msb_rd_data;
  enc_mode_e     mode;
  logic [1:0]    bank;
  logic          fv_hit, msb_hit;
  logic [6:0]    fv_idx, msb_idx;
  int checks = 0, failures = 0;

  fvmsb_dec_select dut (.*);

  // table contents as seen through the read ports
  assign fv_rd_data  = {fv_idx, 25'h0} ^ (32'h9E37_79B9 * (32'(fv_idx) + 1));
  assign msb_rd_data = MW'(32'h85EB_CA6B * (32'(msb_idx) + 3));

  initial begin
    #1000000;
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
    int unsigned slot, m;
    for (int t = 0; t < 3000; t++) begin
      m  = $urandom_range(0, 2);
      lo = DW'($urandom);
      if (m == 1) begin
        slot = $urandom_range(0, 127);
        mode = MODE_FV;
        bank = 2'(slot / 32);
        code = DW'(1) << (slot % 32);
        #1;
        check(fv_hit && !msb_hit, "FV flags");
        check(fv_idx == 7'(slot), $sformatf("FV slot %0d want %0d", fv_idx, slot));
        exp_data = {7'(slot), 25'h0} ^ (32'h9E37_79B9 * (slot + 1));
      end else if (m == 2) begin
        slot = $urandom_range(0, 71);
        mode = MODE_MSB;
        bank = 2'(slot / 18);
        code = (DW'(1) << (LW + slot % 18)) | (lo & ((DW'(1) << LW) - 1));
        #1;
        check(msb_hit && !fv_hit, "MSB flags");
        check(msb_idx == 7'(slot), $sformatf("MSB slot %0d want %0d", msb_idx, slot));
        exp_data = {MW'(32'h85EB_CA6B * (slot + 3)), lo[LW-1:0]};
      end else begin
        mode = MODE_RAW;
        bank = '0;
        code = lo;
        #1;
        check(!fv_hit && !msb_hit, "raw flags");
        exp_data = lo;
      end
      check(data == exp_data, $sformatf("mode %0d data %h want %h", m, data, exp_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
