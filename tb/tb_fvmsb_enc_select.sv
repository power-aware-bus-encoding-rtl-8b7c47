// tb_fvmsb_enc_select -- self-checking test of the encoder selection logic
// at its default sizes (32-bit word, 18-bit MSB field, 4 FV banks of 32
// slots, 4 MSB banks of 18 slots). Random hit flags and slots are applied
// and the code, mode and bank are compared with values built bit by bit in
// the testbench. Every row of the selection table is exercised.
module tb_fvmsb_enc_select;
  import fvmsb_pkg::*;
  localparam int DW = 32, MW = 18, LW = DW - MW;
  logic [DW-1:0] data, code, exp_code;
  logic          fv_hit, msb_hit;
  logic [6:0]    fv_idx, msb_idx;
  enc_mode_e     mode, exp_mode;
  logic [1:0]    bank, exp_bank;
  int checks = 0, failures = 0, n_fv = 0, n_msb = 0, n_raw = 0;

  fvmsb_enc_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      data    = DW'($urandom);
      fv_hit  = 1'($urandom_range(0, 1));
      msb_hit = 1'($urandom_range(0, 1));
      fv_idx  = 7'($urandom_range(0, 127));
      msb_idx = 7'($urandom_range(0, 71));
      #1;
      exp_code = '0;
      if (fv_hit) begin
        exp_mode = MODE_FV;
        exp_bank = 2'(fv_idx >> 5);
        exp_code[fv_idx[4:0]] = 1'b1;
        n_fv++;
      end else if (msb_hit) begin
        exp_mode = MODE_MSB;
        exp_bank = 2'(int'(msb_idx) / 18);
        exp_code[LW + int'(msb_idx) % 18] = 1'b1;
        for (int b = 0; b < LW; b++) exp_code[b] = data[b];
        n_msb++;
      end else begin
        exp_mode = MODE_RAW;
        exp_bank = '0;
        exp_code = data;
        n_raw++;
      end
      checks++;
      if (code !== exp_code || mode !== exp_mode || bank !== exp_bank) begin
        failures++;
        $display("FAIL fv=%b/%0d msb=%b/%0d: got %h %0d %0d want %h %0d %0d", fv_hit, fv_idx,
                 msb_hit, msb_idx, code, mode, bank, exp_code, exp_mode, exp_bank);
      end
    end
    checks++;
    if (n_fv == 0 || n_msb == 0 || n_raw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
