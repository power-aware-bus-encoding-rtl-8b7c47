// fvmsb_enc_select -- selection logic of the FV-i-MSB-j encoder.
//
// It picks, with the priority of the original scheme's selection table, what
// the bus will carry for the present data word:
//   FV hit            -> one-hot code of the FV slot          (MODE_FV)
//   no FV hit, MSB hit -> one-hot code of the MSB slot in the upper MSB_W
//                        bits, concatenated with the unencoded lower
//                        DATA_W-MSB_W bits (the LSB mask)      (MODE_MSB)
//   neither           -> the unencoded data word               (MODE_RAW)
// The "MSB hit and not FV hit" gate is the one the original scheme draws.
//
// Banks. A table of the FV-i variant holds DATA_W*2**I entries, more than a
// DATA_W-bit one-hot code can name. Slot s is sent as one-hot position s mod
// DATA_W on the bus and bank s div DATA_W on the extra encode-signal lines;
// the MSB table likewise uses MSB_W positions and 2**J banks. With I = J = 0
// no bank is needed and the scheme is plain FV-MSB. The original scheme says
// only that i and j enlarge the tables and that more entries need extra
// control lines; the bank numbering is this design's choice.
//
// Purely combinational.
module fvmsb_enc_select
  import fvmsb_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned MSB_W     = 18,
  parameter int unsigned I         = 2,
  parameter int unsigned J         = 2,
  parameter int unsigned FV_IDX_W  = $clog2(DATA_W << I),
  parameter int unsigned MSB_IDX_W = $clog2(MSB_W << J),
  parameter int unsigned BANK_W    = bank_width(I, J)
) (
  input  logic [DATA_W-1:0]    data,
  input  logic                 fv_hit,
  input  logic [FV_IDX_W-1:0]  fv_idx,
  input  logic                 msb_hit,
  input  logic [MSB_IDX_W-1:0] msb_idx,
  output logic [DATA_W-1:0]    code,
  output enc_mode_e            mode,
  output logic [BANK_W-1:0]    bank
);

  localparam int unsigned LSB_W = DATA_W - MSB_W;

  logic                 use_msb;
  logic [DATA_W-1:0]    fv_onehot;
  logic [MSB_W-1:0]     msb_onehot;
  logic [BANK_W-1:0]    fv_bank, msb_bank;

  assign use_msb = msb_hit && !fv_hit;

  always_comb begin
    fv_onehot  = '0;
    fv_onehot[int'(fv_idx) % DATA_W] = 1'b1;
    fv_bank    = BANK_W'(int'(fv_idx) / DATA_W);
    msb_onehot = '0;
    msb_onehot[int'(msb_idx) % MSB_W] = 1'b1;
    msb_bank   = BANK_W'(int'(msb_idx) / MSB_W);
  end

  always_comb begin
    if (fv_hit) begin
      code = fv_onehot;
      mode = MODE_FV;
      bank = fv_bank;
    end else if (use_msb) begin
      code = {msb_onehot, data[LSB_W-1:0]};
      mode = MODE_MSB;
      bank = msb_bank;
    end else begin
      code = data;
      mode = MODE_RAW;
      bank = '0;
    end
  end

endmodule
