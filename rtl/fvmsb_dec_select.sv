// fvmsb_dec_select -- selection logic of the FV-i-MSB-j decoder.
//
// From the decorrelated code word and the encode signal it works out which
// table slot, if any, the encoder named, and rebuilds the data word:
//   MODE_FV  : the one-hot position plus bank*DATA_W is the FV slot; the
//              word is that FV table entry.
//   MODE_MSB : the one-hot position in the upper MSB_W bits plus
//              bank*MSB_W is the MSB slot; the word is that MSB table entry
//              concatenated with the lower DATA_W-MSB_W bits of the code.
//   MODE_RAW : the word is the code itself.
// It also reports which table was hit and where, so the decoder can repeat the
// encoder's table updates without a search of its own. The original scheme
// draws this block as a selection logic fed by both tables and the encode
// signal; the slot arithmetic matches fvmsb_enc_select.
//
// Purely combinational: fv_idx/msb_idx go out to the tables' read ports and
// fv_rd_data/msb_rd_data come back in the same cycle.
module fvmsb_dec_select
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
  input  logic [DATA_W-1:0]    code,
  input  enc_mode_e            mode,
  input  logic [BANK_W-1:0]    bank,
  output logic                 fv_hit,
  output logic [FV_IDX_W-1:0]  fv_idx,
  output logic                 msb_hit,
  output logic [MSB_IDX_W-1:0] msb_idx,
  input  logic [DATA_W-1:0]    fv_rd_data,
  input  logic [MSB_W-1:0]     msb_rd_data,
  output logic [DATA_W-1:0]    data
);

  localparam int unsigned LSB_W = DATA_W - MSB_W;

  logic [FV_IDX_W-1:0]  fv_pos;
  logic [MSB_IDX_W-1:0] msb_pos;

  // one-hot to position (the encoder guarantees a single set bit)
  always_comb begin
    fv_pos = '0;
    for (int b = 0; b < DATA_W; b++)
      if (code[b]) fv_pos = FV_IDX_W'(b);
    msb_pos = '0;
    for (int b = 0; b < MSB_W; b++)
      if (code[LSB_W + b]) msb_pos = MSB_IDX_W'(b);
  end

  assign fv_hit  = (mode == MODE_FV);
  assign msb_hit = (mode == MODE_MSB);
  assign fv_idx  = FV_IDX_W'(int'(bank) * DATA_W + int'(fv_pos));
  assign msb_idx = MSB_IDX_W'(int'(bank) * MSB_W + int'(msb_pos));

  always_comb begin
    unique case (mode)
      MODE_FV:  data = fv_rd_data;
      MODE_MSB: data = {msb_rd_data, code[LSB_W-1:0]};
      default:  data = code;
    endcase
  end

endmodule
