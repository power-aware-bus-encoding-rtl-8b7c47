// fvmsb_codec -- FV-i-MSB-j bus codec: encoder and decoder joined by an
// off-chip data bus.
//
// The encoder replaces frequent data words, and words whose upper MSB_W bits
// are frequent, by one-hot codes, and XORs the result onto the bus so that a
// coded word toggles a single line of its field. The decoder undoes both
// steps. The bus itself (bus_data, plus the encode-signal lines enc_mode and
// enc_bank) is brought out so that its switching activity can be measured.
//
// Ports: in_valid/in_data is the word stream on the sending side;
// out_valid/out_data is the same stream on the receiving side, two clock
// cycles later. enc_mode is 0 for an unencoded word, 1 for an FV code and 2
// for an MSB code (fvmsb_pkg::enc_mode_e).
//
// Parameters: DATA_W-bit words, MSB_W-bit MSB field, FV table of DATA_W*2**I
// and MSB table of MSB_W*2**J entries; MSB_EN = 0 drops the MSB table (plain
// FV-i). The defaults give FV-2-MSB-2 with an 18-bit field.
module fvmsb_codec #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned MSB_W  = 18,
  parameter int unsigned I      = 2,
  parameter int unsigned J      = 2,
  parameter bit          MSB_EN = 1'b1,
  parameter int unsigned BANK_W = fvmsb_pkg::bank_width(I, J)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              bus_valid,
  output logic [DATA_W-1:0] bus_data,
  output logic [1:0]        enc_mode,
  output logic [BANK_W-1:0] enc_bank,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data
);

  fvmsb_pkg::enc_mode_e mode;

  fvmsb_encoder #(.DATA_W(DATA_W), .MSB_W(MSB_W), .I(I), .J(J),
                  .MSB_EN(MSB_EN), .BANK_W(BANK_W)) u_encoder (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .in_data   (in_data),
    .bus_valid (bus_valid),
    .bus_data  (bus_data),
    .enc_mode  (mode),
    .enc_bank  (enc_bank)
  );

  assign enc_mode = mode;

  fvmsb_decoder #(.DATA_W(DATA_W), .MSB_W(MSB_W), .I(I), .J(J),
                  .MSB_EN(MSB_EN), .BANK_W(BANK_W)) u_decoder (
    .clk, .rst_n,
    .bus_valid (bus_valid),
    .bus_data  (bus_data),
    .enc_mode  (mode),
    .enc_bank  (enc_bank),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

endmodule
