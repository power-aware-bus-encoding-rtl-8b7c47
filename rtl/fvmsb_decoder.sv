// fvmsb_decoder -- receive half of the FV-i-MSB-j low-power bus codec.
//
// The de-correlator XORs each arriving bus word with the previous one to get
// back the code the encoder chose. The selection logic reads the encode
// signal: for MODE_FV it turns the one-hot code and bank into an FV table slot
// and outputs that entry; for MODE_MSB it does the same with the MSB table and
// appends the lower bits carried on the bus; for MODE_RAW the code is the
// word. The decoder then updates its tables exactly as the encoder did (see
// fvmsb_encoder), using the hit and slot the encode signal implies, so its
// tables never need a search and always equal the encoder's.
//
// Parameters, MSB_EN included, must match the encoder's.
//
// Timing: one word per clock. out_data and out_valid are registered and appear
// one cycle after bus_valid, two cycles after the word entered the encoder.
// Synchronous active-low reset empties both tables and sets the
// de-correlator's reference to zero, matching the encoder's reset.
module fvmsb_decoder
  import fvmsb_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned MSB_W  = 18,
  parameter int unsigned I      = 2,
  parameter int unsigned J      = 2,
  parameter bit          MSB_EN = 1'b1,
  parameter int unsigned BANK_W = bank_width(I, J)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  logic [DATA_W-1:0] bus_data,
  input  enc_mode_e         enc_mode,
  input  logic [BANK_W-1:0] enc_bank,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data
);

  localparam int unsigned N_FV      = DATA_W << I;
  localparam int unsigned N_MSB     = MSB_W << J;
  localparam int unsigned FV_IDX_W  = $clog2(N_FV);
  localparam int unsigned MSB_IDX_W = $clog2(N_MSB);

  if (MSB_W < 2 || MSB_W >= DATA_W) begin : g_bad_msb_w
    $error("fvmsb_decoder: MSB_W must lie between 2 and DATA_W-1");
  end

  logic [DATA_W-1:0] code;

  bus_decorrelator #(.W(DATA_W)) u_decorrelator (
    .clk, .rst_n,
    .en     (bus_valid),
    .bus_in (bus_data),
    .code   (code)
  );

  logic                 fv_hit, msb_hit;
  logic [FV_IDX_W-1:0]  fv_idx;
  logic [MSB_IDX_W-1:0] msb_idx;
  logic [DATA_W-1:0]    fv_rd_data, data;
  logic [MSB_W-1:0]     msb_rd_data;
  logic                 fv_rd_valid, msb_rd_valid;
  logic                 fv_srch_hit, msb_srch_hit;
  logic [FV_IDX_W-1:0]  fv_srch_idx;
  logic [MSB_IDX_W-1:0] msb_srch_idx;

  fvmsb_dec_select #(.DATA_W(DATA_W), .MSB_W(MSB_W), .I(I), .J(J),
                     .BANK_W(BANK_W)) u_select (
    .code        (code),
    .mode        (enc_mode),
    .bank        (enc_bank),
    .fv_hit      (fv_hit),
    .fv_idx      (fv_idx),
    .msb_hit     (msb_hit),
    .msb_idx     (msb_idx),
    .fv_rd_data  (fv_rd_data),
    .msb_rd_data (msb_rd_data),
    .data        (data)
  );

  // The search ports are not needed to decode. They look up the decoded word
  // only for the assertions below, which check that the decoder's tables
  // agree with what the encoder's tables reported.
  cam_lru_table #(.W(DATA_W), .N(N_FV)) u_fv_table (
    .clk, .rst_n,
    .search_key (data),
    .search_hit (fv_srch_hit),
    .search_idx (fv_srch_idx),
    .rd_idx     (fv_idx),
    .rd_data    (fv_rd_data),
    .rd_valid   (fv_rd_valid),
    .upd_en     (bus_valid),
    .upd_hit    (fv_hit),
    .upd_idx    (fv_idx),
    .upd_data   (data)
  );

  if (MSB_EN) begin : g_msb
    cam_lru_table #(.W(MSB_W), .N(N_MSB)) u_msb_table (
      .clk, .rst_n,
      .search_key (data[DATA_W-1 -: MSB_W]),
      .search_hit (msb_srch_hit),
      .search_idx (msb_srch_idx),
      .rd_idx     (msb_idx),
      .rd_data    (msb_rd_data),
      .rd_valid   (msb_rd_valid),
      .upd_en     (bus_valid && !fv_hit),
      .upd_hit    (msb_hit),
      .upd_idx    (msb_idx),
      .upd_data   (data[DATA_W-1 -: MSB_W])
    );
  end else begin : g_no_msb
    // plain FV-i: no MSB table; the encoder never sends an MSB code
    assign msb_rd_data  = '0;
    assign msb_rd_valid = 1'b0;
    assign msb_srch_hit = 1'b0;
    assign msb_srch_idx = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) out_data <= data;
    end
  end

  // A coded word must name a filled slot with a single one-hot bit.
  a_fv_code: assert property (@(posedge clk) disable iff (!rst_n)
                              bus_valid && fv_hit |-> $onehot(code) && fv_rd_valid)
    else $error("fvmsb_decoder: bad FV code");
  a_msb_code: assert property (@(posedge clk) disable iff (!rst_n)
                               bus_valid && msb_hit |->
                               $onehot(code[DATA_W-1 -: MSB_W]) && msb_rd_valid)
    else $error("fvmsb_decoder: bad MSB code");

  a_fv_sync: assert property (@(posedge clk) disable iff (!rst_n)
                              bus_valid |-> (fv_srch_hit == fv_hit) &&
                              (!fv_hit || fv_srch_idx == fv_idx))
    else $error("fvmsb_decoder: FV table out of step with the encoder");
  a_msb_sync: assert property (@(posedge clk) disable iff (!rst_n)
                               bus_valid && !fv_hit |-> (msb_srch_hit == msb_hit) &&
                               (!msb_hit || msb_srch_idx == msb_idx))
    else $error("fvmsb_decoder: MSB table out of step with the encoder");

endmodule
