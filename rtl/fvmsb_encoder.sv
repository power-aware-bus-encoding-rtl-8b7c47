// fvmsb_encoder -- transmit half of the FV-i-MSB-j low-power bus codec.
//
// Each data word accepted with in_valid is looked up, in the same cycle, in
// two content-addressable tables: the FV table of whole frequent values and
// the MSB table of frequent upper parts (the MSB mask takes the upper MSB_W
// bits of the word). The selection logic then chooses a one-hot FV code, an
// MSB one-hot code joined to the unencoded lower bits, or the unencoded word,
// and the correlator XORs that code onto the bus. A hit in either table thus
// costs one bus transition in its coded field. The mode and the table bank
// travel on separate encode-signal lines.
//
// After each word both tables are brought up to date, as the decoder will do
// with its own copies: the FV table records a hit or takes the word in place
// of its least recently used entry; when the FV table missed, the MSB table
// does the same with the upper part. When the FV table hit, the MSB table is
// left alone, since the decoder then cannot tell whether the MSB table would
// have hit. That update rule is this design's choice; the original scheme only
// names timestamps among the codec's parts.
//
// Sizes: DATA_W = 32 and MSB_W = 18 are the widths the original scheme draws;
// the FV table holds DATA_W*2**I entries and the MSB table MSB_W*2**J, so that
// a one-hot code of the bus width names a slot within a bank. I = J = 2 is the
// FV-2-MSB-2 configuration the original scheme evaluates. MSB_EN = 0 leaves
// out the MSB table and gives the plain FV-i codec (plain FV when I = 0).
//
// Timing: one word per clock. bus_data, enc_mode, enc_bank and bus_valid are
// registered and appear one cycle after in_data. Between words the bus holds
// its value and enc_mode/enc_bank keep their last value. Synchronous
// active-low reset empties both tables and clears the bus.
module fvmsb_encoder
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
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              bus_valid,
  output logic [DATA_W-1:0] bus_data,
  output enc_mode_e         enc_mode,
  output logic [BANK_W-1:0] enc_bank
);

  localparam int unsigned N_FV      = DATA_W << I;
  localparam int unsigned N_MSB     = MSB_W << J;
  localparam int unsigned FV_IDX_W  = $clog2(N_FV);
  localparam int unsigned MSB_IDX_W = $clog2(N_MSB);

  if (MSB_W < 2 || MSB_W >= DATA_W) begin : g_bad_msb_w
    $error("fvmsb_encoder: MSB_W must lie between 2 and DATA_W-1");
  end

  // MSB mask
  logic [MSB_W-1:0] msb_part;
  assign msb_part = in_data[DATA_W-1 -: MSB_W];

  logic                 fv_hit, msb_hit;
  logic [FV_IDX_W-1:0]  fv_idx;
  logic [MSB_IDX_W-1:0] msb_idx;
  logic [DATA_W-1:0]    fv_rd_unused;
  logic [MSB_W-1:0]     msb_rd_unused;
  logic                 fv_rdv_unused, msb_rdv_unused;

  cam_lru_table #(.W(DATA_W), .N(N_FV)) u_fv_table (
    .clk, .rst_n,
    .search_key (in_data),
    .search_hit (fv_hit),
    .search_idx (fv_idx),
    .rd_idx     (fv_idx),
    .rd_data    (fv_rd_unused),
    .rd_valid   (fv_rdv_unused),
    .upd_en     (in_valid),
    .upd_hit    (fv_hit),
    .upd_idx    (fv_idx),
    .upd_data   (in_data)
  );

  if (MSB_EN) begin : g_msb
    cam_lru_table #(.W(MSB_W), .N(N_MSB)) u_msb_table (
      .clk, .rst_n,
      .search_key (msb_part),
      .search_hit (msb_hit),
      .search_idx (msb_idx),
      .rd_idx     (msb_idx),
      .rd_data    (msb_rd_unused),
      .rd_valid   (msb_rdv_unused),
      .upd_en     (in_valid && !fv_hit),
      .upd_hit    (msb_hit),
      .upd_idx    (msb_idx),
      .upd_data   (msb_part)
    );
  end else begin : g_no_msb
    // plain FV-i: no MSB table, so the MSB path never hits
    assign msb_hit        = 1'b0;
    assign msb_idx        = '0;
    assign msb_rd_unused  = '0;
    assign msb_rdv_unused = 1'b0;
  end

  logic [DATA_W-1:0] code;
  enc_mode_e         mode;
  logic [BANK_W-1:0] bank;

  fvmsb_enc_select #(.DATA_W(DATA_W), .MSB_W(MSB_W), .I(I), .J(J),
                     .BANK_W(BANK_W)) u_select (
    .data    (in_data),
    .fv_hit  (fv_hit),
    .fv_idx  (fv_idx),
    .msb_hit (msb_hit),
    .msb_idx (msb_idx),
    .code    (code),
    .mode    (mode),
    .bank    (bank)
  );

  bus_correlator #(.W(DATA_W)) u_correlator (
    .clk, .rst_n,
    .en   (in_valid),
    .code (code),
    .bus  (bus_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_valid <= 1'b0;
      enc_mode  <= MODE_RAW;
      enc_bank  <= '0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) begin
        enc_mode <= mode;
        enc_bank <= bank;
      end
    end
  end

endmodule
