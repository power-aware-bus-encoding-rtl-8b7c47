// codec_probe -- testbench helper: one fvmsb_codec of a given configuration
// with a checker on its far side. It compares every decoded word with the
// word sent (two cycles earlier), and counts words, errors, the modes used
// and the data-bus transitions of the encoded and of the unencoded stream.
module codec_probe #(
  parameter int unsigned MSB_W = 18,
  parameter int unsigned I     = 2,
  parameter int unsigned J     = 2,
  parameter bit          MSB_EN = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output int          n_words,
  output int          n_errors,
  output int          n_fv,
  output int          n_msb,
  output longint      raw_tr,
  output longint      bus_tr
);
  localparam int unsigned BW = (I > J) ? ((I == 0) ? 1 : I) : ((J == 0) ? 1 : J);
  logic              bus_valid, out_valid;
  logic [31:0]       bus_data, out_data, prev_bus, prev_raw;
  logic [1:0]        enc_mode;
  logic [BW-1:0]     enc_bank;
  logic [31:0]       sent[$];

  fvmsb_codec #(.DATA_W(32), .MSB_W(MSB_W), .I(I), .J(J), .MSB_EN(MSB_EN)) u_codec (.*);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_words <= 0; n_errors <= 0; n_fv <= 0; n_msb <= 0;
      raw_tr <= 0; bus_tr <= 0; prev_bus <= '0; prev_raw <= '0;
      sent.delete();
    end else begin
      if (in_valid) begin
        sent.push_back(in_data);
        raw_tr   <= raw_tr + $countones(in_data ^ prev_raw);
        prev_raw <= in_data;
      end
      if (bus_valid) begin
        bus_tr   <= bus_tr + $countones(bus_data ^ prev_bus);
        prev_bus <= bus_data;
        if (enc_mode == 2'd1) n_fv  <= n_fv + 1;
        if (enc_mode == 2'd2) n_msb <= n_msb + 1;
      end
      if (out_valid) begin
        n_words <= n_words + 1;
        if (sent.size() == 0 || out_data != sent[0]) n_errors <= n_errors + 1;
        if (sent.size() != 0) void'(sent.pop_front());
      end
    end
  end
endmodule
