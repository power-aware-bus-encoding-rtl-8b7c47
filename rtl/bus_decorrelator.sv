// bus_decorrelator -- receive-side de-correlator of the FV-i-MSB-j codec.
//
// It keeps the last bus value it accepted and XORs it with the bus value now
// arriving, which undoes bus_correlator: code(t) = bus(t) ^ bus(t-1). This is
// the original scheme's de-correlator.
//
// Timing: code is combinational from bus_in. When en is high the arriving
// value is stored at the rising clock edge and becomes the reference for the
// next word. Synchronous active-low reset sets the reference to zero, the same
// value bus_correlator starts from.
module bus_decorrelator #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] bus_in,
  output logic [W-1:0] code
);

  logic [W-1:0] prev;

  always_ff @(posedge clk) begin
    if (!rst_n)  prev <= '0;
    else if (en) prev <= bus_in;
  end

  assign code = bus_in ^ prev;

endmodule
