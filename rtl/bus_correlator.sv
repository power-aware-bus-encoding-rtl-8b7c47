// bus_correlator -- transmit-side correlator of the FV-i-MSB-j codec.
//
// The next bus value is the selected code XORed with the present bus value:
// bus(t) = code(t) ^ bus(t-1). A one-hot code therefore toggles exactly one
// bus line, and an all-zero code leaves the bus untouched. This is the
// original scheme's correlator; the register that holds the previous bus value
// is the bus driver itself.
//
// Timing: when en is high, bus takes the new value at the rising clock edge,
// one cycle after the code is presented. Synchronous active-low reset clears
// the bus to zero; the receiving bus_decorrelator assumes the same.
module bus_correlator #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] code,
  output logic [W-1:0] bus
);

  always_ff @(posedge clk) begin
    if (!rst_n)  bus <= '0;
    else if (en) bus <= bus ^ code;
  end

endmodule
