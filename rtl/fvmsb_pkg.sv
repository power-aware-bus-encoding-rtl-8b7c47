// fvmsb_pkg -- types and helper functions shared by the FV-i-MSB-j bus codec.
//
// The codec sends every data word in one of three forms, told apart by a
// two-bit mode on the encode-signal lines that run beside the data bus:
//   MODE_FV  : the word is in the frequent-value (FV) table; the bus carries
//              a one-hot code for its slot.
//   MODE_MSB : only the upper MSB_W bits are in the MSB table; the bus carries
//              a one-hot code for that slot in its upper MSB_W bits and the
//              unencoded lower bits below it.
//   MODE_RAW : neither table holds the word; the bus carries it unencoded.
// The three cases are the original scheme's selection table; the two-bit
// binary mode field that names them is this design's own choice.
package fvmsb_pkg;

  typedef enum logic [1:0] {
    MODE_RAW = 2'b00,
    MODE_FV  = 2'b01,
    MODE_MSB = 2'b10
  } enc_mode_e;

  // Width of the bank field on the encode-signal lines: enough for the
  // larger of the FV bank count (2**I) and the MSB bank count (2**J), and
  // never below one bit so that the port always exists.
  function automatic int unsigned bank_width(input int unsigned i_ext,
                                             input int unsigned j_ext);
    int unsigned w;
    w = (i_ext > j_ext) ? i_ext : j_ext;
    return (w == 0) ? 1 : w;
  endfunction

endpackage
