// ape_comparator: the APE's 70-bit parallel comparator.
//
// Compares the APE's 64-bit data register and 6-bit activity register (70
// bits together) with the scalar pattern broadcast on the Data and Activity
// busses. Each bit has a "care" bit: a bit whose care bit is 0 always
// matches, so the controller can select APEs on any field of the data
// register, on any activity bits, or on both at once. Purely combinational:
// the result is ready in the same time slot.
//
//   word  : {activity register, data register}
//   pat   : pattern, same layout
//   care  : 1 where the bit takes part in the comparison
//   match : 1 when every cared-for bit of word equals pat
//
// The 70-bit width follows the source; the masked (ternary) comparison is
// this design's reading of how one comparator serves both field and
// activity selection.
module ape_comparator #(
  parameter int unsigned W = 70
) (
  input  logic [W-1:0] word,
  input  logic [W-1:0] pat,
  input  logic [W-1:0] care,
  output logic         match
);
  always_comb match = ~|((word ^ pat) & care);
endmodule
