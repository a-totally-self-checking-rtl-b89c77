// error_insert: error insertion point for fault experiments.
//
// The signal under test passes through an XOR whose other input is the error
// line: while err is high the signal is inverted, which injects a transient
// (or, held high, a permanent) error of either polarity at that point.
// W parallel signals can be covered by one instance. Purely combinational.
// The XOR insertion point is the one used in the published fault
// experiments; where such points sit in the divider is set by tsc_divider.
module error_insert #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] sig_in,
  input  logic [W-1:0] err,
  output logic [W-1:0] sig_out
);

  always_comb sig_out = sig_in ^ err;

endmodule
