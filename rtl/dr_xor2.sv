// dr_xor2: two-input dual-rail XOR, the evaluation network of one dynamic
// dual-rail XOR gate of the data checker.
//
// Each output rail is a monotone (AND-OR) function of the input rails:
//   y_t = a_t & b_f | a_f & b_t    (a XOR b = 1)
//   y_f = a_t & b_t | a_f & b_f    (a XOR b = 0)
// so two valid pairs give a valid pair, a 00 input gives 00 (no path) and a
// 11 input next to a valid one gives 11 (both paths). The checker of the
// published design is composed of such two-input gates. Combinational; the
// precharge and hold of the dynamic node are in the checker that uses it.
module dr_xor2 (
  input  logic a_t,
  input  logic a_f,
  input  logic b_t,
  input  logic b_f,
  output logic y_t,
  output logic y_f
);

  always_comb begin
    y_t = (a_t & b_f) | (a_f & b_t);
    y_f = (a_t & b_t) | (a_f & b_f);
  end

endmodule
