// completion_detector: completion signal of one DCVSL stage.
//
// Each dual-rail output pair of the stage goes to an XOR gate, which is 1
// when the pair carries a valid value (01 or 10). A C-element over all the
// XOR outputs rises once every pair is valid and falls once every pair has
// returned to the 00 spacer; in between it keeps its value. A pair stuck at
// 11 never reads as valid, so a stage with such an output never completes.
//
// The XOR-per-pair plus C-element structure is that of the published design;
// a single W-input C-element (rather than a tree) is this implementation's
// choice.
//
// Interface: W pairs in (t, f), completion c out. Timing: the XORs are
// combinational and the C-element is a register updated once per model step,
// so c follows the data by one step. Reset clears c (all stages precharged).
module completion_detector #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic         c
);

  logic [W-1:0] pair_valid;

  always_comb pair_valid = d_t ^ d_f;

  // Multi-input C-element.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           c <= 1'b0;
    else if (&pair_valid) c <= 1'b1;
    else if (~|pair_valid) c <= 1'b0;
  end

endmodule
