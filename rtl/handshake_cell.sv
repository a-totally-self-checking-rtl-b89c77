// handshake_cell: the domino-style handshake cell (HS) that clocks one stage
// of the latch-free dynamic asynchronous pipeline.
//
// The cell has a pull-down stack gated by the stage's own completion signal
// C1 and the next stage's completion C2, and a pull-up stack gated by C1 and
// by C3_N, the complement of the second next stage's completion. Its output
// node, buffered, is the stage's local clock CP1:
//   C1 & C2        -> CP1 = 0 : the stage precharges (the next stage has
//                               taken its data);
//   !C1 & !C3_N    -> CP1 = 1 : the stage is enabled to evaluate again (it
//                               has precharged and the second next stage has
//                               completed);
//   otherwise      -> CP1 keeps its value (Evaluation Hold, or precharge
//                               waiting for the second next stage).
// The two stacks share C1, so they are never on together. The stack order
// and the three inputs follow the published transistor diagram; the levels
// they produce follow its timing diagram.
//
// Timing model: the output node is a register updated once per model step
// (clk), i.e. the cell has a delay of one step. Initialisation (rst_n low)
// sets CP1 = 1 so every stage starts enabled, as the design requires after
// initialisation.
module handshake_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic c_self,     // C1: completion of this stage
  input  logic c_next,     // C2: completion of the next stage
  input  logic c_next2_n,  // C3_N: complement of the second next completion
  output logic cp          // CP1: local clock, 1 = evaluate, 0 = precharge
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    cp <= 1'b1;
    else if (c_self && c_next)     cp <= 1'b0;
    else if (!c_self && !c_next2_n) cp <= 1'b1;
  end

endmodule
