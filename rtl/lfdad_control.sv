// lfdad_control: the handshake ring of a latch-free dynamic asynchronous
// datapath of N stages.
//
// One handshake cell per stage. The cell of stage i takes the completion
// signal of stage i, that of stage i+1 and the complement of that of stage
// i+2, indices taken modulo N, so the last two cells close the ring onto the
// first stages (for 8 stages: cell 7 sees C7, C8, C1_N and cell 8 sees C8,
// C1, C2_N). Each stage therefore evaluates, holds its result until the next
// stage has evaluated, precharges, and is re-enabled once the second next
// stage has evaluated; the last stage holds its output until the first stage
// has taken the next operand. No latches sit between the stages.
//
// The ring wiring is the published one (4 stages in the generic pipeline, 8
// in the divider); forming C_N with an inverter here is a choice of this
// implementation.
//
// Interface: completion signals c[N] in, local clocks cp[N] out. Timing: one
// model step per handshake cell. N must be at least 3.
module lfdad_control #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  output logic [N-1:0] cp
);

  for (genvar i = 0; i < N; i++) begin : g_hs
    handshake_cell u_hs (
      .clk      (clk),
      .rst_n    (rst_n),
      .c_self   (c[i]),
      .c_next   (c[(i + 1) % N]),
      .c_next2_n(~c[(i + 2) % N]),
      .cp       (cp[i])
    );
  end

  if (N < 3) begin : g_bad_n
    $error("lfdad_control needs at least 3 stages");
  end

endmodule
