// ddcc: dynamic dual-rail code checker (DDCC) at the output of the last
// pipeline stage.
//
// It is a W-input dynamic dual-rail XOR gate clocked by the last stage's
// local clock cp. While cp is low both outputs are precharged to 00. While
// cp is high the gate evaluates: with every input pair complementary it gives
// a complementary (z, z_n), z = 1 for an odd number of true inputs; an input
// pair at 00 leaves the outputs at 00 and a pair at 11 drives them to 11. A
// pipeline that has stopped leaves the last stage precharged or without
// valid data, so the checker then shows 00. Only 01 and 10 mean "correct".
//
// The function, the clocking by the last stage's cp and the construction from
// seven two-input gates follow the published design.
//
// Structure: the evaluation network is a chain of W-1 two-input dual-rail
// XORs (seven for the 8-bit checker). The dynamic output nodes are modelled
// as registers updated once per model step: cleared while cp is low, and
// while cp is high set (never cleared) by the network, as a discharged
// dynamic node stays discharged until the next precharge. Which output rail
// carries odd parity is this implementation's choice.
module ddcc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cp,
  input  logic [W-1:0] d_t,
  input  logic [W-1:0] d_f,
  output logic         z,
  output logic         z_n
);

  // Partial parity after each input: chain_t[i]/chain_f[i] cover d[0..i].
  logic [W-1:0] chain_t, chain_f;

  assign chain_t[0] = d_t[0];
  assign chain_f[0] = d_f[0];

  for (genvar i = 1; i < W; i++) begin : g_chain
    dr_xor2 u_xor (
      .a_t(chain_t[i-1]), .a_f(chain_f[i-1]),
      .b_t(d_t[i]),       .b_f(d_f[i]),
      .y_t(chain_t[i]),   .y_f(chain_f[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z   <= 1'b0;
      z_n <= 1'b0;
    end else if (!cp) begin
      z   <= 1'b0;
      z_n <= 1'b0;
    end else begin
      z   <= z   | chain_t[W-1];
      z_n <= z_n | chain_f[W-1];
    end
  end

endmodule
