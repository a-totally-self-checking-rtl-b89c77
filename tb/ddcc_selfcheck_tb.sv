// ddcc_selfcheck_tb: checks that the checker's evaluation network is itself
// self-checking for single stuck-at faults on its internal rails.
//
// The network of the 8-input checker is a chain of seven two-input dual-rail
// XORs. This bench builds that chain from dr_xor2 with an XOR insertion
// point on both rails between every pair of gates, and applies each single
// stuck-at fault (rail stuck at 0 or at 1, 28 faults) with all 256 valid
// input words. Two properties are checked:
//   fault-secure - no input gives a code word of the wrong parity;
//   self-testing - for every fault some valid input gives a non-code output
//                  (00 or 11), so the fault shows up in normal operation.
module ddcc_selfcheck_tb;
  localparam int unsigned W = 8;

  logic [W-1:0] d_t, d_f;
  logic [W-1:0] ch_t, ch_f;      // chain outputs, fault applied
  logic [W-1:0] raw_t, raw_f;    // chain outputs before the fault
  logic [W-1:0] flip_t, flip_f;  // insertion points
  int checks = 0, failures = 0;

  always_comb begin
    raw_t[0] = d_t[0];
    raw_f[0] = d_f[0];
  end
  always_comb begin
    ch_t = raw_t ^ flip_t;
    ch_f = raw_f ^ flip_f;
  end

  for (genvar i = 1; i < W; i++) begin : g_chain
    dr_xor2 u_x (.a_t(ch_t[i-1]), .a_f(ch_f[i-1]), .b_t(d_t[i]), .b_f(d_f[i]),
                 .y_t(raw_t[i]), .y_f(raw_f[i]));
  end

  initial begin
    flip_t = '0; flip_f = '0;
    // Fault-free network first.
    for (int v = 0; v < 256; v++) begin
      d_t = W'(v); d_f = ~W'(v);
      #1;
      checks++;
      if (ch_t[W-1] != ^W'(v) || ch_f[W-1] != !(^W'(v))) begin
        failures++; $display("FAIL: fault-free network wrong for %h", v);
      end
    end
    // Single stuck-at faults on the output rails of every gate of the chain,
    // the final pair included.
    for (int node = 0; node < W; node++)
      for (int rail = 0; rail < 2; rail++)
        for (int sa = 0; sa < 2; sa++) begin
          bit detected;
          if (node == 0) continue;  // node 0 is an input pair, tested in ddcc_tb
          detected = 1'b0;
          for (int v = 0; v < 256; v++) begin
            d_t = W'(v); d_f = ~W'(v);
            flip_t = '0; flip_f = '0;
            #1;
            // Force the rail to the stuck value by flipping it when it differs.
            if (rail == 0 && raw_t[node] != 1'(sa)) flip_t[node] = 1'b1;
            if (rail == 1 && raw_f[node] != 1'(sa)) flip_f[node] = 1'b1;
            #1;
            if (ch_t[W-1] == ch_f[W-1]) detected = 1'b1;
            else begin
              checks++;
              if (ch_t[W-1] != ^W'(v)) begin
                failures++;
                $display("FAIL: node %0d rail %0d stuck-at-%0d gives a wrong code word for %h",
                         node, rail, sa, v);
              end
            end
          end
          checks++;
          if (!detected) begin
            failures++;
            $display("FAIL: node %0d rail %0d stuck-at-%0d never shows", node, rail, sa);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
