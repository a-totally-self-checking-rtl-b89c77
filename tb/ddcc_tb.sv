// ddcc_tb: checks the dynamic dual-rail code checker.
// Reference: any input pair at 00 gives 00; otherwise any pair at 11 gives
// 11; otherwise (z, z_n) = (parity, !parity) of the true rails. While cp is
// low the outputs are 00. While cp is high the dynamic outputs only rise:
// a second, different code word in the same evaluation phase gives 11.
module ddcc_tb;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cp;
  logic [W-1:0] d_t, d_f;
  logic z, z_n;
  int checks = 0, failures = 0;
  int n_code = 0, n_00 = 0, n_11 = 0;

  ddcc #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [1:0] ref_out(input logic [W-1:0] t, input logic [W-1:0] f);
    bit has00 = 0, has11 = 0;
    for (int i = 0; i < W; i++) begin
      if (!t[i] && !f[i]) has00 = 1;
      if (t[i] && f[i])   has11 = 1;
    end
    if (has00) return 2'b00;
    if (has11) return 2'b11;
    return {^t, ~^t};
  endfunction

  task automatic expect_out(input logic [1:0] e, input string what);
    checks++;
    if ({z, z_n} !== e) begin
      failures++;
      $display("FAIL (%s): t=%b f=%b cp=%b gave %b%b, expected %b", what, d_t, d_f, cp, z, z_n, e);
    end
  endtask

  initial begin
    cp = 1'b0; d_t = '0; d_f = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      logic [W-1:0] v;
      logic [1:0] e;
      // Precharge.
      @(negedge clk);
      cp = 1'b0;
      d_t = W'($urandom); d_f = W'($urandom);
      @(posedge clk); #1;
      expect_out(2'b00, "precharge");
      // Evaluate one input word.
      @(negedge clk);
      cp = 1'b1;
      v = W'($urandom);
      d_t = v; d_f = ~v;
      case ($urandom_range(0, 3))
        1: begin d_t[$urandom_range(0, W-1)] = 1'b0; end
        2: begin d_t[$urandom_range(0, W-1)] = 1'b1; d_f = d_f | (W'(1) << $urandom_range(0, W-1)); end
        3: begin d_f[$urandom_range(0, W-1)] = 1'b1; end
        default: ;
      endcase
      e = ref_out(d_t, d_f);
      if (e == 2'b00) n_00++; else if (e == 2'b11) n_11++; else n_code++;
      @(posedge clk); #1;
      expect_out(e, "evaluate");
      // Inputs back to spacer: the evaluated value is held.
      @(negedge clk);
      d_t = '0; d_f = '0;
      @(posedge clk); #1;
      expect_out(e, "hold");
      // A different code word in the same phase sets the other rail too.
      if (e == 2'b10 || e == 2'b01) begin
        @(negedge clk);
        d_t = v ^ W'(1); d_f = ~d_t;
        @(posedge clk); #1;
        expect_out(2'b11, "second word");
      end
    end
    checks++;
    if (n_code == 0 || n_00 == 0 || n_11 == 0) begin
      failures++; $display("FAIL: not all outcomes covered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
