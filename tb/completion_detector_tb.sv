// completion_detector_tb: drives random dual-rail words (biased towards all
// valid, all spacer and mixed) and checks the completion output against a
// C-element reference: 1 once every pair is 01/10, 0 once every pair is 00
// or 11, unchanged otherwise. Reset value is 0.
module completion_detector_tb;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d_t, d_f;
  logic c;
  logic exp_c;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0, n_hold = 0;

  completion_detector #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    d_t = '0; d_f = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (c !== 1'b0) begin failures++; $display("FAIL: c not 0 after reset"); end
    rst_n = 1'b1;
    exp_c = 1'b0;
    for (int k = 0; k < 3000; k++) begin
      logic [W-1:0] v;
      int nvalid;
      @(negedge clk);
      v = W'($urandom);
      case ($urandom_range(0, 3))
        0: begin d_t = v; d_f = ~v; end                  // all valid
        1: begin d_t = '0; d_f = '0; end                 // all spacer
        2: begin d_t = v & W'($urandom); d_f = ~v & W'($urandom); end // partial
        default: begin d_t = W'($urandom); d_f = W'($urandom); end
      endcase
      nvalid = 0;
      for (int i = 0; i < W; i++) if (d_t[i] != d_f[i]) nvalid++;
      if (nvalid == W)      begin if (!exp_c) n_rise++; exp_c = 1'b1; end
      else if (nvalid == 0) begin if (exp_c) n_fall++;  exp_c = 1'b0; end
      else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL: t=%b f=%b gave c=%b, expected %b", d_t, d_f, c, exp_c);
      end
    end
    checks++;
    if (n_rise == 0 || n_fall == 0 || n_hold == 0) begin
      failures++; $display("FAIL: rise/fall/hold not all seen");
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
