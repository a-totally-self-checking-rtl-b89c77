// error_insert_tb: the error insertion point must pass the signal unchanged
// while the error line is low and invert it while it is high, bit by bit.
module error_insert_tb;
  localparam int unsigned W = 16;
  logic [W-1:0] sig_in, err, sig_out;
  int checks = 0, failures = 0;

  error_insert #(.W(W)) dut (.*);

  initial begin
    for (int k = 0; k < 500; k++) begin
      sig_in = W'($urandom);
      err = (k % 3 == 0) ? '0 : W'($urandom);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sig_out[i] !== (err[i] ? !sig_in[i] : sig_in[i])) begin
          failures++;
          $display("FAIL: bit %0d in=%b err=%b out=%b", i, sig_in[i], err[i], sig_out[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
