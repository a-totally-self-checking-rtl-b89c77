// handshake_cell_tb: checks the handshake cell against its truth table.
// Precharge (cp=0) when the stage and the next stage have completed, enable
// (cp=1) when the stage has precharged and the second next stage has
// completed, otherwise hold; cp is 1 after initialisation. Random input
// sequences cover every input combination from both output values.
module handshake_cell_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic c_self, c_next, c_next2_n, cp;
  int checks = 0, failures = 0;
  logic exp_cp;
  int seen [8][2];

  handshake_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    c_self = 0; c_next = 0; c_next2_n = 1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cp !== 1'b1) begin failures++; $display("FAIL: cp not 1 after reset"); end
    rst_n = 1'b1;
    exp_cp = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      {c_self, c_next, c_next2_n} = 3'($urandom);
      seen[{c_self, c_next, c_next2_n}][exp_cp]++;
      // Truth table of the cell.
      case ({c_self, c_next, c_next2_n})
        3'b110, 3'b111: exp_cp = 1'b0;   // stage and next stage complete
        3'b000, 3'b010: exp_cp = 1'b1;   // stage precharged, C3 = 1
        default:        exp_cp = exp_cp; // hold
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (cp !== exp_cp) begin
        failures++;
        $display("FAIL: inputs C1=%b C2=%b C3_N=%b gave cp=%b, expected %b",
                 c_self, c_next, c_next2_n, cp, exp_cp);
      end
    end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 2; j++) begin
      checks++;
      if (seen[i][j] == 0) begin failures++; $display("FAIL: case %0d/%0d not covered", i, j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
