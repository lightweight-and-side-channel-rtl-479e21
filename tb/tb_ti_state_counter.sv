// tb_ti_state_counter: self-checking test of the 2-bit state counter: modulo-4
// counting, synchronous clear at arbitrary points, and reset value.
module tb_ti_state_counter;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [1:0] state;
  int checks = 0, failures = 0;
  int exp;

  ti_state_counter dut (.clk, .rst_n, .clear, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (state !== 2'd0) begin failures++; $display("FAIL reset value %0d", state); end
    @(posedge clk);
    @(negedge clk); rst_n = 1;
    exp = 0;
    for (int n = 0; n < 400; n++) begin
      logic c;
      c = ($urandom % 7) == 0;
      clear = c;
      @(negedge clk);
      exp = c ? 0 : (exp + 1) % 4;
      checks++;
      if (state !== 2'(exp)) begin
        failures++;
        $display("FAIL cycle %0d: state=%0d expected %0d", n, state, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
