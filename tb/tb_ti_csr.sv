// tb_ti_csr: self-checking test of the cyclic shift register.
// Loads random nibbles and checks the four left rotations on the following cycles,
// the return to the loaded value after four shifts, and a reload in mid-rotation.
module tb_ti_csr;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] din, q;
  int checks = 0, failures = 0;

  ti_csr dut (.clk, .rst_n, .load, .din, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [3:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      logic [3:0] v;
      v = 4'($urandom);
      @(negedge clk); din = v; load = 1;
      @(negedge clk); load = 0;
      check(v, "after load");
      @(negedge clk); check({v[2:0], v[3]}, "rot1");
      @(negedge clk); check({v[1:0], v[3:2]}, "rot2");
      @(negedge clk); check({v[0], v[3:1]}, "rot3");
      @(negedge clk); check(v, "rot4");
    end
    // reload during rotation
    @(negedge clk); din = 4'b1000; load = 1;
    @(negedge clk); din = 4'b0110; load = 1;
    @(negedge clk); load = 0;
    check(4'b0110, "reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
