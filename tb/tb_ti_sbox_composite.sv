// tb_ti_sbox_composite: self-checking test of the iterative three-share composite TI
// S-box for class (1,3,1) (default) and class (1,2,2).  Every input value is loaded
// many times with fresh random sharings; the output shares must XOR to the reference
// S-box, `done` must come exactly 5 clock edges after the load edge (four rotations
// plus the register between the two stages), and loading again in the `done` cycle
// must work.
module tb_ti_sbox_composite;
  import ca_sbox_pkg::*;
  import tb_sbox_tables_pkg::*;
  localparam int NI = 2;
  localparam int TABLE_IDX [NI] = '{1, 0};
  logic clk = 0, rst_n = 0, load = 0;
  logic [NI-1:0][2:0][3:0] din, dout;
  logic [NI-1:0] done;
  logic [NI-1:0][3:0] x;
  int checks = 0, failures = 0;

  ti_sbox_composite u0 (.clk, .rst_n, .load, .din(din[0]), .dout(dout[0]), .done(done[0]));
  ti_sbox_composite #(.CLASS(CLS_122)) u1 (.clk, .rst_n, .load, .din(din[1]), .dout(dout[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic share_inputs();
    for (int i = 0; i < NI; i++) begin
      din[i][0] = 4'($urandom); din[i][1] = 4'($urandom);
      din[i][2] = x[i] ^ din[i][0] ^ din[i][1];
    end
  endtask

  task automatic check_outputs();
    for (int i = 0; i < NI; i++) begin
      logic [3:0] got;
      got = dout[i][0] ^ dout[i][1] ^ dout[i][2];
      checks++;
      if (got !== sbox(TABLE_IDX[i], x[i])) begin
        failures++;
        $display("FAIL inst %0d: S(%h) = %h expected %h", i, x[i], got, sbox(TABLE_IDX[i], x[i]));
      end
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 256; n++) begin
      int cycles;
      for (int i = 0; i < NI; i++) x[i] = 4'((n + 7 * i) % 16);
      share_inputs();
      load = 1;
      @(posedge clk);
      @(negedge clk); load = 0;
      cycles = 0;
      do begin
        @(posedge clk); cycles++;
        @(negedge clk);
      end while (!done[0] && cycles < 20);
      checks++;
      if (cycles != 5 || done !== '1) begin
        failures++;
        $display("FAIL latency %0d (expected 5), done=%b", cycles, done);
      end
      check_outputs();
      if (n % 2 == 1) begin
        for (int i = 0; i < NI; i++) x[i] = 4'($urandom);
        share_inputs();
        load = 1;
        @(posedge clk);
        @(negedge clk); load = 0;
        repeat (5) @(posedge clk);
        @(negedge clk);
        checks++;
        if (done !== '1) begin failures++; $display("FAIL back-to-back done"); end
        check_outputs();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
