// tb_ti_demux: self-checking test of the output De-MUX: each select value writes
// exactly its own output bit (0 -> A = q[3], 3 -> D = q[0]), the others hold, and
// nothing is written while `en` is low.
module tb_ti_demux;
  logic clk = 0, rst_n = 0, en = 0, din = 0;
  logic [1:0] sel = 0;
  logic [3:0] q, model;
  int checks = 0, failures = 0;

  ti_demux dut (.clk, .rst_n, .en, .sel, .din, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      en  = ($urandom % 4) != 0;
      sel = 2'($urandom);
      din = 1'($urandom);
      @(negedge clk);
      if (en) begin
        case (sel)
          2'd0: model[3] = din;
          2'd1: model[2] = din;
          2'd2: model[1] = din;
          2'd3: model[0] = din;
        endcase
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d en=%b sel=%0d din=%b q=%b expected %b", n, en, sel, din, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
