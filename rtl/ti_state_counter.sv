// ti_state_counter: the 2-bit "State" counter (S1,S0) of the iterative S-box.
//
// The count says which rotation the shift registers currently present and hence
// which output bit (0 = A ... 3 = D) the CA-rule core is producing.  It depends only
// on the clock and on the load strobe, never on share values, so it is not masked.
// It counts modulo 4 and is cleared by `clear` (the S-box load); the clear input is
// this design's addition so that the count is aligned with the shift registers.
//
// Timing: `state` is 0 in the first cycle after `clear` and increments each clock.
module ti_state_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  output logic [1:0] state
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= 2'd0;
    else if (clear)  state <= 2'd0;
    else             state <= state + 2'd1;
  end
endmodule
