// ti_demux: output De-MUX of one share of the iterative S-box.
//
// The CA-rule core produces one output bit of the share per clock.  The De-MUX
// steers it, under control of the 2-bit state, into output bit A (state 0), B (1),
// C (2) or D (3) of that share.  Because the core output is valid for one cycle only,
// each De-MUX output is held in a flip-flop that is written when it is selected and
// `en` is high; this holding register is this design's reading of the De-MUX.
//
// Interface: `q` = {A,B,C,D} of the share.  Timing: the selected bit of `q` takes
// `din` at the clock edge at which it is selected.
module ti_demux (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] sel,
  input  logic       din,
  output logic [3:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q[2'd3 - sel] <= din;
  end
endmodule
