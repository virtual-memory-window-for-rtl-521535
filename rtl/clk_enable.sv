// Clock enable for the slow clock domain: `ce` is high for one cycle of
// `clk` out of every RATIO (the slow clock's period is RATIO fast periods).
// A counter from 0 to RATIO-1; ce is high when it holds RATIO-1. With
// RATIO = 1 the enable is always high. Synchronous active-low reset.
module clk_enable #(
  parameter int unsigned RATIO = 4,
  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);
  logic [CW-1:0] cnt;
  always_ff @(posedge clk) begin
    if (!rst_n || cnt == CW'(RATIO - 1)) cnt <= '0;
    else                                 cnt <= cnt + 1'b1;
  end
  assign ce = (cnt == CW'(RATIO - 1));
endmodule
