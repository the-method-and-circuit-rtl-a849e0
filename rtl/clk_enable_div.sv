// Clock-enable divider.
//
// The whole test circuit runs from the 100 MHz board oscillator; slower
// clocks are obtained by division. Rather than building divided clock nets,
// this block produces a one-cycle enable pulse `tick` every DIV cycles of
// `clk`, and the slower logic advances only on that pulse. The period of
// `tick` is the "clock of the Stim&Response Control block" in which the RUN3
// duration (REG_FREEZE) and all waits are counted.
//
// Interface: `clk`, synchronous active-high `rst`, output `tick`.
// Timing: after reset, `tick` is high in cycle DIV-1, 2*DIV-1, ... (counted
// from the first cycle after reset), one cycle wide. DIV = 1 keeps it high.
// The default DIV = 100 (1 MHz control clock, 1 us resolution) is this
// design's choice; the source gives only the 100 MHz input.
module clk_enable_div #(
  parameter int unsigned DIV = 100
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == LAST) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 1) else $error("DIV must be at least 1");
endmodule
