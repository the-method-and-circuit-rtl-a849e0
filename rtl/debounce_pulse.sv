// Push-button suppression circuit.
//
// A mechanical button bounces for a few milliseconds. This block synchronises
// the raw button level to `clk` with two flip-flops, accepts a new level only
// after it has been stable for STABLE_CYCLES consecutive cycles, and emits a
// single one-cycle pulse on `press` for every accepted press (low-to-high
// transition of the filtered level). `level` is the filtered level itself.
//
// The original design states only that the START, INC and DEC commands pass
// through a suppression circuit; the counter filter and its 10 ms default
// (1,000,000 cycles at 100 MHz) are this design's choice.
//
// Timing: `press` rises STABLE_CYCLES + 3 cycles after the button input
// settles high (2 synchroniser stages, the filter, the edge register).
module debounce_pulse #(
  parameter int unsigned STABLE_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,      // raw, asynchronous, active high
  output logic level,    // debounced level
  output logic press     // one-cycle pulse per press
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          sync1, sync2;
  logic [CW-1:0] cnt;
  logic          level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1   <= 1'b0;
      sync2   <= 1'b0;
      cnt     <= '0;
      level   <= 1'b0;
      level_q <= 1'b0;
      press   <= 1'b0;
    end else begin
      sync1   <= btn;
      sync2   <= sync1;
      level_q <= level;
      press   <= level & ~level_q;
      if (sync2 == level) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= sync2;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (STABLE_CYCLES >= 1) else $error("STABLE_CYCLES must be at least 1");
endmodule
