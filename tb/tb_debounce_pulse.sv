// Self-checking testbench for debounce_pulse (STABLE_CYCLES = 20).
// Checks: a bouncing press gives exactly one pulse, STABLE_CYCLES + 3 cycles
// after the input settles; glitches shorter than STABLE_CYCLES give none;
// bouncing on release gives none; a second press gives a second pulse; the
// pulse is one cycle wide.
module tb_debounce_pulse;
  localparam int unsigned STABLE = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic btn = 1'b0;
  logic level, press;
  int   checks = 0, failures = 0;
  int   cyc = 0, presses = 0, last_press = -1;

  always #5 clk = ~clk;

  debounce_pulse #(.STABLE_CYCLES(STABLE)) dut (.clk, .rst, .btn, .level, .press);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && press) begin
      presses    <= presses + 1;
      last_press <= cyc;
      if (last_press == cyc - 1) begin
        failures++;
        $display("pulse wider than one cycle at %0d", cyc);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic expect_presses(int n, string what);
    checks++;
    if (presses != n) begin
      failures++;
      $display("%s: %0d pulses, expected %0d", what, presses, n);
    end
  endtask

  initial begin
    int settle_cyc;
    wait_cycles(4);
    rst <= 1'b0;
    wait_cycles(50);
    expect_presses(0, "idle");

    // short glitches
    repeat (5) begin
      btn <= 1'b1; wait_cycles(STABLE / 2);
      btn <= 1'b0; wait_cycles(STABLE);
    end
    wait_cycles(100);
    expect_presses(0, "glitches");

    // bouncing press
    repeat (6) begin
      btn <= 1'b1; wait_cycles(3 + $urandom_range(5));
      btn <= 1'b0; wait_cycles(2 + $urandom_range(5));
    end
    btn <= 1'b1;
    settle_cyc = cyc;
    wait_cycles(3 * STABLE);
    expect_presses(1, "bouncing press");
    checks++;
    // settle_cyc is the cycle before the first edge that samples the new
    // level, so the block's STABLE_CYCLES + 3 appears here as + 4
    if (last_press - settle_cyc != STABLE + 4) begin
      failures++;
      $display("press latency %0d, expected %0d", last_press - settle_cyc, STABLE + 4);
    end
    checks++;
    if (!level) begin failures++; $display("level low while held"); end

    // bouncing release
    repeat (6) begin
      btn <= 1'b0; wait_cycles(3 + $urandom_range(5));
      btn <= 1'b1; wait_cycles(2 + $urandom_range(5));
    end
    btn <= 1'b0;
    wait_cycles(3 * STABLE);
    expect_presses(1, "bouncing release");
    checks++;
    if (level) begin failures++; $display("level high after release"); end

    // second press
    btn <= 1'b1; wait_cycles(3 * STABLE);
    btn <= 1'b0; wait_cycles(3 * STABLE);
    expect_presses(2, "second press");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
