// Self-checking testbench for clk_enable_div: with DIV = 5 the tick must be
// one cycle wide, arrive first 5 cycles after reset is released and then
// every 5 cycles. A second instance with DIV = 1 must tick every cycle.
module tb_clk_enable_div;
  localparam int unsigned DIV = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic tick, tick1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_enable_div #(.DIV(DIV)) dut  (.clk, .rst, .tick);
  clk_enable_div #(.DIV(1))   dut1 (.clk, .rst, .tick(tick1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, nticks;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cyc = 0; last = 0; nticks = 0;
    repeat (200) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) begin
        checks++;
        if (nticks == 0 ? (cyc != DIV) : (cyc - last != DIV)) begin
          failures++;
          $display("tick %0d at cycle %0d, previous at %0d", nticks, cyc, last);
        end
        last = cyc;
        nticks++;
      end
      checks++;
      if (!tick1) begin failures++; $display("DIV=1 tick missing at cycle %0d", cyc); end
    end
    checks++;
    if (nticks != 200 / DIV) begin
      failures++;
      $display("expected %0d ticks, saw %0d", 200 / DIV, nticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
