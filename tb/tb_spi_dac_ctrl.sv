// Self-checking testbench for spi_dac_ctrl, against a behavioural model of
// the 12-bit SPI D/A converter. Sends the extreme codes and random codes and
// checks for each: the code and the power-down bits the converter latched,
// one complete 16-bit frame, the done latency of 33*HALF+1 cycles, and that
// a start request while busy is ignored.
module tb_spi_dac_ctrl;
  localparam int unsigned HALF = 3;

  logic        clk = 1'b0, rst = 1'b1;
  logic        start = 1'b0;
  logic [11:0] data = '0;
  logic        busy, done, sync_n, sclk, din;
  logic [11:0] code;
  logic [1:0]  pd;
  int          frames, aborted;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_dac_ctrl #(.HALF_CYCLES(HALF)) dut (.clk, .rst, .start, .data, .busy, .done, .sync_n, .sclk, .din);
  pmod_da2_model dac (.sync_n, .sclk, .din, .code, .pd, .frames, .aborted);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [11:0] v, input bit poke_busy);
    int lat, f0;
    f0 = frames;
    @(posedge clk);
    start <= 1'b1; data <= v;
    @(posedge clk);
    start <= 1'b0; data <= ~v;   // data must have been captured
    lat = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      lat++;
      if (poke_busy && lat == 40) begin
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        lat++;
      end
      if (lat > 1000) break;
    end
    checks++;
    if (lat != 33 * HALF + 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 33 * HALF + 1);
    end
    @(posedge clk); #1;
    checks++;
    if (code != v || pd != 2'b00 || frames != f0 + 1 || !sync_n) begin
      failures++;
      $display("sent %h: DAC code %h pd %b frames %0d (was %0d) sync_n %b", v, code, pd, frames, f0, sync_n);
    end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    send(12'h000, 0);
    send(12'hFFF, 0);
    send(12'h8BA, 1);
    send(12'h800, 0);
    repeat (40) send(12'($urandom), 0);
    repeat (5 * HALF * 33) @(posedge clk);
    checks++;
    if (frames != 44 || aborted != 0) begin
      failures++;
      $display("frames %0d aborted %0d, expected 44 and 0", frames, aborted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
