// Self-checking testbench for spi_adc_ctrl, against a behavioural model of
// the 12-bit SPI A/D converter. For extreme and random analog codes it checks
// the returned data, the done latency of 32*HALF+1 cycles, the quiet time
// with chip select high before busy clears, and that start while busy is
// ignored (one conversion per request).
module tb_spi_adc_ctrl;
  localparam int unsigned HALF = 3;

  logic        clk = 1'b0, rst = 1'b1;
  logic        start = 1'b0;
  logic        busy, done, cs_n, sclk, sdata;
  logic [11:0] data, vin = '0;
  int          conversions;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_adc_ctrl #(.HALF_CYCLES(HALF)) dut (.clk, .rst, .start, .busy, .done, .data, .cs_n, .sclk, .sdata);
  pmod_ad1_model adc (.cs_n, .sclk, .vin, .sdata, .conversions);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input logic [11:0] v, input bit poke_busy);
    int lat, c0, quiet;
    c0  = conversions;
    vin = v;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1 vin = ~v;          // converter sampled at chip select
    lat = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      lat++;
      if (poke_busy && lat == 30) begin
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        lat++;
      end
      if (lat > 1000) break;
    end
    checks++;
    if (lat != 32 * HALF + 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, 32 * HALF + 1);
    end
    checks++;
    if (data != v || conversions != c0 + 1) begin
      failures++;
      $display("analog %h: read %h, conversions %0d (was %0d)", v, data, conversions, c0);
    end
    quiet = 0;
    while (busy) begin
      @(posedge clk); #1;
      quiet++;
      if (!cs_n) break;
      if (quiet > 1000) break;
    end
    checks++;
    if (quiet != 2 * HALF || !cs_n) begin
      failures++;
      $display("quiet time %0d cycles (cs_n %b), expected %0d", quiet, cs_n, 2 * HALF);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    convert(12'h000, 0);
    convert(12'hFFF, 0);
    convert(12'hA5A, 1);
    convert(12'h800, 0);
    repeat (40) convert(12'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
