// Full-size testbench: the test circuit with every parameter at its default
// (100 MHz clock, 1 us control period, 10 ms button filter, 12.5 MHz SPI,
// REG_FREEZE reset value 1000) runs one complete test cycle on the
// single-cell pulse stimulus: REG_IN_08 = 0x8BA, which a 12-bit converter
// with a 3.3 V reference turns into 1.80 V, every other cell at the 1.65 V
// analog ground (0x800). The CNN, D/A and A/D converters are behavioural
// models. Checks: the pulse code and its voltage, the D/A codes sent in cell
// order, FREEZE high for 1000 us, 33 clkCNN falling edges, one evolution,
// and every REG_OUT_xx equal to the model's evolution of the stimulus.
module tb_cnn_tester_full;
  localparam real VREF = 3.3;

  logic        clk = 1'b0;
  logic        btn_reset = 1'b0, btn_start = 1'b0, btn_inc = 1'b0, btn_dec = 1'b0;
  logic [5:0]  sw_sel = 6'd24;
  logic        sw_power_force = 1'b0;
  logic        led, dp;
  logic [3:0]  an;
  logic [6:0]  seg;
  logic        cnn_init_n, cnn_clk, cnn_power_up_n, cnn_freeze;
  logic        da_sync_n, da_sclk, da_din, ad_cs_n, ad_sclk, ad_sdata;
  logic        host_we = 1'b0;
  logic [5:0]  host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  logic [3:0]  state, cell_idx;

  logic [11:0] dac_code, cnn_vout;
  logic [1:0]  dac_pd;
  int          dac_frames, dac_aborted, adc_convs;
  int          loads, saves, evolutions, unpowered, proto_err;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnn_tester_top dut (.*);

  pmod_da2_model u_da (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din), .code(dac_code),
                       .pd(dac_pd), .frames(dac_frames), .aborted(dac_aborted));
  cnn16_model    u_cnn (.init_n(cnn_init_n), .clk_cnn(cnn_clk), .power_up_n(cnn_power_up_n),
                        .freeze(cnn_freeze), .vin(dac_code), .vout(cnn_vout), .loads, .saves,
                        .evolutions, .unpowered_freezes(unpowered), .protocol_errors(proto_err));
  pmod_ad1_model u_ad (.cs_n(ad_cs_n), .sclk(ad_sclk), .vin(cnn_vout), .sdata(ad_sdata),
                       .conversions(adc_convs));

  int   n_clk_fall = 0, freeze_cyc = 0, led_rises = 0;
  logic p_clk = 1'b1, p_led = 1'b0;
  int   dac_seq [$];
  always @(posedge clk) begin
    if (p_clk && !cnn_clk) n_clk_fall++;
    if (cnn_freeze) freeze_cyc++;
    if (led && !p_led) led_rises++;
    p_clk = cnn_clk;
    p_led = led;
  end
  always @(dac_frames) if (dac_frames > 0) dac_seq.push_back(int'(dac_code));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int stim [16], exp [16];
    real volts;
    #1 btn_reset = 1'b1;
    repeat (5) @(posedge clk);
    btn_reset = 1'b0;
    repeat (5) @(posedge clk);
    n_clk_fall = 0; freeze_cyc = 0; led_rises = 0;

    for (int i = 0; i < 16; i++) stim[i] = 'h800;
    stim[8] = 'h8BA;
    volts = real'(stim[8]) * VREF / 4096.0;
    check(volts > 1.795 && volts < 1.805, $sformatf("pulse code gives %f V", volts));
    @(negedge clk) begin host_we = 1'b1; host_addr = 6'd8; host_wdata = 16'h08BA; end
    @(negedge clk) host_we = 1'b0;

    // START: a few bounces, then held for 12 ms and released
    repeat (3) begin
      btn_start = 1'b1; repeat (20000) @(posedge clk);
      btn_start = 1'b0; repeat (20000) @(posedge clk);
    end
    btn_start = 1'b1; repeat (1_200_000) @(posedge clk);
    btn_start = 1'b0;
    wait (led_rises > 0 && !led);
    repeat (1000) @(posedge clk);

    for (int i = 0; i < 16; i++) begin
      automatic int l = stim[(i > 0) ? i - 1 : 0];
      automatic int r = stim[(i < 15) ? i + 1 : 15];
      exp[i] = (l + 2 * stim[i] + r + 2) / 4;
    end
    check(led_rises == 1, $sformatf("%0d test cycles", led_rises));
    check(dac_seq.size() == 16 && dac_aborted == 0, $sformatf("%0d D/A frames", dac_seq.size()));
    for (int i = 0; i < 16 && i < dac_seq.size(); i++)
      check(dac_seq[i] == stim[i], $sformatf("D/A frame %0d code %h, expected %h", i, dac_seq[i], stim[i]));
    check(adc_convs == 16, $sformatf("%0d A/D conversions", adc_convs));
    check(n_clk_fall == 33, $sformatf("%0d clkCNN falling edges", n_clk_fall));
    check(freeze_cyc == 1000 * 100, $sformatf("FREEZE high %0d cycles", freeze_cyc));
    check(evolutions == 1 && unpowered == 0 && proto_err == 0,
          $sformatf("evolutions %0d unpowered %0d protocol errors %0d", evolutions, unpowered, proto_err));
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) host_addr = 6'(16 + i);
      #1 check(int'(host_rdata) == exp[i],
               $sformatf("REG_OUT_%02d = %h, expected %h", i, host_rdata, exp[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
