// End-to-end testbench of the CNN test circuit at reduced timing parameters.
//
// The test circuit is connected, as on the bench, to behavioural models of
// the 12-bit SPI D/A converter, the 12-bit SPI A/D converter and the digital
// interface of a 16-cell CNN whose evolution rule is known (see
// cnn16_model). Buttons are pressed with contact bounce. Two complete test
// cycles are run:
//   1. the single-cell pulse: REG_IN_08 = 0x8BA (about 1.8 V), every other
//      cell at the analog ground 0x800 (1.65 V); INC and DEC buttons adjust
//      REG_IN_03, REG_IN_05 and REG_FREEZE first; a second START, an INC
//      and an INC on a response register are pressed while the cycle runs;
//   2. random stimuli written through the host port, REG_FREEZE = 0 and the
//      POWER_UP force switch on.
// After each cycle every REG_OUT_xx (read through the host port and, for one
// cell, from the 7-segment display) must equal the model's evolution of the
// stimuli, the converters must have seen 16 frames each, FREEZE must have
// lasted REG_FREEZE control periods, clkCNN must have fallen 33 times and
// the state output must have passed RUN1..RUN5 (0011..0111) in order.
// Each mechanism (bounce suppression, inc, dec, locked inc, response
// register inc ignored, START ignored while running, minimum RUN3, forced
// POWER_UP, display) is counted and must occur at least once.
module tb_cnn_tester_top;
  localparam int unsigned CTRL_DIV = 4;
  localparam int unsigned DEB      = 8;
  localparam int unsigned REFRESH  = 4;
  localparam int unsigned SPI_HALF = 2;

  logic        clk = 1'b0;
  logic        btn_reset = 1'b0, btn_start = 1'b0, btn_inc = 1'b0, btn_dec = 1'b0;
  logic [5:0]  sw_sel = '0;
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

  cnn_tester_top #(
    .CTRL_DIV(CTRL_DIV), .DEBOUNCE_CYCLES(DEB), .REFRESH_CYCLES(REFRESH), .SPI_HALF(SPI_HALF),
    .RUN1_TICKS(3), .RUN2_TICKS(3), .RUN4_TICKS(3), .RUN5_TICKS(3), .SETTLE_TICKS(1),
    .FREEZE_RESET(16'd12)
  ) dut (.*);

  pmod_da2_model u_da (.sync_n(da_sync_n), .sclk(da_sclk), .din(da_din), .code(dac_code),
                       .pd(dac_pd), .frames(dac_frames), .aborted(dac_aborted));
  cnn16_model    u_cnn (.init_n(cnn_init_n), .clk_cnn(cnn_clk), .power_up_n(cnn_power_up_n),
                        .freeze(cnn_freeze), .vin(dac_code), .vout(cnn_vout), .loads, .saves,
                        .evolutions, .unpowered_freezes(unpowered), .protocol_errors(proto_err));
  pmod_ad1_model u_ad (.cs_n(ad_cs_n), .sclk(ad_sclk), .vin(cnn_vout), .sdata(ad_sdata),
                       .conversions(adc_convs));

  // ---------------------------------------------------------------- monitors
  int n_clk_fall = 0, n_init_fall = 0, freeze_cyc = 0;
  logic p_clk = 1'b1, p_init = 1'b1;
  logic [3:0] state_seq [$];
  always @(posedge clk) begin
    if (p_clk && !cnn_clk) n_clk_fall++;
    if (p_init && !cnn_init_n) n_init_fall++;
    if (cnn_freeze) freeze_cyc++;
    if (state_seq.size() == 0 || state_seq[$] != state) state_seq.push_back(state);
    p_clk  = cnn_clk;
    p_init = cnn_init_n;
  end

  // mechanism counters
  int m_bounce = 0, m_inc = 0, m_dec = 0, m_locked = 0, m_out_inc = 0, m_start_ign = 0,
      m_min_run3 = 0, m_forced = 0, m_display = 0;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // press a button with bounce on both edges
  task automatic press(ref logic b);
    repeat (4) begin
      b = 1'b1; repeat ($urandom_range(1, DEB / 2)) @(posedge clk);
      b = 1'b0; repeat ($urandom_range(1, DEB / 2)) @(posedge clk);
    end
    b = 1'b1; repeat (3 * DEB) @(posedge clk);
    repeat (3) begin
      b = 1'b0; repeat ($urandom_range(1, DEB / 2)) @(posedge clk);
      b = 1'b1; repeat ($urandom_range(1, DEB / 2)) @(posedge clk);
    end
    b = 1'b0; repeat (3 * DEB) @(posedge clk);
  endtask

  task automatic host_write(int a, int v);
    @(negedge clk);
    host_we = 1'b1; host_addr = 6'(a); host_wdata = 16'(v);
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int a, output int v);
    @(negedge clk);
    host_addr = 6'(a);
    #1 v = int'(host_rdata);
  endtask

  // read the four digits from the multiplexed display
  localparam logic [6:0] SEG [16] = '{
    7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
    7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E
  };
  task automatic read_display(output int v, output bit ok);
    bit seen [4];
    v = 0; ok = 1;
    for (int i = 0; i < 4; i++) seen[i] = 0;
    repeat (8 * REFRESH) begin
      @(negedge clk);
      for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) begin
        int n = -1;
        for (int h = 0; h < 16; h++) if (seg == SEG[h]) n = h;
        if (n < 0) ok = 0;
        else v = (v & ~(15 << (4 * d))) | (n << (4 * d));
        seen[d] = 1;
      end
    end
    for (int i = 0; i < 4; i++) if (!seen[i]) ok = 0;
  endtask

  // the evolution the CNN model applies, written independently
  function automatic void expected(input int in [16], output int out [16]);
    for (int i = 0; i < 16; i++) begin
      int l = in[(i > 0) ? i - 1 : 0];
      int r = in[(i < 15) ? i + 1 : 15];
      out[i] = (l + 2 * in[i] + r + 2) / 4;
    end
  endfunction

  task automatic run_and_check(int stim [16], int fr);
    int exp [16];
    int f0 = dac_frames, c0 = adc_convs, e0 = evolutions;
    int fcyc, rd;
    n_clk_fall = 0; n_init_fall = 0; freeze_cyc = 0; state_seq.delete();
    fork
      press(btn_start);
      begin
        wait (led);
      end
    join
    wait (state == 4'b0100);                        // RUN2: press START and INC again
    sw_sel = 6'd0;
    press(btn_start);
    press(btn_inc);
    sw_sel = 6'd18;                                 // REG_OUT_02
    wait (!led);
    check(n_init_fall == 1, $sformatf("%0d test cycles started", n_init_fall));
    if (n_init_fall == 1) m_start_ign++;
    host_read(0, rd);
    check(rd == stim[0], "INC changed REG_IN_00 during a test");
    if (rd == stim[0]) m_locked++;
    repeat (20 * CTRL_DIV) @(posedge clk);
    expected(stim, exp);
    check(dac_frames - f0 == 16 && dac_aborted == 0, $sformatf("%0d D/A frames", dac_frames - f0));
    check(adc_convs - c0 == 16, $sformatf("%0d A/D conversions", adc_convs - c0));
    check(evolutions - e0 == 1 && unpowered == 0 && proto_err == 0,
          $sformatf("evolutions %0d unpowered %0d protocol errors %0d", evolutions - e0, unpowered, proto_err));
    check(n_clk_fall == 33, $sformatf("%0d clkCNN falling edges", n_clk_fall));
    fcyc = ((fr == 0) ? 1 : fr) * CTRL_DIV;
    check(freeze_cyc == fcyc, $sformatf("FREEZE high %0d cycles, expected %0d", freeze_cyc, fcyc));
    if (fr == 0 && freeze_cyc == CTRL_DIV) m_min_run3++;
    begin
      int k = 0;
      for (int i = 0; i < state_seq.size(); i++) if (k < 5 && state_seq[i] == 4'(3 + k)) k++;
      check(k == 5, "state output did not pass RUN1..RUN5 in order");
    end
    for (int i = 0; i < 16; i++) begin
      host_read(16 + i, rd);
      check(rd == exp[i], $sformatf("REG_OUT_%02d = %h, expected %h (REG_IN %h)", i, rd, exp[i], stim[i]));
    end
    begin
      int v; bit ok;
      sw_sel = 6'd24;                               // REG_OUT_08 on the display
      read_display(v, ok);
      check(ok && v == exp[8], $sformatf("display shows %h, expected REG_OUT_08 = %h", v, exp[8]));
      if (ok && v == exp[8]) m_display++;
    end
  endtask

  initial begin
    int stim [16];
    int v, rd; bit ok;
    #1 btn_reset = 1'b1;
    repeat (5) @(posedge clk);
    btn_reset = 1'b0;
    repeat (5) @(posedge clk);

    // ---- cycle 1: pulse on cell 8, adjusted by the buttons
    for (int i = 0; i < 16; i++) stim[i] = 'h800;
    stim[8] = 'h8BA;
    host_write(8, 'h8BA);
    host_read(32, rd);
    check(rd == 12, "REG_FREEZE reset value");
    sw_sel = 6'd3;
    press(btn_inc); press(btn_inc); press(btn_inc);
    stim[3] += 3;
    host_read(3, rd);
    check(rd == stim[3], $sformatf("REG_IN_03 = %h after three bouncing INC", rd));
    if (rd == stim[3]) begin m_inc++; m_bounce++; end
    sw_sel = 6'd5;
    press(btn_dec); press(btn_dec);
    stim[5] -= 2;
    host_read(5, rd);
    check(rd == stim[5], $sformatf("REG_IN_05 = %h after two DEC", rd));
    if (rd == stim[5]) m_dec++;
    read_display(v, ok);
    check(ok && v == stim[5], $sformatf("display shows %h, expected REG_IN_05 = %h", v, stim[5]));
    if (ok && v == stim[5]) m_display++;
    sw_sel = 6'd32;
    press(btn_inc);
    host_read(32, rd);
    check(rd == 13, "REG_FREEZE after INC");
    sw_sel = 6'd20;                                   // REG_OUT_04: display only
    press(btn_inc);
    host_read(20, rd);
    check(rd == 0, "INC changed a response register");
    if (rd == 0) m_out_inc++;
    check(cnn_power_up_n == 1'b1, "POWER_UP active while idle");
    run_and_check(stim, 13);

    // ---- cycle 2: random stimuli, minimum RUN3, POWER_UP forced on
    for (int i = 0; i < 16; i++) begin
      stim[i] = int'($urandom_range(4095));
      host_write(i, stim[i]);
    end
    host_write(32, 0);
    sw_power_force = 1'b1;
    repeat (2) @(posedge clk);
    check(cnn_power_up_n == 1'b0, "force switch did not activate POWER_UP");
    if (cnn_power_up_n == 1'b0) m_forced++;
    run_and_check(stim, 0);
    sw_power_force = 1'b0;

    check(m_bounce > 0 && m_inc > 0 && m_dec > 0 && m_locked > 0 && m_out_inc > 0 &&
          m_start_ign > 0 && m_min_run3 > 0 && m_forced > 0 && m_display > 0,
          "a mechanism was never exercised");
    $display("mechanisms: bounce %0d inc %0d dec %0d locked-inc %0d response-inc-ignored %0d start-ignored %0d min-RUN3 %0d forced-POWER_UP %0d display %0d",
             m_bounce, m_inc, m_dec, m_locked, m_out_inc, m_start_ign, m_min_run3, m_forced, m_display);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
