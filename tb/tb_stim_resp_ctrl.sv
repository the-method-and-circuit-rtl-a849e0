// Self-checking testbench for stim_resp_ctrl. The control clock enable is a
// tick every TDIV cycles; the converter controllers are replaced by simple
// responders that answer each start after a random delay (the A/D responder
// also returns a random code). Three complete test cycles are run with
// REG_FREEZE = 5, 0 and 9. For each cycle it checks the order of the states
// and the length of every RUN state in ticks, one INIT pulse of one tick
// before the first clkCNN edge, 33 clkCNN falling edges (16 loads after the
// matching D/A write, 16 saves, 1 back to IDLE), 16 D/A and 16 A/D requests,
// response writes to cells 0..15 in order with the A/D data, FREEZE high for
// REG_FREEZE ticks (0 counted as 1) only while POWER_UP is active, and the
// LED high for exactly the cycle. A START during a cycle must be ignored.
module tb_stim_resp_ctrl;
  import cnn_tester_pkg::*;

  localparam int TDIV = 3;
  localparam int R1 = 2, R2 = 3, R4 = 4, R5 = 5, SET = 2;

  logic                clk = 1'b0, rst = 1'b1, tick = 1'b0, start = 1'b0;
  logic [FREEZE_W-1:0] reg_freeze = '0;
  logic                dac_start, dac_done = 1'b0, adc_start, adc_done = 1'b0, out_we;
  logic                cnn_init_n, cnn_clk, cnn_power_up_n, cnn_freeze, led;
  ctrl_state_e         state;
  logic [CELL_W-1:0]   cell_idx;
  logic [DATA_W-1:0]   adc_code;
  int                  checks = 0, failures = 0;
  int                  tcnt = 0;

  always #5 clk = ~clk;

  stim_resp_ctrl #(.RUN1_TICKS(R1), .RUN2_TICKS(R2), .RUN4_TICKS(R4), .RUN5_TICKS(R5),
                   .SETTLE_TICKS(SET)) dut (.*);

  // control clock enable
  always @(posedge clk) begin
    tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
    tick <= (tcnt == TDIV - 1);
  end

  // converter responders
  initial forever begin
    @(posedge clk);
    if (dac_start) begin
      repeat ($urandom_range(4, 20)) @(posedge clk);
      dac_done <= 1'b1;
      @(posedge clk) dac_done <= 1'b0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (adc_start) begin
      repeat ($urandom_range(4, 20)) @(posedge clk);
      adc_code <= DATA_W'($urandom);
      adc_done <= 1'b1;
      @(posedge clk) adc_done <= 1'b0;
    end
  end

  // monitors
  int cyc = 0;
  int n_init_fall, n_clk_fall, n_clk_fall_load, n_dac_start, n_dac_done, n_adc_start, n_out;
  int init_low_cyc, freeze_cyc, led_cyc, freeze_unpowered, load_order_err, out_err;
  int state_cyc;
  ctrl_state_e seq [$];
  int          dur [$];
  logic        p_init = 1'b1, p_clk = 1'b1;
  ctrl_state_e p_state = ST_IDLE;

  task automatic clear_counts();
    n_init_fall = 0; n_clk_fall = 0; n_clk_fall_load = 0; n_dac_start = 0; n_dac_done = 0;
    n_adc_start = 0; n_out = 0; init_low_cyc = 0; freeze_cyc = 0; led_cyc = 0;
    freeze_unpowered = 0; load_order_err = 0; out_err = 0; state_cyc = 0;
    seq.delete(); dur.delete();
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (p_init && !cnn_init_n) n_init_fall++;
    if (!cnn_init_n) init_low_cyc++;
    if (p_clk && !cnn_clk) begin
      n_clk_fall++;
      if (n_init_fall == 0) load_order_err++;
      if (state == ST_LOAD) begin
        n_clk_fall_load++;
        if (n_dac_done != n_clk_fall_load) load_order_err++;
      end
    end
    if (dac_start) n_dac_start++;
    if (dac_done) n_dac_done++;
    if (adc_start) n_adc_start++;
    if (out_we) begin
      if (int'(cell_idx) != n_out || state != ST_SAVE) out_err++;
      n_out++;
    end
    if (cnn_freeze) begin
      freeze_cyc++;
      if (cnn_power_up_n) freeze_unpowered++;
    end
    if (led) led_cyc++;
    if (state != p_state) begin
      seq.push_back(state);
      dur.push_back(state_cyc);
      state_cyc = 1;
    end else state_cyc++;
    p_init  = cnn_init_n;
    p_clk   = cnn_clk;
    p_state = state;
  end

  // out_we must carry the A/D code of this request
  always @(posedge clk) if (!rst && out_we && !adc_done) begin
    failures++;
    $display("response write without A/D data");
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_cycle(int rf);
    int exp_fr;
    ctrl_state_e exp_seq [] = '{ST_INIT, ST_LOAD, ST_RUN1, ST_RUN2, ST_RUN3, ST_RUN4, ST_RUN5,
                                ST_SAVE, ST_DONE, ST_IDLE};
    exp_fr = (rf == 0) ? 1 : rf;
    reg_freeze <= FREEZE_W'(rf);
    clear_counts();
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    reg_freeze <= FREEZE_W'(rf + 7);   // sampled at START: later changes must not matter
    wait (state == ST_RUN2);
    @(posedge clk) start <= 1'b1;      // ignored while running
    @(posedge clk) start <= 1'b0;
    wait (led == 1'b0 && state == ST_IDLE);
    repeat (10 * TDIV) @(posedge clk);
    check(seq.size() == exp_seq.size(), $sformatf("%0d state changes", seq.size()));
    for (int i = 0; i < exp_seq.size() && i < seq.size(); i++)
      check(seq[i] == exp_seq[i], $sformatf("state %0d is %s", i, seq[i].name()));
    if (seq.size() == exp_seq.size()) begin
      // dur[i] is the time spent in the state before seq[i]
      check(dur[1] == TDIV,             $sformatf("INIT lasted %0d", dur[1]));
      check(dur[3] == R1 * TDIV,        $sformatf("RUN1 lasted %0d", dur[3]));
      check(dur[4] == R2 * TDIV,        $sformatf("RUN2 lasted %0d", dur[4]));
      check(dur[5] == exp_fr * TDIV,    $sformatf("RUN3 lasted %0d", dur[5]));
      check(dur[6] == R4 * TDIV,        $sformatf("RUN4 lasted %0d", dur[6]));
      check(dur[7] == R5 * TDIV,        $sformatf("RUN5 lasted %0d", dur[7]));
      check(dur[9] == TDIV,             $sformatf("DONE lasted %0d", dur[9]));
    end
    check(n_init_fall == 1 && init_low_cyc == TDIV, $sformatf("INIT falls %0d low %0d", n_init_fall, init_low_cyc));
    check(n_clk_fall == 33 && n_clk_fall_load == 16, $sformatf("clkCNN falls %0d (load %0d)", n_clk_fall, n_clk_fall_load));
    check(load_order_err == 0, "clkCNN edge before the D/A write or before INIT");
    check(n_dac_start == 16 && n_dac_done == 16, $sformatf("D/A requests %0d", n_dac_start));
    check(n_adc_start == 16 && n_out == 16 && out_err == 0, $sformatf("A/D requests %0d writes %0d order errors %0d", n_adc_start, n_out, out_err));
    check(freeze_cyc == exp_fr * TDIV, $sformatf("FREEZE high %0d cycles, expected %0d", freeze_cyc, exp_fr * TDIV));
    check(freeze_unpowered == 0, "FREEZE high with POWER_UP inactive");
    check(cnn_power_up_n && cnn_init_n && cnn_clk && !cnn_freeze, "outputs not idle after the cycle");
    begin
      int total = 0;
      for (int i = 1; i < dur.size(); i++) total += dur[i];
      check(led_cyc == total, $sformatf("LED high %0d cycles, cycle lasted %0d", led_cyc, total));
    end
  endtask

  initial begin
    clear_counts();
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    check(state == ST_IDLE && !led && cnn_init_n && cnn_clk && cnn_power_up_n && !cnn_freeze, "reset state");
    run_cycle(5);
    run_cycle(0);
    run_cycle(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
