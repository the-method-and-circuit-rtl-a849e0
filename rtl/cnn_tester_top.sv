// Test circuit for a 16-cell one-dimensional cellular neural network (CNN).
//
// The FPGA board generates everything a CNN chip needs for one test: the
// digital control signals (INIT, clkCNN, POWER_UP, FREEZE), the analog
// initial state of every cell through a 12-bit D/A converter module, and it
// captures the analog final state of every cell through a 12-bit A/D
// converter module. One press of START runs a complete cycle (load all
// cells, power up, evolve for REG_FREEZE periods, power down, read all
// cells); the LED is on for its whole duration.
//
// Blocks: clk_enable_div makes the controller's clock enable from the
// 100 MHz oscillator; debounce_pulse suppresses bounce on the START, INC and
// DEC buttons; reg_bank holds REG_IN_xx, REG_OUT_xx and REG_FREEZE;
// stim_resp_ctrl sequences the test; spi_dac_ctrl and spi_adc_ctrl drive the
// converters; seg7_display shows the register selected by `sw_sel` in
// hexadecimal. The host port reaches the same registers for a computer
// interface. `sw_power_force` holds POWER_UP active (transconductors on)
// regardless of the sequence.
//
// The block structure, registers and sequence follow the source. The reset
// button, the switch assignment (six select switches, one force switch), the
// host port and all timing defaults are this design's choices. `btn_reset`
// resets the whole circuit at once; its release is synchronised to `clk`
// by two flip-flops.
//
// Default timing at 100 MHz: control period 1 us (CTRL_DIV = 100), so the
// default REG_FREEZE of 1000 gives a 1 ms evolution; SPI at 12.5 MHz;
// buttons debounced for 10 ms; display refreshed every 4 ms.
module cnn_tester_top
  import cnn_tester_pkg::*;
#(
  parameter int unsigned         CTRL_DIV        = 100,
  parameter int unsigned         DEBOUNCE_CYCLES = 1_000_000,
  parameter int unsigned         REFRESH_CYCLES  = 100_000,
  parameter int unsigned         SPI_HALF        = 4,
  parameter int unsigned         RUN1_TICKS      = 8,
  parameter int unsigned         RUN2_TICKS      = 8,
  parameter int unsigned         RUN4_TICKS      = 8,
  parameter int unsigned         RUN5_TICKS      = 8,
  parameter int unsigned         SETTLE_TICKS    = 2,
  parameter logic [FREEZE_W-1:0] FREEZE_RESET    = 16'd1000
) (
  input  logic                clk,            // 100 MHz oscillator
  // push buttons and switches
  input  logic                btn_reset,
  input  logic                btn_start,
  input  logic                btn_inc,
  input  logic                btn_dec,
  input  logic [ADDR_W-1:0]   sw_sel,         // register shown / adjusted
  input  logic                sw_power_force, // 1: POWER_UP held active
  // indicators
  output logic                led,            // test cycle in progress
  output logic [3:0]          an,
  output logic [6:0]          seg,
  output logic                dp,
  // CNN digital control
  output logic                cnn_init_n,
  output logic                cnn_clk,
  output logic                cnn_power_up_n,
  output logic                cnn_freeze,
  // D/A converter module (SPI)
  output logic                da_sync_n,
  output logic                da_sclk,
  output logic                da_din,
  // A/D converter module (SPI)
  output logic                ad_cs_n,
  output logic                ad_sclk,
  input  logic                ad_sdata,
  // computer interface register port
  input  logic                host_we,
  input  logic [ADDR_W-1:0]   host_addr,
  input  logic [DISP_W-1:0]   host_wdata,
  output logic [DISP_W-1:0]   host_rdata,
  // status
  output logic [3:0]          state,
  output logic [CELL_W-1:0]   cell_idx
);
  logic [1:0] rst_sync;
  logic       rst;

  // asynchronous assertion, synchronous release
  always_ff @(posedge clk or posedge btn_reset) begin
    if (btn_reset) rst_sync <= 2'b11;
    else           rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst = rst_sync[1];

  // control clock enable
  logic tick;
  clk_enable_div #(.DIV(CTRL_DIV)) u_div (.clk, .rst, .tick);

  // button suppression
  logic start_p, inc_p, dec_p;
  logic start_lvl, inc_lvl, dec_lvl;  // debounced levels, not used here
  debounce_pulse #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_start
    (.clk, .rst, .btn(btn_start), .level(start_lvl), .press(start_p));
  debounce_pulse #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_inc
    (.clk, .rst, .btn(btn_inc), .level(inc_lvl), .press(inc_p));
  debounce_pulse #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_dec
    (.clk, .rst, .btn(btn_dec), .level(dec_lvl), .press(dec_p));

  // registers
  logic [DISP_W-1:0]   disp_value;
  logic [DATA_W-1:0]   in_data, adc_data;
  logic [FREEZE_W-1:0] reg_freeze;
  logic                out_we;
  ctrl_state_e         ctrl_state;

  reg_bank #(.FREEZE_RESET(FREEZE_RESET)) u_regs (
    .clk, .rst,
    .sel(sw_sel), .inc(inc_p), .dec(dec_p), .lock(led), .disp_value,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .in_idx(cell_idx), .in_data,
    .out_we, .out_idx(cell_idx), .out_data(adc_data),
    .reg_freeze
  );

  // sequencer
  logic dac_start, dac_done, dac_busy;
  logic adc_start, adc_done, adc_busy;
  logic ctrl_power_up_n;

  stim_resp_ctrl #(
    .RUN1_TICKS(RUN1_TICKS), .RUN2_TICKS(RUN2_TICKS),
    .RUN4_TICKS(RUN4_TICKS), .RUN5_TICKS(RUN5_TICKS),
    .SETTLE_TICKS(SETTLE_TICKS)
  ) u_ctrl (
    .clk, .rst, .tick, .start(start_p), .reg_freeze,
    .dac_start, .dac_done, .adc_start, .adc_done, .out_we,
    .cnn_init_n, .cnn_clk, .cnn_power_up_n(ctrl_power_up_n), .cnn_freeze,
    .led, .state(ctrl_state), .cell_idx
  );

  assign cnn_power_up_n = ctrl_power_up_n & ~sw_power_force;
  assign state          = ctrl_state;

  // converters
  spi_dac_ctrl #(.HALF_CYCLES(SPI_HALF)) u_dac (
    .clk, .rst, .start(dac_start), .data(in_data), .busy(dac_busy), .done(dac_done),
    .sync_n(da_sync_n), .sclk(da_sclk), .din(da_din)
  );

  spi_adc_ctrl #(.HALF_CYCLES(SPI_HALF)) u_adc (
    .clk, .rst, .start(adc_start), .busy(adc_busy), .done(adc_done), .data(adc_data),
    .cs_n(ad_cs_n), .sclk(ad_sclk), .sdata(ad_sdata)
  );

  // display
  seg7_display #(.REFRESH_CYCLES(REFRESH_CYCLES)) u_disp (
    .clk, .rst, .value(disp_value), .an, .seg, .dp
  );

  // The sequencer only starts a conversion on an idle converter
  assert property (@(posedge clk) disable iff (rst) dac_start |-> !dac_busy)
    else $error("D/A write started while busy");
  assert property (@(posedge clk) disable iff (rst) adc_start |-> !adc_busy)
    else $error("A/D read started while busy");
endmodule
