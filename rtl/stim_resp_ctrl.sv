// Stim&Response controller: sequencer of one complete CNN test cycle.
//
// A START pulse runs the whole sequence below once; it cannot be interrupted
// and further START pulses are ignored until it ends. `led` is high for the
// whole cycle. All CNN control outputs change only on `tick`, the enable of
// the controller's clock, so every time below is a whole number of tick
// periods. The CNN reacts to falling edges of INIT and clkCNN.
//
//   INIT   `cnn_init_n` low for one period: its falling edge resets the CNN
//          cell selection to cell 0 (LOAD0).
//   LOAD   for each cell x = 0..15: write REG_IN_x through the D/A converter
//          (`dac_start`, wait `dac_done`), let the cell charge for
//          SETTLE_TICKS periods, then pulse `cnn_clk` low for one period; its
//          falling edge selects the next cell, and after cell 15 puts the
//          CNN in its waiting state.
//   RUN1   wait RUN1_TICKS periods after the last cell is charged.
//   RUN2   `cnn_power_up_n` low (transconductors on), wait RUN2_TICKS.
//   RUN3   `cnn_freeze` high for REG_FREEZE periods (a value of 0 counts as
//          1): the network evolves. REG_FREEZE is sampled at START.
//   RUN4   `cnn_freeze` low, wait RUN4_TICKS.
//   RUN5   `cnn_power_up_n` high (transconductors off), wait RUN5_TICKS.
//   SAVE   for each cell x = 0..15: a falling edge of `cnn_clk` selects cell x
//          for reading, the output settles for SETTLE_TICKS periods, then the
//          A/D converter is read (`adc_start`, wait `adc_done`) and the code
//          is written to REG_OUT_x (`out_we`, `out_idx`, data from the ADC).
//   DONE   a last falling edge of `cnn_clk` returns the CNN to IDLE.
//
// `state` carries the 4-bit state code (RUN1..RUN5 = 0011..0111 as in the
// source; the other codes are this design's) and `cell_idx` the cell being
// written or read. The sequence, the signal polarities and the RUN3 timing
// follow the source; the wait lengths, the settle time and the handshake
// with the converter controllers are this design's choices. clkCNN falls
// 16 + 16 + 1 = 33 times per cycle.
module stim_resp_ctrl
  import cnn_tester_pkg::*;
#(
  parameter int unsigned RUN1_TICKS   = 8,
  parameter int unsigned RUN2_TICKS   = 8,
  parameter int unsigned RUN4_TICKS   = 8,
  parameter int unsigned RUN5_TICKS   = 8,
  parameter int unsigned SETTLE_TICKS = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,
  input  logic                start,
  input  logic [FREEZE_W-1:0] reg_freeze,
  // converter controllers
  output logic                dac_start,
  input  logic                dac_done,
  output logic                adc_start,
  input  logic                adc_done,
  // register bank: REG_IN read index and REG_OUT write enable (both = cell)
  output logic                out_we,
  // CNN digital control
  output logic                cnn_init_n,
  output logic                cnn_clk,
  output logic                cnn_power_up_n,
  output logic                cnn_freeze,
  // status
  output logic                led,
  output ctrl_state_e         state,
  output logic [CELL_W-1:0]   cell_idx
);
  // Step inside a LOADx / SAVEx state
  typedef enum logic [1:0] {P_CONV, P_SETTLE, P_CLK} phase_e;

  localparam logic [CELL_W-1:0] LAST_CELL = CELL_W'(N_CELLS - 1);

  phase_e              phase;
  logic [FREEZE_W-1:0] tcnt;        // tick periods spent in the current wait
  logic [FREEZE_W-1:0] freeze_len;  // RUN3 length, sampled at START
  logic                conv_ok;     // converter finished for this cell
  logic                start_pend;  // START seen, waiting for the next tick

  // Wait of `len` tick periods is over at this tick
  function automatic logic waited(input logic [FREEZE_W-1:0] cnt,
                                  input logic [FREEZE_W-1:0] len);
    return ({1'b0, cnt} + 1'b1) >= {1'b0, len};
  endfunction

  assign out_we = (state == ST_SAVE) && (phase == P_CONV) && adc_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= ST_IDLE;
      phase          <= P_CONV;
      cell_idx           <= '0;
      tcnt           <= '0;
      freeze_len     <= '0;
      conv_ok        <= 1'b0;
      start_pend     <= 1'b0;
      dac_start      <= 1'b0;
      adc_start      <= 1'b0;
      cnn_init_n     <= 1'b1;
      cnn_clk        <= 1'b1;
      cnn_power_up_n <= 1'b1;
      cnn_freeze     <= 1'b0;
      led            <= 1'b0;
    end else begin
      dac_start <= 1'b0;
      adc_start <= 1'b0;
      if (dac_done || adc_done) conv_ok <= 1'b1;

      if (state == ST_IDLE && start && !start_pend) begin
        start_pend <= 1'b1;
        freeze_len <= (reg_freeze == '0) ? FREEZE_W'(1) : reg_freeze;
      end

      if (tick) begin
        tcnt <= tcnt + 1'b1;
        unique case (state)
          ST_IDLE: if (start_pend) begin
            start_pend <= 1'b0;
            led        <= 1'b1;
            cnn_init_n <= 1'b0;          // falling INIT: CNN to LOAD0
            cell_idx       <= '0;
            state      <= ST_INIT;
          end
          ST_INIT: begin
            cnn_init_n <= 1'b1;
            phase      <= P_CONV;
            conv_ok    <= 1'b0;
            dac_start  <= 1'b1;          // write REG_IN_00
            state      <= ST_LOAD;
          end
          ST_LOAD: unique case (phase)
            P_CONV: if (conv_ok) begin
              tcnt  <= '0;
              phase <= P_SETTLE;
            end
            P_SETTLE: if (waited(tcnt, FREEZE_W'(SETTLE_TICKS))) begin
              cnn_clk <= 1'b0;           // falling clkCNN: next cell
              phase   <= P_CLK;
            end
            default: begin               // P_CLK
              cnn_clk <= 1'b1;
              tcnt    <= '0;
              if (cell_idx == LAST_CELL) begin
                state <= ST_RUN1;
              end else begin
                cell_idx      <= cell_idx + 1'b1;
                conv_ok   <= 1'b0;
                dac_start <= 1'b1;
                phase     <= P_CONV;
              end
            end
          endcase
          ST_RUN1: if (waited(tcnt, FREEZE_W'(RUN1_TICKS))) begin
            tcnt           <= '0;
            cnn_power_up_n <= 1'b0;      // transconductors on
            state          <= ST_RUN2;
          end
          ST_RUN2: if (waited(tcnt, FREEZE_W'(RUN2_TICKS))) begin
            tcnt       <= '0;
            cnn_freeze <= 1'b1;          // network evolves
            state      <= ST_RUN3;
          end
          ST_RUN3: if (waited(tcnt, freeze_len)) begin
            tcnt       <= '0;
            cnn_freeze <= 1'b0;
            state      <= ST_RUN4;
          end
          ST_RUN4: if (waited(tcnt, FREEZE_W'(RUN4_TICKS))) begin
            tcnt           <= '0;
            cnn_power_up_n <= 1'b1;      // transconductors off
            state          <= ST_RUN5;
          end
          ST_RUN5: if (waited(tcnt, FREEZE_W'(RUN5_TICKS))) begin
            cnn_clk <= 1'b0;             // falling clkCNN: SAVE0
            cell_idx    <= '0;
            phase   <= P_CLK;
            state   <= ST_SAVE;
          end
          ST_SAVE: unique case (phase)
            P_CLK: begin
              cnn_clk <= 1'b1;
              tcnt    <= '0;
              phase   <= P_SETTLE;
            end
            P_SETTLE: if (waited(tcnt, FREEZE_W'(SETTLE_TICKS))) begin
              conv_ok   <= 1'b0;
              adc_start <= 1'b1;
              phase     <= P_CONV;
            end
            default: if (conv_ok) begin  // P_CONV
              cnn_clk <= 1'b0;           // falling clkCNN: next cell or IDLE
              phase   <= P_CLK;
              if (cell_idx == LAST_CELL) state <= ST_DONE;
              else                   cell_idx  <= cell_idx + 1'b1;
            end
          endcase
          ST_DONE: begin
            cnn_clk <= 1'b1;
            led     <= 1'b0;
            state   <= ST_IDLE;
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  // The CNN is only ever clocked with INIT inactive and FREEZE low
  assert property (@(posedge clk) disable iff (rst) $fell(cnn_clk) |-> cnn_init_n && !cnn_freeze)
    else $error("clkCNN falling edge while INIT active or network coupled");
  // FREEZE is only raised with the transconductors powered
  assert property (@(posedge clk) disable iff (rst) cnn_freeze |-> !cnn_power_up_n)
    else $error("FREEZE high with transconductors off");
endmodule
