// Shared types and constants of the 16-cell CNN test circuit.
//
// The test circuit drives a one-dimensional cellular neural network (CNN) of
// 16 analog cells: it writes an initial state into every cell through a D/A
// converter, lets the network evolve for a programmed time and reads every
// final state back through an A/D converter. This package holds the sizes,
// the register address map and the encoding of the controller state.
//
// The RUN1..RUN5 codes (0011..0111) follow the 4-bit state signal of the
// original design; the codes of IDLE, INIT, LOAD, SAVE and DONE are this
// design's own choice, picked to fill the remaining values in sequence order.
package cnn_tester_pkg;

  // Network and converter sizes
  localparam int unsigned N_CELLS  = 16;   // cells of the 1-D CNN
  localparam int unsigned CELL_W   = 4;    // bits of a cell index
  localparam int unsigned DATA_W   = 12;   // D/A and A/D resolution
  localparam int unsigned FREEZE_W = 16;   // width of REG_FREEZE (RUN3 length)
  localparam int unsigned DISP_W   = 16;   // four hexadecimal digits

  // 1.65 V analog ground of a 3.3 V, 12-bit converter: mid-scale code
  localparam logic [DATA_W-1:0] AGND_CODE = 12'h800;

  // Register address map shared by the selection switches and the host port:
  //   0..15  REG_IN_00..REG_IN_15   (stimulus, read/write, inc/dec)
  //   16..31 REG_OUT_00..REG_OUT_15 (response, read-only)
  //   32     REG_FREEZE             (RUN3 duration, read/write, inc/dec)
  //   33..63 unused, read as zero
  localparam int unsigned ADDR_W      = 6;
  localparam int unsigned ADDR_OUT0   = 16;
  localparam int unsigned ADDR_FREEZE = 32;

  // State of the Stim&Response controller, as seen on its 4-bit state output
  typedef enum logic [3:0] {
    ST_IDLE = 4'b0000,  // waiting for START, CNN holds its state
    ST_INIT = 4'b0001,  // INIT low: CNN selection reset to cell 0
    ST_LOAD = 4'b0010,  // LOADx: write REG_IN_x through the D/A converter
    ST_RUN1 = 4'b0011,  // wait after the last cell is charged
    ST_RUN2 = 4'b0100,  // POWER_UP low: transconductors on, then wait
    ST_RUN3 = 4'b0101,  // FREEZE high for REG_FREEZE control periods
    ST_RUN4 = 4'b0110,  // FREEZE low, wait
    ST_RUN5 = 4'b0111,  // POWER_UP high: transconductors off, then wait
    ST_SAVE = 4'b1000,  // SAVEx: read cell x through the A/D converter
    ST_DONE = 4'b1001   // last clkCNN falling edge returns the CNN to IDLE
  } ctrl_state_e;

  // Hexadecimal digit to 7-segment pattern, segments {g,f,e,d,c,b,a},
  // active low as on common-anode displays.
  function automatic logic [6:0] hex_to_seg(input logic [3:0] h);
    logic [6:0] on;  // active-high pattern
    unique case (h)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;  // F
    endcase
    return ~on;
  endfunction

endpackage
