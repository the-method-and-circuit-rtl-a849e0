// Stimulus, response and timing register bank.
//
// Holds the 33 registers of the test circuit:
//   REG_IN_00..15   initial cell states, sent to the D/A converter in LOADx;
//   REG_OUT_00..15  final cell states, written from the A/D converter in SAVEx;
//   REG_FREEZE      length of the RUN3 (network evolution) phase, counted in
//                   periods of the controller's clock.
// Exactly one register, chosen by `sel` (address map in cnn_tester_pkg), is
// shown on `disp_value` and receives the debounced `inc` / `dec` pulses; the
// response registers ignore them (display only). A host port (`host_*`)
// writes REG_IN and REG_FREEZE and reads all 33 registers, which is the
// register side of a computer interface. The controller reads REG_IN through
// `in_idx`/`in_data` and writes REG_OUT through `out_we`/`out_idx`/`out_data`.
//
// The register set, the single selected register and the read-only response
// registers follow the source. This design's choices: inc/dec saturate
// instead of wrapping; inc/dec are ignored while `lock` is high (a test is
// running) so that the stimulus stays fixed during a cycle; a host write in
// the same cycle as inc/dec wins; REG_IN resets to the analog-ground code
// and REG_FREEZE to FREEZE_RESET; unused addresses read as zero.
//
// Timing: all writes take effect at the next clock edge; reads are
// combinational.
module reg_bank
  import cnn_tester_pkg::*;
#(
  parameter logic [FREEZE_W-1:0] FREEZE_RESET = 16'd1000,
  parameter logic [DATA_W-1:0]   IN_RESET     = AGND_CODE
) (
  input  logic                clk,
  input  logic                rst,
  // user interface
  input  logic [ADDR_W-1:0]   sel,
  input  logic                inc,
  input  logic                dec,
  input  logic                lock,
  output logic [DISP_W-1:0]   disp_value,
  // host (computer interface) port
  input  logic                host_we,
  input  logic [ADDR_W-1:0]   host_addr,
  input  logic [DISP_W-1:0]   host_wdata,
  output logic [DISP_W-1:0]   host_rdata,
  // controller port
  input  logic [CELL_W-1:0]   in_idx,
  output logic [DATA_W-1:0]   in_data,
  input  logic                out_we,
  input  logic [CELL_W-1:0]   out_idx,
  input  logic [DATA_W-1:0]   out_data,
  output logic [FREEZE_W-1:0] reg_freeze
);
  localparam logic [DATA_W-1:0]   IN_MAX     = '1;
  localparam logic [FREEZE_W-1:0] FREEZE_MAX = '1;

  logic [DATA_W-1:0] reg_in  [N_CELLS];
  logic [DATA_W-1:0] reg_out [N_CELLS];

  // Read one register by address, zero-extended to the display width
  function automatic logic [DISP_W-1:0] read_reg(input logic [ADDR_W-1:0] a);
    if (a < ADDR_W'(ADDR_OUT0))        return DISP_W'(reg_in[a[CELL_W-1:0]]);
    else if (a < ADDR_W'(ADDR_FREEZE)) return DISP_W'(reg_out[a[CELL_W-1:0]]);
    else if (a == ADDR_W'(ADDR_FREEZE)) return reg_freeze;
    else                               return '0;
  endfunction

  logic step_up, step_dn;
  assign step_up = inc & ~dec & ~lock;
  assign step_dn = dec & ~inc & ~lock;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_CELLS; i++) begin
        reg_in[i]  <= IN_RESET;
        reg_out[i] <= '0;
      end
      reg_freeze <= FREEZE_RESET;
    end else begin
      // increment / decrement of the selected stimulus or timing register
      if (sel < ADDR_W'(ADDR_OUT0)) begin
        if (step_up && reg_in[sel[CELL_W-1:0]] != IN_MAX)
          reg_in[sel[CELL_W-1:0]] <= reg_in[sel[CELL_W-1:0]] + 1'b1;
        else if (step_dn && reg_in[sel[CELL_W-1:0]] != '0)
          reg_in[sel[CELL_W-1:0]] <= reg_in[sel[CELL_W-1:0]] - 1'b1;
      end else if (sel == ADDR_W'(ADDR_FREEZE)) begin
        if (step_up && reg_freeze != FREEZE_MAX)
          reg_freeze <= reg_freeze + 1'b1;
        else if (step_dn && reg_freeze != '0)
          reg_freeze <= reg_freeze - 1'b1;
      end
      // host writes (response registers are read-only)
      if (host_we) begin
        if (host_addr < ADDR_W'(ADDR_OUT0))
          reg_in[host_addr[CELL_W-1:0]] <= host_wdata[DATA_W-1:0];
        else if (host_addr == ADDR_W'(ADDR_FREEZE))
          reg_freeze <= host_wdata;
      end
      // response capture from the A/D converter
      if (out_we) reg_out[out_idx] <= out_data;
    end
  end

  assign disp_value = read_reg(sel);
  assign host_rdata = read_reg(host_addr);
  assign in_data    = reg_in[in_idx];
endmodule
