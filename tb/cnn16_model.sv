// Behavioural model of the digital interface of a 16-cell 1-D CNN chip, for
// simulation only. The cell states are held as 12-bit converter codes.
//   falling INIT          cell selection reset, LOAD0
//   falling clkCNN        LOADx: cell x takes `vin`, then the next cell is
//                         selected; after LOAD15 the network waits; from the
//                         wait the next edge selects SAVE0; after SAVE15 IDLE
//   FREEZE high           network coupled; if POWER_UP is active (low) when
//                         FREEZE rises, one evolution step is applied when it
//                         falls: s[i] <= (s[i-1] + 2 s[i] + s[i+1] + 2) / 4,
//                         an edge cell using itself for its missing neighbour
//   SAVEx                 `vout` shows the state of cell x, otherwise the
//                         analog ground code
// The evolution rule is a stand-in for the analog dynamics; it only has to
// be a known function of the loaded states. Counters expose what happened.
module cnn16_model (
  input  logic        init_n,
  input  logic        clk_cnn,
  input  logic        power_up_n,
  input  logic        freeze,
  input  logic [11:0] vin,
  output logic [11:0] vout,
  output int          loads,
  output int          saves,
  output int          evolutions,
  output int          unpowered_freezes,
  output int          protocol_errors
);
  typedef enum {M_IDLE, M_LOAD, M_WAIT, M_SAVE} mphase_e;

  mphase_e     phase;
  int          sel;
  logic [11:0] st [16];
  logic        coupled;

  initial begin
    phase = M_IDLE; sel = 0; coupled = 1'b0;
    loads = 0; saves = 0; evolutions = 0; unpowered_freezes = 0; protocol_errors = 0;
    for (int i = 0; i < 16; i++) st[i] = 12'h800;
  end

  always @(negedge init_n) begin
    phase = M_LOAD;
    sel   = 0;
  end

  always @(negedge clk_cnn) begin
    if (!init_n || freeze) protocol_errors++;
    case (phase)
      M_LOAD: begin
        st[sel] = vin;
        loads++;
        if (sel == 15) phase = M_WAIT;
        else           sel++;
      end
      M_WAIT: begin
        phase = M_SAVE;
        sel   = 0;
      end
      M_SAVE: begin
        saves++;
        if (sel == 15) phase = M_IDLE;
        else           sel++;
      end
      default: protocol_errors++;  // clocked while idle
    endcase
  end

  always @(posedge freeze) begin
    if (phase != M_WAIT) protocol_errors++;
    coupled = !power_up_n;
    if (power_up_n) unpowered_freezes++;
  end

  always @(negedge freeze) begin
    logic [13:0] acc;
    logic [11:0] nx [16];
    if (coupled) begin
      for (int i = 0; i < 16; i++) begin
        acc   = 14'(st[(i == 0) ? 0 : i-1]) + 14'(2 * st[i]) + 14'(st[(i == 15) ? 15 : i+1]) + 14'd2;
        nx[i] = acc[13:2];
      end
      for (int i = 0; i < 16; i++) st[i] = nx[i];
      evolutions++;
    end
    coupled = 1'b0;
  end

  assign vout = (phase == M_SAVE) ? st[sel] : 12'h800;
endmodule
