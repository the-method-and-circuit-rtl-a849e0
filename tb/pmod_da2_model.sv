// Behavioural model of a DAC121S101-type 12-bit SPI D/A converter, for
// simulation only. A frame starts when `sync_n` falls; `din` is shifted in on
// each falling edge of `sclk`; after the 16th bit the two power-down bits and
// the 12-bit `code` are updated and `frames` counts the frame. A frame cut
// short by `sync_n` rising is dropped and counted in `aborted`.
// `code` starts at mid-scale (the 1.65 V analog ground of a 3.3 V supply).
module pmod_da2_model (
  input  logic        sync_n,
  input  logic        sclk,
  input  logic        din,
  output logic [11:0] code,
  output logic [1:0]  pd,
  output int          frames,
  output int          aborted
);
  logic [15:0] sh;
  int          nbits;

  initial begin
    code = 12'h800; pd = 2'b00; frames = 0; aborted = 0; nbits = 0; sh = '0;
  end

  always @(negedge sync_n) nbits = 0;

  always @(posedge sync_n) if (nbits != 0 && nbits != 16) aborted++;

  always @(negedge sclk) begin
    if (!sync_n && nbits < 16) begin
      sh = {sh[14:0], din};
      nbits++;
      if (nbits == 16) begin
        code = sh[11:0];
        pd   = sh[13:12];
        frames++;
      end
    end
  end
endmodule
