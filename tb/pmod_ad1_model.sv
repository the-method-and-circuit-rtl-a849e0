// Behavioural model of an AD7476A-type 12-bit SPI A/D converter, for
// simulation only. The falling edge of `cs_n` samples `vin` and drives the
// first of four leading zeros on `sdata`; every falling edge of `sclk` moves
// to the next bit of {4'b0000, sample}, most significant first. With `cs_n`
// high the output is released (modelled as 0). `conversions` counts frames.
module pmod_ad1_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] vin,
  output logic        sdata,
  output int          conversions
);
  logic [15:0] sh;

  initial begin
    sdata = 1'b0; conversions = 0; sh = '0;
  end

  always @(negedge cs_n) begin
    sh    = {4'b0000, vin};
    sdata = sh[15];
    conversions++;
  end

  always @(posedge cs_n) sdata = 1'b0;

  always @(negedge sclk) begin
    if (!cs_n) begin
      sh    = sh << 1;
      sdata = sh[15];
    end
  end
endmodule
