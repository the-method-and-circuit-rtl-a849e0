// Self-checking testbench for seg7_display (REFRESH_CYCLES = 4).
// For random 16-bit values it follows the scan through all four digits and
// checks that exactly one anode is active, that digit i shows nibble i of
// the value with the segment pattern of a reference table written here, that
// the decimal point stays dark, and that each digit lasts REFRESH_CYCLES.
module tb_seg7_display;
  localparam int unsigned REFRESH = 4;

  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] value;
  logic [3:0]  an;
  logic [6:0]  seg;
  logic        dp;
  int          checks = 0, failures = 0;

  // active-low patterns {g,f,e,d,c,b,a} for 0..F
  localparam logic [6:0] REF [16] = '{
    7'h40, 7'h79, 7'h24, 7'h30, 7'h19, 7'h12, 7'h02, 7'h78,
    7'h00, 7'h10, 7'h08, 7'h03, 7'h46, 7'h21, 7'h06, 7'h0E
  };

  always #5 clk = ~clk;

  seg7_display #(.REFRESH_CYCLES(REFRESH)) dut (.clk, .rst, .value, .an, .seg, .dp);

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, run, prev, changes;
    value = 16'h0123;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    prev = -1; run = 0; changes = 0;
    for (int n = 0; n < 400; n++) begin
      if (n % 16 == 0) value = (n == 16) ? 16'h4567 : (n == 32) ? 16'h89AB :
                               (n == 48) ? 16'hCDEF : 16'($urandom);
      @(posedge clk);
      #1;
      idx = -1;
      for (int i = 0; i < 4; i++) if (an == ~(4'b1 << i)) idx = i;
      checks++;
      if (idx < 0) begin
        failures++;
        $display("anodes %b not one-hot low", an);
        continue;
      end
      checks++;
      if (seg != REF[value[4*idx +: 4]] || dp != 1'b1) begin
        failures++;
        $display("digit %0d of %h: seg %b, expected %b", idx, value, seg, REF[value[4*idx +: 4]]);
      end
      if (idx == prev) run++;
      else begin
        changes++;
        if (changes > 2) begin  // the first digit seen may be partial
          checks++;
          if (run != REFRESH || idx != (prev + 1) % 4) begin
            failures++;
            $display("digit %0d lasted %0d cycles, next digit %0d", prev, run, idx);
          end
        end
        prev = idx; run = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
