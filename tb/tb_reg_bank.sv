// Self-checking testbench for reg_bank. After checking the reset values it
// applies random selections, inc/dec pulses, lock, host writes, host reads
// and response writes for 5000 cycles (with writes of the extreme values so
// that saturation is reached) and compares the display value, the host read
// data, the controller read port and REG_FREEZE with a reference model kept
// in the testbench every cycle. It counts how often each rule was exercised
// (saturation, inc on a response register, locked inc/dec) and fails if one
// never was.
module tb_reg_bank;
  import cnn_tester_pkg::*;

  logic                clk = 1'b0, rst = 1'b1;
  logic [ADDR_W-1:0]   sel = '0, host_addr = '0;
  logic                inc = 1'b0, dec = 1'b0, lock = 1'b0, host_we = 1'b0, out_we = 1'b0;
  logic [DISP_W-1:0]   host_wdata = '0, disp_value, host_rdata;
  logic [CELL_W-1:0]   in_idx = '0, out_idx = '0;
  logic [DATA_W-1:0]   in_data, out_data = '0;
  logic [FREEZE_W-1:0] reg_freeze;
  int                  checks = 0, failures = 0;

  // reference model
  int m_in [16], m_out [16], m_fr;
  int n_sat = 0, n_out_inc = 0, n_locked = 0, n_step = 0;

  always #5 clk = ~clk;

  reg_bank dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_read(int a);
    if (a < 16) return m_in[a];
    if (a < 32) return m_out[a - 16];
    if (a == 32) return m_fr;
    return 0;
  endfunction

  task automatic compare();
    checks++;
    if (disp_value != 16'(model_read(int'(sel))) || host_rdata != 16'(model_read(int'(host_addr))) ||
        in_data != 12'(m_in[in_idx]) || reg_freeze != 16'(m_fr)) begin
      failures++;
      $display("sel %0d disp %h exp %h | haddr %0d rdata %h exp %h | in[%0d] %h exp %h | freeze %h exp %h",
               sel, disp_value, model_read(int'(sel)), host_addr, host_rdata, model_read(int'(host_addr)),
               in_idx, in_data, m_in[in_idx], reg_freeze, m_fr);
    end
  endtask

  task automatic model_step();
    bit up, dn;
    int s;
    up = inc && !dec && !lock;
    dn = dec && !inc && !lock;
    s  = int'(sel);
    if ((inc || dec) && lock && (s < 16 || s == 32)) n_locked++;
    if ((inc ^ dec) && !lock && s >= 16 && s < 32) n_out_inc++;
    if (s < 16) begin
      if (up && m_in[s] == 4095) n_sat++;
      if (dn && m_in[s] == 0) n_sat++;
      if (up && m_in[s] < 4095) begin m_in[s]++; n_step++; end
      if (dn && m_in[s] > 0) begin m_in[s]--; n_step++; end
    end else if (s == 32) begin
      if (up && m_fr < 65535) begin m_fr++; n_step++; end
      if (dn && m_fr > 0) begin m_fr--; n_step++; end
    end
    if (host_we) begin
      if (host_addr < 16) m_in[host_addr] = int'(host_wdata[11:0]);
      else if (host_addr == 32) m_fr = int'(host_wdata);
    end
    if (out_we) m_out[out_idx] = int'(out_data);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 16; i++) begin m_in[i] = 'h800; m_out[i] = 0; end
    m_fr = 1000;
    // reset values
    for (int a = 0; a < 40; a++) begin
      @(negedge clk);
      sel = ADDR_W'(a); host_addr = ADDR_W'(39 - a); in_idx = CELL_W'(a);
      #1 compare();
    end
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      sel        = ADDR_W'(($urandom_range(9) == 0) ? 32 : $urandom_range(40));
      if (n % 1000 < 300) sel = ADDR_W'(n % 1000 < 150 ? 3 : 32);  // long runs on one register
      inc        = ($urandom_range(2) == 0);
      dec        = ($urandom_range(2) == 0);
      lock       = ($urandom_range(7) == 0);
      host_we    = ($urandom_range(9) == 0);
      host_addr  = ADDR_W'($urandom_range(40));
      case ($urandom_range(3))
        0: host_wdata = 16'hFFFF;
        1: host_wdata = 16'h0000;
        default: host_wdata = 16'($urandom);
      endcase
      out_we     = ($urandom_range(3) == 0);
      out_idx    = CELL_W'($urandom);
      out_data   = DATA_W'($urandom);
      in_idx     = CELL_W'($urandom);
      #1 compare();                  // combinational reads before the edge
      @(posedge clk);
      model_step();
      #1 compare();                  // state after the edge
    end
    checks++;
    if (n_sat == 0 || n_out_inc == 0 || n_locked == 0 || n_step == 0) begin
      failures++;
      $display("not exercised: saturation %0d, response inc %0d, locked %0d, steps %0d",
               n_sat, n_out_inc, n_locked, n_step);
    end
    $display("saturation %0d, response inc/dec %0d, locked %0d, steps %0d", n_sat, n_out_inc, n_locked, n_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
