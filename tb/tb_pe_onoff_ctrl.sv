// tb_pe_onoff_ctrl: PE on/off control with 4 receive and 2 transmit PEs.
// Issues CMD_OFF repeatedly and checks the active counts follow
// 4+2 -> 3+2 -> 2+2 -> 2+1 -> 1+1 (and stop there), that the lowest-ID active
// PE of the right role gets its off flag, that its clock enable drops only
// after the PE reports idle (the cycle after), then CMD_ON walks the sequence
// back up (2+1, 2+2, 3+2, 4+2), re-enabling the lowest-ID flagged PE with its clock in one step.
module tb_pe_onoff_ctrl;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_cmd_e cmd = CMD_NONE;
  logic [NUM_PE-1:0] pe_idle = '0, off_flag, clk_en;
  logic [2:0] rx_active;
  logic [1:0] tx_active;
  logic all_on, at_min;

  pe_onoff_ctrl dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic issue(pe_cmd_e c);
    @(negedge clk); cmd = c;
    @(negedge clk); cmd = CMD_NONE;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_r[5] = '{4, 3, 2, 2, 1};
    int exp_x[5] = '{2, 2, 2, 1, 1};
    logic [NUM_PE-1:0] exp_flag[5] = '{6'b000000, 6'b000001, 6'b000011, 6'b010011, 6'b010111};
    // turning on also picks the lowest-ID flagged PE of the role
    logic [NUM_PE-1:0] up_flag[4] = '{6'b000000, 6'b000100, 6'b000110, 6'b010110};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(all_on && clk_en == '1 && off_flag == '0, "reset: all on");
    for (int k = 1; k < 5; k++) begin
      issue(CMD_OFF);
      chk(32'(rx_active) == exp_r[k] && 32'(tx_active) == exp_x[k],
          $sformatf("off step %0d: %0d+%0d", k, rx_active, tx_active));
      chk(off_flag == exp_flag[k], $sformatf("off step %0d flags %b", k, off_flag));
      chk(clk_en == '1 || clk_en == ~exp_flag[k-1], "clock still running while draining");
      // the PE finishes its threads: clock enable drops the next cycle
      pe_idle = off_flag;
      @(negedge clk);
      chk(clk_en == ~off_flag, $sformatf("gated after idle %b", clk_en));
    end
    chk(at_min, "at minimum 1+1");
    issue(CMD_OFF);
    chk(off_flag == exp_flag[4], "no change below 1+1");
    // back up
    for (int k = 3; k >= 0; k--) begin
      issue(CMD_ON);
      pe_idle = off_flag & ~clk_en;
      chk(32'(rx_active) == exp_r[k] && 32'(tx_active) == exp_x[k],
          $sformatf("on step %0d: %0d+%0d", k, rx_active, tx_active));
      chk(off_flag == up_flag[k], $sformatf("on step %0d flags %b", k, off_flag));
      chk(clk_en == ~off_flag, "woken PE clock on at once");
    end
    chk(all_on, "all on again");
    // turn-on of a PE that is still draining cancels the turn-off
    pe_idle = '0;
    issue(CMD_OFF);
    chk(off_flag == 6'b000001 && clk_en == '1, "PE0 draining");
    issue(CMD_ON);
    chk(off_flag == '0 && clk_en == '1, "draining PE0 restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
