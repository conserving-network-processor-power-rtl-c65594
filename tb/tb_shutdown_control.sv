// tb_shutdown_control: decision rules of the shutdown FSM.
//  - window end with c > th, no pressure, not at minimum -> one CMD_OFF
//  - c == th (not greater) -> nothing; at_min -> nothing
//  - pressure anywhere in the window blocks the turn-off at its end
//  - buf_pressure with a PE off -> CMD_ON at once; with pressure held, the
//    next CMD_ON comes exactly WAKE_HOLDOFF (50) cycles later
//  - buf_pressure with all PEs on -> no command
//  - period_pressure reports the ending window's pressure
module tb_shutdown_control;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic elapse = 0, buf_pressure = 0, all_on = 1, at_min = 0;
  logic [19:0] c_period = '0, th = 20'd500;
  pe_cmd_e cmd;
  logic pressure_seen, period_pressure;

  shutdown_control #(.W(20), .WAKE_HOLDOFF(50)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // drive one cycle and return the command seen in it
  task automatic cyc(bit el, int c, bit pr, output pe_cmd_e seen, output bit pp);
    @(negedge clk);
    elapse = el; c_period = 20'(c); buf_pressure = pr;
    #1 seen = cmd; pp = period_pressure;
    @(posedge clk); #1;
    elapse = 0; buf_pressure = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_cmd_e s;
    bit pp;
    int last_on, n_on;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc(0, 900, 0, s, pp); chk(s == CMD_NONE, "no command mid-window");
    cyc(1, 501, 0, s, pp); chk(s == CMD_OFF, "c > th -> off");
    chk(!pp, "quiet window");
    cyc(1, 500, 0, s, pp); chk(s == CMD_NONE, "c == th -> none");
    at_min = 1;
    cyc(1, 900, 0, s, pp); chk(s == CMD_NONE, "at minimum -> none");
    at_min = 0;
    // pressure inside the window, all PEs on: no wake, and no off at the end
    cyc(0, 0, 1, s, pp); chk(s == CMD_NONE, "pressure with all on -> none");
    repeat (3) cyc(0, 0, 0, s, pp);
    cyc(1, 900, 0, s, pp); chk(s == CMD_NONE, "window with pressure -> no off");
    chk(pp, "period_pressure reported");
    cyc(1, 900, 0, s, pp); chk(s == CMD_OFF, "next quiet window -> off");
    // some PE is off: held pressure wakes one PE every 50 cycles
    all_on = 0;
    n_on = 0; last_on = -1;
    for (int i = 0; i < 160; i++) begin
      cyc(0, 0, 1, s, pp);
      if (s == CMD_ON) begin
        if (n_on > 0) chk(i - last_on == 50, $sformatf("wake spacing %0d", i - last_on));
        else          chk(i == 0, "first wake immediate");
        last_on = i; n_on++;
      end
      chk(s != CMD_OFF, "no off under pressure");
    end
    chk(n_on == 4, $sformatf("4 wakes in 160 cycles, got %0d", n_on));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
