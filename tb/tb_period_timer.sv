// tb_period_timer: the window timer must pulse elapse for exactly one cycle at
// the end of every PERIOD cycles, counting from reset. Run with PERIOD = 37 and
// checked over 20 windows.
module tb_period_timer;
  localparam int P = 37;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, elapse;
  always #5 clk = ~clk;

  period_timer #(.PERIOD(P)) dut (.clk, .rst_n, .elapse);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20 * P; c++) begin
      #1;
      checks++;
      if (elapse !== ((c % P) == P - 1)) begin
        failures++; $display("FAIL cycle %0d elapse=%b", c, elapse);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
