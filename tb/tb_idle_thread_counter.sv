// tb_idle_thread_counter: random l >= T indications with a window pulse every
// 50 cycles; at each pulse c_period must equal the number of cycles of that
// window in which ge was high (counted here independently). Also checks
// saturation with a narrow 4-bit counter instance.
module tb_idle_thread_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ge = 0, clear = 0, ge4 = 0;
  logic [19:0] c_period;
  logic [3:0]  c4;
  always #5 clk = ~clk;

  idle_thread_counter #(.W(20)) dut  (.clk, .rst_n, .ge, .clear, .c_period);
  idle_thread_counter #(.W(4))  dut4 (.clk, .rst_n, .ge(ge4), .clear(1'b0), .c_period(c4));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      ge    = ($urandom_range(3) != 0);
      clear = (c % 50) == 49;
      if (ge) model++;
      #1;
      if (clear) begin
        checks++;
        if (c_period != 20'(model)) begin
          failures++; $display("FAIL window end %0d: c=%0d exp=%0d", c, c_period, model);
        end
        model = 0;
      end
    end
    ge = 0;
    // saturation
    ge4 = 1;
    repeat (30) @(negedge clk);
    checks++;
    if (c4 != 4'hF) begin failures++; $display("FAIL saturation c4=%0d", c4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
