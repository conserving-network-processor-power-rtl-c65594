// tb_threshold_unit: static scheme keeps th at TH_INIT; dynamic scheme lowers
// th by DELTA after a window without buffer pressure and raises it after a
// window with pressure, clamped to [TH_MIN, TH_MAX]. Uses the full-size
// defaults (500,000 initial, 10,000 step). Random window outcomes are compared
// with a model.
module tb_threshold_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, dyn = 0, pend = 0, press = 0;
  logic [19:0] th;
  always #5 clk = ~clk;

  threshold_unit dut (.clk, .rst_n, .dynamic_en(dyn), .period_end(pend),
                      .pressure_seen(press), .th);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (th != 20'd500000) begin failures++; $display("FAIL reset th=%0d", th); end
    // static: period ends change nothing
    repeat (5) begin
      pend = 1; press = $urandom_range(1); @(negedge clk);
      checks++; if (th != 20'd500000) begin failures++; $display("FAIL static th=%0d", th); end
    end
    pend = 0;
    // dynamic: 60 quiet windows drive th to the floor
    dyn = 1; model = 500000;
    for (int i = 0; i < 120; i++) begin
      press = (i >= 60) && ($urandom_range(3) != 0);
      pend  = 1;
      if (press) model = (model + 10000 > 990000) ? 990000 : model + 10000;
      else       model = (model - 10000 < 10000) ? 10000 : model - 10000;
      @(negedge clk);
      pend = 0;
      @(negedge clk);
      checks++;
      if (th != 20'(model)) begin failures++; $display("FAIL window %0d th=%0d exp=%0d", i, th, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
