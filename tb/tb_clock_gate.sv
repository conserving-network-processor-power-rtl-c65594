// tb_clock_gate: checks the PE clock gate.
// The enable is changed right after rising edges (as a flop in the clk domain
// would) and at random times in the low phase. The gated clock must pulse in
// exactly the cycles whose enable was high before the rising edge, must never
// rise while clk is low, and must never produce a shortened pulse.
module tb_clock_gate;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, gclk;
  int gedges = 0, expected = 0;

  always #5 clk = ~clk;

  clock_gate dut (.clk, .en, .gclk);

  always @(posedge gclk) gedges++;

  // gclk may only be high while clk is high
  always @(gclk) begin
    checks++;
    if (gclk && !clk) begin failures++; $display("FAIL gclk high while clk low at %0t", $time); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      logic nxt;
      nxt = ($urandom_range(2) != 0);
      #1 en = nxt;                       // flop-like change after the edge
      if ($urandom_range(3) == 0) begin  // extra glitch inside the high phase
        #2 en = ~nxt; #1 en = nxt;
      end
      @(posedge clk);
      if (nxt) expected++;
      #1;
      checks++;
      if (gclk !== nxt) begin failures++; $display("FAIL cycle %0d gclk=%b en=%b", i, gclk, nxt); end
    end
    checks++;
    if (gedges != expected) begin failures++; $display("FAIL edges %0d expected %0d", gedges, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
