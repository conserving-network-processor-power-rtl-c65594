// period_timer: the observation window of the shutdown logic.
//
// Counts system clock cycles and pulses `elapse` for one cycle at the end of
// every PERIOD-cycle window (cycles PERIOD-1, 2*PERIOD-1, ...). The pulse enables
// the shutdown decision and clears the idle-thread counter. PERIOD defaults to
// the one-million-cycle window of the evaluated configuration, long enough to
// hide the longest observed PE shutdown latency. The counter width is derived
// from PERIOD (20 bits for one million).
module period_timer #(
  parameter int unsigned PERIOD = 1_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic elapse
);

  localparam int unsigned W = $clog2(PERIOD);

  logic [W-1:0] cnt_q;

  assign elapse = cnt_q == W'(PERIOD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt_q <= '0;
    else if (elapse) cnt_q <= '0;
    else             cnt_q <= cnt_q + 1'b1;
  end

endmodule
