// idle_thread_counter: measures how long a window had surplus threads.
//
// Counts the cycles of the current window in which the thread queue holds at
// least one PE's worth of waiting threads (l >= T, input ge). At the window end
// (clear, the timer pulse) c_period presents the count of the whole window,
// including that last cycle, and the counter restarts from zero. The count
// saturates at its maximum. W defaults to 20 bits, enough for a one-million-cycle
// window.
// Timing: c_period is combinational (stored count + this cycle's ge).
module idle_thread_counter #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ge,
  input  logic         clear,
  output logic [W-1:0] c_period
);

  logic [W-1:0] cnt_q;

  assign c_period = (ge && cnt_q != '1) ? cnt_q + 1'b1 : cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt_q <= '0;
    else if (clear) cnt_q <= '0;
    else            cnt_q <= c_period;
  end

endmodule
