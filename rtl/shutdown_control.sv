// shutdown_control: decides when a processing element is turned off or on.
//
// Turn off: at the end of each window (timer pulse `elapse`) one PE is switched
// off when the idle-thread count of the window, c_period, exceeds the threshold
// th, the window saw no buffer pressure, and more than the minimum set of PEs is
// still active (at_min low).
// Turn on: as soon as buf_pressure is raised while some PE is off (all_on low),
// one PE is woken at once. The FSM then waits WAKE_HOLDOFF cycles, the time a
// woken thread needs to reach the thread queue, before it may wake another one,
// so that one burst does not wake every PE: under held pressure successive
// CMD_ON commands are exactly WAKE_HOLDOFF cycles apart.
// Outputs: cmd is a one-cycle command (CMD_OFF or CMD_ON) to the PE on/off
// control; pressure_seen is the current window's pressure flag, and
// period_pressure the flag of the window that ends this cycle (for the
// threshold unit).
// The decision rules follow the design description; the hold-off (set to the
// 50-cycle wake-up time) is this design's choice.
module shutdown_control
  import np_pkg::*;
#(
  parameter int unsigned W            = 20,
  parameter int unsigned WAKE_HOLDOFF = 50   // >= 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         elapse,
  input  logic [W-1:0] c_period,
  input  logic [W-1:0] th,
  input  logic         buf_pressure,
  input  logic         all_on,
  input  logic         at_min,
  output pe_cmd_e      cmd,
  output logic         pressure_seen,
  output logic         period_pressure
);

  typedef enum logic [1:0] {S_MONITOR, S_WAKE_HOLD} state_e;

  localparam int unsigned HW = $clog2(WAKE_HOLDOFF + 1);

  state_e        state_q;
  logic [HW-1:0] hold_q;
  logic          seen_q;

  assign pressure_seen   = seen_q || buf_pressure;
  assign period_pressure = elapse && pressure_seen;

  always_comb begin
    cmd = CMD_NONE;
    if (state_q == S_MONITOR) begin
      if (buf_pressure && !all_on)
        cmd = CMD_ON;
      else if (elapse && !pressure_seen && !at_min && c_period > th)
        cmd = CMD_OFF;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_MONITOR;
      hold_q  <= '0;
      seen_q  <= 1'b0;
    end else begin
      seen_q <= elapse ? 1'b0 : pressure_seen;
      unique case (state_q)
        S_MONITOR: begin
          if (cmd == CMD_ON) begin
            state_q <= S_WAKE_HOLD;
            hold_q  <= HW'(WAKE_HOLDOFF - 2);
          end
        end
        S_WAKE_HOLD: begin
          if (hold_q == '0) state_q <= S_MONITOR;
          else              hold_q  <= hold_q - 1'b1;
        end
        default: state_q <= S_MONITOR;
      endcase
    end
  end

endmodule
