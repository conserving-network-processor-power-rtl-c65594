// pe_onoff_ctrl: carries out the on/off commands on the processing elements.
//
// Each PE has an off flag and a clock enable. CMD_OFF sets the off flag of one
// active PE; its threads then finish their current packet and kill themselves,
// and once the PE reports that all its threads are gone (pe_idle) its clock
// enable is dropped. CMD_ON clears the off flag of one flagged PE and raises its
// clock enable in the same step, whether the PE was already gated or still
// draining.
//
// Which role loses or gains a PE keeps the receive/transmit split of the
// shutdown sequence 4+2, 3+2, 2+2, 2+1, 1+1 (receive + transmit PEs):
//   off: a receive PE while active receive PEs outnumber active transmit PEs,
//        else a transmit PE; never below one PE of each role.
//   on:  a transmit PE while fewer transmit than receive PEs are active and a
//        transmit PE is off, else a receive PE.
// Within a role the PE with the lowest ID is chosen.
// Outputs: off_flag and clk_en per PE (registered), active counts, all_on
// (no PE flagged) and at_min (one active PE per role).
// The sequence and lowest-ID choice follow the design description; the rule
// that produces the sequence for other PE counts is this design's own.
module pe_onoff_ctrl
  import np_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cmd_e           cmd,
  input  logic [NUM_PE-1:0] pe_idle,
  output logic [NUM_PE-1:0] off_flag,
  output logic [NUM_PE-1:0] clk_en,
  output logic [$clog2(NUM_RX_PE+1)-1:0] rx_active,
  output logic [$clog2(NUM_TX_PE+1)-1:0] tx_active,
  output logic              all_on,
  output logic              at_min
);

  localparam int unsigned RW = $clog2(NUM_RX_PE + 1);
  localparam int unsigned XW = $clog2(NUM_TX_PE + 1);

  logic [NUM_PE-1:0] sel;

  always_comb begin
    rx_active = '0;
    tx_active = '0;
    for (int unsigned i = 0; i < NUM_PE; i++) begin
      if (!off_flag[i]) begin
        if (i < NUM_RX_PE) rx_active = rx_active + 1'b1;
        else               tx_active = tx_active + 1'b1;
      end
    end
  end

  assign all_on = off_flag == '0;
  assign at_min = rx_active <= RW'(1) && tx_active <= XW'(1);

  // choose the PE the command applies to
  always_comb begin
    logic use_rx;
    sel    = '0;
    use_rx = 1'b0;
    if (cmd == CMD_OFF) begin
      use_rx = 32'(rx_active) > 32'(tx_active) && rx_active > RW'(1);
      if (!use_rx && tx_active <= XW'(1)) use_rx = rx_active > RW'(1);
      for (int unsigned i = 0; i < NUM_PE; i++)
        if (sel == '0 && !off_flag[i] && ((i < NUM_RX_PE) == use_rx)
            && ((i < NUM_RX_PE) ? rx_active > RW'(1) : tx_active > XW'(1)))
          sel[i] = 1'b1;
    end else if (cmd == CMD_ON) begin
      use_rx = !(32'(tx_active) < 32'(rx_active) && tx_active < XW'(NUM_TX_PE));
      if (use_rx && rx_active == RW'(NUM_RX_PE)) use_rx = 1'b0;
      for (int unsigned i = 0; i < NUM_PE; i++)
        if (sel == '0 && off_flag[i] && ((i < NUM_RX_PE) == use_rx))
          sel[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      off_flag <= '0;
      clk_en   <= '1;
    end else begin
      for (int unsigned i = 0; i < NUM_PE; i++) begin
        if (sel[i] && cmd == CMD_OFF) begin
          off_flag[i] <= 1'b1;
        end else if (sel[i] && cmd == CMD_ON) begin
          off_flag[i] <= 1'b0;
          clk_en[i]   <= 1'b1;
        end else if (off_flag[i] && clk_en[i] && pe_idle[i]) begin
          clk_en[i]   <= 1'b0;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
  assert property (@(posedge clk) disable iff (!rst_n) rx_active >= RW'(1) && tx_active >= XW'(1));

endmodule
