// np_power_top: network processor whose processing elements are clock-gated
// according to the traffic load.
//
// Packets (64-byte mpackets tagged with their input port) enter the receive
// buffer of the interface controller. Receive threads on PEs 0..3 queue up in
// the thread queue; the port scheduler gives each queued thread the packet of
// the next ready port. A receive thread processes its packet and puts it in the
// outgoing queue, from which transmit threads on PEs 4..5 send it out
// (out_valid/out_pkt, one output per transmit PE).
//
// Power management: the idle-thread counter counts the cycles of each window
// in which at least one PE's worth of threads (l >= 4) wait in the thread queue.
// When the window timer elapses, the shutdown control turns one PE off if the
// count exceeds the threshold th (static, or adapted each window when
// dynamic_th_en is set) and the window saw no buffer pressure. When the regular
// receive-buffer entries are all used (buf_pressure) it wakes one PE at once;
// the extra buffer entry holds the packets arriving while that PE starts.
// The PE on/off control sets the PE's off flag, waits until its threads have
// finished their packets and killed themselves, then stops the PE clock through
// its clock gate. PE counts follow 4+2, 3+2, 2+2, 2+1, 1+1 (receive+transmit).
//
// Parameters default to the evaluated configuration: 6 PEs of 4 threads,
// 16 ports, 1,000,000-cycle window, th = 500,000 with 2% steps, a 24-entry
// thread queue and one extra buffer entry. Buffer and queue depths and the
// thread latencies are this design's choices.
//
// Assertions at the end state rules of the whole system: no turn-off after a
// window with buffer pressure, buffer pressure only with buffered packets,
// and an outgoing queue within its depth.
module np_power_top
  import np_pkg::*;
#(
  parameter int unsigned PERIOD             = 1_000_000,
  parameter int unsigned TH_INIT            = 500_000,
  parameter int unsigned TH_DELTA           = 10_000,
  parameter int unsigned TH_MIN             = 10_000,
  parameter int unsigned TH_MAX             = 990_000,
  parameter int unsigned RFIFO_DEPTH        = 16,
  parameter int unsigned EXTRA_DEPTH        = 1,
  parameter int unsigned TQ_DEPTH           = 24,
  parameter int unsigned TXQ_DEPTH          = 16,
  parameter int unsigned WAKE_HOLDOFF       = 50,
  parameter int unsigned THREAD_INIT_CYCLES = 40,
  parameter int unsigned MEM_CYCLES         = 1500,
  parameter int unsigned TX_CYCLES          = 300
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dynamic_th_en,
  // network receive side
  input  logic                 in_valid,
  input  mpkt_t                in_pkt,
  output logic                 in_drop,
  // network transmit side
  output logic [NUM_TX_PE-1:0] out_valid,
  output txpkt_t               out_pkt [NUM_TX_PE],
  // power-management status
  output logic [NUM_PE-1:0]    pe_clk_en,
  output logic [NUM_PE-1:0]    pe_off_flag,
  output logic [$clog2(NUM_RX_PE+1)-1:0] rx_active,
  output logic [$clog2(NUM_TX_PE+1)-1:0] tx_active,
  output pe_cmd_e              pe_cmd,
  output logic                 window_end,
  output logic                 buf_pressure,
  output logic                 extra_in_use,
  output logic [$clog2(TQ_DEPTH+1)-1:0] tq_len,
  output logic [$clog2(PERIOD+1)-1:0]   th,
  output logic [$clog2(PERIOD+1)-1:0]   idle_count,
  output logic [31:0]          pe_pkt_count [NUM_PE]
);

  localparam int unsigned CNT_W = $clog2(PERIOD + 1);

  // ---------------------------------------------------------------- wiring
  logic [NUM_RX_PE-1:0] rcv_req, rcv_ack;
  tid_t                 rcv_tid [NUM_RX_PE];
  logic                 grant_valid;
  tid_t                 grant_tid;
  mpkt_t                grant_pkt;
  logic                 tq_ge_t;
  logic [NUM_PORTS-1:0] port_rdy_status;

  logic [NUM_RX_PE-1:0] txq_push_req, txq_push_ack;
  txpkt_t               txq_push_pkt [NUM_RX_PE];
  logic [NUM_TX_PE-1:0] txq_pop_req, txq_pop_ack;
  txpkt_t               txq_pop_pkt;
  logic [$clog2(TXQ_DEPTH+1)-1:0] txq_count;

  logic [NUM_PE-1:0]    pe_idle, gclk;
  logic                 all_on, at_min, pressure_seen, period_pressure;

  // ------------------------------------------------------ receive interface
  interface_controller #(
    .RFIFO_DEPTH(RFIFO_DEPTH), .EXTRA_DEPTH(EXTRA_DEPTH), .TQ_DEPTH(TQ_DEPTH)
  ) u_ifc (
    .clk, .rst_n,
    .in_valid, .in_pkt, .in_drop,
    .rcv_req, .rcv_tid, .rcv_ack,
    .tq_purge(pe_off_flag),
    .grant_valid, .grant_tid, .grant_pkt,
    .tq_len, .tq_ge_t, .buf_pressure, .extra_in_use, .port_rdy_status
  );

  // ------------------------------------------------------- shutdown logic
  period_timer #(.PERIOD(PERIOD)) u_timer (.clk, .rst_n, .elapse(window_end));

  idle_thread_counter #(.W(CNT_W)) u_idle_cnt (
    .clk, .rst_n, .ge(tq_ge_t), .clear(window_end), .c_period(idle_count)
  );

  threshold_unit #(
    .W(CNT_W), .TH_INIT(TH_INIT), .DELTA(TH_DELTA), .TH_MIN(TH_MIN), .TH_MAX(TH_MAX)
  ) u_th (
    .clk, .rst_n, .dynamic_en(dynamic_th_en), .period_end(window_end),
    .pressure_seen(period_pressure), .th
  );

  shutdown_control #(.W(CNT_W), .WAKE_HOLDOFF(WAKE_HOLDOFF)) u_sdc (
    .clk, .rst_n, .elapse(window_end), .c_period(idle_count), .th,
    .buf_pressure, .all_on, .at_min,
    .cmd(pe_cmd), .pressure_seen, .period_pressure
  );

  pe_onoff_ctrl u_onoff (
    .clk, .rst_n, .cmd(pe_cmd), .pe_idle,
    .off_flag(pe_off_flag), .clk_en(pe_clk_en),
    .rx_active, .tx_active, .all_on, .at_min
  );

  // ------------------------------------------------------- processing elements
  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    clock_gate u_cg (.clk, .en(pe_clk_en[p]), .gclk(gclk[p]));
  end

  for (genvar p = 0; p < NUM_RX_PE; p++) begin : g_rx
    logic   unused_out_valid, unused_pop_req;
    txpkt_t unused_out_pkt;
    microengine #(
      .PE_ID(p), .IS_TX(1'b0), .THREAD_INIT_CYCLES(THREAD_INIT_CYCLES),
      .MEM_CYCLES(MEM_CYCLES), .TX_CYCLES(TX_CYCLES)
    ) u_me (
      .clk(gclk[p]), .rst_n, .off_flag(pe_off_flag[p]),
      .rcv_req(rcv_req[p]), .rcv_tid(rcv_tid[p]), .rcv_ack(rcv_ack[p]),
      .grant_valid, .grant_tid, .grant_pkt,
      .txq_push_req(txq_push_req[p]), .txq_push_pkt(txq_push_pkt[p]),
      .txq_push_ack(txq_push_ack[p]),
      .txq_pop_req(unused_pop_req), .txq_pop_ack(1'b0), .txq_pop_pkt('0),
      .out_valid(unused_out_valid), .out_pkt(unused_out_pkt),
      .pe_idle(pe_idle[p]), .pkt_count(pe_pkt_count[p])
    );
  end

  for (genvar x = 0; x < NUM_TX_PE; x++) begin : g_tx
    logic   unused_rcv_req, unused_push_req;
    tid_t   unused_rcv_tid;
    txpkt_t unused_push_pkt;
    microengine #(
      .PE_ID(NUM_RX_PE + x), .IS_TX(1'b1), .THREAD_INIT_CYCLES(THREAD_INIT_CYCLES),
      .MEM_CYCLES(MEM_CYCLES), .TX_CYCLES(TX_CYCLES)
    ) u_me (
      .clk(gclk[NUM_RX_PE + x]), .rst_n, .off_flag(pe_off_flag[NUM_RX_PE + x]),
      .rcv_req(unused_rcv_req), .rcv_tid(unused_rcv_tid), .rcv_ack(1'b0),
      .grant_valid(1'b0), .grant_tid('0), .grant_pkt('0),
      .txq_push_req(unused_push_req), .txq_push_pkt(unused_push_pkt), .txq_push_ack(1'b0),
      .txq_pop_req(txq_pop_req[x]), .txq_pop_ack(txq_pop_ack[x]), .txq_pop_pkt,
      .out_valid(out_valid[x]), .out_pkt(out_pkt[x]),
      .pe_idle(pe_idle[NUM_RX_PE + x]), .pkt_count(pe_pkt_count[NUM_RX_PE + x])
    );
  end

  // ------------------------------------------------------- outgoing queue
  tx_queue #(.DEPTH(TXQ_DEPTH)) u_txq (
    .clk, .rst_n,
    .push_req(txq_push_req), .push_pkt(txq_push_pkt), .push_ack(txq_push_ack),
    .pop_req(txq_pop_req), .pop_ack(txq_pop_ack), .pop_pkt(txq_pop_pkt),
    .count(txq_count)
  );

  // ------------------------------------------------------- system rules
  // no PE is turned off in a window that has seen buffer pressure
  assert property (@(posedge clk) disable iff (!rst_n)
    pe_cmd == CMD_OFF |-> !pressure_seen);
  // buffer pressure implies a buffered packet on some port
  assert property (@(posedge clk) disable iff (!rst_n)
    buf_pressure |-> port_rdy_status != '0);
  // the outgoing queue never holds more than its depth
  assert property (@(posedge clk) disable iff (!rst_n)
    txq_count <= ($bits(txq_count))'(TXQ_DEPTH));

endmodule
