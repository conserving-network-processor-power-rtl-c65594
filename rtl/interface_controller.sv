// interface_controller: receive side of the network processor.
//
// Holds the receive buffer (with its extra overflow entry), the port_rdy_status
// register derived from it, the thread queue and the round-robin port scheduler.
// Receive threads of the PEs issue receive requests: one request line per
// receive PE, arbitrated round-robin onto the single enqueue port of the thread
// queue (rcv_ack tells the requesting PE its thread was enqueued). The scheduler
// hands buffered packets to queued threads over the grant bus, which all
// receive PEs watch for their thread IDs.
//
// Towards the shutdown logic it reports the thread-queue length tq_len (l),
// tq_ge_t = (l >= THREADS_PER_PE) and buf_pressure (regular buffer entries full).
// tq_purge removes the queued threads of PEs being shut down.
//
// Timing: enqueue 1 cycle, 1 cycle per status bit scanned, 1 cycle dequeue,
// grant registered. The structure follows the design's interface controller
// figure; the request arbitration is this design's choice.
module interface_controller
  import np_pkg::*;
#(
  parameter int unsigned RFIFO_DEPTH = 16,
  parameter int unsigned EXTRA_DEPTH = 1,
  parameter int unsigned TQ_DEPTH    = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // network side
  input  logic                   in_valid,
  input  mpkt_t                  in_pkt,
  output logic                   in_drop,
  // receive requests from the receive PEs
  input  logic [NUM_RX_PE-1:0]   rcv_req,
  input  tid_t                   rcv_tid [NUM_RX_PE],
  output logic [NUM_RX_PE-1:0]   rcv_ack,
  input  logic [NUM_PE-1:0]      tq_purge,
  // packet grant bus
  output logic                   grant_valid,
  output tid_t                   grant_tid,
  output mpkt_t                  grant_pkt,
  // status for the shutdown control
  output logic [$clog2(TQ_DEPTH+1)-1:0] tq_len,
  output logic                   tq_ge_t,
  output logic                   buf_pressure,
  output logic                   extra_in_use,
  output logic [NUM_PORTS-1:0]   port_rdy_status
);

  logic        tq_push, tq_push_ready, tq_pop, tq_head_valid;
  tid_t        tq_push_tid, tq_head;
  logic        buf_rd_en, buf_rd_hit;
  port_t       buf_rd_port;
  mpkt_t       buf_rd_pkt;
  logic [NUM_RX_PE-1:0] arb_gnt;
  logic [$clog2(RFIFO_DEPTH+EXTRA_DEPTH+1)-1:0] buf_count;

  rfifo #(.BASE_DEPTH(RFIFO_DEPTH), .EXTRA_DEPTH(EXTRA_DEPTH)) u_rfifo (
    .clk, .rst_n,
    .in_valid, .in_pkt, .in_drop,
    .port_rdy_status,
    .rd_en(buf_rd_en), .rd_port(buf_rd_port), .rd_pkt(buf_rd_pkt), .rd_hit(buf_rd_hit),
    .count(buf_count), .buf_pressure, .extra_in_use
  );

  rr_arbiter #(.N(NUM_RX_PE)) u_req_arb (
    .clk, .rst_n, .req(rcv_req), .advance(tq_push_ready), .gnt(arb_gnt)
  );

  always_comb begin
    tq_push_tid = '0;
    for (int unsigned i = 0; i < NUM_RX_PE; i++)
      if (arb_gnt[i]) tq_push_tid = rcv_tid[i];
  end
  assign tq_push = (arb_gnt != '0) && tq_push_ready;
  assign rcv_ack = tq_push_ready ? arb_gnt : '0;

  thread_queue #(.DEPTH(TQ_DEPTH)) u_tq (
    .clk, .rst_n,
    .push(tq_push), .push_tid(tq_push_tid), .push_ready(tq_push_ready),
    .pop(tq_pop), .head(tq_head), .head_valid(tq_head_valid),
    .purge_mask(tq_purge), .len(tq_len)
  );

  port_scheduler u_sched (
    .clk, .rst_n, .port_rdy_status,
    .tq_head_valid, .tq_head, .tq_pop,
    .buf_rd_en, .buf_rd_port, .buf_rd_pkt, .buf_rd_hit,
    .grant_valid, .grant_tid, .grant_pkt
  );

  assign tq_ge_t = tq_len >= ($bits(tq_len))'(THREADS_PER_PE);

  // buffer status flags agree with the occupancy; a buffered packet shows
  // up in port_rdy_status
  assert property (@(posedge clk) disable iff (!rst_n)
    buf_pressure == (buf_count >= ($bits(buf_count))'(RFIFO_DEPTH)));
  assert property (@(posedge clk) disable iff (!rst_n)
    (buf_count != '0) == (port_rdy_status != '0));

endmodule
