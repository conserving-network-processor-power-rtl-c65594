// tx_queue: outgoing packet queue between receive and transmit threads.
//
// A receive thread that has finished a packet enqueues it here; a transmit
// thread takes it and sends it to its destination port. Receive PEs share the
// single enqueue port and transmit PEs the single dequeue port; each side is
// arbitrated round-robin, one request per PE. An ack is combinational in the
// cycle of the request; pop_pkt shows the head entry that an acked pop takes.
// A PE that is not granted keeps its request up.
// The queue itself follows the design description; its depth (16 packets),
// the one-per-cycle ports and the arbitration are this design's choices.
module tx_queue
  import np_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_RX_PE-1:0] push_req,
  input  txpkt_t               push_pkt [NUM_RX_PE],
  output logic [NUM_RX_PE-1:0] push_ack,
  input  logic [NUM_TX_PE-1:0] pop_req,
  output logic [NUM_TX_PE-1:0] pop_ack,
  output txpkt_t               pop_pkt,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  txpkt_t        mem_q [DEPTH];
  logic [AW-1:0] wr_q, rd_q;
  logic [CW-1:0] cnt_q;

  logic [NUM_RX_PE-1:0] push_gnt;
  logic [NUM_TX_PE-1:0] pop_gnt;
  logic                 full, empty, do_push, do_pop;
  txpkt_t               wdata;

  assign full  = cnt_q == CW'(DEPTH);
  assign empty = cnt_q == '0;

  rr_arbiter #(.N(NUM_RX_PE)) u_push_arb (.clk, .rst_n, .req(push_req), .advance(!full),  .gnt(push_gnt));
  rr_arbiter #(.N(NUM_TX_PE)) u_pop_arb  (.clk, .rst_n, .req(pop_req),  .advance(!empty), .gnt(pop_gnt));

  assign push_ack = full  ? '0 : push_gnt;
  assign pop_ack  = empty ? '0 : pop_gnt;
  assign do_push  = push_ack != '0;
  assign do_pop   = pop_ack  != '0;
  assign pop_pkt  = mem_q[rd_q];

  always_comb begin
    wdata = '0;
    for (int unsigned i = 0; i < NUM_RX_PE; i++)
      if (push_gnt[i]) wdata = push_pkt[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) begin
        mem_q[wr_q] <= wdata;
        wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (do_pop) rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  assign count = cnt_q;

endmodule
