// thread_queue: queue of receive threads waiting for a packet.
//
// A receive thread that is ready for a new packet has its ID enqueued here and
// goes to sleep; the port scheduler hands the packet of a ready port to the
// thread at the head. The queue length `len` is the number of threads that are
// waiting for traffic, the quantity l that the shutdown logic compares with the
// number of threads per PE.
//
// When a PE is told to shut down, its entries are removed (purge_mask has one bit
// per PE, level-sensitive): a thread that has just finished its packet and waits
// here is idle and can be killed at once. While a PE's bit is set its entries are
// neither reported at the head nor accepted on push.
//
// Timing: push, pop and purge take effect at the next rising edge; head and
// head_valid are combinational from the stored state. Enqueue and dequeue are
// one cycle each. The FIFO order, the 24 entries and the purpose follow the
// design description; the purge port is this design's own way of letting
// threads that sit in the queue terminate safely.
module thread_queue
  import np_pkg::*;
#(
  parameter int unsigned DEPTH = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push,
  input  tid_t               push_tid,
  output logic               push_ready,
  input  logic               pop,
  output tid_t               head,
  output logic               head_valid,
  input  logic [NUM_PE-1:0]  purge_mask,
  output logic [$clog2(DEPTH+1)-1:0] len
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  tid_t          q_q [DEPTH];
  logic [CW-1:0] cnt_q;

  function automatic logic masked(tid_t t, logic [NUM_PE-1:0] m);
    return m[pe_of_tid(t)];
  endfunction

  assign head       = q_q[0];
  assign head_valid = (cnt_q != '0) && !masked(q_q[0], purge_mask);
  assign push_ready = cnt_q < CW'(DEPTH);
  assign len        = cnt_q;

  tid_t          q_d [DEPTH];
  logic [CW-1:0] cnt_d;

  // next state: keep the surviving entries in order, then append the push
  always_comb begin
    cnt_d = '0;
    for (int unsigned i = 0; i < DEPTH; i++) q_d[i] = q_q[i];
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (CW'(i) < cnt_q && !masked(q_q[i], purge_mask) && !(i == 0 && pop && head_valid)) begin
        q_d[cnt_d[$clog2(DEPTH)-1:0]] = q_q[i];
        cnt_d = cnt_d + 1'b1;
      end
    end
    if (push && push_ready && !masked(push_tid, purge_mask)) begin
      q_d[cnt_d[$clog2(DEPTH)-1:0]] = push_tid;
      cnt_d = cnt_d + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q_q[i] <= '0;
    end else begin
      cnt_q <= cnt_d;
      for (int unsigned i = 0; i < DEPTH; i++) q_q[i] <= q_d[i];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
