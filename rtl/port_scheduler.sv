// port_scheduler: dynamic thread-to-port mapping.
//
// Instead of tying each input port to one receive thread, any waiting thread
// may take a packet from any port. The scheduler scans the port_rdy_status
// register round-robin, testing one bit per cycle. When it finds a set bit Ps
// while a thread Ti waits at the head of the thread queue, it spends one more
// cycle dequeuing Ti, removing the oldest packet of Ps from the receive buffer
// and handing that packet to Ti (grant). The scan then resumes at the port after
// Ps. While no thread is waiting the scan pointer holds still.
//
// Timing: m bits tested cost m cycles, the dequeue costs one more; grant_* is
// registered and valid for one cycle, the cycle after the dequeue. The one-cycle
// cost per tested bit and per dequeue follow the design description; holding the
// pointer while the queue is empty is this design's choice.
module port_scheduler
  import np_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] port_rdy_status,
  // thread queue
  input  logic                 tq_head_valid,
  input  tid_t                 tq_head,
  output logic                 tq_pop,
  // receive buffer
  output logic                 buf_rd_en,
  output port_t                buf_rd_port,
  input  mpkt_t                buf_rd_pkt,
  input  logic                 buf_rd_hit,
  // packet handed to a thread
  output logic                 grant_valid,
  output tid_t                 grant_tid,
  output mpkt_t                grant_pkt
);

  typedef enum logic {S_SCAN, S_DEQ} state_e;

  state_e state_q;
  port_t  ptr_q;

  assign buf_rd_port = ptr_q;
  assign tq_pop      = (state_q == S_DEQ) && tq_head_valid && buf_rd_hit;
  assign buf_rd_en   = tq_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_SCAN;
      ptr_q       <= '0;
      grant_valid <= 1'b0;
      grant_tid   <= '0;
      grant_pkt   <= '0;
    end else begin
      grant_valid <= 1'b0;
      unique case (state_q)
        S_SCAN: begin
          if (tq_head_valid) begin
            if (port_rdy_status[ptr_q]) state_q <= S_DEQ;
            else                        ptr_q   <= ptr_q + 1'b1;
          end
        end
        S_DEQ: begin
          state_q <= S_SCAN;
          if (tq_pop) begin
            grant_valid <= 1'b1;
            grant_tid   <= tq_head;
            grant_pkt   <= buf_rd_pkt;
            ptr_q       <= ptr_q + 1'b1;
          end
        end
        default: state_q <= S_SCAN;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tq_pop |-> buf_rd_hit);

endmodule
