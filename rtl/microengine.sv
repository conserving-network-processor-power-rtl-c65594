// microengine: one clock-gated processing element (PE) with four hardware threads.
//
// The PE runs either receive threads (IS_TX = 0) or transmit threads (IS_TX = 1).
// Only one thread executes in the pipeline at a time; a thread keeps the
// pipeline until it blocks on a long-latency event (coarse-grain multithreading).
//
// Receive thread loop:
//   INIT  (THREAD_INIT_CYCLES, thread start-up after reset or wake-up)
//   REQ   issue a receive request: the thread ID is enqueued in the thread queue
//   WAIT  asleep until the port scheduler grants it a packet
//   READY/RUN  hold the pipeline and fold the 16 words of the mpacket through
//         the ALU (add and xor alternately), one word per cycle, into a digest
//   MEM   swapped out for MEM_CYCLES (memory latency of the packet work)
//   PUSH  put the processed packet into the outgoing packet queue
//   then check the off flag: set -> KILLED, else back to REQ.
// Transmit thread loop:
//   INIT, REQ (poll the outgoing queue), MEM (TX_CYCLES of transmission),
//   OUT (emit the packet), then check the off flag as above.
//
// Safe termination: a thread checks the off flag only between packets, so a
// packet that has been handed to a thread is always finished. A thread that is
// waiting for work (REQ or WAIT) with the flag set is idle and is killed at
// once, unless its packet is delivered in that very cycle. Requests are not
// issued while the flag is set. pe_idle is high when every thread is KILLED;
// the on/off control then stops the clock. When the flag clears and the clock
// returns, killed threads restart through INIT.
//
// Latencies (all >= 1): a thread spends exactly THREAD_INIT_CYCLES in INIT,
// MEM_CYCLES in MEM (receive) or TX_CYCLES in MEM (transmit). A receive thread
// granted a packet in cycle g with the pipeline free requests the push in cycle
// g + 18 + MEM_CYCLES (1 wake, 1 ready, 16 ALU cycles, MEM_CYCLES wait).
// Interface timing: rcv_req/txq_pop_req are held until acknowledged in the same
// cycle (combinational ack); grant and txq_pop_pkt are sampled on the acking or
// granting cycle. All state is clocked by the gated PE clock `clk`.
// The thread behaviour, the off flag and kill follow the design description.
// The instruction pipeline itself is not modelled: the packet work is replaced
// by the ALU digest plus a fixed memory wait, and INIT/MEM/TX latencies are
// this design's parameters.
module microengine
  import np_pkg::*;
#(
  parameter int unsigned PE_ID              = 0,
  parameter bit          IS_TX              = 1'b0,
  parameter int unsigned THREAD_INIT_CYCLES = 40,
  parameter int unsigned MEM_CYCLES         = 1500,
  parameter int unsigned TX_CYCLES          = 300
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   off_flag,
  // receive side (IS_TX = 0)
  output logic   rcv_req,
  output tid_t   rcv_tid,
  input  logic   rcv_ack,
  input  logic   grant_valid,
  input  tid_t   grant_tid,
  input  mpkt_t  grant_pkt,
  output logic   txq_push_req,
  output txpkt_t txq_push_pkt,
  input  logic   txq_push_ack,
  // transmit side (IS_TX = 1)
  output logic   txq_pop_req,
  input  logic   txq_pop_ack,
  input  txpkt_t txq_pop_pkt,
  output logic   out_valid,
  output txpkt_t out_pkt,
  // status
  output logic   pe_idle,
  output logic [31:0] pkt_count
);

  localparam int unsigned T  = THREADS_PER_PE;
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned MAXC = (THREAD_INIT_CYCLES > MEM_CYCLES)
                               ? ((THREAD_INIT_CYCLES > TX_CYCLES) ? THREAD_INIT_CYCLES : TX_CYCLES)
                               : ((MEM_CYCLES > TX_CYCLES) ? MEM_CYCLES : TX_CYCLES);
  localparam int unsigned CW = $clog2(MAXC + 1);
  localparam int unsigned KW = $clog2(MPKT_WORDS);

  typedef enum logic [2:0] {
    T_INIT, T_REQ, T_WAIT, T_READY, T_RUN, T_MEM, T_PUSH, T_KILLED
  } tstate_e;

  tstate_e       st_q  [T];
  logic [CW-1:0] cnt_q [T];
  logic [KW-1:0] widx_q[T];
  txpkt_t        pkt_q [T];

  // pipeline owner
  logic [TW-1:0] cur_q;
  logic          run_valid;      // some thread is in RUN
  logic [TW-1:0] next_run;
  logic          next_run_valid;

  // ALU shared by the threads (only the running thread uses it)
  alu_op_e alu_op;
  word_t   alu_a, alu_b, alu_y;

  alu #(.W(WORD_BITS)) u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  function automatic tid_t my_tid(int unsigned t);
    return tid_t'(PE_ID * T + t);
  endfunction

  // --- selection of the thread served by each shared port ----------------
  logic [TW-1:0] req_sel, push_sel, out_sel;
  logic          req_any, push_any, out_any;

  always_comb begin
    req_any = 1'b0; push_any = 1'b0; out_any = 1'b0;
    req_sel = '0;   push_sel = '0;   out_sel = '0;
    next_run_valid = 1'b0; next_run = '0;
    for (int unsigned t = 0; t < T; t++) begin
      if (!req_any && st_q[t] == T_REQ) begin req_any = 1'b1; req_sel = TW'(t); end
      if (!push_any && st_q[t] == T_PUSH) begin push_any = 1'b1; push_sel = TW'(t); end
      if (!out_any && st_q[t] == T_PUSH) begin out_any = 1'b1; out_sel = TW'(t); end
    end
    // round-robin choice of the next thread to take the pipeline
    for (int unsigned k = 1; k <= T; k++) begin
      int unsigned t;
      t = (int'(cur_q) + k) % T;
      if (!next_run_valid && st_q[t] == T_READY) begin
        next_run_valid = 1'b1;
        next_run = TW'(t);
      end
    end
  end

  always_comb begin
    run_valid = 1'b0;
    for (int unsigned t = 0; t < T; t++)
      if (st_q[t] == T_RUN) run_valid = 1'b1;
  end

  // receive request / transmit poll share the REQ state
  assign rcv_req     = !IS_TX && req_any && !off_flag;
  assign rcv_tid     = my_tid(32'(req_sel));
  assign txq_pop_req =  IS_TX && req_any && !off_flag;

  // receive thread hands a processed packet to the outgoing queue
  assign txq_push_req = !IS_TX && push_any;
  assign txq_push_pkt = pkt_q[push_sel];

  // transmit thread emits a packet (PUSH state doubles as OUT for IS_TX)
  assign out_valid = IS_TX && out_any;
  assign out_pkt   = pkt_q[out_sel];

  // ALU operands for the running thread
  always_comb begin
    alu_a  = pkt_q[cur_q].digest;
    alu_b  = pkt_q[cur_q].data[widx_q[cur_q]*WORD_BITS +: WORD_BITS];
    alu_op = widx_q[cur_q][0] ? ALU_XOR : ALU_ADD;
  end

  always_comb begin
    pe_idle = 1'b1;
    for (int unsigned t = 0; t < T; t++)
      if (st_q[t] != T_KILLED) pe_idle = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q     <= '0;
      pkt_count <= '0;
      for (int unsigned t = 0; t < T; t++) begin
        st_q[t]   <= T_INIT;
        cnt_q[t]  <= CW'(THREAD_INIT_CYCLES - 1);
        widx_q[t] <= '0;
        pkt_q[t]  <= '0;
      end
    end else begin
      if (!run_valid && next_run_valid) cur_q <= next_run;
      for (int unsigned t = 0; t < T; t++) begin
        unique case (st_q[t])
          T_INIT: begin
            if (off_flag)            st_q[t] <= T_KILLED;
            else if (cnt_q[t] == '0) st_q[t] <= T_REQ;
            else                     cnt_q[t] <= cnt_q[t] - 1'b1;
          end
          T_REQ: begin
            if (off_flag) begin
              st_q[t] <= T_KILLED;
            end else if (req_sel == TW'(t)) begin
              if (!IS_TX && rcv_ack) begin
                st_q[t] <= T_WAIT;
              end else if (IS_TX && txq_pop_ack) begin
                pkt_q[t] <= txq_pop_pkt;
                cnt_q[t] <= CW'(TX_CYCLES - 1);
                st_q[t]  <= T_MEM;
              end
            end
          end
          T_WAIT: begin
            if (grant_valid && grant_tid == my_tid(t)) begin
              pkt_q[t].port   <= grant_pkt.port;
              pkt_q[t].data   <= grant_pkt.data;
              pkt_q[t].digest <= '0;
              widx_q[t]       <= '0;
              st_q[t]         <= T_READY;
            end else if (off_flag) begin
              st_q[t] <= T_KILLED;
            end
          end
          T_READY: begin
            if (!run_valid && next_run_valid && next_run == TW'(t)) st_q[t] <= T_RUN;
          end
          T_RUN: begin
            pkt_q[t].digest <= alu_y;
            widx_q[t]       <= widx_q[t] + 1'b1;
            if (widx_q[t] == KW'(MPKT_WORDS - 1)) begin
              cnt_q[t] <= CW'(MEM_CYCLES - 1);
              st_q[t]  <= T_MEM;
            end
          end
          T_MEM: begin
            if (cnt_q[t] == '0) st_q[t] <= T_PUSH;
            else                cnt_q[t] <= cnt_q[t] - 1'b1;
          end
          T_PUSH: begin
            if (( IS_TX && out_sel  == TW'(t)) ||
                (!IS_TX && push_sel == TW'(t) && txq_push_ack)) begin
              pkt_count <= pkt_count + 1'b1;
              st_q[t]   <= off_flag ? T_KILLED : T_REQ;
            end
          end
          T_KILLED: begin
            if (!off_flag) begin
              cnt_q[t] <= CW'(THREAD_INIT_CYCLES - 1);
              st_q[t]  <= T_INIT;
            end
          end
          default: st_q[t] <= T_KILLED;
        endcase
      end
    end
  end

  // a grant must find its thread asleep in WAIT
  for (genvar g = 0; g < T; g++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (grant_valid && grant_tid == my_tid(g)) |-> st_q[g] == T_WAIT);
  end

endmodule
