// tb_microengine: one receive PE (PE_ID 1) and one transmit PE (PE_ID 4), run
// with THREAD_INIT_CYCLES = 5, MEM_CYCLES = 20, TX_CYCLES = 10.
// Receive PE: the testbench plays the thread queue and scheduler, acking every
// request and granting random packets to the waiting threads. Each processed
// packet must come out with the digest computed here (word k added for even k,
// xor-ed for odd k), the port and data unchanged, and a single packet on an
// otherwise idle PE must take exactly 18 + MEM_CYCLES cycles from grant to push.
// The four threads must be served (distinct IDs 4..7). Then the off flag is set
// while packets are in flight: every granted packet must still come out, no
// request may be issued, pe_idle must rise, and after the flag clears the
// threads restart and request again after THREAD_INIT_CYCLES.
// Transmit PE: pops packets and must emit each one, unchanged, TX_CYCLES + 1
// cycles after the pop; with the off flag set it stops polling and goes idle.
module tb_microengine;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int INIT = 5, MEM = 20, TXC = 10;

  // receive PE
  logic   off_rx = 0, rcv_req, rcv_ack, grant_valid = 0, txq_push_req, txq_push_ack;
  tid_t   rcv_tid, grant_tid = '0;
  mpkt_t  grant_pkt = '0;
  txpkt_t txq_push_pkt;
  logic   rx_pop_req, rx_out_valid, rx_idle;
  txpkt_t rx_out_pkt;
  logic [31:0] rx_count;

  microengine #(.PE_ID(1), .IS_TX(1'b0), .THREAD_INIT_CYCLES(INIT), .MEM_CYCLES(MEM),
                .TX_CYCLES(TXC)) u_rx (
    .clk, .rst_n, .off_flag(off_rx),
    .rcv_req, .rcv_tid, .rcv_ack, .grant_valid, .grant_tid, .grant_pkt,
    .txq_push_req, .txq_push_pkt, .txq_push_ack,
    .txq_pop_req(rx_pop_req), .txq_pop_ack(1'b0), .txq_pop_pkt('0),
    .out_valid(rx_out_valid), .out_pkt(rx_out_pkt), .pe_idle(rx_idle), .pkt_count(rx_count));

  // transmit PE
  logic   off_tx = 0, pop_req, pop_ack, out_valid, tx_idle;
  txpkt_t pop_pkt, out_pkt;
  logic   tx_rcv_req, tx_push_req;
  tid_t   tx_rcv_tid;
  txpkt_t tx_push_pkt;
  logic [31:0] tx_count;

  microengine #(.PE_ID(4), .IS_TX(1'b1), .THREAD_INIT_CYCLES(INIT), .MEM_CYCLES(MEM),
                .TX_CYCLES(TXC)) u_tx (
    .clk, .rst_n, .off_flag(off_tx),
    .rcv_req(tx_rcv_req), .rcv_tid(tx_rcv_tid), .rcv_ack(1'b0),
    .grant_valid(1'b0), .grant_tid('0), .grant_pkt('0),
    .txq_push_req(tx_push_req), .txq_push_pkt(tx_push_pkt), .txq_push_ack(1'b0),
    .txq_pop_req(pop_req), .txq_pop_ack(pop_ack), .txq_pop_pkt(pop_pkt),
    .out_valid, .out_pkt, .pe_idle(tx_idle), .pkt_count(tx_count));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic word_t digest(mpkt_data_t d);
    word_t acc = '0;
    for (int k = 0; k < MPKT_WORDS; k++)
      acc = (k % 2 == 0) ? acc + d[k*32 +: 32] : acc ^ d[k*32 +: 32];
    return acc;
  endfunction

  // ---------------- receive-side harness
  tid_t   waiting[$];
  txpkt_t expect_q[$];       // packets granted, in any order of completion
  int     granted = 0, pushed = 0, req_while_off = 0;
  bit     auto_grant = 0;
  bit     seen_tid [NUM_THREADS];

  assign rcv_ack = rcv_req;   // thread queue always has room
  assign txq_push_ack = txq_push_req && ($urandom_range(3) != 0);

  initial begin
    forever begin
      bit   ack, pv;
      tid_t t;
      txpkt_t pp;
      @(posedge clk);
      ack = rcv_ack; t = rcv_tid; pv = txq_push_req && txq_push_ack; pp = txq_push_pkt;
      if (rst_n) begin
        if (rcv_req && off_rx) req_while_off++;
        if (pv) begin
          int hit;
          hit = -1;
          foreach (expect_q[i]) if (hit < 0 && expect_q[i] == pp) hit = i;
          chk(hit >= 0, "pushed packet matches a granted one with correct digest");
          if (hit >= 0) expect_q.delete(hit);
          pushed++;
        end
      end
      #1;
      if (ack) begin waiting.push_back(t); seen_tid[t] = 1; end
      grant_valid = 0;
      if (auto_grant && waiting.size() != 0 && $urandom_range(2) == 0) begin
        mpkt_t m;
        m.port = port_t'($urandom);
        m.data = {16{$urandom}};
        for (int w = 0; w < MPKT_WORDS; w++) m.data[w*32 +: 32] = $urandom;
        grant_valid = 1;
        grant_tid   = waiting.pop_front();
        grant_pkt   = m;
        expect_q.push_back('{port: m.port, digest: digest(m.data), data: m.data});
        granted++;
      end
    end
  end

  // ---------------- transmit-side harness
  txpkt_t tx_src[$];
  int     pop_cycle[$];
  int     cyc = 0, emitted = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign pop_ack = pop_req && (tx_src.size() != 0);
  assign pop_pkt = (tx_src.size() != 0) ? tx_src[0] : '0;

  txpkt_t inflight [$];
  int     inflight_t [$];
  initial begin
    forever begin
      bit a, ov;
      txpkt_t pk, op;
      @(posedge clk);
      a = pop_ack; pk = pop_pkt; ov = out_valid; op = out_pkt;
      if (rst_n && ov) begin
        int hit;
        hit = -1;
        foreach (inflight[i]) if (hit < 0 && inflight[i] == op) hit = i;
        chk(hit >= 0, "transmitted packet was popped");
        if (hit >= 0) begin
          chk(cyc - inflight_t[hit] == TXC + 1, $sformatf("tx latency %0d", cyc - inflight_t[hit]));
          inflight.delete(hit); inflight_t.delete(hit);
        end
        emitted++;
      end
      #1;
      if (a) begin void'(tx_src.pop_front()); inflight.push_back(pk); inflight_t.push_back(cyc - 1); end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, n;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // all four threads request after INIT cycles
    repeat (INIT + 8) @(negedge clk);
    chk(waiting.size() == 4, $sformatf("4 threads queued, got %0d", waiting.size()));
    for (int t = 4; t < 8; t++) chk(seen_tid[t], $sformatf("thread %0d requested", t));
    // single packet: exact processing latency
    @(negedge clk);
    grant_valid = 1; grant_tid = waiting.pop_front();
    grant_pkt.port = 4'd3;
    for (int w = 0; w < MPKT_WORDS; w++) grant_pkt.data[w*32 +: 32] = 32'h0100_0000 * w + 32'd7;
    expect_q.push_back('{port: grant_pkt.port, digest: digest(grant_pkt.data), data: grant_pkt.data});
    granted++;
    g = cyc;
    @(negedge clk); grant_valid = 0;
    while (!txq_push_req) @(negedge clk);
    chk(cyc - g == 18 + MEM, $sformatf("rx processing latency %0d, expected %0d", cyc - g, 18 + MEM));
    // random traffic
    auto_grant = 1;
    repeat (3000) @(negedge clk);
    chk(granted > 100, $sformatf("granted %0d", granted));
    // turn the PE off with packets in flight
    off_rx = 1;
    auto_grant = 0;
    n = 0;
    while (!rx_idle && n < 500) begin @(negedge clk); n++; end
    chk(rx_idle, "receive PE idle after off flag");
    chk(expect_q.size() == 0, $sformatf("%0d granted packets not finished", expect_q.size()));
    chk(req_while_off == 0, "no receive request while off flag set");
    chk(pushed == granted, $sformatf("pushed %0d granted %0d", pushed, granted));
    chk(32'(pushed) == rx_count, "pkt_count");
    waiting.delete();
    // wake up: requests again after INIT cycles
    off_rx = 0;
    g = cyc;
    while (waiting.size() == 0) @(negedge clk);
    chk(cyc - g >= INIT, $sformatf("restart after %0d cycles", cyc - g));
    chk(!rx_idle, "not idle after wake");
    // transmit PE
    for (int i = 0; i < 200; i++)
      tx_src.push_back('{port: port_t'($urandom), digest: $urandom, data: {16{$urandom}}});
    n = 0;
    while ((tx_src.size() != 0 || inflight.size() != 0) && n < 5000) begin @(negedge clk); n++; end
    chk(emitted == 200, $sformatf("emitted %0d of 200", emitted));
    chk(32'(emitted) == tx_count, "tx pkt_count");
    off_tx = 1;
    repeat (3) @(negedge clk);
    chk(tx_idle && !pop_req, "transmit PE idle after off flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
