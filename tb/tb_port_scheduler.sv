// tb_port_scheduler: round-robin scan of port_rdy_status, one bit per cycle,
// plus one dequeue cycle. With the pointer at port 0 and only port 5 ready,
// bits 0..5 are tested (6 cycles) and the dequeue takes one more, so the grant
// appears 7 cycles after the thread becomes available. The buffer and thread
// queue are modelled here. Further checks: the next scan resumes after the
// granted port (round robin), no scanning without a waiting thread, and a
// random run where every granted packet is the oldest of its port and goes to
// the head thread.
module tb_port_scheduler;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_PORTS-1:0] port_rdy_status;
  logic tq_head_valid, tq_pop, buf_rd_en, buf_rd_hit, grant_valid;
  tid_t tq_head, grant_tid;
  port_t buf_rd_port;
  mpkt_t buf_rd_pkt, grant_pkt;

  port_scheduler dut (.*);

  // models of the buffer (per port) and the thread queue
  mpkt_t bufq [NUM_PORTS][$];
  tid_t  tq[$];
  int    grants = 0;
  int    serial = 0;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) port_rdy_status[p] = bufq[p].size() != 0;
    tq_head_valid = tq.size() != 0;
    tq_head       = (tq.size() != 0) ? tq[0] : '0;
    buf_rd_hit    = bufq[buf_rd_port].size() != 0;
    buf_rd_pkt    = buf_rd_hit ? bufq[buf_rd_port][0] : '0;
  end

  mpkt_t exp_pkt;
  tid_t  exp_tid;
  bit    exp_pending = 0;

  // monitor: sample the dequeue decision at the edge, update the models after it
  initial begin
    forever begin
      bit    p;
      port_t rp;
      @(posedge clk);
      p = tq_pop;
      rp = buf_rd_port;
      if (rst_n) begin
        if (exp_pending) begin
          checks++;
          if (!(grant_valid && grant_tid == exp_tid && grant_pkt == exp_pkt)) begin
            failures++; $display("FAIL grant mismatch at %0t", $time);
          end
          exp_pending = 0;
        end else if (grant_valid) begin
          checks++; failures++; $display("FAIL unexpected grant");
        end
        if (p) begin
          exp_pending = 1;
          exp_tid = tq[0];
          exp_pkt = bufq[rp][0];
        end
      end
      #1;
      if (p) begin
        void'(tq.pop_front());
        void'(bufq[rp].pop_front());
        grants++;
      end
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic mpkt_t mk(int p);
    mpkt_t m;
    m.port = port_t'(p);
    m.data = '0;
    m.data[31:0] = 32'(serial);
    serial++;
    return m;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // packet on port 5, no thread waiting: nothing must happen for 40 cycles
    bufq[5].push_back(mk(5));
    repeat (40) @(negedge clk);
    chk(grants == 0, "no grant without waiting thread");
    chk(dut.ptr_q == 0, "pointer holds while queue empty");
    // thread 9 arrives: 6 scan cycles + 1 dequeue cycle
    tq.push_back(tid_t'(9));
    t0 = 0;
    while (!grant_valid) begin @(negedge clk); t0++; end
    chk(t0 == 7, $sformatf("grant latency %0d cycles, expected 7", t0));
    @(negedge clk);
    // round robin: ports 2 and 7 ready, pointer now at 6 -> port 7 first
    bufq[2].push_back(mk(2));
    bufq[7].push_back(mk(7));
    tq.push_back(tid_t'(1));
    tq.push_back(tid_t'(2));
    t0 = 0;
    while (!grant_valid) begin @(negedge clk); t0++; end
    chk(grant_pkt.port == 7 && grant_tid == 1, "round robin picks port 7 first");
    chk(t0 == 3, $sformatf("port 6,7 scan + dequeue = 3 cycles, got %0d", t0));
    @(negedge clk);
    t0 = 1;
    while (!grant_valid) begin @(negedge clk); t0++; end
    chk(grant_pkt.port == 2 && grant_tid == 2, "wraps to port 2");
    chk(t0 == 12, $sformatf("ports 8..15,0..2 scan + dequeue = 12 cycles, got %0d", t0));
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        int p;
        p = $urandom_range(NUM_PORTS-1);
        bufq[p].push_back(mk(p));
      end
      if ($urandom_range(3) == 0 && tq.size() < 16) tq.push_back(tid_t'($urandom_range(15)));
    end
    repeat (100) @(negedge clk);
    chk(grants > 1000, $sformatf("random grants %0d", grants));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
