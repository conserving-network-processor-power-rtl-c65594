// tb_interface_controller: the receive side with 16 ports, 16+1 buffer entries
// and the 24-entry thread queue. Sixteen receive threads (4 per receive PE)
// request packets through the per-PE request lines; each granted thread
// "processes" for a random time and requests again. Checks: every packet that
// was not dropped is granted exactly once, to a thread that had requested and
// not yet been served, and packets of one port arrive in order; tq_ge_t equals
// (tq_len >= 4); a burst phase raises buf_pressure and uses the extra entry;
// purging PE 2 removes its waiting threads so they receive no grant; the
// grant latency of a lone packet is the buffer write, one cycle per
// status bit scanned up to its port, and one dequeue cycle.
module tb_interface_controller;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_drop, grant_valid, tq_ge_t, buf_pressure, extra_in_use;
  mpkt_t in_pkt = '0, grant_pkt;
  logic [NUM_RX_PE-1:0] rcv_req, rcv_ack;
  tid_t rcv_tid [NUM_RX_PE], grant_tid;
  logic [NUM_PE-1:0] tq_purge = '0;
  logic [4:0] tq_len;
  logic [NUM_PORTS-1:0] port_rdy_status;

  interface_controller #(.RFIFO_DEPTH(16), .EXTRA_DEPTH(1), .TQ_DEPTH(24)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // thread model: 0 idle-wants-request, 1 queued, 2 busy (countdown)
  int  tstate [16];
  int  tbusy  [16];
  int  serial = 0;
  int  sent = 0, dropped = 0, got = 0, pressure_cycles = 0, extra_cycles = 0;
  int  next_serial_of_port [NUM_PORTS];
  int  sent_per_port [NUM_PORTS];
  bit  hold_threads = 0;

  // per PE: present the lowest thread that wants to request
  always_comb begin
    for (int p = 0; p < NUM_RX_PE; p++) begin
      rcv_req[p] = 1'b0;
      rcv_tid[p] = '0;
      for (int j = THREADS_PER_PE - 1; j >= 0; j--)
        if (tstate[p*4+j] == 0 && !hold_threads) begin
          rcv_req[p] = 1'b1;
          rcv_tid[p] = tid_t'(p*4+j);
        end
    end
  end

  initial begin
    forever begin
      logic [NUM_RX_PE-1:0] ack;
      tid_t tids [NUM_RX_PE];
      bit gv, iv, dr;
      tid_t gt;
      mpkt_t gp;
      @(posedge clk);
      ack = rcv_ack; tids = rcv_tid; gv = grant_valid; gt = grant_tid; gp = grant_pkt;
      iv = in_valid; dr = in_drop;
      if (rst_n) begin
        chk(tq_ge_t == (tq_len >= 4), "tq_ge_t");
        if (buf_pressure) pressure_cycles++;
        if (extra_in_use) extra_cycles++;
        if (iv) begin if (dr) dropped++; else sent++; end
        if (gv) begin
          int s;
          got++;
          chk(tstate[gt] == 1, $sformatf("grant to thread %0d not queued", gt));
          chk(!tq_purge[int'(gt) / 4], "grant to purged PE");
          s = int'(gp.data[31:0]);
          chk(gp.data[47:32] == 16'(gp.port), "packet port tag");
          chk(s > next_serial_of_port[gp.port] || next_serial_of_port[gp.port] == -1,
              $sformatf("port %0d order", gp.port));
          next_serial_of_port[gp.port] = s;
        end
      end
      #1;
      for (int p = 0; p < NUM_RX_PE; p++)
        if (rst_n && ack[p] && !tq_purge[p]) tstate[tids[p]] = 1;
      if (gv) begin tstate[gt] = 2; tbusy[gt] = $urandom_range(60, 5); end
      for (int t = 0; t < 16; t++)
        if (tstate[t] == 2) begin tbusy[t]--; if (tbusy[t] <= 0) tstate[t] = 0; end
    end
  end

  task automatic send(int port);
    @(negedge clk);
    in_valid = 1;
    in_pkt.port = port_t'(port);
    in_pkt.data = '0;
    in_pkt.data[31:0]  = 32'(serial);
    in_pkt.data[47:32] = 16'(port);
    for (int w = 2; w < MPKT_WORDS; w++) in_pkt.data[w*32 +: 32] = $urandom;
    serial++;
    sent_per_port[port]++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, p0, exp_lat;
    foreach (next_serial_of_port[p]) next_serial_of_port[p] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    chk(tq_len == 16, $sformatf("16 threads queued, len %0d", tq_len));
    chk(tq_ge_t, "l >= T with 16 waiting");
    // lone packet on port 3, scan pointer at 0: 4 bits + 1 dequeue after it is buffered
    @(negedge clk);
    in_valid = 1; in_pkt = '0; in_pkt.port = 4'd3; in_pkt.data[31:0] = 32'(serial);
    in_pkt.data[47:32] = 16'd3; serial++; sent_per_port[3]++;
    @(negedge clk); in_valid = 0;
    // the scan runs continuously while threads wait: m = bits from the
    // current pointer up to port 3, then one dequeue cycle
    p0 = int'(dut.u_sched.ptr_q);
    exp_lat = 1 + ((3 - p0 + 16) % 16) + 1 + 1;
    lat = 1;
    while (!grant_valid) begin @(negedge clk); lat++; end
    chk(lat == exp_lat, $sformatf("lone packet grant latency %0d, expected %0d", lat, exp_lat));
    // purge PE 2 while its threads wait
    @(negedge clk);
    tq_purge = 6'b000100;
    @(negedge clk);
    chk(tq_len == 11, $sformatf("purged 4 threads, len %0d", tq_len));
    for (int j = 8; j < 12; j++) if (tstate[j] == 1) tstate[j] = 0;
    // moderate random traffic with PE 2 purged
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(2) == 0) send($urandom_range(NUM_PORTS-1));
      else @(negedge clk);
    end
    tq_purge = '0;
    // burst with threads held back: fills the buffer and the extra entry
    hold_threads = 1;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 30; i++) send($urandom_range(NUM_PORTS-1));
    chk(pressure_cycles > 0, "buffer pressure seen");
    chk(extra_cycles > 0, "extra entry used");
    chk(dropped > 0, "packets beyond 17 entries dropped");
    hold_threads = 0;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(3) == 0) send($urandom_range(NUM_PORTS-1));
      else @(negedge clk);
    end
    repeat (600) @(negedge clk);
    chk(got == sent, $sformatf("granted %0d of %0d accepted packets", got, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
