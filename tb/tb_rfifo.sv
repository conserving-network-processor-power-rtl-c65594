// tb_rfifo: receive buffer with 16 regular entries and one extra entry.
// Checks against a per-port reference queue: port_rdy_status, per-port
// arrival order of reads, count, buf_pressure raised exactly when the 16
// regular entries are full, extra_in_use when the 17th entry holds a packet,
// and a drop only on the 18th packet. Then random push/read traffic.
module tb_rfifo;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_drop, rd_en = 0, rd_hit, buf_pressure, extra_in_use;
  mpkt_t in_pkt, rd_pkt;
  port_t rd_port = '0;
  logic [NUM_PORTS-1:0] port_rdy_status;
  logic [4:0] count;

  rfifo #(.BASE_DEPTH(16), .EXTRA_DEPTH(1)) dut (.*);

  mpkt_t model [NUM_PORTS][$];
  int    total;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic mpkt_t mk(int p);
    mpkt_t m;
    m.port = port_t'(p);
    for (int w = 0; w < MPKT_WORDS; w++) m.data[w*32 +: 32] = $urandom;
    return m;
  endfunction

  task automatic compare_status();
    logic [NUM_PORTS-1:0] exp;
    exp = '0;
    for (int p = 0; p < NUM_PORTS; p++) exp[p] = model[p].size() != 0;
    chk(port_rdy_status == exp, $sformatf("status %h exp %h", port_rdy_status, exp));
    chk(count == 5'(total), $sformatf("count %0d exp %0d", count, total));
    chk(buf_pressure == (total >= 16), "pressure");
    chk(extra_in_use == (total > 16), "extra_in_use");
  endtask

  // one cycle: optional push and optional read; checks the read data
  task automatic step(bit push, mpkt_t pk, bit rd, int rp, output bit dropped);
    @(negedge clk);
    in_valid = push; in_pkt = pk; rd_en = rd; rd_port = port_t'(rp);
    #1;
    dropped = in_drop;
    if (rd) begin
      chk(rd_hit == (model[rp].size() != 0), "rd_hit");
      if (rd_hit && model[rp].size() != 0) begin
        chk(rd_pkt == model[rp][0], $sformatf("read order port %0d", rp));
      end
    end
    @(posedge clk); #1;
    if (rd && model[rp].size() != 0) begin void'(model[rp].pop_front()); total--; end
    if (push && !dropped) begin model[pk.port].push_back(pk); total++; end
    in_valid = 0; rd_en = 0;
    compare_status();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d;
    total = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill: 16 regular entries, then the extra one, then a drop
    for (int i = 0; i < 18; i++) begin
      step(1, mk(i % 5), 0, 0, d);
      chk(d == (i == 17), $sformatf("drop on packet %0d = %b", i, d));
    end
    chk(total == 17, "17 held");
    // push and read in the same cycle while full: accepted
    step(1, mk(7), 1, 3, d);
    chk(!d, "push with read when full");
    // drain port by port, out of order
    for (int p = NUM_PORTS - 1; p >= 0; p--)
      while (model[p].size() != 0) step(0, '0, 1, p, d);
    chk(total == 0 && count == 0, "empty");
    // random traffic
    for (int i = 0; i < 3000; i++)
      step($urandom_range(1), mk($urandom_range(NUM_PORTS-1)), $urandom_range(1),
           $urandom_range(NUM_PORTS-1), d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
