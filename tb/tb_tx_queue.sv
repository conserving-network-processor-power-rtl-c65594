// tb_tx_queue: outgoing packet queue with four pushing receive PEs and two
// popping transmit PEs. Random requests; every acked push is appended to a
// model FIFO and every acked pop must deliver its head. Checks one ack per
// side per cycle, full/empty refusal and that every requester gets served.
module tb_tx_queue;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NUM_RX_PE-1:0] push_req = '0, push_ack;
  txpkt_t push_pkt [NUM_RX_PE];
  logic [NUM_TX_PE-1:0] pop_req = '0, pop_ack;
  txpkt_t pop_pkt;
  logic [4:0] count;

  tx_queue #(.DEPTH(16)) dut (.*);

  txpkt_t model[$];
  int served_push [NUM_RX_PE];
  int served_pop  [NUM_TX_PE];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      int phase;
      logic [NUM_RX_PE-1:0] pa;
      logic [NUM_TX_PE-1:0] qa;
      phase = (i / 1000) % 3;   // 0: push-heavy, 1: pop-heavy, 2: balanced
      @(negedge clk);
      for (int r = 0; r < NUM_RX_PE; r++) begin
        push_req[r] = (phase == 1) ? ($urandom_range(7) == 0) : ($urandom_range(1) == 1);
        push_pkt[r] = '{port: port_t'($urandom), digest: $urandom, data: {16{$urandom}}};
      end
      for (int x = 0; x < NUM_TX_PE; x++)
        pop_req[x] = (phase == 0) ? ($urandom_range(7) == 0) : ($urandom_range(1) == 1);
      #1;
      chk($onehot0(push_ack) && $onehot0(pop_ack), "one ack per side");
      chk((push_ack & ~push_req) == '0 && (pop_ack & ~pop_req) == '0, "ack only on request");
      if (pop_ack != '0) begin
        chk(model.size() != 0 && pop_pkt == model[0], "pop data = model head");
      end
      chk(!(model.size() == 16 && push_ack != '0 && pop_ack == '0), "no push when full");
      chk(!(model.size() == 0 && pop_ack != '0), "no pop when empty");
      pa = push_ack; qa = pop_ack;
      @(posedge clk); #1;
      if (qa != '0 && model.size() != 0) void'(model.pop_front());
      for (int r = 0; r < NUM_RX_PE; r++)
        if (pa[r]) begin model.push_back(push_pkt[r]); served_push[r]++; end
      for (int x = 0; x < NUM_TX_PE; x++) if (qa[x]) served_pop[x]++;
      chk(count == 5'(model.size()), "count");
    end
    foreach (served_push[r]) chk(served_push[r] > 100, $sformatf("push PE %0d served %0d", r, served_push[r]));
    foreach (served_pop[x])  chk(served_pop[x] > 100, $sformatf("pop PE %0d served %0d", x, served_pop[x]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
