// tb_thread_queue: FIFO order of waiting thread IDs, length, one-cycle push and
// pop, and purge of the threads of PEs being shut down, against a queue model.
module tb_thread_queue;
  import np_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, push_ready, pop = 0, head_valid;
  tid_t push_tid = '0, head;
  logic [NUM_PE-1:0] purge_mask = '0;
  logic [4:0] len;

  thread_queue #(.DEPTH(24)) dut (.*);

  tid_t model[$];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bit purged(tid_t t, logic [NUM_PE-1:0] m);
    return m[int'(t) / THREADS_PER_PE];
  endfunction

  task automatic step(bit pu, int t, bit po, logic [NUM_PE-1:0] m);
    tid_t exp_head;
    bit   exp_hv;
    @(negedge clk);
    push = pu; push_tid = tid_t'(t); purge_mask = m;
    exp_hv = model.size() != 0 && !purged(model[0], m);
    exp_head = (model.size() != 0) ? model[0] : '0;
    pop = po && exp_hv;
    #1;
    chk(head_valid == exp_hv, "head_valid");
    if (exp_hv) chk(head == exp_head, $sformatf("head %0d exp %0d", head, exp_head));
    @(posedge clk); #1;
    if (pop) void'(model.pop_front());
    begin
      tid_t keep[$];
      foreach (model[i]) if (!purged(model[i], m)) keep.push_back(model[i]);
      model = keep;
    end
    if (pu && !purged(tid_t'(t), m) && model.size() < 24) model.push_back(tid_t'(t));
    push = 0; pop = 0; purge_mask = '0;
    chk(len == 5'(model.size()), $sformatf("len %0d exp %0d", len, model.size()));
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
    // enqueue 16 receive threads in a known order
    for (int t = 0; t < 16; t++) step(1, 15 - t, 0, '0);
    chk(len == 16, "16 queued");
    // purge PE 1 (threads 4..7): 12 remain
    step(0, 0, 0, 6'b000010);
    chk(len == 12, "purge PE1");
    // pop everything, checking order
    while (model.size() != 0) step(0, 0, 1, '0);
    // random mix of push, pop and purge
    for (int i = 0; i < 5000; i++) begin
      logic [NUM_PE-1:0] m;
      m = ($urandom_range(15) == 0) ? NUM_PE'(1 << $urandom_range(NUM_PE-1)) : '0;
      step($urandom_range(1), $urandom_range(NUM_THREADS-1), $urandom_range(1), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
