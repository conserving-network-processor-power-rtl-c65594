// tb_np_power_full: the clock-gated network processor at its full default
// configuration (one-million-cycle window, th = 500,000 with 10,000-cycle
// steps, six PEs, 16+1 buffer entries, 24-entry thread queue), run through one
// complete low-power cycle: line-rate load for one window, light load for six
// windows (PEs are turned off one per window down to 1 receive + 1 transmit),
// then a line-rate burst that raises buffer pressure and wakes PEs, then drain.
// Same checks as tb_np_power_top: packet integrity and digests, no loss while
// PEs are off, the 4+2 ... 1+1 sequence, no clock edge on a gated PE, and each
// mechanism at least once. About 7.5 million cycles.
module tb_np_power_full;
  import np_pkg::*;

  localparam int P = 1_000_000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_drop, dynamic_th_en = 1;
  mpkt_t in_pkt = '0;
  logic [NUM_TX_PE-1:0] out_valid;
  txpkt_t out_pkt [NUM_TX_PE];
  logic [NUM_PE-1:0] pe_clk_en, pe_off_flag;
  logic [2:0] rx_active;
  logic [1:0] tx_active;
  pe_cmd_e pe_cmd;
  logic window_end, buf_pressure, extra_in_use;
  logic [4:0] tq_len;
  logic [19:0] th, idle_count;
  logic [31:0] pe_pkt_count [NUM_PE];

  np_power_top dut (.*);

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

  // ------------------------------------------------------------ scoreboard
  mpkt_t pending [int];
  int serial = 0, accepted = 0, delivered = 0, drops = 0, drops_gated = 0;
  bit poke_on_pressure = 0, poked = 0;
  int n_off = 0, n_on = 0, n_gate = 0, n_extra = 0, n_th_change = 0, n_pressure = 0;
  int min_rx = 4, min_tx = 2, n_at_min = 0;
  int seq_r[$], seq_x[$];
  logic [NUM_PE-1:0] en_low_phase;
  logic [19:0] th_prev;

  initial begin
    forever begin
      bit iv, dr;
      mpkt_t ip;
      @(posedge clk);
      iv = in_valid; dr = in_drop; ip = in_pkt;
      if (rst_n) begin
        if (iv && dr) begin
          drops++;
          if (pe_off_flag != '0) drops_gated++;
        end
        if (iv && !dr) begin pending[int'(ip.data[31:0])] = ip; accepted++; end
        for (int x = 0; x < NUM_TX_PE; x++) if (out_valid[x]) begin
          int s;
          s = int'(out_pkt[x].data[31:0]);
          chk(pending.exists(s), $sformatf("output packet %0d unknown or duplicated", s));
          if (pending.exists(s)) begin
            chk(out_pkt[x].port == pending[s].port && out_pkt[x].data == pending[s].data,
                "packet contents");
            chk(out_pkt[x].digest == digest(pending[s].data), "packet digest");
            pending.delete(s);
          end
          delivered++;
        end
        if (pe_cmd == CMD_OFF) n_off++;
        if (pe_cmd == CMD_ON)  n_on++;
        if (buf_pressure) n_pressure++;
        if (extra_in_use) n_extra++;
        if (th != th_prev) n_th_change++;
        th_prev = th;
        for (int p = 0; p < NUM_PE; p++)
          if (pe_off_flag[p] && pe_clk_en[p] && dut.pe_idle[p]) n_gate++;
        if (rx_active < 3'(min_rx)) min_rx = int'(rx_active);
        if (tx_active < 2'(min_tx)) min_tx = int'(tx_active);
        if (dut.at_min) n_at_min++;
        if (seq_r.size() == 0 || seq_r[$] != int'(rx_active) || seq_x[$] != int'(tx_active)) begin
          seq_r.push_back(int'(rx_active)); seq_x.push_back(int'(tx_active));
        end
      end
    end
  end

  // a gated PE must see no clock edge
  always @(negedge clk) en_low_phase = pe_clk_en;
  for (genvar p = 0; p < NUM_PE; p++) begin : g_gchk
    always @(posedge dut.gclk[p]) if (rst_n && !en_low_phase[p]) begin
      checks++; failures++; $display("FAIL PE %0d clocked while gated", p);
    end
  end

  // ------------------------------------------------------------ stimulus
  // Packets start at most once every GAP cycles: 64 bytes at 1 Gbps on a
  // 232 MHz clock take 119 cycles. After the gap, a packet starts with
  // probability per_mille/1000 per cycle. With poke_on_pressure, one packet is
  // also started in the first cycle of buffer pressure (a packet already on the
  // wire when the buffer filled up); the gap then restarts from it.
  localparam int GAP = 119;
  int since_last = GAP;

  task automatic traffic(int cycles, int per_mille);
    for (int i = 0; i < cycles; i++) begin
      bit go;
      @(negedge clk);
      go = (since_last >= GAP) && ($urandom_range(999) < per_mille);
      if (poke_on_pressure && !poked && buf_pressure) begin go = 1; poked = 1; end
      if (go) begin
        in_valid = 1;
        in_pkt.port = port_t'($urandom_range(NUM_PORTS-1));
        in_pkt.data[31:0] = 32'(serial);
        for (int w = 1; w < MPKT_WORDS; w++) in_pkt.data[w*32 +: 32] = $urandom;
        serial++;
        since_last = 0;
      end else begin
        in_valid = 0;
        since_last++;
      end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    th_prev = th;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: medium load
    traffic(P, 1000);
    chk(rx_active >= 3, "heavy load keeps at least 3 receive PEs on");
    // phase 2: light load
    traffic(6 * P, 1);
    chk(rx_active == 1 && tx_active == 1, $sformatf("light load ends at %0d+%0d", rx_active, tx_active));
    chk(pe_clk_en == 6'b101110 || $countones(pe_clk_en) == 2, $sformatf("clocks of idle PEs stopped: %b", pe_clk_en));
    // phase 3: burst
    // one extra packet is sent in the first cycle of buffer pressure, as a
    // packet arriving while the woken PE starts up would be
    poke_on_pressure = 1;
    traffic(P / 10, 1000);
    poke_on_pressure = 0;
    chk(poked, "burst reached buffer pressure");
    // phase 4: medium load then drain
    traffic(P / 20, 20);
    repeat (6000) @(negedge clk);
    chk(pending.size() == 0, $sformatf("%0d packets never left", pending.size()));
    chk(delivered == accepted, $sformatf("delivered %0d accepted %0d", delivered, accepted));
    // a packet may only be lost when all PEs run (the processor is saturated);
    // clock gating must add no loss
    chk(drops_gated == 0, $sformatf("%0d packets lost while PEs were off", drops_gated));
    // the power-management sequence
    begin
      int er[5] = '{4, 3, 2, 2, 1};
      int ex[5] = '{2, 2, 2, 1, 1};
      int found;
      found = 0;
      for (int s = 0; s + 5 <= seq_r.size(); s++) begin
        int ok;
        ok = 1;
        for (int i = 0; i < 5; i++) if (seq_r[s+i] != er[i] || seq_x[s+i] != ex[i]) ok = 0;
        if (ok) found = 1;
      end
      chk(found == 1, "PE counts stepped 4+2, 3+2, 2+2, 2+1, 1+1");
    end
    // mechanisms
    chk(n_off >= 4, $sformatf("turn-off decisions %0d", n_off));
    chk(n_gate >= 4, $sformatf("clock stops %0d", n_gate));
    chk(n_on >= 1, $sformatf("wake-ups on pressure %0d", n_on));
    chk(n_pressure > 0, "buffer pressure");
    chk(n_extra > 0, "extra buffer entry used");
    chk(n_th_change > 0, "dynamic threshold moved");
    chk(th != 20'd500000, "threshold adapted");
    chk(min_tx == 1, "a transmit PE was turned off");
    chk(n_at_min > 0, "minimum 1+1 reached");
    $display("off=%0d on=%0d gate=%0d pressure_cycles=%0d extra_cycles=%0d th_changes=%0d accepted=%0d delivered=%0d drops=%0d gated_drops=%0d",
             n_off, n_on, n_gate, n_pressure, n_extra, n_th_change, accepted, delivered, drops, drops_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
