// tb_np_power_rates: runs the whole processor at the four evaluation traffic
// rates, 90, 180, 360 and 480 Mbps of 64-byte packets on the 16 ports, once
// with the static and once with the dynamic threshold, and shows how many PEs
// the policy keeps running at each rate.
//
// How: the design is reset before every run, so each run starts with all six
// PEs on. Each run is TRAIN windows of traffic followed by a drain with no input.
// The window is shortened to 20,000 cycles, and the threshold and its step are
// scaled with it (half the window, 1% of the window = 2% of the initial
// threshold). Other parameters are the defaults.
// Arrivals are random: a packet never follows the previous one sooner than
// 119 cycles (64 bytes at 1 Gbps on a 232 MHz clock). After that it starts
// with a fixed probability per cycle, chosen so the mean spacing matches the
// rate (64 * 8 bits * 232 MHz / rate = 1320, 660, 330 and 247 cycles).
//
// Checks, per run:
//   - no packet is dropped at these rates, all of which are below the
//     processor's capacity;
//   - every accepted packet leaves exactly once, with its port, data and a
//     digest computed here;
//   - if the run ends with fewer receive PEs than the rate needs (a receive PE
//     completes one packet per about 1,520 cycles on each of its 4 threads),
//     buffer pressure must have woken a PE during the run: the policy then
//     moves between too few and enough PEs, and the buffer absorbs the gap.
// Across runs:
//   - at 90 Mbps the processor ends at the minimum of 1+1 PEs;
//   - the mean number of clocked PEs at 480 Mbps is above that at 90 Mbps;
//   - some PE is turned off in every run.
// The results are printed as a table per rate and threshold mode.
module tb_np_power_rates;
  import np_pkg::*;

  localparam int P     = 20000;
  localparam int TRAIN = 10;
  localparam int GAP   = 119;
  localparam int NRATE = 4;
  localparam int RATE_MBPS  [NRATE] = '{90, 180, 360, 480};
  localparam int MEAN_CYCLES[NRATE] = '{1320, 660, 330, 247};
  // receive PEs needed: mean service time (~1,520 cycles per packet per
  // thread) over 4 threads per PE, divided by the mean spacing, rounded up
  localparam int RX_NEEDED  [NRATE] = '{1, 1, 2, 2};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_drop, dynamic_th_en = 0;
  mpkt_t in_pkt = '0;
  logic [NUM_TX_PE-1:0] out_valid;
  txpkt_t out_pkt [NUM_TX_PE];
  logic [NUM_PE-1:0] pe_clk_en, pe_off_flag;
  logic [2:0] rx_active;
  logic [1:0] tx_active;
  pe_cmd_e pe_cmd;
  logic window_end, buf_pressure, extra_in_use;
  logic [4:0] tq_len;
  logic [14:0] th, idle_count;
  logic [31:0] pe_pkt_count [NUM_PE];

  np_power_top #(
    .PERIOD(P), .TH_INIT(P/2), .TH_DELTA(P/100), .TH_MIN(P/100), .TH_MAX(P - P/100)
  ) dut (.*);

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
  int serial = 0;
  int accepted, delivered, drops, n_off, n_on, n_pressure_win;
  longint pe_on_cycles, run_cycles;

  initial begin
    forever begin
      bit iv, dr;
      mpkt_t ip;
      @(posedge clk);
      iv = in_valid; dr = in_drop; ip = in_pkt;
      if (rst_n) begin
        if (iv && dr) drops++;
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
        if (window_end && dut.period_pressure) n_pressure_win++;
        pe_on_cycles += longint'($countones(pe_clk_en));
        run_cycles++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  int since_last = GAP;

  task automatic traffic(int cycles, int mean);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      if (since_last >= GAP && $urandom_range(mean - GAP - 1) == 0) begin
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
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mean_on [2][NRATE];

  initial begin
    for (int mode = 0; mode < 2; mode++) begin
      for (int r = 0; r < NRATE; r++) begin
        int end_rx, end_tx;
        // fresh start: all PEs on, threshold at its initial value
        @(negedge clk);
        rst_n = 0;
        dynamic_th_en = mode[0];
        pending.delete();
        accepted = 0; delivered = 0; drops = 0; n_off = 0; n_on = 0; n_pressure_win = 0;
        pe_on_cycles = 0; run_cycles = 0; since_last = GAP;
        repeat (3) @(negedge clk);
        rst_n = 1;
        traffic(TRAIN * P, MEAN_CYCLES[r]);
        end_rx = int'(rx_active);
        end_tx = int'(tx_active);
        mean_on[mode][r] = real'(pe_on_cycles) / real'(run_cycles);
        repeat (20000) @(negedge clk);
        $display("%-7s %0d Mbps: packets=%0d dropped=%0d offs=%0d wakes=%0d pressure_windows=%0d end=%0d+%0d mean_clocked_PEs=%.2f th=%0d",
                 mode ? "dynamic" : "static", RATE_MBPS[r], accepted, drops, n_off, n_on,
                 n_pressure_win, end_rx, end_tx, mean_on[mode][r], th);
        chk(drops == 0, $sformatf("%0d Mbps: %0d packets dropped", RATE_MBPS[r], drops));
        chk(accepted > TRAIN * P / MEAN_CYCLES[r] / 2, "traffic generated");
        chk(pending.size() == 0, $sformatf("%0d packets never left", pending.size()));
        chk(delivered == accepted, "all packets delivered");
        if (end_rx < RX_NEEDED[r])
          chk(n_on > 0, $sformatf("%0d Mbps: %0d receive PEs and no wake-up", RATE_MBPS[r], end_rx));
        chk(n_off > 0, "a PE was turned off");
        if (r == 0) chk(end_rx == 1 && end_tx == 1, "90 Mbps ends at 1+1");
      end
      chk(mean_on[mode][0] < mean_on[mode][NRATE-1], "more PEs clocked at 480 than at 90 Mbps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
