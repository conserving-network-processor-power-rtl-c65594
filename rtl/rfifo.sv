// rfifo: internal receive packet buffer with the extra overflow entry.
//
// Incoming mpackets (64 bytes, tagged with their input port) are held here until
// a receive thread is given one. The buffer has BASE_DEPTH regular entries plus
// EXTRA_DEPTH extra entries. buf_pressure is raised as soon as the regular
// entries are all in use; the extra entry then absorbs the packets that arrive
// while a clock-gated PE is being woken up, so no packet is lost during that
// wake-up. A packet is dropped only when all BASE_DEPTH+EXTRA_DEPTH entries are full.
//
// port_rdy_status[p] is set while the buffer holds a packet from port p. A read
// (rd_en with rd_port) removes the oldest packet of that port; rd_pkt shows it in
// the same cycle. Packets of one port therefore leave in arrival order while
// different ports can be served in any order. Entries are kept in arrival order
// and compacted on every removal.
//
// Timing: a push and a read may happen in the same cycle; both take effect at
// the next rising edge. port_rdy_status and count are registered state.
// The single extra mpacket entry and the pressure signal follow the design
// description; the regular depth (16) and the per-port read are this design's
// choices.
module rfifo
  import np_pkg::*;
#(
  parameter int unsigned BASE_DEPTH  = 16,
  parameter int unsigned EXTRA_DEPTH = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the network interfaces
  input  logic                  in_valid,
  input  mpkt_t                 in_pkt,
  output logic                  in_drop,      // packet lost: buffer completely full
  // per-port status and read
  output logic [NUM_PORTS-1:0]  port_rdy_status,
  input  logic                  rd_en,
  input  port_t                 rd_port,
  output mpkt_t                 rd_pkt,
  output logic                  rd_hit,       // a packet of rd_port is present
  // occupancy
  output logic [$clog2(BASE_DEPTH+EXTRA_DEPTH+1)-1:0] count,
  output logic                  buf_pressure,
  output logic                  extra_in_use
);

  localparam int unsigned DEPTH = BASE_DEPTH + EXTRA_DEPTH;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned IW    = $clog2(DEPTH);

  mpkt_t         ent_q [DEPTH];
  logic [CW-1:0] cnt_q;

  logic [IW-1:0] hit_idx;
  logic          do_pop, do_push;

  // oldest entry of the requested port
  always_comb begin
    rd_hit  = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (!rd_hit && CW'(i) < cnt_q && ent_q[i].port == rd_port) begin
        rd_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  assign rd_pkt  = ent_q[hit_idx];
  assign do_pop  = rd_en && rd_hit;
  // a push is accepted when there is room after this cycle's removal
  assign do_push = in_valid && (cnt_q < CW'(DEPTH) || do_pop);
  assign in_drop = in_valid && !do_push;

  mpkt_t         ent_d [DEPTH];
  logic [CW-1:0] cnt_d;

  // next state: close the gap left by the read, then append the push
  always_comb begin
    logic [CW-1:0] n;
    for (int unsigned i = 0; i < DEPTH; i++) ent_d[i] = ent_q[i];
    n = cnt_q;
    if (do_pop) begin
      for (int unsigned i = 0; i < DEPTH - 1; i++)
        if (IW'(i) >= hit_idx) ent_d[i] = ent_q[i+1];
      n = n - 1'b1;
    end
    if (do_push) ent_d[IW'(n)] = in_pkt;
    cnt_d = n + CW'(do_push);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= '0;
    end else begin
      cnt_q <= cnt_d;
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= ent_d[i];
    end
  end

  always_comb begin
    port_rdy_status = '0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (CW'(i) < cnt_q) port_rdy_status[ent_q[i].port] = 1'b1;
  end

  assign count        = cnt_q;
  assign buf_pressure = cnt_q >= CW'(BASE_DEPTH);
  assign extra_in_use = cnt_q >  CW'(BASE_DEPTH);

  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(DEPTH));

endmodule
