// np_pkg: types and constants shared by the clock-gated network processor.
//
// The processor has NUM_PE processing elements (microengines). PEs 0..NUM_RX_PE-1
// run receive threads, the rest run transmit threads (4:2 split of the six PEs).
// Each PE holds THREADS_PER_PE hardware threads; a thread is named by a global ID
// pe*THREADS_PER_PE + thread. Packets move through the chip as 64-byte mpackets,
// each tagged with the network port it arrived on (NUM_PORTS ports).
// The numbers follow the evaluated configuration (six PEs, four threads each,
// 16 input ports, 64-byte mpackets); the type layout is this design's own.
package np_pkg;

  localparam int NUM_RX_PE      = 4;
  localparam int NUM_TX_PE      = 2;
  localparam int NUM_PE         = NUM_RX_PE + NUM_TX_PE;
  localparam int THREADS_PER_PE = 4;
  localparam int NUM_THREADS    = NUM_PE * THREADS_PER_PE;
  localparam int NUM_PORTS      = 16;
  localparam int MPKT_BYTES     = 64;
  localparam int MPKT_BITS      = MPKT_BYTES * 8;
  localparam int WORD_BITS      = 32;
  localparam int MPKT_WORDS     = MPKT_BITS / WORD_BITS;

  localparam int TID_W  = $clog2(NUM_THREADS);
  localparam int PORT_W = $clog2(NUM_PORTS);

  typedef logic [TID_W-1:0]     tid_t;
  typedef logic [PORT_W-1:0]    port_t;
  typedef logic [MPKT_BITS-1:0] mpkt_data_t;
  typedef logic [WORD_BITS-1:0] word_t;

  // One mpacket as held in the receive buffer and handed to a receive thread.
  typedef struct packed {
    port_t      port;
    mpkt_data_t data;
  } mpkt_t;

  // One processed packet as handed from a receive thread to a transmit thread.
  typedef struct packed {
    port_t      port;
    word_t      digest;
    mpkt_data_t data;
  } txpkt_t;

  // Operations of the PE's ALU.
  typedef enum logic [2:0] {
    ALU_AND = 3'd0,
    ALU_OR  = 3'd1,
    ALU_NOT = 3'd2,
    ALU_XOR = 3'd3,
    ALU_ADD = 3'd4,
    ALU_SUB = 3'd5
  } alu_op_e;

  // Command from the shutdown control to the PE on/off control.
  typedef enum logic [1:0] {
    CMD_NONE = 2'd0,
    CMD_OFF  = 2'd1,
    CMD_ON   = 2'd2
  } pe_cmd_e;

  function automatic int unsigned pe_of_tid(tid_t t);
    return int'(t) / THREADS_PER_PE;
  endfunction

endpackage
