// seq_pkg: types and constants shared by the sequence loader, the JTAG
// translation path and the parallel-interface plumbing.
//
// The parallel interface is the PHY's internal register bus. A master holds
// `req` high with `we`, `addr` and `wdata` stable until the slave answers with
// a one-cycle `ack`; on a read, `rdata` is valid in the ack cycle. A slave that
// registers its ack completes a transfer in two clock cycles, and a master may
// start its next transfer in the cycle after the ack.
//
// The sequence contents are computed here by seq_entry(). The real sequences
// are vendor register settings for protocol rate changes that are not
// public; the formula keeps the structure that is known (24 sequences, the
// first 12 being the longer "type 1" routine, the other 12 the shorter
// "type 2" routine, each configuring its own part of the PHY) and fills in
// placeholder addresses and values.
package seq_pkg;

  parameter int ADDR_W = 16;            // parallel address width (chosen)
  parameter int DATA_W = 16;            // parallel data width (chosen)

  parameter int SEL_W     = 5;          // sequence bus width: 5-to-32 decoder
  parameter int MAX_SEQ   = 1 << SEL_W; // 32 sequence slots
  parameter int NUM_SEQ   = 24;         // sequences actually stored
  parameter int NUM_TYPE1 = 12;         // sequences 0..11 are type 1
  parameter int LEN_TYPE1 = 32;         // writes per type-1 sequence (chosen)
  parameter int LEN_TYPE2 = 16;         // writes per type-2 sequence (chosen)
  parameter int POS_W     = 8;          // position counter width

  // Address of the register that starts a sequence, and the value it holds
  // whenever no sequence is running.
  parameter logic [ADDR_W-1:0] SEQ_REG_ADDR    = 16'hFFF0;
  parameter logic [DATA_W-1:0] SEQ_REG_DEFAULT = 16'hFFFF;

  // PHY regions configured by the two routine types.
  parameter logic [ADDR_W-1:0] TYPE1_BASE = 16'h1000;
  parameter logic [ADDR_W-1:0] TYPE2_BASE = 16'h2000;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SEL_W-1:0]  sel_t;
  typedef logic [POS_W-1:0]  pos_t;

  // Master-to-slave half of the parallel interface.
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    data_t wdata;
  } par_req_t;

  // Slave-to-master half.
  typedef struct packed {
    logic  ack;
    data_t rdata;
  } par_rsp_t;

  // Number of writes in sequence `id`; 0 for a slot that holds no sequence.
  function automatic int seq_len(int id);
    if (id < NUM_TYPE1)    return LEN_TYPE1;
    else if (id < NUM_SEQ) return LEN_TYPE2;
    else                   return 0;
  endfunction

  // Address written by step k of sequence id: each type configures its own
  // contiguous block of registers.
  function automatic addr_t seq_addr(int id, int k);
    addr_t base;
    base = (id < NUM_TYPE1) ? TYPE1_BASE : TYPE2_BASE;
    return base + addr_t'(k);
  endfunction

  // Value written by step k of sequence id: sequence number in the top byte,
  // a per-step pattern in the low byte.
  function automatic data_t seq_data(int id, int k);
    logic [7:0] lo;
    lo = 8'(k * 37 + id * 11) ^ 8'h5A;
    return {3'b000, 5'(id), lo};
  endfunction

endpackage
