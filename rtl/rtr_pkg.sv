// rtr_pkg: types and constants shared by the HyperTransport cave with
// run-time reconfiguration (RTR) support.
//
// The cave talks to the HT link core through three packet channels in each
// direction: posted (P), non-posted (N) and response (R). A packet is
// reduced here to one 32-bit data word with its 40-bit HT address and a
// source tag; the full HT packet format is not modelled.
//
// Inside the cave all units use one internal request bus (ireq_t) with a
// valid/stop handshake: a word moves in a cycle where valid is high and the
// receiver's stop is low. Writes are posted (no response); a read is answered
// by exactly one response word, and responses return in request order.
package rtr_pkg;

  localparam int unsigned HT_ADDR_W = 40;  // HyperTransport physical address width
  localparam int unsigned DATA_W    = 32;  // data path width, as on the RTRM entity
  localparam int unsigned TAG_W     = 5;   // HT source tag width

  // one packet on a P, N or R channel
  typedef struct packed {
    logic [TAG_W-1:0]     srctag;  // matches a response to its non-posted request
    logic [HT_ADDR_W-1:0] addr;    // physical address (unused on R)
    logic [DATA_W-1:0]    data;    // write data (P) or read data (R)
  } ht_pkt_t;

  // one request on the internal bus
  typedef struct packed {
    logic                 wr;      // 1 = write, 0 = read
    logic [HT_ADDR_W-1:0] addr;    // physical address
    logic [DATA_W-1:0]    data;    // write data
  } ireq_t;

  // Virtex-4 ICAP bus, active-low strobes as on the vendor primitive
  typedef struct packed {
    logic              ce_n;
    logic              write_n;
    logic [DATA_W-1:0] din;
  } icap_in_t;

  // register offsets of the reconfig unit (byte addresses within its window)
  localparam logic [7:0] RCFG_CTRL    = 8'h00;
  localparam logic [7:0] RCFG_STATUS  = 8'h04;
  localparam logic [7:0] RCFG_DATA    = 8'h08;
  localparam logic [7:0] RCFG_VERSION = 8'h0C;
  localparam logic [7:0] RCFG_COUNT   = 8'h10;

endpackage
