// ht_packet_engine: converts between HyperTransport packets and the cave's
// internal request bus.
//
// The HT link core (the cave core) delivers and takes packets on three
// channels per direction: posted (P), non-posted (N) and response (R).
// A packet is one 32-bit data word with its 40-bit address and source tag.
//
// Host to cave:
//   rx P  posted write         -> internal write request
//   rx N  read request         -> internal read request; its source tag is
//                                 queued (TAG_DEPTH entries)
//   internal read response     -> tx R with the oldest queued tag
//   rx R  response to a read the cave issued -> module response
// Posted requests take precedence over non-posted ones, as HT lets posted
// traffic pass non-posted traffic. The N channel is held off while the tag
// queue is full, which bounds the reads in flight.
//
// Cave to host (module requests from the RTRMs):
//   module write -> tx P;  module read -> tx N with a tag counting up.
// Responses from the host are expected in request order.
//
// Every channel uses valid/stop: a packet moves in a cycle where valid is
// high and the receiver's stop is low. The engine is combinational except
// for the tag queue and the tag counter, so it adds no latency.
//
// From the description: decoding host packets into actions for the units
// of the cave and creating responses that it injects into the cave core.
// Own choices: the reduced one-word packet, the channel handshake, the tag
// queue, no non-posted writes and no error responses.
module ht_packet_engine
  import rtr_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the cave core
  input  logic    rx_p_valid, input  ht_pkt_t rx_p, output logic rx_p_stop,
  input  logic    rx_n_valid, input  ht_pkt_t rx_n, output logic rx_n_stop,
  input  logic    rx_r_valid, input  ht_pkt_t rx_r, output logic rx_r_stop,
  // to the cave core
  output logic    tx_p_valid, output ht_pkt_t tx_p, input  logic tx_p_stop,
  output logic    tx_n_valid, output ht_pkt_t tx_n, input  logic tx_n_stop,
  output logic    tx_r_valid, output ht_pkt_t tx_r, input  logic tx_r_stop,
  // internal requests to the routing unit
  output logic        req_valid,
  output ireq_t       req,
  input  logic        req_stop,
  input  logic        resp_valid,
  input  logic [31:0] resp_data,
  output logic        resp_stop,
  // module requests from the routing unit
  input  logic        mreq_valid,
  input  ireq_t       mreq,
  output logic        mreq_stop,
  output logic        mresp_valid,
  output logic [31:0] mresp_data,
  input  logic        mresp_stop
);

  localparam int unsigned AW = $clog2(TAG_DEPTH);

  logic [TAG_W-1:0] tagq [TAG_DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             tagq_full, push, pop;
  logic             sel_p;
  logic [TAG_W-1:0] next_tag;

  assign tagq_full = wr_ptr == {~rd_ptr[AW], rd_ptr[AW-1:0]};

  // ---------------------------------------------------- host requests
  assign sel_p     = rx_p_valid;
  assign req_valid = rx_p_valid || (rx_n_valid && !tagq_full);
  always_comb begin
    if (sel_p) req = '{wr: 1'b1, addr: rx_p.addr, data: rx_p.data};
    else       req = '{wr: 1'b0, addr: rx_n.addr, data: 32'h0};
  end
  assign rx_p_stop = req_stop;
  assign rx_n_stop = sel_p || tagq_full || req_stop;
  assign push      = rx_n_valid && !rx_n_stop;

  // ---------------------------------------------------- responses to the host
  assign tx_r_valid = resp_valid;
  assign tx_r       = '{srctag: tagq[rd_ptr[AW-1:0]], addr: '0, data: resp_data};
  assign resp_stop  = tx_r_stop;
  assign pop        = resp_valid && !tx_r_stop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      next_tag <= '0;
    end else begin
      if (push) begin
        tagq[wr_ptr[AW-1:0]] <= rx_n.srctag;
        wr_ptr <= wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      if (tx_n_valid && !tx_n_stop) next_tag <= next_tag + 1'b1;
    end
  end

  // ---------------------------------------------------- module requests
  assign tx_p_valid = mreq_valid && mreq.wr;
  assign tx_p       = '{srctag: '0, addr: mreq.addr, data: mreq.data};
  assign tx_n_valid = mreq_valid && !mreq.wr;
  assign tx_n       = '{srctag: next_tag, addr: mreq.addr, data: 32'h0};
  assign mreq_stop  = mreq.wr ? tx_p_stop : tx_n_stop;

  assign mresp_valid = rx_r_valid;
  assign mresp_data  = rx_r.data;
  assign rx_r_stop   = mresp_stop;

  a_resp_has_tag: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> wr_ptr != rd_ptr);

endmodule
