// internal_routing_unit: address router between the HT packet engine and
// the host-independent units of the cave.
//
// Downstream (host requests). The physical address picks the target:
// with off = addr - BAR_BASE and t = off >> SLOT_SHIFT,
//   t = 0            the reconfig unit (target 0),
//   t = 1..NUM_SLOTS the RTRM controller of slot t-1 (target t),
//   anything else    no target: writes are dropped, reads answered with
//                    all ones, so a stray access cannot hang the host link.
// Every target answers its reads in order. Several reads may be in flight
// to one target at a time (up to MAX_PEND); a read for another target waits
// until all of them are answered, which keeps the responses in request
// order without a reorder buffer. Writes never wait for responses.
//
// Upstream (module requests). Requests of the RTRM controllers are
// arbitrated with fixed priority, slot 0 first. A request whose address
// lies in a slot window is an RTRM-to-RTRM access and joins the downstream
// path (the host has priority there); any other request goes to the packet
// engine. Read responses return in order and are steered to the slot that
// asked, using the same one-target-at-a-time rule.
//
// All links use valid/stop handshakes; request and response paths are
// combinational apart from the in-flight counters.
//
// From the description: routing of requests to and from the internal units
// (reconfig unit, RTRM controllers), optionally between RTRMs. Own choices: the address map, the
// response ordering rule and the fixed-priority arbitration.
module internal_routing_unit
  import rtr_pkg::*;
#(
  parameter int unsigned          NUM_SLOTS  = 2,
  parameter logic [HT_ADDR_W-1:0] BAR_BASE   = 40'h00_8000_0000,
  parameter int unsigned          SLOT_SHIFT = 27,
  parameter int unsigned          MAX_PEND   = 15,
  localparam int unsigned NT = NUM_SLOTS + 1,      // targets
  localparam int unsigned TW = $clog2(NT + 1)      // target index incl. 'none'
) (
  input  logic        clk,
  input  logic        rst_n,
  // from / to the packet engine
  input  logic        req_valid,
  input  ireq_t       req,
  output logic        req_stop,
  output logic        resp_valid,
  output logic [31:0] resp_data,
  input  logic        resp_stop,
  // to / from the targets (0 = reconfig unit, 1+s = slot s)
  output logic        t_req_valid [NT],
  output ireq_t       t_req,
  input  logic        t_req_stop  [NT],
  input  logic        t_resp_valid[NT],
  input  logic [31:0] t_resp_data [NT],
  output logic        t_resp_stop [NT],
  // module requests from the slots
  input  logic        s_mreq_valid [NUM_SLOTS],
  input  ireq_t       s_mreq       [NUM_SLOTS],
  output logic        s_mreq_stop  [NUM_SLOTS],
  output logic        s_mresp_valid[NUM_SLOTS],
  output logic [31:0] s_mresp_data [NUM_SLOTS],
  input  logic        s_mresp_stop [NUM_SLOTS],
  // module requests to / responses from the packet engine
  output logic        mreq_valid,
  output ireq_t       mreq,
  input  logic        mreq_stop,
  input  logic        mresp_valid,
  input  logic [31:0] mresp_data,
  output logic        mresp_stop
);

  localparam logic [TW-1:0] NONE = TW'(NT);
  localparam int unsigned   CW   = $clog2(MAX_PEND + 1);
  localparam int unsigned   SW   = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1;
  localparam int unsigned   RW   = $clog2(NUM_SLOTS + 1);   // source: 0 = host, 1+s = slot s

  function automatic logic [TW-1:0] decode(input logic [HT_ADDR_W-1:0] a);
    logic [HT_ADDR_W-1:0] t;
    t = (a - BAR_BASE) >> SLOT_SHIFT;
    return (a >= BAR_BASE && t < HT_ADDR_W'(NT)) ? TW'(t) : NONE;
  endfunction

  // ------------------------------------------------------------ sources
  // A module request whose address falls in a slot window goes to that
  // slot (RTRM to RTRM); any other module request goes to the host.
  logic [TW-1:0] mdst    [NUM_SLOTS];
  logic          is_peer [NUM_SLOTS];
  always_comb
    for (int s = 0; s < int'(NUM_SLOTS); s++) begin
      mdst[s]    = decode(s_mreq[s].addr);
      is_peer[s] = mdst[s] != '0 && mdst[s] != NONE;
    end

  // ------------------------------------------------------------ downstream
  // Host requests and peer requests share the way to the targets; the host
  // wins when both are ready. Reads in flight belong to one (source,
  // target) pair at a time, so every response finds its way back in order.
  logic [TW-1:0] tgt, dn_tgt, pend_tgt;
  logic [RW-1:0] dn_src, pend_src;
  logic [CW-1:0] pend_cnt;
  logic          host_may, use_host, dn_valid, dn_stop, acc_rd, resp_take;
  ireq_t         dn_req;
  logic [SW-1:0] grant, mpend_slot;
  logic          grant_valid;
  logic [CW-1:0] mpend_cnt;

  assign tgt = decode(req.addr);
  assign host_may = req.wr ||
                    ((pend_cnt == '0 || (pend_src == '0 && pend_tgt == tgt)) &&
                     pend_cnt != CW'(MAX_PEND));
  assign use_host = req_valid && host_may;

  always_comb begin
    dn_valid = use_host || (grant_valid && is_peer[grant]);
    dn_req   = use_host ? req : s_mreq[grant];
    dn_tgt   = use_host ? tgt : mdst[grant];
    dn_src   = use_host ? '0  : RW'(grant) + RW'(1);
    dn_stop  = 1'b0;
    for (int i = 0; i < int'(NT); i++) begin
      if (dn_tgt == TW'(i)) dn_stop = t_req_stop[i];
      t_req_valid[i] = dn_valid && dn_tgt == TW'(i);
    end
  end
  assign t_req    = dn_req;
  assign req_stop = !host_may || dn_stop;
  assign acc_rd   = dn_valid && !dn_stop && !dn_req.wr;

  // responses come from the target of the reads in flight and go to their source
  logic        null_valid, dn_rvalid, dn_rstop;
  logic [31:0] dn_rdata;
  assign null_valid = pend_cnt != '0 && pend_tgt == NONE;
  always_comb begin
    dn_rvalid = null_valid;
    dn_rdata  = 32'hffff_ffff;
    for (int i = 0; i < int'(NT); i++)
      if (pend_cnt != '0 && pend_tgt == TW'(i)) begin
        dn_rvalid = t_resp_valid[i];
        dn_rdata  = t_resp_data[i];
      end
    dn_rstop = resp_stop;
    for (int s = 0; s < int'(NUM_SLOTS); s++)
      if (pend_src == RW'(s) + RW'(1)) dn_rstop = s_mresp_stop[s];
    for (int i = 0; i < int'(NT); i++)
      t_resp_stop[i] = !(pend_cnt != '0 && pend_tgt == TW'(i)) || dn_rstop;
  end
  assign resp_valid = dn_rvalid && pend_src == '0;
  assign resp_data  = dn_rdata;
  assign resp_take  = dn_rvalid && !dn_rstop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_cnt <= '0;
      pend_tgt <= NONE;
      pend_src <= '0;
    end else begin
      if (acc_rd) begin
        pend_tgt <= dn_tgt;
        pend_src <= dn_src;
      end
      pend_cnt <= pend_cnt + CW'(acc_rd) - CW'(resp_take);
    end
  end

  // ------------------------------------------------------------ upstream
  // A slot never has reads in flight to the host and to a peer at the same
  // time, so its responses cannot overtake each other.
  logic macc_rd, mresp_take;
  logic elig [NUM_SLOTS];

  always_comb begin
    grant       = '0;
    grant_valid = 1'b0;
    for (int s = int'(NUM_SLOTS) - 1; s >= 0; s--) begin
      if (is_peer[s])
        elig[s] = !(mpend_cnt != '0 && mpend_slot == SW'(s)) &&
                  (s_mreq[s].wr ||
                   ((pend_cnt == '0 || (pend_src == RW'(s) + RW'(1) && pend_tgt == mdst[s])) &&
                    pend_cnt != CW'(MAX_PEND)));
      else
        elig[s] = s_mreq[s].wr ||
                  (!(pend_cnt != '0 && pend_src == RW'(s) + RW'(1)) &&
                   (mpend_cnt == '0 || mpend_slot == SW'(s)) && mpend_cnt != CW'(MAX_PEND));
      if (s_mreq_valid[s] && elig[s]) begin
        grant       = SW'(s);
        grant_valid = 1'b1;
      end
    end
  end

  assign mreq_valid = grant_valid && !is_peer[grant];
  assign mreq       = s_mreq[grant];
  always_comb
    for (int s = 0; s < int'(NUM_SLOTS); s++)
      s_mreq_stop[s] = !(grant_valid && grant == SW'(s)) ||
                       (is_peer[s] ? (use_host || dn_stop) : mreq_stop);
  assign macc_rd = mreq_valid && !mreq_stop && !mreq.wr;

  always_comb begin
    mresp_stop = 1'b1;
    for (int s = 0; s < int'(NUM_SLOTS); s++) begin
      s_mresp_valid[s] = 1'b0;
      s_mresp_data[s]  = mresp_data;
      if (mpend_cnt != '0 && mpend_slot == SW'(s)) begin
        s_mresp_valid[s] = mresp_valid;
        mresp_stop       = s_mresp_stop[s];
      end
      if (pend_cnt != '0 && pend_src == RW'(s) + RW'(1)) begin
        s_mresp_valid[s] = dn_rvalid;
        s_mresp_data[s]  = dn_rdata;
      end
    end
  end
  assign mresp_take = mresp_valid && !mresp_stop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mpend_cnt  <= '0;
      mpend_slot <= '0;
    end else begin
      if (macc_rd) mpend_slot <= grant;
      mpend_cnt <= mpend_cnt + CW'(macc_rd) - CW'(mresp_take);
    end
  end

  a_no_resp_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pend_cnt == '0 |-> !dn_rvalid);

endmodule
