// ht_rtr_cave_top: HyperTransport cave with support for run-time
// reconfigurable modules (RTRMs).
//
// The static part of the FPGA keeps the host link alive while RTR regions
// are rewritten. It consists of
//   ht_packet_engine      HT packets <-> internal requests
//   internal_routing_unit routes by address to the units below
//   reconfig_unit         feeds partial bitstreams into the ICAP
//   rtrm_controller x2    one per RTR slot: physical -> virtual RTRM
//                         addresses, crq/mrq interface, decoupling
// and two RTR slots, each holding one RTRM behind the fixed RTRM entity:
//   slot 0  pattern_matcher (NUM_PATTERNS 32-bit patterns, 4 compares each)
//   slot 1  mt32            Mersenne twister, one number per clock
// In the FPGA a slot's contents are replaced by a partial bitstream; in RTL
// each slot is fixed to one module. Reconfiguring a slot through the
// reconfig unit resets its RTRM and decouples it meanwhile, which is how
// the exchange shows up here.
//
// Host address map (physical HT addresses, BAR_BASE aligned to 128 MiB):
//   BAR_BASE + 0x0000_0000  reconfig unit registers
//   BAR_BASE + 0x0800_0000  slot 0, 128 MiB (RTRM virtual 0x000_0000 up)
//   BAR_BASE + 0x1000_0000  slot 1, 128 MiB
// RTRM module requests leave with their virtual address as the physical
// host address (MRQ_BASE = 0).
//
// The HT link core (physical and link layer) is not part of this RTL: its
// three packet channels per direction are the top's ports, as are the ICAP
// primitive's pins and the RTRM interrupt lines. One clock for everything.
module ht_rtr_cave_top
  import rtr_pkg::*;
#(
  parameter logic [HT_ADDR_W-1:0] BAR_BASE     = 40'h00_8000_0000,
  parameter int unsigned          NUM_PATTERNS = 290,
  parameter int unsigned          DB_WORDS     = 8192
) (
  input  logic    clk,
  input  logic    rst_n,
  // HT cave core, host -> cave
  input  logic    rx_p_valid, input  ht_pkt_t rx_p, output logic rx_p_stop,
  input  logic    rx_n_valid, input  ht_pkt_t rx_n, output logic rx_n_stop,
  input  logic    rx_r_valid, input  ht_pkt_t rx_r, output logic rx_r_stop,
  // HT cave core, cave -> host
  output logic    tx_p_valid, output ht_pkt_t tx_p, input  logic tx_p_stop,
  output logic    tx_n_valid, output ht_pkt_t tx_n, input  logic tx_n_stop,
  output logic    tx_r_valid, output ht_pkt_t tx_r, input  logic tx_r_stop,
  // ICAP primitive
  output icap_in_t icap_in,
  input  logic     icap_busy,
  // RTRM interrupts, one per slot
  output logic [1:0] intr
);

  localparam int unsigned NUM_SLOTS  = 2;
  localparam int unsigned SLOT_SHIFT = 27;
  localparam int unsigned NT         = NUM_SLOTS + 1;

  // packet engine <-> routing unit
  logic        pe_req_valid, pe_req_stop, pe_resp_valid, pe_resp_stop;
  ireq_t       pe_req;
  logic [31:0] pe_resp_data;
  logic        pe_mreq_valid, pe_mreq_stop, pe_mresp_valid, pe_mresp_stop;
  ireq_t       pe_mreq;
  logic [31:0] pe_mresp_data;

  // routing unit <-> targets
  logic        t_req_valid [NT];
  ireq_t       t_req;
  logic        t_req_stop  [NT];
  logic        t_resp_valid[NT];
  logic [31:0] t_resp_data [NT];
  logic        t_resp_stop [NT];
  logic        s_mreq_valid [NUM_SLOTS];
  ireq_t       s_mreq       [NUM_SLOTS];
  logic        s_mreq_stop  [NUM_SLOTS];
  logic        s_mresp_valid[NUM_SLOTS];
  logic [31:0] s_mresp_data [NUM_SLOTS];
  logic        s_mresp_stop [NUM_SLOTS];

  logic        slot_rst_n [NUM_SLOTS];
  logic        decouple   [NUM_SLOTS];

  ht_packet_engine u_pe (
    .clk, .rst_n,
    .rx_p_valid, .rx_p, .rx_p_stop, .rx_n_valid, .rx_n, .rx_n_stop, .rx_r_valid, .rx_r, .rx_r_stop,
    .tx_p_valid, .tx_p, .tx_p_stop, .tx_n_valid, .tx_n, .tx_n_stop, .tx_r_valid, .tx_r, .tx_r_stop,
    .req_valid(pe_req_valid), .req(pe_req), .req_stop(pe_req_stop),
    .resp_valid(pe_resp_valid), .resp_data(pe_resp_data), .resp_stop(pe_resp_stop),
    .mreq_valid(pe_mreq_valid), .mreq(pe_mreq), .mreq_stop(pe_mreq_stop),
    .mresp_valid(pe_mresp_valid), .mresp_data(pe_mresp_data), .mresp_stop(pe_mresp_stop)
  );

  internal_routing_unit #(
    .NUM_SLOTS(NUM_SLOTS), .BAR_BASE(BAR_BASE), .SLOT_SHIFT(SLOT_SHIFT)
  ) u_iru (
    .clk, .rst_n,
    .req_valid(pe_req_valid), .req(pe_req), .req_stop(pe_req_stop),
    .resp_valid(pe_resp_valid), .resp_data(pe_resp_data), .resp_stop(pe_resp_stop),
    .t_req_valid, .t_req, .t_req_stop, .t_resp_valid, .t_resp_data, .t_resp_stop,
    .s_mreq_valid, .s_mreq, .s_mreq_stop, .s_mresp_valid, .s_mresp_data, .s_mresp_stop,
    .mreq_valid(pe_mreq_valid), .mreq(pe_mreq), .mreq_stop(pe_mreq_stop),
    .mresp_valid(pe_mresp_valid), .mresp_data(pe_mresp_data), .mresp_stop(pe_mresp_stop)
  );

  reconfig_unit #(.NUM_SLOTS(NUM_SLOTS)) u_rcfg (
    .clk, .rst_n,
    .req_valid(t_req_valid[0]), .req(t_req), .req_stop(t_req_stop[0]),
    .resp_valid(t_resp_valid[0]), .resp_data(t_resp_data[0]), .resp_stop(t_resp_stop[0]),
    .icap_in, .icap_busy, .slot_rst_n, .decouple
  );

  // one RTR slot: controller plus the RTRM entity signals
  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_slot
    logic        c2m_res_n;
    logic [31:0] crq_c2m_addr, crq_c2m_data, crq_m2c_data;
    logic        crq_c2m_rq_valid, crq_c2m_wr_rd, crq_c2m_stop, crq_m2c_rp_valid, crq_m2c_stop;
    logic [31:0] mrq_m2c_addr, mrq_m2c_data, mrq_c2m_data;
    logic        mrq_m2c_rq_valid, mrq_m2c_wr_rd, mrq_m2c_stop, mrq_c2m_rp_valid, mrq_c2m_stop;
    logic        m2c_intr;

    rtrm_controller #(
      .SLOT_BASE(BAR_BASE + (HT_ADDR_W'(s + 1) << SLOT_SHIFT)),
      .MRQ_BASE ('0)
    ) u_ctrl (
      .clk, .rst_n, .decouple(decouple[s]), .slot_rst_n(slot_rst_n[s]),
      .req_valid(t_req_valid[s+1]), .req(t_req), .req_stop(t_req_stop[s+1]),
      .resp_valid(t_resp_valid[s+1]), .resp_data(t_resp_data[s+1]), .resp_stop(t_resp_stop[s+1]),
      .mreq_valid(s_mreq_valid[s]), .mreq(s_mreq[s]), .mreq_stop(s_mreq_stop[s]),
      .mresp_valid(s_mresp_valid[s]), .mresp_data(s_mresp_data[s]), .mresp_stop(s_mresp_stop[s]),
      .intr(intr[s]),
      .c2m_res_n, .crq_c2m_addr, .crq_c2m_data, .crq_c2m_rq_valid, .crq_c2m_wr_rd, .crq_c2m_stop,
      .crq_m2c_data, .crq_m2c_rp_valid, .crq_m2c_stop,
      .mrq_m2c_addr, .mrq_m2c_data, .mrq_m2c_rq_valid, .mrq_m2c_wr_rd, .mrq_m2c_stop,
      .mrq_c2m_data, .mrq_c2m_rp_valid, .mrq_c2m_stop, .m2c_intr
    );
  end

  pattern_matcher #(.NUM_PATTERNS(NUM_PATTERNS), .DB_WORDS(DB_WORDS)) u_rtrm0 (
    .c2m_clk(clk), .c2m_res_n(g_slot[0].c2m_res_n),
    .crq_c2m_addr(g_slot[0].crq_c2m_addr), .crq_c2m_data(g_slot[0].crq_c2m_data),
    .crq_c2m_rq_valid(g_slot[0].crq_c2m_rq_valid), .crq_c2m_wr_rd(g_slot[0].crq_c2m_wr_rd),
    .crq_c2m_stop(g_slot[0].crq_c2m_stop), .crq_m2c_data(g_slot[0].crq_m2c_data),
    .crq_m2c_rp_valid(g_slot[0].crq_m2c_rp_valid), .crq_m2c_stop(g_slot[0].crq_m2c_stop),
    .mrq_m2c_addr(g_slot[0].mrq_m2c_addr), .mrq_m2c_data(g_slot[0].mrq_m2c_data),
    .mrq_m2c_rq_valid(g_slot[0].mrq_m2c_rq_valid), .mrq_m2c_wr_rd(g_slot[0].mrq_m2c_wr_rd),
    .mrq_m2c_stop(g_slot[0].mrq_m2c_stop), .mrq_c2m_data(g_slot[0].mrq_c2m_data),
    .mrq_c2m_rp_valid(g_slot[0].mrq_c2m_rp_valid), .mrq_c2m_stop(g_slot[0].mrq_c2m_stop),
    .m2c_intr(g_slot[0].m2c_intr)
  );

  mt32 u_rtrm1 (
    .c2m_clk(clk), .c2m_res_n(g_slot[1].c2m_res_n),
    .crq_c2m_addr(g_slot[1].crq_c2m_addr), .crq_c2m_data(g_slot[1].crq_c2m_data),
    .crq_c2m_rq_valid(g_slot[1].crq_c2m_rq_valid), .crq_c2m_wr_rd(g_slot[1].crq_c2m_wr_rd),
    .crq_c2m_stop(g_slot[1].crq_c2m_stop), .crq_m2c_data(g_slot[1].crq_m2c_data),
    .crq_m2c_rp_valid(g_slot[1].crq_m2c_rp_valid), .crq_m2c_stop(g_slot[1].crq_m2c_stop),
    .mrq_m2c_addr(g_slot[1].mrq_m2c_addr), .mrq_m2c_data(g_slot[1].mrq_m2c_data),
    .mrq_m2c_rq_valid(g_slot[1].mrq_m2c_rq_valid), .mrq_m2c_wr_rd(g_slot[1].mrq_m2c_wr_rd),
    .mrq_m2c_stop(g_slot[1].mrq_m2c_stop), .mrq_c2m_data(g_slot[1].mrq_c2m_data),
    .mrq_c2m_rp_valid(g_slot[1].mrq_c2m_rp_valid), .mrq_c2m_stop(g_slot[1].mrq_c2m_stop),
    .m2c_intr(g_slot[1].m2c_intr)
  );

endmodule
