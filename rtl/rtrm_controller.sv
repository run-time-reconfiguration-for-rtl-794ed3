// rtrm_controller: joins one run-time reconfigurable region (RTR slot) to
// the static cave.
//
// Controller requests (crq): a request from the internal routing unit
// carries a physical HT address inside this slot's window; the controller
// subtracts SLOT_BASE, which turns it into the RTRM's own 32-bit virtual
// address, and presents it on the RTRM entity. The RTRM's read responses go
// back unchanged. Module requests (mrq): a request the RTRM issues with a
// virtual address is turned into a physical address by adding MRQ_BASE and
// passed up to the routing unit; the host's read responses come back the
// same way.
//
// While the reconfig unit rewrites the slot (decouple high), the RTRM's
// outputs are meaningless. The controller then shields the static side:
// it ignores the RTRM's valid, stop and interrupt outputs, drops writes to
// the slot and answers reads itself with all ones, so that the host never
// waits on a region that is being reconfigured. The reset of the RTRM
// (c2m_res_n) is asserted by the reconfig unit over the same time.
//
// All handshakes are valid/stop: a word moves in a cycle where valid is
// high and the receiver's stop is low. The controller adds no register
// stage: crq and mrq signals pass combinationally, with the address offset
// applied on the way.
//
// From the description: address conversion from physical to virtual RTRM
// addresses, the crq/mrq stop-and-valid interface and use for module
// requests. Own choices: the fixed base addresses, the decoupling and the
// all-ones answer during reconfiguration.
module rtrm_controller
  import rtr_pkg::*;
#(
  parameter logic [HT_ADDR_W-1:0] SLOT_BASE = 40'h00_8800_0000,
  parameter logic [HT_ADDR_W-1:0] MRQ_BASE  = 40'h00_0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        decouple,     // slot under reconfiguration
  input  logic        slot_rst_n,   // RTRM reset from the reconfig unit
  // requests from the routing unit
  input  logic        req_valid,
  input  ireq_t       req,
  output logic        req_stop,
  output logic        resp_valid,
  output logic [31:0] resp_data,
  input  logic        resp_stop,
  // module requests to the routing unit
  output logic        mreq_valid,
  output ireq_t       mreq,
  input  logic        mreq_stop,
  input  logic        mresp_valid,
  input  logic [31:0] mresp_data,
  output logic        mresp_stop,
  output logic        intr,
  // RTRM entity, seen from the controller
  output logic        c2m_res_n,
  output logic [31:0] crq_c2m_addr,
  output logic [31:0] crq_c2m_data,
  output logic        crq_c2m_rq_valid,
  output logic        crq_c2m_wr_rd,
  output logic        crq_c2m_stop,
  input  logic [31:0] crq_m2c_data,
  input  logic        crq_m2c_rp_valid,
  input  logic        crq_m2c_stop,
  input  logic [31:0] mrq_m2c_addr,
  input  logic [31:0] mrq_m2c_data,
  input  logic        mrq_m2c_rq_valid,
  input  logic        mrq_m2c_wr_rd,
  input  logic        mrq_m2c_stop,
  output logic [31:0] mrq_c2m_data,
  output logic        mrq_c2m_rp_valid,
  output logic        mrq_c2m_stop,
  input  logic        m2c_intr
);

  logic [HT_ADDR_W-1:0] vaddr;
  logic                 dummy_valid;   // all-ones answer owed while decoupled

  assign vaddr     = req.addr - SLOT_BASE;
  assign c2m_res_n = rst_n && slot_rst_n;

  // controller requests
  assign crq_c2m_addr     = vaddr[31:0];
  assign crq_c2m_data     = req.data;
  assign crq_c2m_wr_rd    = req.wr;
  assign crq_c2m_rq_valid = req_valid && !decouple;
  assign crq_c2m_stop     = resp_stop;

  // while decoupled one read at a time is answered locally
  assign req_stop   = decouple ? (dummy_valid && resp_stop) : crq_m2c_stop;
  assign resp_valid = decouple ? dummy_valid : crq_m2c_rp_valid;
  assign resp_data  = decouple ? 32'hffff_ffff : crq_m2c_data;

  always_ff @(posedge clk) begin
    if (!rst_n || !decouple) dummy_valid <= 1'b0;
    else begin
      if (dummy_valid && !resp_stop) dummy_valid <= 1'b0;
      if (req_valid && !req_stop && !req.wr) dummy_valid <= 1'b1;
    end
  end

  // module requests
  assign mreq_valid   = mrq_m2c_rq_valid && !decouple;
  assign mreq.wr      = mrq_m2c_wr_rd;
  assign mreq.addr    = MRQ_BASE + HT_ADDR_W'(mrq_m2c_addr);
  assign mreq.data    = mrq_m2c_data;
  assign mrq_c2m_stop = mreq_stop || decouple;
  assign mrq_c2m_rp_valid = mresp_valid && !decouple;
  assign mrq_c2m_data = mresp_data;
  assign mresp_stop   = mrq_m2c_stop && !decouple;

  assign intr = m2c_intr && !decouple;

endmodule
