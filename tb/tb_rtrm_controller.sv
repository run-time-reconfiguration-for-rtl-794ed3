// tb_rtrm_controller: self-checking test of the RTRM controller.
//
// Behind the controller sits a small RTRM stand-in: 16 registers, reads
// answered one cycle later, and a random stop on its request input. The
// test checks the physical-to-virtual address conversion (every register
// written through the slot window and read back, and the virtual address
// seen by the stand-in), module requests (virtual to physical address,
// data, response routing), and the decoupled state: no request reaches the
// module, writes are dropped, reads come back as all ones, the interrupt is
// masked and the module is held in reset.
module tb_rtrm_controller;
  import rtr_pkg::*;
  localparam logic [39:0] SLOT_BASE = 40'h00_8800_0000;
  localparam logic [39:0] MRQ_BASE  = 40'h01_0000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic decouple = 1'b0, slot_rst_n = 1'b1;
  logic req_valid = 1'b0, req_stop, resp_valid, resp_stop = 1'b0;
  ireq_t req = '0;
  logic [31:0] resp_data;
  logic mreq_valid, mreq_stop = 1'b0, mresp_valid = 1'b0, mresp_stop, intr;
  ireq_t mreq;
  logic [31:0] mresp_data = '0;
  // RTRM side
  logic        c2m_res_n;
  logic [31:0] crq_c2m_addr, crq_c2m_data, crq_m2c_data;
  logic        crq_c2m_rq_valid, crq_c2m_wr_rd, crq_c2m_stop, crq_m2c_rp_valid, crq_m2c_stop;
  logic [31:0] mrq_m2c_addr = '0, mrq_m2c_data = '0, mrq_c2m_data;
  logic        mrq_m2c_rq_valid = 1'b0, mrq_m2c_wr_rd = 1'b0, mrq_m2c_stop = 1'b0;
  logic        mrq_c2m_rp_valid, mrq_c2m_stop, m2c_intr = 1'b0;

  rtrm_controller #(.SLOT_BASE(SLOT_BASE), .MRQ_BASE(MRQ_BASE)) dut (.*);

  // --------------------------------------------- RTRM stand-in
  logic [31:0] regs [16];
  logic        pend;
  logic [31:0] last_vaddr;
  logic        rnd_stop;
  assign crq_m2c_stop = rnd_stop;
  assign crq_m2c_rp_valid = pend;
  always_ff @(posedge clk) begin
    rnd_stop <= ($urandom_range(0, 3) == 0);
    if (!c2m_res_n) begin
      pend <= 1'b0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (pend && !crq_c2m_stop) pend <= 1'b0;
      if (crq_c2m_rq_valid && !crq_m2c_stop) begin
        last_vaddr <= crq_c2m_addr;
        if (crq_c2m_wr_rd) regs[crq_c2m_addr[5:2]] <= crq_c2m_data;
        else begin
          pend <= 1'b1;
          crq_m2c_data <= regs[crq_c2m_addr[5:2]];
        end
      end
    end
  end

  // --------------------------------------------- host side tasks
  task automatic wr(input logic [39:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{wr: 1'b1, addr: a, data: d}; req_valid = 1'b1;
    #1;
    while (req_stop) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  task automatic rd(input logic [39:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{wr: 1'b0, addr: a, data: 32'h0}; req_valid = 1'b1;
    #1;
    while (req_stop) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    d = resp_data;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, vals [16];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      vals[i] = $urandom;
      wr(SLOT_BASE + 40'(4*i) + 40'h40_0000, vals[i]);
      check(last_vaddr == 32'h40_0000 + 32'(4*i), $sformatf("virtual address %h", last_vaddr));
    end
    for (int i = 0; i < 16; i++) begin
      rd(SLOT_BASE + 40'(4*i), d);
      check(d == vals[i], $sformatf("register %0d read back %h expected %h", i, d, vals[i]));
    end
    // module request: virtual -> physical, response routed back
    @(negedge clk);
    mrq_m2c_addr = 32'h0000_1230; mrq_m2c_data = 32'h0; mrq_m2c_wr_rd = 1'b0; mrq_m2c_rq_valid = 1'b1;
    #1;
    check(mreq_valid && !mreq.wr && mreq.addr == MRQ_BASE + 40'h1230, "module read request address");
    mreq_stop = 1'b1;
    #1;
    check(mrq_c2m_stop, "module request stop passes down");
    @(negedge clk);
    mreq_stop = 1'b0;
    @(negedge clk);
    mrq_m2c_rq_valid = 1'b0;
    mresp_valid = 1'b1; mresp_data = 32'hcafe_f00d; mrq_m2c_stop = 1'b1;
    #1;
    check(mrq_c2m_rp_valid && mrq_c2m_data == 32'hcafe_f00d && mresp_stop, "module response with stop");
    mrq_m2c_stop = 1'b0;
    @(negedge clk);
    mresp_valid = 1'b0;
    m2c_intr = 1'b1;
    #1;
    check(intr, "interrupt passes");
    // decoupled: module is cut off
    decouple = 1'b1; slot_rst_n = 1'b0;
    #1;
    check(!intr, "interrupt masked while decoupled");
    check(!c2m_res_n, "module held in reset");
    mrq_m2c_rq_valid = 1'b1;
    #1;
    check(!mreq_valid && mrq_c2m_stop, "no module requests while decoupled");
    mrq_m2c_rq_valid = 1'b0;
    wr(SLOT_BASE + 40'h4, 32'h1234_5678);
    rd(SLOT_BASE + 40'h4, d);
    check(d == 32'hffff_ffff, "all ones while decoupled");
    rd(SLOT_BASE + 40'h8, d);
    check(d == 32'hffff_ffff, "all ones while decoupled, second read");
    decouple = 1'b0; slot_rst_n = 1'b1;
    m2c_intr = 1'b0;
    wr(SLOT_BASE + 40'h4, 32'h0bad_f00d);
    rd(SLOT_BASE + 40'h4, d);
    check(d == 32'h0bad_f00d, "access after release");
    rd(SLOT_BASE + 40'h8, d);
    check(d == 32'h0, "module state was reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
