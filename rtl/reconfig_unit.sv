// reconfig_unit: loads partial bitstreams into the FPGA through the
// internal configuration access port (ICAP), under control of the host.
//
// The host driver, having checked the bitstream header against the version
// register, (1) writes CTRL with the reconfig bit and the number of the RTR
// slot to be rewritten, which holds that slot's RTRM in reset and makes its
// controller decouple it from the static part; (2) writes the bitstream,
// one 32-bit word per write, to DATA; (3) polls STATUS until the word FIFO
// has drained into the ICAP; (4) clears the reconfig bit, which releases
// the new RTRM from reset. The cave and the host link keep working
// throughout.
//
// Bitstream words pass through a FIFO_DEPTH-word FIFO; while it is full,
// writes are held off with req_stop. The ICAP side writes one word per
// clock (32 bits wide, as the Virtex-4 ICAP runs at up to 100 MHz) whenever
// the FIFO holds a word and the ICAP does not signal BUSY. Words are passed
// to the port as written; any bit ordering the port needs is the host's.
//
// Registers (byte offsets within the unit's window, reads answered on the
// next cycle):
//   0x00 CTRL    R/W bit 0 reconfig, bits [7:4] slot number
//   0x04 STATUS  R   bit 0 FIFO empty and ICAP idle, bit 1 FIFO full
//   0x08 DATA    W   next bitstream word
//   0x0C VERSION R   {CAVE_VERSION, BOARD_VERSION}
//   0x10 COUNT   R/W words written into the ICAP (a write clears it)
//
// From the description: a reconfig unit that drives the ICAP at 32 bits
// under control of the host driver, with the cave version and board
// version the driver checks a bitstream against. Own choices: the register
// map, the FIFO, the slot reset and decouple outputs.
module reconfig_unit
  import rtr_pkg::*;
#(
  parameter int unsigned NUM_SLOTS     = 2,
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter logic [15:0] CAVE_VERSION  = 16'h0001,
  parameter logic [15:0] BOARD_VERSION = 16'h0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  ireq_t       req,
  output logic        req_stop,
  output logic        resp_valid,
  output logic [31:0] resp_data,
  input  logic        resp_stop,
  // ICAP
  output icap_in_t    icap_in,
  input  logic        icap_busy,
  // per slot
  output logic        slot_rst_n [NUM_SLOTS],
  output logic        decouple   [NUM_SLOTS]
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic        reconfig;
  logic [3:0]  slot;
  logic [31:0] count;
  logic [31:0] fifo [FIFO_DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        fifo_empty, fifo_full, push, pop, acc;
  logic [7:0]  reg_off;
  logic [31:0] rdata;

  assign reg_off    = req.addr[7:0];
  assign fifo_empty = wr_ptr == rd_ptr;
  assign fifo_full  = wr_ptr == {~rd_ptr[AW], rd_ptr[AW-1:0]};

  assign req_stop = (resp_valid && resp_stop) || (reg_off == RCFG_DATA && req.wr && fifo_full);
  assign acc      = req_valid && !req_stop;
  assign push     = acc && req.wr && reg_off == RCFG_DATA;
  assign pop      = !fifo_empty && !icap_busy;

  always_comb begin
    unique case (reg_off)
      RCFG_CTRL:    rdata = {24'h0, slot, 3'b000, reconfig};
      RCFG_STATUS:  rdata = {30'h0, fifo_full, fifo_empty && !icap_busy};
      RCFG_VERSION: rdata = {CAVE_VERSION, BOARD_VERSION};
      RCFG_COUNT:   rdata = count;
      default:      rdata = 32'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reconfig   <= 1'b0;
      slot       <= '0;
      count      <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      icap_in    <= '{ce_n: 1'b1, write_n: 1'b1, din: 32'h0};
    end else begin
      if (resp_valid && !resp_stop) resp_valid <= 1'b0;
      if (acc && !req.wr) begin
        resp_valid <= 1'b1;
        resp_data  <= rdata;
      end
      if (acc && req.wr && reg_off == RCFG_CTRL) begin
        reconfig <= req.data[0];
        slot     <= req.data[7:4];
      end
      if (push) begin
        fifo[wr_ptr[AW-1:0]] <= req.data;
        wr_ptr <= wr_ptr + 1'b1;
      end
      // ICAP write strobe: one word per clock while not busy
      icap_in.ce_n    <= !pop;
      icap_in.write_n <= !pop;
      if (pop) begin
        icap_in.din <= fifo[rd_ptr[AW-1:0]];
        rd_ptr      <= rd_ptr + 1'b1;
      end
      if (acc && req.wr && reg_off == RCFG_COUNT) count <= '0;
      else if (pop)                                count <= count + 32'd1;
    end
  end

  always_comb
    for (int s = 0; s < int'(NUM_SLOTS); s++) begin
      decouple[s]   = reconfig && slot == 4'(s);
      slot_rst_n[s] = !(reconfig && slot == 4'(s));
    end

endmodule
