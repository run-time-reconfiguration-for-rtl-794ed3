// pattern_matcher: run-time reconfigurable module (RTRM) that searches a
// byte stream for many 32-bit patterns at once.
//
// How it works. The host fills the database memory (the byte stream, four
// bytes per 32-bit word, lowest byte first) and the pattern memory, then
// writes the control register with the start bit and the database length.
// The FSM then
//   1. LOAD : reads every pattern from the pattern memory into its pattern
//             matcher unit (one per cycle, NUM_PATTERNS cycles),
//   2. SCAN : streams the database, one 32-bit word per cycle, through a
//             56-bit window made of the current word and the low three bytes
//             of the next one; every unit compares the window at byte shifts
//             0, 1, 2 and 3 against its pattern, i.e. 4 x NUM_PATTERNS 32-bit
//             comparisons per clock, and counts the hits,
//   3. WRITE: writes each unit's hit count to the results memory (entry p
//             holds the number of byte positions where pattern p occurs),
// and finally sets the 'finished' bit in the status register and pulses
// m2c_intr for one cycle. From the clock edge that takes the start write
// to the edge that raises m2c_intr, a run of L words takes
// 2 * NUM_PATTERNS + L + 4 cycles; the scan itself takes L + 3. Matches are found at every byte offset that leaves
// four bytes inside the database.
//
// Address map (virtual RTRM byte addresses; only bits [26:0] are decoded,
// bits [26:24] select the region, bits [23:2] the 32-bit word):
//   0x000_0000 control  W/R  bit 0 start (self-clearing), bits [31:16] database
//                            length in 32-bit words
//   0x000_0004 status   R    bit 0 finished, bit 1 busy
//   0x100_0000 database      DB_WORDS words
//   0x200_0000 patterns      NUM_PATTERNS words
//   0x300_0000 results       NUM_PATTERNS words
// Word indices wrap within each memory.
//
// Interface: the RTRM entity (crq = controller requests, mrq = module
// requests) with valid/stop handshakes: a request moves when crq_c2m_rq_valid
// is high and crq_m2c_stop is low; a read answers on the next cycle with
// crq_m2c_rp_valid, held until crq_c2m_stop is low. This module issues no
// module requests; its mrq outputs stay idle.
//
// Following the description: the FSM, four comparators per pattern, one
// control and one status register, dual-port block RAMs for database,
// patterns and results, the 56-bit window advanced by 32 bits per cycle,
// the lower-27-bit address map, 290 units. Own choices: the region
// encoding, the register bit layout, hit counts as the result format, the
// database depth and the interrupt on completion.
module pattern_matcher #(
  parameter int unsigned NUM_PATTERNS = 290,
  parameter int unsigned DB_WORDS     = 8192,
  parameter int unsigned CNT_W        = 32,
  localparam int unsigned DB_AW = $clog2(DB_WORDS),
  localparam int unsigned P_AW  = $clog2(NUM_PATTERNS)
) (
  input  logic        c2m_clk,
  input  logic        c2m_res_n,
  // controller requests
  input  logic [31:0] crq_c2m_addr,
  input  logic [31:0] crq_c2m_data,
  input  logic        crq_c2m_rq_valid,
  input  logic        crq_c2m_wr_rd,     // 1 = write
  input  logic        crq_c2m_stop,
  output logic [31:0] crq_m2c_data,
  output logic        crq_m2c_rp_valid,
  output logic        crq_m2c_stop,
  // module requests
  output logic [31:0] mrq_m2c_addr,
  output logic [31:0] mrq_m2c_data,
  output logic        mrq_m2c_rq_valid,
  output logic        mrq_m2c_wr_rd,
  output logic        mrq_m2c_stop,
  input  logic [31:0] mrq_c2m_data,
  input  logic        mrq_c2m_rp_valid,
  input  logic        mrq_c2m_stop,
  output logic        m2c_intr
);

  wire clk = c2m_clk;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_WRITE} state_t;
  typedef enum logic [1:0] {R_REG = 2'd0, R_DB = 2'd1, R_PAT = 2'd2, R_RES = 2'd3} region_t;

  state_t      state;
  logic [16:0] cyc;          // step counter inside a state
  logic [15:0] db_len;       // database length in words
  logic        finished;
  logic        start_req;

  // ---------------------------------------------------------------- host side
  logic    acc, acc_wr, rd_pending;
  region_t acc_region, rd_region;
  logic [31:0] reg_rdata, rd_reg_q;

  assign acc        = crq_c2m_rq_valid && !crq_m2c_stop;
  assign acc_wr     = acc && crq_c2m_wr_rd;
  assign acc_region = (crq_c2m_addr[26:24] <= 3'd3) ? region_t'(crq_c2m_addr[25:24]) : R_REG;
  assign crq_m2c_stop = rd_pending && crq_c2m_stop;

  always_comb begin
    unique case (crq_c2m_addr[3:2])
      2'd0:    reg_rdata = {db_len, 16'h0};
      2'd1:    reg_rdata = {30'h0, state != S_IDLE, finished};
      default: reg_rdata = 32'h0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!c2m_res_n) begin
      rd_pending <= 1'b0;
      rd_region  <= R_REG;
      rd_reg_q   <= '0;
    end else begin
      if (crq_m2c_rp_valid && !crq_c2m_stop) rd_pending <= 1'b0;
      if (acc && !crq_c2m_wr_rd) begin
        rd_pending <= 1'b1;
        rd_region  <= acc_region;
        rd_reg_q   <= reg_rdata;
      end
    end
  end

  // ---------------------------------------------------------------- memories
  logic [31:0] db_a_q, db_b_q, pat_a_q, pat_b_q, res_a_q, res_b_q;
  logic        db_b_en, pat_b_en, res_b_we;
  logic [DB_AW-1:0] db_b_addr;
  logic [P_AW-1:0]  pat_b_addr, res_b_addr;
  logic [31:0]      res_b_wdata;

  dp_ram #(.WIDTH(32), .DEPTH(DB_WORDS)) u_db (
    .clk,
    .a_en(acc && acc_region == R_DB), .a_we(acc_wr), .a_addr(crq_c2m_addr[2 +: DB_AW]),
    .a_wdata(crq_c2m_data), .a_rdata(db_a_q),
    .b_en(db_b_en), .b_we(1'b0), .b_addr(db_b_addr), .b_wdata(32'h0), .b_rdata(db_b_q)
  );

  dp_ram #(.WIDTH(32), .DEPTH(NUM_PATTERNS)) u_pat (
    .clk,
    .a_en(acc && acc_region == R_PAT), .a_we(acc_wr), .a_addr(crq_c2m_addr[2 +: P_AW]),
    .a_wdata(crq_c2m_data), .a_rdata(pat_a_q),
    .b_en(pat_b_en), .b_we(1'b0), .b_addr(pat_b_addr), .b_wdata(32'h0), .b_rdata(pat_b_q)
  );

  dp_ram #(.WIDTH(32), .DEPTH(NUM_PATTERNS)) u_res (
    .clk,
    .a_en(acc && acc_region == R_RES), .a_we(acc_wr), .a_addr(crq_c2m_addr[2 +: P_AW]),
    .a_wdata(crq_c2m_data), .a_rdata(res_a_q),
    .b_en(res_b_we), .b_we(res_b_we), .b_addr(res_b_addr), .b_wdata(res_b_wdata), .b_rdata(res_b_q)
  );

  assign crq_m2c_rp_valid = rd_pending;
  always_comb begin
    unique case (rd_region)
      R_DB:    crq_m2c_data = db_a_q;
      R_PAT:   crq_m2c_data = pat_a_q;
      R_RES:   crq_m2c_data = res_a_q;
      default: crq_m2c_data = rd_reg_q;
    endcase
  end

  // ---------------------------------------------------------------- window
  logic [31:0] cur_word;
  logic [55:0] window;
  logic [3:0]  win_mask;
  logic        win_valid;

  // ---------------------------------------------------------------- units
  logic [CNT_W-1:0] counts [NUM_PATTERNS];
  logic             clear_cnt;

  for (genvar p = 0; p < NUM_PATTERNS; p++) begin : g_unit
    pm_unit #(.CNT_W(CNT_W)) u_unit (
      .clk,
      .load      (state == S_LOAD && cyc != 17'd0 && cyc - 17'd1 == 17'(p)),
      .pattern_in(pat_b_q),
      .clear     (clear_cnt),
      .win_valid (win_valid),
      .window    (window),
      .win_mask  (win_mask),
      .count     (counts[p])
    );
  end

  // ---------------------------------------------------------------- FSM
  assign start_req  = acc_wr && acc_region == R_REG && crq_c2m_addr[3:2] == 2'd0 && crq_c2m_data[0];
  assign clear_cnt  = state == S_IDLE && start_req;
  assign pat_b_en   = state == S_LOAD && cyc < 17'(NUM_PATTERNS);
  assign pat_b_addr = P_AW'(cyc);
  assign db_b_en    = state == S_SCAN && cyc < 17'(db_len);
  assign db_b_addr  = DB_AW'(cyc);
  assign res_b_we   = state == S_WRITE;
  assign res_b_addr = P_AW'(cyc);
  assign res_b_wdata = 32'(counts[P_AW'(cyc)]);

  always_ff @(posedge clk) begin
    if (!c2m_res_n) begin
      state     <= S_IDLE;
      cyc       <= '0;
      db_len    <= '0;
      finished  <= 1'b0;
      m2c_intr  <= 1'b0;
      cur_word  <= '0;
      window    <= '0;
      win_mask  <= '0;
      win_valid <= 1'b0;
    end else begin
      m2c_intr  <= 1'b0;
      win_valid <= 1'b0;
      if (acc_wr && acc_region == R_REG && crq_c2m_addr[3:2] == 2'd0 && state == S_IDLE)
        db_len <= crq_c2m_data[31:16];
      unique case (state)
        S_IDLE: if (start_req) begin
          state    <= S_LOAD;
          cyc      <= '0;
          finished <= 1'b0;
        end
        S_LOAD: begin
          cyc <= cyc + 17'd1;
          if (cyc == 17'(NUM_PATTERNS)) begin
            state <= S_SCAN;
            cyc   <= '0;
          end
        end
        S_SCAN: begin
          cyc <= cyc + 17'd1;
          // word cyc-1 of the database is on db_b_q
          if (cyc >= 17'd1 && cyc <= 17'(db_len)) begin
            cur_word <= db_b_q;
            if (cyc >= 17'd2) begin
              window    <= {db_b_q[23:0], cur_word};
              win_mask  <= 4'b1111;
              win_valid <= 1'b1;
            end
          end else if (cyc == 17'(db_len) + 17'd1 && db_len != 16'd0) begin
            // last word: only the unshifted compare stays inside the database
            window    <= {24'h0, cur_word};
            win_mask  <= 4'b0001;
            win_valid <= 1'b1;
          end else if (cyc == 17'(db_len) + 17'd2) begin
            state <= S_WRITE;
            cyc   <= '0;
          end
        end
        S_WRITE: begin
          cyc <= cyc + 17'd1;
          if (cyc == 17'(NUM_PATTERNS - 1)) begin
            state    <= S_IDLE;
            cyc      <= '0;
            finished <= 1'b1;
            m2c_intr <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // no module requests
  assign mrq_m2c_addr     = '0;
  assign mrq_m2c_data     = '0;
  assign mrq_m2c_rq_valid = 1'b0;
  assign mrq_m2c_wr_rd    = 1'b0;
  assign mrq_m2c_stop     = 1'b0;

  // a response is only presented for an accepted read
  property p_resp_held;
    @(posedge clk) disable iff (!c2m_res_n)
      crq_m2c_rp_valid && crq_c2m_stop |=> crq_m2c_rp_valid && $stable(crq_m2c_data);
  endproperty
  a_resp_held: assert property (p_resp_held);

endmodule
