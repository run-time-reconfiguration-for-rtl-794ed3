// mt32: run-time reconfigurable module (RTRM) that produces pseudo random
// numbers with the Mersenne twister MT19937, one 32-bit number per clock.
//
// How it works. The 624-word generator state sits in a circular buffer with
// a write pointer i. One twist step reads mt[i], mt[i+1] and mt[i+397]
// (indices modulo 624), writes the new mt[i] and advances i, so a full
// twist is spread over 624 steps and a number can leave every cycle. Because
// the update is in place, words already renewed in the current round are
// read where the reference algorithm reads them renewed, and the output
// sequence equals the reference MT19937 sequence. The tempering transform
// is applied to each new word on its way out.
//
// After reset, and after every host write, the state is initialised from a
// seed with the reference recurrence
//   mt[0] = seed, mt[k] = 1812433253 * (mt[k-1] ^ (mt[k-1] >> 30)) + k,
// one word per cycle (623 cycles); the reset seed is the reference default
// 5489. Meanwhile crq_m2c_stop holds off requests.
//
// Interface: the RTRM entity. A read at any address returns the next number
// of the sequence on the following cycle (crq_m2c_rp_valid, held until
// crq_c2m_stop is low); back-to-back reads get one new number per clock. A
// write at any address restarts the generator with the written data as the
// seed. The module issues no module requests and no interrupts.
//
// Following the description: MT19937, a new 32-bit number each clock, and a
// new number for every read at an arbitrary address. Own choices: the
// circular-buffer state memory, the reseed-on-write register and the
// on-chip seeding.
module mt32 #(
  parameter logic [31:0] SEED = 32'd5489
) (
  input  logic        c2m_clk,
  input  logic        c2m_res_n,
  input  logic [31:0] crq_c2m_addr,
  input  logic [31:0] crq_c2m_data,
  input  logic        crq_c2m_rq_valid,
  input  logic        crq_c2m_wr_rd,
  input  logic        crq_c2m_stop,
  output logic [31:0] crq_m2c_data,
  output logic        crq_m2c_rp_valid,
  output logic        crq_m2c_stop,
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

  localparam int unsigned N = 624;
  localparam int unsigned M = 397;
  localparam logic [31:0] MATRIX_A = 32'h9908_b0df;

  wire clk = c2m_clk;

  logic [31:0] mt [N];
  logic [9:0]  idx, idx1, idxm;
  logic        init_busy;
  logic [9:0]  init_k;
  logic [31:0] init_prev;
  logic [31:0] y, next_word, tempered;
  logic        acc, step;

  function automatic logic [31:0] temper(input logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v >> 11);
    t = t ^ ((t << 7) & 32'h9d2c_5680);
    t = t ^ ((t << 15) & 32'hefc6_0000);
    t = t ^ (t >> 18);
    return t;
  endfunction

  assign idx1 = (idx == 10'(N - 1)) ? 10'd0 : idx + 10'd1;
  assign idxm = (idx >= 10'(N - M)) ? idx - 10'(N - M) : idx + 10'(M);

  always_comb begin
    y         = {mt[idx][31], mt[idx1][30:0]};
    next_word = mt[idxm] ^ (y >> 1) ^ (y[0] ? MATRIX_A : 32'h0);
    tempered  = temper(next_word);
  end

  assign crq_m2c_stop = init_busy || (crq_m2c_rp_valid && crq_c2m_stop);
  assign acc  = crq_c2m_rq_valid && !crq_m2c_stop;
  assign step = acc && !crq_c2m_wr_rd;

  always_ff @(posedge clk) begin
    if (!c2m_res_n) begin
      init_busy        <= 1'b1;
      init_k           <= 10'd1;
      init_prev        <= SEED;
      mt[0]            <= SEED;
      idx              <= '0;
      crq_m2c_rp_valid <= 1'b0;
      crq_m2c_data     <= '0;
    end else if (init_busy) begin
      init_prev  <= 32'd1812433253 * (init_prev ^ (init_prev >> 30)) + 32'(init_k);
      mt[init_k] <= 32'd1812433253 * (init_prev ^ (init_prev >> 30)) + 32'(init_k);
      init_k     <= init_k + 10'd1;
      if (init_k == 10'(N - 1)) init_busy <= 1'b0;
    end else begin
      if (crq_m2c_rp_valid && !crq_c2m_stop) crq_m2c_rp_valid <= 1'b0;
      if (acc && crq_c2m_wr_rd) begin
        init_busy <= 1'b1;
        init_k    <= 10'd1;
        init_prev <= crq_c2m_data;
        mt[0]     <= crq_c2m_data;
        idx       <= '0;
      end else if (step) begin
        mt[idx]          <= next_word;
        idx              <= idx1;
        crq_m2c_data     <= tempered;
        crq_m2c_rp_valid <= 1'b1;
      end
    end
  end

  assign mrq_m2c_addr     = '0;
  assign mrq_m2c_data     = '0;
  assign mrq_m2c_rq_valid = 1'b0;
  assign mrq_m2c_wr_rd    = 1'b0;
  assign mrq_m2c_stop     = 1'b0;
  assign m2c_intr         = 1'b0;

  a_resp_held: assert property (@(posedge clk) disable iff (!c2m_res_n)
    crq_m2c_rp_valid && crq_c2m_stop |=> crq_m2c_rp_valid && $stable(crq_m2c_data));

endmodule
