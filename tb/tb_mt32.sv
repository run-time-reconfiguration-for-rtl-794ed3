// tb_mt32: self-checking test of the Mersenne twister RTRM.
//
// A reference MT19937 written here as plain software (seeding, twisting the
// whole state every 624 numbers, tempering) predicts the sequence. The test
// checks the first number for the default seed (3499211612, the published
// value), then about 1500 numbers read back to back (one per clock, so the
// throughput is checked as one response per cycle), reads with the response
// held off by crq_c2m_stop, and a reseed by a host write.
module tb_mt32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] addr = '0, wdata = '0, rdata;
  logic valid = 1'b0, wr = 1'b0, c2m_stop = 1'b0;
  logic rp_valid, m2c_stop, intr;
  logic [31:0] mrq_addr, mrq_data;
  logic mrq_valid, mrq_wr, mrq_stop;
  int checks = 0, failures = 0;

  mt32 dut (
    .c2m_clk(clk), .c2m_res_n(rst_n),
    .crq_c2m_addr(addr), .crq_c2m_data(wdata), .crq_c2m_rq_valid(valid), .crq_c2m_wr_rd(wr),
    .crq_c2m_stop(c2m_stop), .crq_m2c_data(rdata), .crq_m2c_rp_valid(rp_valid), .crq_m2c_stop(m2c_stop),
    .mrq_m2c_addr(mrq_addr), .mrq_m2c_data(mrq_data), .mrq_m2c_rq_valid(mrq_valid), .mrq_m2c_wr_rd(mrq_wr),
    .mrq_m2c_stop(mrq_stop), .mrq_c2m_data(32'h0), .mrq_c2m_rp_valid(1'b0), .mrq_c2m_stop(1'b0),
    .m2c_intr(intr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ reference model
  logic [31:0] ref_mt [624];
  int          ref_i;

  function automatic void ref_seed(input logic [31:0] s);
    ref_mt[0] = s;
    for (int k = 1; k < 624; k++)
      ref_mt[k] = 32'd1812433253 * (ref_mt[k-1] ^ (ref_mt[k-1] >> 30)) + 32'(k);
    ref_i = 624;
  endfunction

  function automatic logic [31:0] ref_next();
    logic [31:0] y;
    if (ref_i >= 624) begin
      for (int k = 0; k < 624; k++) begin
        y = (ref_mt[k] & 32'h8000_0000) | (ref_mt[(k+1) % 624] & 32'h7fff_ffff);
        ref_mt[k] = ref_mt[(k+397) % 624] ^ (y >> 1) ^ ((y & 1) != 0 ? 32'h9908_b0df : 32'h0);
      end
      ref_i = 0;
    end
    y = ref_mt[ref_i];
    ref_i++;
    y = y ^ (y >> 11);
    y = y ^ ((y << 7) & 32'h9d2c_5680);
    y = y ^ ((y << 15) & 32'hefc6_0000);
    y = y ^ (y >> 18);
    return y;
  endfunction

  // ------------------------------------------------ stimulus
  int cyc = 0;
  always @(posedge clk) cyc++;

  // responses are checked as they come, whatever issued the read
  int n_resp = 0;
  always @(posedge clk) begin
    if (rst_n && rp_valid && !c2m_stop) begin
      logic [31:0] e;
      e = ref_next();
      check(rdata == e, $sformatf("number %0d: got %0d expected %0d", n_resp, rdata, e));
      n_resp++;
    end
  end

  // n reads at random addresses, issued back to back; with_stall lets the
  // consumer hold off responses at random
  task automatic burst(input int n, input bit with_stall);
    int t0, got0, k;
    got0 = n_resp;
    k = 0;
    @(negedge clk);
    wr = 1'b0; valid = 1'b1;
    t0 = cyc;
    while (k < n) begin
      c2m_stop = with_stall && ($urandom_range(0, 3) == 0);
      addr = $urandom;
      #1;
      if (!m2c_stop) k++;
      @(negedge clk);
    end
    valid = 1'b0;
    if (!with_stall)
      check(cyc - t0 == n, $sformatf("%0d numbers in %0d cycles", n, cyc - t0));
    c2m_stop = 1'b0;
    repeat (3) @(negedge clk);
    check(n_resp - got0 == n, "all reads answered");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_seed(32'd5489);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // first number of the default seed
    begin
      logic [31:0] first;
      first = ref_mt[0];
      check(first == 32'd5489, "reference seeding");
    end
    wait (!m2c_stop);
    burst(1, 1'b0);
    burst(1500, 1'b0);
    burst(200, 1'b1);
    // reseed by a write
    @(negedge clk);
    addr = 32'h10; wdata = 32'hdead_beef; wr = 1'b1; valid = 1'b1;
    #1;
    while (m2c_stop) begin @(negedge clk); #1; end
    @(negedge clk);
    valid = 1'b0; wr = 1'b0;
    ref_seed(32'hdead_beef);
    check(m2c_stop, "requests held off while reseeding");
    wait (!m2c_stop);
    burst(700, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the published first output of MT19937 for seed 5489
  always @(posedge clk)
    if (rst_n && rp_valid && !c2m_stop && n_resp == 0)
      check(rdata == 32'd3499211612, "first number for seed 5489 is 3499211612");
endmodule
