// tb_pattern_matcher: self-checking test of the pattern matcher RTRM.
//
// Fills the database with random bytes from a four-letter alphabet (so that
// patterns recur), loads patterns cut from the database at random byte
// offsets plus one that cannot occur, starts the run and checks every
// result word against hit counts computed here byte by byte, the status
// bits, the interrupt and the run time of 2*P + L + 4 cycles. A second run
// with a different length checks that the counters are cleared between runs.
module tb_pattern_matcher;
  localparam int P  = 8;
  localparam int DW = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] addr, wdata, rdata;
  logic valid = 1'b0, wr = 1'b0, c2m_stop = 1'b0;
  logic rp_valid, m2c_stop, intr;
  logic [31:0] mrq_addr, mrq_data;
  logic mrq_valid, mrq_wr, mrq_stop;
  int checks = 0, failures = 0;

  pattern_matcher #(.NUM_PATTERNS(P), .DB_WORDS(DW)) dut (
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

  // Stimulus changes on the falling edge; a request is taken at the rising
  // edge where crq_m2c_stop is low.
  task automatic host_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr = 1'b1; valid = 1'b1;
    #1;
    while (m2c_stop) begin @(negedge clk); #1; end
    @(negedge clk);
    valid = 1'b0; wr = 1'b0;
  endtask

  // read with the response held off by c2m_stop for 'stall' cycles
  task automatic host_read(input logic [31:0] a, output logic [31:0] d, input int stall);
    @(negedge clk);
    addr = a; wr = 1'b0; valid = 1'b1;
    #1;
    while (m2c_stop) begin @(negedge clk); #1; end
    @(negedge clk);
    valid = 1'b0;
    c2m_stop = (stall > 0);
    repeat (stall) @(negedge clk);
    c2m_stop = 1'b0;
    while (!rp_valid) @(negedge clk);
    d = rdata;
  endtask

  logic [7:0]  db_bytes [4*DW];
  logic [31:0] pats [P];
  int          expect_cnt [P];

  task automatic run_case(input int len);
    logic [31:0] d;
    int t0, t1, got;
    for (int i = 0; i < 4*DW; i++) db_bytes[i] = 8'h41 + 8'($urandom_range(0, 3));
    for (int w = 0; w < DW; w++)
      host_write(32'h0100_0000 + 32'(4*w),
                 {db_bytes[4*w+3], db_bytes[4*w+2], db_bytes[4*w+1], db_bytes[4*w]});
    for (int p = 0; p < P - 1; p++) begin
      automatic int o = $urandom_range(0, 4*len - 4);
      pats[p] = {db_bytes[o+3], db_bytes[o+2], db_bytes[o+1], db_bytes[o]};
    end
    pats[P-1] = 32'h5a5a_5a5a;
    for (int p = 0; p < P; p++) begin host_write(32'h0200_0000 + 32'(4*p), pats[p]); end
    for (int p = 0; p < P; p++) begin
      expect_cnt[p] = 0;
      for (int b = 0; b + 3 < 4*len; b++)
        if ({db_bytes[b+3], db_bytes[b+2], db_bytes[b+1], db_bytes[b]} == pats[p]) expect_cnt[p]++;
    end
    // start
    @(negedge clk);
    addr = 32'h0; wdata = {16'(len), 16'h0001}; wr = 1'b1; valid = 1'b1;
    @(negedge clk);
    t0 = cyc;
    valid = 1'b0; wr = 1'b0;
    host_read(32'h4, d, 0);
    check(d[1] == 1'b1 && d[0] == 1'b0, "busy while running");
    while (!intr) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == 2*P + len + 4, $sformatf("run time %0d cycles, expected %0d", t1 - t0, 2*P + len + 4));
    host_read(32'h4, d, 0);
    check(d[1:0] == 2'b01, "finished bit");
    host_read(32'h0, d, 0);
    check(d[31:16] == 16'(len), "control register length");
    for (int p = 0; p < P; p++) begin
      host_read(32'h0300_0000 + 32'(4*p), d, p % 3);
      got = int'(d);
      check(got == expect_cnt[p], $sformatf("pattern %0d: %0d hits, expected %0d", p, got, expect_cnt[p]));
    end
    host_read(32'h0200_0004, d, 1);
    check(d == pats[1], "pattern memory read back");
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(DW);
    run_case(17);
    run_case(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
