// tb_reconfig_unit: self-checking test of the reconfig unit with two ICAP
// models, one that never signals BUSY (to check one word per clock) and one
// that does at random (to check that no word is lost or repeated).
//
// Checks: version register, slot reset and decouple follow CTRL, all
// bitstream words reach the ICAP in order (word count and checksum), the
// COUNT and STATUS registers, back-pressure while the FIFO is full, and a
// rate of one ICAP word per clock when BUSY stays low.
module tb_reconfig_unit;
  import rtr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // two units: [0] with a never-busy ICAP, [1] with a randomly busy one
  logic        req_valid [2];
  ireq_t       req       [2];
  logic        req_stop  [2];
  logic        resp_valid[2];
  logic [31:0] resp_data [2];
  icap_in_t    icap_in   [2];
  logic        busy      [2];
  int unsigned words     [2];
  logic [31:0] csum      [2];
  logic        synced    [2];
  logic        slot_rst_n[2][2];
  logic        decouple  [2][2];

  for (genvar u = 0; u < 2; u++) begin : g_u
    reconfig_unit #(.NUM_SLOTS(2), .FIFO_DEPTH(16), .CAVE_VERSION(16'h0102), .BOARD_VERSION(16'h0304)) dut (
      .clk, .rst_n, .req_valid(req_valid[u]), .req(req[u]), .req_stop(req_stop[u]),
      .resp_valid(resp_valid[u]), .resp_data(resp_data[u]), .resp_stop(1'b0),
      .icap_in(icap_in[u]), .icap_busy(busy[u]), .slot_rst_n(slot_rst_n[u]), .decouple(decouple[u]));
    icap_model #(.BUSY_ONE_IN(u == 0 ? 0 : 3)) icap (
      .clk, .en(rst_n), .ce_n(icap_in[u].ce_n), .write_n(icap_in[u].write_n), .din(icap_in[u].din),
      .busy(busy[u]), .words(words[u]), .checksum(csum[u]), .synced(synced[u]));
  end

  task automatic wr(input int u, input logic [7:0] off, input logic [31:0] d);
    @(negedge clk);
    req[u] = '{wr: 1'b1, addr: 40'(off), data: d}; req_valid[u] = 1'b1;
    #1;
    while (req_stop[u]) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid[u] = 1'b0;
  endtask

  task automatic rd(input int u, input logic [7:0] off, output logic [31:0] d);
    @(negedge clk);
    req[u] = '{wr: 1'b0, addr: 40'(off), data: 32'h0}; req_valid[u] = 1'b1;
    #1;
    while (req_stop[u]) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid[u] = 1'b0;
    while (!resp_valid[u]) @(negedge clk);
    d = resp_data[u];
  endtask

  // ICAP strobes of unit 0, for the rate check
  int strobes0 = 0, first_strobe = -1, last_strobe = -1;
  always @(posedge clk)
    if (!icap_in[0].ce_n && !icap_in[0].write_n) begin
      strobes0++;
      if (first_strobe < 0) first_strobe = cyc;
      last_strobe = cyc;
    end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, sum;
    int n;
    for (int u = 0; u < 2; u++) begin req_valid[u] = 1'b0; req[u] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 2; u++) begin
      rd(u, RCFG_VERSION, d);
      check(d == 32'h0102_0304, "version register");
      check(slot_rst_n[u][0] && slot_rst_n[u][1] && !decouple[u][0] && !decouple[u][1], "slots run after reset");
      wr(u, RCFG_CTRL, 32'h0000_0011);   // reconfigure slot 1
      check(slot_rst_n[u][0] && !slot_rst_n[u][1] && !decouple[u][0] && decouple[u][1], "slot 1 held and decoupled");
      rd(u, RCFG_CTRL, d);
      check(d == 32'h11, "control register read back");
      // a bitstream: sync word then random words
      n = 200;
      sum = {csum[u][30:0], csum[u][31]} ^ 32'haa99_5566;
      wr(u, RCFG_DATA, 32'haa99_5566);
      for (int k = 1; k < n; k++) begin
        logic [31:0] w;
        w = $urandom;
        sum = {sum[30:0], sum[31]} ^ w;
        wr(u, RCFG_DATA, w);
      end
      do rd(u, RCFG_STATUS, d); while (d[0] == 1'b0);
      repeat (2) @(negedge clk);
      check(words[u] == n, $sformatf("unit %0d: %0d words reached the ICAP, expected %0d", u, words[u], n));
      check(csum[u] == sum, "ICAP checksum");
      check(synced[u], "sync word seen");
      rd(u, RCFG_COUNT, d);
      check(d == n, "COUNT register");
      wr(u, RCFG_CTRL, 32'h0000_0010);
      check(slot_rst_n[u][1] && !decouple[u][1], "slot 1 released");
    end
    // burst: fill the FIFO while the ICAP drains, back-pressure must hold
    // words rather than drop them; unit 0 must drain one word per clock
    begin
      int w_before, strobes_before;
      w_before = words[0];
      strobes_before = strobes0;
      first_strobe = -1;
      fork
        for (int k = 0; k < 64; k++) wr(0, RCFG_DATA, 32'(k));
        for (int k = 0; k < 64; k++) wr(1, RCFG_DATA, 32'(k));
      join
      repeat (40) @(negedge clk);
      check(words[0] - w_before == 64, "burst complete, unit 0");
      check(words[1] == 200 + 64, "burst complete, unit 1");
      check(strobes0 - strobes_before == 64, "strobe count");
    end
    // write the FIFO faster than a busy ICAP drains: stop must appear
    begin
      automatic int stopped = 0;
      @(negedge clk);
      req[1] = '{wr: 1'b1, addr: 40'(RCFG_DATA), data: 32'h1};
      req_valid[1] = 1'b1;
      for (int k = 0; k < 100; k++) begin
        #1;
        if (req_stop[1]) stopped++;
        @(negedge clk);
      end
      req_valid[1] = 1'b0;
      check(stopped > 0, "FIFO full back-pressure");
    end
    // rate: 16 words written back to back reach the ICAP in 16 cycles
    begin
      @(negedge clk);
      first_strobe = -1;
      req[0] = '{wr: 1'b1, addr: 40'(RCFG_DATA), data: 32'h5};
      req_valid[0] = 1'b1;
      for (int k = 0; k < 16; k++) @(negedge clk);
      req_valid[0] = 1'b0;
      repeat (5) @(negedge clk);
      check(last_strobe - first_strobe == 15, $sformatf("16 back-to-back words in %0d cycles", last_strobe - first_strobe + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
