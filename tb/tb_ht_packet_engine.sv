// tb_ht_packet_engine: self-checking test of the HT packet engine.
//
// A host stand-in sends posted writes and read requests with random source
// tags on the rx P and N channels at the same time; a target stand-in
// behind the internal bus keeps 32 registers, answers reads after a random
// delay and stalls at random. Checks: every write lands, every read comes
// back on tx R with its own tag and the value a shadow copy predicts, in
// order; posted requests win over non-posted ones when both wait (counted);
// the N channel is held off when the tag queue is full (counted). Module
// requests: writes leave on tx P, reads on tx N with increasing tags, and
// responses on rx R return to the module side.
module tb_ht_packet_engine;
  import rtr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rx_p_valid = 0, rx_p_stop, rx_n_valid = 0, rx_n_stop, rx_r_valid = 0, rx_r_stop;
  ht_pkt_t rx_p = '0, rx_n = '0, rx_r = '0;
  logic tx_p_valid, tx_p_stop = 0, tx_n_valid, tx_n_stop = 0, tx_r_valid, tx_r_stop = 0;
  ht_pkt_t tx_p, tx_n, tx_r;
  logic req_valid, req_stop, resp_valid, resp_stop;
  ireq_t req;
  logic [31:0] resp_data;
  logic mreq_valid = 0, mreq_stop, mresp_valid, mresp_stop = 0;
  ireq_t mreq = '0;
  logic [31:0] mresp_data;

  ht_packet_engine #(.TAG_DEPTH(8)) dut (.*);

  // ------------------------------------------------ target stand-in
  logic [31:0] regs [32];
  logic [31:0] tq [$];
  logic stop_r, give_r;
  assign req_stop   = stop_r;
  assign resp_valid = give_r && tq.size() > 0;
  assign resp_data  = tq.size() > 0 ? tq[0] : 32'h0;
  always @(posedge clk) begin
    stop_r <= ($urandom_range(0, 4) == 0);
    give_r <= ($urandom_range(0, 5) == 0);   // slow, so the tag queue fills
    if (resp_valid && !resp_stop) void'(tq.pop_front());
    if (req_valid && !req_stop) begin
      if (req.wr) regs[req.addr[6:2]] <= req.data;
      else        tq.push_back(regs[req.addr[6:2]]);
    end
  end

  // ------------------------------------------------ checking
  logic [31:0] shadow [32];
  typedef struct { logic [4:0] tag; logic [31:0] data; } exp_t;
  exp_t expq [$];
  int n_r = 0, n_p_first = 0, n_tagq_full = 0;
  always @(posedge clk) begin
    if (rst_n && tx_r_valid && !tx_r_stop) begin
      exp_t e;
      e = expq.pop_front();
      check(tx_r.srctag == e.tag && tx_r.data == e.data,
            $sformatf("response %0d: tag %0d data %h, expected tag %0d data %h", n_r, tx_r.srctag, tx_r.data, e.tag, e.data));
      n_r++;
    end
    if (rst_n && rx_p_valid && rx_n_valid && !rx_p_stop && rx_n_stop) n_p_first++;
    if (rst_n && rx_n_valid && rx_n_stop && !req_stop && !rx_p_valid) n_tagq_full++;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // posted writes and reads run as two independent streams; the shadow is
  // updated when a write is taken, the expectation when a read is taken
  int p_left = 400, n_left = 400;
  initial begin
    wait (rst_n);
    while (p_left > 0) begin
      @(negedge clk);
      if (!rx_p_valid) begin
        if ($urandom_range(0, 1) == 0) begin
          rx_p = '{srctag: 5'h0, addr: 40'h00_8000_0000 + 40'(4*$urandom_range(0, 31)), data: $urandom};
          rx_p_valid = 1'b1;
        end else rx_p_valid = 1'b0;
      end
      #1;
      if (rx_p_valid && !rx_p_stop) begin
        shadow[rx_p.addr[6:2]] = rx_p.data;
        p_left--;
        @(posedge clk); #1 rx_p_valid = 1'b0;
      end
    end
    rx_p_valid = 1'b0;
  end

  initial begin
    automatic logic [4:0] tag = 5'd0;
    wait (rst_n);
    while (n_left > 0) begin
      @(negedge clk);
      tx_r_stop = ($urandom_range(0, 3) == 0);
      rx_n = '{srctag: tag, addr: 40'h00_8000_0000 + 40'(4*$urandom_range(0, 31)), data: 32'h0};
      rx_n_valid = 1'b1;
      #2;
      if (!rx_n_stop) begin
        // P and N are never taken in the same cycle, so the shadow is exact
        expq.push_back('{tag: tag, data: shadow[rx_n.addr[6:2]]});
        tag = tag + 5'd3;
        n_left--;
        @(posedge clk); #1 rx_n_valid = 1'b0;
      end
    end
    rx_n_valid = 1'b0;
  end

  initial begin
    for (int r = 0; r < 32; r++) begin regs[r] = '0; shadow[r] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (p_left == 0 && n_left == 0);
    @(negedge clk);
    tx_r_stop = 1'b0;
    repeat (500) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d responses missing", expq.size()));
    check(n_p_first > 0, "posted request passed a waiting read");
    check(n_tagq_full > 0, "tag queue full held the N channel");
    // module requests
    @(negedge clk);
    mreq = '{wr: 1'b1, addr: 40'h01_2345_6780, data: 32'hfeed_0001};
    mreq_valid = 1'b1;
    #1;
    check(tx_p_valid && !tx_n_valid && tx_p.addr == 40'h01_2345_6780 && tx_p.data == 32'hfeed_0001, "module write on tx P");
    tx_p_stop = 1'b1;
    #1;
    check(mreq_stop, "tx P stop holds module write");
    tx_p_stop = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      mreq = '{wr: 1'b0, addr: 40'h01_0000_0000 + 40'(4*k), data: 32'h0};
      #1;
      check(tx_n_valid && !tx_p_valid && tx_n.addr == mreq.addr && tx_n.srctag == 5'(k), "module read on tx N with its tag");
      @(negedge clk);
    end
    mreq_valid = 1'b0;
    rx_r = '{srctag: 5'd1, addr: '0, data: 32'h7777_0001};
    rx_r_valid = 1'b1;
    mresp_stop = 1'b1;
    #1;
    check(mresp_valid && mresp_data == 32'h7777_0001 && rx_r_stop, "host response to module side");
    @(negedge clk);
    rx_r_valid = 1'b0; mresp_stop = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
