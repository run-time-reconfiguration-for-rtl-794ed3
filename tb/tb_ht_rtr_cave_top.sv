// tb_ht_rtr_cave_top: end-to-end test of the HT cave with RTR support, at
// the default parameters (290 pattern units, 8192-word database).
//
// A host stand-in drives the HT packet channels the way the host driver
// and a user program would:
//   1. reads the version register of the reconfig unit;
//   2. reconfigures slot 0: sets the reconfig bit, checks that the slot
//      answers all ones while decoupled, streams a bitstream into the ICAP
//      (an ICAP model that raises BUSY at random), polls STATUS, checks
//      the words that reached the ICAP, releases the slot;
//   3. runs the pattern matcher: fills the whole database and all 290
//      patterns with posted writes, starts it, waits for its interrupt,
//      reads status and every result and compares them with hit counts
//      computed here; checks the scan time of one word per clock;
//   4. reconfigures slot 1 the same way and reads 1000 Mersenne twister
//      numbers with up to 8 reads in flight, random stalls on the
//      response channel and posted writes mixed in, checking them against
//      a software MT19937;
//   5. reads an unmapped address (all ones).
// Mechanisms counted, each of which must occur: decoupled read answered
// locally, ICAP BUSY stall, bitstream FIFO full, posted write passing a
// waiting read, read held for a target change, unmapped read, RTRM
// interrupt, response channel stall. The packet engine's tag queue cannot
// fill here, since each RTRM holds at most one read in flight; it is only
// counted and reported (the packet engine's own test fills it).
module tb_ht_rtr_cave_top;
  import rtr_pkg::*;
  localparam logic [39:0] BAR   = 40'h00_8000_0000;
  localparam logic [39:0] SLOT0 = BAR + 40'h0800_0000;
  localparam logic [39:0] SLOT1 = BAR + 40'h1000_0000;
  localparam int NP  = 290;
  localparam int NDB = 8192;

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
  icap_in_t icap_in;
  logic icap_busy;
  logic [1:0] intr;
  int unsigned icap_words;
  logic [31:0] icap_sum;
  logic icap_synced;

  ht_rtr_cave_top dut (.*);

  icap_model #(.BUSY_ONE_IN(5)) u_icap (
    .clk, .en(rst_n), .ce_n(icap_in.ce_n), .write_n(icap_in.write_n), .din(icap_in.din),
    .busy(icap_busy), .words(icap_words), .checksum(icap_sum), .synced(icap_synced));

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ------------------------------------------------ mechanism counters
  int m_decoupled = 0, m_icap_busy = 0, m_fifo_full = 0, m_tagq_full = 0, m_p_first = 0,
      m_tgt_switch = 0, m_unmapped = 0, m_intr = 0, m_r_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_rcfg.fifo_full && dut.u_rcfg.req_valid && dut.u_rcfg.req_stop) m_fifo_full++;
    if (icap_busy && !dut.u_rcfg.fifo_empty) m_icap_busy++;
    if (rx_n_valid && dut.u_pe.tagq_full) m_tagq_full++;
    if (rx_p_valid && rx_n_valid && !rx_p_stop) m_p_first++;
    if (dut.u_iru.req_valid && !dut.u_iru.req.wr && dut.u_iru.pend_cnt != 0 &&
        dut.u_iru.pend_tgt != dut.u_iru.tgt) m_tgt_switch++;
    if (dut.u_iru.null_valid && !dut.u_iru.resp_stop) m_unmapped++;
    if (intr[0]) m_intr++;
    if (tx_r_valid && tx_r_stop) m_r_stall++;
    if (dut.g_slot[0].u_ctrl.decouple && dut.g_slot[0].u_ctrl.dummy_valid && !dut.g_slot[0].u_ctrl.resp_stop)
      m_decoupled++;
    if (dut.g_slot[1].u_ctrl.decouple && dut.g_slot[1].u_ctrl.dummy_valid && !dut.g_slot[1].u_ctrl.resp_stop)
      m_decoupled++;
  end

  // ------------------------------------------------ host stand-in
  typedef struct { logic [4:0] tag; logic [31:0] data; } resp_t;
  resp_t rq [$];
  always @(posedge clk)
    if (rst_n && tx_r_valid && !tx_r_stop) rq.push_back('{tag: tx_r.srctag, data: tx_r.data});

  logic [4:0] next_tag = '0;

  task automatic post_write(input logic [39:0] a, input logic [31:0] d);
    @(negedge clk);
    rx_p = '{srctag: 5'h0, addr: a, data: d};
    rx_p_valid = 1'b1;
    #1;
    while (rx_p_stop) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 rx_p_valid = 1'b0;
  endtask

  task automatic issue_read(input logic [39:0] a, output logic [4:0] tag);
    @(negedge clk);
    tag = next_tag;
    next_tag = next_tag + 5'd1;
    rx_n = '{srctag: tag, addr: a, data: 32'h0};
    rx_n_valid = 1'b1;
    #1;
    while (rx_n_stop) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 rx_n_valid = 1'b0;
  endtask

  task automatic take_resp(input logic [4:0] tag, output logic [31:0] d);
    resp_t r;
    wait (rq.size() > 0);
    r = rq.pop_front();
    check(r.tag == tag, $sformatf("response tag %0d expected %0d", r.tag, tag));
    d = r.data;
  endtask

  task automatic read(input logic [39:0] a, output logic [31:0] d);
    logic [4:0] tag;
    issue_read(a, tag);
    take_resp(tag, d);
  endtask

  // ------------------------------------------------ reconfiguration of one slot
  task automatic reconfigure(input int slot, input int nwords);
    logic [31:0] d, sum;
    int w0;
    logic [39:0] sbase;
    sbase = slot == 0 ? SLOT0 : SLOT1;
    post_write(BAR + 40'(RCFG_COUNT), 32'h0);
    post_write(BAR + 40'(RCFG_CTRL), 32'h1 | (32'(slot) << 4));
    read(sbase + 40'h4, d);
    check(d == 32'hffff_ffff, "slot under reconfiguration answers all ones");
    w0 = icap_words;
    sum = icap_sum;
    for (int k = 0; k < nwords; k++) begin
      logic [31:0] w;
      w = (k == 0) ? 32'haa99_5566 : $urandom;
      sum = {sum[30:0], sum[31]} ^ w;
      post_write(BAR + 40'(RCFG_DATA), w);
    end
    do read(BAR + 40'(RCFG_STATUS), d); while (d[0] == 1'b0);
    repeat (2) @(negedge clk);
    check(icap_words - w0 == nwords, $sformatf("slot %0d: %0d bitstream words reached the ICAP", slot, icap_words - w0));
    check(icap_sum == sum, "bitstream arrived in order");
    read(BAR + 40'(RCFG_COUNT), d);
    check(d == 32'(nwords), "COUNT register");
    post_write(BAR + 40'(RCFG_CTRL), 32'(slot) << 4);
  endtask

  // ------------------------------------------------ MT19937 reference
  logic [31:0] ref_mt [624];
  int ref_i;
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
    return y ^ (y >> 18);
  endfunction

  // ------------------------------------------------ matcher data
  logic [7:0]  db [4*NDB];
  logic [31:0] pats [NP];
  int          hits [NP];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int t_start, t_intr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. version
    read(BAR + 40'(RCFG_VERSION), d);
    check(d == 32'h0001_0001, "version register");

    // 2. load the pattern matcher into slot 0
    reconfigure(0, 300);

    // 3. pattern matcher run over the full database
    for (int i = 0; i < 4*NDB; i++) db[i] = 8'h61 + 8'($urandom_range(0, 3));
    for (int w = 0; w < NDB; w++)
      post_write(SLOT0 + 40'h100_0000 + 40'(4*w), {db[4*w+3], db[4*w+2], db[4*w+1], db[4*w]});
    for (int p = 0; p < NP; p++) begin
      if (p % 50 == 7) pats[p] = 32'h7a7a_7a7a;   // never occurs
      else begin
        automatic int o = $urandom_range(0, 4*NDB - 4);
        pats[p] = {db[o+3], db[o+2], db[o+1], db[o]};
      end
      post_write(SLOT0 + 40'h200_0000 + 40'(4*p), pats[p]);
    end
    for (int p = 0; p < NP; p++) hits[p] = 0;
    for (int b = 0; b + 3 < 4*NDB; b++) begin
      logic [31:0] w;
      w = {db[b+3], db[b+2], db[b+1], db[b]};
      for (int p = 0; p < NP; p++) if (pats[p] == w) hits[p]++;
    end
    post_write(SLOT0, {16'(NDB), 16'h0001});
    t_start = cyc;
    while (!intr[0]) @(negedge clk);
    t_intr = cyc;
    // start write crosses the packet engine, routing unit and controller
    // combinationally, so the run time seen here is the matcher's own
    check(t_intr - t_start >= 2*NP + NDB + 4 && t_intr - t_start <= 2*NP + NDB + 6,
          $sformatf("matcher run of %0d words took %0d cycles", NDB, t_intr - t_start));
    read(SLOT0 + 40'h4, d);
    check(d[1:0] == 2'b01, "matcher finished");
    for (int p = 0; p < NP; p++) begin
      read(SLOT0 + 40'h300_0000 + 40'(4*p), d);
      check(int'(d) == hits[p], $sformatf("pattern %0d: %0d hits, expected %0d", p, d, hits[p]));
    end

    // 4. load the Mersenne twister into slot 1 and stream numbers
    reconfigure(1, 200);
    ref_seed(32'd5489);
    wait (!dut.g_slot[1].crq_m2c_stop);
    begin
      logic [4:0] tags [$];
      int issued, taken;
      issued = 0;
      taken = 0;
      fork
        begin
          while (issued < 1000) begin
            logic [4:0] t;
            issue_read(SLOT1 + 40'(4*($urandom_range(0, 1023))), t);
            tags.push_back(t);
            issued++;
          end
        end
        begin
          for (int k = 0; k < 300; k++) begin
            automatic int pi = k % NP;
            post_write(SLOT0 + 40'h200_0000 + 40'(4*pi), pats[pi]);
            repeat ($urandom_range(0, 6)) @(negedge clk);
          end
        end
        begin
          while (taken < 1000) begin
            @(negedge clk);
            if ($urandom_range(0, 60) == 0) begin
              // a long stall of the response channel
              tx_r_stop = 1'b1;
              repeat (12) @(negedge clk);
            end
            tx_r_stop = ($urandom_range(0, 3) == 0);
            while (rq.size() > 0 && tags.size() > 0) begin
              logic [4:0] t;
              logic [31:0] e;
              t = tags.pop_front();
              take_resp(t, d);
              e = ref_next();
              check(d == e, $sformatf("MT number %0d: %0d expected %0d", taken, d, e));
              taken++;
            end
          end
          tx_r_stop = 1'b0;
        end
      join
    end
    // a read of slot 1 followed at once by a read of another target
    begin
      logic [4:0] t1, t2;
      issue_read(SLOT1, t1);
      issue_read(BAR + 40'(RCFG_VERSION), t2);
      take_resp(t1, d);
      check(d == ref_next(), "MT number before target change");
      take_resp(t2, d);
      check(d == 32'h0001_0001, "version after target change");
    end

    // 5. unmapped address
    read(40'h00_2000_0000, d);
    check(d == 32'hffff_ffff, "unmapped read answers all ones");

    check(m_decoupled > 0,  "mechanism: decoupled slot answered locally");
    check(m_icap_busy > 0,  "mechanism: ICAP busy stall");
    check(m_fifo_full > 0,  "mechanism: bitstream FIFO full");
    check(m_p_first > 0,    "mechanism: posted write passed a waiting read");
    check(m_tgt_switch > 0, "mechanism: read held for a target change");
    check(m_unmapped > 0,   "mechanism: unmapped read");
    check(m_intr > 0,       "mechanism: RTRM interrupt");
    check(m_r_stall > 0,    "mechanism: response channel stall");
    $display("mechanisms: decoupled=%0d icap_busy=%0d fifo_full=%0d tagq_full=%0d p_first=%0d tgt_switch=%0d unmapped=%0d intr=%0d r_stall=%0d",
             m_decoupled, m_icap_busy, m_fifo_full, m_tagq_full, m_p_first, m_tgt_switch, m_unmapped, m_intr, m_r_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
