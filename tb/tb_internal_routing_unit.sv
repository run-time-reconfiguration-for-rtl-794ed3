// tb_internal_routing_unit: self-checking test of the internal routing unit.
//
// Downstream: 2000 random reads and writes, issued back to back, go to the
// reconfig window, both slot windows and an unmapped address. Three target
// stand-ins keep 16 registers each, answer reads after a random delay and
// raise stop at random. A shadow copy of the registers predicts every read
// result; responses must arrive in request order, and reads to no target
// must return all ones. Upstream: both slots issue random module requests
// at once; a host stand-in answers reads in order after a random delay
// with a value derived from the address, and each slot must get the
// answers to its own reads. A third of the module requests address a slot
// window (RTRM to RTRM): they must reach that target, registers 8..15, and
// their read results come from the same shadow copy (the host uses
// registers 0..7). Also counted: requests held by the in-order rule when a
// read changes target.
module tb_internal_routing_unit;
  import rtr_pkg::*;
  localparam logic [39:0] BAR = 40'h00_8000_0000;
  localparam int NT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req_valid = 1'b0, req_stop, resp_valid, resp_stop = 1'b0;
  ireq_t req = '0;
  logic [31:0] resp_data;
  logic        t_req_valid [NT];
  ireq_t       t_req;
  logic        t_req_stop  [NT];
  logic        t_resp_valid[NT];
  logic [31:0] t_resp_data [NT];
  logic        t_resp_stop [NT];
  logic        s_mreq_valid [2];
  ireq_t       s_mreq       [2];
  logic        s_mreq_stop  [2];
  logic        s_mresp_valid[2];
  logic [31:0] s_mresp_data [2];
  logic        s_mresp_stop [2];
  logic        mreq_valid, mreq_stop, mresp_valid, mresp_stop;
  ireq_t       mreq;
  logic [31:0] mresp_data;

  internal_routing_unit #(.NUM_SLOTS(2), .BAR_BASE(BAR), .SLOT_SHIFT(27), .MAX_PEND(15)) dut (.*);

  // ------------------------------------------------ target stand-ins
  logic [31:0] tregs [NT][16];
  logic [31:0] tq [NT][$];
  for (genvar i = 0; i < NT; i++) begin : g_t
    logic stop_r, give_r;
    assign t_req_stop[i]   = stop_r;
    assign t_resp_valid[i] = give_r && tq[i].size() > 0;
    assign t_resp_data[i]  = tq[i].size() > 0 ? tq[i][0] : 32'h0;
    always @(posedge clk) begin
      stop_r <= ($urandom_range(0, 4) == 0);
      give_r <= ($urandom_range(0, 2) != 0);
      if (t_resp_valid[i] && !t_resp_stop[i]) void'(tq[i].pop_front());
      if (t_req_valid[i] && !t_req_stop[i]) begin
        if (t_req.wr) tregs[i][t_req.addr[5:2]] <= t_req.data;
        else          tq[i].push_back(tregs[i][t_req.addr[5:2]]);
      end
    end
  end

  // ------------------------------------------------ host stand-in (module requests)
  logic [31:0] hq [$];
  logic hstop_r, hgive_r;
  assign mreq_stop   = hstop_r;
  assign mresp_valid = hgive_r && hq.size() > 0;
  assign mresp_data  = hq.size() > 0 ? hq[0] : 32'h0;
  always @(posedge clk) begin
    hstop_r <= ($urandom_range(0, 3) == 0);
    hgive_r <= ($urandom_range(0, 1) == 0);
    if (mresp_valid && !mresp_stop) void'(hq.pop_front());
    if (mreq_valid && !mreq_stop && !mreq.wr) hq.push_back(mreq.addr[31:0] ^ 32'h5555_aaaa);
  end

  // ------------------------------------------------ downstream checking
  logic [31:0] shadow [NT][16];
  logic [31:0] expq [$];
  int n_resp = 0, n_null = 0, n_switch_stall = 0;
  always @(posedge clk) begin
    if (rst_n && resp_valid && !resp_stop) begin
      logic [31:0] e;
      e = expq.pop_front();
      check(resp_data == e, $sformatf("response %0d: %h expected %h", n_resp, resp_data, e));
      n_resp++;
    end
  end

  // ------------------------------------------------ upstream slots
  logic [31:0] sexp [2][$];
  int s_sent [2], s_got [2], n_peer_rd = 0, n_peer_wr = 0;
  bit s_done [2] = '{1'b0, 1'b0};
  for (genvar s = 0; s < 2; s++) begin : g_s
    logic m_stop_r;
    assign s_mresp_stop[s] = m_stop_r;
    always @(posedge clk) begin
      m_stop_r <= ($urandom_range(0, 3) == 0);
      if (rst_n && s_mresp_valid[s] && !s_mresp_stop[s]) begin
        logic [31:0] e;
        e = sexp[s].pop_front();
        check(s_mresp_data[s] == e, $sformatf("slot %0d module response %h expected %h", s, s_mresp_data[s], e));
        s_got[s]++;
      end
    end
    initial begin
      s_mreq_valid[s] = 1'b0;
      s_mreq[s] = '0;
      s_sent[s] = 0; s_got[s] = 0;
      wait (rst_n);
      for (int k = 0; k < 300; k++) begin
        automatic int pt = $urandom_range(1, 2), pr = $urandom_range(8, 15);
        automatic bit peer = $urandom_range(0, 2) == 0;
        @(negedge clk);
        s_mreq[s] = '{wr: $urandom_range(0, 2) == 0,
                      addr: peer ? BAR + (40'(pt) << 27) + 40'(4*pr)
                                 : {8'h0, 32'($urandom) & 32'h7fff_fffc},
                      data: $urandom};
        s_mreq_valid[s] = 1'b1;
        #1;
        while (s_mreq_stop[s]) begin @(negedge clk); #1; end
        if (peer && s_mreq[s].wr) begin
          shadow[pt][pr] = s_mreq[s].data;
          n_peer_wr++;
        end
        if (!s_mreq[s].wr) begin
          sexp[s].push_back(peer ? shadow[pt][pr] : s_mreq[s].addr[31:0] ^ 32'h5555_aaaa);
          s_sent[s]++;
          if (peer) n_peer_rd++;
        end
        @(posedge clk);
        #1 s_mreq_valid[s] = 1'b0;
      end
      s_done[s] = 1'b1;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last_tgt = -1;
    for (int i = 0; i < NT; i++) for (int r = 0; r < 16; r++) begin tregs[i][r] = '0; shadow[i][r] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      int t, r;
      logic [39:0] a;
      logic w;
      t = $urandom_range(0, NT);          // NT = unmapped
      if (k % 50 < 25) t = (k / 50) % NT; // runs to one target, then a change
      r = $urandom_range(0, 7);
      w = 1'($urandom_range(0, 1));
      a = (t == NT) ? 40'h00_7000_0000 + 40'(4*r) : BAR + (40'(t) << 27) + 40'(4*r);
      @(negedge clk);
      resp_stop = ($urandom_range(0, 4) == 0);
      req = '{wr: w, addr: a, data: $urandom};
      req_valid = 1'b1;
      #1;
      if (req_stop && !w && last_tgt >= 0 && last_tgt != t) n_switch_stall++;
      while (req_stop) begin @(negedge clk); resp_stop = ($urandom_range(0, 4) == 0); #1; end
      if (w) begin
        if (t < NT) shadow[t][r] = req.data;
      end else begin
        expq.push_back(t < NT ? shadow[t][r] : 32'hffff_ffff);
        if (t == NT) n_null++;
        last_tgt = t;
      end
      @(posedge clk);
      #1 req_valid = 1'b0;
    end
    @(negedge clk);
    resp_stop = 1'b0;
    wait (s_done[0] && s_done[1]);
    repeat (200) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d responses missing", expq.size()));
    check(n_null > 0, "reads to no target happened");
    check(n_switch_stall > 0, "target change held a read");
    check(n_peer_rd > 0 && n_peer_wr > 0, "RTRM-to-RTRM reads and writes happened");
    $display("peer reads %0d, peer writes %0d", n_peer_rd, n_peer_wr);
    for (int s = 0; s < 2; s++)
      check(s_got[s] == s_sent[s] && s_sent[s] > 0, $sformatf("slot %0d: %0d of %0d module reads answered", s, s_got[s], s_sent[s]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
