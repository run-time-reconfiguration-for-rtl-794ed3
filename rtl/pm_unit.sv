// pm_unit: one pattern matcher unit of the pattern matcher RTRM.
//
// It holds one 32-bit search pattern and four 32-bit equality comparators.
// The comparators look at a 56-bit window over the byte stream: comparator
// k tests window bits [8k+31:8k], i.e. the window shifted by k bytes, so the
// four of them cover every byte alignment of a 32-bit word. win_mask[k]
// enables comparator k (it is cleared where the shifted word would run past
// the end of the database). The number of hits in a cycle (0..4) is added to
// a match counter, which the controlling FSM clears at the start of a run
// and reads out afterwards. The counter saturates at its maximum.
//
// Timing: load and clear act at the next clock edge; a window presented with
// win_valid is counted at the next clock edge.
module pm_unit #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             load,       // take pattern_in as the search pattern
  input  logic [31:0]      pattern_in,
  input  logic             clear,      // zero the match counter
  input  logic             win_valid,
  input  logic [55:0]      window,     // window[7:0] is the earliest byte
  input  logic [3:0]       win_mask,   // comparator enables, bit k = shift by k bytes
  output logic [CNT_W-1:0] count
);

  logic [31:0] pattern;
  logic [3:0]  hit;
  logic [2:0]  nhits;

  always_comb begin
    for (int k = 0; k < 4; k++)
      hit[k] = win_mask[k] && (window[8*k +: 32] == pattern);
    nhits = 3'(hit[0]) + 3'(hit[1]) + 3'(hit[2]) + 3'(hit[3]);
  end

  always_ff @(posedge clk) begin
    if (load) pattern <= pattern_in;
    if (clear)
      count <= '0;
    else if (win_valid && nhits != 3'd0) begin
      if (count > {CNT_W{1'b1}} - CNT_W'(nhits)) count <= {CNT_W{1'b1}};
      else                                        count <= count + CNT_W'(nhits);
    end
  end

endmodule
