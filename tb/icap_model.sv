// icap_model: behavioural model of the FPGA's internal configuration
// access port as the reconfig unit uses it, for simulation only.
//
// On every rising clock edge with ce_n and write_n low the model takes the
// word on din. It keeps the number of words taken and a running checksum
// that depends on the word order (rotate left by one, then xor the word), and raises BUSY for one cycle at a time
// at random (about one cycle in BUSY_ONE_IN) so that the writer's flow
// control is exercised (never with BUSY_ONE_IN = 0). When the sync word 0xAA995566 has been seen it sets
// 'synced'.
module icap_model #(
  parameter int unsigned BUSY_ONE_IN = 4
) (
  input  logic        clk,
  input  logic        en,       // count only once the writer is out of reset
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] din,
  output logic        busy,
  output int unsigned words,
  output logic [31:0] checksum,
  output logic        synced
);
  initial begin
    busy     = 1'b0;
    words    = 0;
    checksum = '0;
    synced   = 1'b0;
  end

  always @(posedge clk) begin
    busy <= (BUSY_ONE_IN != 0) && ($urandom_range(1, BUSY_ONE_IN) == 1);
    if (en && !ce_n && !write_n) begin
      words    <= words + 1;
      checksum <= {checksum[30:0], checksum[31]} ^ din;
      if (din == 32'haa99_5566) synced <= 1'b1;
    end
  end
endmodule
