// fs_ack_merge: acknowledgement merge for a source feeding two duplicated
// copies.
//
// One four-state source drives the same input cell of both copies, so it
// must see a single acknowledgement. While both copies are healthy the merge
// is a Muller C-element on the two acknowledgement phases: the output
// follows them when they agree and holds its value while they differ, so the
// source waits for the slower copy. Once a copy has been marked erased (it
// stuck, see fs_erasure_join) its acknowledgement is ignored and the output
// follows the other copy alone, so a stuck copy cannot stop the source.
//
// The document asks for duplication with erasure correction but does not
// give this circuit; the C-element merge and the bypass are this design's
// choices. The hold state is a register (RESET_ACK at reset, asynchronous
// active-low reset); the output itself is combinational from ack and erased.
module fs_ack_merge #(
  parameter bit RESET_ACK = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] ack,      // acknowledgement phase of copy 0 and copy 1
  input  logic [1:0] erased,   // copy has been marked as stuck
  output logic       ack_out
);

  logic held;

  always_comb begin
    unique case (erased)
      2'b01:   ack_out = ack[1];
      2'b10:   ack_out = ack[0];
      default: ack_out = (ack[0] == ack[1]) ? ack[0] : held;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= RESET_ACK;
    else        held <= ack_out;
  end

endmodule
