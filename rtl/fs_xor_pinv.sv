// fs_xor_pinv: parity-inverting four-state exclusive-OR cell.
//
// The cell combines input A with input B, which it reads through an inverted
// parity wire, and it expects its own consumer to acknowledge through an
// inverted wire too. Written out, it takes a new result when
//   phase(A) != phase(B)   (A and B agree once B's parity is inverted), and
//   ack == phase(A)        (the consumer's raw phase equals A's phase),
// and the new result has phase(A) and data A.data XOR B.data. In every other
// input combination it keeps its state. These are exactly the eight rows of
// the document's parity-inverting exclusive-OR truth table ("else no change").
// Phase inversion between neighbouring cells is what makes the encoder built
// from this cell stick, rather than slip, after a soft error.
//
// As in fs_dcell, the self-timed cell is emulated by a register that may
// change on a rising clock edge when `fire` is high, and `fault` injects
// errors (this design's additions). rst_n (asynchronous, active low) loads
// RESET_VAL.
module fs_xor_pinv
  import fs_pkg::*;
#(
  parameter fs_t RESET_VAL = FS_P0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   fire,
  input  fs_t    a,
  input  fs_t    b,
  input  logic   ack,
  input  fault_t fault,
  output fs_t    out
);

  fs_t  state;
  logic take;
  fs_t  result;

  assign take   = (fs_phase(a) != fs_phase(b)) && (ack == fs_phase(a));
  assign result = fs_encode(fs_phase(a), fs_data(a) ^ fs_data(b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RESET_VAL;
    end else begin
      state <= ((fire && take) ? result : state) ^ fault.flip;
    end
  end

  assign out = fs_apply_stuck(state, fault);

endmodule
