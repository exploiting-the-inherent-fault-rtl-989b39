// fs_dcell: four-state asynchronous delay cell (D-cell).
//
// The cell holds one four-state item. It copies its input whenever the
// input's phase differs from the acknowledgement phase sent back by the next
// cell, and otherwise keeps what it has; the phase of what it holds is the
// acknowledgement it sends to the cell before it. With one acknowledgement
// this is exactly the D-cell truth table of the document: Q-phase data passes
// only while the next cell holds P-phase data, and P-phase data only while it
// holds Q-phase data.
//
// Design choices of this implementation:
//  * A cell whose output feeds N_ACK consumers (the top cell of an encoder
//    element feeds the next element and its own exclusive-OR cell) copies its
//    input only when the input's phase differs from every acknowledgement,
//    i.e. when all consumers have taken the present item.
//  * The self-timed cell is emulated synchronously: the state is a register
//    that may change on a rising clock edge when `fire` is high. Holding
//    `fire` high makes every enabled cell act each cycle; driving it with
//    random bits emulates arbitrary cell delays.
//  * `fault` injects errors (see fs_pkg). `rst_n` (asynchronous, active low)
//    loads RESET_VAL.
//
// Interface: in (four-state from the previous cell), ack (phases of the
// consumers), out (four-state, also this cell's acknowledgement phase to the
// previous cell via fs_phase(out)). Timing: one cell transfer per fired clock
// edge.
module fs_dcell
  import fs_pkg::*;
#(
  parameter int  N_ACK     = 1,
  parameter fs_t RESET_VAL = FS_P0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fire,
  input  fs_t              in,
  input  logic [N_ACK-1:0] ack,
  input  fault_t           fault,
  output fs_t              out
);

  fs_t state;
  logic take;

  // Copy when the input's phase differs from every acknowledgement.
  assign take = (ack == {N_ACK{~fs_phase(in)}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RESET_VAL;
    end else begin
      state <= ((fire && take) ? in : state) ^ fault.flip;
    end
  end

  assign out = fs_apply_stuck(state, fault);

endmodule
