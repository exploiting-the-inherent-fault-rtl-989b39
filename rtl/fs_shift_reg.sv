// fs_shift_reg: four-state asynchronous shift register.
//
// STAGES D-cells in a chain: each cell reads the previous cell's output and
// the phase of the next cell as its acknowledgement. Items enter at `in` and
// leave at `out`; the environment acknowledges `out` by returning the phase
// of the last item it has taken on `out_ack`, and reads `in_ack` (the phase
// held by the first cell) to know when `in` has been taken. With no
// bubbles a full register holds alternating phases (P1 Q1 P0 Q0 ...), so it
// stores one item per cell, as in the document's examples. Neighbouring
// cells are never enabled together, so firing all cells each cycle is a
// legal ordering of the self-timed register.
//
// A stuck wire (hard error) makes the register stop at the faulty cell,
// which the environment can see as an erasure. A flipped cell (soft error)
// can make items slip: an item is lost or duplicated without any sign.
// Both behaviours are inherent to the structure the document describes;
// `fault` only exposes the cells to error injection. Cell 0 is the input end.
module fs_shift_reg
  import fs_pkg::*;
#(
  parameter int STAGES = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [STAGES-1:0]   fire,
  input  fault_t [STAGES-1:0] fault,
  input  fs_t                 in,
  output logic                in_ack,
  output fs_t                 out,
  input  logic                out_ack
);

  fs_t  stage_q[STAGES];
  logic ackph [STAGES];

  for (genvar i = 0; i < STAGES; i++) begin : g_cell
    assign ackph[i] = (i == STAGES - 1) ? out_ack : fs_phase(stage_q[(i + 1) % STAGES]);

    fs_dcell #(.N_ACK(1)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .fire  (fire[i]),
      .in    ((i == 0) ? in : stage_q[(i + STAGES - 1) % STAGES]),
      .ack   (ackph[i]),
      .fault (fault[i]),
      .out   (stage_q[i])
    );
  end

  assign in_ack = fs_phase(stage_q[0]);
  assign out    = stage_q[STAGES-1];

endmodule
