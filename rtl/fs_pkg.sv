// fs_pkg: types and helper functions shared by every four-state cell.
//
// A four-state signal carries one bit on two wires, {parity, data}. The four
// codes are P0 = 00, Q1 = 01, Q0 = 10 and P1 = 11, so the data bit is the low
// wire and the phase (P or Q) is parity XOR data. Consecutive items on a link
// alternate between P and Q phase, so every new item changes exactly one wire.
// The acknowledgement that flows back on a link is a single phase bit
// (0 = P, 1 = Q). This encoding follows the document. The fault record is this
// design's own addition: it lets a testbench inject the hard (stuck) and soft
// (flipped) errors the document discusses into any cell.
package fs_pkg;

  // {parity, data}
  typedef logic [1:0] fs_t;

  localparam fs_t FS_P0 = 2'b00;
  localparam fs_t FS_Q1 = 2'b01;
  localparam fs_t FS_Q0 = 2'b10;
  localparam fs_t FS_P1 = 2'b11;

  // Error injection for one cell output. flip is applied to the stored state
  // in the cycle it is high (a soft error); wires with stuck_en set are
  // forced to stuck_val on the cell's output for as long as it is high (a
  // hard error).
  typedef struct packed {
    logic [1:0] flip;
    logic [1:0] stuck_en;
    logic [1:0] stuck_val;
  } fault_t;

  function automatic logic fs_phase(fs_t v);
    return v[1] ^ v[0];
  endfunction

  function automatic logic fs_data(fs_t v);
    return v[0];
  endfunction

  function automatic fs_t fs_encode(logic ph, logic d);
    return {ph ^ d, d};
  endfunction

  // The same item seen through an inverted parity wire: its phase flips,
  // its data bit does not.
  function automatic fs_t fs_inv_parity(fs_t v);
    return {~v[1], v[0]};
  endfunction

  // Output wires of a cell after the hard-error part of a fault record.
  function automatic fs_t fs_apply_stuck(fs_t v, fault_t f);
    return (v & ~f.stuck_en) | (f.stuck_val & f.stuck_en);
  endfunction

endpackage
