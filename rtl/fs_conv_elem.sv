// fs_conv_elem: one element of the fault-resistant four-state convolutional
// encoder.
//
// The element has two cells. The top cell is a D-cell on the data row: it
// takes an input item from the left and passes it to the element on its
// right and, through the coefficient switch, to input A of its own
// exclusive-OR cell. It therefore waits for two acknowledgements, one from
// each consumer. The bottom cell is a parity-inverting exclusive-OR cell on
// the result row: it adds (mod 2) the switched data item to the partial
// result coming from the element on its right (input B, read with inverted
// parity) and sends the sum to the left. There is no buffer cell on the
// result row. This is the element the document recommends; its use of
// phase inversion is what makes it stick, never slip, after a soft error.
//
// The coefficient switch is this design's reading of the "0/1" switch in the
// figure: with COEF = 0 the exclusive-OR cell sees the top cell's phase with
// the data bit forced to 0, so handshaking still runs while the product
// term is zero.
//
// Ports: d_in/d_in_ack and d_out/d_out_ack are the data row (items move
// right, acknowledgement phases move left); r_in/r_in_ack and r_out/r_out_ack
// are the result row (items move left). r_in_ack and r_out_ack use the
// inverted-acknowledge convention of the parity-inverting cell. fire[0]
// clocks the top cell, fire[1] the exclusive-OR cell; fault likewise.
module fs_conv_elem
  import fs_pkg::*;
#(
  parameter bit COEF = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   fire,
  input  fault_t [1:0] fault,
  input  fs_t          d_in,
  output logic         d_in_ack,
  output fs_t          d_out,
  input  logic         d_out_ack,
  input  fs_t          r_in,
  output logic         r_in_ack,
  output fs_t          r_out,
  input  logic         r_out_ack
);

  fs_t top_q;
  fs_t xor_q;
  fs_t switched;

  // ack[0]: own exclusive-OR cell, ack[1]: next element's top cell.
  fs_dcell #(.N_ACK(2)) u_top (
    .clk   (clk),
    .rst_n (rst_n),
    .fire  (fire[0]),
    .in    (d_in),
    .ack   ({d_out_ack, fs_phase(xor_q)}),
    .fault (fault[0]),
    .out   (top_q)
  );

  assign switched = COEF ? top_q : fs_encode(fs_phase(top_q), 1'b0);

  fs_xor_pinv u_xor (
    .clk   (clk),
    .rst_n (rst_n),
    .fire  (fire[1]),
    .a     (switched),
    .b     (r_in),
    .ack   (r_out_ack),
    .fault (fault[1]),
    .out   (xor_q)
  );

  assign d_in_ack = fs_phase(top_q);
  assign d_out    = top_q;
  assign r_in_ack = fs_phase(xor_q);
  assign r_out    = xor_q;

endmodule
