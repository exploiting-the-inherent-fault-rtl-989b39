// fs_conv_encoder: fault-resistant four-state convolutional encoder
// (polynomial multiplier over GF(2)).
//
// N elements (fs_conv_elem) in a chain. The data row shifts the input
// stream x to the right; the result row carries partial sums to the left,
// each element adding COEF[k] * (its delayed input). Element 0 is at the
// data input / result output end. For result-in items equal to 0 the
// result stream is
//     r[t] = XOR over k of COEF[k] & x[t-k]     (x[t] = 0 for t < 0)
// i.e. the input multiplied by the fixed coefficient polynomial; a non-zero
// result-in stream is added on, so encoders can be cascaded.
//
// Reset puts every cell at P0, which represents an all-zero history. Both
// environments must start consistent with that: the data source and the
// result-in source at P phase, the data-out consumer acknowledging P, and
// the result-out consumer acknowledging Q (it is taken to have consumed the
// reset content of the last exclusive-OR cell).
//
// Handshakes:
//  * data_in: present a new item of opposite phase once data_in_ack equals
//    the phase of the current item.
//  * data_out: a new item is present when its phase differs from
//    data_out_ack; acknowledge by setting data_out_ack to its phase.
//  * result_in: present a new item of opposite phase once result_in_ack
//    differs from the phase of the current item (inverted convention).
//  * result_out: a new item is present when its phase equals result_out_ack;
//    acknowledge by inverting result_out_ack (inverted convention).
// The default size and coefficients are this design's choice; the document
// gives the structure of the chain but no length or polynomial.
module fs_conv_encoder
  import fs_pkg::*;
#(
  parameter int         N    = 8,
  parameter logic [N-1:0] COEF = N'(8'b1011_0001)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0][1:0]      fire,
  input  fault_t [N-1:0][1:0]    fault,
  input  fs_t                    data_in,
  output logic                   data_in_ack,
  output fs_t                    data_out,
  input  logic                   data_out_ack,
  input  fs_t                    result_in,
  output logic                   result_in_ack,
  output fs_t                    result_out,
  input  logic                   result_out_ack
);

  fs_t  d    [N+1];   // d[k]: data into element k
  logic dack [N+1];   // dack[k]: ack to whoever drives d[k]
  fs_t  r    [N+1];   // r[k]: result out of element k (r[N] = result_in)
  logic rack [N+1];   // rack[k]: ack to whoever drives r[k]

  assign d[0]   = data_in;
  assign r[N]   = result_in;
  assign dack[N] = data_out_ack;
  assign rack[0] = result_out_ack;

  for (genvar k = 0; k < N; k++) begin : g_elem
    fs_conv_elem #(.COEF(COEF[k])) u_elem (
      .clk       (clk),
      .rst_n     (rst_n),
      .fire      (fire[k]),
      .fault     (fault[k]),
      .d_in      (d[k]),
      .d_in_ack  (dack[k]),
      .d_out     (d[k+1]),
      .d_out_ack (dack[k+1]),
      .r_in      (r[k+1]),
      .r_in_ack  (rack[k+1]),
      .r_out     (r[k]),
      .r_out_ack (rack[k])
    );
  end

  assign data_in_ack   = dack[0];
  assign data_out      = d[N];
  assign result_in_ack = rack[N];
  assign result_out    = r[0];

endmodule
