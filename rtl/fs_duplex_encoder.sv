// fs_duplex_encoder: two copies of the fault-resistant four-state
// convolutional encoder, arranged so that a single fault is corrected.
//
// Both copies receive the same data and result-in streams. Their
// acknowledgements to those sources are merged by fs_ack_merge, and their
// data and result outputs are joined by fs_erasure_join. A fault in one copy
// makes it stick (the encoder cell arrangement never lets a soft error slip
// items), so its outputs stop; the join notices the silence after TIMEOUT
// cycles, the copy is marked erased for good, and from then on the sources
// and the outputs run with the other copy alone. If both copies keep
// running but disagree, `mismatch_seen` is set (detection only).
//
// The document proposes duplication with erasure correction for
// four-state arrays; the way the copies are joined here is this design's.
//
// Handshakes: data_in and result_in follow fs_conv_encoder (result_in with
// the inverted convention). data_out and result_out both use the normal
// convention: a new item is present when its phase differs from the
// acknowledgement; acknowledge by returning its phase. Reset starts every
// link at P phase, with all-zero history.
module fs_duplex_encoder
  import fs_pkg::*;
#(
  parameter int           N       = 8,
  parameter logic [N-1:0] COEF    = N'(8'b1011_0001),
  parameter int           TIMEOUT = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic   [1:0][N-1:0][1:0]    fire,
  input  fault_t [1:0][N-1:0][1:0]    fault,
  input  fs_t                         data_in,
  output logic                        data_in_ack,
  output fs_t                         data_out,
  input  logic                        data_out_ack,
  input  fs_t                         result_in,
  output logic                        result_in_ack,
  output fs_t                         result_out,
  input  logic                        result_out_ack,
  output logic   [1:0]                erased,
  output logic                        mismatch_seen
);

  logic [1:0] c_data_in_ack;
  fs_t  [1:0] c_data_out;
  logic [1:0] c_result_in_ack;
  fs_t  [1:0] c_result_out;
  logic       join_data_ack;
  logic       join_result_ack;
  logic [1:0] miss_data;
  logic [1:0] miss_result;
  logic       mm_data;
  logic       mm_result;

  for (genvar c = 0; c < 2; c++) begin : g_copy
    fs_conv_encoder #(.N(N), .COEF(COEF)) u_enc (
      .clk            (clk),
      .rst_n          (rst_n),
      .fire           (fire[c]),
      .fault          (fault[c]),
      .data_in        (data_in),
      .data_in_ack    (c_data_in_ack[c]),
      .data_out       (c_data_out[c]),
      .data_out_ack   (join_data_ack),
      .result_in      (result_in),
      .result_in_ack  (c_result_in_ack[c]),
      .result_out     (c_result_out[c]),
      .result_out_ack (join_result_ack)
    );
  end

  fs_ack_merge #(.RESET_ACK(1'b0)) u_merge_data (
    .clk (clk), .rst_n (rst_n), .ack (c_data_in_ack), .erased (erased),
    .ack_out (data_in_ack)
  );

  fs_ack_merge #(.RESET_ACK(1'b0)) u_merge_result (
    .clk (clk), .rst_n (rst_n), .ack (c_result_in_ack), .erased (erased),
    .ack_out (result_in_ack)
  );

  fs_erasure_join #(.ACK_INVERT(1'b0), .RESET_ACK(1'b0), .TIMEOUT(TIMEOUT)) u_join_data (
    .clk (clk), .rst_n (rst_n), .in (c_data_out), .in_ack (join_data_ack),
    .erased (erased), .out (data_out), .out_ack (data_out_ack),
    .miss (miss_data), .mismatch (mm_data)
  );

  // The copies' result rows expect the inverted acknowledgement; after reset
  // the join has taken the reset content of their last cells (ack = Q).
  fs_erasure_join #(.ACK_INVERT(1'b1), .RESET_ACK(1'b1), .TIMEOUT(TIMEOUT)) u_join_result (
    .clk (clk), .rst_n (rst_n), .in (c_result_out), .in_ack (join_result_ack),
    .erased (erased), .out (result_out), .out_ack (result_out_ack),
    .miss (miss_result), .mismatch (mm_result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      erased        <= 2'b00;
      mismatch_seen <= 1'b0;
    end else begin
      erased        <= erased | miss_data | miss_result;
      mismatch_seen <= mismatch_seen | mm_data | mm_result;
    end
  end

endmodule
