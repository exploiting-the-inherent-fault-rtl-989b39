// fs_array_top: the four-state asynchronous arrays side by side.
//
//  * A fault-tolerant convolutional encoder: two copies of the
//    phase-inverting (fault-resistant) four-state encoder with erasure
//    correction (fs_duplex_encoder). Ports enc_*.
//  * The four-state shift register used to introduce the coding and its
//    responses to hard and soft errors (fs_shift_reg). Ports sr_*.
//
// The two share only clock and reset. Every cell has a `fire` strobe (hold
// high to let all enabled cells act each cycle, or drive random bits to
// emulate arbitrary cell delays) and a fault record for error injection;
// tie the fault inputs to zero in normal use. Handshake conventions are
// described in fs_duplex_encoder and fs_shift_reg.
module fs_array_top
  import fs_pkg::*;
#(
  parameter int           N         = 8,
  parameter logic [N-1:0] COEF      = N'(8'b1011_0001),
  parameter int           TIMEOUT   = 64,
  parameter int           SR_STAGES = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // fault-tolerant encoder
  input  logic   [1:0][N-1:0][1:0]    enc_fire,
  input  fault_t [1:0][N-1:0][1:0]    enc_fault,
  input  fs_t                         enc_data_in,
  output logic                        enc_data_in_ack,
  output fs_t                         enc_data_out,
  input  logic                        enc_data_out_ack,
  input  fs_t                         enc_result_in,
  output logic                        enc_result_in_ack,
  output fs_t                         enc_result_out,
  input  logic                        enc_result_out_ack,
  output logic   [1:0]                enc_erased,
  output logic                        enc_mismatch_seen,
  // shift register
  input  logic   [SR_STAGES-1:0]      sr_fire,
  input  fault_t [SR_STAGES-1:0]      sr_fault,
  input  fs_t                         sr_in,
  output logic                        sr_in_ack,
  output fs_t                         sr_out,
  input  logic                        sr_out_ack
);

  fs_duplex_encoder #(.N(N), .COEF(COEF), .TIMEOUT(TIMEOUT)) u_enc (
    .clk            (clk),
    .rst_n          (rst_n),
    .fire           (enc_fire),
    .fault          (enc_fault),
    .data_in        (enc_data_in),
    .data_in_ack    (enc_data_in_ack),
    .data_out       (enc_data_out),
    .data_out_ack   (enc_data_out_ack),
    .result_in      (enc_result_in),
    .result_in_ack  (enc_result_in_ack),
    .result_out     (enc_result_out),
    .result_out_ack (enc_result_out_ack),
    .erased         (enc_erased),
    .mismatch_seen  (enc_mismatch_seen)
  );

  fs_shift_reg #(.STAGES(SR_STAGES)) u_sr (
    .clk     (clk),
    .rst_n   (rst_n),
    .fire    (sr_fire),
    .fault   (sr_fault),
    .in      (sr_in),
    .in_ack  (sr_in_ack),
    .out     (sr_out),
    .out_ack (sr_out_ack)
  );

endmodule
