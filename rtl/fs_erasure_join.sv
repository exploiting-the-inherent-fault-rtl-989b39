// fs_erasure_join: joins the outputs of two duplicated four-state copies,
// turning a stuck copy into an erasure and continuing with the other one.
//
// A healthy copy delivers a new output item (a phase transition) within a
// bounded time. A four-state array that has suffered a hard error, or a
// soft error that pushed it into a sticking state, delivers nothing more.
// Duplication plus this time-out is therefore enough to correct one fault:
// the silent copy is an erasure, not an unknown error.
//
// Operation: an item is pending from copy i when its phase shows a new item
// (phase != in_ack for the normal acknowledge convention, phase == in_ack
// for the inverted one, ACK_INVERT = 1). When every copy that is not erased
// has an item pending and the output register is free (out_ack equals the
// phase of `out`), the item of the lowest-numbered live copy is copied to
// `out` with the opposite phase and in_ack toggles, acknowledging both
// copies. If the two live items differ in data, `mismatch` pulses: with two
// copies that is detection only. While some live copy has an item pending
// and another live copy does not, a counter runs; after TIMEOUT cycles
// `miss` pulses for each live copy that is still silent, and the owner of
// `erased` is expected to mark it. Two erased copies stop the join.
//
// The time-out length, the choice of copy 0 on a tie, and the mismatch flag
// are this design's choices; the document states the idea (a copy that
// stops acts as an erasure, so two copies suffice) without a circuit.
// Output convention: the normal D-cell convention on `out`/`out_ack`.
// Latency: one clock from the last pending input to `out`.
module fs_erasure_join
  import fs_pkg::*;
#(
  parameter bit ACK_INVERT = 1'b0,
  parameter bit RESET_ACK  = 1'b0,
  parameter int TIMEOUT    = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fs_t [1:0]  in,
  output logic       in_ack,
  input  logic [1:0] erased,
  output fs_t        out,
  input  logic       out_ack,
  output logic [1:0] miss,
  output logic       mismatch
);

  localparam int CW = $clog2(TIMEOUT + 1);

  logic          ackr;
  fs_t           out_q;
  logic [CW-1:0] cnt;
  logic [1:0]    pending;
  logic [1:0]    live;
  logic [1:0]    have;
  logic          out_free;
  logic          go;
  logic          waiting;
  fs_t           sel;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      pending[i] = ACK_INVERT ? (fs_phase(in[i]) == ackr) : (fs_phase(in[i]) != ackr);
    end
  end

  assign live     = ~erased;
  assign have     = pending & live;
  assign out_free = (out_ack == fs_phase(out_q));
  assign go       = out_free && (live != 2'b00) && (have == live);
  assign waiting  = (have != 2'b00) && (have != live);
  assign sel      = live[0] ? in[0] : in[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ackr     <= RESET_ACK;
      out_q    <= FS_P0;
      cnt      <= '0;
      miss     <= 2'b00;
      mismatch <= 1'b0;
    end else begin
      miss     <= 2'b00;
      mismatch <= 1'b0;
      if (go) begin
        out_q    <= fs_encode(~fs_phase(out_q), fs_data(sel));
        ackr     <= ~ackr;
        mismatch <= (live == 2'b11) && (fs_data(in[0]) != fs_data(in[1]));
      end
      if (!waiting) begin
        cnt <= '0;
      end else if (cnt == CW'(TIMEOUT - 1)) begin
        cnt  <= '0;
        miss <= live & ~pending;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign in_ack = ackr;
  assign out    = out_q;

endmodule
