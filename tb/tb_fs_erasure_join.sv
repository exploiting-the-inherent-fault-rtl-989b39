// tb_fs_erasure_join: the join of two duplicated four-state streams, for
// both acknowledgement conventions (one lane each).
//
// Each lane has two producer models (one per copy) that send the same
// random stream, a sink that stalls at random, and the erased register the
// enclosing design would keep. Scenarios, in order:
//  1. both copies healthy: the output equals the stream, no miss and no
//     mismatch;
//  2. one item of copy 1 is corrupted: mismatch pulses once, copy 0's value
//     is passed on;
//  3. copy 1 stops: miss[1] pulses exactly TIMEOUT + 1 cycles after copy 0
//     presented the item copy 1 never sent, copy 1 is marked erased and the
//     stream completes from copy 0 alone.
module tb_fs_erasure_join;
  import fs_pkg::*;

  localparam int TO = 16;
  localparam int NITEMS = 200;
  localparam int STOP_AT = 120;
  localparam int BAD_AT = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    localparam bit INV = (l == 1);
    fs_t  [1:0] in;
    logic       in_ack;
    logic [1:0] erased, miss;
    fs_t        out;
    logic       out_ack, mismatch;
    int         xs[$], got[$];
    int         ix [2];
    int         n_mm, n_miss, miss_at, stuck_item_at;
    longint     cyc;

    fs_erasure_join #(.ACK_INVERT(INV), .RESET_ACK(INV), .TIMEOUT(TO)) dut (
      .clk, .rst_n, .in, .in_ack, .erased, .out, .out_ack, .miss, .mismatch
    );

    initial for (int i = 0; i < NITEMS; i++) xs.push_back(int'($urandom_range(1, 0)));

    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        in <= '{FS_P0, FS_P0}; ix <= '{0, 0}; erased <= 2'b00; out_ack <= 1'b0;
        n_mm <= 0; n_miss <= 0; cyc <= 0; miss_at <= 0; stuck_item_at <= 0;
      end else begin
        cyc <= cyc + 1;
        for (int c = 0; c < 2; c++) begin
          // consumed: ack equals the item's phase (normal) or differs (inverted)
          if ((in_ack ^ INV) == fs_phase(in[c]) && ix[c] < NITEMS &&
              !(c == 1 && ix[c] >= STOP_AT) && $urandom_range(1, 0) == 1) begin
            in[c] <= fs_encode(~fs_phase(in[c]), xs[ix[c]][0] ^ ((c == 1 && ix[c] == BAD_AT) ? 1'b1 : 1'b0));
            ix[c] <= ix[c] + 1;
            if (c == 0 && ix[c] == STOP_AT) stuck_item_at <= int'(cyc);
          end
        end
        if (fs_phase(out) != out_ack && $urandom_range(2, 0) != 0) begin
          out_ack <= fs_phase(out);
          got.push_back(int'(fs_data(out)));
        end
        if (mismatch) n_mm <= n_mm + 1;
        if (miss != 2'b00) begin
          n_miss  <= n_miss + 1;
          miss_at <= int'(cyc);
        end
        erased <= erased | miss;
      end
    end
  end

  task automatic check(input string what, input longint g, input longint e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5000) @(posedge clk);
    #1;
    check("lane0 count", g_lane[0].got.size(), NITEMS);
    check("lane1 count", g_lane[1].got.size(), NITEMS);
    for (int t = 0; t < NITEMS; t++) begin
      if (t < g_lane[0].got.size()) check($sformatf("lane0 item %0d", t), g_lane[0].got[t], g_lane[0].xs[t]);
      if (t < g_lane[1].got.size()) check($sformatf("lane1 item %0d", t), g_lane[1].got[t], g_lane[1].xs[t]);
    end
    check("lane0 mismatches", g_lane[0].n_mm, 1);
    check("lane1 mismatches", g_lane[1].n_mm, 1);
    check("lane0 misses", g_lane[0].n_miss, 1);
    check("lane1 misses", g_lane[1].n_miss, 1);
    check("lane0 erased", g_lane[0].erased, 2'b10);
    check("lane1 erased", g_lane[1].erased, 2'b10);
    check("lane0 time-out", g_lane[0].miss_at - g_lane[0].stuck_item_at, TO + 1);
    check("lane1 time-out", g_lane[1].miss_at - g_lane[1].stuck_item_at, TO + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
