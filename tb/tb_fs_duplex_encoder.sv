// tb_fs_duplex_encoder: duplicated encoder with erasure correction, at its
// default size (8 elements per copy, time-out 64 cycles).
//
// The environment drives all four handshakes with random stalls and random
// cell firing, and the expected result stream is computed here:
//     r[t] = XOR_k COEF[k] & x[t-k]  XOR  rin[t-N+1]   (x[t<0] = 0, rin[0] = 0)
// Runs:
//  * healthy: exact results and data-out, nothing erased, no mismatch;
//  * a hard error (one wire of one random cell stuck at 0, the value it
//    holds after reset) in copy 0, then in
//    copy 1: the faulty copy must be erased, the other one untouched, and
//    every result must still arrive and be correct;
//  * a soft error (one bit of one random interior cell flipped at a random
//    time) in a random copy: every result must arrive, and any wrong result
//    must have been flagged as a mismatch.
module tb_fs_duplex_encoder;
  import fs_pkg::*;

  localparam int           N    = 8;
  localparam logic [N-1:0] COEF = 8'b1011_0001;
  localparam int           NITEMS = 200;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic   [1:0][N-1:0][1:0]    fire;
  fault_t [1:0][N-1:0][1:0]    fault;
  fs_t                         dsrc, rsrc, dout, rout;
  logic                        dsrc_ack, rsrc_ack, dout_ack, rout_ack;
  logic   [1:0]                erased;
  logic                        mismatch_seen;
  int                          checks = 0;
  int                          failures = 0;

  logic run_en;
  int   xs[$], rins[$], got_r[$], got_d[$];
  int   ix, ir;

  always #5 clk = ~clk;

  fs_duplex_encoder dut (
    .clk, .rst_n, .fire, .fault,
    .data_in (dsrc), .data_in_ack (dsrc_ack), .data_out (dout), .data_out_ack (dout_ack),
    .result_in (rsrc), .result_in_ack (rsrc_ack), .result_out (rout), .result_out_ack (rout_ack),
    .erased, .mismatch_seen
  );

  always @(posedge clk) begin
    fire <= {$urandom, $urandom};
    if (rst_n && run_en) begin
      if ($urandom_range(3, 0) != 0 && dsrc_ack == fs_phase(dsrc) && ix < xs.size()) begin
        dsrc <= fs_encode(~fs_phase(dsrc), xs[ix][0]);
        ix   <= ix + 1;
      end
      if ($urandom_range(3, 0) != 0 && rsrc_ack != fs_phase(rsrc) && ir < rins.size()) begin
        rsrc <= fs_encode(~fs_phase(rsrc), rins[ir][0]);
        ir   <= ir + 1;
      end
      if ($urandom_range(3, 0) != 0 && fs_phase(dout) != dout_ack) begin
        dout_ack <= fs_phase(dout);
        got_d.push_back(int'(fs_data(dout)));
      end
      if ($urandom_range(3, 0) != 0 && fs_phase(rout) != rout_ack) begin
        rout_ack <= fs_phase(rout);
        got_r.push_back(int'(fs_data(rout)));
      end
    end
  end

  function automatic void check(input string what, input longint g, input longint e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endfunction

  function automatic int expected(int t);
    int r;
    r = 0;
    for (int k = 0; k < N; k++)
      if (COEF[k] && t - k >= 0) r ^= xs[t-k];
    if (t - N + 1 >= 0) r ^= rins[t-N+1];
    return r;
  endfunction

  task automatic restart();
    rst_n = 1'b0; run_en = 0;
    dsrc = FS_P0; rsrc = FS_P0; dout_ack = 1'b0; rout_ack = 1'b0;
    ix = 0; ir = 1; fault = '0;
    xs.delete(); rins.delete(); got_r.delete(); got_d.delete();
    rins.push_back(0);
    for (int i = 0; i < NITEMS; i++) begin
      xs.push_back(int'($urandom_range(1, 0)));
      rins.push_back(int'($urandom_range(1, 0)));
    end
    @(posedge clk); #1;
    rst_n = 1'b1;
    run_en = 1;
  endtask

  // Counts wrong results; every result and data-out item must be present.
  function automatic int score(string what);
    int bad;
    bad = 0;
    check({what, " results"}, got_r.size(), NITEMS);
    check({what, " data out"}, got_d.size(), NITEMS);
    for (int t = 0; t < got_r.size() && t < NITEMS; t++) if (got_r[t] != expected(t)) bad++;
    for (int t = 0; t < got_d.size() && t < NITEMS; t++) if (got_d[t] != xs[t]) bad++;
    return bad;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_erased, n_flagged, n_soft_stuck;
    run_en = 0;

    restart();
    repeat (5000) @(posedge clk);
    #1;
    check("healthy wrong", score("healthy"), 0);
    check("healthy erased", erased, 2'b00);
    check("healthy mismatch", mismatch_seen, 0);

    n_erased = 0;
    for (int run = 0; run < 8; run++) begin
      int c, k, w;
      logic [1:0] wire_m;
      restart();
      c = run % 2; k = $urandom_range(N - 1, 0); w = $urandom_range(1, 0);
      wire_m = ($urandom_range(1, 0) == 1) ? 2'b01 : 2'b10;
      fault[c][k][w].stuck_en  = wire_m;
      fault[c][k][w].stuck_val = 2'b00;   // agrees with the reset content
      repeat (6000) @(posedge clk);
      #1;
      check($sformatf("hard %0d wrong", run), score($sformatf("hard %0d", run)), 0);
      checks++;
      if (erased[1-c]) begin
        failures++;
        $display("FAIL hard %0d: healthy copy %0d erased", run, 1 - c);
      end
      if (erased[c]) n_erased++;
    end
    $display("hard errors: %0d of 8 faulty copies erased", n_erased);
    check("hard errors cause erasures", n_erased > 0, 1);

    n_flagged = 0; n_soft_stuck = 0;
    for (int run = 0; run < 12; run++) begin
      int c, k, w, when, bad;
      restart();
      c = $urandom_range(1, 0); k = $urandom_range(N - 2, 1); w = $urandom_range(1, 0);
      when = $urandom_range(300, 10);
      repeat (when) @(negedge clk);
      fault[c][k][w].flip = ($urandom_range(1, 0) == 1) ? 2'b01 : 2'b10;
      @(negedge clk);
      fault[c][k][w].flip = 2'b00;
      repeat (6000) @(posedge clk);
      #1;
      bad = score($sformatf("soft %0d", run));
      if (erased[c]) n_soft_stuck++;
      if (mismatch_seen) n_flagged++;
      checks++;
      if (bad != 0 && !mismatch_seen) begin
        failures++;
        $display("FAIL soft %0d: %0d wrong results not flagged", run, bad);
      end
    end
    $display("soft errors: %0d of 12 runs stuck and erased, %0d flagged as mismatch", n_soft_stuck, n_flagged);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
