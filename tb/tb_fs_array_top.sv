// tb_fs_array_top: end-to-end test of the top level at its default
// parameters (8-element encoder copies, 64-cycle time-out, 6-stage shift
// register), taking the design through every mechanism it has and counting
// how often each one happened:
//   results       encoded results delivered and checked against a
//                 polynomial-multiplier reference
//   backpressure  cycles a presented input waited because the array was
//                 full (the result sink stalls at random)
//   skew          cycles the two copies' input cells held different phases
//                 (the acknowledgement merge waited for the slower copy)
//   hard_erasure  a stuck wire made a copy stick and it was erased, with
//                 all results still correct
//   soft_erasure  a flipped bit made a copy stick and it was erased
//   mismatch      a double flip changed data without breaking the handshake
//                 and the copies' disagreement was flagged
//   sr_stream     shift-register items delivered in order
//   sr_slip       a soft error in the shift register lost items silently
//   sr_stick      a hard error in the shift register stopped it
// A mechanism that never happened counts as a failure.
module tb_fs_array_top;
  import fs_pkg::*;

  localparam int           N    = 8;
  localparam logic [N-1:0] COEF = 8'b1011_0001;
  localparam int           S    = 6;
  localparam int           NITEMS = 150;

  logic                        clk = 1'b0;
  logic                        rst_n = 1'b0;
  logic   [1:0][N-1:0][1:0]    enc_fire;
  fault_t [1:0][N-1:0][1:0]    enc_fault;
  fs_t                         dsrc, rsrc, dout, rout;
  logic                        dsrc_ack, rsrc_ack, dout_ack, rout_ack;
  logic   [1:0]                erased;
  logic                        mismatch_seen;
  logic   [S-1:0]              sr_fire;
  fault_t [S-1:0]              sr_fault;
  fs_t                         sr_src, sr_out;
  logic                        sr_in_ack, sr_out_ack;
  int                          checks = 0;
  int                          failures = 0;

  // environment
  logic run_en, sr_src_en, sr_sink_en;
  int   xs[$], rins[$], got_r[$], got_d[$], sr_xs[$], sr_got[$];
  int   ix, ir, sr_ix;

  // mechanism counters
  int n_results = 0, n_backpressure = 0, n_skew = 0, n_hard_erasure = 0;
  int n_soft_erasure = 0, n_mismatch = 0, n_sr_stream = 0, n_sr_slip = 0, n_sr_stick = 0;

  always #5 clk = ~clk;

  fs_array_top dut (
    .clk, .rst_n,
    .enc_fire, .enc_fault,
    .enc_data_in (dsrc), .enc_data_in_ack (dsrc_ack),
    .enc_data_out (dout), .enc_data_out_ack (dout_ack),
    .enc_result_in (rsrc), .enc_result_in_ack (rsrc_ack),
    .enc_result_out (rout), .enc_result_out_ack (rout_ack),
    .enc_erased (erased), .enc_mismatch_seen (mismatch_seen),
    .sr_fire, .sr_fault, .sr_in (sr_src), .sr_in_ack, .sr_out, .sr_out_ack
  );

  always @(posedge clk) begin
    enc_fire <= {$urandom, $urandom};
    sr_fire  <= '1;
    if (rst_n && run_en) begin
      if (dsrc_ack != fs_phase(dsrc)) n_backpressure++;
        if (dut.u_enc.c_data_in_ack[0] != dut.u_enc.c_data_in_ack[1]) n_skew++;
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
      if ($urandom_range(3, 0) == 0 && fs_phase(rout) != rout_ack) begin
        rout_ack <= fs_phase(rout);
        got_r.push_back(int'(fs_data(rout)));
      end
    end
    if (rst_n && sr_src_en && sr_in_ack == fs_phase(sr_src) && sr_ix < sr_xs.size()) begin
      sr_src <= fs_encode(~fs_phase(sr_src), sr_xs[sr_ix][0]);
      sr_ix  <= sr_ix + 1;
    end
    if (rst_n && sr_sink_en && fs_phase(sr_out) != sr_out_ack) begin
      sr_out_ack <= fs_phase(sr_out);
      sr_got.push_back(int'(fs_data(sr_out)));
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

  function automatic int wrong_results();
    int bad;
    bad = 0;
    check("result count", got_r.size(), NITEMS);
    check("data-out count", got_d.size(), NITEMS);
    for (int t = 0; t < got_r.size() && t < NITEMS; t++) if (got_r[t] != expected(t)) bad++;
    for (int t = 0; t < got_d.size() && t < NITEMS; t++) if (got_d[t] != xs[t]) bad++;
    return bad;
  endfunction

  task automatic restart();
    rst_n = 1'b0; run_en = 0; sr_src_en = 0; sr_sink_en = 0;
    dsrc = FS_P0; rsrc = FS_P0; dout_ack = 1'b0; rout_ack = 1'b0;
    sr_src = FS_P0; sr_out_ack = 1'b0;
    ix = 0; ir = 1; sr_ix = 0; enc_fault = '0; sr_fault = '0;
    xs.delete(); rins.delete(); got_r.delete(); got_d.delete(); sr_xs.delete(); sr_got.delete();
    rins.push_back(0);
    for (int i = 0; i < NITEMS; i++) begin
      xs.push_back(int'($urandom_range(1, 0)));
      rins.push_back(int'($urandom_range(1, 0)));
    end
    @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    fs_t e [S];

    // healthy encoder
    restart();
    run_en = 1;
    repeat (6000) @(posedge clk);
    #1;
    check("healthy wrong results", wrong_results(), 0);
    check("healthy erased", erased, 0);
    n_results += got_r.size();

    // hard error in each copy
    for (int c = 0; c < 2; c++) begin
      restart();
      // exclusive-OR cell of element 3, data wire stuck at 0 (agrees with
      // the reset content, so the cell sticks at the first item that needs a 1)
      enc_fault[c][3][1].stuck_en  = 2'b01;
      enc_fault[c][3][1].stuck_val = 2'b00;
      run_en = 1;
      repeat (6000) @(posedge clk);
      #1;
      check($sformatf("hard copy %0d wrong results", c), wrong_results(), 0);
      check($sformatf("hard copy %0d erased", c), erased, 2'b01 << c);
      if (erased == (2'b01 << c)) n_hard_erasure++;
      n_results += got_r.size();
    end

    // soft errors until one sticks
    for (int run = 0; run < 30 && n_soft_erasure == 0; run++) begin
      int c, k, w;
      restart();
      run_en = 1;
      c = $urandom_range(1, 0); k = $urandom_range(N - 2, 1); w = $urandom_range(1, 0);
      repeat ($urandom_range(200, 10)) @(negedge clk);
      enc_fault[c][k][w].flip = ($urandom_range(1, 0) == 1) ? 2'b01 : 2'b10;
      @(negedge clk);
      enc_fault[c][k][w].flip = 2'b00;
      repeat (6000) @(posedge clk);
      #1;
      bad = wrong_results();
      check("soft: wrong results are flagged", (bad == 0) || mismatch_seen, 1);
      if (erased != 2'b00) n_soft_erasure++;
      n_results += got_r.size();
    end

    // double flips (data changes, phase kept) until the copies disagree
    for (int run = 0; run < 30 && n_mismatch == 0; run++) begin
      restart();
      run_en = 1;
      repeat ($urandom_range(200, 10)) @(negedge clk);
      enc_fault[1][$urandom_range(N - 1, 0)][1].flip = 2'b11;
      @(negedge clk);
      enc_fault = '0;
      repeat (6000) @(posedge clk);
      #1;
      bad = wrong_results();
      check("double flip: output complete and copy 0 kept", bad, 0);
      if (mismatch_seen) n_mismatch++;
      n_results += got_r.size();
    end

    // shift register: stream
    restart();
    for (int i = 0; i < 40; i++) sr_xs.push_back(int'($urandom_range(1, 0)));
    sr_src_en = 1; sr_sink_en = 1;
    repeat (400) @(posedge clk);
    #1;
    check("sr stream count", sr_got.size(), 40);
    for (int i = 0; i < sr_got.size() && i < 40; i++) check("sr stream item", sr_got[i], sr_xs[i]);
    n_sr_stream += sr_got.size();

    // shift register: slip after a parity flip in the third cell
    restart();
    sr_xs = '{1, 1, 0, 0, 1, 1};
    sr_src_en = 1;
    repeat (20) @(posedge clk);
    @(negedge clk) sr_fault[2].flip = 2'b10;
    @(negedge clk) sr_fault[2].flip = 2'b00;
    repeat (10) @(posedge clk);
    sr_sink_en = 1;
    repeat (40) @(posedge clk);
    #1;
    check("sr slip delivered", sr_got.size(), 4);
    if (sr_got.size() == 4 && sr_ix == 6) n_sr_slip++;

    // shift register: stick on a stuck data wire
    restart();
    sr_fault[4].stuck_en = 2'b01;
    for (int i = 0; i < 30; i++) sr_xs.push_back((i == 5) ? 1 : 0);
    sr_src_en = 1; sr_sink_en = 1;
    repeat (300) @(posedge clk);
    #1;
    check("sr stick delivered", sr_got.size(), 5);
    if (sr_got.size() == 5 && sr_ix < 30) n_sr_stick++;

    $display("mechanisms: results=%0d backpressure=%0d skew=%0d hard_erasure=%0d soft_erasure=%0d mismatch=%0d sr_stream=%0d sr_slip=%0d sr_stick=%0d",
             n_results, n_backpressure, n_skew, n_hard_erasure, n_soft_erasure, n_mismatch,
             n_sr_stream, n_sr_slip, n_sr_stick);
    check("results happened", n_results > 0, 1);
    check("backpressure happened", n_backpressure > 0, 1);
    check("skew happened", n_skew > 0, 1);
    check("hard erasures", n_hard_erasure, 2);
    check("soft erasure happened", n_soft_erasure > 0, 1);
    check("mismatch happened", n_mismatch > 0, 1);
    check("sr stream happened", n_sr_stream > 0, 1);
    check("sr slip happened", n_sr_slip, 1);
    check("sr stick happened", n_sr_stick, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
