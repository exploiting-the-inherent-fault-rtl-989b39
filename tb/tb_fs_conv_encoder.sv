// tb_fs_conv_encoder: four-state convolutional encoder at its default size.
//
// An environment drives the four handshakes: a data source, a result-in
// source (inverted acknowledge convention), a data-out sink and a
// result-out sink (inverted convention). The expected result stream is
// computed here from the definition of a polynomial multiplier:
//     r[t] = XOR_k COEF[k] & x[t-k]  XOR  rin[t-N+1]
// where x[t<0] = 0 and rin[0] = 0 is the item the last cell takes at reset.
//  1. Streaming with random data, random result-in, random cell firing and a
//     randomly stalling environment: results and data-out must be exact.
//  2. Full speed (every cell every cycle, environment always ready): one
//     result every 2 cycles, steadily.
//  3. Soft errors: in each of many runs one bit of one random cell of an
//     interior element (not the first or last, whose cells also talk to the
//     single-link environment, which can slip like a shift register) is
//     flipped at a random time. The encoder must never slip: either it
//     accepts every input and delivers every result, or it sticks, and then
//     it also stops accepting input. Runs that end stuck are counted.
module tb_fs_conv_encoder;
  import fs_pkg::*;

  localparam int           N    = 8;
  localparam logic [N-1:0] COEF = 8'b1011_0001;   // the module's default

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [N-1:0][1:0]    fire;
  fault_t [N-1:0][1:0]  fault;
  fs_t                  dsrc, rsrc, dout, rout;
  logic                 dsrc_ack, rsrc_ack, dout_ack, rout_ack;
  int                   checks = 0;
  int                   failures = 0;

  logic   run_en, rnd_env, rnd_fire;
  int     xs[$], rins[$], got_r[$], got_d[$];
  int     ix, ir;
  longint cyc = 0, t_last_r;

  always #5 clk = ~clk;

  fs_conv_encoder dut (
    .clk, .rst_n, .fire, .fault,
    .data_in (dsrc), .data_in_ack (dsrc_ack), .data_out (dout), .data_out_ack (dout_ack),
    .result_in (rsrc), .result_in_ack (rsrc_ack), .result_out (rout), .result_out_ack (rout_ack)
  );

  function automatic logic coin();
    return !rnd_env || ($urandom_range(3, 0) != 0);
  endfunction

  always @(posedge clk) begin
    cyc  <= cyc + 1;
    fire <= rnd_fire ? {$urandom, $urandom} : '1;
    if (rst_n && run_en) begin
      if (coin() && dsrc_ack == fs_phase(dsrc) && ix < xs.size()) begin
        dsrc <= fs_encode(~fs_phase(dsrc), xs[ix][0]);
        ix   <= ix + 1;
      end
      if (coin() && rsrc_ack != fs_phase(rsrc) && ir < rins.size()) begin
        rsrc <= fs_encode(~fs_phase(rsrc), rins[ir][0]);
        ir   <= ir + 1;
      end
      if (coin() && fs_phase(dout) != dout_ack) begin
        dout_ack <= fs_phase(dout);
        got_d.push_back(int'(fs_data(dout)));
      end
      if (coin() && fs_phase(rout) == rout_ack) begin
        rout_ack <= ~rout_ack;
        got_r.push_back(int'(fs_data(rout)));
        t_last_r <= cyc;
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

  function automatic int expected(int t);
    int r = 0;
    for (int k = 0; k < N; k++)
      if (COEF[k] && t - k >= 0) r ^= xs[t-k];
    // rins[0] is the reset item of the result-in link
    if (t - N + 1 >= 0) r ^= rins[t-N+1];
    return r;
  endfunction

  task automatic restart(input int n, input logic zero_rin);
    rst_n = 1'b0; run_en = 0;
    dsrc = FS_P0; rsrc = FS_P0; dout_ack = 1'b0; rout_ack = 1'b1;
    ix = 0; ir = 1; fault = '0;
    xs.delete(); rins.delete(); got_r.delete(); got_d.delete();
    rins.push_back(0);
    for (int i = 0; i < n; i++) begin
      xs.push_back(int'($urandom_range(1, 0)));
      rins.push_back(zero_rin ? 0 : int'($urandom_range(1, 0)));
    end
    @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_stuck, n_ok, n_wrong;
    longint t0;
    rnd_env = 1; rnd_fire = 1; fire = '1;

    // 1. random streaming
    restart(300, 1'b0);
    run_en = 1;
    repeat (8000) @(posedge clk);
    #1;
    check("results", got_r.size(), xs.size());
    check("data out", got_d.size(), xs.size());
    for (int t = 0; t < got_r.size() && t < xs.size(); t++) check($sformatf("r[%0d]", t), got_r[t], expected(t));
    for (int t = 0; t < got_d.size() && t < xs.size(); t++) check($sformatf("d[%0d]", t), got_d[t], xs[t]);

    // 2. full speed
    rnd_env = 0; rnd_fire = 0;
    restart(300, 1'b1);
    run_en = 1;
    wait (got_r.size() == 100);
    t0 = cyc;
    wait (got_r.size() == 200);
    $display("full speed: %0d cycles per result", (cyc - t0) / 100);
    check("full speed rate is steady", (cyc - t0) % 100, 0);
    // one result every 2 cycles: each link needs a request and an acknowledgement
    check("full speed cycles per result", (cyc - t0) / 100, 2);
    wait (got_r.size() == 300);
    #1;
    for (int t = 0; t < 300; t++) check($sformatf("fast r[%0d]", t), got_r[t], expected(t));

    // 3. single soft errors
    n_stuck = 0; n_ok = 0; n_wrong = 0;
    for (int run = 0; run < 60; run++) begin
      int kk, which, when;
      logic [1:0] bitm;
      rnd_env = run[0]; rnd_fire = run[1];
      restart(400, 1'b1);
      kk = $urandom_range(N - 2, 1); which = $urandom_range(1, 0);
      when = $urandom_range(150, 5); bitm = ($urandom_range(1, 0) == 1) ? 2'b01 : 2'b10;
      run_en = 1;
      repeat (when) @(negedge clk);
      fault[kk][which].flip = bitm;
      @(negedge clk);
      fault[kk][which].flip = 2'b00;
      repeat (6000) @(posedge clk);
      #1;
      checks++;
      if ((got_r.size() == xs.size()) != (ix == xs.size())) begin
        failures++;
        $display("FAIL run %0d slipped: accepted %0d delivered %0d (cell %0d/%0d bit %b at %0d)", run, ix, got_r.size(), kk, which, bitm, when);
      end
      if (got_r.size() < xs.size()) n_stuck++;
      else begin
        int bad;
        bad = 0;
        for (int t = 0; t < xs.size(); t++) if (got_r[t] != expected(t)) bad++;
        if (bad == 0) n_ok++; else n_wrong++;
      end
    end
    $display("soft errors: %0d stuck, %0d harmless, %0d undetected data error", n_stuck, n_ok, n_wrong);
    check("some soft errors stick", n_stuck > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
