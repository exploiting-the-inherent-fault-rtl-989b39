// tb_fs_debruijn: phase-state diagram of two adjacent elements of the
// fault-resistant encoder.
//
// The encoder (default size) runs with one randomly chosen cell firing per
// cycle, so cells change one at a time, and with a randomly stalling
// environment. The phases of elements 3 and 4 are watched as a window
// "T3 T4 / X3 X4" (top cells / exclusive-OR cells, P or Q). Without errors
// the window must stay in the twelve-state desired loop and use exactly its
// sixteen transitions, listed below; the four sticking states must never
// appear. Then a bit of one window cell is flipped, and the window must end
// in one of the four sticking states or back in the desired loop, never in
// a new loop of its own, while the encoder either keeps delivering every
// result or stops taking input (sticks).
module tb_fs_debruijn;
  import fs_pkg::*;

  localparam int N = 8;
  localparam int K = 3;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic [N-1:0][1:0]    fire;
  fault_t [N-1:0][1:0]  fault;
  fs_t                  dsrc, rsrc, dout, rout;
  logic                 dsrc_ack, rsrc_ack, dout_ack, rout_ack;
  int                   checks = 0;
  int                   failures = 0;
  logic                 run_en = 1'b0;
  int                   n_in = 0, n_out = 0;

  always #5 clk = ~clk;

  fs_conv_encoder dut (
    .clk, .rst_n, .fire, .fault,
    .data_in (dsrc), .data_in_ack (dsrc_ack), .data_out (dout), .data_out_ack (dout_ack),
    .result_in (rsrc), .result_in_ack (rsrc_ack), .result_out (rout), .result_out_ack (rout_ack)
  );

  // window state {T3, T4, X3, X4}, 0 = P, 1 = Q
  logic [3:0] win, prev_win;
  assign win = {fs_phase(dut.g_elem[K].u_elem.top_q), fs_phase(dut.g_elem[K+1].u_elem.top_q),
                fs_phase(dut.g_elem[K].u_elem.xor_q), fs_phase(dut.g_elem[K+1].u_elem.xor_q)};

  function automatic logic [3:0] st(string s);   // "PQ/QQ" -> 4'b0111
    return {s[0] == "Q", s[1] == "Q", s[3] == "Q", s[4] == "Q"};
  endfunction

  string desired_edges [16] = '{
    "PQ/QQ>PP/QQ", "PQ/QQ>PQ/PQ", "PQ/QP>PQ/QQ", "QQ/QQ>PQ/QQ",
    "PQ/PQ>PP/PQ", "PP/QQ>PP/PQ", "PP/PQ>PP/PP", "PP/PQ>QP/PQ",
    "QP/PQ>QP/PP", "PP/PP>QP/PP", "QP/PP>QQ/PP", "QP/PP>QP/QP",
    "QP/QP>QQ/QP", "QQ/PP>QQ/QP", "QQ/QP>PQ/QP", "QQ/QP>QQ/QQ"};
  string sticking [4] = '{"PP/QP", "PQ/PP", "QP/QQ", "QQ/PQ"};

  logic [15:0] edge_ok  [16];   // edge_ok[from][to]
  logic        is_stick [16];
  logic        in_loop  [16];
  int          seen_state [16];
  int          seen_edge  [16][16];
  logic        record = 1'b0;

  always @(posedge clk) begin
    // exactly one cell may act per cycle
    fire <= '0;
    fire[$urandom_range(N - 1, 0)][$urandom_range(1, 0)] <= 1'b1;
    if (rst_n && run_en) begin
      if ($urandom_range(1, 0) == 1 && dsrc_ack == fs_phase(dsrc)) begin
        dsrc <= fs_encode(~fs_phase(dsrc), 1'($urandom));
        n_in <= n_in + 1;
      end
      if ($urandom_range(1, 0) == 1 && rsrc_ack != fs_phase(rsrc)) rsrc <= fs_encode(~fs_phase(rsrc), 1'b0);
      if ($urandom_range(1, 0) == 1 && fs_phase(dout) != dout_ack) dout_ack <= fs_phase(dout);
      if ($urandom_range(1, 0) == 1 && fs_phase(rout) == rout_ack) begin
        rout_ack <= ~rout_ack;
        n_out    <= n_out + 1;
      end
    end
    if (record) begin
      seen_state[win]++;
      if (win != prev_win) seen_edge[prev_win][win]++;
    end
    prev_win <= win;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic restart();
    rst_n = 1'b0; run_en = 1'b0; record = 1'b0;
    dsrc = FS_P0; rsrc = FS_P0; dout_ack = 1'b0; rout_ack = 1'b1; fault = '0;
    foreach (seen_state[i]) seen_state[i] = 0;
    foreach (seen_edge[i, j]) seen_edge[i][j] = 0;
    @(posedge clk); #1;
    rst_n = 1'b1; run_en = 1'b1;
    @(posedge clk); #1;
    record = 1'b1;
  endtask

  initial begin
    int n_states, n_edges, n_stuck_end, n_loop_end;
    foreach (edge_ok[i]) edge_ok[i] = '0;
    foreach (is_stick[i]) begin is_stick[i] = 1'b0; in_loop[i] = 1'b0; end
    foreach (desired_edges[e]) begin
      edge_ok[st(desired_edges[e].substr(0, 4))][st(desired_edges[e].substr(6, 10))] = 1'b1;
      in_loop[st(desired_edges[e].substr(0, 4))] = 1'b1;
    end
    foreach (sticking[s]) is_stick[st(sticking[s])] = 1'b1;
    fire = '0;

    // error free: the desired loop only
    restart();
    repeat (60000) @(posedge clk);
    #1;
    record = 1'b0;
    n_states = 0; n_edges = 0;
    for (int a = 0; a < 16; a++) begin
      checks++;
      if (seen_state[a] != 0 && !in_loop[a]) begin
        failures++;
        $display("FAIL state %b outside the desired loop", a[3:0]);
      end
      if (seen_state[a] != 0) n_states++;
      for (int b = 0; b < 16; b++) begin
        if (seen_edge[a][b] != 0) begin
          checks++;
          if (!edge_ok[a][b]) begin
            failures++;
            $display("FAIL transition %b -> %b not in the diagram", a[3:0], b[3:0]);
          end
          n_edges++;
        end
      end
    end
    $display("desired loop: %0d states, %0d transitions seen", n_states, n_edges);
    if (n_states != 12) begin failures++; $display("FAIL states seen %0d, expected 12", n_states); end
    if (n_edges != 16)  begin failures++; $display("FAIL transitions seen %0d, expected 16", n_edges); end
    checks += 2;

    // single flips in the window
    n_stuck_end = 0; n_loop_end = 0;
    for (int run = 0; run < 40; run++) begin
      int e, w, taken;
      restart();
      repeat ($urandom_range(400, 20)) @(negedge clk);
      e = K + $urandom_range(1, 0); w = $urandom_range(1, 0);
      fault[e][w].flip = ($urandom_range(1, 0) == 1) ? 2'b01 : 2'b10;
      @(negedge clk);
      fault[e][w].flip = 2'b00;
      repeat (3000) @(posedge clk);
      taken = n_in;
      repeat (3000) @(posedge clk);
      #1;
      checks++;
      if (n_in != taken) begin
        // still running: must be back in the desired loop
        if (!in_loop[win]) begin
          failures++;
          $display("FAIL run %0d: running in state %b outside the desired loop", run, win);
        end
        n_loop_end++;
      end else begin
        if (!is_stick[win] && !in_loop[win]) begin
          failures++;
          $display("FAIL run %0d: stopped in unknown state %b", run, win);
        end
        n_stuck_end++;
      end
    end
    $display("window flips: %0d stuck, %0d back in the desired loop", n_stuck_end, n_loop_end);
    checks++;
    if (n_stuck_end == 0) begin failures++; $display("FAIL no flip made the encoder stick"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
