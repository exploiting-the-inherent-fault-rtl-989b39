// tb_fs_shift_reg: four-state shift register.
//
//  1. Latency: with every cell firing each cycle an item needs one cycle per
//     cell to cross an empty register.
//  2. Capacity: with the output never acknowledged the register accepts
//     exactly one item per cell.
//  3. Streaming: random data, random cell firing and a randomly stalling
//     source and sink; the output stream must equal the input stream.
//  4. Soft error (slip): the register is filled with P1 Q1 P0 Q0 P1 Q1, the
//     parity of the third cell is flipped, and the register must pass
//     through P1 P1 P1 Q0 P1 Q1; two items are then lost without any sign.
//  5. Hard error (stick): with the data wire of the fifth cell stuck at 0
//     the register delivers the items before the first 1 and then stops.
//  6. The same fault step by step: the full register P1 Q0 P0 Q0 P0 Q0 is
//     drained and must end as P1 P1 P1 P1 Q0 Q0.
//  7. Throughput at full speed: one item every 2 cycles.
module tb_fs_shift_reg;
  import fs_pkg::*;

  localparam int S = 6;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [S-1:0]     fire;
  fault_t [S-1:0]   fault;
  fs_t              src, out;
  logic             in_ack, out_ack;
  int               checks = 0;
  int               failures = 0;

  // environment
  logic             src_en, sink_en, rnd_env, rnd_fire;
  int               xs[$];
  int               got[$];
  int               idx;
  longint           cyc = 0;
  longint           t_src, t_out;
  longint           t_rate;

  always #5 clk = ~clk;

  fs_shift_reg #(.STAGES(S)) dut (.clk, .rst_n, .fire, .fault, .in(src), .in_ack, .out, .out_ack);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && src_en && (!rnd_env || $urandom_range(1, 0) == 1) &&
        in_ack == fs_phase(src) && idx < xs.size()) begin
      src   <= fs_encode(~fs_phase(src), xs[idx][0]);
      idx   <= idx + 1;
      t_src <= cyc;
    end
    if (rst_n && sink_en && (!rnd_env || $urandom_range(1, 0) == 1) && fs_phase(out) != out_ack) begin
      out_ack <= fs_phase(out);
      got.push_back(int'(fs_data(out)));
      t_out   <= cyc;
    end
    fire <= rnd_fire ? S'($urandom) : '1;
  end

  task automatic check(input string what, input longint g, input longint e);
    checks++;
    if (g != e) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, g, e);
    end
  endtask

  task automatic restart();
    rst_n = 1'b0; src_en = 0; sink_en = 0;
    src = FS_P0; out_ack = 1'b0; idx = 0; xs.delete(); got.delete(); fault = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  task automatic check_cells(input string what, input fs_t e [S]);
    for (int i = 0; i < S; i++) check($sformatf("%s cell %0d", what, i), dut.stage_q[i], e[i]);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fs_t e [S];
    rnd_env = 0; rnd_fire = 0; fire = '1;
    restart();

    // 1. latency
    xs.push_back(1); sink_en = 1; src_en = 1;
    repeat (20) @(posedge clk);
    #1;
    // one cycle per cell, plus the edge at which the sink takes the item
    check("latency (cycles)", t_out - t_src, S + 1);
    check("latency item", got.size(), 1);

    // 2. capacity
    restart();
    for (int i = 0; i < 20; i++) xs.push_back(i % 2);
    src_en = 1;
    repeat (40) @(posedge clk);
    #1;
    check("capacity", (in_ack == fs_phase(src)) ? idx : idx - 1, S);

    // 3. random streaming
    restart();
    rnd_env = 1; rnd_fire = 1;
    for (int i = 0; i < 300; i++) xs.push_back(int'($urandom_range(1, 0)));
    src_en = 1; sink_en = 1;
    repeat (4000) @(posedge clk);
    #1;
    check("stream count", got.size(), xs.size());
    for (int i = 0; i < got.size() && i < xs.size(); i++) check($sformatf("stream %0d", i), got[i], xs[i]);
    rnd_env = 0; rnd_fire = 0;

    // 4. soft error: slip
    restart();
    xs = '{1, 1, 0, 0, 1, 1};
    src_en = 1;
    repeat (20) @(posedge clk);
    #1;
    e = '{FS_P1, FS_Q1, FS_P0, FS_Q0, FS_P1, FS_Q1};
    check_cells("slip I", e);
    @(negedge clk) fault[2].flip = 2'b10;
    @(negedge clk) fault[2].flip = 2'b00;
    e = '{FS_P1, FS_Q1, FS_Q0, FS_Q0, FS_P1, FS_Q1};
    check_cells("slip II", e);
    repeat (10) @(posedge clk);
    #1;
    e = '{FS_P1, FS_P1, FS_P1, FS_Q0, FS_P1, FS_Q1};
    check_cells("slip IV", e);
    sink_en = 1;
    repeat (30) @(posedge clk);
    #1;
    check("slip delivered", got.size(), 4);
    if (got.size() == 4) begin
      check("slip d0", got[0], 1); check("slip d1", got[1], 1);
      check("slip d2", got[2], 0); check("slip d3", got[3], 1);
    end

    // 6. hard error, step by step: a full register P1 Q0 P0 Q0 P0 Q0 whose
    //    fifth cell has its data wire stuck at 0 is drained; the 1 cannot
    //    pass the faulty cell and the register ends as P1 P1 P1 P1 Q0 Q0.
    restart();
    fault[4].stuck_en = 2'b01; fault[4].stuck_val = 2'b00;
    xs = '{0, 0, 0, 0, 0, 1};
    src_en = 1;
    repeat (20) @(posedge clk);
    #1;
    e = '{FS_P1, FS_Q0, FS_P0, FS_Q0, FS_P0, FS_Q0};
    check_cells("stick I", e);
    sink_en = 1;
    repeat (30) @(posedge clk);
    #1;
    e = '{FS_P1, FS_P1, FS_P1, FS_P1, FS_Q0, FS_Q0};
    check_cells("stick V", e);
    check("stick V delivered", got.size(), 5);
    sink_en = 0;

    // 7. throughput: with every cell firing and the environment always
    //    ready, one item leaves every 2 cycles (each link needs a request
    //    and an acknowledgement).
    restart();
    for (int i = 0; i < 100; i++) xs.push_back(i % 2);
    src_en = 1; sink_en = 1;
    wait (got.size() == 20);
    t_rate = cyc;
    wait (got.size() == 80);
    #1;
    check("cycles per item", (cyc - t_rate) / 60, 2);
    check("steady rate", (cyc - t_rate) % 60, 0);

    // 5. hard error: stick
    restart();
    fault[4].stuck_en = 2'b01; fault[4].stuck_val = 2'b00;
    xs = '{0, 0, 0, 1, 0, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
    src_en = 1; sink_en = 1;
    repeat (100) @(posedge clk);
    #1;
    check("stick delivered", got.size(), 3);
    check("stick no more input", idx < xs.size(), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
