// tb_fs_conv_elem: one encoder element, with coefficient 1 and with
// coefficient 0 (two lanes side by side).
//
// Each lane has its own environment: a data source, a data-out sink, a
// result-in source (inverted acknowledge convention) and a result-out sink
// (inverted convention), all stalling at random, and random cell firing.
// Expected streams: data-out equals data-in, and result[t] = COEF & x[t]
// XOR rin[t], where rin[0] = 0 is the item the cell takes at reset.
module tb_fs_conv_elem;
  import fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run_en = 1'b0;
  int   lane_checks [2];
  int   lane_fail   [2];
  int   checks = 0;
  int   failures = 0;
  localparam int NITEMS = 300;

  always #5 clk = ~clk;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    localparam bit C = (l == 0);
    logic [1:0]   fire;
    fault_t [1:0] fault;
    fs_t          dsrc, rsrc, dout, rout;
    logic         dsrc_ack, rsrc_ack, dout_ack, rout_ack;
    int           xs[$], rins[$], got_r[$], got_d[$];
    int           ix, ir;

    fs_conv_elem #(.COEF(C)) dut (
      .clk, .rst_n, .fire, .fault,
      .d_in (dsrc), .d_in_ack (dsrc_ack), .d_out (dout), .d_out_ack (dout_ack),
      .r_in (rsrc), .r_in_ack (rsrc_ack), .r_out (rout), .r_out_ack (rout_ack)
    );

    assign fault = '0;

    initial begin
      rins.push_back(0);
      for (int i = 0; i < NITEMS; i++) begin
        xs.push_back(int'($urandom_range(1, 0)));
        rins.push_back(int'($urandom_range(1, 0)));
      end
    end

    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dsrc <= FS_P0; rsrc <= FS_P0; dout_ack <= 1'b0; rout_ack <= 1'b1;
        ix <= 0; ir <= 1; fire <= '1;
      end else begin
        fire <= 2'($urandom);
        if (run_en) begin
          if ($urandom_range(2, 0) != 0 && dsrc_ack == fs_phase(dsrc) && ix < xs.size()) begin
            dsrc <= fs_encode(~fs_phase(dsrc), xs[ix][0]);
            ix   <= ix + 1;
          end
          if ($urandom_range(2, 0) != 0 && rsrc_ack != fs_phase(rsrc) && ir < rins.size()) begin
            rsrc <= fs_encode(~fs_phase(rsrc), rins[ir][0]);
            ir   <= ir + 1;
          end
          if ($urandom_range(2, 0) != 0 && fs_phase(dout) != dout_ack) begin
            dout_ack <= fs_phase(dout);
            got_d.push_back(int'(fs_data(dout)));
          end
          if ($urandom_range(2, 0) != 0 && fs_phase(rout) == rout_ack) begin
            rout_ack <= ~rout_ack;
            got_r.push_back(int'(fs_data(rout)));
          end
        end
      end
    end

    task automatic score();
      int c = 0, f = 0;
      c++; if (got_r.size() != NITEMS) f++;
      c++; if (got_d.size() != NITEMS) f++;
      for (int t = 0; t < got_r.size() && t < NITEMS; t++) begin
        c++;
        if (got_r[t] != ((C ? xs[t] : 0) ^ rins[t])) f++;
      end
      for (int t = 0; t < got_d.size() && t < NITEMS; t++) begin
        c++;
        if (got_d[t] != xs[t]) f++;
      end
      lane_checks[l] = c;
      lane_fail[l]   = f;
    endtask
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_en = 1'b1;
    repeat (10000) @(posedge clk);
    #1;
    g_lane[0].score();
    g_lane[1].score();
    for (int l = 0; l < 2; l++) begin
      checks += lane_checks[l];
      failures += lane_fail[l];
      if (lane_fail[l] != 0) $display("FAIL lane %0d: %0d of %0d checks", l, lane_fail[l], lane_checks[l]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
