// tb_fs_dcell: exhaustive check of the four-state D-cell.
//
// For every stored state, input code and acknowledgement phase the cell is
// fired once and its new state is compared with the eight-row D-cell truth
// table, written out below row by row (rows not listed leave the state
// unchanged). The same is done with fire low (no change allowed), for a
// two-acknowledgement cell (it may take its input only if the input phase
// differs from both acknowledgements), and for the fault inputs (a soft
// error flips stored bits, a hard error forces output wires).
module tb_fs_dcell;
  import fs_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       fire1, fire2;
  fs_t        in1, in2, out1, out2;
  logic       ack1;
  logic [1:0] ack2;
  fault_t     f1, f2;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  fs_dcell #(.N_ACK(1)) dut1 (.clk, .rst_n, .fire(fire1), .in(in1), .ack(ack1), .fault(f1), .out(out1));
  fs_dcell #(.N_ACK(2)) dut2 (.clk, .rst_n, .fire(fire2), .in(in2), .ack(ack2), .fault(f2), .out(out2));

  // Truth table rows: returns 1 and the new output for a listed row.
  function automatic logic row(input fs_t in, input logic ack, output fs_t o);
    o = in;
    case ({in, ack})
      {2'b00, 1'b1}: return 1'b1;   // P0, ack Q -> P0
      {2'b01, 1'b0}: return 1'b1;   // Q1, ack P -> Q1
      {2'b10, 1'b0}: return 1'b1;   // Q0, ack P -> Q0
      {2'b11, 1'b1}: return 1'b1;   // P1, ack Q -> P1
      default:       return 1'b0;   // no change
    endcase
  endfunction

  task automatic check(input string what, input fs_t got, input fs_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Load a state into cell 1 through its own input.
  task automatic load1(input fs_t s);
    in1 = s; ack1 = ~fs_phase(s); fire1 = 1'b1;
    @(posedge clk); #1;
    fire1 = 1'b0;
  endtask

  task automatic load2(input fs_t s);
    in2 = s; ack2 = {2{~fs_phase(s)}}; fire2 = 1'b1;
    @(posedge clk); #1;
    fire2 = 1'b0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fs_t e;
    fire1 = 0; fire2 = 0; in1 = '0; in2 = '0; ack1 = 0; ack2 = '0; f1 = '0; f2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset", out1, FS_P0);

    // Single acknowledgement: the document's table.
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 4; i++)
        for (int a = 0; a < 2; a++)
          for (int fr = 0; fr < 2; fr++) begin
            load1(fs_t'(s));
            check("load", out1, fs_t'(s));
            in1 = fs_t'(i); ack1 = a[0]; fire1 = fr[0];
            @(posedge clk); #1;
            fire1 = 1'b0;
            if (!(fr[0] && row(fs_t'(i), a[0], e))) e = fs_t'(s);
            check($sformatf("s=%0d in=%0d ack=%0d fire=%0d", s, i, a, fr), out1, e);
          end

    // Two acknowledgements: take only if both differ from the input phase.
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 4; i++)
        for (int a = 0; a < 4; a++) begin
          load2(fs_t'(s));
          in2 = fs_t'(i); ack2 = a[1:0]; fire2 = 1'b1;
          @(posedge clk); #1;
          fire2 = 1'b0;
          e = (ack2 == {2{~fs_phase(fs_t'(i))}}) ? fs_t'(i) : fs_t'(s);
          check($sformatf("2ack s=%0d in=%0d ack=%0d", s, i, a), out2, e);
        end

    // Soft error: a flip changes the stored state (and with it the phase).
    load1(FS_Q1);
    f1.flip = 2'b10; @(posedge clk); #1; f1.flip = 2'b00;
    check("flip parity", out1, FS_P1);
    @(posedge clk); #1;
    check("flip persists", out1, FS_P1);
    // Hard error: data wire stuck at 0 while P1 is stored reads as Q0.
    f1.stuck_en = 2'b01; f1.stuck_val = 2'b00; #1;
    check("stuck data", out1, FS_Q0);
    f1 = '0; #1;
    check("stuck released", out1, FS_P1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
