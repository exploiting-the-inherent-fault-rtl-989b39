// tb_fs_xor_pinv: exhaustive check of the parity-inverting exclusive-OR cell.
//
// Every stored state, A code, B code and acknowledgement phase is applied
// with the cell fired once; the new state must match the sixteen rows of
// the parity-inverting exclusive-OR truth table listed below (any other
// combination leaves the state unchanged). Firing with fire low and the
// fault inputs are checked as well.
module tb_fs_xor_pinv;
  import fs_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   fire;
  fs_t    a, b, out;
  logic   ack;
  fault_t f;
  int     checks = 0;
  int     failures = 0;

  always #5 clk = ~clk;

  fs_xor_pinv dut (.clk, .rst_n, .fire, .a, .b, .ack, .fault(f), .out);

  // {A, B, ack} -> output; ack 0 = P, 1 = Q.
  function automatic logic row(input fs_t ia, input fs_t ib, input logic k, output fs_t o);
    o = '0;
    case ({ia, ib, k})
      {2'b00, 2'b10, 1'b0}: o = 2'b00;
      {2'b00, 2'b01, 1'b0}: o = 2'b11;
      {2'b01, 2'b11, 1'b1}: o = 2'b10;
      {2'b01, 2'b00, 1'b1}: o = 2'b01;
      {2'b10, 2'b11, 1'b1}: o = 2'b01;
      {2'b10, 2'b00, 1'b1}: o = 2'b10;
      {2'b11, 2'b10, 1'b0}: o = 2'b11;
      {2'b11, 2'b01, 1'b0}: o = 2'b00;
      default: return 1'b0;
    endcase
    return 1'b1;
  endfunction

  task automatic check(input string what, input fs_t got, input fs_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Load state s through the row that produces it.
  task automatic load(input fs_t s);
    fs_t o;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 2; k++)
          if (row(fs_t'(i), fs_t'(j), k[0], o) && o == s) begin
            a = fs_t'(i); b = fs_t'(j); ack = k[0];
          end
    fire = 1'b1;
    @(posedge clk); #1;
    fire = 1'b0;
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
    fire = 0; a = '0; b = '0; ack = 0; f = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset", out, FS_P0);
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int k = 0; k < 2; k++)
            for (int fr = 0; fr < 2; fr++) begin
              load(fs_t'(s));
              check("load", out, fs_t'(s));
              a = fs_t'(i); b = fs_t'(j); ack = k[0]; fire = fr[0];
              @(posedge clk); #1;
              fire = 1'b0;
              if (!(fr[0] && row(fs_t'(i), fs_t'(j), k[0], e))) e = fs_t'(s);
              check($sformatf("s=%0d a=%0d b=%0d ack=%0d fire=%0d", s, i, j, k, fr), out, e);
            end
    load(FS_Q0);
    f.flip = 2'b01; @(posedge clk); #1; f.flip = 2'b00;
    check("flip data", out, FS_P1);
    f.stuck_en = 2'b10; f.stuck_val = 2'b00; #1;
    check("stuck parity", out, FS_Q1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
