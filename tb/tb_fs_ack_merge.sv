// tb_fs_ack_merge: random acknowledgement and erasure patterns against a
// reference model of a C-element with bypass: the output follows the two
// acknowledgements when they agree and holds while they differ, and with
// exactly one copy erased it follows the other copy at once.
module tb_fs_ack_merge;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] ack, erased;
  logic       ack_out;
  logic       held_ref;
  logic       exp_out;
  int         checks = 0;
  int         failures = 0;
  int         n_hold = 0;
  int         n_bypass = 0;

  always #5 clk = ~clk;

  fs_ack_merge #(.RESET_ACK(1'b0)) dut (.clk, .rst_n, .ack, .erased, .ack_out);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ack = 2'b00; erased = 2'b00; held_ref = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ack = 2'($urandom);
      erased = ($urandom_range(3, 0) == 0) ? 2'($urandom) : 2'b00;
      #1;
      if (erased == 2'b01)      begin exp_out = ack[1]; n_bypass++; end
      else if (erased == 2'b10) begin exp_out = ack[0]; n_bypass++; end
      else if (ack[0] == ack[1]) exp_out = ack[0];
      else begin exp_out = held_ref; n_hold++; end
      checks++;
      if (ack_out !== exp_out) begin
        failures++;
        $display("FAIL ack=%b erased=%b held=%b: got %b", ack, erased, held_ref, ack_out);
      end
      @(posedge clk);
      held_ref = exp_out;
    end
    checks++;
    if (n_hold == 0 || n_bypass == 0) begin
      failures++;
      $display("FAIL coverage hold=%0d bypass=%0d", n_hold, n_bypass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
