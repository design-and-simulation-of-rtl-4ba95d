// tb_col_compare: self-checking testbench of col_compare.
//
// Sends 200 random 30-byte frame starts (with random gaps in byte_valid).
// In each, zero, one or two received bytes are corrupted at random
// positions; a collision must be reported exactly when a corrupted position
// lies among the first 18 bytes, once per frame, on the clock edge after
// the first corrupted byte.
module tb_col_compare;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       frame_start = 1'b0, byte_valid = 1'b0;
  logic [7:0] tx_byte = '0, rx_byte = '0;
  logic       col_detect;

  int checks = 0, failures = 0;
  int pulses, pulse_at, cyc = 0;
  int n_hit = 0, n_miss = 0;

  col_compare dut (.clk, .rst_n, .frame_start, .byte_valid, .tx_byte, .rx_byte, .col_detect);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    cyc++;
    if (col_detect) begin pulses++; pulse_at = cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad1, bad2, first_bad, first_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 200; f++) begin
      bad1 = (f % 4 == 0) ? -1 : int'($urandom_range(0, 29));
      bad2 = (f % 3 == 0) ? int'($urandom_range(0, 29)) : -1;
      first_bad = -1;
      first_cyc = -1;
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      pulses = 0;
      for (int i = 0; i < 30; i++) begin
        while ($urandom_range(0, 3) == 0) begin byte_valid = 1'b0; @(negedge clk); end
        byte_valid = 1'b1;
        tx_byte = 8'($urandom);
        rx_byte = tx_byte;
        if (i == bad1 || i == bad2) begin
          rx_byte = tx_byte ^ 8'(1 << $urandom_range(0, 7));
          if (first_bad < 0) begin first_bad = i; first_cyc = cyc + 2; end
        end
        @(negedge clk);
      end
      byte_valid = 1'b0;
      repeat (2) @(negedge clk);
      if (first_bad >= 0 && first_bad < 18) begin
        n_hit++;
        check(pulses == 1, $sformatf("frame %0d: %0d reports for a difference at byte %0d", f, pulses, first_bad));
        check(pulse_at == first_cyc, $sformatf("frame %0d: report at cycle %0d, expected %0d", f, pulse_at, first_cyc));
      end else begin
        // a later corruption inside the header still counts
        if ((bad2 >= 0 && bad2 < 18) || (bad1 >= 0 && bad1 < 18)) begin
          n_hit++;
          check(pulses == 1, $sformatf("frame %0d: expected one report", f));
        end else begin
          n_miss++;
          check(pulses == 0, $sformatf("frame %0d: report with no header difference (bad %0d %0d)", f, bad1, bad2));
        end
      end
    end
    check(n_hit > 20 && n_miss > 20, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
