// tb_prng: self-checking testbench of prng.
//
// Runs the generator many times for three source addresses (one of them
// all-zero) and checks each result against a reference 48-bit LFSR
// (feedback from bits 48, 47, 21, 20; loaded with SA at the first run; 16
// steps per run; result modulo 3) kept in the testbench; checks that prng_complete comes exactly 16 clock edges after
// prng_on is sampled, that a prng_on during a run is ignored, that every
// value is 0..2, that all three values occur and that two addresses give
// different sequences.
module tb_prng;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [47:0] sa;
  logic        prng_on = 1'b0;
  logic [1:0]  prng_value;
  logic        prng_complete;

  int checks = 0, failures = 0;

  prng dut (.clk, .rst_n, .sa, .prng_on, .prng_value, .prng_complete);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [47:0] ref_lfsr;
  bit          ref_seeded;

  function automatic logic [47:0] step(logic [47:0] v);
    logic fb;
    fb = v[47] ^ v[46] ^ v[20] ^ v[19];
    return {v[46:0], fb};
  endfunction

  // one run of the reference model; returns the expected slot
  function automatic int ref_run(logic [47:0] a);
    logic [47:0] v;
    if (!ref_seeded) begin
      ref_lfsr   = (a == 0) ? 48'd1 : a;
      ref_seeded = 1'b1;
    end
    v = ref_lfsr;
    for (int i = 0; i < 16; i++) v = step(v);
    ref_lfsr = v;
    return int'(v % 48'd3);
  endfunction

  int seq_a[$], seq_b[$], seq_c[$];
  int hist[3];

  task automatic runs(input logic [47:0] a, input int n, ref int seq[$]);
    int exp_v, waited;
    sa = a;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ref_seeded = 1'b0;
    for (int r = 0; r < n; r++) begin
      @(negedge clk);
      prng_on = 1'b1;
      @(negedge clk);
      prng_on = 1'b0;
      waited = 1;
      if (r == 3) begin            // a second request during the run is ignored
        prng_on = 1'b1;
        @(negedge clk);
        prng_on = 1'b0;
        waited++;
      end
      while (!prng_complete && waited < 100) begin @(negedge clk); waited++; end
      exp_v = ref_run(a);
      check(waited - 1 == 16, $sformatf("prng_complete after %0d edges, expected 16", waited - 1));
      check(int'(prng_value) == exp_v, $sformatf("run %0d value %0d, expected %0d", r, prng_value, exp_v));
      check(prng_value <= 2'd2, "value in 0..2");
      if (prng_value <= 2) hist[prng_value]++;
      seq.push_back(int'(prng_value));
      @(negedge clk);
      check(!prng_complete, "prng_complete is one cycle long");
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    runs(48'h0012_3456_789A, 60, seq_a);
    runs(48'h00A0_C914_C829, 60, seq_b);
    runs(48'h0, 10, seq_c);
    check(hist[0] > 0 && hist[1] > 0 && hist[2] > 0,
          $sformatf("all slots chosen (%0d %0d %0d)", hist[0], hist[1], hist[2]));
    check(seq_a != seq_b, "different addresses give different sequences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
