// tb_fir_top: end-to-end test of the four-tap Booth / carry-skip FIR filter
// at its default parameters.
//
// A reference model in the testbench keeps the last four input samples and
// computes y(n) = sum a(k) x(n-k) with ordinary integer arithmetic, wrapped
// to 16 bits. The filter output is compared with it after every clock edge:
// the output for the sample applied at an edge must be present right after
// that same edge (one clock of latency).
//
// Stimulus: reset, a unit impulse (the output must replay the coefficients
// a(0)..a(3) and then return to zero), a unit step, full-scale alternating
// and constant inputs (including -128), a reset in the middle of a stream,
// and random samples. The test counts how often each mechanism of the
// design occurred and fails if one never did: the three Booth recoding
// actions (add, subtract, none) in the tap multipliers, the carry skip path
// of a middle adder group in the summation chain, and a reset clearing the
// delay line while samples were flowing.
module tb_fir_top;
  import fir_pkg::*;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_nop = 0, n_skip = 0, n_midreset = 0;

  logic        clk = 1'b0, reset;
  sample_t     filter_in;
  acc_t        filter_out;

  int          hist [TAPS];   // x(n), x(n-1), ... as the model sees them
  int          expected;

  Booth_Mul_Carry_Skip_Add_Top dut (
    .clk(clk), .reset(reset), .filter_in(filter_in), .filter_out(filter_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Booth actions on the bit pairs of a multiplier operand (the sample).
  task automatic count_booth(int x);
    logic [8:0] rr;
    rr = {8'(x), 1'b0};
    for (int i = 0; i < DATA_W; i++) begin
      case (rr[i+1 -: 2])
        2'b01:   n_add++;
        2'b10:   n_sub++;
        default: n_nop++;
      endcase
    end
  endtask

  // Skip events in one 16-bit carry skip addition a + b (carry-in 0):
  // a middle group (bits 7:4 or 11:8) fully propagates and receives a carry.
  task automatic count_skip(logic [15:0] a, logic [15:0] b);
    logic [15:0] s;
    s = a + b;
    for (int k = 1; k <= 2; k++) begin
      logic [3:0] p;
      p = a[k*4 +: 4] ^ b[k*4 +: 4];
      if (&p && (s[k*4] ^ p[0])) n_skip++;
    end
  endtask

  // Apply one sample at the falling edge, let the rising edge capture it,
  // and compare the output with the model.
  task automatic step(int x, logic rst = 1'b0);
    logic [15:0] part;
    @(negedge clk);
    filter_in = 8'(x);
    reset = rst;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    // Model, and mechanism counting on the same operands the filter sees.
    part = 16'(int'(DEFAULT_COEF[0]) * hist[0]);
    for (int k = 0; k < TAPS; k++) count_booth(hist[k]);
    for (int k = 1; k < TAPS; k++) begin
      logic [15:0] pk;
      pk = 16'(int'(DEFAULT_COEF[k]) * hist[k]);
      count_skip(part, pk);
      part = part + pk;
    end
    expected = rst ? 0 : int'($signed(part));
    @(posedge clk);
    #1;
    if (rst) begin
      if (hist[1] != 0 || hist[2] != 0 || hist[3] != 0) n_midreset++;
      for (int k = 0; k < TAPS; k++) hist[k] = 0;
    end
    checks++;
    if (int'(filter_out) != expected) begin
      failures++;
      $display("FAIL t=%0t: in=%0d out=%0d expected=%0d", $time, x, filter_out, expected);
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    filter_in = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (filter_out !== '0) begin
      failures++;
      $display("FAIL: output not cleared by reset");
    end

    // Unit impulse: output replays a(0)..a(3), then zero.
    step(1);
    checks++; if (int'(filter_out) != int'(DEFAULT_COEF[0])) begin failures++; $display("FAIL impulse a(0)"); end
    for (int k = 1; k < TAPS; k++) begin
      step(0);
      checks++;
      if (int'(filter_out) != int'(DEFAULT_COEF[k])) begin
        failures++;
        $display("FAIL: impulse response a(%0d) = %0d, expected %0d", k, filter_out, DEFAULT_COEF[k]);
      end
    end
    repeat (3) step(0);

    // Unit step: settles at the sum of the coefficients.
    repeat (8) step(1);
    checks++;
    if (int'(filter_out) != 128) begin
      failures++;
      $display("FAIL: step response settles at %0d, expected 128", filter_out);
    end

    // Full-scale patterns.
    repeat (8) step(-128);
    repeat (8) step(127);
    for (int n = 0; n < 16; n++) step(n[0] ? 127 : -128);
    for (int n = 0; n < 16; n++) step(n[0] ? -1 : 1);

    // Reset in the middle of a stream.
    for (int n = 0; n < 6; n++) step(int'($urandom_range(0, 255)) - 128);
    step(55, 1'b1);
    for (int n = 0; n < 6; n++) step(int'($urandom_range(0, 255)) - 128);

    // Random samples.
    for (int n = 0; n < 3000; n++) step(int'($urandom_range(0, 255)) - 128);

    $display("mechanisms: booth add %0d, booth subtract %0d, booth none %0d, carry skip %0d, mid-stream reset %0d",
             n_add, n_sub, n_nop, n_skip, n_midreset);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_nop == 0 || n_skip == 0 || n_midreset == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
