// tb_fir_long: the FIR filter built with 16 taps and a coefficient set that
// includes the most negative value, -128, and whose absolute sum is large
// enough for the 16-bit result to wrap.
//
// A reference model computes y(n) = sum a(k) x(n-k) over the last 16
// samples with integer arithmetic and wraps it to 16 bits; the filter output
// must match it one clock after each sample. The test counts how many
// outputs wrapped (true sum outside the 16-bit signed range) and fails if
// none did, and checks the impulse response against the coefficient list.
module tb_fir_long;
  localparam int unsigned N = 16;
  localparam logic signed [7:0] C [N] = '{
    -8'sd128, 8'sd127, 8'sd100, -8'sd100, 8'sd64, -8'sd1, 8'sd0, 8'sd33,
     8'sd90, -8'sd77, 8'sd127, 8'sd127, -8'sd128, 8'sd5, 8'sd120, -8'sd60};

  int checks = 0, failures = 0, wraps = 0;
  logic clk = 1'b0, reset;
  logic signed [7:0]  filter_in;
  logic signed [15:0] filter_out;
  int hist [N];

  Booth_Mul_Carry_Skip_Add_Top #(.TAPS(N), .COEF(C)) dut (
    .clk(clk), .reset(reset), .filter_in(filter_in), .filter_out(filter_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int x);
    int full;
    @(negedge clk);
    filter_in = 8'(x);
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    full = 0;
    for (int k = 0; k < N; k++) full += int'(C[k]) * hist[k];
    if (full > 32767 || full < -32768) wraps++;
    @(posedge clk);
    #1;
    checks++;
    if (filter_out !== 16'(full)) begin
      failures++;
      $display("FAIL: in=%0d out=%0d expected=%0d (unwrapped %0d)", x, filter_out, $signed(16'(full)), full);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    reset = 1'b1; filter_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // Impulse response.
    step(1);
    checks++; if (filter_out != 16'(C[0])) begin failures++; $display("FAIL impulse a(0)"); end
    for (int k = 1; k < N; k++) begin
      step(0);
      checks++;
      if (filter_out != 16'(C[k])) begin failures++; $display("FAIL impulse a(%0d)", k); end
    end
    // Extremes drive the sum out of range.
    repeat (N) step(127);
    repeat (N) step(-128);
    for (int n = 0; n < 2 * N; n++) step((n % 3 == 0) ? -128 : 127);
    for (int n = 0; n < 3000; n++) step(int'($urandom_range(0, 255)) - 128);

    $display("wrapped outputs: %0d", wraps);
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no output wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
