// Booth_Mul_Carry_Skip_Add_Top: four-tap direct-form FIR filter whose tap
// multipliers are radix-2 Booth multipliers and whose summation chain is made
// of carry skip adders.
//
// y(n) = a(0) x(n) + a(1) x(n-1) + a(2) x(n-2) + a(3) x(n-3)
//
// The current input sample x(n) feeds the first multiplier directly; a chain
// of TAPS-1 registers (fir_delay_line) supplies x(n-1) .. x(n-3) to the
// others. Each multiplier forms a(k) * x(n-k) with the coefficient as Booth
// multiplicand and the sample as Booth multiplier. The products are summed
// left to right, p0 + p1, then + p2, then + p3, by TAPS-1 carry skip adders of
// OUT_W bits each with carry-in 0; the final carry-out is dropped, so the sum
// wraps modulo 2^OUT_W (no saturation).
//
// The structure, the port names and widths (filter_in[7:0], clk, reset,
// filter_out[15:0]) and the module name follow the design. The coefficient
// values, the synchronous active-high reset and the output register are this
// design's own choices: filter_out is registered, so the y(n) that belongs to
// the sample on filter_in at a rising edge appears right after that edge
// (one clock of latency, one sample accepted per clock).
//
// Interface: clk, reset, filter_in (signed DATA_W) in; filter_out
// (signed OUT_W) out.
module Booth_Mul_Carry_Skip_Add_Top #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned COEF_W = fir_pkg::COEF_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [TAPS] = fir_pkg::DEFAULT_COEF
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic signed [DATA_W-1:0] filter_in,
  output logic signed [OUT_W-1:0]  filter_out
);
  localparam int unsigned PROD_W = COEF_W + DATA_W;

  initial begin
    assert (TAPS >= 2) else $error("Booth_Mul_Carry_Skip_Add_Top: TAPS must be at least 2");
    assert (OUT_W % 4 == 0) else $error("Booth_Mul_Carry_Skip_Add_Top: OUT_W must be a multiple of the 4-bit adder group");
  end

  // x(n-k) for k = 0 .. TAPS-1
  logic [TAPS-2:0][DATA_W-1:0] delayed;
  logic signed [DATA_W-1:0]    x_tap [TAPS];
  logic signed [PROD_W-1:0]    prod  [TAPS];
  logic signed [OUT_W-1:0]     prod_ext [TAPS];
  logic signed [OUT_W-1:0]     acc   [TAPS];
  logic [TAPS-1:0]             acc_cout;  // adder carry-outs, unused (sum wraps)

  fir_delay_line #(.DEPTH(TAPS-1), .W(DATA_W)) u_delay (
    .clk  (clk),
    .reset(reset),
    .din  (filter_in),
    .taps (delayed)
  );

  assign x_tap[0] = filter_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_xtap
    assign x_tap[k] = delayed[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    booth_multiplier #(.XW(COEF_W), .YW(DATA_W)) u_mul (
      .m      (COEF[k]),
      .r      (x_tap[k]),
      .product(prod[k])
    );
    // Sign-extend (or, if OUT_W is narrower, truncate) to the adder width.
    assign prod_ext[k] = OUT_W'(prod[k]);
  end

  assign acc[0]      = prod_ext[0];
  assign acc_cout[0] = 1'b0;
  for (genvar k = 1; k < TAPS; k++) begin : g_add
    carry_skip_adder #(.WIDTH(OUT_W), .BLOCK(4)) u_add (
      .a   (acc[k-1]),
      .b   (prod_ext[k]),
      .cin (1'b0),
      .sum (acc[k]),
      .cout(acc_cout[k])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) filter_out <= '0;
    else       filter_out <= acc[TAPS-1];
  end
endmodule
