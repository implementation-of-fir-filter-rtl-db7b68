// booth_multiplier: signed two's complement multiplier using radix-2 Booth
// recoding, with the add/shift iterations unrolled into combinational logic.
//
// The classic sequential Booth procedure keeps a product register P of
// length x + y + 1 (x, y = widths of multiplicand m and multiplier r) and two
// constants A = {m, 0...} and S = {-m, 0...}. P starts as {0..., r, 0}. On each
// of y steps the two lowest bits of P choose the action: 01 adds A, 10 adds S
// (that is, subtracts m), 00 and 11 do nothing; overflow of the addition is
// ignored and P is then shifted right arithmetically by one place. After y
// steps the lowest bit is dropped and what remains is m * r.
//
// Here the y steps are laid out in space, one add/subtract-and-shift stage per
// multiplier bit, so a product is available in the same cycle as its
// operands. One departure from the textbook register lengths: the m field of
// A, S and P is one bit wider (x + 1 bits, so P is x + y + 2 bits). With only
// x bits, -m cannot be represented when m is the most negative value
// (e.g. -128 for x = 8) and that one case gives a wrong product; the extra bit
// makes every input pair correct. The extra top bit is dropped from the
// result, which is x + y bits wide.
//
// Interface: m (XW bits), r (YW bits), product (XW+YW bits), all signed.
// Purely combinational, no clock.
module booth_multiplier #(
  parameter int unsigned XW = 8,   // multiplicand width x
  parameter int unsigned YW = 8    // multiplier width y
) (
  input  logic signed [XW-1:0]    m,
  input  logic signed [YW-1:0]    r,
  output logic signed [XW+YW-1:0] product
);
  localparam int unsigned PW = XW + YW + 2;  // (XW+1) + YW + 1

  logic signed [XW:0]   m_ext;
  logic signed [PW-1:0] a_val;  // A: m in the top bits, zeros below
  logic signed [PW-1:0] s_val;  // S: -m in the top bits, zeros below
  logic signed [PW-1:0] p;

  assign m_ext = {m[XW-1], m};  // sign-extended multiplicand

  always_comb begin
    a_val = {m_ext, {(YW+1){1'b0}}};
    s_val = {-m_ext, {(YW+1){1'b0}}};
    p     = {{(XW+1){1'b0}}, r, 1'b0};
    for (int i = 0; i < YW; i++) begin
      unique case (p[1:0])
        2'b01:   p = p + a_val;
        2'b10:   p = p + s_val;
        default: p = p;
      endcase
      p = p >>> 1;
    end
    product = p[XW+YW:1];
  end
endmodule
