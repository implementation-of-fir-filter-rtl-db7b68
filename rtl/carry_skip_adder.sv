// carry_skip_adder: WIDTH-bit adder built from BLOCK-bit ripple-carry groups
// with carry-skip (carry-bypass) logic between them.
//
// Each group adds its slice of a and b with a ripple carry chain. For a group
// with skip logic, a group propagate signal P is formed as the AND of the
// per-bit propagates (a[i] ^ b[i]); when P is true, every bit of the group
// would pass an incoming carry on, so the group's carry-out is taken directly
// from its carry-in instead of waiting for the ripple chain. When P is false
// the carry-out is the ripple carry, which then does not depend on the
// carry-in. The worst-case carry path is therefore one ripple through the
// first group, the skip multiplexers of the middle groups, and one ripple
// through the last group.
//
// Following the 16-bit, four-group arrangement this adder comes from, only the
// middle groups (bits 7:4 and 11:8 at the defaults) carry skip logic: the
// lowest group's carry-out (c4) and the highest group's carry-out (cout) are
// plain ripple carries. Group width and total width are parameters; WIDTH
// must be a multiple of BLOCK.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module carry_skip_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = WIDTH / BLOCK;

  initial begin
    assert (WIDTH % BLOCK == 0 && BLOCK > 0)
      else $error("carry_skip_adder: WIDTH (%0d) must be a multiple of BLOCK (%0d)", WIDTH, BLOCK);
  end

  // c[k] is the carry into group k; c[NBLK] is the final carry-out.
  logic [NBLK:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] p;        // per-bit propagate
    logic [BLOCK:0]   rc;       // ripple carries inside the group

    assign p     = a[k*BLOCK +: BLOCK] ^ b[k*BLOCK +: BLOCK];
    assign rc[0] = c[k];

    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      assign sum[k*BLOCK + i] = p[i] ^ rc[i];
      assign rc[i+1]          = (a[k*BLOCK + i] & b[k*BLOCK + i]) | (p[i] & rc[i]);
    end

    if (k > 0 && k < NBLK - 1) begin : g_skip
      // Skip: a fully propagating group (P = AND of its propagates) hands
      // its carry-in straight on.
      logic grp_p;
      assign grp_p  = &p;
      assign c[k+1] = grp_p ? c[k] : rc[BLOCK];
    end else begin : g_ripple
      assign c[k+1] = rc[BLOCK];
    end
  end

  assign cout = c[NBLK];
endmodule
