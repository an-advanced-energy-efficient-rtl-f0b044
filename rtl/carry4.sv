// carry4: four-bit carry-chain group, the counterpart of one Artix-7 CARRY4.
//
// Four hybrid_fa slices ripple the carry from ci through bits 0..3. Like the
// FPGA primitive it brings out every intermediate carry (co[3:0]), which lets
// the adder read the carry into its most significant bit for the overflow
// flag. Two of these groups, linked by the carry C4, make the 8-bit adder.
// The ports take the operand bits (a, b) rather than the primitive's
// select/data inputs; that choice keeps the module portable.
// Purely combinational; ripple delay of four slices.
module carry4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       ci,
  output logic [3:0] o,
  output logic [3:0] co
);
  logic [4:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_slice
    hybrid_fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(o[i]), .cout(c[i+1]));
  end

  assign co = c[4:1];
endmodule
