// hybrid_fa: one-bit hybrid low-power full adder.
//
// An XOR-XNOR stage forms x = a^b and its complement xn. These rails then
// steer two 2:1 selections, the RTL counterpart of the pass-transistor
// networks of the cell:
//   sum  = xn ? cin : ~cin      (a == b -> sum = cin, else ~cin)
//   cout = x  ? cin : a         (a != b -> carry propagates, else a == b is the carry)
// The split into an XOR-XNOR module and steering stage follows the published
// cell; the steering equations are the standard ones for this cell family.
// On an FPGA the XOR-XNOR stage lands in a LUT and the two selections in the
// dedicated carry mux/XOR of the carry chain. Purely combinational.
module hybrid_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic x, xn;

  xor_xnor u_xx (.a(a), .b(b), .x(x), .xn(xn));

  always_comb begin
    sum  = xn ? cin : ~cin;
    cout = x  ? cin : a;
  end
endmodule
