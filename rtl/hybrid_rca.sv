// hybrid_rca: ripple-carry adder built from cascaded carry4 groups.
//
// WIDTH/4 carry4 groups are chained; for the default WIDTH = 8 that is the
// two groups for bits 0-3 and 4-7, linked by the carry C4, as in the published
// mapping onto the FPGA carry chain. Besides the sum and the final carry
// (C8) it brings out the carry into the most significant bit (C7), from which
// the flag logic forms the signed overflow. WIDTH must be a multiple of 4.
// Purely combinational.
module hybrid_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,   // carry out of the MSB
  output logic             c_msb   // carry into the MSB
);
  localparam int unsigned NGROUPS = WIDTH / 4;

  logic [WIDTH-1:0] co;        // carry out of every bit
  logic [NGROUPS:0] cgrp;      // carries between groups (C0, C4, C8, ...)

  assign cgrp[0] = cin;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    carry4 u_c4 (
      .a (a[4*g +: 4]),
      .b (b[4*g +: 4]),
      .ci(cgrp[g]),
      .o (sum[4*g +: 4]),
      .co(co[4*g +: 4])
    );
    assign cgrp[g+1] = co[4*g+3];
  end

  assign cout  = cgrp[NGROUPS];
  assign c_msb = co[WIDTH-2];

  initial assert (WIDTH % 4 == 0 && WIDTH >= 4)
    else $error("hybrid_rca: WIDTH must be a positive multiple of 4");
endmodule
