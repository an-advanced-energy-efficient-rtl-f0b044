// alu_ref_pkg: golden model of the 8-bit ALU for the testbenches.
//
// Written from the operation definitions in plain integer arithmetic, with
// the signed overflow worked out from operand and result signs rather than
// from internal carries, so that it is independent of the RTL structure.
package alu_ref_pkg;

  typedef struct packed {
    logic [7:0] result;
    logic       z, c, v, n;
  } alu_out_t;

  function automatic alu_out_t alu_ref(input logic [3:0] op, input logic [7:0] a, input logic [7:0] b);
    alu_out_t o;
    int unsigned ua, ub, r;
    ua  = int'(a);
    ub  = int'(b);
    o.c = 1'b0;
    o.v = 1'b0;
    r   = 0;
    case (op)
      4'h0: begin r = ua + ub;            o.c = r > 255; o.v = (a[7] == b[7]) && (r[7] != a[7]); end
      4'h1: begin r = (ua - ub) & 255;    o.c = ua >= ub; o.v = (a[7] != b[7]) && (r[7] != a[7]); end
      4'h2: begin r = ua + 1;             o.c = ua == 255; o.v = ua == 127; end
      4'h3: begin r = (ua + 255) & 255;   o.c = ua != 0;   o.v = ua == 128; end
      4'h4: begin r = (256 - ua) & 255;   o.c = ua == 0;   o.v = ua == 128; end
      4'h5: begin r = (ub - ua) & 255;    o.c = ub >= ua; o.v = (a[7] != b[7]) && (r[7] != b[7]); end
      4'h6: r = ua;
      4'h7: r = ub;
      4'h8: r = {24'd0, a & b};
      4'h9: r = {24'd0, a | b};
      4'hA: r = {24'd0, a ^ b};
      4'hB: r = 255 - ua;
      4'hC: r = {24'd0, ~(a ^ b)};
      4'hD: r = (ua * 2) & 255;
      4'hE: r = ua / 2;
      default: r = (ua / 2) + (a[7] ? 128 : 0);
    endcase
    o.result = r[7:0];
    o.z      = o.result == 8'd0;
    o.n      = o.result[7];
    return o;
  endfunction

endpackage
