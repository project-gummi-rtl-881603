// gummi_ref_pkg: reference model of the Gummi instruction set for testbenches.
//
// ref_alu computes an operation's 16-bit result with plain integer
// arithmetic, written independently of the RTL (bit loops instead of
// vector operators where practical). Operation codes are given as numbers:
// 0 load in, 1 div, 2 mod, 4 inc, 5 dec, 6 add, 7 sub, 8 |sub|, 9 mul,
// 10 shl, 11 shr, 12 save, 13 load out, 14 copy, 15 not, 16 and, 17 or,
// 18 nand, 19 nor, 20 xor, 21 xnor, 22 max, 23 min, 24 eq, 25 bin->Gray,
// 26 Gray->bin, 27 reset.
package gummi_ref_pkg;

  function automatic logic [15:0] ref_alu(int op, logic [15:0] a, logic [15:0] b);
    int ia, ib, r;
    logic [15:0] v;
    ia = int'(a);
    ib = int'(b);
    r  = 0;
    case (op)
      1:  r = (ib == 0) ? 32'hFFFF : ia / ib;
      2:  r = (ib == 0) ? ia : ia % ib;
      4:  r = ia + 1;
      5:  r = ia - 1;
      6:  r = ia + ib;
      7:  r = ia - ib;
      8:  r = (ia > ib) ? ia - ib : ib - ia;
      9:  r = (ia % 256) * (ib % 256);
      10: r = ia * 2;
      11: r = ia / 2;
      15: r = 65535 - ia;
      16, 17, 18, 19, 20, 21: begin
        for (int i = 0; i < 16; i++) begin
          bit x, y, z;
          x = a[i]; y = b[i];
          case (op)
            16: z = x & y;
            17: z = x | y;
            18: z = !(x & y);
            19: z = !(x | y);
            20: z = x != y;
            default: z = x == y;
          endcase
          v[i] = z;
        end
        r = int'(v);
      end
      22: r = (ia > ib) ? ia : ib;
      23: r = (ia < ib) ? ia : ib;
      24: r = (ia == ib) ? 1 : 0;
      25: begin
        for (int i = 0; i < 16; i++) v[i] = (i == 15) ? a[i] : (a[i] != a[i+1]);
        r = int'(v);
      end
      26: begin
        bit acc;
        acc = 0;
        for (int i = 15; i >= 0; i--) begin
          acc  = acc ^ a[i];
          v[i] = acc;
        end
        r = int'(v);
      end
      default: r = 0;
    endcase
    return r[15:0];
  endfunction

  // Operation codes that exist (27 of them).
  function automatic bit valid_op(int op);
    return (op >= 0 && op <= 27 && op != 3);
  endfunction

endpackage
