// t0_ref_pkg: reference model of one arithmetic pipeline slice, written with
// 64-bit integer arithmetic, shared by the testbenches.
package t0_ref_pkg;
  import t0_pkg::*;

  function automatic longint ext(input logic [31:0] v, input logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction

  // Reference: returns {wen, result}
  function automatic logic [32:0] model(input vpcfg_t c, input logic [31:0] a, input logic [31:0] b,
                                           input bit has_mul = 1'b1);
    logic [31:0] l, sh;
    longint x, y, s, r, q, rem, h, lo, hi;
    int n;
    logic cnd;
    case (c.lop)
      LOP_PASSA: l = a;
      LOP_AND:   l = a & b;
      LOP_OR:    l = a | b;
      default:   l = a ^ b;
    endcase
    sh = l << (c.lsh_srcb ? b[4:0] : c.lsh_amt);
    if (c.use_mul && has_mul) x = c.sgn ? longint'($signed(a[15:0])) * longint'($signed(b[15:0]))
                             : longint'(a[15:0]) * longint'(b[15:0]);
    else           x = ext(sh, c.sgn);
    if (c.use_mul && has_mul && c.mac) x = x + ext(sh, c.sgn);
    case (c.ysel)
      YS_B:    y = ext(b, c.sgn);
      YS_A:    y = ext(a, c.sgn);
      default: y = 0;
    endcase
    case (c.aop)
      AOP_ADD:  s = x + y;
      AOP_SUB:  s = x - y;
      AOP_RSUB: s = y - x;
      default:  s = -x;
    endcase
    // wrap to 33-bit two's complement
    s = (s << 31) >>> 31;
    case (c.cond)
      C_ALWAYS: cnd = 1;
      C_EQ: cnd = (s == 0);
      C_NE: cnd = (s != 0);
      C_LT: cnd = (s < 0);
      C_LE: cnd = (s <= 0);
      C_GT: cnd = (s > 0);
      C_GE: cnd = (s >= 0);
      default: cnd = 0;
    endcase
    n = c.rsh_srcb ? int'(b[4:0]) : int'(c.rsh_amt);
    if (!c.sgn) s = s & 64'h1_FFFF_FFFF;           // unsigned view of the 33 bits
    q   = s >>> n;                                 // floor
    rem = s - (q << n);
    h   = (n == 0) ? 0 : (64'sd1 << (n - 1));
    r   = q;
    if (n != 0) case (c.rnd)
      RND_FLOOR:  r = q;
      RND_ZERO:   r = (s < 0 && rem != 0) ? q + 1 : q;
      RND_HALFUP: r = (rem >= h) ? q + 1 : q;
      default:    r = (rem > h || (rem == h && q[0])) ? q + 1 : q;
    endcase
    case (c.osel)
      OS_RSH:  ;
      OS_Y:    r = y;
      OS_SEL:  r = cnd ? r : y;
      default: r = cnd;
    endcase
    // back to a 33-bit value in the signedness of the pipeline
    r = c.sgn ? ((r << 31) >>> 31) : (r & 64'sh1_FFFF_FFFF);
    case (c.clip)
      CL_8:  begin hi = c.clip_uns ? 255 : 127; lo = c.clip_uns ? 0 : -128; end
      CL_16: begin hi = c.clip_uns ? 65535 : 32767; lo = c.clip_uns ? 0 : -32768; end
      CL_32: begin hi = c.clip_uns ? 64'sd4294967295 : 64'sd2147483647; lo = c.clip_uns ? 0 : -64'sd2147483648; end
      default: begin hi = 0; lo = 0; end
    endcase
    if (c.clip != CL_NONE) begin
      if (r > hi) r = hi;
      else if (r < lo) r = lo;
    end
    return {(!c.cmov || cnd), r[31:0]};
  endfunction

endpackage
