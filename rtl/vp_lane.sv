// vp_lane: one 32-bit slice of a reconfigurable vector arithmetic pipeline.
//
// A cascade of functional units, each steered by a field of the 32-bit
// configuration word (t0_pkg::vpcfg_t) that accompanies every element:
//   stage 1: logic unit (A op B), left shifter, and in VP0 a 16x16-bit
//            multiplier with a carry-save adder that can add the shifted
//            value to the product; muxes pick the adder's X input (shifted
//            value, product, or product plus shifted value) and its Y input
//            (B, A or zero), both widened to 33 bits;
//   stage 2: 33-bit adder/subtractor, zero detect and condition compare, right
//            shifter with four rounding modes, and the output mux (shifted sum,
//            the bypassed Y operand, a condition-steered choice of the two, or
//            the condition as a boolean);
//   output : clipper saturating to 8, 16 or 32 bits, signed or unsigned.
// One pass therefore performs a complete scaled, rounded and clipped fixed-point
// operation, and also composites such as absolute value or bit-field extract.
// The condition drives `wen` for conditional writeback when cfg.cmov is set.
//
// The order of units, the 33-bit internal width, the 16x16 multiplier in VP0
// only, the four rounding modes (one being round-to-nearest-even), clipping to
// 8/16/32 bits and the boolean conversion follow the chip. The chip builds its
// pipeline from two-phase latches; here each stage is a flip-flop stage, giving
// the chip's three-cycle latency: an element presented with in_valid in cycle t
// leaves on out_* in cycle t+3, one element per cycle. The multiplier is written
// as a behavioural product rather than the chip's Baugh-Wooley array, and
// rounding is done only in the right shifter. The configuration encoding,
// rounding-mode list and condition list are this design's own.
module vp_lane
  import t0_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1   // VP0 lanes have the multiplier, VP1 lanes do not
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  vpcfg_t      in_cfg,
  input  logic [31:0] in_a,
  input  logic [31:0] in_b,
  output logic        out_valid,
  output logic [31:0] out_result,
  output logic        out_wen,     // write enable after conditional-move masking
  output logic        out_cond,    // raw condition result
  output logic        out_sat      // the clipper saturated this result
);

  // ---------------- stage 0 -> 1: operand registers ----------------
  logic        s1_v;
  vpcfg_t      s1_cfg;
  logic [31:0] s1_a, s1_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      s1_cfg <= '0;
      s1_a   <= '0;
      s1_b   <= '0;
    end else begin
      s1_v   <= in_valid;
      s1_cfg <= in_cfg;
      s1_a   <= in_a;
      s1_b   <= in_b;
    end
  end

  // ---------------- stage 1: logic, left shift, multiply, operand muxes ----------------
  logic [31:0] lu_out, lsh_out;
  logic [4:0]  lsh_n;
  logic [32:0] prod33, x33, y33;

  always_comb begin
    unique case (s1_cfg.lop)
      LOP_PASSA: lu_out = s1_a;
      LOP_AND:   lu_out = s1_a & s1_b;
      LOP_OR:    lu_out = s1_a | s1_b;
      default:   lu_out = s1_a ^ s1_b;
    endcase
    lsh_n   = s1_cfg.lsh_srcb ? s1_b[4:0] : s1_cfg.lsh_amt;
    lsh_out = lu_out << lsh_n;

    if (s1_cfg.sgn)
      prod33 = 33'($signed(s1_a[15:0]) * $signed(s1_b[15:0]));
    else
      prod33 = {1'b0, 32'(s1_a[15:0]) * 32'(s1_b[15:0])};

    // the carry-save adder folds the shifted value into the product (multiply-add)
    if (HAS_MUL && s1_cfg.use_mul) x33 = prod33 + (s1_cfg.mac ? {s1_cfg.sgn & lsh_out[31], lsh_out} : 33'd0);
    else                           x33 = {s1_cfg.sgn & lsh_out[31], lsh_out};

    unique case (s1_cfg.ysel)
      YS_B:    y33 = {s1_cfg.sgn & s1_b[31], s1_b};
      YS_A:    y33 = {s1_cfg.sgn & s1_a[31], s1_a};
      default: y33 = '0;
    endcase
  end

  logic        s2_v;
  vpcfg_t      s2_cfg;
  logic [32:0] s2_x, s2_y;
  logic [4:0]  s2_bsh;   // B[4:0] kept for a right shift amount taken from B

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v   <= 1'b0;
      s2_cfg <= '0;
      s2_x   <= '0;
      s2_y   <= '0;
      s2_bsh <= '0;
    end else begin
      s2_v   <= s1_v;
      s2_cfg <= s1_cfg;
      s2_x   <= x33;
      s2_y   <= y33;
      s2_bsh <= s1_b[4:0];
    end
  end

  // ---------------- stage 2: add, condition, right shift with rounding, output mux ----------------
  logic [32:0] sum;
  logic        zero, neg, cond;
  logic [4:0]  rsh_n;
  logic [32:0] shifted, dropped, half, rounded;
  logic        inc;
  logic [32:0] omux;

  always_comb begin
    unique case (s2_cfg.aop)
      AOP_ADD:  sum = s2_x + s2_y;
      AOP_SUB:  sum = s2_x - s2_y;
      AOP_RSUB: sum = s2_y - s2_x;
      default:  sum = 33'd0 - s2_x;
    endcase
    zero = (sum == '0);
    neg  = sum[32];
    unique case (s2_cfg.cond)
      C_ALWAYS: cond = 1'b1;
      C_EQ:     cond = zero;
      C_NE:     cond = !zero;
      C_LT:     cond = neg;
      C_LE:     cond = neg | zero;
      C_GT:     cond = !neg && !zero;
      C_GE:     cond = !neg;
      default:  cond = 1'b0;
    endcase

    rsh_n = s2_cfg.rsh_srcb ? s2_bsh : s2_cfg.rsh_amt;
    if (s2_cfg.sgn) shifted = 33'($signed(sum) >>> rsh_n);
    else            shifted = sum >> rsh_n;
    dropped = sum & ((33'd1 << rsh_n) - 33'd1);
    half    = (rsh_n == 5'd0) ? 33'd0 : (33'd1 << (rsh_n - 5'd1));
    inc     = 1'b0;
    if (rsh_n != 5'd0) begin
      unique case (s2_cfg.rnd)
        RND_FLOOR:  inc = 1'b0;
        RND_ZERO:   inc = s2_cfg.sgn && sum[32] && (dropped != '0);
        RND_HALFUP: inc = (dropped >= half);
        default:    inc = (dropped > half) || ((dropped == half) && shifted[0]);
      endcase
    end
    rounded = shifted + {32'd0, inc};

    unique case (s2_cfg.osel)
      OS_RSH:  omux = rounded;
      OS_Y:    omux = s2_y;
      OS_SEL:  omux = cond ? rounded : s2_y;
      default: omux = {32'd0, cond};
    endcase
  end

  logic        s3_v, s3_cond;
  vpcfg_t      s3_cfg;
  logic [32:0] s3_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v    <= 1'b0;
      s3_cfg  <= '0;
      s3_val  <= '0;
      s3_cond <= 1'b0;
    end else begin
      s3_v    <= s2_v;
      s3_cfg  <= s2_cfg;
      s3_val  <= omux;
      s3_cond <= cond;
    end
  end

  // ---------------- output: clipper ----------------
  // The 33-bit value is read as signed when cfg.sgn is set and as unsigned
  // otherwise; it is clamped to the selected width.
  logic signed [34:0] v;
  logic signed [34:0] lo, hi;

  always_comb begin
    v = s3_cfg.sgn ? {{2{s3_val[32]}}, s3_val} : {2'b00, s3_val};
    unique case (s3_cfg.clip)
      CL_8:    begin hi = s3_cfg.clip_uns ? 35'sd255        : 35'sd127;        lo = s3_cfg.clip_uns ? 35'sd0 : -35'sd128;        end
      CL_16:   begin hi = s3_cfg.clip_uns ? 35'sd65535      : 35'sd32767;      lo = s3_cfg.clip_uns ? 35'sd0 : -35'sd32768;      end
      CL_32:   begin hi = s3_cfg.clip_uns ? 35'sd4294967295 : 35'sd2147483647; lo = s3_cfg.clip_uns ? 35'sd0 : -35'sd2147483648; end
      default: begin hi = '0; lo = '0; end
    endcase
    out_sat    = 1'b0;
    out_result = s3_val[31:0];
    if (s3_cfg.clip != CL_NONE) begin
      if (v > hi) begin
        out_result = hi[31:0];
        out_sat    = 1'b1;
      end else if (v < lo) begin
        out_result = lo[31:0];
        out_sat    = 1'b1;
      end
    end
    out_valid = s3_v;
    out_cond  = s3_cond;
    out_wen   = s3_v && (!s3_cfg.cmov || s3_cond);
  end

endmodule
