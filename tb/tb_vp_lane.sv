// tb_vp_lane: self-checking test of one arithmetic pipeline slice.
// A reference model written with 64-bit integer arithmetic computes the
// expected result for every configuration word; directed cases cover a
// scaled/rounded/clipped multiply, absolute value, bit-field extract, the four
// rounding modes, boolean compare and multiply-add; random cases cover the rest. Every
// result must appear exactly three cycles after its operands.
module tb_vp_lane;
  import t0_pkg::*;
  import t0_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid;
  vpcfg_t      in_cfg;
  logic [31:0] in_a, in_b;
  logic        out_valid, out_wen, out_cond, out_sat;
  logic [31:0] out_result;

  vp_lane #(.HAS_MUL(1'b1)) dut (.*);

  int checks = 0, failures = 0;

  // expected-value queue indexed by issue cycle
  logic [32:0] expq [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int issue_cyc [$];
  logic [95:0] inq [$];

  task automatic send(input vpcfg_t c, input logic [31:0] a, input logic [31:0] b);
    in_valid = 1'b1; in_cfg = c; in_a = a; in_b = b;
    expq.push_back(model(c, a, b));
    issue_cyc.push_back(cyc);
    inq.push_back({c, a, b});
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [32:0] e;
      int ic;
      logic [95:0] dbg;
      e = expq.pop_front();
      ic = issue_cyc.pop_front();
      dbg = inq.pop_front();
      checks++;
      if ({out_wen, out_result} !== e) begin
        failures++;
        $display("MISMATCH got wen=%0b res=%h exp wen=%0b res=%h cfg=%h a=%h b=%h", out_wen, out_result, e[32], e[31:0], dbg[95:64], dbg[63:32], dbg[31:0]);
      end
      checks++;
      if (cyc - ic != 3) begin
        failures++;
        $display("LATENCY %0d", cyc - ic);
      end
    end
  end

  function automatic vpcfg_t base_cfg();
    vpcfg_t c = '0;
    c.lop = LOP_PASSA; c.ysel = YS_B; c.aop = AOP_ADD; c.cond = C_ALWAYS;
    c.rnd = RND_FLOOR; c.osel = OS_RSH; c.clip = CL_NONE;
    return c;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpcfg_t c;
    in_valid = 0; in_cfg = '0; in_a = 0; in_b = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // Q15 multiply, shifted right by 15 with round-to-nearest-even, clipped to 16 bits
    c = base_cfg(); c.use_mul = 1; c.sgn = 1; c.ysel = YS_ZERO; c.rsh_amt = 15; c.rnd = RND_EVEN; c.clip = CL_16;
    send(c, 32'h0000_4000, 32'h0000_4000);   // 0.5*0.5
    send(c, 32'hFFFF_8000, 32'hFFFF_8000);   // -1*-1 saturates
    send(c, 32'h0000_0003, 32'h0000_4000);   // 1.5 -> 2 (even)
    send(c, 32'h0000_0001, 32'h0000_4000);   // 0.5 -> 0 (even)
    // direct checks of a few known answers
    c = base_cfg(); c.sgn = 1; c.aop = AOP_NEGX; c.ysel = YS_A; c.cond = C_GT; c.osel = OS_SEL;
    send(c, 32'hFFFF_FFF9, 0);               // abs(-7) = 7
    send(c, 32'd12, 0);                      // abs(12) = 12
    // bit-field extract: bits [11:4] of A
    c = base_cfg(); c.lsh_amt = 20; c.ysel = YS_ZERO; c.rsh_amt = 24;
    send(c, 32'hABCD_E5A7, 0);
    // the four rounding modes on -5 >> 1 (=-2.5)
    for (int m = 0; m < 4; m++) begin
      c = base_cfg(); c.sgn = 1; c.ysel = YS_ZERO; c.rsh_amt = 1; c.rnd = rnd_e'(m);
      send(c, 32'hFFFF_FFFB, 0);
    end
    // boolean compare and conditional move
    c = base_cfg(); c.sgn = 1; c.aop = AOP_SUB; c.cond = C_LT; c.osel = OS_BOOL;
    send(c, 3, 5);
    c = base_cfg(); c.sgn = 1; c.aop = AOP_SUB; c.cond = C_LT; c.osel = OS_Y; c.cmov = 1;
    send(c, 9, 5);
    send(c, 2, 5);
    // multiply-add through the carry-save adder: a*b + (a << 4) + b
    c = base_cfg(); c.sgn = 1; c.use_mul = 1; c.mac = 1; c.lsh_amt = 4; c.ysel = YS_B;
    send(c, 3, 5);                           // 15 + 48 + 5 = 68
    send(c, 32'hFFFF_FFFE, 7);               // -14 - 32 + 7 = -39
    // random configurations, back to back
    for (int i = 0; i < 3000; i++) begin
      c = vpcfg_t'($urandom);
      send(c, $urandom, (i % 3 == 0) ? $urandom_range(0, 70) : $urandom);
    end
    repeat (6) @(posedge clk);
    #1;
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // directed known answers (beyond the model comparison)
  initial begin
    static int n = 0;
    logic [31:0] known [16] = '{32'h2000, 32'h7FFF, 32'h0002, 32'h0000, 32'd7, 32'd12, 32'h5A,
                                32'hFFFF_FFFD, 32'hFFFF_FFFE, 32'hFFFF_FFFE, 32'hFFFF_FFFE, 32'd1, 32'd5,
                                32'd5, 32'd68, 32'hFFFF_FFD9};
    wait (rst_n);
    while (n < 16) begin
      @(posedge clk);
      if (out_valid) begin
        checks++;
        if (out_result !== known[n]) begin
          failures++;
          $display("KNOWN %0d got %h exp %h", n, out_result, known[n]);
        end
        n++;
      end
    end
  end
endmodule
