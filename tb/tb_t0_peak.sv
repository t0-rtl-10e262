// tb_t0_peak: peak-rate workload on the full-size design.
//
// Independent vl = 32 instructions alternate between VP0 and VP1 in one
// in-order stream, each a full scaled/rounded/clipped pass, while the VMP
// streams 8-bit unit-stride loads into other registers in the spare issue
// slots. The test measures, over the steady-state window, the element results written per cycle by the two
// arithmetic units (target: 16, i.e. 8 lanes x 2 units, each result passing
// six chained functional units: 96 operations per cycle), the register-file
// ports in use, and the memory bus occupancy. It also checks that the issue
// interval of each arithmetic unit is four cycles and that results are right
// for a sample of elements.
module tb_t0_peak;
  import t0_pkg::*;
  import t0_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         vinst_valid, vinst_ready, stall_hazard, stall_busy, sres_valid;
  vinst_t       vinst;
  logic [31:0]  sres_data;
  logic         if_req, if_valid;
  logic [31:0]  if_pc, if_instr;
  logic         mem_req, mem_we;
  logic [27:0]  mem_addr;
  logic [15:0]  mem_be;
  logic [127:0] mem_wdata, mem_rdata;

  t0_top dut (.*);
  sram_model u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .be(mem_be),
                    .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-cycle activity
  bit window = 0;
  int w_cycles = 0, w_results = 0, w_full = 0, w_membusy = 0, w_rdports = 0;
  always @(posedge clk) if (window) begin
    int n;
    n = $countones(dut.rf_wr_en[0]) + $countones(dut.rf_wr_en[1]);
    w_cycles++;
    w_results += n;
    if (n == 16) w_full++;
    if (mem_req) w_membusy++;
    w_rdports += (dut.u_vp0.act ? 2 : 0) + (dut.u_vp1.act ? 2 : 0);
  end

  int acc0 [$], acc1 [$];
  always @(posedge clk) begin
    if (dut.unit_valid[U_VP0]) acc0.push_back(cyc);
    if (dut.unit_valid[U_VP1]) acc1.push_back(cyc);
  end

  // offer one instruction from a falling edge until it is taken; back-to-back
  // calls issue on consecutive cycles
  task automatic issue(input vinst_t i);
    vinst = i; vinst_valid = 1;
    #1;
    while (!vinst_ready) begin
      @(negedge clk); #1;
    end
    @(negedge clk);
    vinst_valid = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vinst_t i;
    vpcfg_t c;
    logic [31:0] a [32], b [32];
    logic [32:0] m;
    vinst_valid = 0; vinst = '0; if_req = 0; if_pc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // operands v0 (A) and v1 (B) from memory
    for (int r = 0; r < 2; r++) begin
      i = '0; i.unit = U_VMP; i.mop = M_LD; i.esz = ES_32; i.vd = 4'(r); i.vl = 32; i.rs = 32'(r * 128);
      issue(i);
    end
    repeat (30) @(negedge clk);
    for (int e = 0; e < 32; e++) begin
      a[e] = {u_mem.init_byte(4*e+3), u_mem.init_byte(4*e+2), u_mem.init_byte(4*e+1), u_mem.init_byte(4*e)};
      b[e] = {u_mem.init_byte(128+4*e+3), u_mem.init_byte(128+4*e+2), u_mem.init_byte(128+4*e+1), u_mem.init_byte(128+4*e)};
    end
    // (A << 3) - B, arithmetic shift right 4 with round-to-nearest-even, saturated to 16 bits
    c = '0; c.lsh_amt = 3; c.sgn = 1; c.aop = AOP_SUB; c.rsh_amt = 4; c.rnd = RND_EVEN; c.clip = CL_16;
    acc0.delete(); acc1.delete();
    for (int n = 0; n < 40; n++) begin
      i = '0; i.unit = (n % 2) ? U_VP1 : U_VP0; i.vs1 = 0; i.vs2 = 1; i.vl = 32; i.rt = c;
      i.vd = 4'(2 + (n % 10));
      issue(i);
      if (n % 4 == 1) begin
        // byte stream from memory into v12..v15, sharing the issue slots
        i = '0; i.unit = U_VMP; i.mop = M_LD; i.esz = ES_8; i.vl = 32;
        i.vd = 4'(12 + (n / 4) % 4); i.rs = 32'h1000 + 32'(n * 32);
        issue(i);
      end
      if (n == 6) window = 1;
      if (n == 36) window = 0;
    end
    repeat (12) @(negedge clk);
    $display("window %0d cycles: %0d results (%0.2f per cycle), %0d cycles with 16, read ports in use %0.2f per cycle",
             w_cycles, w_results, real'(w_results) / w_cycles, w_full, real'(w_rdports) / w_cycles);
    checks++;
    if (w_results != 16 * w_cycles) begin failures++; $display("FAIL peak rate"); end
    checks++;
    if (w_rdports != 4 * w_cycles) begin failures++; $display("FAIL read-port use"); end
    for (int k = 1; k < acc0.size(); k++) begin
      checks++;
      if (acc0[k] - acc0[k-1] != 4) begin failures++; $display("FAIL VP0 interval %0d", acc0[k] - acc0[k-1]); end
    end
    for (int k = 1; k < acc1.size(); k++) begin
      checks++;
      if (acc1[k] - acc1[k-1] != 4) begin failures++; $display("FAIL VP1 interval %0d", acc1[k] - acc1[k-1]); end
    end
    // results in v2..v11 all equal the same function of v0, v1
    for (int r = 2; r < 12; r++) begin
      i = '0; i.unit = U_VMP; i.mop = M_EXT; i.vs1 = 4'(r); i.rt = 32'((r * 7) % 32);
      issue(i);
      @(posedge clk);
      while (!sres_valid) @(posedge clk);
      checks++;
      m = model(c, a[(r * 7) % 32], b[(r * 7) % 32]);
      if (sres_data !== m[31:0]) begin
        failures++;
        $display("FAIL v%0d[%0d] got %h", r, (r * 7) % 32, sres_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
