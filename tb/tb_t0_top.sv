// tb_t0_top: end-to-end test of the vector coprocessor at its full size.
//
// A behavioural stand-in for the scalar core feeds a program of vector
// instructions in order and, in parallel, fetches instructions through the
// instruction cache. The program starts with a fixed-point workload, a Q15
// dot product of two 32-element vectors (unit-stride 16-bit loads, one
// multiply-scale-round-saturate pass on VP0, a reduction by repeated vector
// extract on the VMP and add on VP1, then scalar extract), followed by a long
// random mix of arithmetic, memory and editing instructions on a small set of
// registers, so that operations overlap and depend on each other. Expected
// state is kept by executing every instruction in program order on shadow
// copies of the registers and memory. At the end every register is stored to
// memory by the design itself and the whole data area is compared; scalar
// results are compared in order. Each mechanism of the design must have
// happened at least once: hazard and busy stalls, same-cycle register-file
// bypass, misaligned unit-stride access, saturation, conditional-move
// suppression, instruction-cache misses served from memory and from the
// prefetch buffer, and cache requests deferred behind vector memory traffic.
module tb_t0_top;
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

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- shadow machine ----------------
  logic [31:0] sv [16][32];
  logic [7:0]  rmem [logic [31:0]];
  logic [31:0] exp_sres [$];

  function automatic logic [7:0] rpeek(input logic [31:0] a);
    return rmem.exists(a) ? rmem[a] : u_mem.init_byte(a);
  endfunction

  function automatic logic [31:0] rd_elem(input logic [31:0] a, input int eb, input logic sx);
    logic [31:0] v = '0;
    for (int b = 0; b < eb; b++) v[8*b +: 8] = rpeek(a + 32'(b));
    if (sx && eb == 1) v = {{24{v[7]}}, v[7:0]};
    if (sx && eb == 2) v = {{16{v[15]}}, v[15:0]};
    return v;
  endfunction

  task automatic wr_elem(input logic [31:0] a, input int eb, input logic [31:0] v);
    for (int b = 0; b < eb; b++) rmem[a + 32'(b)] = v[8*b +: 8];
  endtask

  // execute one instruction on the shadow state
  task automatic shadow_exec(input vinst_t i);
    int eb = 1 << i.esz;
    logic [31:0] a;
    logic [31:0] s1 [32], s2 [32];
    logic [32:0] m;
    for (int e = 0; e < 32; e++) begin s1[e] = sv[i.vs1][e]; s2[e] = sv[i.vs2][e]; end
    if (i.unit != U_VMP) begin
      for (int e = 0; e < int'(i.vl); e++) begin
        m = model(vpcfg_t'(i.rt), s1[e], i.bscalar ? i.rs : s2[e], i.unit == U_VP0);
        if (m[32]) sv[i.vd][e] = m[31:0];
      end
      return;
    end
    case (i.mop)
      M_LD, M_LDS, M_LDX: for (int e = 0; e < int'(i.vl); e++) begin
        a = (i.mop == M_LD) ? i.rs + 32'(e * eb) : (i.mop == M_LDS) ? i.rs + 32'(e) * i.rt : i.rs + s2[e];
        sv[i.vd][e] = rd_elem(a, eb, i.sext);
      end
      M_ST, M_STS, M_STX: for (int e = 0; e < int'(i.vl); e++) begin
        a = (i.mop == M_ST) ? i.rs + 32'(e * eb) : (i.mop == M_STS) ? i.rs + 32'(e) * i.rt : i.rs + s2[e];
        wr_elem(a, eb, s1[e]);
      end
      M_INS:  sv[i.vd][i.rt[4:0]] = i.rs;
      M_EXT:  exp_sres.push_back(s1[i.rt[4:0]]);
      M_VEXT: for (int e = 0; e < int'(i.vl); e++) sv[i.vd][e] = (int'(i.rt) + e < 32) ? s1[int'(i.rt) + e] : 0;
      M_SLD:  exp_sres.push_back(rd_elem(i.rs, eb, i.sext));
      M_SST:  wr_elem(i.rs, eb, i.rt);
      default: ;
    endcase
    if ((i.mop == M_LD || i.mop == M_ST) && i.vl != 0) exp_sres.push_back(i.rs + 32'(int'(i.vl) * eb));
  endtask

  // ---------------- instruction driver ----------------
  vinst_t prog [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // offer one instruction (call at a falling edge) until it is taken; back-to-back
  // calls issue on consecutive cycles
  task automatic issue(input vinst_t i);
    shadow_exec(i);
    vinst = i; vinst_valid = 1;
    #1;
    while (!vinst_ready) begin
      @(negedge clk); #1;
    end
    @(negedge clk);
    vinst_valid = 0;
  endtask

  function automatic vinst_t vp(input unit_e u, input int vd, input int a, input int b, input int vl, input vpcfg_t c);
    vinst_t i = '0;
    i.unit = u; i.vd = 4'(vd); i.vs1 = 4'(a); i.vs2 = 4'(b); i.vl = 6'(vl); i.rt = c;
    return i;
  endfunction

  function automatic vinst_t vm(input mop_e m, input esz_e sz, input int vd, input int vs1, input int vs2,
                                input int vl, input logic [31:0] rs, input logic [31:0] rt);
    vinst_t i = '0;
    i.unit = U_VMP; i.mop = m; i.esz = sz; i.sext = 1'b1; i.vd = 4'(vd); i.vs1 = 4'(vs1); i.vs2 = 4'(vs2);
    i.vl = 6'(vl); i.rs = rs; i.rt = rt;
    return i;
  endfunction

  // ---------------- scalar results ----------------
  int n_sres = 0;
  always @(posedge clk) if (rst_n && sres_valid) begin
    logic [31:0] e;
    n_sres++;
    if (exp_sres.size() == 0) chk(0, "unexpected scalar result");
    else begin
      e = exp_sres.pop_front();
      chk(sres_data === e, $sformatf("scalar result got %h exp %h", sres_data, e));
    end
  end

  // ---------------- instruction fetch ----------------
  bit fetch_on = 0;
  initial begin
    logic [31:0] pc = 32'h8000;
    if_req = 0; if_pc = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (fetch_on) begin
        if_req = 1; if_pc = pc;
        #1;
        if (if_valid) begin
          chk(if_instr === {u_mem.init_byte(pc + 3), u_mem.init_byte(pc + 2), u_mem.init_byte(pc + 1), u_mem.init_byte(pc)},
              $sformatf("fetch %h", pc));
          pc = ($urandom_range(0, 20) == 0) ? 32'h8000 + 32'($urandom_range(0, 2047) * 4) : pc + 4;
        end
      end else if_req = 0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_hazard = 0, n_busy = 0, n_bypass = 0, n_misal = 0, n_sat = 0, n_cskip = 0;
  int n_icmiss = 0, n_icpf = 0, n_icdefer = 0, n_par = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall_hazard) n_hazard++;
    if (stall_busy) n_busy++;
    if (dut.vmp_misaligned) n_misal++;
    if (|dut.vp0_sat || |dut.vp1_sat) n_sat++;
    if (dut.vp0_cskip || dut.vp1_cskip) n_cskip++;
    if (dut.ic_miss) n_icmiss++;
    if (dut.ic_pf_used) n_icpf++;
    if (dut.ic_req && dut.v_req) n_icdefer++;
    if ((dut.u_vp0.act ? 1 : 0) + (dut.u_vp1.act ? 1 : 0) + (dut.u_vmp.st != 0 ? 1 : 0) >= 2) n_par++;
    for (int r = 0; r < 4; r++)
      for (int w = 0; w < 3; w++)
        if (((r < 2) ? dut.u_vp0.act : dut.u_vp1.act) && |dut.rf_wr_en[w] &&
            dut.rf_wr_reg[w] == dut.rf_rd_reg[r] && dut.rf_wr_grp[w] == dut.rf_rd_grp[r]) n_bypass++;
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpcfg_t c;
    vinst_t i;
    logic [31:0] dot;
    int ncyc;
    vinst_valid = 0; vinst = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fetch_on = 1;
    // every register starts from memory contents
    for (int r = 0; r < 16; r++) issue(vm(M_LD, ES_32, r, 0, 0, 32, 32'h2000 + 32'(r * 128), 0));

    // ---------- Q15 dot product ----------
    ncyc = cyc;
    issue(vm(M_LD, ES_16, 1, 0, 0, 32, 32'h1000, 0));
    issue(vm(M_LD, ES_16, 2, 0, 0, 32, 32'h1042, 0));           // misaligned
    c = '0; c.use_mul = 1; c.sgn = 1; c.ysel = YS_ZERO; c.rsh_amt = 15; c.rnd = RND_EVEN; c.clip = CL_16;
    issue(vp(U_VP0, 3, 1, 2, 32, c));
    c = '0; c.sgn = 1; c.ysel = YS_B; c.aop = AOP_ADD;
    for (int h = 16; h >= 1; h /= 2) begin
      issue(vm(M_VEXT, ES_32, 4, 3, 0, h, 0, 32'(h)));
      issue(vp(U_VP1, 3, 3, 4, h, c));
    end
    issue(vm(M_EXT, ES_32, 0, 3, 0, 0, 0, 0));
    wait (exp_sres.size() == 0);
    @(negedge clk);
    $display("dot product workload: %0d cycles", cyc - ncyc);
    // independent answer
    dot = 0;
    for (int e = 0; e < 32; e++) begin
      longint p, q, r;
      p = longint'($signed(rd_elem(32'h1000 + 32'(2 * e), 2, 1))) * longint'($signed(rd_elem(32'h1042 + 32'(2 * e), 2, 1)));
      q = p >>> 15; r = p - (q << 15);
      if (r > 16384 || (r == 16384 && q[0])) q++;
      if (q > 32767) q = 32767;
      if (q < -32768) q = -32768;
      dot += 32'(q);
    end
    chk(sv[3][0] === dot, $sformatf("dot product shadow %h direct %h", sv[3][0], dot));

    // ---------- index registers v14, v15 (offsets aligned to 4) ----------
    for (int e = 0; e < 32; e++) begin
      issue(vm(M_INS, ES_32, 14, 0, 0, 0, 32'($urandom_range(0, 127) * 4), 32'(e)));
    end
    issue(vm(M_LD, ES_32, 15, 0, 0, 32, 32'h1800, 0));
    c = '0; c.lop = LOP_AND; c.ysel = YS_ZERO;                  // v15 &= 0x1FC
    i = vp(U_VP1, 15, 15, 0, 32, c); i.bscalar = 1; i.rs = 32'h1FC;
    issue(i);

    // ---------- random program ----------
    for (int n = 0; n < 10000; n++) begin
      int k, eb, vd, a, b, vl;
      esz_e sz;
      k  = $urandom_range(0, 9);
      sz = esz_e'($urandom_range(0, 2));
      eb = 1 << sz;
      vd = $urandom_range(0, 7); a = $urandom_range(0, 7); b = $urandom_range(0, 7);
      vl = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 32) : 32;
      if (k <= 4) begin
        i = vp(($urandom_range(0, 1) == 0) ? U_VP0 : U_VP1, vd, a, b, vl, vpcfg_t'($urandom));
        i.bscalar = ($urandom_range(0, 4) == 0);
        i.rs = $urandom_range(0, 40);
      end else begin
        case ($urandom_range(0, 10))
          0: i = vm(M_LD, sz, vd, 0, 0, vl, 32'($urandom_range(0, 3800)), 0);
          1: i = vm(M_ST, sz, 0, a, 0, vl, 32'($urandom_range(0, 3800)), 0);
          2: i = vm(M_LDS, sz, vd, 0, 0, vl, 32'($urandom_range(0, 500) * eb), 32'($urandom_range(0, 24) * eb));
          3: i = vm(M_STS, sz, 0, a, 0, vl, 32'($urandom_range(0, 500) * eb), 32'($urandom_range(0, 24) * eb));
          4: i = vm(M_LDX, sz, vd, 0, 14 + $urandom_range(0, 1), vl, 32'($urandom_range(0, 500) * eb), 0);
          5: i = vm(M_STX, sz, 0, a, 14 + $urandom_range(0, 1), vl, 32'($urandom_range(0, 500) * eb), 0);
          6: i = vm(M_INS, sz, vd, 0, 0, 0, $urandom, 32'($urandom_range(0, 31)));
          7: i = vm(M_EXT, sz, 0, a, 0, 0, 0, 32'($urandom_range(0, 31)));
          8: i = vm(M_VEXT, sz, vd, a, 0, vl, 0, 32'($urandom_range(0, 31)));
          9: i = vm(M_SLD, sz, 0, 0, 0, 0, 32'($urandom_range(0, 1000) * eb), 0);
          default: i = vm(M_SST, sz, 0, 0, 0, 0, 32'($urandom_range(0, 1000) * eb), $urandom);
        endcase
        i.sext = 1'($urandom);
      end
      issue(i);
    end

    // ---------- dump every register through the design and compare ----------
    for (int r = 0; r < 16; r++) issue(vm(M_ST, ES_32, 0, r, 0, 32, 32'h4000 + 32'(r * 128), 0));
    wait (exp_sres.size() == 0);
    repeat (20) @(negedge clk);
    for (logic [31:0] ad = 0; ad < 32'h4800; ad++)
      chk(u_mem.peek(ad) === rpeek(ad), $sformatf("mem[%h] got %h exp %h", ad, u_mem.peek(ad), rpeek(ad)));
    chk(exp_sres.size() == 0, "missing scalar results");

    $display("hazard stalls %0d, busy stalls %0d, bypass reads %0d, misaligned %0d, saturations %0d, cmov skips %0d",
             n_hazard, n_busy, n_bypass, n_misal, n_sat, n_cskip);
    $display("icache misses %0d, prefetch-served %0d, deferred %0d, cycles with 2+ units busy %0d, scalar results %0d",
             n_icmiss, n_icpf, n_icdefer, n_par, n_sres);
    chk(n_hazard > 0, "no hazard stall");
    chk(n_busy > 0, "no busy stall");
    chk(n_bypass > 0, "no bypass read");
    chk(n_misal > 0, "no misaligned access");
    chk(n_sat > 0, "no saturation");
    chk(n_cskip > 0, "no conditional-move suppression");
    chk(n_icmiss > 0, "no icache miss");
    chk(n_icpf > 0, "no prefetch-served miss");
    chk(n_icdefer > 0, "no deferred icache request");
    chk(n_par > 0, "units never overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
