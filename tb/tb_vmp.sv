// tb_vmp: self-checking test of the vector memory unit with a register file
// and an SRAM model. Random unit-stride, strided and indexed loads and stores
// of 8/16/32-bit elements at random alignments, scalar insert/extract, vector
// extract and scalar loads/stores are checked against shadow copies of the
// registers and of memory. Rate checks: a 32-bit unit-stride load of 32
// elements writes the register file in 8 consecutive cycles (4 per cycle), an
// 8-bit one in 4 (8 per cycle); an aligned 32-word store writes 8 consecutive
// lines and a misaligned one 9, one cycle more; strided accesses issue at most
// one memory request per cycle.
module tb_vmp;
  import t0_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][3:0]       rd_reg;
  logic [4:0][1:0]       rd_grp;
  logic [4:0][7:0][31:0] rd_data;
  logic [2:0][7:0]       wr_en;
  logic [2:0][3:0]       wr_reg;
  logic [2:0][1:0]       wr_grp;
  logic [2:0][7:0][31:0] wr_data;
  vreg_file u_rf (.*);

  logic         iv, rdy, sres_valid, misaligned;
  vinst_t       ins;
  logic [15:0]  rmask, wmask;
  logic         mem_req, mem_we;
  logic [27:0]  mem_addr;
  logic [15:0]  mem_be;
  logic [127:0] mem_wdata, mem_rdata;
  logic [31:0]  sres_data;

  vmp dut (
    .clk, .rst_n, .issue_valid(iv), .issue(ins), .ready(rdy), .rd_mask(rmask), .wr_mask(wmask),
    .rd_reg(rd_reg[4]), .rd_grp(rd_grp[4]), .rd_data(rd_data[4]),
    .wr_en(wr_en[2]), .wr_reg(wr_reg[2]), .wr_grp(wr_grp[2]), .wr_data(wr_data[2]),
    .mem_req, .mem_we, .mem_addr, .mem_be, .mem_wdata, .mem_rdata,
    .sres_valid, .sres_data, .misaligned);

  sram_model u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .be(mem_be),
                    .wdata(mem_wdata), .rdata(mem_rdata));

  logic [31:0] sv [16][32];
  logic [7:0]  rmem [logic [31:0]];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // activity recorders
  int vrf_wr_cycles, vrf_wr_first, vrf_wr_last, mem_wr_cycles, mem_wr_first, mem_wr_last, mem_req_cycles;
  logic [31:0] last_sres;
  int sres_count;
  always @(posedge clk) begin
    if (|wr_en[2]) begin
      if (vrf_wr_cycles == 0) vrf_wr_first = cyc;
      vrf_wr_last = cyc;
      vrf_wr_cycles++;
    end
    if (mem_req && mem_we) begin
      if (mem_wr_cycles == 0) mem_wr_first = cyc;
      mem_wr_last = cyc;
      mem_wr_cycles++;
    end
    if (mem_req) mem_req_cycles++;
    if (sres_valid) begin
      last_sres = sres_data;
      sres_count++;
    end
  end

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

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic fill_reg(input int r, input logic [31:0] mask);
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      wr_en[0] = 8'hFF; wr_reg[0] = 4'(r); wr_grp[0] = 2'(g);
      for (int l = 0; l < 8; l++) begin
        wr_data[0][l] = $urandom & mask;
        sv[r][g*8+l] = wr_data[0][l];
      end
    end
    @(negedge clk); wr_en[0] = '0;
  endtask

  task automatic check_reg(input int r);
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      rd_reg[0] = 4'(r); rd_grp[0] = 2'(g);
      #1;
      for (int l = 0; l < 8; l++)
        chk(rd_data[0][l] === sv[r][g*8+l], $sformatf("v%0d[%0d] got %h exp %h", r, g*8+l, rd_data[0][l], sv[r][g*8+l]));
    end
  endtask

  task automatic check_mem(input logic [31:0] lo, input logic [31:0] hi);
    for (logic [31:0] a = lo; a < hi; a++)
      chk(u_mem.peek(a) === rpeek(a), $sformatf("mem[%h] got %h exp %h", a, u_mem.peek(a), rpeek(a)));
  endtask

  task automatic run(input vinst_t i);
    vrf_wr_cycles = 0; mem_wr_cycles = 0; mem_req_cycles = 0; sres_count = 0;
    @(negedge clk);
    while (!rdy) @(negedge clk);
    ins = i; iv = 1;
    @(negedge clk);
    iv = 0;
    while (!rdy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // run one operation and update the shadow state
  task automatic op(input vinst_t i);
    int eb = 1 << i.esz;
    logic [31:0] lo = 32'hFFFF_FFFF, hi = 0, a, exp_s;
    logic [31:0] src [32];
    logic expect_s = 0;
    for (int e = 0; e < 32; e++) src[e] = sv[i.vs1][e];
    case (i.mop)
      M_LD, M_LDS, M_LDX: for (int e = 0; e < int'(i.vl); e++) begin
        a = (i.mop == M_LD) ? i.rs + 32'(e * eb) : (i.mop == M_LDS) ? i.rs + 32'(e) * i.rt : i.rs + sv[i.vs2][e];
        sv[i.vd][e] = rd_elem(a, eb, i.sext);
      end
      M_ST, M_STS, M_STX: for (int e = 0; e < int'(i.vl); e++) begin
        a = (i.mop == M_ST) ? i.rs + 32'(e * eb) : (i.mop == M_STS) ? i.rs + 32'(e) * i.rt : i.rs + sv[i.vs2][e];
        wr_elem(a, eb, src[e]);
        if (a < lo) lo = a;
        if (a + 32'(eb) > hi) hi = a + 32'(eb);
      end
      M_INS: sv[i.vd][i.rt[4:0]] = i.rs;
      M_EXT: begin expect_s = 1; exp_s = src[i.rt[4:0]]; end
      M_VEXT: for (int e = 0; e < int'(i.vl); e++) sv[i.vd][e] = (int'(i.rt) + e < 32) ? src[int'(i.rt) + e] : 0;
      M_SLD: begin expect_s = 1; exp_s = rd_elem(i.rs, eb, i.sext); end
      M_SST: begin wr_elem(i.rs, eb, i.rt); lo = i.rs; hi = i.rs + 32'(eb); end
      default: ;
    endcase
    if ((i.mop == M_LD || i.mop == M_ST) && i.vl != 0) begin expect_s = 1; exp_s = i.rs + 32'(int'(i.vl) * eb); end
    run(i);
    if (expect_s) chk(sres_count == 1 && last_sres === exp_s, $sformatf("scalar result op%0d got %h exp %h", i.mop, last_sres, exp_s));
    if (i.mop inside {M_LD, M_LDS, M_LDX, M_INS, M_VEXT}) check_reg(int'(i.vd));
    if (hi > lo) check_mem(lo, hi);
  endtask

  function automatic vinst_t mk(input mop_e m, input esz_e sz);
    vinst_t i = '0;
    i.unit = U_VMP; i.mop = m; i.esz = sz; i.sext = 1'($urandom);
    i.vd = 4'($urandom_range(4, 15)); i.vs1 = 4'($urandom_range(4, 15)); i.vs2 = 4'($urandom_range(0, 3));
    i.vl = 6'($urandom_range(0, 32));
    return i;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vinst_t i;
    iv = 0; ins = '0;
    wr_en[1:0] = '0; wr_reg[1:0] = '0; wr_grp[1:0] = '0; wr_data[1:0] = '0;
    rd_reg[3:0] = '0; rd_grp[3:0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 4; r < 16; r++) fill_reg(r, 32'hFFFF_FFFF);
    // index registers v0..v3: offsets that are multiples of 1, 2, 4 bytes
    fill_reg(0, 32'h0000_01FF);
    fill_reg(1, 32'h0000_01FE);
    fill_reg(2, 32'h0000_01FC);
    fill_reg(3, 32'h0000_01FC);

    // ---- rate checks ----
    i = mk(M_LD, ES_32); i.vl = 32; i.rs = 32'h100; op(i);
    chk(vrf_wr_cycles == 8 && vrf_wr_last - vrf_wr_first == 7, $sformatf("32-bit load rate %0d cycles", vrf_wr_cycles));
    i = mk(M_LD, ES_8); i.vl = 32; i.rs = 32'h203; op(i);
    chk(vrf_wr_cycles == 4 && vrf_wr_last - vrf_wr_first == 3, $sformatf("8-bit load rate %0d cycles", vrf_wr_cycles));
    i = mk(M_LD, ES_16); i.vl = 32; i.rs = 32'h300; op(i);
    chk(vrf_wr_cycles == 4 && vrf_wr_last - vrf_wr_first == 3, $sformatf("16-bit load rate %0d cycles", vrf_wr_cycles));
    i = mk(M_ST, ES_32); i.vl = 32; i.rs = 32'h400; op(i);
    chk(mem_wr_cycles == 8 && mem_wr_last - mem_wr_first == 7, $sformatf("aligned store %0d lines", mem_wr_cycles));
    i = mk(M_ST, ES_32); i.vl = 32; i.rs = 32'h504; op(i);
    chk(mem_wr_cycles == 9 && mem_wr_last - mem_wr_first == 8, $sformatf("misaligned store %0d lines", mem_wr_cycles));
    i = mk(M_LD, ES_32); i.vl = 32; i.rs = 32'h608; op(i);
    chk(vrf_wr_cycles == 8 && mem_req_cycles == 9, $sformatf("misaligned load %0d writes %0d lines", vrf_wr_cycles, mem_req_cycles));
    i = mk(M_LDS, ES_32); i.vl = 32; i.rs = 32'h700; i.rt = 32'd20; op(i);
    chk(mem_req_cycles == 32 && vrf_wr_cycles == 32, $sformatf("strided load %0d requests", mem_req_cycles));

    // ---- random operations ----
    for (int n = 0; n < 400; n++) begin
      esz_e sz;
      int eb;
      mop_e m;
      sz = esz_e'($urandom_range(0, 2));
      eb = 1 << sz;
      m  = mop_e'($urandom_range(0, 10));
      i = mk(m, sz);
      i.vs2 = 4'(sz == ES_8 ? 0 : sz == ES_16 ? 1 : 2);
      case (m)
        M_LD, M_ST:   i.rs = 32'($urandom_range(0, 4000));
        M_LDS, M_STS: begin i.rs = 32'($urandom_range(0, 1000) * eb); i.rt = 32'($urandom_range(0, 20) * eb); end
        M_LDX, M_STX: i.rs = 32'($urandom_range(0, 1000) * eb);
        M_INS:        begin i.rs = $urandom; i.rt = 32'($urandom_range(0, 31)); end
        M_EXT:        i.rt = 32'($urandom_range(0, 31));
        M_VEXT:       i.rt = 32'($urandom_range(0, 31));
        M_SLD, M_SST: begin i.rs = 32'($urandom_range(0, 1000) * eb); i.rt = $urandom; end
        default: ;
      endcase
      op(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
