// tb_vp_unit: self-checking test of a vector arithmetic unit with a register file.
// Both the multiplier (VP0-style) and plain (VP1-style) units are tested. Random
// instructions with random configuration words and vector lengths run on
// random register contents; after each one the destination register is read
// back and compared with the reference model, element by element (elements at
// or beyond vl, and conditional-move elements whose condition failed, must
// keep their old value). Timing checks: with vl = 32 back-to-back instructions
// are accepted every four cycles, and the last group is written three cycles
// after it is read.
module tb_vp_unit;
  import t0_pkg::*;
  import t0_ref_pkg::*;

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

  logic   iv0, iv1, rdy0, rdy1;
  vinst_t ins;
  logic [15:0] rm0, wm0, rm1, wm1;
  logic [7:0] sat0, sat1;
  logic cs0, cs1;

  vp_unit #(.HAS_MUL(1'b1)) u_vp0 (
    .clk, .rst_n, .issue_valid(iv0), .issue(ins), .ready(rdy0), .rd_mask(rm0), .wr_mask(wm0),
    .rd_reg(rd_reg[1:0]), .rd_grp(rd_grp[1:0]), .rd_data(rd_data[1:0]),
    .wr_en(wr_en[0]), .wr_reg(wr_reg[0]), .wr_grp(wr_grp[0]), .wr_data(wr_data[0]),
    .sat(sat0), .cmov_skip(cs0));
  vp_unit #(.HAS_MUL(1'b0)) u_vp1 (
    .clk, .rst_n, .issue_valid(iv1), .issue(ins), .ready(rdy1), .rd_mask(rm1), .wr_mask(wm1),
    .rd_reg(rd_reg[3:2]), .rd_grp(rd_grp[3:2]), .rd_data(rd_data[3:2]),
    .wr_en(wr_en[1]), .wr_reg(wr_reg[1]), .wr_grp(wr_grp[1]), .wr_data(wr_data[1]),
    .sat(sat1), .cmov_skip(cs1));

  logic [31:0] shadow [16][32];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill_reg(input int r);
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      wr_en[2] = 8'hFF; wr_reg[2] = 4'(r); wr_grp[2] = 2'(g);
      for (int l = 0; l < 8; l++) begin
        wr_data[2][l] = (l % 3 == 0) ? $urandom_range(0, 40) : $urandom;
        shadow[r][g*8+l] = wr_data[2][l];
      end
    end
    @(negedge clk); wr_en[2] = '0;
  endtask

  task automatic read_reg(input int r, output logic [31:0] v [32]);
    for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      rd_reg[4] = 4'(r); rd_grp[4] = 2'(g);
      #1;
      for (int l = 0; l < 8; l++) v[g*8+l] = rd_data[4][l];
    end
  endtask

  task automatic run_one(input int unit, input vinst_t i);
    logic [31:0] exp_v [32];
    logic [31:0] got [32];
    logic [32:0] m;
    for (int e = 0; e < 32; e++) begin
      exp_v[e] = shadow[i.vd][e];
      if (e < int'(i.vl)) begin
        m = model(vpcfg_t'(i.rt), shadow[i.vs1][e], i.bscalar ? i.rs : shadow[i.vs2][e], unit == 0);
        if (m[32]) exp_v[e] = m[31:0];
      end
    end
    @(negedge clk);
    ins = i; iv0 = (unit == 0); iv1 = (unit == 1);
    @(negedge clk);
    iv0 = 0; iv1 = 0;
    repeat (10) @(negedge clk);
    read_reg(i.vd, got);
    for (int e = 0; e < 32; e++) begin
      checks++;
      if (got[e] !== exp_v[e]) begin
        failures++;
        if (failures < 10) $display("MISMATCH unit%0d e%0d got %h exp %h", unit, e, got[e], exp_v[e]);
      end
      shadow[i.vd][e] = got[e];
    end
  endtask

  int acc_cyc [$];
  int last_wr_cyc;
  always @(posedge clk) begin
    if (iv0 && rdy0) acc_cyc.push_back(cyc);
    if (|wr_en[0]) last_wr_cyc = cyc;
  end

  initial begin
    vinst_t i;
    iv0 = 0; iv1 = 0; ins = '0;
    wr_en = '0; wr_reg = '0; wr_grp = '0; wr_data = '0;
    rd_reg[4] = '0; rd_grp[4] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) fill_reg(r);
    for (int n = 0; n < 300; n++) begin
      i = '0;
      i.unit = (n % 2) ? U_VP1 : U_VP0;
      i.vd = 4'($urandom); i.vs1 = 4'($urandom); i.vs2 = 4'($urandom);
      i.vl = 6'($urandom_range(0, 32));
      i.bscalar = ($urandom_range(0, 3) == 0);
      i.rs = $urandom_range(0, 3) == 0 ? $urandom : $urandom_range(0, 40);
      i.rt = $urandom;
      run_one(n % 2, i);
      if (n % 40 == 0) fill_reg(int'(i.vd));
    end
    // throughput: four independent vl=32 instructions held valid on VP0
    i = '0; i.unit = U_VP0; i.vl = 6'd32; i.vs1 = 1; i.vs2 = 2; i.vd = 3; i.rt = 32'h0;
    acc_cyc.delete();
    @(negedge clk);
    ins = i; iv0 = 1;
    wait (acc_cyc.size() == 4);
    @(negedge clk); iv0 = 0;
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (acc_cyc[k] - acc_cyc[k-1] != 4) begin
        failures++;
        $display("ISSUE INTERVAL %0d", acc_cyc[k] - acc_cyc[k-1]);
      end
    end
    repeat (12) @(negedge clk);
    // last write: accepted at a, reads a+1..a+4, writes a+4..a+7
    checks++;
    if (last_wr_cyc - acc_cyc[3] != 7) begin
      failures++;
      $display("LATENCY %0d", last_wr_cyc - acc_cyc[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
