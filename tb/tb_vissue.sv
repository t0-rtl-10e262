// tb_vissue: self-checking test of the issue interlock. Random instructions,
// unit readiness and pending read/write masks are applied; the expected issue
// decision is worked out register by register from the instruction's operand
// use (RAW against pending writes, WAR/WAW against pending reads and writes)
// and the target unit's readiness. Each kind of stall must occur.
module tb_vissue;
  import t0_pkg::*;

  logic         inst_valid, inst_ready, stall_hazard, stall_busy;
  vinst_t       inst;
  logic [2:0]   unit_ready, unit_valid;
  logic [2:0][15:0] unit_rd_mask, unit_wr_mask;

  vissue dut (.*);

  int checks = 0, failures = 0, n_raw = 0, n_war = 0, n_busy = 0, n_issue = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      bit reads [16], writes [16];
      bit raw, war, busy, exp_ready;
      inst = vinst_t'({$urandom, $urandom, $urandom});
      inst.unit = unit_e'($urandom_range(0, 2));
      inst.mop  = mop_e'($urandom_range(0, 10));
      inst_valid = 1'($urandom_range(0, 7) != 0);
      unit_ready = 3'($urandom);
      for (int u = 0; u < 3; u++) begin
        unit_rd_mask[u] = 16'(1 << $urandom_range(0, 15)) & 16'($urandom_range(0, 1) ? 16'hFFFF : 16'h0);
        unit_wr_mask[u] = 16'(1 << $urandom_range(0, 15)) & 16'($urandom_range(0, 1) ? 16'hFFFF : 16'h0);
      end
      foreach (reads[r]) begin reads[r] = 0; writes[r] = 0; end
      if (inst.unit == U_VMP) begin
        if (inst.mop inside {M_LD, M_LDS, M_LDX, M_INS, M_VEXT}) writes[inst.vd] = 1;
        if (inst.mop inside {M_ST, M_STS, M_STX, M_EXT, M_VEXT}) reads[inst.vs1] = 1;
        if (inst.mop inside {M_LDX, M_STX}) reads[inst.vs2] = 1;
      end else begin
        writes[inst.vd] = 1;
        reads[inst.vs1] = 1;
        if (!inst.bscalar) reads[inst.vs2] = 1;
      end
      raw = 0; war = 0;
      for (int r = 0; r < 16; r++)
        for (int u = 0; u < 3; u++) begin
          if (reads[r] && unit_wr_mask[u][r]) raw = 1;
          if (writes[r] && (unit_wr_mask[u][r] || unit_rd_mask[u][r])) war = 1;
        end
      busy = !unit_ready[inst.unit];
      exp_ready = !raw && !war && !busy;
      #1;
      checks++;
      if (inst_ready !== exp_ready) begin
        failures++;
        if (failures < 10) $display("FAIL ready got %0b exp %0b", inst_ready, exp_ready);
      end
      checks++;
      if (unit_valid !== ((inst_valid && exp_ready) ? 3'(1 << inst.unit) : 3'b0)) failures++;
      checks++;
      if (stall_busy !== (inst_valid && !raw && !war && busy)) failures++;
      if (inst_valid && raw) n_raw++;
      if (inst_valid && war && !raw) n_war++;
      if (stall_busy) n_busy++;
      if (|unit_valid) n_issue++;
      #9;
    end
    checks += 4;
    if (n_raw == 0) failures++;
    if (n_war == 0) failures++;
    if (n_busy == 0) failures++;
    if (n_issue == 0) failures++;
    $display("raw %0d war/waw %0d busy %0d issued %0d", n_raw, n_war, n_busy, n_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
