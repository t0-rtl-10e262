// t0_top: the T0 vector coprocessor with its instruction cache and memory
// interface.
//
// A scalar core (not part of this RTL) fetches instructions through the 1 KB
// instruction cache and hands decoded vector instructions to the vector issue
// stage. Three vector units run concurrently behind one interlocked issue
// point: the vector memory unit (VMP) and two arithmetic units, VP0 with a
// 16x16 multiplier in each lane and VP1 without. Each arithmetic unit is eight
// reconfigurable 32-bit pipelines; the configuration word that each instruction
// carries chooses what every stage of the pipeline does. All units exchange
// data only through the 16 x 32-element vector register file, whose 5 read and
// 3 write ports are 256 bits wide:
//   read 0,1 / write 0: VP0;  read 2,3 / write 1: VP1;  read 4 / write 2: VMP.
// The VMP and the instruction cache share the 128-bit external memory port,
// the VMP first. Scalar results (element extract, scalar load, post-incremented
// base address) return to the core on sres_*.
//
// Ports: vector instruction in (vinst_valid/vinst/vinst_ready, accepted when
// valid and ready are high at a clock edge), scalar results out, instruction
// fetch (if_req/if_pc, answered by if_valid/if_instr in the same cycle on a
// hit), and the external memory pins (line address, byte enables, 128-bit
// write data; read data one cycle after the request). The serial host
// interface and the scalar core itself are not included.
module t0_top
  import t0_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // vector instructions from the scalar core
  input  logic         vinst_valid,
  input  vinst_t       vinst,
  output logic         vinst_ready,
  output logic         stall_hazard,
  output logic         stall_busy,
  // scalar results to the core
  output logic         sres_valid,
  output logic [31:0]  sres_data,
  // instruction fetch
  input  logic         if_req,
  input  logic [31:0]  if_pc,
  output logic         if_valid,
  output logic [31:0]  if_instr,
  // external memory
  output logic         mem_req,
  output logic         mem_we,
  output logic [27:0]  mem_addr,
  output logic [15:0]  mem_be,
  output logic [127:0] mem_wdata,
  input  logic [127:0] mem_rdata
);

  // ---------------- vector register file ----------------
  logic [4:0][3:0]       rf_rd_reg;
  logic [4:0][1:0]       rf_rd_grp;
  logic [4:0][7:0][31:0] rf_rd_data;
  logic [2:0][7:0]       rf_wr_en;
  logic [2:0][3:0]       rf_wr_reg;
  logic [2:0][1:0]       rf_wr_grp;
  logic [2:0][7:0][31:0] rf_wr_data;

  vreg_file u_vrf (
    .clk     (clk),
    .rd_reg  (rf_rd_reg),
    .rd_grp  (rf_rd_grp),
    .rd_data (rf_rd_data),
    .wr_en   (rf_wr_en),
    .wr_reg  (rf_wr_reg),
    .wr_grp  (rf_wr_grp),
    .wr_data (rf_wr_data)
  );

  // ---------------- issue ----------------
  logic [2:0]            unit_ready, unit_valid;
  logic [2:0][NVREG-1:0] unit_rd_mask, unit_wr_mask;

  vissue u_issue (
    .inst_valid   (vinst_valid),
    .inst         (vinst),
    .inst_ready   (vinst_ready),
    .unit_ready   (unit_ready),
    .unit_rd_mask (unit_rd_mask),
    .unit_wr_mask (unit_wr_mask),
    .unit_valid   (unit_valid),
    .stall_hazard (stall_hazard),
    .stall_busy   (stall_busy)
  );

  // ---------------- arithmetic units ----------------
  logic [7:0] vp0_sat, vp1_sat;
  logic       vp0_cskip, vp1_cskip;

  vp_unit #(.HAS_MUL(1'b1)) u_vp0 (
    .clk         (clk),
    .rst_n       (rst_n),
    .issue_valid (unit_valid[U_VP0]),
    .issue       (vinst),
    .ready       (unit_ready[U_VP0]),
    .rd_mask     (unit_rd_mask[U_VP0]),
    .wr_mask     (unit_wr_mask[U_VP0]),
    .rd_reg      (rf_rd_reg[1:0]),
    .rd_grp      (rf_rd_grp[1:0]),
    .rd_data     (rf_rd_data[1:0]),
    .wr_en       (rf_wr_en[0]),
    .wr_reg      (rf_wr_reg[0]),
    .wr_grp      (rf_wr_grp[0]),
    .wr_data     (rf_wr_data[0]),
    .sat         (vp0_sat),
    .cmov_skip   (vp0_cskip)
  );

  vp_unit #(.HAS_MUL(1'b0)) u_vp1 (
    .clk         (clk),
    .rst_n       (rst_n),
    .issue_valid (unit_valid[U_VP1]),
    .issue       (vinst),
    .ready       (unit_ready[U_VP1]),
    .rd_mask     (unit_rd_mask[U_VP1]),
    .wr_mask     (unit_wr_mask[U_VP1]),
    .rd_reg      (rf_rd_reg[3:2]),
    .rd_grp      (rf_rd_grp[3:2]),
    .rd_data     (rf_rd_data[3:2]),
    .wr_en       (rf_wr_en[1]),
    .wr_reg      (rf_wr_reg[1]),
    .wr_grp      (rf_wr_grp[1]),
    .wr_data     (rf_wr_data[1]),
    .sat         (vp1_sat),
    .cmov_skip   (vp1_cskip)
  );

  // ---------------- vector memory unit ----------------
  logic         v_req, v_we, vmp_misaligned;
  logic [27:0]  v_addr;
  logic [15:0]  v_be;
  logic [127:0] v_wdata;

  vmp u_vmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .issue_valid (unit_valid[U_VMP]),
    .issue       (vinst),
    .ready       (unit_ready[U_VMP]),
    .rd_mask     (unit_rd_mask[U_VMP]),
    .wr_mask     (unit_wr_mask[U_VMP]),
    .rd_reg      (rf_rd_reg[4]),
    .rd_grp      (rf_rd_grp[4]),
    .rd_data     (rf_rd_data[4]),
    .wr_en       (rf_wr_en[2]),
    .wr_reg      (rf_wr_reg[2]),
    .wr_grp      (rf_wr_grp[2]),
    .wr_data     (rf_wr_data[2]),
    .mem_req     (v_req),
    .mem_we      (v_we),
    .mem_addr    (v_addr),
    .mem_be      (v_be),
    .mem_wdata   (v_wdata),
    .mem_rdata   (mem_rdata),
    .sres_valid  (sres_valid),
    .sres_data   (sres_data),
    .misaligned  (vmp_misaligned)
  );

  // ---------------- instruction cache and memory interface ----------------
  logic        ic_req, ic_gnt, ic_miss, ic_pf_used, mem_busy;
  logic [27:0] ic_addr;

  icache u_icache (
    .clk      (clk),
    .rst_n    (rst_n),
    .if_req   (if_req),
    .if_pc    (if_pc),
    .if_valid (if_valid),
    .if_instr (if_instr),
    .m_req    (ic_req),
    .m_addr   (ic_addr),
    .m_gnt    (ic_gnt),
    .m_rdata  (mem_rdata),
    .miss     (ic_miss),
    .pf_used  (ic_pf_used)
  );

  mem_if u_mem_if (
    .clk        (clk),
    .rst_n      (rst_n),
    .v_req      (v_req),
    .v_we       (v_we),
    .v_addr     (v_addr),
    .v_be       (v_be),
    .v_wdata    (v_wdata),
    .i_req      (ic_req),
    .i_addr     (ic_addr),
    .i_gnt      (ic_gnt),
    .mem_req    (mem_req),
    .mem_we     (mem_we),
    .mem_addr   (mem_addr),
    .mem_be     (mem_be),
    .mem_wdata  (mem_wdata),
    .busy_cycle (mem_busy)
  );

endmodule
