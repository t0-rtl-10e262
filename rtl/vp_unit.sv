// vp_unit: a vector arithmetic unit (VP0 or VP1) built from eight vp_lane slices.
//
// An accepted instruction names two source registers (A, B), a destination,
// a vector length vl (0..32) and a 32-bit configuration word for the lanes;
// B may instead be a scalar broadcast to all elements. The unit reads one
// element group (8 elements, 256 bits) per cycle through its two register-file
// read ports, feeds the eight lanes, and three cycles later writes the results
// through its write port with one enable per slice: a slice is written only if
// its element index is below vl and, for conditional moves, its condition held.
// With vl = 32 an instruction occupies the read ports for four cycles, so the
// unit accepts a new instruction every four cycles; `ready` rises in the last
// read cycle so that instructions follow back to back.
//
// Interface: issue_valid/issue with ready (taken when both are high); rd_mask
// and wr_mask list the registers the unit still reads and still writes, for the
// interlock in vissue. wr_mask drops a destination once its last element group
// is within two cycles of being written: an instruction issued then starts
// reading one cycle later and meets those writes through the register file's
// same-cycle read-after-write path, which shortens dependent sequences. Eight lanes, the three-cycle latency and one instruction
// per four cycles at vl = 32 follow the chip; the start-up cycle between
// acceptance and the first read and the scalar-broadcast B operand are this
// design's choices.
module vp_unit
  import t0_pkg::*;
#(
  parameter bit          HAS_MUL = 1'b1,  // VP0: 1, VP1: 0
  parameter int unsigned NL      = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    issue_valid,
  input  vinst_t                  issue,
  output logic                    ready,
  output logic [NVREG-1:0]        rd_mask,
  output logic [NVREG-1:0]        wr_mask,
  // register file: two read ports, one write port
  output logic [1:0][3:0]         rd_reg,
  output logic [1:0][1:0]         rd_grp,
  input  logic [1:0][NL-1:0][31:0] rd_data,
  output logic [NL-1:0]           wr_en,
  output logic [3:0]              wr_reg,
  output logic [1:0]              wr_grp,
  output logic [NL-1:0][31:0]     wr_data,
  output logic [NL-1:0]           sat,      // per-slice saturation event (for monitoring)
  output logic                    cmov_skip // a valid element was not written by a conditional move
);

  localparam int LAT = 3;

  logic       act;
  vinst_t     cur;
  logic [1:0] g;
  logic [1:0] last_g;

  assign last_g = 2'((cur.vl - 6'd1) >> 3);
  assign ready  = !act || (g == last_g);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      cur <= '0;
      g   <= '0;
    end else begin
      if (act && g != last_g) begin
        g <= g + 2'd1;
      end else if (issue_valid && ready && issue.vl != 6'd0) begin
        act <= 1'b1;
        cur <= issue;
        g   <= '0;
      end else begin
        act <= 1'b0;
      end
    end
  end

  // read side
  logic [NL-1:0] lane_v;
  vpcfg_t        cfg;
  assign cfg       = vpcfg_t'(cur.rt);
  assign rd_reg[0] = cur.vs1;
  assign rd_reg[1] = cur.vs2;
  assign rd_grp[0] = g;
  assign rd_grp[1] = g;

  always_comb
    for (int l = 0; l < NL; l++)
      lane_v[l] = act && ((32'(g) * NL + 32'(l)) < 32'(cur.vl));

  // tag pipeline that follows the lanes
  logic [LAT-1:0]      t_v;
  logic [LAT-1:0][3:0] t_vd;
  logic [LAT-1:0][1:0] t_g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_v  <= '0;
      t_vd <= '0;
      t_g  <= '0;
    end else begin
      t_v  <= {t_v[LAT-2:0], act};
      t_vd <= {t_vd[LAT-2:0], cur.vd};
      t_g  <= {t_g[LAT-2:0], g};
    end
  end

  logic [NL-1:0] o_v, o_wen, o_cond;

  for (genvar l = 0; l < NL; l++) begin : g_lane
    vp_lane #(.HAS_MUL(HAS_MUL)) u_lane (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (lane_v[l]),
      .in_cfg    (cfg),
      .in_a      (rd_data[0][l]),
      .in_b      (cur.bscalar ? cur.rs : rd_data[1][l]),
      .out_valid (o_v[l]),
      .out_result(wr_data[l]),
      .out_wen   (o_wen[l]),
      .out_cond  (o_cond[l]),
      .out_sat   (sat[l])
    );
  end

  assign wr_en     = o_wen;
  assign wr_reg    = t_vd[LAT-1];
  assign wr_grp    = t_g[LAT-1];
  assign cmov_skip = |(o_v & ~o_wen);

  always_comb begin
    rd_mask = '0;
    wr_mask = '0;
    if (act) begin
      rd_mask = regbit(cur.vs1) | (cur.bscalar ? '0 : regbit(cur.vs2));
      wr_mask = regbit(cur.vd);
    end
    // The last two lane stages are left out: their writes land no later than
    // the first read of an instruction issued now, which sees them through
    // the register file's same-cycle bypass.
    for (int s = 0; s < LAT - 2; s++)
      if (t_v[s]) wr_mask |= regbit(t_vd[s]);
  end

  // the lanes and the tag pipeline must stay aligned
  a_align: assert property (@(posedge clk) disable iff (!rst_n) |o_v |-> t_v[LAT-1]);

endmodule
