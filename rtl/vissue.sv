// vissue: vector instruction issue with hazard interlock.
//
// The scalar core hands over one decoded vector instruction at a time
// (inst_valid/inst, accepted when inst_ready is high at a clock edge). The
// instruction goes to the unit it names (VMP, VP0 or VP1) as soon as
//   - that unit can accept it (its ready output), and
//   - no register it reads is still to be written by any unit (RAW), and no
//     register it writes is still to be read or written by any unit (WAR, WAW).
// Each unit reports the registers it still reads and writes as bit masks, so
// the check needs no scoreboard state of its own. Until both hold the
// instruction waits (stall_hazard or stall_busy is high for the cycle). One
// instruction issues per cycle, so the three units can be kept busy by giving
// each a new instruction on successive cycles.
//
// That every vector hazard is interlocked, that the units run concurrently and
// that one instruction issues per cycle follow the chip. The mask-based check
// is this design's own and is conservative: it does not chain a dependent
// instruction onto a running one, it waits for the producer's last write.
module vissue
  import t0_pkg::*;
(
  input  logic             inst_valid,
  input  vinst_t           inst,
  output logic             inst_ready,
  // units
  input  logic [2:0]       unit_ready,              // [U_VMP], [U_VP0], [U_VP1]
  input  logic [2:0][NVREG-1:0] unit_rd_mask,
  input  logic [2:0][NVREG-1:0] unit_wr_mask,
  output logic [2:0]       unit_valid,
  output logic             stall_hazard,
  output logic             stall_busy
);

  logic [NVREG-1:0] srcs, dsts, pend_rd, pend_wr;
  logic             hazard, busy;

  always_comb begin
    srcs = '0;
    dsts = '0;
    if (inst.unit == U_VMP) begin
      unique case (inst.mop)
        M_LD, M_LDS, M_INS: dsts = regbit(inst.vd);
        M_LDX:              begin dsts = regbit(inst.vd); srcs = regbit(inst.vs2); end
        M_ST, M_STS, M_EXT: srcs = regbit(inst.vs1);
        M_STX:              srcs = regbit(inst.vs1) | regbit(inst.vs2);
        M_VEXT:             begin srcs = regbit(inst.vs1); dsts = regbit(inst.vd); end
        default: ;
      endcase
    end else begin
      srcs = regbit(inst.vs1) | (inst.bscalar ? '0 : regbit(inst.vs2));
      dsts = regbit(inst.vd);
    end

    pend_rd = unit_rd_mask[0] | unit_rd_mask[1] | unit_rd_mask[2];
    pend_wr = unit_wr_mask[0] | unit_wr_mask[1] | unit_wr_mask[2];
    hazard  = |(srcs & pend_wr) || |(dsts & (pend_wr | pend_rd));
    busy    = (inst.unit == U_NONE) || !unit_ready[inst.unit];

    inst_ready   = !hazard && !busy;
    unit_valid   = '0;
    if (inst_valid && inst_ready) unit_valid[inst.unit] = 1'b1;
    stall_hazard = inst_valid && hazard;
    stall_busy   = inst_valid && !hazard && busy;
  end

endmodule
