// icache: the scalar core's instruction cache, with a one-line prefetch buffer.
//
// 1 KB, direct mapped, 16-byte lines (one 128-bit memory word): 64 lines,
// each with a 22-bit tag and a valid bit, cleared at reset. A fetch (if_req,
// if_pc) that hits returns its 32-bit instruction in the same cycle
// (if_valid/if_instr). On a miss the cache stalls the core:
//   - if the line is in the prefetch buffer it is copied into the cache in the
//     next cycle and the fetch hits one cycle later: a two-cycle penalty;
//   - otherwise the line is requested from memory in the next cycle, arrives
//     the cycle after and the fetch hits one cycle later: a three-cycle penalty
//     when memory is free.
// While fetches hit, the cache asks for the next sequential line whenever
// neither the cache nor the prefetch buffer holds it. Memory requests (m_req,
// m_addr) are served only when m_gnt is high; the memory interface grants the
// cache only when the vector memory unit leaves memory idle, so prefetches use
// otherwise idle cycles. Read data arrives on m_rdata the cycle after a grant.
//
// The 1 KB size, the two- and three-cycle miss penalties and prefetching into
// idle memory cycles follow the chip; the direct-mapped organisation, line size,
// next-line policy and single prefetch buffer are this design's choices.
module icache #(
  parameter int unsigned SIZE_BYTES = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         if_req,
  input  logic [31:0]  if_pc,
  output logic         if_valid,
  output logic [31:0]  if_instr,
  output logic         m_req,
  output logic [27:0]  m_addr,
  input  logic         m_gnt,
  input  logic [127:0] m_rdata,
  output logic         miss,       // a fetch missed this cycle (start of a stall)
  output logic         pf_used     // a miss was served from the prefetch buffer
);

  localparam int unsigned NLINES = SIZE_BYTES / 16;
  localparam int unsigned IW     = $clog2(NLINES);
  localparam int unsigned TW     = 28 - IW;

  typedef enum logic [1:0] {C_IDLE, C_REQ, C_WAIT, C_PFILL} cstate_e;

  logic [127:0]  data  [NLINES];
  logic [TW-1:0] tag   [NLINES];
  logic [NLINES-1:0] valid;

  cstate_e      st;
  logic [27:0]  mline;          // line being filled
  logic [27:0]  pf_line;
  logic [127:0] pf_data;
  logic         pf_valid, pf_inflight;

  logic [27:0]   line, nline;
  logic [IW-1:0] idx, nidx;
  logic          hit, next_present, pf_want, pf_has_miss;

  always_comb begin
    line         = if_pc[31:4];
    nline        = line + 28'd1;
    idx          = line[IW-1:0];
    nidx         = nline[IW-1:0];
    hit          = valid[idx] && tag[idx] == line[27:IW];
    next_present = (valid[nidx] && tag[nidx] == nline[27:IW]) ||
                   (pf_valid && pf_line == nline) || (pf_inflight && pf_line == nline);
    pf_want      = (st == C_IDLE) && if_req && hit && !next_present && !pf_inflight;
    pf_has_miss  = pf_valid && pf_line == mline;

    if_valid = (st == C_IDLE) && if_req && hit;
    if_instr = data[idx][32*if_pc[3:2] +: 32];
    miss     = (st == C_IDLE) && if_req && !hit;
    pf_used  = (st == C_PFILL);

    m_req  = 1'b0;
    m_addr = nline;
    if (st == C_REQ && !pf_has_miss) begin
      m_req  = 1'b1;
      m_addr = mline;
    end else if (pf_want) begin
      m_req  = 1'b1;
      m_addr = nline;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      valid       <= '0;
      mline       <= '0;
      pf_line     <= '0;
      pf_data     <= '0;
      pf_valid    <= 1'b0;
      pf_inflight <= 1'b0;
    end else begin
      // a granted prefetch returns its line one cycle later
      if (pf_inflight) begin
        pf_data     <= m_rdata;
        pf_valid    <= 1'b1;
        pf_inflight <= 1'b0;
      end
      unique case (st)
        C_IDLE: begin
          if (miss) begin
            mline <= line;
            st    <= (pf_valid && pf_line == line) ? C_PFILL : C_REQ;
          end else if (pf_want && m_gnt) begin
            pf_line     <= nline;
            pf_valid    <= 1'b0;
            pf_inflight <= 1'b1;
          end
        end
        C_REQ: begin
          if (pf_has_miss)  st <= C_PFILL;
          else if (m_gnt)   st <= C_WAIT;
        end
        C_WAIT: begin
          data[mline[IW-1:0]] <= m_rdata;
          tag[mline[IW-1:0]]  <= mline[27:IW];
          valid[mline[IW-1:0]] <= 1'b1;
          st <= C_IDLE;
        end
        default: begin  // C_PFILL
          data[mline[IW-1:0]] <= pf_data;
          tag[mline[IW-1:0]]  <= mline[27:IW];
          valid[mline[IW-1:0]] <= 1'b1;
          pf_valid <= 1'b0;
          st <= C_IDLE;
        end
      endcase
    end
  end

endmodule
