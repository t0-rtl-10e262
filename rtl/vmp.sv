// vmp: the vector memory unit.
//
// Moves data between the vector registers and the 128-bit external memory,
// and performs the vector editing operations. Operations (t0_pkg::mop_e):
//   unit-stride load/store  8-, 16- or 32-bit elements from consecutive bytes
//                           starting at base address rs; the post-incremented
//                           address rs + vl*size is returned on the scalar port;
//   strided load/store      element i at rs + i*rt;
//   indexed load/store      element i at rs + vs2[i] (gather/scatter);
//   scalar insert/extract   vd[rt] = rs, or scalar result = vs1[rt];
//   vector extract          vd[i] = vs1[rt + i] for i < vl (zero past element 31),
//                           the step used by vector reductions;
//   scalar load/store       one 8/16/32-bit access at rs for the scalar core.
//
// Unit-stride transfers go through a 144-byte stream buffer (nine 16-byte
// lines, enough for 32 words plus a misaligned head). A load requests one
// memory line per cycle and writes a chunk of elements to the register file as
// soon as the lines holding it have arrived: eight 8/16-bit or four 32-bit
// elements per cycle. A store reads one chunk per cycle from the register file
// into the buffer and writes each memory line, with byte enables, once all its
// bytes are present. A first element that is not 16-byte aligned costs one
// extra line, hence one extra cycle. Strided and indexed transfers move one
// element per cycle through the single memory address port; at the start of
// every group of eight elements the unit spends a cycle reading the index
// group and, for stores, a cycle reading the data group, since it has one
// register-file read port.
//
// Memory port: a request (mem_req, mem_we, line address mem_addr = byte
// address[31:4], byte enables, 128-bit write data) is taken every cycle; read
// data is returned on mem_rdata in the following cycle. Strided and indexed
// elements must be naturally aligned so that they do not cross a 16-byte line.
// Element sizes, the transfer rates, the one-cycle misalignment penalty, the
// addressing modes and the editing operations follow the chip; the buffer
// organisation, the memory timing, the per-group index/data read cycles and the
// operation encoding are this design's own. One operation runs at a time.
module vmp
  import t0_pkg::*;
#(
  parameter int unsigned NL   = 8,
  parameter int unsigned NBUF = 144   // stream buffer bytes
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  issue_valid,
  input  vinst_t                issue,
  output logic                  ready,
  output logic [NVREG-1:0]      rd_mask,
  output logic [NVREG-1:0]      wr_mask,
  // register file: one read port, one write port
  output logic [3:0]            rd_reg,
  output logic [1:0]            rd_grp,
  input  logic [NL-1:0][31:0]   rd_data,
  output logic [NL-1:0]         wr_en,
  output logic [3:0]            wr_reg,
  output logic [1:0]            wr_grp,
  output logic [NL-1:0][31:0]   wr_data,
  // external memory
  output logic                  mem_req,
  output logic                  mem_we,
  output logic [27:0]           mem_addr,
  output logic [15:0]           mem_be,
  output logic [127:0]          mem_wdata,
  input  logic [127:0]          mem_rdata,
  // scalar return (extract, scalar load, post-incremented base)
  output logic                  sres_valid,
  output logic [31:0]           sres_data,
  output logic                  misaligned   // a unit-stride transfer started off a 16-byte boundary
);

  typedef enum logic [2:0] {S_IDLE, S_UNIT, S_ELEM, S_INS, S_EXT, S_VEXT_RD, S_VEXT_WR} state_e;

  state_e      st;
  vinst_t      cur;
  logic [7:0]  sb [NBUF];          // stream buffer, byte 0 = first byte of the first line
  logic [3:0]  fcnt;               // lines requested (load) / written (store)
  logic [3:0]  na;                 // lines arrived (load)
  logic [3:0]  ccnt;               // chunks moved to/from the register file
  logic        p_v;                // a line or element read is in flight
  logic [3:0]  p_line;
  logic [5:0]  i;                  // element counter (strided/indexed)
  logic [31:0] saddr;              // running strided address
  logic [31:0] ibuf [NL];          // index group
  logic [31:0] dbuf [NL];          // store data group
  logic        ibuf_ok, dbuf_ok;
  logic [5:0]  p_i;
  logic [3:0]  p_off;
  logic [31:0] ebuf [32];          // vector extract source
  logic [2:0]  vg;

  // ---------------- decoded quantities of the current operation ----------------
  logic [2:0]  eb;          // element bytes
  logic [7:0]  nbytes;      // vl * eb
  logic [3:0]  off;
  logic [3:0]  nlines;
  logic [3:0]  E;           // elements per unit-stride chunk
  logic [3:0]  nchunks;
  logic        is_load, is_idx, is_sc;
  logic [5:0]  nelem;

  always_comb begin
    eb      = 3'd1 << cur.esz;
    nbytes  = 8'(cur.vl) * 8'(eb);
    off     = cur.rs[3:0];
    nlines  = 4'((9'(off) + 9'(nbytes) + 9'd15) >> 4);
    E       = (cur.esz == ES_32) ? 4'd4 : 4'd8;
    nchunks = 4'((7'(cur.vl) + 7'(E) - 7'd1) / 7'(E));
    is_load = cur.mop inside {M_LD, M_LDS, M_LDX, M_SLD};
    is_idx  = cur.mop inside {M_LDX, M_STX};
    is_sc   = cur.mop inside {M_SLD, M_SST};
    nelem   = is_sc ? 6'd1 : cur.vl;
  end

  // bytes of the stream buffer needed by / supplied by chunk c
  function automatic logic [8:0] chunk_end(input logic [3:0] c);  // one past the chunk's last byte
    logic [6:0] ecount;
    ecount = 7'(c + 4'd1) * 7'(E);
    if (ecount > 7'(cur.vl)) ecount = 7'(cur.vl);
    return 9'(off) + 9'(ecount) * 9'(eb);
  endfunction

  function automatic logic [31:0] extend(input logic [31:0] raw, input esz_e sz, input logic sx);
    unique case (sz)
      ES_8:    return sx ? {{24{raw[7]}}, raw[7:0]}   : {24'd0, raw[7:0]};
      ES_16:   return sx ? {{16{raw[15]}}, raw[15:0]} : {16'd0, raw[15:0]};
      default: return raw;
    endcase
  endfunction

  // ---------------- unit-stride control signals ----------------
  logic       u_fetch, u_wchunk, u_rchunk, u_wline;
  logic [8:0] line_need_end;
  logic [8:0] filled_end;

  always_comb begin
    u_fetch  = 1'b0;
    u_wchunk = 1'b0;
    u_rchunk = 1'b0;
    u_wline  = 1'b0;
    line_need_end = 9'(fcnt + 4'd1) << 4;
    if (line_need_end > 9'(off) + 9'(nbytes)) line_need_end = 9'(off) + 9'(nbytes);
    filled_end = (ccnt == 4'd0) ? 9'(off) : chunk_end(ccnt - 4'd1);
    if (st == S_UNIT) begin
      if (is_load) begin
        u_fetch  = fcnt < nlines;
        u_wchunk = (ccnt < nchunks) && (((chunk_end(ccnt) - 9'd1) >> 4) < 9'(na));
      end else begin
        u_rchunk = ccnt < nchunks;
        u_wline  = (fcnt < nlines) && (filled_end >= line_need_end);
      end
    end
  end

  // ---------------- strided / indexed control ----------------
  logic       need_idx, need_dat, e_go;
  logic [31:0] eaddr;
  logic [31:0] edata;

  always_comb begin
    need_idx = (st == S_ELEM) && is_idx && !ibuf_ok && (i < nelem);
    need_dat = (st == S_ELEM) && !is_load && !is_sc && !dbuf_ok && !need_idx && (i < nelem);
    e_go     = (st == S_ELEM) && (i < nelem) && !need_idx && !need_dat;
    eaddr    = is_idx ? cur.rs + ibuf[i[2:0]] : saddr;
    edata    = is_sc ? cur.rt : dbuf[i[2:0]];
  end

  // ---------------- register-file and memory ports ----------------
  logic [6:0]  ce, vs;   // element indices
  logic [8:0]  cp;       // stream-buffer byte position
  logic [31:0] craw;     // raw element bytes

  always_comb begin
    ce        = '0;
    vs        = '0;
    cp        = '0;
    craw      = '0;
    rd_reg    = cur.vs1;
    rd_grp    = '0;
    wr_en     = '0;
    wr_reg    = cur.vd;
    wr_grp    = '0;
    wr_data   = '0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_be    = '0;
    mem_wdata = '0;

    unique case (st)
      S_UNIT: begin
        if (u_fetch) begin
          mem_req  = 1'b1;
          mem_addr = cur.rs[31:4] + 28'(fcnt);
        end
        if (u_wchunk) begin
          for (int k = 0; k < 8; k++) begin
            ce   = 7'(ccnt) * 7'(E) + 7'(k);
            cp   = 9'(off) + 9'(ce) * 9'(eb);
            craw = '0;
            for (int b = 0; b < 4; b++)
              if (32'(cp) + 32'(b) < NBUF) craw[8*b +: 8] = sb[8'(32'(cp) + 32'(b))];
            if (k < int'(E) && ce < 7'(cur.vl)) begin
              wr_en[ce[2:0]]   = 1'b1;
              wr_data[ce[2:0]] = extend(craw, cur.esz, cur.sext);
            end
          end
          wr_grp = 2'((7'(ccnt) * 7'(E)) >> 3);
        end
        if (u_rchunk) rd_grp = 2'((7'(ccnt) * 7'(E)) >> 3);
        if (u_wline) begin
          mem_req  = 1'b1;
          mem_we   = 1'b1;
          mem_addr = cur.rs[31:4] + 28'(fcnt);
          for (int b = 0; b < 16; b++) begin
            cp = 9'({fcnt, 4'd0}) + 9'(b);
            mem_wdata[8*b +: 8] = sb[8'(cp)];
            mem_be[b] = (cp >= 9'(off)) && (cp < 9'(off) + 9'(nbytes));
          end
        end
      end
      S_ELEM: begin
        if (need_idx) begin
          rd_reg = cur.vs2;
          rd_grp = 2'(i >> 3);
        end else if (need_dat) begin
          rd_reg = cur.vs1;
          rd_grp = 2'(i >> 3);
        end
        if (e_go) begin
          mem_req  = 1'b1;
          mem_we   = !is_load;
          mem_addr = eaddr[31:4];
          for (int b = 0; b < 16; b++)
            if (b >= int'(eaddr[3:0]) && b < int'(eaddr[3:0]) + int'(eb)) begin
              mem_be[b] = 1'b1;
              mem_wdata[8*b +: 8] = edata[8*(b - int'(eaddr[3:0])) +: 8];
            end
        end
        if (p_v && !is_sc) begin
          craw = 32'(mem_rdata >> (8 * int'(p_off)));
          wr_en[p_i[2:0]]   = 1'b1;
          wr_data[p_i[2:0]] = extend(craw, cur.esz, cur.sext);
          wr_grp            = 2'(p_i >> 3);
        end
      end
      S_INS: begin
        wr_en[cur.rt[2:0]]   = 1'b1;
        wr_data[cur.rt[2:0]] = cur.rs;
        wr_grp               = cur.rt[4:3];
      end
      S_EXT: begin
        rd_grp = cur.rt[4:3];
      end
      S_VEXT_RD: begin
        rd_grp = vg[1:0];
      end
      S_VEXT_WR: begin
        wr_grp = vg[1:0];
        for (int l = 0; l < 8; l++) begin
          ce = 7'({vg[1:0], 3'(l)});
          vs = ce + 7'(cur.rt[5:0]);
          if (ce < 7'(cur.vl)) begin
            wr_en[l]   = 1'b1;
            wr_data[l] = (cur.rt < 32'd32 && vs < 7'd32) ? ebuf[vs[4:0]] : '0;
          end
        end
      end
      default: ;
    endcase
  end

  assign ready = (st == S_IDLE);

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      cur        <= '0;
      fcnt       <= '0;
      na         <= '0;
      ccnt       <= '0;
      p_v        <= 1'b0;
      p_line     <= '0;
      i          <= '0;
      saddr      <= '0;
      ibuf_ok    <= 1'b0;
      dbuf_ok    <= 1'b0;
      p_i        <= '0;
      p_off      <= '0;
      vg         <= '0;
      sres_valid <= 1'b0;
      sres_data  <= '0;
      misaligned <= 1'b0;
    end else begin
      sres_valid <= 1'b0;
      misaligned <= 1'b0;
      unique case (st)
        S_IDLE: if (issue_valid) begin
          cur     <= issue;
          fcnt    <= '0;
          na      <= '0;
          ccnt    <= '0;
          p_v     <= 1'b0;
          i       <= '0;
          saddr   <= issue.rs;
          ibuf_ok <= 1'b0;
          dbuf_ok <= 1'b0;
          vg      <= '0;
          unique case (issue.mop)
            M_LD, M_ST: begin
              st         <= (issue.vl == 6'd0) ? S_IDLE : S_UNIT;
              misaligned <= (issue.vl != 6'd0) && (issue.rs[3:0] != 4'd0);
            end
            M_LDS, M_STS, M_LDX, M_STX: st <= (issue.vl == 6'd0) ? S_IDLE : S_ELEM;
            M_SLD, M_SST:               st <= S_ELEM;
            M_INS:                      st <= S_INS;
            M_EXT:                      st <= S_EXT;
            M_VEXT:                     st <= (issue.vl == 6'd0) ? S_IDLE : S_VEXT_RD;
            default:                    st <= S_IDLE;
          endcase
        end
        S_UNIT: begin
          if (is_load) begin
            p_v    <= u_fetch;
            p_line <= fcnt;
            if (u_fetch) fcnt <= fcnt + 4'd1;
            if (p_v) begin
              for (int b = 0; b < 16; b++) sb[{p_line, 4'd0} + 8'(b)] <= mem_rdata[8*b +: 8];
              na <= na + 4'd1;
            end
            if (u_wchunk) begin
              ccnt <= ccnt + 4'd1;
              if (ccnt + 4'd1 == nchunks) begin
                st         <= S_IDLE;
                sres_valid <= 1'b1;
                sres_data  <= cur.rs + 32'(nbytes);
              end
            end
          end else begin
            if (u_rchunk) begin
              for (int k = 0; k < 8; k++) begin
                logic [6:0] e;
                logic [8:0] p;
                e = 7'(ccnt) * 7'(E) + 7'(k);
                p = 9'(off) + 9'(e) * 9'(eb);
                if (k < int'(E) && e < 7'(cur.vl))
                  for (int b = 0; b < 4; b++)
                    if (b < int'(eb)) sb[8'(p + 9'(b))] <= rd_data[e[2:0]][8*b +: 8];
              end
              ccnt <= ccnt + 4'd1;
            end
            if (u_wline) begin
              fcnt <= fcnt + 4'd1;
              if (fcnt + 4'd1 == nlines) begin
                st         <= S_IDLE;
                sres_valid <= 1'b1;
                sres_data  <= cur.rs + 32'(nbytes);
              end
            end
          end
        end
        S_ELEM: begin
          if (need_idx) begin
            for (int l = 0; l < 8; l++) ibuf[l] <= rd_data[l];
            ibuf_ok <= 1'b1;
          end else if (need_dat) begin
            for (int l = 0; l < 8; l++) dbuf[l] <= rd_data[l];
            dbuf_ok <= 1'b1;
          end
          p_v   <= e_go && is_load;
          p_i   <= i;
          p_off <= eaddr[3:0];
          if (e_go) begin
            i     <= i + 6'd1;
            saddr <= saddr + cur.rt;
            if (i[2:0] == 3'd7) begin
              ibuf_ok <= 1'b0;
              dbuf_ok <= 1'b0;
            end
          end
          if (p_v && is_sc) begin
            sres_valid <= 1'b1;
            sres_data  <= extend(32'(mem_rdata >> (8 * int'(p_off))), cur.esz, cur.sext);
          end
          if (i == nelem && !p_v) st <= S_IDLE;
        end
        S_INS: st <= S_IDLE;
        S_EXT: begin
          sres_valid <= 1'b1;
          sres_data  <= rd_data[cur.rt[2:0]];
          st         <= S_IDLE;
        end
        S_VEXT_RD: begin
          for (int l = 0; l < 8; l++) ebuf[{vg[1:0], 3'(l)}] <= rd_data[l];
          if (vg == 3'd3) begin
            vg <= '0;
            st <= S_VEXT_WR;
          end else vg <= vg + 3'd1;
        end
        S_VEXT_WR: begin
          if (6'({vg[1:0], 3'd7}) >= cur.vl - 6'd1) st <= S_IDLE;
          vg <= vg + 3'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- interlock masks ----------------
  always_comb begin
    rd_mask = '0;
    wr_mask = '0;
    if (st != S_IDLE) begin
      if (cur.mop inside {M_ST, M_STS, M_STX, M_EXT, M_VEXT}) rd_mask |= regbit(cur.vs1);
      if (is_idx)                                             rd_mask |= regbit(cur.vs2);
      if (cur.mop inside {M_LD, M_LDS, M_LDX, M_INS, M_VEXT}) wr_mask |= regbit(cur.vd);
    end
  end

  // the stream buffer never overflows: nine lines hold 32 words plus a misaligned head
  a_nlines: assert property (@(posedge clk) disable iff (!rst_n) st == S_UNIT |-> nlines <= 4'd9);

endmodule
