// vreg_file: the vector register file, the interconnect between the vector units.
//
// 16 vector registers of 32 elements of 32 bits, organised as 8 parallel
// 32-bit slices: an access names a register and an element group (elements
// 8g..8g+7) and moves 256 bits, one element per slice. Each arithmetic unit uses
// two read ports and one write port and the memory unit one of each, so the
// file has NRD = 5 read ports and NWR = 3 write ports. Every write port has a
// separate enable per slice, for conditional moves and vector lengths that are
// not a multiple of 8. A value written in a cycle can be read in the same cycle:
// reads are combinational and see the write data of the current cycle (if two
// write ports hit the same slice, the higher-numbered port wins).
//
// Ports, slices, sizes, per-slice enables and same-cycle read-after-write
// follow the chip. The chip time-multiplexes decoders and bit lines with writes
// in the first clock phase and reads in the second, under a self-timed circuit;
// here the storage is flip-flops written at the clock edge, and the bypass mux
// gives the same visible behaviour. Storage is not reset.
module vreg_file
#(
  parameter int unsigned NREG = 16,
  parameter int unsigned NG   = 4,   // element groups per register (32 elements / 8 slices)
  parameter int unsigned NL   = 8,   // slices
  parameter int unsigned NRD  = 5,
  parameter int unsigned NWR  = 3
) (
  input  logic                      clk,
  input  logic [NRD-1:0][3:0]       rd_reg,
  input  logic [NRD-1:0][1:0]       rd_grp,
  output logic [NRD-1:0][NL-1:0][31:0] rd_data,
  input  logic [NWR-1:0][NL-1:0]    wr_en,
  input  logic [NWR-1:0][3:0]       wr_reg,
  input  logic [NWR-1:0][1:0]       wr_grp,
  input  logic [NWR-1:0][NL-1:0][31:0] wr_data
);

  logic [31:0] mem [NREG][NG][NL];

  always_ff @(posedge clk) begin
    for (int w = 0; w < NWR; w++)
      for (int l = 0; l < NL; l++)
        if (wr_en[w][l] && (32'(wr_reg[w]) < NREG) && (32'(wr_grp[w]) < NG))
          mem[wr_reg[w]][wr_grp[w]][l] <= wr_data[w][l];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      for (int l = 0; l < NL; l++) begin
        rd_data[r][l] = mem[rd_reg[r]][rd_grp[r]][l];
        for (int w = 0; w < NWR; w++)
          if (wr_en[w][l] && wr_reg[w] == rd_reg[r] && wr_grp[w] == rd_grp[r])
            rd_data[r][l] = wr_data[w][l];
      end
  end

endmodule
