// tb_vreg_file: self-checking test of the 5-read/3-write vector register file.
// Random writes with random per-slice enables on all three write ports and
// random reads on all five read ports are compared with a reference array.
// Reads that hit a register/group written in the same cycle must return the
// new data (same-cycle read-after-write); the test counts those bypass hits.
module tb_vreg_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NRD = 5, NWR = 3, NL = 8;
  logic [NRD-1:0][3:0]          rd_reg;
  logic [NRD-1:0][1:0]          rd_grp;
  logic [NRD-1:0][NL-1:0][31:0] rd_data;
  logic [NWR-1:0][NL-1:0]       wr_en;
  logic [NWR-1:0][3:0]          wr_reg;
  logic [NWR-1:0][1:0]          wr_grp;
  logic [NWR-1:0][NL-1:0][31:0] wr_data;

  vreg_file dut (.*);

  logic [31:0] ref_m [16][4][8];
  int checks = 0, failures = 0, bypass_hits = 0;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; wr_reg = '0; wr_grp = '0; wr_data = '0; rd_reg = '0; rd_grp = '0;
    // initialise every register through port 0
    for (int r = 0; r < 16; r++)
      for (int g = 0; g < 4; g++) begin
        @(negedge clk);
        wr_en = '0; wr_en[0] = 8'hFF; wr_reg[0] = 4'(r); wr_grp[0] = 2'(g);
        for (int l = 0; l < NL; l++) begin
          wr_data[0][l] = $urandom;
          ref_m[r][g][l] = wr_data[0][l];
        end
      end
    @(negedge clk); wr_en = '0;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        wr_en[w]  = 8'($urandom);
        wr_reg[w] = 4'($urandom_range(0, 3));   // small range to provoke collisions
        wr_grp[w] = 2'($urandom);
        for (int l = 0; l < NL; l++) wr_data[w][l] = $urandom;
      end
      for (int r = 0; r < NRD; r++) begin
        rd_reg[r] = 4'($urandom_range(0, 5));
        rd_grp[r] = 2'($urandom);
      end
      #1;
      for (int r = 0; r < NRD; r++)
        for (int l = 0; l < NL; l++) begin
          logic [31:0] e;
          e = ref_m[rd_reg[r]][rd_grp[r]][l];
          for (int w = 0; w < NWR; w++)
            if (wr_en[w][l] && wr_reg[w] == rd_reg[r] && wr_grp[w] == rd_grp[r]) begin
              e = wr_data[w][l];
              bypass_hits++;
            end
          checks++;
          if (rd_data[r][l] !== e) begin
            failures++;
            if (failures < 10) $display("MISMATCH r%0d reg%0d g%0d l%0d got %h exp %h", r, rd_reg[r], rd_grp[r], l, rd_data[r][l], e);
          end
        end
      // update reference at the edge
      for (int w = 0; w < NWR; w++)
        for (int l = 0; l < NL; l++)
          if (wr_en[w][l]) ref_m[wr_reg[w]][wr_grp[w]][l] = wr_data[w][l];
    end
    checks++;
    if (bypass_hits == 0) failures++;
    $display("bypass hits %0d", bypass_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
