// tb_mem_if: self-checking test of the memory interface arbitration. Random
// requests from both sides; the vector memory unit must always own the bus
// when it asks, and the instruction cache must be granted exactly the
// remaining cycles in which it asks.
module tb_mem_if;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic v_req, v_we, i_req, i_gnt, mem_req, mem_we, busy_cycle;
  logic [27:0] v_addr, i_addr, mem_addr;
  logic [15:0] v_be, mem_be;
  logic [127:0] v_wdata, mem_wdata;
  mem_if dut (.*);
  int checks = 0, failures = 0, n_ic = 0, n_v = 0;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      v_req = 1'($urandom); v_we = 1'($urandom); i_req = 1'($urandom);
      v_addr = 28'($urandom); i_addr = 28'($urandom); v_be = 16'($urandom);
      v_wdata = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (v_req) begin
        n_v++;
        if (!(mem_req && mem_we == v_we && mem_addr == v_addr && mem_be == v_be && !i_gnt)) failures++;
      end else if (i_req) begin
        n_ic++;
        if (!(mem_req && !mem_we && mem_addr == i_addr && i_gnt)) failures++;
      end else if (mem_req || i_gnt) failures++;
      checks++;
      if (v_req && v_we && mem_wdata !== v_wdata) failures++;
    end
    checks++;
    if (n_ic == 0 || n_v == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
