// tb_icache: self-checking test of the 1 KB instruction cache. A simple fetch
// loop reads instructions, mostly sequentially with random jumps, while the
// memory is randomly kept busy by a stand-in for the vector memory unit. Every
// delivered word is compared with the memory contents. Timing checks with an
// idle memory: a cold miss stalls three cycles, and a miss on the next
// sequential line, which the cache has prefetched, stalls two.
module tb_icache;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         if_req, if_valid, m_req, m_gnt, miss, pf_used;
  logic [31:0]  if_pc, if_instr;
  logic [27:0]  m_addr;
  logic [127:0] m_rdata;
  logic         blocked;

  icache dut (.*);
  sram_model u_mem (.clk, .req(m_gnt), .we(1'b0), .addr(m_addr), .be(16'h0), .wdata('0), .rdata(m_rdata));
  assign m_gnt = m_req && !blocked;

  int checks = 0, failures = 0, n_miss = 0, n_pf = 0;

  function automatic logic [31:0] word(input logic [31:0] a);
    return {u_mem.init_byte(a + 3), u_mem.init_byte(a + 2), u_mem.init_byte(a + 1), u_mem.init_byte(a)};
  endfunction

  bit busy_mem = 0;
  always @(negedge clk) blocked <= busy_mem && ($urandom_range(0, 3) == 0);

  always @(posedge clk) begin
    if (miss) n_miss++;
    if (pf_used) n_pf++;
  end

  // fetch until one instruction is delivered; returns the stall cycles
  task automatic fetch(input logic [31:0] pc, output int stall);
    stall = 0;
    if_req = 1; if_pc = pc;
    #1;
    while (!if_valid) begin
      @(negedge clk); #1;
      stall++;
    end
    checks++;
    if (if_instr !== word({pc[31:2], 2'b00})) begin
      failures++;
      if (failures < 10) $display("FAIL pc %h got %h exp %h", pc, if_instr, word(pc));
    end
    @(negedge clk);
    if_req = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    logic [31:0] pc;
    if_req = 0; if_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // cold miss
    fetch(32'h1000, s);
    checks++; if (s != 3) begin failures++; $display("cold miss stall %0d", s); end
    // rest of the line, while the next line is prefetched
    for (int k = 1; k < 4; k++) begin
      fetch(32'h1000 + 32'(4 * k), s);
      checks++; if (s != 0) begin failures++; $display("hit stall %0d", s); end
    end
    fetch(32'h1010, s);
    checks++; if (s != 2) begin failures++; $display("prefetched miss stall %0d", s); end
    // random program with a busy memory
    pc = 32'h2000;
    busy_mem = 1;
    for (int n = 0; n < 8000; n++) begin
      fetch(pc, s);
      pc = ($urandom_range(0, 15) == 0) ? 32'($urandom_range(0, 1023) * 4) : pc + 4;
    end
    checks++;
    if (n_pf < 100 || n_miss < 100) failures++;
    $display("misses %0d prefetch-served %0d", n_miss, n_pf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
