// mem_if: the external memory interface, shared by the vector memory unit and
// the instruction cache.
//
// One 128-bit data bus and one address port (a 28-bit line address, the byte
// address without its low four bits, with 16 byte enables) serve both
// requesters. The vector memory unit, which also carries the scalar core's
// loads and stores, always wins; the instruction cache is granted only in
// cycles the vector memory unit leaves idle, which is when its prefetches
// happen. Requests leave in the cycle they are made and read data comes back on
// the shared read bus in the next cycle; each requester knows when its own data
// is due. The request is taken from the idle-cycle priority and the 128/28-bit
// widths of the chip; the fixed one-cycle read timing stands in for the chip's
// wave-pipelined asynchronous SRAM access and is this design's choice.
module mem_if (
  input  logic         clk,
  input  logic         rst_n,
  // vector memory unit (highest priority)
  input  logic         v_req,
  input  logic         v_we,
  input  logic [27:0]  v_addr,
  input  logic [15:0]  v_be,
  input  logic [127:0] v_wdata,
  // instruction cache (read only)
  input  logic         i_req,
  input  logic [27:0]  i_addr,
  output logic         i_gnt,
  // pins
  output logic         mem_req,
  output logic         mem_we,
  output logic [27:0]  mem_addr,
  output logic [15:0]  mem_be,
  output logic [127:0] mem_wdata,
  output logic         busy_cycle   // the bus carried a request this cycle
);

  always_comb begin
    i_gnt     = i_req && !v_req;
    mem_req   = v_req || i_req;
    mem_we    = v_req && v_we;
    mem_addr  = v_req ? v_addr : i_addr;
    mem_be    = v_req ? v_be : 16'hFFFF;
    mem_wdata = v_wdata;
    busy_cycle = mem_req;
  end

  // the cache is never granted in a cycle the vector memory unit uses
  a_prio: assert property (@(posedge clk) disable iff (!rst_n) !(i_gnt && v_req));

endmodule
