// sram_model: behavioural model of the external 128-bit asynchronous SRAM array,
// seen through the memory interface as a synchronous port. A request in one
// cycle (line address = byte address[31:4], 16 byte enables) is served at the
// clock edge; read data appears on rdata in the following cycle. Storage is
// sparse; a byte never written reads as init_byte(address), so tests can
// predict it. This is a test model of an off-chip part, not synthesizable logic.
module sram_model (
  input  logic         clk,
  input  logic         req,
  input  logic         we,
  input  logic [27:0]  addr,
  input  logic [15:0]  be,
  input  logic [127:0] wdata,
  output logic [127:0] rdata
);
  logic [7:0] mem [logic [31:0]];
  int reads = 0, writes = 0;

  function automatic logic [7:0] init_byte(input logic [31:0] a);
    return 8'((a * 32'd7) ^ (a >> 8) ^ 32'h5A);
  endfunction

  function automatic logic [7:0] peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_byte(a);
  endfunction

  always @(posedge clk) begin
    if (req) begin
      if (we) begin
        writes++;
        for (int b = 0; b < 16; b++)
          if (be[b]) mem[{addr, 4'(b)}] = wdata[8*b +: 8];
      end else begin
        reads++;
        for (int b = 0; b < 16; b++) rdata[8*b +: 8] <= peek({addr, 4'(b)});
      end
    end
  end
endmodule
