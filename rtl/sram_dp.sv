// sram_dp: one 8-bit x 80-entry dual-port SRAM (the "8x80 SRAM" of each SRAM module; eight
// of them form the on-chip memory).
//
// Two independent synchronous ports, each able to read or write. A read returns the data
// one cycle after the request and holds it until the next read on that port. When both
// ports write the same address in one cycle, port B wins; a read of an address written in
// the same cycle on the other port returns the old data. Written as an array so that a
// synthesis flow can map it onto a dual-port SRAM macro.
module sram_dp #(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end

endmodule
