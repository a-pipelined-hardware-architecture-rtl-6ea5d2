// sram_module: one SRAM module of the on-chip buffer, four 8x80 dual-port SRAMs side by side.
//
// Each of the four SRAMs ("lanes") has its own address on each port, so one access can
// touch four bytes that sit at four different addresses, one per lane. The memory wrapper
// relies on this: with its skewed storage pattern the four samples of one block row and the
// four samples of one block column always fall in four different lanes. Port A and port B
// are those of the underlying dual-port SRAMs; read data returns one cycle after the request.
module sram_module
  import dbf_pkg::*;
(
  input  logic             clk,
  input  logic [3:0]       a_en,
  input  logic [3:0]       a_we,
  input  sram_addr_t [3:0] a_addr,
  input  quad_t            a_wdata,
  output quad_t            a_rdata,
  input  logic [3:0]       b_en,
  input  logic [3:0]       b_we,
  input  sram_addr_t [3:0] b_addr,
  input  quad_t            b_wdata,
  output quad_t            b_rdata
);

  for (genvar l = 0; l < 4; l++) begin : g_lane
    sram_dp #(.DEPTH(SRAM_DEPTH), .WIDTH(8)) u_sram (
      .clk     (clk),
      .a_en    (a_en[l]),
      .a_we    (a_we[l]),
      .a_addr  (a_addr[l]),
      .a_wdata (a_wdata[l]),
      .a_rdata (a_rdata[l]),
      .b_en    (b_en[l]),
      .b_we    (b_we[l]),
      .b_addr  (b_addr[l]),
      .b_wdata (b_wdata[l]),
      .b_rdata (b_rdata[l])
    );
  end

endmodule
