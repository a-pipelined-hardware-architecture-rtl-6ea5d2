// apb_regs: APB slave register file of the deblocking filter.
//
// The processor writes the per-MB control information here before it issues the start
// command: which MB edges are filtered, whether the left neighbour blocks are already on
// chip and whether the right-column blocks are to be kept for the next MB, the intra flags
// and QPs of the current, left and upper MBs, the filter offsets, the SDRAM addresses of the
// MB, and the coding information (non-zero coefficients, reference, motion vector) of the
// 24 luma 4x4 blocks the boundary-strength analyser looks at. The register map is this
// design's own:
//   0x00 CTRL    W   bit0 start, bit1 end (abort the MB in progress); read as 0
//   0x04 STATUS  R   bit0 busy, bit1 done (sticky; write 1 to clear; cleared by start)
//   0x08 MBCFG   RW  bit0 filter_left, bit1 filter_top, bit2 reuse_left, bit3 keep_right,
//                    bit4 intra_cur, bit5 intra_left, bit6 intra_top
//   0x0C QPY     RW  [5:0] current, [13:8] left, [21:16] upper MB luma QP
//   0x10 QPCB    RW  same layout, Cb QP (already mapped through the chroma QP table)
//   0x14 QPCR    RW  same layout, Cr QP
//   0x18 OFFSET  RW  [4:0] FilterOffsetA, [12:8] FilterOffsetB (two's complement)
//   0x1C YADDR   RW  byte address of column 0 of the MB's first luma strip
//   0x20 CBADDR  RW  0x24 CRADDR  likewise for the chroma planes
//   0x28 YSTRIDE RW  bytes from one 4-row luma strip to the next; 0x2C CSTRIDE for chroma
//   0x30 CYCLES  R   clock cycles taken by the last MB
//   0x40+4*i BINFO[i] RW  i = 0..15 current MB blocks (raster), 16..19 upper A..D,
//                    20..23 left E..H: [0] nz, [5:1] ref, [18:6] mvx, [31:19] mvy
// APB3 timing: no wait states (PREADY = 1); PSLVERR for an unmapped address.
module apb_regs
  import dbf_pkg::*;
(
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // to the controller and the Bs analyser
  output logic        start,
  output logic        stop,
  output mb_ctrl_t    mbc,
  output blk_info_t   binfo [NUM_BINFO],
  // from the controller
  input  logic        busy,
  input  logic        done_set,
  input  logic [15:0] cycles,
  output logic        irq
);

  logic done;
  logic wr, rd;
  logic mapped;

  assign wr     = psel && penable && pwrite;
  assign rd     = psel && !pwrite;
  assign pready = 1'b1;
  assign mapped = (paddr <= 8'h30) || (paddr >= 8'h40 && paddr < 8'h40 + 8'(4 * NUM_BINFO));
  assign pslverr = psel && penable && !mapped;
  assign irq    = done;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      mbc   <= '0;
      start <= 1'b0;
      stop  <= 1'b0;
      done  <= 1'b0;
      for (int i = 0; i < NUM_BINFO; i++) binfo[i] <= '0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (done_set) done <= 1'b1;
      if (wr) begin
        case (paddr)
          8'h00: begin
            start <= pwdata[0];
            stop  <= pwdata[1];
            if (pwdata[0]) done <= 1'b0;
          end
          8'h04: if (pwdata[1]) done <= 1'b0;
          8'h08: begin
            mbc.filter_left <= pwdata[0];
            mbc.filter_top  <= pwdata[1];
            mbc.reuse_left  <= pwdata[2];
            mbc.keep_right  <= pwdata[3];
            mbc.intra_cur   <= pwdata[4];
            mbc.intra_left  <= pwdata[5];
            mbc.intra_top   <= pwdata[6];
          end
          8'h0C: {mbc.qpy_top,  mbc.qpy_left,  mbc.qpy_cur}  <= {pwdata[21:16], pwdata[13:8], pwdata[5:0]};
          8'h10: {mbc.qpcb_top, mbc.qpcb_left, mbc.qpcb_cur} <= {pwdata[21:16], pwdata[13:8], pwdata[5:0]};
          8'h14: {mbc.qpcr_top, mbc.qpcr_left, mbc.qpcr_cur} <= {pwdata[21:16], pwdata[13:8], pwdata[5:0]};
          8'h18: {mbc.offset_b, mbc.offset_a} <= {pwdata[12:8], pwdata[4:0]};
          8'h1C: mbc.y_addr   <= pwdata;
          8'h20: mbc.cb_addr  <= pwdata;
          8'h24: mbc.cr_addr  <= pwdata;
          8'h28: mbc.y_stride <= pwdata;
          8'h2C: mbc.c_stride <= pwdata;
          default: begin
            if (paddr >= 8'h40 && paddr < 8'h40 + 8'(4 * NUM_BINFO))
              binfo[5'((paddr - 8'h40) >> 2)] <= blk_info_t'(pwdata);
          end
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    if (rd) begin
      case (paddr)
        8'h04: prdata = {30'd0, done, busy};
        8'h08: prdata = {25'd0, mbc.intra_top, mbc.intra_left, mbc.intra_cur, mbc.keep_right,
                         mbc.reuse_left, mbc.filter_top, mbc.filter_left};
        8'h0C: prdata = {10'd0, mbc.qpy_top,  2'd0, mbc.qpy_left,  2'd0, mbc.qpy_cur};
        8'h10: prdata = {10'd0, mbc.qpcb_top, 2'd0, mbc.qpcb_left, 2'd0, mbc.qpcb_cur};
        8'h14: prdata = {10'd0, mbc.qpcr_top, 2'd0, mbc.qpcr_left, 2'd0, mbc.qpcr_cur};
        8'h18: prdata = {19'd0, mbc.offset_b, 3'd0, mbc.offset_a};
        8'h1C: prdata = mbc.y_addr;
        8'h20: prdata = mbc.cb_addr;
        8'h24: prdata = mbc.cr_addr;
        8'h28: prdata = mbc.y_stride;
        8'h2C: prdata = mbc.c_stride;
        8'h30: prdata = {16'd0, cycles};
        default: begin
          if (paddr >= 8'h40 && paddr < 8'h40 + 8'(4 * NUM_BINFO))
            prdata = 32'(binfo[5'((paddr - 8'h40) >> 2)]);
        end
      endcase
    end
  end

endmodule
