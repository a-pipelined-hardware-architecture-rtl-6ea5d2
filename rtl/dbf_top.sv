// dbf_top: H.264 deblocking filter with a four-stage pipelined edge filter and a skewed
// two-module on-chip buffer.
//
// The processor programs the register file over APB and starts one macroblock at a time.
// The controller fetches the MB and its neighbour blocks from SDRAM over an AHB master,
// runs the 48 edge filterings through the pipelined filter (eight samples per cycle, four
// cycles per 4x4 block edge, Bs supplied by the two-cycle analyser), writes the result back,
// and optionally keeps the right-column blocks on chip as the next MB's left neighbours.
//
// Ports: APB3 slave (8-bit address), AHB-Lite master (32-bit), irq (= STATUS.done).
// Clocking: one clock for everything; APB and AHB run on it. Asynchronous active-low reset.
module dbf_top
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // APB slave (processor side)
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  output logic        irq,
  // AHB master (SDRAM side)
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready
);

  logic        start, stop, busy, done_set;
  logic [15:0] cycles;
  mb_ctrl_t    mbc;
  blk_info_t   binfo [NUM_BINFO];

  apb_regs u_regs (
    .pclk(clk), .presetn(rst_n),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .start, .stop, .mbc, .binfo,
    .busy, .done_set, .cycles, .irq
  );

  // AHB master <-> controller
  logic        cmd_valid, cmd_ready, cmd_write, rd_valid, wr_next, xfer_done;
  logic [31:0] cmd_addr, rd_data, wr_data;
  logic [5:0]  cmd_len, rd_idx;

  ahb_master u_ahb (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_len,
    .rd_valid, .rd_data, .rd_idx, .wr_data, .wr_next, .done(xfer_done),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata, .hready
  );

  // memory wrapper <-> controller
  logic        fr_p_en, fr_q_en, fr_dir_h, fw_p_en, fw_q_en, fw_dir_h, xw_en, xr_en;
  slot_t       fr_p_slot, fr_q_slot, fw_p_slot, fw_q_slot, xw_slot, xr_slot;
  logic [1:0]  fr_line, fw_line, xw_col, xr_col;
  quad_t       fr_p, fr_q, fw_p, fw_q;
  logic [31:0] xw_data, xr_data;

  mem_wrapper u_mem (
    .clk, .rst_n,
    .fr_p_en, .fr_q_en, .fr_p_slot, .fr_q_slot, .fr_line, .fr_dir_h, .fr_p, .fr_q,
    .fw_p_en, .fw_q_en, .fw_p_slot, .fw_q_slot, .fw_line, .fw_dir_h, .fw_p, .fw_q,
    .xw_en, .xw_slot, .xw_col, .xw_data,
    .xr_en, .xr_slot, .xr_col, .xr_data
  );
  assign wr_data = xr_data;

  // filter and Bs analyser
  logic        f_valid, f_chroma, f_out_valid;
  quad_t       f_p, f_q, f_out_p, f_out_q;
  logic [5:0]  f_index_a, f_index_b;
  logic        bq_valid, bq_mb_edge, bq_dir_h, bq_edge_en, bs_out_valid;
  logic [4:0]  bq_p_id, bq_q_id;
  bs_t         bs;

  bs_analyzer u_bs (
    .clk, .rst_n,
    .in_valid(bq_valid), .p_id(bq_p_id), .q_id(bq_q_id), .mb_edge(bq_mb_edge),
    .dir_h(bq_dir_h), .edge_en(bq_edge_en), .binfo,
    .intra_cur(mbc.intra_cur), .intra_left(mbc.intra_left), .intra_top(mbc.intra_top),
    .bs_valid(bs_out_valid), .bs
  );

  edge_filter u_filt (
    .clk, .rst_n,
    .in_valid(f_valid), .in_p(f_p), .in_q(f_q), .in_chroma(f_chroma),
    .in_index_a(f_index_a), .in_index_b(f_index_b),
    .bs_s3(bs),
    .out_valid(f_out_valid), .out_p(f_out_p), .out_q(f_out_q)
  );

  dbf_ctrl u_ctrl (
    .clk, .rst_n,
    .start, .stop, .mbc, .busy, .done_set, .cycles,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_len,
    .rd_valid, .rd_data, .rd_idx, .wr_next, .xfer_done,
    .fr_p_en, .fr_q_en, .fr_p_slot, .fr_q_slot, .fr_line, .fr_dir_h, .fr_p, .fr_q,
    .fw_p_en, .fw_q_en, .fw_p_slot, .fw_q_slot, .fw_line, .fw_dir_h, .fw_p, .fw_q,
    .xw_en, .xw_slot, .xw_col, .xw_data,
    .xr_en, .xr_slot, .xr_col, .xr_data,
    .f_valid, .f_p, .f_q, .f_chroma, .f_index_a, .f_index_b,
    .f_out_valid, .f_out_p, .f_out_q,
    .bs_valid(bq_valid), .bs_p_id(bq_p_id), .bs_q_id(bq_q_id),
    .bs_mb_edge(bq_mb_edge), .bs_dir_h(bq_dir_h), .bs_edge_en(bq_edge_en)
  );

  // Bs of a line reaches filter stage 3 together with its samples
  a_bs_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    bs_out_valid == u_filt.s2.valid);

endmodule
