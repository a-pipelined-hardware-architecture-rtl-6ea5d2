// mem_wrapper: skewed storage of one macroblock's 4x4 blocks in two SRAM modules.
//
// Storage pattern
//   * Block placement: each of the 40 block slots (24 luma, 16 chroma, current MB and
//     neighbours) owns four consecutive addresses in one of the two SRAM modules. Blocks
//     that touch across an edge are always in different modules (a checkerboard), so the
//     p side and the q side of any filter line come from different modules.
//   * Sample skew inside a block: column c of the block lives at address base+c, and the
//     sample of row r in that column is held by lane (r + c) mod 4 of the module. A block
//     column (all four rows at one address) and a block row (four columns at four addresses)
//     then both spread over all four lanes and are read in one cycle.
// Placement and skew follow the block and sample distribution of the architecture.
//
// Access paths
//   filter read  (port A): p block line and/or q block line, data one cycle later as
//                          quads ordered from the edge outwards (p0..p3, q0..q3)
//   external read (port A): one block column as a 32-bit word, byte r = row r, one cycle later
//   filter write (port B): p and/or q line of filtered samples
//   external write(port B): one block column from a 32-bit word
// A read of an address that port B writes in the same cycle is forwarded (write-through).
// The filter read has priority over the external read on port A, and the filter write over
// the external write on port B; the controller never asks for both in one cycle and an
// assertion checks it. A line is a row for horizontal filtering (dir_h = 1, vertical edge)
// and a column for vertical filtering.
module mem_wrapper
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // filter read
  input  logic        fr_p_en,
  input  logic        fr_q_en,
  input  slot_t       fr_p_slot,
  input  slot_t       fr_q_slot,
  input  logic [1:0]  fr_line,
  input  logic        fr_dir_h,
  output quad_t       fr_p,
  output quad_t       fr_q,
  // filter write
  input  logic        fw_p_en,
  input  logic        fw_q_en,
  input  slot_t       fw_p_slot,
  input  slot_t       fw_q_slot,
  input  logic [1:0]  fw_line,
  input  logic        fw_dir_h,
  input  quad_t       fw_p,
  input  quad_t       fw_q,
  // external write (load from SDRAM)
  input  logic        xw_en,
  input  slot_t       xw_slot,
  input  logic [1:0]  xw_col,
  input  logic [31:0] xw_data,
  // external read (store to SDRAM)
  input  logic        xr_en,
  input  slot_t       xr_slot,
  input  logic [1:0]  xr_col,
  output logic [31:0] xr_data
);

  // per-module port signals
  logic [1:0][3:0]       a_en, b_en;
  sram_addr_t [1:0][3:0] a_addr, b_addr;
  quad_t [1:0]           b_wdata, a_rdata, b_rdata;

  // address of lane l for line k of a block: position j = (l - k) mod 4 along the line
  function automatic sram_addr_t lane_addr(input slot_t s, input logic [1:0] k,
                                           input logic dir_h, input logic [1:0] l);
    logic [1:0] j;
    j = l - k;
    return slot_base(s) + (dir_h ? sram_addr_t'(j) : sram_addr_t'(k));
  endfunction

  // line data (position order 0..3) to lane order
  function automatic quad_t to_lanes(input quad_t pos, input logic [1:0] k);
    quad_t r;
    for (int l = 0; l < 4; l++) r[l] = pos[2'(l) - k];
    return r;
  endfunction

  // p quad (p0 nearest edge = position 3) <-> position order
  function automatic quad_t reverse(input quad_t x);
    return {x[0], x[1], x[2], x[3]};
  endfunction

  always_comb begin
    a_en = '0;  a_addr = '0;
    b_en = '0;  b_addr = '0;  b_wdata = '0;
    // ---- port A: reads
    if (fr_p_en || fr_q_en) begin
      if (fr_p_en) begin
        a_en[slot_module(fr_p_slot)] = 4'hf;
        for (int l = 0; l < 4; l++)
          a_addr[slot_module(fr_p_slot)][l] = lane_addr(fr_p_slot, fr_line, fr_dir_h, 2'(l));
      end
      if (fr_q_en) begin
        a_en[slot_module(fr_q_slot)] = 4'hf;
        for (int l = 0; l < 4; l++)
          a_addr[slot_module(fr_q_slot)][l] = lane_addr(fr_q_slot, fr_line, fr_dir_h, 2'(l));
      end
    end else if (xr_en) begin
      a_en[slot_module(xr_slot)] = 4'hf;
      for (int l = 0; l < 4; l++)
        a_addr[slot_module(xr_slot)][l] = lane_addr(xr_slot, xr_col, 1'b0, 2'(l));
    end
    // ---- port B: writes
    if (fw_p_en || fw_q_en) begin
      if (fw_p_en) begin
        b_en[slot_module(fw_p_slot)]    = 4'hf;
        b_wdata[slot_module(fw_p_slot)] = to_lanes(reverse(fw_p), fw_line);
        for (int l = 0; l < 4; l++)
          b_addr[slot_module(fw_p_slot)][l] = lane_addr(fw_p_slot, fw_line, fw_dir_h, 2'(l));
      end
      if (fw_q_en) begin
        b_en[slot_module(fw_q_slot)]    = 4'hf;
        b_wdata[slot_module(fw_q_slot)] = to_lanes(fw_q, fw_line);
        for (int l = 0; l < 4; l++)
          b_addr[slot_module(fw_q_slot)][l] = lane_addr(fw_q_slot, fw_line, fw_dir_h, 2'(l));
      end
    end else if (xw_en) begin
      b_en[slot_module(xw_slot)]    = 4'hf;
      b_wdata[slot_module(xw_slot)] = to_lanes(quad_t'(xw_data), xw_col);
      for (int l = 0; l < 4; l++)
        b_addr[slot_module(xw_slot)][l] = lane_addr(xw_slot, xw_col, 1'b0, 2'(l));
    end
  end

  for (genvar m = 0; m < 2; m++) begin : g_mod
    sram_module u_mod (
      .clk     (clk),
      .a_en    (a_en[m]),
      .a_we    (4'h0),
      .a_addr  (a_addr[m]),
      .a_wdata ('0),
      .a_rdata (a_rdata[m]),
      .b_en    (b_en[m]),
      .b_we    (b_en[m]),
      .b_addr  (b_addr[m]),
      .b_wdata (b_wdata[m]),
      .b_rdata (b_rdata[m])
    );
  end

  // ---- write-through: a port A read of the address port B writes in the same cycle returns
  // the new data (the last line of one filtering can be written back in the cycle in which a
  // crossing filtering reads it, e.g. block 19 of a chroma plane)
  quad_t [1:0] a_data, byp_data;
  logic  [1:0][3:0] byp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp <= '0; byp_data <= '0;
    end else begin
      for (int m = 0; m < 2; m++)
        for (int l = 0; l < 4; l++)
          if (a_en[m][l]) begin
            byp[m][l]      <= b_en[m][l] && (b_addr[m][l] == a_addr[m][l]);
            byp_data[m][l] <= b_wdata[m][l];
          end
    end
  end
  always_comb
    for (int m = 0; m < 2; m++)
      for (int l = 0; l < 4; l++)
        a_data[m][l] = byp[m][l] ? byp_data[m][l] : a_rdata[m][l];

  // ---- read data alignment: remember which module and rotation each read used
  logic       rd_pm, rd_qm, rd_xm;
  logic [1:0] rd_k, rd_xc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pm <= 1'b0; rd_qm <= 1'b1; rd_xm <= 1'b0; rd_k <= '0; rd_xc <= '0;
    end else begin
      if (fr_p_en) rd_pm <= slot_module(fr_p_slot);
      if (fr_q_en) rd_qm <= slot_module(fr_q_slot);
      if (fr_p_en || fr_q_en) rd_k <= fr_line;
      if (xr_en && !(fr_p_en || fr_q_en)) begin
        rd_xm <= slot_module(xr_slot);
        rd_xc <= xr_col;
      end
    end
  end

  always_comb begin
    quad_t pp, qq, xx;
    for (int j = 0; j < 4; j++) begin
      pp[j] = a_data[rd_pm][2'(j) + rd_k];
      qq[j] = a_data[rd_qm][2'(j) + rd_k];
      xx[j] = a_data[rd_xm][2'(j) + rd_xc];
    end
    fr_p    = reverse(pp);
    fr_q    = qq;
    xr_data = 32'(xx);
  end

  // the two sides of a filter line must come from different modules
  a_fr_modules: assert property (@(posedge clk) disable iff (!rst_n)
    (fr_p_en && fr_q_en) |-> (slot_module(fr_p_slot) != slot_module(fr_q_slot)));
  a_fw_modules: assert property (@(posedge clk) disable iff (!rst_n)
    (fw_p_en && fw_q_en) |-> (slot_module(fw_p_slot) != slot_module(fw_q_slot)));
  a_port_a_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !((fr_p_en || fr_q_en) && xr_en));
  a_port_b_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !((fw_p_en || fw_q_en) && xw_en));

endmodule
