// dbf_pkg: types, constants and lookup functions shared by the H.264 deblocking filter.
//
// Contents
//  * sample and line types: a filter line is four p samples and four q samples, each packed
//    as logic [3:0][7:0] with index 0 nearest the edge (p0, q0).
//  * block slots: every 4x4 block the on-chip memory holds for one macroblock (MB) has a
//    slot number 0..39. Luma slots 0..23 double as the index of that block's coding
//    information in the register file (0..15 the MB's own blocks in raster order, 16..19 the
//    upper neighbours A..D, 20..23 the left neighbours E..H).
//  * the placement of each slot in the two SRAM modules (checkerboard over modules, four
//    consecutive addresses per block, as in the block distribution of the architecture).
//  * the 48 edge filterings of one MB in the reordered sequence: rows of vertical edges,
//    then columns of horizontal edges, luma then Cb then Cr, so that the q block of one
//    filtering is the p block of the next.
//  * the H.264 alpha, beta and tC0 tables (ITU-T H.264 Tables 8-16 and 8-17).
package dbf_pkg;

  typedef logic [7:0]       pix_t;
  typedef logic [3:0][7:0]  quad_t;     // [0] is the sample nearest the edge
  typedef logic [5:0]       slot_t;
  typedef logic [6:0]       sram_addr_t; // 0..79
  typedef logic [2:0]       bs_t;
  typedef logic [5:0]       qp_t;

  localparam int unsigned SRAM_DEPTH = 80;   // bytes per SRAM (8x80)
  localparam int unsigned NUM_SLOTS  = 40;   // 20 blocks per SRAM module
  localparam int unsigned NUM_EDGES  = 48;   // filterings per MB
  localparam int unsigned NUM_BINFO  = 24;   // luma blocks with coding information

  typedef enum logic [1:0] {PL_Y = 2'd0, PL_CB = 2'd1, PL_CR = 2'd2} plane_e;

  // Coding information of one luma 4x4 block, as written by the processor (one 32-bit
  // register per block). Single reference list; motion vectors in quarter samples.
  typedef struct packed {
    logic signed [12:0] mvy;
    logic signed [12:0] mvx;
    logic        [4:0]  ref_id;
    logic               nz;      // block has non-zero transform coefficients
  } blk_info_t;

  // Per-MB control information held in the register file.
  typedef struct packed {
    logic  filter_left;   // filter the left MB edge (left MB exists, same filtering domain)
    logic  filter_top;    // filter the top MB edge
    logic  reuse_left;    // left neighbour blocks are already on chip from the previous MB
    logic  keep_right;    // keep right-column blocks on chip for the next MB
    logic  intra_cur;
    logic  intra_left;
    logic  intra_top;
    qp_t   qpy_cur, qpy_left, qpy_top;
    qp_t   qpcb_cur, qpcb_left, qpcb_top;
    qp_t   qpcr_cur, qpcr_left, qpcr_top;
    logic signed [4:0] offset_a;   // FilterOffsetA
    logic signed [4:0] offset_b;   // FilterOffsetB
    logic [31:0] y_addr;     // byte address of the word holding column 0 of the MB's top luma strip
    logic [31:0] cb_addr;
    logic [31:0] cr_addr;
    logic [31:0] y_stride;   // bytes between two 4-row luma strips
    logic [31:0] c_stride;   // bytes between two 4-row chroma strips
  } mb_ctrl_t;

  // ---------------------------------------------------------------- block slots
  // luma current MB: slot = 4*row + col ; A..D: 16+col ; E..H: 20+row
  // Cb 17..20: 24 + 2*row + col ; I,J: 28+col ; K,L: 30+row
  // Cr 21..24: 32 + 2*row + col ; M,N: 36+col ; O,P: 38+row

  function automatic slot_t luma_slot(input int row, input int col);
    if (row < 0)      return slot_t'(16 + col);
    else if (col < 0) return slot_t'(20 + row);
    else              return slot_t'(4 * row + col);
  endfunction

  function automatic slot_t chroma_slot(input plane_e pl, input int row, input int col);
    int base;
    base = (pl == PL_CB) ? 24 : 32;
    if (row < 0)      return slot_t'(base + 4 + col);
    else if (col < 0) return slot_t'(base + 6 + row);
    else              return slot_t'(base + 2 * row + col);
  endfunction

  // Slot placement: {module (0 = SRAM module 1, 1 = SRAM module 2), block index 0..19}.
  // The block occupies addresses 4*index .. 4*index+3 of its module.
  function automatic logic [5:0] slot_place(input slot_t s);
    case (s)
      // luma blocks 1..16
      6'd0:  return {1'b1, 5'd2};   6'd1:  return {1'b0, 5'd3};
      6'd2:  return {1'b1, 5'd3};   6'd3:  return {1'b0, 5'd4};
      6'd4:  return {1'b0, 5'd5};   6'd5:  return {1'b1, 5'd5};
      6'd6:  return {1'b0, 5'd6};   6'd7:  return {1'b1, 5'd6};
      6'd8:  return {1'b1, 5'd7};   6'd9:  return {1'b0, 5'd8};
      6'd10: return {1'b1, 5'd8};   6'd11: return {1'b0, 5'd9};
      6'd12: return {1'b0, 5'd10};  6'd13: return {1'b1, 5'd10};
      6'd14: return {1'b0, 5'd11};  6'd15: return {1'b1, 5'd11};
      // A, B, C, D
      6'd16: return {1'b0, 5'd0};   6'd17: return {1'b1, 5'd0};
      6'd18: return {1'b0, 5'd1};   6'd19: return {1'b1, 5'd1};
      // E, F, G, H
      6'd20: return {1'b0, 5'd2};   6'd21: return {1'b1, 5'd4};
      6'd22: return {1'b0, 5'd7};   6'd23: return {1'b1, 5'd9};
      // Cb 17, 18, 19, 20
      6'd24: return {1'b1, 5'd13};  6'd25: return {1'b0, 5'd14};
      6'd26: return {1'b0, 5'd15};  6'd27: return {1'b1, 5'd15};
      // I, J, K, L
      6'd28: return {1'b0, 5'd12};  6'd29: return {1'b1, 5'd12};
      6'd30: return {1'b0, 5'd13};  6'd31: return {1'b1, 5'd14};
      // Cr 21, 22, 23, 24
      6'd32: return {1'b1, 5'd17};  6'd33: return {1'b0, 5'd18};
      6'd34: return {1'b0, 5'd19};  6'd35: return {1'b1, 5'd19};
      // M, N, O, P
      6'd36: return {1'b0, 5'd16};  6'd37: return {1'b1, 5'd16};
      6'd38: return {1'b0, 5'd17};  6'd39: return {1'b1, 5'd18};
      default: return 6'd0;
    endcase
  endfunction

  function automatic logic slot_module(input slot_t s);
    logic [5:0] pl;
    pl = slot_place(s);
    return pl[5];
  endfunction

  function automatic sram_addr_t slot_base(input slot_t s);
    logic [5:0] pl;
    pl = slot_place(s);
    return sram_addr_t'({pl[4:0], 2'b00});
  endfunction

  // ---------------------------------------------------------------- edge sequence
  typedef struct packed {
    slot_t  p;          // block on the left / upper side
    slot_t  q;          // block on the right / lower side
    logic   dir_h;      // 1: vertical edge, samples taken along a row (horizontal filtering)
    plane_e plane;
    logic   first;      // p block is read from SRAM (otherwise fed back from the filter)
    logic   last;       // q block is written back to SRAM after this filtering
    logic   mb_edge;    // edge is the left or top MB boundary
    logic [1:0] pos;    // row (dir_h) or column (!dir_h) of the chain, in 4x4 blocks
    logic [1:0] idx;    // position of the edge along the chain
  } edge_t;

  // Filtering e (0..47) of the reordered sequence.
  function automatic edge_t edge_desc(input int e);
    edge_t d;
    int r, i;
    d = '0;
    if (e < 32) begin
      r = (e % 16) / 4;  i = e % 4;
      d.plane = PL_Y;
      d.dir_h = (e < 16);
      d.first = (i == 0);
      d.last  = (i == 3);
      if (e < 16) begin
        d.p = luma_slot(r, i - 1);  d.q = luma_slot(r, i);
      end else begin
        d.p = luma_slot(i - 1, r);  d.q = luma_slot(i, r);
      end
    end else begin
      r = ((e - 32) % 8) / 2;  i = (e - 32) % 2;
      r = r % 2;
      d.plane = (e < 40) ? PL_CB : PL_CR;
      d.dir_h = (((e - 32) % 8) < 4);
      d.first = (i == 0);
      d.last  = (i == 1);
      if (d.dir_h) begin
        d.p = chroma_slot(d.plane, r, i - 1);  d.q = chroma_slot(d.plane, r, i);
      end else begin
        d.p = chroma_slot(d.plane, i - 1, r);  d.q = chroma_slot(d.plane, i, r);
      end
    end
    d.mb_edge = (i == 0);
    d.pos = 2'(r);
    d.idx = 2'(i);
    return d;
  endfunction

  // ---------------------------------------------------------------- H.264 tables
  function automatic logic [7:0] alpha_tab(input logic [5:0] ia);
    case (ia)
      6'd16: return 8'd4;   6'd17: return 8'd4;   6'd18: return 8'd5;   6'd19: return 8'd6;
      6'd20: return 8'd7;   6'd21: return 8'd8;   6'd22: return 8'd9;   6'd23: return 8'd10;
      6'd24: return 8'd12;  6'd25: return 8'd13;  6'd26: return 8'd15;  6'd27: return 8'd17;
      6'd28: return 8'd20;  6'd29: return 8'd22;  6'd30: return 8'd25;  6'd31: return 8'd28;
      6'd32: return 8'd32;  6'd33: return 8'd36;  6'd34: return 8'd40;  6'd35: return 8'd45;
      6'd36: return 8'd50;  6'd37: return 8'd56;  6'd38: return 8'd63;  6'd39: return 8'd71;
      6'd40: return 8'd80;  6'd41: return 8'd90;  6'd42: return 8'd101; 6'd43: return 8'd113;
      6'd44: return 8'd127; 6'd45: return 8'd144; 6'd46: return 8'd162; 6'd47: return 8'd182;
      6'd48: return 8'd203; 6'd49: return 8'd226; 6'd50: return 8'd255; 6'd51: return 8'd255;
      default: return 8'd0;
    endcase
  endfunction

  function automatic logic [4:0] beta_tab(input logic [5:0] ib);
    if (ib < 6'd16 || ib > 6'd51) return 5'd0;
    else if (ib < 6'd19) return 5'd2;
    else if (ib < 6'd23) return 5'd3;
    else if (ib < 6'd26) return 5'd4;
    else return 5'(((ib - 6'd26) >> 1) + 6'd6);
  endfunction

  // tC0 for bS = 1, 2, 3 packed as {bS3, bS2, bS1}, 5 bits each
  function automatic logic [14:0] tc0_tab(input logic [5:0] ia);
    case (ia)
      6'd17, 6'd18, 6'd19, 6'd20: return {5'd1,  5'd0,  5'd0};
      6'd21, 6'd22:               return {5'd1,  5'd1,  5'd0};
      6'd23, 6'd24, 6'd25, 6'd26: return {5'd1,  5'd1,  5'd1};
      6'd27, 6'd28, 6'd29, 6'd30: return {5'd2,  5'd1,  5'd1};
      6'd31, 6'd32:               return {5'd3,  5'd2,  5'd1};
      6'd33: return {5'd3,  5'd2,  5'd2};
      6'd34: return {5'd4,  5'd2,  5'd2};
      6'd35, 6'd36: return {5'd4,  5'd3,  5'd2};
      6'd37: return {5'd5,  5'd3,  5'd3};
      6'd38, 6'd39: return {5'd6,  5'd4,  5'd3};
      6'd40: return {5'd7,  5'd5,  5'd4};
      6'd41: return {5'd8,  5'd5,  5'd4};
      6'd42: return {5'd9,  5'd6,  5'd4};
      6'd43: return {5'd10, 5'd7,  5'd5};
      6'd44: return {5'd11, 5'd8,  5'd6};
      6'd45: return {5'd13, 5'd8,  5'd6};
      6'd46: return {5'd14, 5'd10, 5'd7};
      6'd47: return {5'd16, 5'd11, 5'd8};
      6'd48: return {5'd18, 5'd12, 5'd9};
      6'd49: return {5'd20, 5'd13, 5'd10};
      6'd50: return {5'd23, 5'd15, 5'd11};
      6'd51: return {5'd25, 5'd17, 5'd13};
      default: return 15'd0;
    endcase
  endfunction

  // indexA / indexB = Clip3(0, 51, qPav + offset)
  function automatic logic [5:0] clip_index(input qp_t qpav, input logic signed [4:0] off);
    int v;
    v = int'(qpav) + int'(off);
    if (v < 0)  v = 0;
    if (v > 51) v = 51;
    return 6'(v);
  endfunction

  function automatic qp_t qp_avg(input qp_t a, input qp_t b);
    return qp_t'((7'(a) + 7'(b) + 7'd1) >> 1);
  endfunction

endpackage
