// bs_analyzer: boundary strength (Bs) analyser, two-cycle pipeline.
//
// For each filter line the controller names the two luma 4x4 blocks on either side of the
// edge (indices into the block-information table of the register file: 0..15 the MB's own
// blocks, 16..19 upper neighbours, 20..23 left neighbours) and whether the edge is a MB
// boundary. Chroma lines name the luma blocks at the co-located luma position. The analyser
// follows the H.264 frame-coded rules (clause 8.7.2.1):
//   4  either side intra and the edge is a MB edge
//   3  either side intra
//   2  either side has non-zero transform coefficients
//   1  different reference pictures, or a motion vector component differs by 4 or more
//      quarter samples
//   0  otherwise, or the edge is disabled (edge_en = 0)
// Only one reference list is modelled; field/MBAFF rules are not. Two cycles of latency are
// what the architecture allows the analyser; the split into stage 1 (select and compare)
// and stage 2 (priority encode) is this design's choice.
//
// Interface: query (in_valid, p_id, q_id, mb_edge, dir_h, edge_en) in cycle t, bs in
// cycle t+2, registered.
module bs_analyzer
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [4:0] p_id,
  input  logic [4:0] q_id,
  input  logic       mb_edge,
  input  logic       dir_h,      // vertical edge: p lies in the left MB when mb_edge
  input  logic       edge_en,
  input  blk_info_t  binfo [NUM_BINFO],
  input  logic       intra_cur,
  input  logic       intra_left,
  input  logic       intra_top,
  output logic       bs_valid,
  output bs_t        bs
);

  typedef struct packed {
    logic valid, en, mb_edge, intra, nz, motion;
  } st1_t;

  st1_t st1;

  function automatic logic mv_far(input logic signed [12:0] a, input logic signed [12:0] b);
    logic signed [13:0] d;
    d = 14'(a) - 14'(b);
    return (d >= 14'sd4) || (d <= -14'sd4);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st1 <= '0;
    else begin
      automatic blk_info_t bp = binfo[p_id];
      automatic blk_info_t bq = binfo[q_id];
      automatic logic p_intra = mb_edge ? (dir_h ? intra_left : intra_top) : intra_cur;
      st1.valid   <= in_valid;
      st1.en      <= edge_en;
      st1.mb_edge <= mb_edge;
      st1.intra   <= p_intra || intra_cur;
      st1.nz      <= bp.nz || bq.nz;
      st1.motion  <= (bp.ref_id != bq.ref_id) || mv_far(bp.mvx, bq.mvx) || mv_far(bp.mvy, bq.mvy);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bs_valid <= 1'b0;
      bs       <= '0;
    end else begin
      bs_valid <= st1.valid;
      if (!st1.en)                     bs <= 3'd0;
      else if (st1.intra && st1.mb_edge) bs <= 3'd4;
      else if (st1.intra)              bs <= 3'd3;
      else if (st1.nz)                 bs <= 3'd2;
      else if (st1.motion)             bs <= 3'd1;
      else                             bs <= 3'd0;
    end
  end

endmodule
