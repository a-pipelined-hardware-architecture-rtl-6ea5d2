// dbf_ctrl: macroblock sequencer of the deblocking filter.
//
// One start command filters one MB in four phases:
//   LOAD   the 4x4 blocks the MB needs are fetched from SDRAM, one AHB burst per 4-row
//          strip (upper neighbours A..D, then each row of blocks with its left neighbour in
//          front: E,1,2,3,4 / F,5,6,7,8 / ...; likewise for Cb and Cr). A burst word is one
//          block column and goes straight into the on-chip buffer.
//   FILTER the 48 filterings in the reordered sequence (dbf_pkg::edge_desc): each row of
//          vertical edges left to right, then each column of horizontal edges top to bottom,
//          luma, Cb, Cr. One filtering is four lines in four consecutive cycles and
//          filterings follow back to back. Within a chain the q block of one filtering is
//          the p block of the next: it is not read from SRAM but taken from the filter
//          output (q0..q3 reversed into p3..p0), which returns exactly four cycles after
//          the line went in. Each cycle
//          therefore reads one block line (two for the first filtering of a chain) and
//          writes back the finished p line (and the q line at the end of a chain).
//   STORE  the filtered blocks are written back to SDRAM, one burst per strip.
//   RELOC  if the next MB is the right neighbour (keep_right), the right-column blocks
//          4, 8, 12, 16, 18, 20, 22, 24 are not stored but copied into the slots of
//          E, F, G, H, K, L, O, P, where the next MB (started with reuse_left) finds its left
//          neighbours without loading them.
// The reordered filtering sequence, the feedback of the shared block and the reuse of the
// right-column blocks follow the architecture. The phases run one after the other here; the
// architecture overlaps loading, filtering and storing of different blocks, which this
// controller does not do (see the cycle count in the documentation).
//
// Pipeline timing of a line issued in cycle I: SRAM address in I, SRAM data and filter input
// (and Bs query) in I+1, Bs needed by filter stage 3 in I+3, filter output and write-back
// in I+5. Edges that the register file disables (picture or slice boundary) are still
// issued, with Bs forced to 0, so the pipeline timing never changes.
module dbf_ctrl
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  mb_ctrl_t    mbc,
  output logic        busy,
  output logic        done_set,
  output logic [15:0] cycles,
  // AHB master command and data
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output logic        cmd_write,
  output logic [31:0] cmd_addr,
  output logic [5:0]  cmd_len,
  input  logic        rd_valid,
  input  logic [31:0] rd_data,
  input  logic [5:0]  rd_idx,
  input  logic        wr_next,
  input  logic        xfer_done,
  // memory wrapper
  output logic        fr_p_en,
  output logic        fr_q_en,
  output slot_t       fr_p_slot,
  output slot_t       fr_q_slot,
  output logic [1:0]  fr_line,
  output logic        fr_dir_h,
  input  quad_t       fr_p,
  input  quad_t       fr_q,
  output logic        fw_p_en,
  output logic        fw_q_en,
  output slot_t       fw_p_slot,
  output slot_t       fw_q_slot,
  output logic [1:0]  fw_line,
  output logic        fw_dir_h,
  output quad_t       fw_p,
  output quad_t       fw_q,
  output logic        xw_en,
  output slot_t       xw_slot,
  output logic [1:0]  xw_col,
  output logic [31:0] xw_data,
  output logic        xr_en,
  output slot_t       xr_slot,
  output logic [1:0]  xr_col,
  input  logic [31:0] xr_data,
  // filter
  output logic        f_valid,
  output quad_t       f_p,
  output quad_t       f_q,
  output logic        f_chroma,
  output logic [5:0]  f_index_a,
  output logic [5:0]  f_index_b,
  input  logic        f_out_valid,
  input  quad_t       f_out_p,
  input  quad_t       f_out_q,
  // Bs analyser query
  output logic        bs_valid,
  output logic [4:0]  bs_p_id,
  output logic [4:0]  bs_q_id,
  output logic        bs_mb_edge,
  output logic        bs_dir_h,
  output logic        bs_edge_en
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD_CMD, S_LOAD_WAIT, S_FILT, S_DRAIN,
    S_STORE_CMD, S_STORE_WAIT, S_RELOC, S_DONE
  } state_e;

  localparam int NUM_STRIPS = 11;
  localparam int DRAIN_CYCLES = 6;

  state_e      state;
  logic [3:0]  sidx;       // strip index
  logic [5:0]  ecnt;       // edge
  logic [1:0]  kcnt;       // line
  logic [5:0]  rcnt;       // relocation step / drain counter
  logic [5:0]  wptr;       // store: word being read for the AHB write data

  // ------------------------------------------------------------------ strips
  typedef struct packed {
    logic        present;
    plane_e      plane;
    logic signed [2:0] row;     // -1 = upper neighbour strip
    logic signed [5:0] xs;      // first word (sample column, relative to the MB)
    logic [5:0]  len;
    logic [31:0] addr;
  } strip_t;

  function automatic strip_t strip_of(input logic [3:0] s, input logic storing, input mb_ctrl_t c);
    strip_t st;
    int row, xs, xe, w;
    logic left;
    st = '0;
    if (s < 4'd5) begin
      st.plane = PL_Y;  row = int'(s) - 1;  w = 16;
    end else if (s < 4'd8) begin
      st.plane = PL_CB; row = int'(s) - 6;  w = 8;
    end else begin
      st.plane = PL_CR; row = int'(s) - 9;  w = 8;
    end
    left = storing ? (c.filter_left || c.reuse_left) : (c.filter_left && !c.reuse_left);
    xs = (row >= 0 && left) ? -4 : 0;
    xe = (storing && row >= 0 && c.keep_right) ? w - 5 : w - 1;
    st.present = (row >= 0) || c.filter_top;
    st.row = 3'(row);
    st.xs  = 6'(xs);
    st.len = 6'(xe - xs + 1);
    case (st.plane)
      PL_Y:    st.addr = c.y_addr  + 32'(row) * c.y_stride + 32'(4 * xs);
      PL_CB:   st.addr = c.cb_addr + 32'(row) * c.c_stride + 32'(4 * xs);
      default: st.addr = c.cr_addr + 32'(row) * c.c_stride + 32'(4 * xs);
    endcase
    return st;
  endfunction

  // slot and column of word w of a strip
  function automatic logic [7:0] strip_word(input strip_t st, input logic [5:0] w);
    int x, col;
    slot_t sl;
    x   = int'(st.xs) + int'(w);
    col = (x < 0) ? -1 : x / 4;
    if (st.plane == PL_Y) sl = luma_slot(int'(st.row), col);
    else                  sl = chroma_slot(st.plane, int'(st.row), col);
    return {sl, 2'(x)};
  endfunction

  strip_t cur_strip;
  assign cur_strip = strip_of(sidx, (state == S_STORE_CMD || state == S_STORE_WAIT), mbc);

  // ------------------------------------------------------------------ FSM
  logic last_strip;
  assign last_strip = (sidx == 4'(NUM_STRIPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sidx <= '0; ecnt <= '0; kcnt <= '0; rcnt <= '0;
      cycles <= '0;
    end else if (stop) begin
      state <= S_IDLE;
    end else begin
      if (state != S_IDLE && state != S_DONE) cycles <= cycles + 16'd1;
      case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD_CMD;
          sidx   <= '0;
          cycles <= 16'd1;
        end
        S_LOAD_CMD: begin
          if (!cur_strip.present) begin
            if (last_strip) begin state <= S_FILT; ecnt <= '0; kcnt <= '0; end
            else sidx <= sidx + 4'd1;
          end else if (cmd_ready) state <= S_LOAD_WAIT;
        end
        S_LOAD_WAIT: if (xfer_done) begin
          if (last_strip) begin state <= S_FILT; ecnt <= '0; kcnt <= '0; end
          else begin sidx <= sidx + 4'd1; state <= S_LOAD_CMD; end
        end
        S_FILT: begin
          kcnt <= kcnt + 2'd1;
          if (kcnt == 2'd3) begin
            ecnt <= ecnt + 6'd1;
            if (ecnt == 6'(NUM_EDGES - 1)) begin state <= S_DRAIN; rcnt <= '0; end
          end
        end
        S_DRAIN: begin
          rcnt <= rcnt + 6'd1;
          if (rcnt == 6'(DRAIN_CYCLES - 1)) begin state <= S_STORE_CMD; sidx <= '0; end
        end
        S_STORE_CMD: begin
          if (!cur_strip.present) begin
            if (last_strip) begin state <= mbc.keep_right ? S_RELOC : S_DONE; rcnt <= '0; end
            else sidx <= sidx + 4'd1;
          end else if (cmd_ready) state <= S_STORE_WAIT;
        end
        S_STORE_WAIT: if (xfer_done) begin
          if (last_strip) begin state <= mbc.keep_right ? S_RELOC : S_DONE; rcnt <= '0; end
          else begin sidx <= sidx + 4'd1; state <= S_STORE_CMD; end
        end
        S_RELOC: begin
          rcnt <= rcnt + 6'd1;
          if (rcnt == 6'd32) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign done_set = (state == S_DONE);

  // ------------------------------------------------------------------ AHB commands
  assign cmd_valid = (state == S_LOAD_CMD || state == S_STORE_CMD) && cur_strip.present;
  assign cmd_write = (state == S_STORE_CMD);
  assign cmd_addr  = cur_strip.addr;
  assign cmd_len   = cur_strip.len;

  // store data: read word 0 when the command is accepted, word i+1 when beat i completes
  logic st_issue, st_next;
  assign st_issue = (state == S_STORE_CMD) && cur_strip.present && cmd_ready;
  assign st_next  = (state == S_STORE_WAIT) && wr_next && (wptr + 6'd1 < cur_strip.len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wptr <= '0;
    else if (st_issue) wptr <= '0;
    else if (st_next) wptr <= wptr + 6'd1;
  end

  // relocation: source / destination pairs
  function automatic slot_t reloc_src(input logic [2:0] i);
    case (i)
      3'd0: return luma_slot(0, 3);  3'd1: return luma_slot(1, 3);
      3'd2: return luma_slot(2, 3);  3'd3: return luma_slot(3, 3);
      3'd4: return chroma_slot(PL_CB, 0, 1);  3'd5: return chroma_slot(PL_CB, 1, 1);
      3'd6: return chroma_slot(PL_CR, 0, 1);  default: return chroma_slot(PL_CR, 1, 1);
    endcase
  endfunction
  function automatic slot_t reloc_dst(input logic [2:0] i);
    case (i)
      3'd0: return luma_slot(0, -1);  3'd1: return luma_slot(1, -1);
      3'd2: return luma_slot(2, -1);  3'd3: return luma_slot(3, -1);
      3'd4: return chroma_slot(PL_CB, 0, -1);  3'd5: return chroma_slot(PL_CB, 1, -1);
      3'd6: return chroma_slot(PL_CR, 0, -1);  default: return chroma_slot(PL_CR, 1, -1);
    endcase
  endfunction

  logic       rl_wr;
  slot_t      rl_slot;
  logic [1:0] rl_col;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rl_wr <= 1'b0; rl_slot <= '0; rl_col <= '0;
    end else begin
      rl_wr   <= (state == S_RELOC) && (rcnt < 6'd32);
      rl_slot <= reloc_dst(rcnt[4:2]);
      rl_col  <= rcnt[1:0];
    end
  end

  // external read / write ports of the memory wrapper
  always_comb begin
    logic [7:0] sw;
    sw = '0;
    xr_en = 1'b0; xr_slot = '0; xr_col = '0;
    xw_en = 1'b0; xw_slot = '0; xw_col = '0; xw_data = rd_data;
    if (st_issue || st_next) begin
      sw = strip_word(cur_strip, st_issue ? 6'd0 : wptr + 6'd1);
      xr_en = 1'b1; xr_slot = sw[7:2]; xr_col = sw[1:0];
    end else if (state == S_RELOC && rcnt < 6'd32) begin
      xr_en = 1'b1; xr_slot = reloc_src(rcnt[4:2]); xr_col = rcnt[1:0];
    end
    if (state == S_LOAD_WAIT && rd_valid) begin
      sw = strip_word(cur_strip, rd_idx);
      xw_en = 1'b1; xw_slot = sw[7:2]; xw_col = sw[1:0];
    end else if (rl_wr) begin
      xw_en = 1'b1; xw_slot = rl_slot; xw_col = rl_col; xw_data = xr_data;
    end
  end

  // ------------------------------------------------------------------ filtering pipeline
  edge_t cur_edge;
  assign cur_edge = edge_desc(int'(ecnt));

  logic issue;
  assign issue = (state == S_FILT);

  assign fr_p_en   = issue && cur_edge.first;
  assign fr_q_en   = issue;
  assign fr_p_slot = cur_edge.p;
  assign fr_q_slot = cur_edge.q;
  assign fr_line   = kcnt;
  assign fr_dir_h  = cur_edge.dir_h;

  typedef struct packed {
    logic       valid;
    edge_t      e;
    logic [1:0] k;
  } line_t;

  // l0: line whose SRAM data is out now (filter input); l[1..4]: inside the filter
  line_t l0, l1, l2, l3, l4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l0 <= '0; l1 <= '0; l2 <= '0; l3 <= '0; l4 <= '0;
    end else begin
      l0 <= '{valid: issue, e: cur_edge, k: kcnt};
      l1 <= l0; l2 <= l1; l3 <= l2; l4 <= l3;
    end
  end

  // QP of the two sides, per plane
  function automatic qp_t edge_qp(input edge_t e, input mb_ctrl_t c);
    qp_t cur, nb;
    case (e.plane)
      PL_Y:    begin cur = c.qpy_cur;  nb = e.dir_h ? c.qpy_left  : c.qpy_top;  end
      PL_CB:   begin cur = c.qpcb_cur; nb = e.dir_h ? c.qpcb_left : c.qpcb_top; end
      default: begin cur = c.qpcr_cur; nb = e.dir_h ? c.qpcr_left : c.qpcr_top; end
    endcase
    return e.mb_edge ? qp_avg(nb, cur) : cur;
  endfunction

  qp_t qpav;
  assign qpav      = edge_qp(l0.e, mbc);
  assign f_valid   = l0.valid;
  // feedback of the shared block: its q0..q3 become p3..p0 of the next filtering
  always_comb begin
    f_p = fr_p;
    if (!l0.e.first)
      for (int i = 0; i < 4; i++) f_p[i] = f_out_q[3 - i];
  end
  assign f_q       = fr_q;
  assign f_chroma  = (l0.e.plane != PL_Y);
  assign f_index_a = clip_index(qpav, mbc.offset_a);
  assign f_index_b = clip_index(qpav, mbc.offset_b);

  // Bs query for the line at the filter input: luma blocks on either side
  always_comb begin
    int prow, pcol, qrow, qcol, lum;
    prow = 0; pcol = 0; qrow = 0; qcol = 0; lum = 0;
    bs_valid   = l0.valid;
    bs_mb_edge = l0.e.mb_edge;
    bs_dir_h   = l0.e.dir_h;
    bs_edge_en = !l0.e.mb_edge || (l0.e.dir_h ? mbc.filter_left : mbc.filter_top);
    if (l0.e.plane == PL_Y) begin
      bs_p_id = l0.e.p[4:0];
      bs_q_id = l0.e.q[4:0];
    end else begin
      lum = 2 * int'(l0.e.pos) + int'(l0.k) / 2;
      if (l0.e.dir_h) begin
        prow = lum; qrow = lum;
        pcol = (l0.e.idx == 2'd0) ? -1 : 1;
        qcol = (l0.e.idx == 2'd0) ? 0 : 2;
      end else begin
        pcol = lum; qcol = lum;
        prow = (l0.e.idx == 2'd0) ? -1 : 1;
        qrow = (l0.e.idx == 2'd0) ? 0 : 2;
      end
      bs_p_id = 5'(luma_slot(prow, pcol));
      bs_q_id = 5'(luma_slot(qrow, qcol));
    end
  end

  // write-back of the filter output
  assign fw_p_en   = f_out_valid && l4.valid;
  assign fw_q_en   = f_out_valid && l4.valid && l4.e.last;
  assign fw_p_slot = l4.e.p;
  assign fw_q_slot = l4.e.q;
  assign fw_line   = l4.k;
  assign fw_dir_h  = l4.e.dir_h;
  assign fw_p      = f_out_p;
  assign fw_q      = f_out_q;

  // feedback only ever follows the edge issued four cycles earlier
  a_feedback_source: assert property (@(posedge clk) disable iff (!rst_n)
    (l0.valid && !l0.e.first) |-> (l4.valid && l4.e.q == l0.e.p && l4.k == l0.k && f_out_valid));

endmodule
