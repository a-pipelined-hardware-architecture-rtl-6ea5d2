// tb_dbf_top: end-to-end test of the deblocking filter on a small picture.
//
// A W_MB x H_MB macroblock picture (luma plus 4:2:0 chroma) with blocky content and random
// coding information (intra MBs, QPs, non-zero coefficients, references, motion vectors) is
// placed in the SDRAM model in the strip layout the filter expects: each 4-row strip of a
// plane is a run of 32-bit words, one per sample column, byte r = row r of the strip. The
// testbench then acts as the processor: for every MB in raster order it programs the
// register file over APB (edge enables, on-chip reuse of the left neighbour, keeping of the
// right column, QPs, addresses, block information), starts the MB and waits for done.
// At the end the whole picture in SDRAM is compared with a reference deblocking of the same
// picture in the standard order (per MB: vertical edges left to right, then horizontal
// edges top to bottom; luma, Cb, Cr).
//
// Mechanisms that must occur at least once: feedback of the shared block into the filter,
// left-neighbour reuse without loading, write-through of a line read in the cycle it is
// written back, relocation of the right-column blocks, every Bs value 0..4, an MB aborted
// by the end command and restarted, disabled picture-boundary edges, chroma lines, SDRAM
// wait states. The filtering phase must take exactly four cycles per filtering (192 cycles
// per MB).
module tb_dbf_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int W_MB = 3, H_MB = 2;
  localparam int W = 16 * W_MB, H = 16 * H_MB, WC = W / 2, HC = H / 2;
  localparam int YS = 4 * W, CS = 4 * WC;                 // strip strides in bytes
  localparam int YBASE = 0, CBBASE = 32'h1000, CRBASE = 32'h1800;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        psel, penable, pwrite, pready, pslverr, irq;
  logic [7:0]  paddr;
  logic [31:0] pwdata, prdata;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready;
  logic [2:0]  hsize, hburst;

  dbf_top dut (.*);
  ahb_sdram_model #(.WORDS(8192), .ROW_BYTES(512), .ROW_WAIT(4), .EXTRA_WAIT_PCT(5)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hwdata, .hrdata, .hready);

  int checks = 0, failures = 0;

  // picture and coding information
  int Y [H][W], CB [HC][WC], CR [HC][WC];
  int qp [H_MB][W_MB];
  bit intra [H_MB][W_MB];
  int nz [H / 4][W / 4], refi [H / 4][W / 4], mvx [H / 4][W / 4], mvy [H / 4][W / 4];
  int off_a, off_b, chroma_off;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ reference
  function automatic int qpc(int q);
    int t [22] = '{29,30,31,32,32,33,34,34,35,35,36,36,37,37,37,38,38,38,39,39,39,39};
    q = clip3(0, 51, q + chroma_off);
    return (q < 30) ? q : t[q - 30];
  endfunction

  // Bs between luma blocks (bx0,by0) -> (bx1,by1), sample grid of 4x4 blocks
  function automatic int ref_bs(int bxp, int byp, int bxq, int byq);
    bit mbe, ip, iq;
    mbe = (bxp / 4 != bxq / 4) || (byp / 4 != byq / 4);
    ip = intra[byp / 4][bxp / 4];
    iq = intra[byq / 4][bxq / 4];
    return bs_rule(mbe, ip, iq, nz[byp][bxp] != 0, nz[byq][bxq] != 0, refi[byp][bxp], refi[byq][bxq],
                   mvx[byp][bxp], mvx[byq][bxq], mvy[byp][bxp], mvy[byq][bxq]);
  endfunction

  task automatic ref_mb(int mx, int my);
    int s [8];
    int qa, ia, ib, bs;
    // luma vertical edges
    for (int e = 0; e < 4; e++) begin
      int x = 16 * mx + 4 * e;
      if (x == 0) continue;
      for (int r = 0; r < 16; r++) begin
        int y = 16 * my + r;
        qa = (e == 0) ? ((qp[my][mx - 1] + qp[my][mx] + 1) >> 1) : qp[my][mx];
        bs = ref_bs(x / 4 - 1, y / 4, x / 4, y / 4);
        for (int i = 0; i < 8; i++) s[i] = Y[y][x - 4 + i];
        filter_line(s, bs, 0, idx_clip(qa, off_a), idx_clip(qa, off_b));
        for (int i = 0; i < 8; i++) Y[y][x - 4 + i] = s[i];
      end
    end
    // luma horizontal edges
    for (int e = 0; e < 4; e++) begin
      int y = 16 * my + 4 * e;
      if (y == 0) continue;
      for (int c = 0; c < 16; c++) begin
        int x = 16 * mx + c;
        qa = (e == 0) ? ((qp[my - 1][mx] + qp[my][mx] + 1) >> 1) : qp[my][mx];
        bs = ref_bs(x / 4, y / 4 - 1, x / 4, y / 4);
        for (int i = 0; i < 8; i++) s[i] = Y[y - 4 + i][x];
        filter_line(s, bs, 0, idx_clip(qa, off_a), idx_clip(qa, off_b));
        for (int i = 0; i < 8; i++) Y[y - 4 + i][x] = s[i];
      end
    end
    // chroma (both planes identical in structure)
    for (int pl = 0; pl < 2; pl++) begin
      for (int e = 0; e < 2; e++) begin
        int x = 8 * mx + 4 * e;
        if (x == 0) continue;
        for (int r = 0; r < 8; r++) begin
          int y = 8 * my + r;
          int lx = 2 * x, ly = 2 * y;
          qa = (e == 0) ? ((qpc(qp[my][mx - 1]) + qpc(qp[my][mx]) + 1) >> 1) : qpc(qp[my][mx]);
          bs = ref_bs(lx / 4 - 1, ly / 4, lx / 4, ly / 4);
          for (int i = 0; i < 8; i++) s[i] = (pl == 0) ? CB[y][x - 4 + i] : CR[y][x - 4 + i];
          filter_line(s, bs, 1, idx_clip(qa, off_a), idx_clip(qa, off_b));
          for (int i = 0; i < 8; i++) if (pl == 0) CB[y][x - 4 + i] = s[i]; else CR[y][x - 4 + i] = s[i];
        end
      end
      for (int e = 0; e < 2; e++) begin
        int y = 8 * my + 4 * e;
        if (y == 0) continue;
        for (int c = 0; c < 8; c++) begin
          int x = 8 * mx + c;
          int lx = 2 * x, ly = 2 * y;
          qa = (e == 0) ? ((qpc(qp[my - 1][mx]) + qpc(qp[my][mx]) + 1) >> 1) : qpc(qp[my][mx]);
          bs = ref_bs(lx / 4, ly / 4 - 1, lx / 4, ly / 4);
          for (int i = 0; i < 8; i++) s[i] = (pl == 0) ? CB[y - 4 + i][x] : CR[y - 4 + i][x];
          filter_line(s, bs, 1, idx_clip(qa, off_a), idx_clip(qa, off_b));
          for (int i = 0; i < 8; i++) if (pl == 0) CB[y - 4 + i][x] = s[i]; else CR[y - 4 + i][x] = s[i];
        end
      end
    end
  endtask

  // ------------------------------------------------------------------ SDRAM image
  function automatic int waddr(int base, int stride, int x, int y);
    return (base + (y / 4) * stride + 4 * x) / 4;
  endfunction

  task automatic put_picture();
    for (int y = 0; y < H; y += 4) for (int x = 0; x < W; x++)
      u_mem.mem[waddr(YBASE, YS, x, y)] = {8'(Y[y+3][x]), 8'(Y[y+2][x]), 8'(Y[y+1][x]), 8'(Y[y][x])};
    for (int y = 0; y < HC; y += 4) for (int x = 0; x < WC; x++) begin
      u_mem.mem[waddr(CBBASE, CS, x, y)] = {8'(CB[y+3][x]), 8'(CB[y+2][x]), 8'(CB[y+1][x]), 8'(CB[y][x])};
      u_mem.mem[waddr(CRBASE, CS, x, y)] = {8'(CR[y+3][x]), 8'(CR[y+2][x]), 8'(CR[y+1][x]), 8'(CR[y][x])};
    end
  endtask

  function automatic int get_sample(int base, int stride, int x, int y);
    logic [31:0] w;
    w = u_mem.mem[waddr(base, stride, x, y)];
    return int'(w[8 * (y % 4) +: 8]);
  endfunction

  // ------------------------------------------------------------------ APB processor
  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  function automatic logic [31:0] binfo_word(int bx, int by);
    blk_info_t b;
    b.nz = nz[by][bx] != 0;
    b.ref_id = 5'(refi[by][bx]);
    b.mvx = 13'(mvx[by][bx]);
    b.mvy = 13'(mvy[by][bx]);
    return 32'(b);
  endfunction

  // ------------------------------------------------------------------ mechanism counters
  int n_bypass = 0, n_abort = 0;
  int n_feedback = 0, n_reloc = 0, n_reuse = 0, n_disabled = 0, n_chroma = 0;
  int n_bs [5] = '{0, 0, 0, 0, 0};
  int filt_cycles = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.l0.valid && !dut.u_ctrl.l0.e.first) n_feedback++;
      if (dut.u_ctrl.l0.valid && !dut.u_ctrl.bs_edge_en) n_disabled++;
      if (dut.u_ctrl.l0.valid && dut.f_chroma) n_chroma++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_RELOC && dut.u_ctrl.rcnt == 6'd0) n_reloc++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_FILT) filt_cycles++;
      if (dut.bs_out_valid) n_bs[dut.bs]++;
      if (|dut.u_mem.byp) n_bypass++;
    end
  end

  initial begin
    logic [31:0] d;
    int cyc_mb [H_MB][W_MB];
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;

    // ---- picture with block structure
    off_a = $urandom_range(0, 4) - 2;
    off_b = $urandom_range(0, 4) - 2;
    chroma_off = $urandom_range(0, 4) - 2;
    for (int by = 0; by < H / 4; by++) for (int bx = 0; bx < W / 4; bx++) begin
      int lvl = 60 + 2 * bx + 3 * by + $urandom_range(0, 16) - 8;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        Y[4 * by + y][4 * bx + x] = clip3(0, 255, lvl + $urandom_range(0, 4) - 2);
      nz[by][bx]   = ($urandom_range(0, 3) == 0);
      refi[by][bx] = $urandom_range(0, 5) == 0 ? 1 : 0;
      mvx[by][bx]  = $urandom_range(0, 12) - 6;
      mvy[by][bx]  = $urandom_range(0, 12) - 6;
    end
    for (int by = 0; by < HC / 4; by++) for (int bx = 0; bx < WC / 4; bx++) begin
      int lb = 120 + $urandom_range(0, 12) - 6, lr = 130 + $urandom_range(0, 12) - 6;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
        CB[4 * by + y][4 * bx + x] = lb + $urandom_range(0, 2) - 1;
        CR[4 * by + y][4 * bx + x] = lr + $urandom_range(0, 2) - 1;
      end
    end
    for (int my = 0; my < H_MB; my++) for (int mx = 0; mx < W_MB; mx++) begin
      qp[my][mx] = $urandom_range(28, 46);
      intra[my][mx] = ($urandom_range(0, 2) == 0);
    end
    intra[0][1] = 1;  // make sure Bs 3/4 occur
    intra[1][1] = 0;
    put_picture();

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- run the MBs
    for (int my = 0; my < H_MB; my++) for (int mx = 0; mx < W_MB; mx++) begin
      logic fl, ft, ru, kr;
      int ql, qt;
      fl = (mx > 0);  ft = (my > 0);
      ru = (mx > 0);  kr = (mx < W_MB - 1);
      if (ru) n_reuse++;
      ql = (mx > 0) ? qp[my][mx - 1] : 0;
      qt = (my > 0) ? qp[my - 1][mx] : 0;
      apb_write(8'h08, {25'd0, (my > 0) ? intra[my - 1][mx] : 1'b0, (mx > 0) ? intra[my][mx - 1] : 1'b0,
                        intra[my][mx], kr, ru, ft, fl});
      apb_write(8'h0C, {10'd0, 6'(qt), 2'd0, 6'(ql), 2'd0, 6'(qp[my][mx])});
      apb_write(8'h10, {10'd0, 6'(qpc(qt)), 2'd0, 6'(qpc(ql)), 2'd0, 6'(qpc(qp[my][mx]))});
      apb_write(8'h14, {10'd0, 6'(qpc(qt)), 2'd0, 6'(qpc(ql)), 2'd0, 6'(qpc(qp[my][mx]))});
      apb_write(8'h18, {19'd0, 5'(off_b), 3'd0, 5'(off_a)});
      apb_write(8'h1C, 32'(YBASE + 4 * my * YS + 4 * 16 * mx));
      apb_write(8'h20, 32'(CBBASE + 2 * my * CS + 4 * 8 * mx));
      apb_write(8'h24, 32'(CRBASE + 2 * my * CS + 4 * 8 * mx));
      apb_write(8'h28, 32'(YS));
      apb_write(8'h2C, 32'(CS));
      for (int i = 0; i < 16; i++) apb_write(8'h40 + 8'(4 * i), binfo_word(4 * mx + i % 4, 4 * my + i / 4));
      for (int i = 0; i < 4; i++) begin
        apb_write(8'h40 + 8'(4 * (16 + i)), (my > 0) ? binfo_word(4 * mx + i, 4 * my - 1) : 32'd0);
        apb_write(8'h40 + 8'(4 * (20 + i)), (mx > 0) ? binfo_word(4 * mx - 1, 4 * my + i) : 32'd0);
      end
      if (mx == 0 && my == 0) begin
        // end command: abort the MB during its load phase, then run it again from the start
        apb_write(8'h00, 32'h1);
        repeat (30) @(posedge clk);
        checks++;
        if (dut.u_ctrl.state != dut.u_ctrl.S_LOAD_WAIT && dut.u_ctrl.state != dut.u_ctrl.S_LOAD_CMD) begin
          failures++;
          $display("MB not loading 30 cycles after start");
        end
        apb_write(8'h00, 32'h2);
        repeat (2) @(posedge clk);
        apb_read(8'h04, d);
        checks++;
        if (d[1:0] != 2'b00) begin
          failures++;
          $display("after the end command STATUS = %b, expected idle and not done", d[1:0]);
        end else n_abort++;
      end
      apb_write(8'h00, 32'h1);
      do apb_read(8'h04, d); while (d[1] == 1'b0);
      apb_read(8'h30, d);
      cyc_mb[my][mx] = int'(d[15:0]);
      ref_mb(mx, my);
    end

    // ---- compare the picture
    begin
      int bad = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        checks++;
        if (get_sample(YBASE, YS, x, y) != Y[y][x]) begin
          bad++; failures++;
          if (bad < 10) $display("Y(%0d,%0d): exp %0d got %0d", x, y, Y[y][x], get_sample(YBASE, YS, x, y));
        end
      end
      for (int y = 0; y < HC; y++) for (int x = 0; x < WC; x++) begin
        checks += 2;
        if (get_sample(CBBASE, CS, x, y) != CB[y][x]) begin
          bad++; failures++;
          if (bad < 20) $display("Cb(%0d,%0d): exp %0d got %0d", x, y, CB[y][x], get_sample(CBBASE, CS, x, y));
        end
        if (get_sample(CRBASE, CS, x, y) != CR[y][x]) begin
          bad++; failures++;
          if (bad < 30) $display("Cr(%0d,%0d): exp %0d got %0d", x, y, CR[y][x], get_sample(CRBASE, CS, x, y));
        end
      end
    end

    // ---- mechanisms and timing
    begin
      int nmb = W_MB * H_MB;
      checks++;
      if (filt_cycles != nmb * 48 * 4) begin
        failures++;
        $display("filtering phase took %0d cycles, expected %0d", filt_cycles, nmb * 192);
      end
      checks++;
      if (n_feedback == 0 || n_reloc == 0 || n_reuse == 0 || n_disabled == 0 || n_chroma == 0 || n_bypass == 0 || n_abort == 0 ||
          u_mem.waits == 0 || n_bs[0] == 0 || n_bs[1] == 0 || n_bs[2] == 0 || n_bs[3] == 0 || n_bs[4] == 0) begin
        failures++;
        $display("a mechanism never occurred");
      end
      $display("feedback lines=%0d relocations=%0d reuse MBs=%0d disabled-edge lines=%0d chroma lines=%0d",
               n_feedback, n_reloc, n_reuse, n_disabled, n_chroma);
      $display("Bs histogram 0..4: %p  SDRAM wait states=%0d row changes=%0d", n_bs, u_mem.waits, u_mem.row_changes);
      $display("write-through forwards=%0d aborted MBs=%0d", n_bypass, n_abort);
      for (int my = 0; my < H_MB; my++) for (int mx = 0; mx < W_MB; mx++)
        $display("MB(%0d,%0d): %0d cycles", mx, my, cyc_mb[my][mx]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
