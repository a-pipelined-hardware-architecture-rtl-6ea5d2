// tb_mem_wrapper: self-checking test of the skewed two-module block storage.
//  1. Loads blocks A, B, E, 1 and 2 through the external write path with the sample numbers
//     1..80 of the reference example (column-major inside each block) and checks the bytes
//     that land in each SRAM lane and address against the published storage pattern
//     (module 1 lane 0 holds 1, 8, 11, 14 at addresses 0..3, and so on).
//  2. Fills all 40 slots with random blocks and reads every filter line of all 48
//     filterings (p and q side together, one cycle each) in both directions.
//  3. Writes filtered lines back through the filter write path, reads the blocks out
//     column by column through the external read path and compares.
module tb_mem_wrapper;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fr_p_en, fr_q_en, fr_dir_h, fw_p_en, fw_q_en, fw_dir_h, xw_en, xr_en;
  slot_t       fr_p_slot, fr_q_slot, fw_p_slot, fw_q_slot, xw_slot, xr_slot;
  logic [1:0]  fr_line, fw_line, xw_col, xr_col;
  quad_t       fr_p, fr_q, fw_p, fw_q;
  logic [31:0] xw_data, xr_data;

  mem_wrapper dut (.*);

  int checks = 0, failures = 0;
  int blk [40][4][4];   // [slot][row][col]

  // view of the SRAM contents
  logic [7:0] peek [2][4][80];
  for (genvar m = 0; m < 2; m++) begin : g_m
    for (genvar l = 0; l < 4; l++) begin : g_l
      always_comb peek[m][l] = dut.g_mod[m].u_mod.g_lane[l].u_sram.mem;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    fr_p_en = 0; fr_q_en = 0; fw_p_en = 0; fw_q_en = 0; xw_en = 0; xr_en = 0;
  endtask

  task automatic ext_write_block(slot_t s);
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      idle();
      xw_en = 1; xw_slot = s; xw_col = 2'(c);
      for (int r = 0; r < 4; r++) xw_data[8*r +: 8] = 8'(blk[s][r][c]);
    end
    @(negedge clk);
    idle();
  endtask

  // expected line of slot s: line k, position j along the line
  function automatic int line_sample(slot_t s, int k, bit dir_h, int j);
    return dir_h ? blk[s][k][j] : blk[s][j][k];
  endfunction

  int fig_m1 [4][12] = '{
    '{1, 8, 11, 14, 33, 40, 43, 46, 65, 72, 75, 78},
    '{2, 5, 12, 15, 34, 37, 44, 47, 66, 69, 76, 79},
    '{3, 6, 9, 16, 35, 38, 41, 48, 67, 70, 73, 80},
    '{4, 7, 10, 13, 36, 39, 42, 45, 68, 71, 74, 77}};
  int fig_m1_addr [12] = '{0, 1, 2, 3, 8, 9, 10, 11, 12, 13, 14, 15};
  int fig_m2 [4][8] = '{
    '{17, 24, 27, 30, 49, 56, 59, 62},
    '{18, 21, 28, 31, 50, 53, 60, 63},
    '{19, 22, 25, 32, 51, 54, 57, 64},
    '{20, 23, 26, 29, 52, 55, 58, 61}};
  int fig_m2_addr [8] = '{0, 1, 2, 3, 8, 9, 10, 11};

  initial begin
    edge_t e;
    idle();
    fr_p_slot = '0; fr_q_slot = '0; fr_line = '0; fr_dir_h = 0;
    fw_p_slot = '0; fw_q_slot = '0; fw_line = '0; fw_dir_h = 0; fw_p = '0; fw_q = '0;
    xw_slot = '0; xw_col = '0; xw_data = '0; xr_slot = '0; xr_col = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. published example: A=1..16, B=17..32, E=33..48, 1=49..64, 2=65..80
    begin
      slot_t ex [5] = '{slot_t'(16), slot_t'(17), slot_t'(20), slot_t'(0), slot_t'(1)};
      for (int b = 0; b < 5; b++) begin
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++) blk[ex[b]][r][c] = 16 * b + 4 * c + r + 1;
        ext_write_block(ex[b]);
      end
    end
    @(negedge clk);
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (int'(peek[0][l][fig_m1_addr[i]]) != fig_m1[l][i]) begin
          failures++;
          $display("module 1 lane %0d addr %0d: exp %0d got %0d", l, fig_m1_addr[i], fig_m1[l][i], peek[0][l][fig_m1_addr[i]]);
        end
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(peek[1][l][fig_m2_addr[i]]) != fig_m2[l][i]) begin
          failures++;
          $display("module 2 lane %0d addr %0d: exp %0d got %0d", l, fig_m2_addr[i], fig_m2[l][i], peek[1][l][fig_m2_addr[i]]);
        end
      end
    end

    // ---- 2. random blocks in all slots, every filter line of all 48 filterings
    for (int s = 0; s < 40; s++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) blk[s][r][c] = $urandom_range(0, 255);
      ext_write_block(slot_t'(s));
    end
    for (int ed = 0; ed < 48; ed++) begin
      e = edge_desc(ed);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        idle();
        fr_p_en = 1; fr_q_en = 1; fr_p_slot = e.p; fr_q_slot = e.q;
        fr_line = 2'(k); fr_dir_h = e.dir_h;
        @(negedge clk);
        idle();
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(fr_p[i]) != line_sample(e.p, k, e.dir_h, 3 - i) ||
              int'(fr_q[i]) != line_sample(e.q, k, e.dir_h, i)) begin
            failures++;
            if (failures < 10) $display("edge %0d line %0d pos %0d: p exp %0d got %0d, q exp %0d got %0d",
              ed, k, i, line_sample(e.p, k, e.dir_h, 3 - i), fr_p[i], line_sample(e.q, k, e.dir_h, i), fr_q[i]);
          end
        end
      end
    end

    // ---- 3. filter write-back of new lines, then external read of whole blocks
    for (int ed = 0; ed < 48; ed += 5) begin
      e = edge_desc(ed);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        idle();
        fw_p_en = 1; fw_q_en = 1; fw_p_slot = e.p; fw_q_slot = e.q; fw_line = 2'(k);
        fw_dir_h = e.dir_h;
        for (int i = 0; i < 4; i++) begin
          fw_p[i] = 8'($urandom); fw_q[i] = 8'($urandom);
          if (e.dir_h) begin
            blk[e.p][k][3 - i] = int'(fw_p[i]);  blk[e.q][k][i] = int'(fw_q[i]);
          end else begin
            blk[e.p][3 - i][k] = int'(fw_p[i]);  blk[e.q][i][k] = int'(fw_q[i]);
          end
        end
      end
    end
    @(negedge clk);
    idle();
    for (int s = 0; s < 40; s++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        idle();
        xr_en = 1; xr_slot = slot_t'(s); xr_col = 2'(c);
        @(negedge clk);
        idle();
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (int'(xr_data[8*r +: 8]) != blk[s][r][c]) begin
            failures++;
            if (failures < 20) $display("slot %0d col %0d row %0d: exp %0d got %0d", s, c, r, blk[s][r][c], xr_data[8*r +: 8]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
