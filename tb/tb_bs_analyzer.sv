// tb_bs_analyzer: self-checking test of the two-cycle boundary-strength analyser.
// Random block information and random queries, one per cycle; each result is compared, two
// cycles after its query, with the reference Bs rules. Every Bs value 0..4 must occur.
module tb_bs_analyzer;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, mb_edge, dir_h, edge_en, intra_cur, intra_left, intra_top;
  logic [4:0] p_id, q_id;
  blk_info_t  binfo [NUM_BINFO];
  logic       bs_valid;
  bs_t        bs;

  bs_analyzer dut (.*);

  typedef struct { bit v, mb, dh, en; int p, q; int exp; } q_s;
  q_s pend [$];
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(q_s x);
    bit ip, iq;
    if (!x.en) return 0;
    iq = intra_cur;
    ip = x.mb ? (x.dh ? intra_left : intra_top) : intra_cur;
    return bs_rule(x.mb, ip, iq, binfo[x.p].nz, binfo[x.q].nz,
                   int'(binfo[x.p].ref_id), int'(binfo[x.q].ref_id),
                   int'(binfo[x.p].mvx), int'(binfo[x.q].mvx),
                   int'(binfo[x.p].mvy), int'(binfo[x.q].mvy));
  endfunction

  initial begin
    in_valid = 0; p_id = 0; q_id = 0; mb_edge = 0; dir_h = 0; edge_en = 0;
    intra_cur = 0; intra_left = 0; intra_top = 0;
    foreach (binfo[i]) binfo[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      q_s x;
      // block information changes every 64 queries, held stable around them
      if (n % 64 == 0) begin
        in_valid <= 1'b0;
        repeat (3) @(posedge clk);
        foreach (binfo[i]) begin
          binfo[i].nz     <= ($urandom_range(0, 5) == 0);
          binfo[i].ref_id <= 5'($urandom_range(0, 1));
          binfo[i].mvx    <= 13'($urandom_range(0, 12) - 6);
          binfo[i].mvy    <= 13'($urandom_range(0, 12) - 6);
        end
        intra_cur  <= ($urandom_range(0, 7) == 0);
        intra_left <= ($urandom_range(0, 7) == 0);
        intra_top  <= ($urandom_range(0, 7) == 0);
        @(posedge clk);
      end
      x.v = 1; x.mb = $urandom_range(0, 1); x.dh = $urandom_range(0, 1);
      x.en = ($urandom_range(0, 9) != 0);
      x.p = $urandom_range(0, 23); x.q = $urandom_range(0, 23);
      in_valid <= 1'b1; p_id <= 5'(x.p); q_id <= 5'(x.q); mb_edge <= x.mb; dir_h <= x.dh;
      edge_en <= x.en;
      @(posedge clk);
      #1 x.exp = expected(x);
      pend.push_back(x);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    foreach (seen[i]) if (seen[i] == 0) begin
      failures++;
      $display("Bs %0d never produced", i);
    end
    $display("Bs histogram %p", seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results: a query accepted at edge t appears on bs after edge t+2
  always @(posedge clk) begin
    if (rst_n) begin
      if (bs_valid) begin
        q_s x;
        checks++;
        if (pend.size() == 0) begin
          failures++;
        end else begin
          x = pend.pop_front();
          seen[bs]++;
          if (int'(bs) != x.exp) begin
            failures++;
            if (failures < 10) $display("query p=%0d q=%0d mb=%0d en=%0d exp=%0d got=%0d",
                                        x.p, x.q, x.mb, x.en, x.exp, bs);
          end
        end
      end
    end
  end

  // latency: bs_valid exactly two cycles after in_valid
  logic [1:0] vpipe;
  always @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else begin
      vpipe <= {vpipe[0], in_valid};
      if (bs_valid != vpipe[1]) begin
        failures++;
        $display("latency mismatch");
      end
    end
  end

endmodule
