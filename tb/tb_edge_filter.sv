// tb_edge_filter: self-checking test of the four-stage pipelined edge filter.
// Streams one random line per cycle (with occasional bubbles), gives each line's Bs two
// cycles after its samples, and checks every output four cycles after its input against
// the reference filter. Lines are drawn so that every path is exercised: Bs 0..4, luma and
// chroma, strong and weak Bs-4 filtering, active and inactive lines.
module tb_edge_filter;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid;
  quad_t      in_p, in_q;
  logic       in_chroma;
  logic [5:0] in_index_a, in_index_b;
  bs_t        bs_s3;
  logic       out_valid;
  quad_t      out_p, out_q;

  edge_filter dut (.*);

  typedef struct {
    bit valid;
    int s[8];
    int bs;
    bit chroma;
    int ia, ib;
  } line_s;

  line_s hist [$];
  int checks = 0, failures = 0, cyc = 0;
  int n_strong = 0, n_bs4weak = 0, n_normal = 0, n_changed = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_s rand_line(int n);
    line_s l;
    int base, step, noise;
    l.valid  = ($urandom_range(0, 9) != 0);
    base     = $urandom_range(0, 255);
    step     = $urandom_range(0, 3) == 0 ? $urandom_range(0, 60) : $urandom_range(0, 12);
    noise    = $urandom_range(0, 3) == 0 ? 20 : 3;
    for (int i = 0; i < 8; i++) begin
      int v;
      v = base + ((i >= 4) ? step : 0) + $urandom_range(0, noise) - noise / 2;
      l.s[i] = clip3(0, 255, v);
    end
    l.bs     = $urandom_range(0, 4);
    l.chroma = $urandom_range(0, 2) == 0;
    l.ia     = $urandom_range(10, 51);
    l.ib     = $urandom_range(10, 51);
    return l;
  endfunction

  line_s lines [N];
  initial for (int n = 0; n < N; n++) lines[n] = rand_line(n);

  // drive: line n in cycle n; its Bs in cycle n+2
  always_comb begin
    automatic int n = cyc;
    automatic int m = cyc - 2;
    in_valid = 1'b0; in_p = '0; in_q = '0; in_chroma = 1'b0; in_index_a = '0; in_index_b = '0;
    bs_s3 = '0;
    if (rst_n && n >= 0 && n < N) begin
      in_valid   = lines[n].valid;
      for (int i = 0; i < 4; i++) begin
        in_p[i] = 8'(lines[n].s[3 - i]);
        in_q[i] = 8'(lines[n].s[4 + i]);
      end
      in_chroma  = lines[n].chroma;
      in_index_a = 6'(lines[n].ia);
      in_index_b = 6'(lines[n].ib);
    end
    if (rst_n && m >= 0 && m < N) bs_s3 = 3'(lines[m].bs);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      automatic int m = cyc - 4;
      if (m >= 0 && m < N) begin
        automatic line_s l = lines[m];
        automatic int e[8] = l.s;
        automatic bit ok;
        filter_line(e, l.bs, l.chroma, l.ia, l.ib);
        checks++;
        ok = (out_valid == l.valid);
        for (int i = 0; i < 4; i++) begin
          if (int'(out_p[i]) != e[3 - i]) ok = 1'b0;
          if (int'(out_q[i]) != e[4 + i]) ok = 1'b0;
        end
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("line %0d bs=%0d chroma=%0d ia=%0d ib=%0d in=%p exp=%p got p=%h q=%h",
                     m, l.bs, l.chroma, l.ia, l.ib, l.s, e, out_p, out_q);
        end
        if (e != l.s) n_changed++;
        if (l.bs == 4 && e[1] != l.s[1]) n_strong++;
        else if (l.bs == 4 && e[3] != l.s[3]) n_bs4weak++;
        else if (l.bs inside {[1:3]} && e[3] != l.s[3]) n_normal++;
      end
      cyc <= cyc + 1;
      if (cyc == N + 6) begin
        checks++;
        if (n_strong == 0 || n_bs4weak == 0 || n_normal == 0 || n_changed < N / 10) begin
          failures++;
          $display("coverage too low: strong=%0d bs4weak=%0d normal=%0d changed=%0d",
                   n_strong, n_bs4weak, n_normal, n_changed);
        end
        $display("lines=%0d changed=%0d strong=%0d bs4weak=%0d normal=%0d",
                 N, n_changed, n_strong, n_bs4weak, n_normal);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

endmodule
