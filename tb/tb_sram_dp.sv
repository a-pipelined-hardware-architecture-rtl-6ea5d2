// tb_sram_dp: self-checking test of the 8x80 dual-port SRAM. Random reads and writes on
// both ports against a shadow array; checks one-cycle read latency and that read data is
// held while a port is idle.
module tb_sram_dp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       a_en, a_we, b_en, b_we;
  logic [6:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;

  sram_dp dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] shadow [80];
  int exp_a = -1, exp_b = -1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 7'(i); b_wdata = 8'($urandom); shadow[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check reads issued on the previous cycle (or held data)
      if (exp_a >= 0) begin checks++; if (a_rdata !== 8'(exp_a)) begin failures++; $display("A %0d: exp %0h got %0h", n, exp_a, a_rdata); end end
      if (exp_b >= 0) begin checks++; if (b_rdata !== 8'(exp_b)) begin failures++; $display("B %0d: exp %0h got %0h", n, exp_b, b_rdata); end end
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 2) == 0;
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 2) == 0;
      a_addr = 7'($urandom_range(0, 79)); b_addr = 7'($urandom_range(0, 79));
      a_wdata = 8'($urandom); b_wdata = 8'($urandom);
      if (a_en && !a_we) exp_a = int'(shadow[a_addr]);
      if (b_en && !b_we) exp_b = int'(shadow[b_addr]);
      @(posedge clk); #1;
      if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) shadow[a_addr] = a_wdata;
      if (b_en && b_we) shadow[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
