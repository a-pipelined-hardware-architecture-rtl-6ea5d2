// tb_sram_module: self-checking test of one SRAM module (four 8x80 SRAMs). Writes and reads
// four bytes per cycle at four different addresses, one per lane, and compares with a
// shadow copy of each lane.
module tb_sram_module;
  import dbf_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] a_en, a_we, b_en, b_we;
  sram_addr_t [3:0] a_addr, b_addr;
  quad_t a_wdata, a_rdata, b_wdata, b_rdata;

  sram_module dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] shadow [4][80];
  sram_addr_t [3:0] last_ra;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; a_addr = '0; a_wdata = '0;
    b_en = 0; b_we = 0; b_addr = '0; b_wdata = '0;
    // port B writes a skewed pattern: lane l, address x gets 8'(x*4 + l) ^ random
    for (int x = 0; x < 80; x++) begin
      @(negedge clk);
      b_en = 4'hf; b_we = 4'hf;
      for (int l = 0; l < 4; l++) begin
        b_addr[l] = sram_addr_t'((x + 7 * l) % 80);
        b_wdata[l] = 8'($urandom);
        shadow[l][(x + 7 * l) % 80] = b_wdata[l];
      end
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // port A reads four independent addresses per cycle
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a_en = 4'hf;
      for (int l = 0; l < 4; l++) a_addr[l] = sram_addr_t'($urandom_range(0, 79));
      last_ra = a_addr;
      @(negedge clk);
      a_en = 4'h0;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (a_rdata[l] !== shadow[l][last_ra[l]]) begin
          failures++;
          $display("lane %0d addr %0d exp %0h got %0h", l, last_ra[l], shadow[l][last_ra[l]], a_rdata[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
