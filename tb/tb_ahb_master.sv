// tb_ahb_master: self-checking test of the AHB-Lite burst master against the SDRAM model
// with row-activation and random wait states. Random write bursts (data supplied through the
// wr_next handshake with a one-cycle-late source, like the SRAM), then read bursts of the
// same areas; the read beats must return the written words in order, with the right index.
// Also checks the AHB transfer types (NONSEQ first, SEQ after) and that every burst ends
// with done.
module tb_ahb_master;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready, cmd_write, rd_valid, wr_next, done, hwrite, hready;
  logic [31:0] cmd_addr, rd_data, wr_data, haddr, hwdata, hrdata;
  logic [5:0]  cmd_len, rd_idx;
  logic [1:0]  htrans;
  logic [2:0]  hsize, hburst;

  ahb_master dut (.*);
  ahb_sdram_model #(.WORDS(4096)) u_mem (.clk, .rst_n, .haddr, .htrans, .hwrite, .hwdata,
                                         .hrdata, .hready);

  int checks = 0, failures = 0;
  logic [31:0] src [64];
  int wptr = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write data source: word wptr, updated the cycle after wr_next (SRAM-like)
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) wptr <= 0;
    else if (wr_next) wptr <= wptr + 1;
  end
  assign wr_data = src[wptr % 64];

  // transfer type check: first address phase of a burst NONSEQ, the rest SEQ
  int aphase = 0;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) aphase <= 0;
    else if (rst_n && htrans != 2'b00 && hready) begin
      checks++;
      if (htrans != ((aphase == 0) ? 2'b10 : 2'b11) || hsize != 3'b010) begin failures++; $display("htrans %0d at beat %0d", htrans, aphase); end
      aphase <= aphase + 1;
    end
  end

  task automatic burst(bit wr, logic [31:0] addr, int len, ref logic [31:0] got [64]);
    int n = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = addr; cmd_len = 6'(len);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    forever begin
      @(posedge clk);
      if (rd_valid) begin
        checks++;
        if (int'(rd_idx) != n) begin failures++; $display("rd_idx %0d exp %0d", rd_idx, n); end
        got[n] = rd_data;
        n++;
      end
      if (done) break;
    end
    if (!wr) begin
      checks++;
      if (n != len) begin failures++; $display("read burst returned %0d of %0d beats", n, len); end
    end
  endtask

  initial begin
    logic [31:0] got [64];
    int lens [8];
    logic [31:0] addrs [8];
    logic [31:0] data [8][64];
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 8; b++) begin
      lens[b]  = $urandom_range(1, 63);
      addrs[b] = 32'(b * 1024 + 4 * $urandom_range(0, 64));
      for (int i = 0; i < 64; i++) begin src[i] = $urandom; data[b][i] = src[i]; end
      burst(1, addrs[b], lens[b], got);
    end
    for (int b = 0; b < 8; b++) begin
      burst(0, addrs[b], lens[b], got);
      for (int i = 0; i < lens[b]; i++) begin
        checks++;
        if (got[i] != data[b][i]) begin
          failures++;
          if (failures < 10) $display("burst %0d word %0d: exp %h got %h", b, i, data[b][i], got[i]);
        end
      end
    end
    checks++;
    if (u_mem.waits == 0) begin failures++; $display("no wait states seen"); end
    $display("beats=%0d waits=%0d row changes=%0d", u_mem.beats, u_mem.waits, u_mem.row_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
