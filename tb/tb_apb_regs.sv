// tb_apb_regs: self-checking test of the APB register file. Writes random values to every
// register, reads them back over APB, checks the decoded outputs seen by the controller
// (MB control fields, block information), the one-cycle start/end pulses, the sticky done
// bit with its write-1-to-clear, and PSLVERR for unmapped addresses.
module tb_apb_regs;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        psel, penable, pwrite, pready, pslverr, start, stop, busy, done_set, irq;
  logic [7:0]  paddr;
  logic [31:0] pwdata, prdata;
  mb_ctrl_t    mbc;
  blk_info_t   binfo [NUM_BINFO];
  logic [15:0] cycles;

  apb_regs dut (.pclk(clk), .presetn(rst_n), .*);

  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (start) n_start++;
    if (stop) n_stop++;
  end

  task automatic apb_write(logic [7:0] a, logic [31:0] d, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 err = pslverr;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: exp %h got %h", what, exp, got);
    end
  endtask

  initial begin
    logic [31:0] d, v [7:0];
    logic err;
    logic [31:0] bi [NUM_BINFO];
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0; busy = 0; done_set = 0;
    cycles = 16'd357;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // MB configuration and QP registers
    v[0] = 32'($urandom) & 32'h7f;
    v[1] = 32'($urandom) & 32'h003f3f3f;
    v[2] = 32'($urandom) & 32'h003f3f3f;
    v[3] = 32'($urandom) & 32'h003f3f3f;
    v[4] = 32'($urandom) & 32'h00001f1f;
    apb_write(8'h08, v[0] | 32'hffffff00, err);
    apb_write(8'h0C, v[1], err);
    apb_write(8'h10, v[2], err);
    apb_write(8'h14, v[3], err);
    apb_write(8'h18, v[4], err);
    for (int i = 0; i < 5; i++) begin
      apb_write(8'h1C + 8'(4 * i), 32'h1000_0000 + 32'(i) * 32'h111, err);
    end
    foreach (bi[i]) begin
      bi[i] = $urandom;
      apb_write(8'h40 + 8'(4 * i), bi[i], err);
      check("no error on mapped write", 32'(err), 0);
    end
    apb_read(8'h08, d); check("MBCFG", d, v[0]);
    apb_read(8'h0C, d); check("QPY", d, v[1]);
    apb_read(8'h10, d); check("QPCB", d, v[2]);
    apb_read(8'h14, d); check("QPCR", d, v[3]);
    apb_read(8'h18, d); check("OFFSET", d, v[4]);
    for (int i = 0; i < 5; i++) begin
      apb_read(8'h1C + 8'(4 * i), d); check("address", d, 32'h1000_0000 + 32'(i) * 32'h111);
    end
    apb_read(8'h30, d); check("CYCLES", d, 32'd357);
    foreach (bi[i]) begin
      apb_read(8'h40 + 8'(4 * i), d); check("BINFO read", d, bi[i]);
      check("BINFO out", 32'(binfo[i]), bi[i]);
    end
    // decoded fields
    check("filter_left", 32'(mbc.filter_left), 32'(v[0][0]));
    check("keep_right", 32'(mbc.keep_right), 32'(v[0][3]));
    check("intra_top", 32'(mbc.intra_top), 32'(v[0][6]));
    check("qpy_left", 32'(mbc.qpy_left), 32'(v[1][13:8]));
    check("qpcr_top", 32'(mbc.qpcr_top), 32'(v[3][21:16]));
    check("offset_b", {27'd0, mbc.offset_b}, 32'(v[4][12:8]));
    check("c_stride", mbc.c_stride, 32'h1000_0444);
    // commands
    apb_write(8'h00, 32'h1, err);
    apb_write(8'h00, 32'h2, err);
    repeat (2) @(posedge clk);
    check("start pulses", 32'(n_start), 1);
    check("stop pulses", 32'(n_stop), 1);
    busy = 1;
    apb_read(8'h04, d); check("STATUS busy", d, 32'h1);
    @(negedge clk); busy = 0; done_set = 1;
    @(negedge clk); done_set = 0;
    apb_read(8'h04, d); check("STATUS done", d, 32'h2);
    check("irq", 32'(irq), 1);
    apb_write(8'h04, 32'h2, err);
    apb_read(8'h04, d); check("STATUS cleared", d, 32'h0);
    // unmapped address
    apb_write(8'h38, 32'h5, err); check("PSLVERR", 32'(err), 1);
    check("PREADY", 32'(pready), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
