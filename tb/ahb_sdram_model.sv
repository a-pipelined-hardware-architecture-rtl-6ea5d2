// ahb_sdram_model: behavioural model of the external SDRAM behind an AHB-Lite slave port,
// for testbenches only. 32-bit words, WORDS deep (word address = HADDR[.. :2]). An access to
// a different SDRAM row than the previous one (row = HADDR / ROW_BYTES) first spends
// ROW_WAIT wait states (row activation); EXTRA_WAIT_PCT adds random wait states on top.
// Counts wait states and row changes for the testbench.
module ahb_sdram_model #(
  parameter int WORDS          = 8192,
  parameter int ROW_BYTES      = 512,
  parameter int ROW_WAIT       = 4,
  parameter int EXTRA_WAIT_PCT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready
);
  logic [31:0] mem [WORDS];
  int          waits = 0, row_changes = 0, beats = 0;

  logic        dp;          // data phase pending
  logic        dp_write;
  logic [31:0] dp_addr;
  int          wait_left;
  int          cur_row;

  initial begin
    dp = 0; dp_write = 0; dp_addr = '0; wait_left = 0; cur_row = -1;
  end

  assign hready = !(dp && wait_left > 0);
  assign hrdata = (dp && !dp_write && wait_left == 0) ? mem[(dp_addr >> 2) % WORDS] : 32'h0;

  always @(posedge clk) begin
    if (!rst_n) begin
      dp <= 0; wait_left <= 0;
    end else begin
      if (dp && wait_left > 0) begin
        wait_left <= wait_left - 1;
        waits++;
      end else begin
        if (dp) begin
          beats++;
          if (dp_write) mem[(dp_addr >> 2) % WORDS] <= hwdata;
        end
        if (htrans[1]) begin
          automatic int row = int'(haddr / ROW_BYTES);
          automatic int w = 0;
          dp <= 1; dp_write <= hwrite; dp_addr <= haddr;
          if (row != cur_row) begin
            w = ROW_WAIT;
            row_changes++;
          end
          if ($urandom_range(0, 99) < EXTRA_WAIT_PCT) w += $urandom_range(1, 2);
          wait_left <= w;
          cur_row <= row;
        end else begin
          dp <= 0;
        end
      end
    end
  end
endmodule
