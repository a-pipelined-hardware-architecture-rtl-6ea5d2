// ahb_master: AHB-Lite master moving bursts of 32-bit words between SDRAM and the on-chip
// buffer.
//
// A 32-bit word carries four vertically adjacent samples (one column of a 4x4 block), so one
// strip of blocks is one incrementing burst. The controller hands over a command (address,
// word count, direction) with cmd_valid/cmd_ready. The master then issues the address
// phases (NONSEQ, then SEQ, HBURST = INCR, HSIZE = word) pipelined with the data phases and
// honours HREADY wait states.
//   read  : each completed data beat is presented on rd_valid/rd_data/rd_idx for one cycle
//   write : HWDATA = wr_data during every data phase; wr_next pulses in the cycle a write
//           beat completes, and wr_data must show the next word from the following cycle on
//           (one cycle is enough for a synchronous SRAM read issued on wr_next)
// done pulses for one cycle after the last beat. HRESP errors are not handled. The bus
// protocol details are this design's choice; the architecture names only the AHB bus.
module ahb_master (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  logic [31:0] cmd_addr,
  input  logic [5:0]  cmd_len,       // words, 1..63
  // data
  output logic        rd_valid,
  output logic [31:0] rd_data,
  output logic [5:0]  rd_idx,
  input  logic [31:0] wr_data,
  output logic        wr_next,
  output logic        done,
  // AHB-Lite
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready
);

  localparam logic [1:0] IDLE = 2'b00, NONSEQ = 2'b10, SEQ = 2'b11;

  logic        busy;
  logic        wr_q;
  logic [31:0] base;
  logic [5:0]  len, acnt, dcnt;
  logic        dphase;       // a data phase is in progress

  assign cmd_ready = !busy;
  assign hsize  = 3'b010;
  assign hburst = 3'b001;
  assign hwrite = wr_q;
  assign haddr  = base + {24'd0, acnt, 2'b00};
  assign htrans = (busy && acnt < len) ? ((acnt == 6'd0) ? NONSEQ : SEQ) : IDLE;
  assign hwdata = wr_data;

  logic beat;
  assign beat     = dphase && hready;
  assign rd_valid = beat && !wr_q;
  assign rd_data  = hrdata;
  assign rd_idx   = dcnt;
  assign wr_next  = beat && wr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; wr_q <= 1'b0; base <= '0; len <= '0;
      acnt <= '0; dcnt <= '0; dphase <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (cmd_valid) begin
          busy <= 1'b1;
          wr_q <= cmd_write;
          base <= cmd_addr;
          len  <= cmd_len;
          acnt <= '0;
          dcnt <= '0;
        end
      end else begin
        if (hready) begin
          dphase <= (htrans != IDLE);
          if (htrans != IDLE) acnt <= acnt + 6'd1;
        end
        if (beat) begin
          dcnt <= dcnt + 6'd1;
          if (dcnt + 6'd1 == len) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (cmd_len != 6'd0));

endmodule
