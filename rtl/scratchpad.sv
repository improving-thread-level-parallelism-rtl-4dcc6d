// scratchpad: the SM's 48KB scratchpad memory, 32 banks of 32-bit words.
//
// Word w (byte address 4*w) lives in bank w mod 32, row w / 32, so the 32
// consecutive words of one 128-byte line sit in 32 different banks and a
// whole line can be read or written in one clock without bank conflicts
// (Fig. 6). EXPARS stores one architectural register of one warp per line.
//
// Two requesters share the banks through a small arbitrator:
//  * the register-line port (ln_*) moves a full 1,024-bit line between the
//    scratchpad and the operand cache; its byte address must be 128-aligned;
//  * the word port (wd_*) serves ordinary 32-bit scratchpad accesses of CTAs.
// A line access occupies all 32 banks, so in a cycle where both are requested
// the line port wins and wd_ready is low. Read data appear one clock after the
// accepted request (ln_rvalid / wd_rvalid) and are held only for that clock.
// Each bank is a single-ported array. The line-port priority is this
// design's choice; the document does not say how the two share the banks.
module scratchpad
  import expars_pkg::*;
#(
  parameter int unsigned BYTES = SPM_BYTES,
  parameter int unsigned BANKS = SPM_BANKS
) (
  input  logic      clk,
  input  logic      rst_n,
  // register line port
  input  logic      ln_valid,
  input  logic      ln_we,
  input  spm_addr_t ln_addr,
  input  line_t     ln_wdata,
  output logic      ln_ready,
  output logic      ln_rvalid,
  output line_t     ln_rdata,
  // word port
  input  logic      wd_valid,
  input  logic      wd_we,
  input  spm_addr_t wd_addr,
  input  logic [31:0] wd_wdata,
  output logic      wd_ready,
  output logic      wd_rvalid,
  output logic [31:0] wd_rdata
);

  localparam int unsigned ROWS = BYTES / (BANKS * 4);
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned BW   = $clog2(BANKS);

  logic [RW-1:0] ln_row, wd_row;
  logic [BW-1:0] wd_bank, rd_bank_q;
  assign ln_row  = RW'(ln_addr >> $clog2(BANKS * 4));
  assign wd_row  = RW'(wd_addr >> $clog2(BANKS * 4));
  assign wd_bank = BW'(wd_addr >> 2);

  assign ln_ready = 1'b1;
  assign wd_ready = !ln_valid;

  // One single-ported array per bank: the line port uses every bank at one
  // row, the word port one bank.
  logic [31:0] bank_q [BANKS];
  for (genvar b = 0; b < int'(BANKS); b++) begin : g_bank
    logic [31:0] mem [ROWS];
    logic          en, we;
    logic [RW-1:0] row;
    logic [31:0]   wdat;
    assign en   = ln_valid || (wd_valid && wd_bank == BW'(b));
    assign we   = ln_valid ? ln_we : wd_we;
    assign row  = ln_valid ? ln_row : wd_row;
    assign wdat = ln_valid ? ln_wdata[b*32 +: 32] : wd_wdata;
    always_ff @(posedge clk)
      if (en) begin
        if (we) mem[row] <= wdat;
        bank_q[b] <= mem[row];
      end
    assign ln_rdata[b*32 +: 32] = bank_q[b];
  end

  always_ff @(posedge clk)
    if (!ln_valid && wd_valid) rd_bank_q <= wd_bank;
  assign wd_rdata = bank_q[rd_bank_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ln_rvalid <= 1'b0;
      wd_rvalid <= 1'b0;
    end else begin
      ln_rvalid <= ln_valid && !ln_we;
      wd_rvalid <= wd_valid && !ln_valid && !wd_we;
    end
  end

  // A register line must start on a line boundary.
  a_line_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    ln_valid |-> ln_addr[6:0] == 7'd0);

endmodule
