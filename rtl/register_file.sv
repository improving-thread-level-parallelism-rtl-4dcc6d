// register_file: the SM's 128KB main register file, modelled at the
// granularity EXPARS works with: one 1,024-bit line holds one architectural
// register of one warp (32 threads x 32 bits), 32,768 registers = 1,024 lines.
//
// It has NBANK read ports, one per bank; the bank arbitrator guarantees that
// no two reads in a cycle target the same bank (bank = Reg#[1:0]), so each
// port reads any line here. Read data appear one clock after rd_en. One
// write port stores results. The register file is baseline GPU hardware that
// the document only names; the flat line array is this design's model of it.
module register_file
  import expars_pkg::*;
#(
  parameter int unsigned REGS  = RF_REGS,
  parameter int unsigned NBANK = OC_BANKS
) (
  input  logic       clk,
  input  logic       rd_en   [NBANK],
  input  logic [$clog2(REGS/WARP_SIZE)-1:0] rd_line [NBANK],
  output line_t      rd_data [NBANK],
  input  logic       wr_en,
  input  logic [$clog2(REGS/WARP_SIZE)-1:0] wr_line,
  input  line_t      wr_data
);

  localparam int unsigned LINES = REGS / WARP_SIZE;

  line_t mem [LINES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_line] <= wr_data;
    for (int b = 0; b < int'(NBANK); b++)
      if (rd_en[b]) rd_data[b] <= mem[rd_line[b]];
  end

endmodule
