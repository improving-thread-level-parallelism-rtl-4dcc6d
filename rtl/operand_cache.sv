// operand_cache: the 2KB operand cache (OC) that holds the scratchpad-resident
// registers of the bundles about to run.
//
// Organisation (Fig. 8): NBANK = 4 banks, each with NSET = 4 sets; one line
// holds one architectural register of a warp (1,024 bits = 32 threads x 32
// bits). A register Reg# of warp Warp_ID can only live in bank Reg#[1:0], set
// Reg#[3:2]; the 10-bit tag is {Warp_ID (6), Reg#[5:4] ("pre", 2), valid,
// dirty}. In addition each line has a pin bit, set while the line belongs to
// a bundle that has been prefetched but not yet completed; only unpinned lines
// may be evicted. The pin bit is this design's way of telling "registers of
// previously completed bundles" apart from live ones.
//
// Ports
//  * rd_*   : one read per bank per clock, addressed by set only (no tag
//             lookup), data one clock later.
//  * fill_* : the register prefetcher writes a line fetched from scratchpad
//             (valid, clean, pinned). pin_* pins a line that already hits.
//  * wr_*   : result write-back of a scratchpad-resident register; the tag is
//             looked up (wr_hit, combinational), the line is written and
//             marked dirty.
//  * unpin_*: a warp finished its bundle; all of its lines become evictable.
//  * tag_o / line_o: the whole tag array and the line contents, used by the
//             prefetcher to check space and to write back dirty victims.
module operand_cache
  import expars_pkg::*;
#(
  parameter int unsigned NBANK = OC_BANKS,
  parameter int unsigned NSET  = OC_SETS
) (
  input  logic      clk,
  input  logic      rst_n,
  // operand reads from the bank arbitrator
  input  logic      rd_en   [NBANK],
  input  logic [1:0] rd_set [NBANK],
  output line_t     rd_data [NBANK],
  // prefetch fill / pin
  input  logic      fill_en,
  input  logic [1:0] fill_bank,
  input  logic [1:0] fill_set,
  input  warp_id_t  fill_warp,
  input  logic [1:0] fill_pre,
  input  line_t     fill_data,
  input  logic      pin_en,
  input  logic [1:0] pin_bank,
  input  logic [1:0] pin_set,
  // write-back of results
  input  logic      wr_en,
  input  warp_id_t  wr_warp,
  input  reg_idx_t  wr_reg,
  input  line_t     wr_data,
  output logic      wr_hit,
  // bundle completion
  input  logic      unpin_en,
  input  warp_id_t  unpin_warp,
  // tag array view
  output warp_id_t  tag_warp  [NBANK][NSET],
  output logic [1:0] tag_pre  [NBANK][NSET],
  output logic      tag_valid [NBANK][NSET],
  output logic      tag_dirty [NBANK][NSET],
  output logic      tag_pin   [NBANK][NSET],
  output line_t     line_o    [NBANK][NSET]
);

  line_t data [NBANK][NSET];

  logic [1:0] wb, ws;
  assign wb = wr_reg[1:0];
  assign ws = wr_reg[3:2];
  assign wr_hit = tag_valid[wb][ws] && tag_warp[wb][ws] == wr_warp
               && tag_pre[wb][ws] == wr_reg[5:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NBANK); b++)
        for (int s = 0; s < int'(NSET); s++) begin
          tag_warp[b][s]  <= '0;
          tag_pre[b][s]   <= '0;
          tag_valid[b][s] <= 1'b0;
          tag_dirty[b][s] <= 1'b0;
          tag_pin[b][s]   <= 1'b0;
        end
    end else begin
      if (unpin_en)
        for (int b = 0; b < int'(NBANK); b++)
          for (int s = 0; s < int'(NSET); s++)
            if (tag_warp[b][s] == unpin_warp) tag_pin[b][s] <= 1'b0;
      if (pin_en) tag_pin[pin_bank][pin_set] <= 1'b1;
      if (fill_en) begin
        tag_warp[fill_bank][fill_set]  <= fill_warp;
        tag_pre[fill_bank][fill_set]   <= fill_pre;
        tag_valid[fill_bank][fill_set] <= 1'b1;
        tag_dirty[fill_bank][fill_set] <= 1'b0;
        tag_pin[fill_bank][fill_set]   <= 1'b1;
      end
      if (wr_en && wr_hit) tag_dirty[wb][ws] <= 1'b1;
    end
  end

  // Line storage (no reset: a line is only read after it has been filled).
  always_ff @(posedge clk) begin
    if (fill_en) data[fill_bank][fill_set] <= fill_data;
    if (wr_en && wr_hit) data[wb][ws] <= wr_data;
    for (int b = 0; b < int'(NBANK); b++)
      if (rd_en[b]) rd_data[b] <= data[b][rd_set[b]];
  end

  always_comb
    for (int b = 0; b < int'(NBANK); b++)
      for (int s = 0; s < int'(NSET); s++)
        line_o[b][s] = data[b][s];

endmodule
