// address_translation_table: turns a logical address (or index) used by a
// dynamic access into the couple (memory bank, physical address).
// The logical space is cut into pages of 2**PAGE_W words; entry la[LA_W-1:PAGE_W]
// holds the bank and the physical page that page is bound to, and the offset
// inside the page passes through unchanged. Binding different pages of one
// vector to different banks lets a vector be split over several memories.
// The lookup is combinational (same cycle); entries are written one per cycle
// through the wr_* port and reset to bank 0, page 0.
// The translation function is the document's; the page-table organisation is
// this design's choice.
module address_translation_table
  import pmc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [TT_IDX_W-1:0]   wr_idx,
  input  tt_entry_t             wr_entry,
  input  logic [LA_W-1:0]       la,
  output logic [BANK_IDX_W-1:0] bank,
  output logic [BANK_AW-1:0]    pa
);

  tt_entry_t table_q [TT_ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TT_ENTRIES; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_entry;
    end
  end

  tt_entry_t hit;
  always_comb begin
    hit  = table_q[la[LA_W-1:PAGE_W]];
    bank = hit.bank;
    pa   = {hit.ppage, la[PAGE_W-1:0]};
  end

endmodule
