// tb_address_translation_table: fills every entry with a random (bank, page)
// binding, then checks random logical addresses against the expected
// bank = entry.bank, address = {entry.ppage, offset}, including a rebinding.
module tb_address_translation_table;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [TT_IDX_W-1:0] wr_idx = '0;
  tt_entry_t wr_entry = '0;
  logic [LA_W-1:0] la = '0;
  logic [BANK_IDX_W-1:0] bank;
  logic [BANK_AW-1:0] pa;
  tt_entry_t model [TT_ENTRIES];
  int checks = 0, failures = 0;

  address_translation_table dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      la = LA_W'($urandom);
      #1;
      checks++;
      if (bank !== model[la[LA_W-1:PAGE_W]].bank ||
          pa !== {model[la[LA_W-1:PAGE_W]].ppage, la[PAGE_W-1:0]}) begin
        failures++;
        $display("FAIL la=%h got bank %0d pa %h", la, bank, pa);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < TT_ENTRIES; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    probe(20);                       // after reset: all pages at bank 0, page 0
    for (int i = 0; i < TT_ENTRIES; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = TT_IDX_W'(i); wr_entry = tt_entry_t'($bits(tt_entry_t)'($urandom));
      model[i] = wr_entry;
    end
    @(negedge clk); wr_en = 0;
    probe(300);
    @(negedge clk); wr_en = 1; wr_idx = 3; wr_entry = '{bank: BANK_IDX_W'(3), ppage: PPAGE_W'(9)};
    model[3] = wr_entry;
    @(negedge clk); wr_en = 0;
    la = {TT_IDX_W'(3), PAGE_W'(17)}; #1;
    checks++;
    if (bank !== BANK_IDX_W'(3) || pa !== {PPAGE_W'(9), PAGE_W'(17)}) begin
      failures++; $display("FAIL rebinding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
