// tb_dynamic_address_controller: random static and dynamic commands; checks
// that the translated bank gets the dynamic address and command, every other
// bank keeps its static access, and conflict flags exactly the overlaps.
module tb_dynamic_address_controller;
  import pmc_pkg::*;
  logic dyn_en, dyn_we;
  logic [BANK_IDX_W-1:0] dyn_bank;
  logic [BANK_AW-1:0] dyn_addr;
  logic [NB_BANKS-1:0] st_en, st_we;
  logic [NB_BANKS-1:0][BANK_AW-1:0] st_addr;
  logic [NB_BANKS-1:0] bank_en, bank_we, dyn_hit;
  logic [NB_BANKS-1:0][BANK_AW-1:0] bank_addr;
  logic conflict;
  int checks = 0, failures = 0, n_conf = 0, n_dyn = 0;

  dynamic_address_controller dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      logic exp_conf;
      dyn_en = 1'($urandom); dyn_we = 1'($urandom);
      dyn_bank = BANK_IDX_W'($urandom); dyn_addr = BANK_AW'($urandom);
      st_en = NB_BANKS'($urandom); st_we = NB_BANKS'($urandom);
      for (int b = 0; b < NB_BANKS; b++) st_addr[b] = BANK_AW'($urandom);
      #1;
      exp_conf = 1'b0;
      for (int b = 0; b < NB_BANKS; b++) begin
        logic hit;
        hit = dyn_en && (dyn_bank == BANK_IDX_W'(b));
        checks++;
        if (hit) begin
          n_dyn++;
          if (st_en[b]) exp_conf = 1'b1;
          if (!bank_en[b] || bank_we[b] !== dyn_we || bank_addr[b] !== dyn_addr || !dyn_hit[b]) begin
            failures++; $display("FAIL dynamic bank %0d", b);
          end
        end else begin
          if (bank_en[b] !== st_en[b] || bank_we[b] !== (st_en[b] & st_we[b]) || dyn_hit[b] ||
              (st_en[b] && bank_addr[b] !== st_addr[b])) begin
            failures++; $display("FAIL static bank %0d", b);
          end
        end
      end
      checks++;
      if (conflict !== exp_conf) begin failures++; $display("FAIL conflict flag"); end
      if (exp_conf) n_conf++;
    end
    checks++;
    if (n_conf == 0 || n_dyn == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
