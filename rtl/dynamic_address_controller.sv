// dynamic_address_controller: builds the address/command of every bank for the
// current cycle. A bank normally takes the static access the schedule gives it
// (address from the address generator). When the slot holds a dynamic access,
// the bank chosen by the translation table instead takes the translated
// physical address and the dynamic read/write command; dyn_hit marks that bank
// (one-hot) so the router can steer its data. If that bank also had a static
// access in the slot, the dynamic access wins, the static one is dropped and
// conflict is raised for the cycle.
// Purely combinational. Routing the dynamic command and address to the bank
// the table selects is the document's; the conflict rule is this design's choice
// (the document leaves conflict avoidance to the mapping and scheduling step).
module dynamic_address_controller
  import pmc_pkg::*;
(
  input  logic                             dyn_en,
  input  logic                             dyn_we,
  input  logic [BANK_IDX_W-1:0]            dyn_bank,
  input  logic [BANK_AW-1:0]               dyn_addr,
  input  logic [NB_BANKS-1:0]              st_en,
  input  logic [NB_BANKS-1:0]              st_we,
  input  logic [NB_BANKS-1:0][BANK_AW-1:0] st_addr,
  output logic [NB_BANKS-1:0]              bank_en,
  output logic [NB_BANKS-1:0]              bank_we,
  output logic [NB_BANKS-1:0][BANK_AW-1:0] bank_addr,
  output logic [NB_BANKS-1:0]              dyn_hit,
  output logic                             conflict
);

  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < NB_BANKS; b++) begin
      dyn_hit[b] = dyn_en && (dyn_bank == BANK_IDX_W'(b));
      if (dyn_hit[b]) begin
        bank_en[b]   = 1'b1;
        bank_we[b]   = dyn_we;
        bank_addr[b] = dyn_addr;
        if (st_en[b]) conflict = 1'b1;
      end else begin
        bank_en[b]   = st_en[b];
        bank_we[b]   = st_en[b] && st_we[b];
        bank_addr[b] = st_addr[b];
      end
    end
    // a dynamic access reaches exactly one bank
    assert ((dyn_hit & (dyn_hit - 1'b1)) == '0 && (dyn_en == (dyn_hit != '0)))
      else $error("dynamic access must select exactly one bank");
  end

endmodule
