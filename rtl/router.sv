// router: the multiplexed crossbar between the datapath buses and the banks.
// Write direction: each bank's write data comes from the bus named for it in
// the slot (st_bus), or from the dynamic data bus (dyn_dbus) when the bank is
// the target of the dynamic access (dyn_hit).
// Read direction: a bank that reads in this cycle returns its word one cycle
// later, so the bank-to-bus selection is registered: in the next cycle bus j
// carries the read data of the bank routed to it, with bus_rvalid[j] set. If
// two reading banks name the same bus, the lower-numbered bank wins (a schedule
// should not do this).
// The crossbar and its piloting by the scheduler are the document's; splitting
// the bidirectional buses and the one-cycle read alignment are this design's.
module router
  import pmc_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NB_BANKS-1:0][BUS_IDX_W-1:0]  st_bus,
  input  logic [NB_BANKS-1:0]                 dyn_hit,
  input  logic [BUS_IDX_W-1:0]                dyn_dbus,
  input  logic [NB_BANKS-1:0]                 bank_en,
  input  logic [NB_BANKS-1:0]                 bank_we,
  input  logic [NB_BUSES-1:0][DATA_W-1:0]     bus_wdata,
  output logic [NB_BANKS-1:0][DATA_W-1:0]     bank_wdata,
  input  logic [NB_BANKS-1:0][DATA_W-1:0]     bank_rdata,
  output logic [NB_BUSES-1:0][DATA_W-1:0]     bus_rdata,
  output logic [NB_BUSES-1:0]                 bus_rvalid
);

  logic [NB_BANKS-1:0][BUS_IDX_W-1:0] bus_of;
  logic [NB_BUSES-1:0][BANK_IDX_W-1:0] rsel_d, rsel_q;
  logic [NB_BUSES-1:0]                 rval_d, rval_q;

  always_comb begin
    for (int b = 0; b < NB_BANKS; b++) begin
      bus_of[b]     = dyn_hit[b] ? dyn_dbus : st_bus[b];
      bank_wdata[b] = bus_wdata[bus_of[b]];
    end
    rsel_d = '0;
    rval_d = '0;
    for (int b = NB_BANKS - 1; b >= 0; b--) begin
      if (bank_en[b] && !bank_we[b]) begin
        rsel_d[bus_of[b]] = BANK_IDX_W'(b);
        rval_d[bus_of[b]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsel_q <= '0;
      rval_q <= '0;
    end else begin
      rsel_q <= rsel_d;
      rval_q <= rval_d;
    end
  end

  always_comb begin
    for (int j = 0; j < NB_BUSES; j++) begin
      bus_rdata[j]  = rval_q[j] ? bank_rdata[rsel_q[j]] : '0;
      bus_rvalid[j] = rval_q[j];
    end
  end

endmodule
