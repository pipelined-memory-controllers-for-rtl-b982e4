// tb_router: random routes, dynamic overrides and bank commands. Checks each
// bank's write data comes from its routed bus (the dynamic data bus for the
// dynamically targeted bank) and that, one cycle after a read, each bus carries
// the read data of the bank routed to it with bus_rvalid set.
module tb_router;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NB_BANKS-1:0][BUS_IDX_W-1:0] st_bus = '0;
  logic [NB_BANKS-1:0] dyn_hit = '0, bank_en = '0, bank_we = '0;
  logic [BUS_IDX_W-1:0] dyn_dbus = '0;
  logic [NB_BUSES-1:0][DATA_W-1:0] bus_wdata = '0, bus_rdata;
  logic [NB_BANKS-1:0][DATA_W-1:0] bank_wdata, bank_rdata = '0;
  logic [NB_BUSES-1:0] bus_rvalid;
  int checks = 0, failures = 0;
  int exp_bank [NB_BUSES];
  logic [NB_BUSES-1:0] exp_val;

  router dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int hb;
      for (int b = 0; b < NB_BANKS; b++) begin
        st_bus[b] = BUS_IDX_W'($urandom);
        bank_rdata[b] = DATA_W'($urandom);
      end
      for (int j = 0; j < NB_BUSES; j++) bus_wdata[j] = DATA_W'($urandom);
      hb = $urandom_range(0, NB_BANKS);        // NB_BANKS: no dynamic access
      dyn_hit = (hb < NB_BANKS) ? NB_BANKS'(1 << hb) : '0;
      dyn_dbus = BUS_IDX_W'($urandom);
      bank_en = NB_BANKS'($urandom); bank_we = NB_BANKS'($urandom);
      #1;
      // read data of the previous cycle's reads
      for (int j = 0; j < NB_BUSES; j++) begin
        checks++;
        if (bus_rvalid[j] !== exp_val[j] ||
            (exp_val[j] && bus_rdata[j] !== bank_rdata[exp_bank[j]])) begin
          failures++; $display("FAIL k=%0d read bus %0d", k, j);
        end
      end
      exp_val = '0;
      for (int b = NB_BANKS - 1; b >= 0; b--) begin
        int bus;
        bus = dyn_hit[b] ? int'(dyn_dbus) : int'(st_bus[b]);
        checks++;
        if (bank_wdata[b] !== bus_wdata[bus]) begin
          failures++; $display("FAIL k=%0d write bank %0d", k, b);
        end
        if (bank_en[b] && !bank_we[b]) begin exp_val[bus] = 1'b1; exp_bank[bus] = b; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
