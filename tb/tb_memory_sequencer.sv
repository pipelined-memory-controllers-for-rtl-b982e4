// tb_memory_sequencer: the sequencer alone, with a behavioural memory on its
// bank ports whose read word is a fixed function of (bank, address). A random
// translation table is loaded, then a schedule of four slots runs several times:
//   A (100 cycles) dynamic reads with random logical addresses sent on bus 1,
//     data returned on bus 0, plus a static read of bank 2 (stream 0) to bus 3;
//   B, C          the address datapath takes a base from bus 1 and adds 3;
//   D            dynamic write at that computed address, data from bus 2.
// Every cycle the bank ports are compared with the translation expected from
// the table contents, the conflict flag with the expected bank collision, and
// read data on the buses with the memory function one cycle later.
module tb_memory_sequencer;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sched_we = 0, ag_we = 0, tt_we = 0, start = 0;
  logic [SCHED_AW-1:0] sched_waddr = '0, pc;
  sched_instr_t sched_wdata = '0;
  logic [SID_W-1:0] ag_widx = '0;
  ag_desc_t ag_wdata = '0;
  logic [TT_IDX_W-1:0] tt_widx = '0;
  tt_entry_t tt_wdata = '0;
  logic busy, done, conflict;
  logic [NB_BUSES-1:0][DATA_W-1:0] bus_wdata = '0, bus_rdata;
  logic [NB_BUSES-1:0] bus_rvalid;
  logic [NB_BANKS-1:0] bank_en, bank_we;
  logic [NB_BANKS-1:0][BANK_AW-1:0] bank_addr;
  logic [NB_BANKS-1:0][DATA_W-1:0] bank_wdata, bank_rdata;

  tt_entry_t tt [TT_ENTRIES];
  int checks = 0, failures = 0, n_conf = 0, n_wr = 0;
  int st_x;  // static stream position
  logic [LA_W-1:0] base_la;
  logic exp_rv0, exp_rv3;
  logic [DATA_W-1:0] exp_rd0, exp_rd3;

  memory_sequencer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [DATA_W-1:0] memf(int b, logic [BANK_AW-1:0] a);
    return DATA_W'((b << 13) ^ (a * 7) ^ 16'h1234);
  endfunction

  always_ff @(posedge clk)
    for (int b = 0; b < NB_BANKS; b++)
      if (bank_en[b] && !bank_we[b]) bank_rdata[b] <= memf(b, bank_addr[b]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr_slot(input int i, input sched_instr_t w);
    @(negedge clk); sched_we = 1; sched_waddr = SCHED_AW'(i); sched_wdata = w;
    @(negedge clk); sched_we = 0;
  endtask

  initial begin
    sched_instr_t w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < TT_ENTRIES; i++) begin
      tt[i] = tt_entry_t'($bits(tt_entry_t)'($urandom));
      @(negedge clk); tt_we = 1; tt_widx = TT_IDX_W'(i); tt_wdata = tt[i];
    end
    @(negedge clk); tt_we = 0;
    @(negedge clk); ag_we = 1; ag_widx = 0;
    ag_wdata = '{base: BANK_AW'(40), pitch: BANK_AW'(0), width: BANK_AW'(999), height: BANK_AW'(0)};
    @(negedge clk); ag_we = 0;
    // A
    w = '0; w.dyn_en = 1; w.dyn_abus = 1; w.dyn_dbus = 0;
    w.st_en[2] = 1; w.st_bus[2] = 3; w.st_sid[2] = 0; w.rep = 99;
    wr_slot(0, w);
    // B: a1 <- ext, a0 <- 3, a2 <- 0
    w = '0; w.dyn_abus = 1; w.adp.a1_ld = 1; w.adp.a1_sel = SRC_EXT;
    w.adp.a0_ld = 1; w.adp.a0_sel = SRC_IMM; w.adp.imm = 3; w.adp.a2_clr = 1;
    wr_slot(1, w);
    // C: aq <- a0 + a1 + a2
    w = '0; w.adp.aq_ld = 1;
    wr_slot(2, w);
    // D: dynamic write at aq
    w = '0; w.dyn_en = 1; w.dyn_we = 1; w.dyn_src = 1; w.dyn_dbus = 2; w.last = 1;
    wr_slot(3, w);

    st_x = 0;
    for (int r = 0; r < 8; r++) begin
      exp_rv0 = 0; exp_rv3 = 0;
      @(negedge clk); start = 1;
      forever begin
        logic [LA_W-1:0] la;
        tt_entry_t e;
        @(negedge clk); start = 0;
        // read data of the previous cycle
        check(bus_rvalid[0] == exp_rv0 && (!exp_rv0 || bus_rdata[0] == exp_rd0), "bus 0 read data");
        check(bus_rvalid[3] == exp_rv3 && (!exp_rv3 || bus_rdata[3] == exp_rd3), "bus 3 read data");
        exp_rv0 = 0; exp_rv3 = 0;
        if (done) break;
        for (int j = 0; j < NB_BUSES; j++) bus_wdata[j] = DATA_W'($urandom);
        #1;
        case (int'(pc))
          0: begin
            la = bus_wdata[1][LA_W-1:0];
            e = tt[la[LA_W-1:PAGE_W]];
            check(bank_en[e.bank] && !bank_we[e.bank] &&
                  bank_addr[e.bank] == {e.ppage, la[PAGE_W-1:0]}, "dynamic read routed");
            check(conflict == (e.bank == 2), "conflict flag");
            if (e.bank == 2) n_conf++;
            exp_rv0 = 1; exp_rd0 = memf(e.bank, {e.ppage, la[PAGE_W-1:0]});
            if (e.bank != 2) begin
              check(bank_en[2] && !bank_we[2] && bank_addr[2] == BANK_AW'(40 + st_x), "static read");
              exp_rv3 = 1; exp_rd3 = memf(2, BANK_AW'(40 + st_x));
            end
            st_x++;
            for (int b = 0; b < NB_BANKS; b++)
              if (b != e.bank && b != 2) check(!bank_en[b], "idle bank");
          end
          1: begin
            base_la = bus_wdata[1][LA_W-1:0];
            check(bank_en == '0, "no access while computing");
          end
          3: begin
            la = base_la + LA_W'(3);
            e = tt[la[LA_W-1:PAGE_W]];
            check(bank_en[e.bank] && bank_we[e.bank] &&
                  bank_addr[e.bank] == {e.ppage, la[PAGE_W-1:0]} &&
                  bank_wdata[e.bank] == bus_wdata[2], "dynamic write at computed address");
            n_wr++;
          end
          default: check(bank_en == '0, "no access");
        endcase
      end
    end
    check(n_conf > 0 && n_wr == 8, "coverage of conflicts and writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
