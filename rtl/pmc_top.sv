// pmc_top: the memory subsystem seen by a DSP datapath: the extended memory
// sequencer and the NB_BANKS memory banks it drives. The datapath connects only
// through the NB_BUSES data buses (plus pc to stay in step with the schedule);
// all bank addresses are produced inside, from static address streams or from
// dynamic addresses that are either sent over a bus or computed internally.
// Before start the schedule, the address streams and the translation table are
// written through the configuration ports. Timing as in memory_sequencer: one
// schedule slot per cycle, read data on the bus one cycle after the access.
// The overall organisation (banks behind a sequencer, data-only buses to the
// datapath) follows the document; bank count and sizes are this design's.
module pmc_top
  import pmc_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            sched_we,
  input  logic [SCHED_AW-1:0]             sched_waddr,
  input  sched_instr_t                    sched_wdata,
  input  logic                            ag_we,
  input  logic [SID_W-1:0]                ag_widx,
  input  ag_desc_t                        ag_wdata,
  input  logic                            tt_we,
  input  logic [TT_IDX_W-1:0]             tt_widx,
  input  tt_entry_t                       tt_wdata,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic [SCHED_AW-1:0]             pc,
  output logic                            conflict,
  input  logic [NB_BUSES-1:0][DATA_W-1:0] bus_wdata,
  output logic [NB_BUSES-1:0][DATA_W-1:0] bus_rdata,
  output logic [NB_BUSES-1:0]             bus_rvalid
);

  logic [NB_BANKS-1:0]              bank_en, bank_we;
  logic [NB_BANKS-1:0][BANK_AW-1:0] bank_addr;
  logic [NB_BANKS-1:0][DATA_W-1:0]  bank_wdata, bank_rdata;

  memory_sequencer u_seq (
    .clk, .rst_n,
    .sched_we, .sched_waddr, .sched_wdata,
    .ag_we, .ag_widx, .ag_wdata,
    .tt_we, .tt_widx, .tt_wdata,
    .start, .busy, .done, .pc, .conflict,
    .bus_wdata, .bus_rdata, .bus_rvalid,
    .bank_en, .bank_we, .bank_addr, .bank_wdata, .bank_rdata
  );

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    mem_bank #(.DEPTH(1 << BANK_AW), .WIDTH(DATA_W)) u_bank (
      .clk,
      .en(bank_en[b]), .we(bank_we[b]), .addr(bank_addr[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b])
    );
  end

endmodule
