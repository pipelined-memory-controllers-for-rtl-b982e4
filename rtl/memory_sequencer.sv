// memory_sequencer: the memory sequencer placed between the datapath buses and
// the memory banks, in its extended form.
// The memory access scheduler issues one slot word per cycle. Static accesses
// take their bank address from the address generator. A dynamic access takes a
// logical address either straight from a datapath bus (dyn_src=0, first form:
// the datapath computes every address) or from the internal dynamic address
// datapath (dyn_src=1, extended form: the datapath sends only the values the
// address computation needs, e.g. a block base address). The address
// translation table turns it into (bank, physical address); the dynamic address
// controller routes the command and address to that bank, and the router
// connects each bank to its data bus.
// Timing: addresses and commands leave combinationally in the slot's cycle;
// read data returns on the routed bus one cycle later (bus_rvalid). The unit
// split and connections follow the document's block diagram; slot encoding,
// sizes and the one-cycle memory latency are this design's choices.
// Lint reports unused bits of the slot word (the sequencing fields, consumed
// inside the scheduler) and of the address bus above the logical address width;
// both are expected.
module memory_sequencer
  import pmc_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  // configuration
  input  logic                                sched_we,
  input  logic [SCHED_AW-1:0]                 sched_waddr,
  input  sched_instr_t                        sched_wdata,
  input  logic                                ag_we,
  input  logic [SID_W-1:0]                    ag_widx,
  input  ag_desc_t                            ag_wdata,
  input  logic                                tt_we,
  input  logic [TT_IDX_W-1:0]                 tt_widx,
  input  tt_entry_t                           tt_wdata,
  // control
  input  logic                                start,
  output logic                                busy,
  output logic                                done,
  output logic [SCHED_AW-1:0]                 pc,
  output logic                                conflict,
  // datapath side
  input  logic [NB_BUSES-1:0][DATA_W-1:0]     bus_wdata,
  output logic [NB_BUSES-1:0][DATA_W-1:0]     bus_rdata,
  output logic [NB_BUSES-1:0]                 bus_rvalid,
  // memory side
  output logic [NB_BANKS-1:0]                 bank_en,
  output logic [NB_BANKS-1:0]                 bank_we,
  output logic [NB_BANKS-1:0][BANK_AW-1:0]    bank_addr,
  output logic [NB_BANKS-1:0][DATA_W-1:0]     bank_wdata,
  input  logic [NB_BANKS-1:0][DATA_W-1:0]     bank_rdata
);

  sched_instr_t                   ins;
  logic [NB_BANKS-1:0][BANK_AW-1:0] st_addr;
  logic [ADP_W-1:0]               adp_addr;
  logic [LA_W-1:0]                la;
  logic [BANK_IDX_W-1:0]          dyn_bank;
  logic [BANK_AW-1:0]             dyn_pa;
  logic [NB_BANKS-1:0]            dyn_hit;
  logic [DATA_W-1:0]              abus;

  memory_access_scheduler u_sched (
    .clk, .rst_n,
    .wr_en(sched_we), .wr_addr(sched_waddr), .wr_instr(sched_wdata),
    .start, .instr(ins), .valid(busy), .pc, .done
  );

  address_generator u_ag (
    .clk, .rst_n,
    .wr_en(ag_we), .wr_idx(ag_widx), .wr_desc(ag_wdata),
    .use_en(ins.st_en), .sid(ins.st_sid), .rst_strm(ins.ag_rst),
    .addr(st_addr)
  );

  // bottom multiplexer of the block diagram: the bus carrying the dynamic
  // address (or the value sent to the address datapath)
  assign abus = bus_wdata[ins.dyn_abus];

  dynamic_address_datapath u_adp (
    .clk, .rst_n, .ctrl(ins.adp), .ext(abus[ADP_W-1:0]), .addr(adp_addr)
  );

  assign la = ins.dyn_src ? LA_W'(adp_addr) : abus[LA_W-1:0];

  address_translation_table u_tt (
    .clk, .rst_n,
    .wr_en(tt_we), .wr_idx(tt_widx), .wr_entry(tt_wdata),
    .la, .bank(dyn_bank), .pa(dyn_pa)
  );

  dynamic_address_controller u_dac (
    .dyn_en(ins.dyn_en), .dyn_we(ins.dyn_we), .dyn_bank, .dyn_addr(dyn_pa),
    .st_en(ins.st_en), .st_we(ins.st_we), .st_addr,
    .bank_en, .bank_we, .bank_addr, .dyn_hit, .conflict
  );

  router u_router (
    .clk, .rst_n,
    .st_bus(ins.st_bus), .dyn_hit, .dyn_dbus(ins.dyn_dbus),
    .bank_en, .bank_we,
    .bus_wdata, .bank_wdata, .bank_rdata, .bus_rdata, .bus_rvalid
  );

endmodule
