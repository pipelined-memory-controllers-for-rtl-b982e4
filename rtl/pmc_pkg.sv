// pmc_pkg: sizes, slot-word layout and shared types of the pipelined memory
// sequencer. The document fixes none of these sizes; they are this design's
// choices (4 banks, 4 datapath buses, 16-bit data, 4 Ki-word banks, a 16 Ki-word
// logical address space in 64-word pages, 8 static address streams, a 64-slot
// access schedule).
package pmc_pkg;

  parameter int NB_BANKS    = 4;
  parameter int NB_BUSES    = 4;
  parameter int DATA_W      = 16;
  parameter int BANK_AW     = 12;   // words per bank = 2**BANK_AW
  parameter int LA_W        = 14;   // logical (dynamic) address width
  parameter int PAGE_W      = 6;    // translation page = 2**PAGE_W words
  parameter int TT_ENTRIES  = 1 << (LA_W - PAGE_W);
  parameter int PPAGE_W     = BANK_AW - PAGE_W;
  parameter int NB_STREAMS  = 8;
  parameter int SCHED_DEPTH = 64;
  parameter int REP_W       = 12;   // repeat count of one slot
  parameter int LOOP_W      = 8;    // loop iteration count
  parameter int ADP_W       = LA_W; // reduced-width address operators

  parameter int BANK_IDX_W = $clog2(NB_BANKS);
  parameter int BUS_IDX_W  = $clog2(NB_BUSES);
  parameter int SID_W      = $clog2(NB_STREAMS);
  parameter int SCHED_AW   = $clog2(SCHED_DEPTH);
  parameter int TT_IDX_W   = LA_W - PAGE_W;

  // Source of an operator input register of the dynamic address datapath.
  typedef enum logic [1:0] {
    SRC_EXT = 2'd0,   // bus 0: value transferred from the datapath
    SRC_IMM = 2'd1,   // bus 1: constant held in the schedule slot
    SRC_MUL = 2'd2,   // bus 2: multiplier output register
    SRC_ADD = 2'd3    // adder output register
  } adp_src_e;

  typedef struct packed {
    logic              m0_ld;   adp_src_e m0_sel;
    logic              m1_ld;   adp_src_e m1_sel;
    logic              a0_ld;   adp_src_e a0_sel;
    logic              a1_ld;   adp_src_e a1_sel;
    logic              a2_acc;  // accumulator register captures the adder result
    logic              a2_clr;  // accumulator register cleared
    logic              mq_ld;   // multiplier output register load
    logic              aq_ld;   // adder output register load
    logic [ADP_W-1:0]  imm;
  } adp_ctrl_t;

  // One slot of the memory access schedule.
  typedef struct packed {
    // static (predictable) accesses, one field per bank
    logic [NB_BANKS-1:0]                 st_en;
    logic [NB_BANKS-1:0]                 st_we;
    logic [NB_BANKS-1:0][BUS_IDX_W-1:0]  st_bus;   // router: bus of each bank
    logic [NB_BANKS-1:0][SID_W-1:0]      st_sid;   // address stream of each bank
    logic [NB_STREAMS-1:0]               ag_rst;   // restart streams at their base
    // dynamic (unpredictable) access
    logic                                dyn_en;
    logic                                dyn_we;
    logic                                dyn_src;  // 0: address from a bus, 1: from the address datapath
    logic [BUS_IDX_W-1:0]                dyn_abus; // bus carrying the address / datapath value
    logic [BUS_IDX_W-1:0]                dyn_dbus; // bus carrying the data
    adp_ctrl_t                           adp;
    // sequencing
    logic [REP_W-1:0]                    rep;      // slot executes rep+1 times
    logic                                loop_end; // jump back to loop_tgt ...
    logic [SCHED_AW-1:0]                 loop_tgt;
    logic [LOOP_W-1:0]                   loop_cnt; // ... until the body ran loop_cnt+1 times
    logic                                last;     // schedule ends after this slot
  } sched_instr_t;

  // 2-D address stream of the address generator.
  typedef struct packed {
    logic [BANK_AW-1:0] base;
    logic [BANK_AW-1:0] pitch;   // distance between rows
    logic [BANK_AW-1:0] width;   // elements per row, minus one
    logic [BANK_AW-1:0] height;  // rows, minus one
  } ag_desc_t;

  // Translation table entry.
  typedef struct packed {
    logic [BANK_IDX_W-1:0] bank;
    logic [PPAGE_W-1:0]    ppage;
  } tt_entry_t;

endpackage
