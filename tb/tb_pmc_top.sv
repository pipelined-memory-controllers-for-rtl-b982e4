// tb_pmc_top: end-to-end test of the memory subsystem running three-step-search
// block matching, with the sequencer at its default sizes.
// A small datapath model sits on the four buses and follows the schedule slot
// by slot (pc). For each workload size (8x8 block in a 16x16 search window,
// then 24x24 in 48x48) it:
//   1. preloads the reference block into bank 0 and the window into bank 1 with
//      static write streams;
//   2. runs the search twice: first with every dynamic pixel address sent by the
//      datapath over a bus, then with only one base address per dynamic block
//      sent and the pixel addresses computed by the sequencer's address
//      datapath.
// Step 1 of the search (the centre and four neighbours) is known in advance and
// read by static streams, with the reference block read in parallel from
// bank 0. Steps 2 and 3 (four blocks each) depend on the best match so far and
// are dynamic accesses through the translation table. Three dynamic writes then
// store the best position of each step in a result vector whose pages are bound
// to banks 2 and 3.
// Checks: every word read against the preloaded images, the chosen positions
// against a software search over the same data, the stored results, the run
// length in cycles, the number of address transfers from the datapath (8 per
// pixel block in the first form, 8 in all in the second) and that each
// mechanism (static read/write, parallel banks, repeat, loop, dynamic access by
// bus address, by computed address, dynamic write, several banks reached
// through the table, done) happened.
module tb_pmc_top;
  import pmc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sched_we = 0;
  logic [SCHED_AW-1:0] sched_waddr = '0;
  sched_instr_t sched_wdata = '0;
  logic ag_we = 0;
  logic [SID_W-1:0] ag_widx = '0;
  ag_desc_t ag_wdata = '0;
  logic tt_we = 0;
  logic [TT_IDX_W-1:0] tt_widx = '0;
  tt_entry_t tt_wdata = '0;
  logic start = 0, busy, done, conflict;
  logic [SCHED_AW-1:0] pc;
  logic [NB_BUSES-1:0][DATA_W-1:0] bus_wdata = '0, bus_rdata;
  logic [NB_BUSES-1:0] bus_rvalid;

  pmc_top dut (.*);
  always #5 clk = ~clk;

  localparam int REF_PA = 'h000;   // reference block, bank 0
  localparam int WIN_PA = 'h400;   // search window, bank 1
  localparam int WIN_LA = 'h800;   // logical address of the window
  localparam int RV_LA  = 'h3000;  // logical address of the result vector
  localparam int DBUS   = 3;       // bus of dynamic addresses and data
  localparam int RBUS   = 2;       // bus of result-write addresses
  localparam int PG     = 1 << PAGE_W;

  typedef enum {R_NONE, R_PRE_REF, R_PRE_WIN, R_BASE, R_PIX, R_RES} role_e;
  role_e        role [SCHED_DEPTH];
  int           rblk [SCHED_DEPTH];
  sched_instr_t prog [SCHED_DEPTH];
  int           plen;

  int W, S, WW, D1, D2, D3;
  int refb [], win [], refq [];
  int cx [13], cy [13], sad [13];
  logic [12:0] placed;
  int best_x [3], best_y [3], best_s [3];
  int ref_cnt, sc_cnt, dc_cnt, slot_cnt, prev_pc, run_cycles, addr_xfers;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_st_rd = 0, n_st_wr = 0, n_par = 0, n_rep = 0, n_loop = 0, n_dyn_bus = 0;
  int n_dyn_adp = 0, n_dyn_wr = 0, n_done = 0, n_conf = 0;
  logic [NB_BANKS-1:0] dyn_banks = '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int clampp(int v);
    return v < 0 ? 0 : (v > S - W ? S - W : v);
  endfunction

  // ---------------------------------------------------------------- software reference
  function automatic int sw_sad(int x, int y);
    int s = 0;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        s += iabs(win[(y + i) * S + x + j] - refb[i * W + j]);
    return s;
  endfunction

  task automatic sw_search(output int bx [3], output int by [3]);
    int c, x, y, s, bs, dx [4], dy [4], d [3];
    c = (S - W) / 2;
    d[0] = D1; d[1] = D2; d[2] = D3;
    dx = '{-1, 1, 0, 0}; dy = '{0, 0, -1, 1};
    x = c; y = c; bs = sw_sad(x, y);
    for (int st = 0; st < 3; st++) begin
      int nx, ny, ox, oy;
      ox = x; oy = y;
      for (int k = 0; k < 4; k++) begin
        nx = clampp(ox + dx[k] * d[st]); ny = clampp(oy + dy[k] * d[st]);
        s = sw_sad(nx, ny);
        if (s < bs) begin bs = s; x = nx; y = ny; end
      end
      bx[st] = x; by[st] = y;
    end
  endtask

  // ---------------------------------------------------------------- program building
  function automatic sched_instr_t blank();
    sched_instr_t w = '0;
    return w;
  endfunction

  task automatic emit(input sched_instr_t w, input role_e r, input int blk);
    prog[plen] = w; role[plen] = r; rblk[plen] = blk; plen++;
  endtask

  task automatic load_prog();
    prog[plen - 1].last = 1'b1;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk);
      sched_we = 1; sched_waddr = SCHED_AW'(i); sched_wdata = prog[i];
    end
    @(negedge clk);
    sched_we = 0;
  endtask

  task automatic set_stream(input int s, input int base, input int pitch, input int wd, input int ht);
    @(negedge clk);
    ag_we = 1; ag_widx = SID_W'(s);
    ag_wdata.base = BANK_AW'(base); ag_wdata.pitch = BANK_AW'(pitch);
    ag_wdata.width = BANK_AW'(wd - 1); ag_wdata.height = BANK_AW'(ht - 1);
    @(negedge clk);
    ag_we = 0;
  endtask

  task automatic set_tt(input int page, input int bank, input int ppage);
    @(negedge clk);
    tt_we = 1; tt_widx = TT_IDX_W'(page);
    tt_wdata.bank = BANK_IDX_W'(bank); tt_wdata.ppage = PPAGE_W'(ppage);
    @(negedge clk);
    tt_we = 0;
  endtask

  task automatic build_preload();
    sched_instr_t w;
    plen = 0;
    w = blank(); w.st_en[0] = 1; w.st_we[0] = 1; w.st_bus[0] = 0; w.st_sid[0] = 0;
    w.rep = REP_W'(WW - 1);
    emit(w, R_PRE_REF, 0);
    w = blank(); w.st_en[1] = 1; w.st_we[1] = 1; w.st_bus[1] = 1; w.st_sid[1] = 1;
    w.rep = REP_W'(S * S - 1);
    emit(w, R_PRE_WIN, 0);
  endtask

  task automatic build_search(input bit computed);
    sched_instr_t w;
    plen = 0;
    // step 1: static, reference block read in parallel from bank 0
    w = blank();
    w.st_en[0] = 1; w.st_bus[0] = 0; w.st_sid[0] = 0;
    w.st_en[1] = 1; w.st_bus[1] = 1; w.st_sid[1] = 2;
    w.rep = REP_W'(WW - 1);
    emit(w, R_NONE, 0);
    for (int k = 1; k < 5; k++) begin
      w = blank(); w.st_en[1] = 1; w.st_bus[1] = 1; w.st_sid[1] = SID_W'(2 + k);
      w.rep = REP_W'(WW - 1);
      emit(w, R_NONE, 0);
    end
    for (int st = 0; st < 2; st++) begin
      w = blank(); w.rep = 1;            // datapath compares the step's results
      emit(w, R_NONE, 0);
      for (int j = st * 4; j < st * 4 + 4; j++) begin
        if (!computed) begin
          w = blank(); w.dyn_en = 1; w.dyn_src = 0;
          w.dyn_abus = BUS_IDX_W'(DBUS); w.dyn_dbus = BUS_IDX_W'(DBUS);
          w.rep = REP_W'(WW - 1);
          emit(w, R_PIX, j);
        end else begin
          int s2;
          // base address in: a1 <- base, a0 <- 0, a2 <- 0
          w = blank(); w.dyn_abus = BUS_IDX_W'(DBUS);
          w.adp.a1_ld = 1; w.adp.a1_sel = SRC_EXT;
          w.adp.a0_ld = 1; w.adp.a0_sel = SRC_IMM; w.adp.imm = '0;
          w.adp.a2_clr = 1;
          emit(w, R_BASE, j);
          // aq = a2 = base, a1 <- 1 (step along a row)
          w = blank(); w.adp.aq_ld = 1; w.adp.a2_acc = 1;
          w.adp.a1_ld = 1; w.adp.a1_sel = SRC_IMM; w.adp.imm = ADP_W'(1);
          emit(w, R_NONE, 0);
          // row body: W-2 accesses
          s2 = plen;
          w = blank(); w.dyn_en = 1; w.dyn_src = 1; w.dyn_dbus = BUS_IDX_W'(DBUS);
          w.adp.aq_ld = 1; w.adp.a2_acc = 1; w.rep = REP_W'(W - 3);
          emit(w, R_NONE, 0);
          // next to last of the row: prepare the row skip
          w.rep = '0; w.adp.a0_ld = 1; w.adp.a0_sel = SRC_IMM; w.adp.imm = ADP_W'(S - W);
          emit(w, R_NONE, 0);
          // last of the row: skip applied, reset the skip, loop over the rows
          w.adp.imm = '0; w.loop_end = 1; w.loop_tgt = SCHED_AW'(s2);
          w.loop_cnt = LOOP_W'(W - 1);
          emit(w, R_NONE, 0);
        end
      end
    end
    w = blank(); w.rep = 1;
    emit(w, R_NONE, 0);
    for (int k = 0; k < 3; k++) begin
      w = blank(); w.dyn_en = 1; w.dyn_we = 1; w.dyn_src = 0;
      w.dyn_abus = BUS_IDX_W'(RBUS); w.dyn_dbus = BUS_IDX_W'(DBUS);
      emit(w, R_RES, k);
    end
  endtask

  // ---------------------------------------------------------------- datapath model
  task automatic place(input int k);
    int st, c, d, ox, oy;
    int dx [4], dy [4];
    dx = '{-1, 1, 0, 0}; dy = '{0, 0, -1, 1};
    if (placed[k]) return;
    if (k < 5) begin
      c = (S - W) / 2;
      cx[k] = (k == 0) ? c : clampp(c + dx[k - 1] * D1);
      cy[k] = (k == 0) ? c : clampp(c + dy[k - 1] * D1);
    end else begin
      st = (k - 5) / 4;
      d  = (st == 0) ? D2 : D3;
      ox = best_x[st]; oy = best_y[st];
      cx[k] = clampp(ox + dx[(k - 5) % 4] * d);
      cy[k] = clampp(oy + dy[(k - 5) % 4] * d);
    end
    sad[k] = 0;
    placed[k] = 1'b1;
  endtask

  task automatic decide(input int st);
    // st 0: candidates 0..4; st 1: best of step 1 and 5..8; st 2: best of step 2 and 9..12
    int lo, hi, bx, by, bs;
    if (st == 0) begin lo = 1; hi = 4; bx = cx[0]; by = cy[0]; bs = sad[0]; end
    else begin lo = 1 + 4 * st; hi = lo + 3; bx = best_x[st - 1]; by = best_y[st - 1]; bs = best_s[st - 1]; end
    for (int k = lo; k <= hi; k++)
      if (sad[k] < bs) begin bs = sad[k]; bx = cx[k]; by = cy[k]; end
    best_x[st] = bx; best_y[st] = by; best_s[st] = bs;
  endtask

  task automatic cand_pixel(input int k, input int i, input int v);
    place(k);
    check(v == win[(cy[k] + i / W) * S + cx[k] + i % W], $sformatf("candidate %0d pixel %0d", k, i));
    sad[k] += iabs(v - refq[i]);
    if (i == WW - 1) begin
      if (k == 4) decide(0);
      if (k == 8) decide(1);
      if (k == 12) decide(2);
    end
  endtask

  task automatic take_reads();
    if (bus_rvalid[0]) begin
      check(int'(bus_rdata[0]) == refb[ref_cnt % WW], "reference pixel");
      refq[ref_cnt % WW] = int'(bus_rdata[0]);
      ref_cnt++;
    end
    if (bus_rvalid[1]) begin
      cand_pixel(sc_cnt / WW, sc_cnt % WW, int'(bus_rdata[1]));
      sc_cnt++;
    end
    if (bus_rvalid[DBUS]) begin
      cand_pixel(5 + dc_cnt / WW, dc_cnt % WW, int'(bus_rdata[DBUS]));
      dc_cnt++;
    end
    check(bus_rvalid[2] == 1'b0, "no read on bus 2");
  endtask

  task automatic drive();
    int p, j;
    p = int'(pc);
    slot_cnt = (p == prev_pc) ? slot_cnt + 1 : 0;
    prev_pc = p;
    for (int b = 0; b < NB_BUSES; b++) bus_wdata[b] = DATA_W'($urandom);
    j = rblk[p];
    case (role[p])
      R_PRE_REF: bus_wdata[0] = DATA_W'(refb[slot_cnt]);
      R_PRE_WIN: bus_wdata[1] = DATA_W'(win[slot_cnt]);
      R_BASE: begin
        place(5 + j);
        bus_wdata[DBUS] = DATA_W'(WIN_LA + cy[5 + j] * S + cx[5 + j]);
        addr_xfers++;
      end
      R_PIX: begin
        place(5 + j);
        bus_wdata[DBUS] = DATA_W'(WIN_LA + (cy[5 + j] + slot_cnt / W) * S + cx[5 + j] + slot_cnt % W);
        addr_xfers++;
      end
      R_RES: begin
        bus_wdata[RBUS] = DATA_W'(RV_LA + PG * j);
        bus_wdata[DBUS] = DATA_W'((best_y[j] << 8) | best_x[j]);
      end
      default: ;
    endcase
  endtask

  // observe the sequencer's internal decisions for the mechanism counters
  always @(posedge clk) if (rst_n && busy) begin
    automatic sched_instr_t ins = dut.u_seq.ins;
    int nst;
    nst = $countones(ins.st_en & ~dut.u_seq.dyn_hit);
    n_st_rd += $countones(ins.st_en & ~ins.st_we & ~dut.u_seq.dyn_hit);
    n_st_wr += $countones(ins.st_en & ins.st_we & ~dut.u_seq.dyn_hit);
    if (nst >= 2) n_par++;
    if (dut.u_seq.u_sched.rep_q != '0) n_rep++;
    if (ins.dyn_en) begin
      dyn_banks |= dut.u_seq.dyn_hit;
      if (ins.dyn_we) n_dyn_wr++;
      else if (ins.dyn_src) n_dyn_adp++;
      else n_dyn_bus++;
    end
    if (ins.loop_end && dut.u_seq.u_sched.rep_q == ins.rep &&
        dut.u_seq.u_sched.loop_q != ins.loop_cnt) n_loop++;
    if (conflict) n_conf++;
  end

  task automatic run();
    ref_cnt = 0; sc_cnt = 0; dc_cnt = 0; slot_cnt = 0; prev_pc = -1;
    run_cycles = 0; addr_xfers = 0; placed = '0;
    @(negedge clk);
    start = 1;
    forever begin
      @(negedge clk);
      start = 0;
      take_reads();
      if (done) begin
        n_done++;
        break;
      end
      if (busy) begin
        run_cycles++;
        drive();
      end
    end
    bus_wdata = '0;
  endtask

  task automatic workload(input int w_, input int s_);
    int swx [3], swy [3], exp_cycles;
    W = w_; S = s_; WW = W * W;
    D1 = (S - W) / 2; D2 = D1 / 2; D3 = (D1 / 4 > 0) ? D1 / 4 : 1;
    refb = new[WW]; refq = new[WW]; win = new[S * S];
    foreach (win[i]) win[i] = $urandom_range(0, 255);
    // the reference block resembles a window block near a step-1 neighbour
    begin
      int ox, oy;
      ox = (S - W) / 2 + D1 - D2 + D3; oy = (S - W) / 2;
      ox = clampp(ox);
      foreach (refb[i]) refb[i] = (win[(oy + i / W) * S + ox + i % W] + $urandom_range(0, 6)) % 256;
    end
    // address streams and translation table
    set_stream(0, REF_PA, W, W, W);
    set_stream(1, WIN_PA, S, S, S);
    for (int k = 0; k < 5; k++) begin
      placed = '0; place(k);
      set_stream(2 + k, WIN_PA + cy[k] * S + cx[k], S, W, W);
    end
    for (int p = 0; p * PG < S * S; p++) set_tt(WIN_LA / PG + p, 1, WIN_PA / PG + p);
    set_tt(RV_LA / PG + 0, 2, 3);
    set_tt(RV_LA / PG + 1, 3, 5);
    set_tt(RV_LA / PG + 2, 2, 4);
    sw_search(swx, swy);

    build_preload();
    load_prog();
    run();
    check(run_cycles == WW + S * S, "preload length");

    for (int form = 0; form < 2; form++) begin
      build_search(form == 1);
      load_prog();
      run();
      for (int st = 0; st < 3; st++)
        check(best_x[st] == swx[st] && best_y[st] == swy[st],
              $sformatf("W=%0d form %0d step %0d best (%0d,%0d) exp (%0d,%0d)", W, form, st,
                        best_x[st], best_y[st], swx[st], swy[st]));
      check(ref_cnt == WW && sc_cnt == 5 * WW && dc_cnt == 8 * WW, "pixel counts");
      exp_cycles = form == 0 ? 13 * WW + 9 : 13 * WW + 25;
      check(run_cycles == exp_cycles, $sformatf("run length %0d exp %0d", run_cycles, exp_cycles));
      check(addr_xfers == (form == 0 ? 8 * WW : 8),
            $sformatf("address transfers %0d", addr_xfers));
      $display("block %0dx%0d window %0dx%0d, %s: %0d cycles, %0d address transfers from the datapath",
               W, W, S, S, form == 0 ? "addresses sent by the datapath" : "addresses computed in the sequencer",
               run_cycles, addr_xfers);
      // results stored through the translation table
      check(int'(dut.g_bank[2].u_bank.mem[3 * PG]) == ((swy[0] << 8) | swx[0]), "result 0 in bank 2");
      check(int'(dut.g_bank[3].u_bank.mem[5 * PG]) == ((swy[1] << 8) | swx[1]), "result 1 in bank 3");
      check(int'(dut.g_bank[2].u_bank.mem[4 * PG]) == ((swy[2] << 8) | swx[2]), "result 2 in bank 2");
      dut.g_bank[2].u_bank.mem[3 * PG] = '0;
      dut.g_bank[3].u_bank.mem[5 * PG] = '0;
      dut.g_bank[2].u_bank.mem[4 * PG] = '0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    workload(8, 16);
    workload(24, 48);
    check(n_st_rd > 0, "static reads happened");
    check(n_st_wr > 0, "static writes happened");
    check(n_par > 0, "parallel static accesses happened");
    check(n_rep > 0, "slot repeats happened");
    check(n_loop > 0, "loop jumps happened");
    check(n_dyn_bus > 0, "dynamic reads with bus address happened");
    check(n_dyn_adp > 0, "dynamic reads with computed address happened");
    check(n_dyn_wr > 0, "dynamic writes happened");
    check($countones(dyn_banks) >= 2, "dynamic accesses reached several banks");
    check(n_done == 6, "done pulses");
    check(n_conf == 0, "no bank conflict");
    $display("static rd %0d wr %0d, parallel %0d, repeats %0d, loops %0d, dyn bus %0d adp %0d wr %0d, done %0d",
             n_st_rd, n_st_wr, n_par, n_rep, n_loop, n_dyn_bus, n_dyn_adp, n_dyn_wr, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
