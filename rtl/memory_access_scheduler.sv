// memory_access_scheduler: steps through the statically known memory access
// sequence and pilots the rest of the sequencer.
// The sequence is a table of SCHED_DEPTH slot words (sched_instr_t), written
// through the wr_* port. After start the scheduler executes slot 0, one slot
// per clock cycle: a slot runs rep+1 consecutive cycles; a slot with loop_end
// jumps back to loop_tgt until the loop body has run loop_cnt+1 times (one loop
// level); the slot with last ends the schedule, and done pulses in the cycle
// after its final repetition. While running, instr is the current slot word and
// valid is 1; otherwise instr is all zero (no access, no register load).
// pc names the slot in execution so that a statically scheduled datapath can
// keep in step. The document gives the role (a scheduler that knows the access
// sequence, e.g. an FSM); the table form with repeat and loop is this design's.
module memory_access_scheduler
  import pmc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [SCHED_AW-1:0] wr_addr,
  input  sched_instr_t        wr_instr,
  input  logic                start,
  output sched_instr_t        instr,
  output logic                valid,
  output logic [SCHED_AW-1:0] pc,
  output logic                done
);

  sched_instr_t     prog [SCHED_DEPTH];
  logic             run_q;
  logic [SCHED_AW-1:0] pc_q;
  logic [REP_W-1:0]  rep_q;
  logic [LOOP_W-1:0] loop_q;
  sched_instr_t     cur;

  always_ff @(posedge clk) begin
    if (wr_en) prog[wr_addr] <= wr_instr;
  end

  assign cur   = prog[pc_q];
  assign instr = run_q ? cur : '0;
  assign valid = run_q;
  assign pc    = pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      pc_q   <= '0;
      rep_q  <= '0;
      loop_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run_q) begin
        run_q  <= 1'b1;
        pc_q   <= '0;
        rep_q  <= '0;
        loop_q <= '0;
      end else if (run_q) begin
        if (rep_q != cur.rep) begin
          rep_q <= rep_q + 1'b1;
        end else begin
          rep_q <= '0;
          if (cur.last) begin
            run_q <= 1'b0;
            pc_q  <= '0;
            done  <= 1'b1;
          end else if (cur.loop_end && loop_q != cur.loop_cnt) begin
            loop_q <= loop_q + 1'b1;
            pc_q   <= cur.loop_tgt;
          end else begin
            if (cur.loop_end) loop_q <= '0;
            pc_q <= pc_q + 1'b1;
          end
        end
      end
    end
  end

  // done is a one-cycle pulse that follows the end of a run
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |-> !run_q && !$past(done))
    else $error("done must be a single-cycle pulse after a run");

endmodule
