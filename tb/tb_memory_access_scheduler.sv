// tb_memory_access_scheduler: loads random schedules with repeat counts and a
// loop, runs them and compares the executed slot sequence, slot words, the
// valid flag and the done pulse against a list of slots expanded in the
// testbench; also checks that the run length in cycles equals the expanded
// list length and that an idle scheduler issues an all-zero slot word.
module tb_memory_access_scheduler;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [SCHED_AW-1:0] wr_addr = '0, pc;
  sched_instr_t wr_instr = '0, instr;
  logic valid, done;
  sched_instr_t prog [SCHED_DEPTH];
  int seq [$];
  int checks = 0, failures = 0;

  memory_access_scheduler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int len, lb, le, lc, le2;
      len = $urandom_range(1, 12);
      lb = $urandom_range(0, len - 1);
      le = $urandom_range(lb, len - 1);
      lc = $urandom_range(0, 3);
      // a second loop, sharing the loop counter, after the first one
      le2 = (le + 1 < len && t % 2 == 1) ? $urandom_range(le + 1, len - 1) : -1;
      for (int i = 0; i < len; i++) begin
        sched_instr_t w;
        w = sched_instr_t'($bits(sched_instr_t)'({$urandom, $urandom, $urandom, $urandom}));
        w.rep = REP_W'($urandom_range(0, 3));
        w.last = (i == len - 1);
        w.loop_end = ((i == le) && (t % 3 != 0)) || (i == le2);
        w.loop_tgt = (i == le2) ? SCHED_AW'(le + 1) : SCHED_AW'(lb);
        w.loop_cnt = LOOP_W'(lc);
        prog[i] = w;
        @(negedge clk); wr_en = 1; wr_addr = SCHED_AW'(i); wr_instr = w;
      end
      @(negedge clk); wr_en = 0;
      // expand the expected slot sequence
      seq.delete();
      begin
        int p, it;
        p = 0; it = 0;
        forever begin
          for (int r = 0; r <= int'(prog[p].rep); r++) seq.push_back(p);
          if (prog[p].last) break;
          if (prog[p].loop_end && it != int'(prog[p].loop_cnt)) begin it++; p = int'(prog[p].loop_tgt); end
          else begin if (prog[p].loop_end) it = 0; p++; end
        end
      end
      checks++;
      if (valid || instr !== '0) begin failures++; $display("FAIL idle word"); end
      start = 1; @(negedge clk); start = 0;
      foreach (seq[i]) begin
        checks++;
        if (!valid || int'(pc) != seq[i] || instr !== prog[seq[i]] || done) begin
          failures++;
          $display("FAIL t=%0d step %0d pc %0d exp %0d valid %b", t, i, pc, seq[i], valid);
        end
        @(negedge clk);
      end
      checks++;
      if (valid || !done) begin failures++; $display("FAIL t=%0d end: valid %b done %b", t, valid, done); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
