// tb_dynamic_address_datapath: drives random register loads and source
// selects and compares all outputs with a cycle model of the registers; then
// runs the block-walk program used for motion-estimation blocks (one base
// address in, one address per cycle out: base + y*pitch + x) and checks it.
module tb_dynamic_address_datapath;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0;
  adp_ctrl_t ctrl = '0;
  logic [ADP_W-1:0] ext = '0, addr;
  logic [ADP_W-1:0] m0, m1, mq, a0, a1, a2, aq;
  int checks = 0, failures = 0;

  dynamic_address_datapath dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADP_W-1:0] pick(adp_src_e s);
    case (s)
      SRC_EXT: return ext;
      SRC_IMM: return ctrl.imm;
      SRC_MUL: return mq;
      default: return aq;
    endcase
  endfunction

  task automatic model_step();
    logic [ADP_W-1:0] s, p, n_m0, n_m1, n_a0, n_a1;
    s = a0 + a1 + a2; p = ADP_W'(m0 * m1);
    n_m0 = ctrl.m0_ld ? pick(ctrl.m0_sel) : m0;
    n_m1 = ctrl.m1_ld ? pick(ctrl.m1_sel) : m1;
    n_a0 = ctrl.a0_ld ? pick(ctrl.a0_sel) : a0;
    n_a1 = ctrl.a1_ld ? pick(ctrl.a1_sel) : a1;
    if (ctrl.a2_clr) a2 = '0; else if (ctrl.a2_acc) a2 = s;
    if (ctrl.mq_ld) mq = p;
    if (ctrl.aq_ld) aq = s;
    m0 = n_m0; m1 = n_m1; a0 = n_a0; a1 = n_a1;
  endtask

  // one cycle of a block-walk program step
  task automatic cyc(input adp_ctrl_t c);
    ctrl = c; @(negedge clk);
  endtask

  initial begin
    {m0, m1, mq, a0, a1, a2, aq} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      ctrl = adp_ctrl_t'($bits(adp_ctrl_t)'({$urandom, $urandom}));
      ext  = ADP_W'($urandom);
      model_step();
      @(negedge clk);
      checks++;
      if (addr !== aq || dut.mq !== mq || dut.a2 !== a2) begin
        failures++; $display("FAIL k=%0d aq %h/%h mq %h/%h", k, addr, aq, dut.mq, mq);
      end
    end
    // block walk: W x H block at base, rows pitch apart, using m: y*pitch check too
    begin
      int W = 8, H = 8, P = 16, base = 100, n = 0;
      adp_ctrl_t c;
      c = '0; c.a1_ld = 1; c.a1_sel = SRC_EXT; c.a0_ld = 1; c.a0_sel = SRC_IMM; c.imm = 0; c.a2_clr = 1;
      ext = ADP_W'(base); cyc(c);
      c = '0; c.aq_ld = 1; c.a2_acc = 1; c.a1_ld = 1; c.a1_sel = SRC_IMM; c.imm = 1; cyc(c);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          checks++;
          if (addr !== ADP_W'(base + y * P + x)) begin
            failures++; $display("FAIL walk (%0d,%0d) got %0d", x, y, addr);
          end
          n++;
          c = '0; c.aq_ld = 1; c.a2_acc = 1;
          if (x == W - 2) begin c.a0_ld = 1; c.a0_sel = SRC_IMM; c.imm = ADP_W'(P - W); end
          if (x == W - 1) begin c.a0_ld = 1; c.a0_sel = SRC_IMM; c.imm = 0; end
          cyc(c);
        end
      end
      // multiplier path: mq = 5 * 13 through imm and ext
      c = '0; c.m0_ld = 1; c.m0_sel = SRC_IMM; c.imm = 5; c.m1_ld = 1; c.m1_sel = SRC_EXT; ext = 13; cyc(c);
      c = '0; c.mq_ld = 1; cyc(c);
      c = '0; c.a0_ld = 1; c.a0_sel = SRC_MUL; c.a1_ld = 1; c.a1_sel = SRC_IMM; c.imm = 7; c.a2_clr = 1; cyc(c);
      c = '0; c.aq_ld = 1; cyc(c);
      checks++;
      if (addr !== ADP_W'(72)) begin failures++; $display("FAIL mul+add got %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
