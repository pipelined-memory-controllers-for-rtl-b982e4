// dynamic_address_datapath: the address computation unit placed inside the
// sequencer so that dynamic addresses need not be sent by the datapath.
// It has a multiplier with two input registers (m0, m1) and an output register
// (mq), and an adder with three input registers (a0, a1, a2) and an output
// register (aq). Operator input registers load from three buses: bus 0 carries
// a value transferred from the datapath (ext), bus 1 a constant from the
// schedule slot (imm), bus 2 the multiplier output mq; m0/m1/a0/a1 may also
// take aq. a2 is the adder's feedback register: with a2_acc it captures the
// adder result, with a2_clr it is cleared, so aq = a0 + a1 + a2 can advance an
// address every cycle. aq is the logical address handed to the translation table.
// Every register loads on clk when its control bit in ctrl is set; results are
// truncated to ADP_W bits. Register/operator structure follows the document's
// figure; the bus sources and the accumulate use of a2 are this design's reading.
module dynamic_address_datapath
  import pmc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  adp_ctrl_t        ctrl,
  input  logic [ADP_W-1:0] ext,
  output logic [ADP_W-1:0] addr
);

  logic [ADP_W-1:0] m0, m1, mq, a0, a1, a2, aq;
  logic [ADP_W-1:0] sum, prod;

  function automatic logic [ADP_W-1:0] pick(adp_src_e s, logic [ADP_W-1:0] e,
                                            logic [ADP_W-1:0] i, logic [ADP_W-1:0] m,
                                            logic [ADP_W-1:0] a);
    unique case (s)
      SRC_EXT: return e;
      SRC_IMM: return i;
      SRC_MUL: return m;
      default: return a;
    endcase
  endfunction

  always_comb begin
    sum  = a0 + a1 + a2;
    prod = ADP_W'(m0 * m1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {m0, m1, mq, a0, a1, a2, aq} <= '0;
    end else begin
      if (ctrl.m0_ld) m0 <= pick(ctrl.m0_sel, ext, ctrl.imm, mq, aq);
      if (ctrl.m1_ld) m1 <= pick(ctrl.m1_sel, ext, ctrl.imm, mq, aq);
      if (ctrl.a0_ld) a0 <= pick(ctrl.a0_sel, ext, ctrl.imm, mq, aq);
      if (ctrl.a1_ld) a1 <= pick(ctrl.a1_sel, ext, ctrl.imm, mq, aq);
      if (ctrl.a2_clr)      a2 <= '0;
      else if (ctrl.a2_acc) a2 <= sum;
      if (ctrl.mq_ld) mq <= prod;
      if (ctrl.aq_ld) aq <= sum;
    end
  end

  assign addr = aq;

endmodule
