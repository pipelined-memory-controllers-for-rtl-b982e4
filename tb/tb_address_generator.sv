// tb_address_generator: programs random 2-D streams, then for many cycles lets
// random banks use random streams (with occasional restarts) and compares every
// address with a reference model that walks each block row by row.
module tb_address_generator;
  import pmc_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [SID_W-1:0] wr_idx = '0;
  ag_desc_t wr_desc = '0;
  logic [NB_BANKS-1:0] use_en = '0;
  logic [NB_BANKS-1:0][SID_W-1:0] sid = '0;
  logic [NB_STREAMS-1:0] rst_strm = '0;
  logic [NB_BANKS-1:0][BANK_AW-1:0] addr;
  ag_desc_t d [NB_STREAMS];
  int x [NB_STREAMS], y [NB_STREAMS];
  int checks = 0, failures = 0;

  address_generator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BANK_AW-1:0] expect_addr(int s);
    return BANK_AW'(d[s].base + y[s] * d[s].pitch + x[s]);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NB_STREAMS; s++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = SID_W'(s);
      wr_desc.base   = BANK_AW'($urandom_range(0, 300));
      wr_desc.pitch  = BANK_AW'($urandom_range(8, 40));
      wr_desc.width  = BANK_AW'($urandom_range(0, 7));
      wr_desc.height = BANK_AW'($urandom_range(0, 7));
      d[s] = wr_desc; x[s] = 0; y[s] = 0;
    end
    @(negedge clk); wr_en = 0;
    // one full block of stream 0 on bank 1, checked element by element
    for (int k = 0; k < (d[0].width + 1) * (d[0].height + 1) + 3; k++) begin
      use_en = 4'b0010; sid[1] = 0; rst_strm = '0;
      #1;
      checks++;
      if (addr[1] !== expect_addr(0)) begin
        failures++; $display("FAIL block walk k=%0d got %0d exp %0d", k, addr[1], expect_addr(0));
      end
      @(negedge clk);
      if (x[0] != d[0].width) x[0]++;
      else begin x[0] = 0; if (y[0] != d[0].height) y[0]++; else y[0] = 0; end
    end
    // random use
    for (int k = 0; k < 2000; k++) begin
      logic [NB_STREAMS-1:0] stepped;
      use_en = NB_BANKS'($urandom);
      for (int b = 0; b < NB_BANKS; b++) sid[b] = SID_W'($urandom);
      rst_strm = ($urandom_range(0, 9) == 0) ? NB_STREAMS'($urandom) : '0;
      for (int s = 0; s < NB_STREAMS; s++) if (rst_strm[s]) begin x[s] = 0; y[s] = 0; end
      #1;
      stepped = '0;
      for (int b = 0; b < NB_BANKS; b++) begin
        checks++;
        if (addr[b] !== expect_addr(sid[b])) begin
          failures++;
          $display("FAIL k=%0d bank %0d stream %0d got %0d exp %0d", k, b, sid[b], addr[b], expect_addr(sid[b]));
        end
        if (use_en[b]) stepped[sid[b]] = 1'b1;
      end
      @(negedge clk);
      for (int s = 0; s < NB_STREAMS; s++) if (stepped[s]) begin
        if (x[s] != d[s].width) x[s]++;
        else begin x[s] = 0; if (y[s] != d[s].height) y[s]++; else y[s] = 0; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
