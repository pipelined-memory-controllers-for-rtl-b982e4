// tb_mem_bank: writes pseudo-random words to random addresses of one bank,
// keeps a reference copy, reads them back and checks each word arrives exactly
// one cycle after the read and is held while the bank is idle.
module tb_mem_bank;
  localparam int DEPTH = 64, WIDTH = 16;
  logic clk = 0, en = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  mem_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = i[$clog2(DEPTH)-1:0];
      wdata = WIDTH'($urandom); ref_mem[i] = wdata;
    end
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); en = 1; we = 0; addr = a[$clog2(DEPTH)-1:0];
      @(negedge clk); en = 0;
      check(ref_mem[a], "read after one cycle");
      // an overwrite of another address must not disturb held data
      en = 1; we = 1; addr = (a[$clog2(DEPTH)-1:0] + 1'b1); wdata = WIDTH'($urandom);
      ref_mem[(a + 1) % DEPTH] = wdata;
      @(negedge clk); en = 0;
      check(ref_mem[a], "read data held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
