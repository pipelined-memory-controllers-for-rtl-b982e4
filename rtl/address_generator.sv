// address_generator: the static address sequences of the sequencer.
// It holds NB_STREAMS 2-D address streams, each described by a base, a row
// pitch, a row width and a number of rows (ag_desc_t, width and height stored
// minus one). In each cycle every bank that performs a static access names the
// stream it uses (sid) and receives that stream's current address on addr; the
// stream then steps to the next element of its block (row-major) and wraps to
// its base after the last one. rst_strm restarts a stream: the address given in
// that cycle is the base. A stream used by two banks in one cycle steps once.
// Descriptors are written through the wr_* port, which also restarts the stream.
// Timing: addr is combinational from the stream state; state updates on clk.
// The document names the unit and its role (counter-based address sequencing
// driven by the scheduler); the 2-D stream form is this design's choice.
module address_generator
  import pmc_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                wr_en,
  input  logic [SID_W-1:0]                    wr_idx,
  input  ag_desc_t                            wr_desc,
  input  logic [NB_BANKS-1:0]                 use_en,
  input  logic [NB_BANKS-1:0][SID_W-1:0]      sid,
  input  logic [NB_STREAMS-1:0]               rst_strm,
  output logic [NB_BANKS-1:0][BANK_AW-1:0]    addr
);

  ag_desc_t           desc_q [NB_STREAMS];
  logic [BANK_AW-1:0] row_q  [NB_STREAMS];  // address of the current row start
  logic [BANK_AW-1:0] x_q    [NB_STREAMS];
  logic [BANK_AW-1:0] y_q    [NB_STREAMS];

  // effective state of each stream in this cycle (after an optional restart)
  logic [BANK_AW-1:0] row_e  [NB_STREAMS];
  logic [BANK_AW-1:0] x_e    [NB_STREAMS];
  logic [BANK_AW-1:0] y_e    [NB_STREAMS];
  logic [NB_STREAMS-1:0] step;

  always_comb begin
    for (int s = 0; s < NB_STREAMS; s++) begin
      row_e[s] = rst_strm[s] ? desc_q[s].base : row_q[s];
      x_e[s]   = rst_strm[s] ? '0 : x_q[s];
      y_e[s]   = rst_strm[s] ? '0 : y_q[s];
    end
    step = '0;
    for (int b = 0; b < NB_BANKS; b++) begin
      addr[b] = row_e[sid[b]] + x_e[sid[b]];
      if (use_en[b]) step[sid[b]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NB_STREAMS; s++) begin
        desc_q[s] <= '0;
        row_q[s]  <= '0;
        x_q[s]    <= '0;
        y_q[s]    <= '0;
      end
    end else begin
      for (int s = 0; s < NB_STREAMS; s++) begin
        if (wr_en && wr_idx == SID_W'(s)) begin
          desc_q[s] <= wr_desc;
          row_q[s]  <= wr_desc.base;
          x_q[s]    <= '0;
          y_q[s]    <= '0;
        end else if (step[s]) begin
          if (x_e[s] != desc_q[s].width) begin
            x_q[s]   <= x_e[s] + 1'b1;
            row_q[s] <= row_e[s];
            y_q[s]   <= y_e[s];
          end else if (y_e[s] != desc_q[s].height) begin
            x_q[s]   <= '0;
            row_q[s] <= row_e[s] + desc_q[s].pitch;
            y_q[s]   <= y_e[s] + 1'b1;
          end else begin
            x_q[s]   <= '0;
            row_q[s] <= desc_q[s].base;
            y_q[s]   <= '0;
          end
        end else if (rst_strm[s]) begin
          row_q[s] <= desc_q[s].base;
          x_q[s]   <= '0;
          y_q[s]   <= '0;
        end
      end
    end
  end

endmodule
