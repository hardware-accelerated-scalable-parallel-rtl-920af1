// cont1: local controller of the verification platform (Cont_1). It writes
// each number taken from the generator under test into the capture DPRAM
// and tells the master controller when the DPRAM is full.
//
// A fill counter gives the write address. When DEPTH numbers have been
// written, full_o rises and stays high until the master controller clears
// the counter with clear_i, after the processor has checked the buffer.
// full_o is a plain decode of the counter, so the master controller can gate
// the generator in the same clock and no number is lost or overwritten.
// DEPTH = 32768 32-bit words is the 128 KB / 32K-number buffer of the
// platform; the word width and the signalling are this design's own.
//
// Interface: rn_valid_i/rn_data_i is the number stream (one word per clock
// at most); ram_* drive the DPRAM write port, ram_wdata_o being the number
// itself passed straight through; count_o is the fill level. The assertion
// states the rule the master controller must keep: no number while full.
module cont1 #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rn_valid_i,
  input  logic [DW-1:0] rn_data_i,
  input  logic          clear_i,
  output logic          ram_we_o,
  output logic [AW-1:0] ram_waddr_o,
  output logic [DW-1:0] ram_wdata_o,
  output logic          full_o,
  output logic [AW:0]   count_o
);
  logic [AW:0] count_q;

  assign full_o      = (count_q == (AW+1)'(DEPTH));
  assign ram_we_o    = rn_valid_i & ~full_o;
  assign ram_waddr_o = count_q[AW-1:0];
  assign ram_wdata_o = rn_data_i;
  assign count_o     = count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count_q <= '0;
    else if (clear_i)  count_q <= '0;
    else if (ram_we_o) count_q <= count_q + 1'b1;
  end

  // The generator must be stopped while the buffer is full.
  assert property (@(posedge clk) disable iff (!rst_n) full_o |-> !rn_valid_i)
    else $error("cont1: number arrived while the DPRAM is full");

endmodule
