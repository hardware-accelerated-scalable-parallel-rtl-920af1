// dpram: simple dual-port RAM, one write port and one read port, both
// synchronous to clk, as used for the lag store of the multiplicative LFG
// and for the 128 KB capture buffer of the verification platform.
//
// Port A writes wdata_i at waddr_i when we_i is high. Port B registers
// mem[raddr_i] into rdata_o when re_i is high and holds it otherwise (one
// clock read latency). A read of the address being written in the same
// clock returns the old contents. The contents are not reset. Written as an
// array so synthesis can map it onto block RAM; the port arrangement is this
// design's own choice.
module dpram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [DW-1:0] wdata_i,
  input  logic          re_i,
  input  logic [AW-1:0] raddr_i,
  output logic [DW-1:0] rdata_o
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk) begin
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
