// mlfg: multiplicative lagged Fibonacci generator,
// Z(n) = Z(n-k) * Z(n-l) mod 2^W, one number per clock.
//
// The last l results are kept in two dual-port RAMs that always hold the
// same contents: one is read at the long lag (n-l), the other at the short
// lag (n-k). The two values read are multiplied and the product is written
// back into both RAMs. Each RAM slot is a ring entry: Z(n) lives at address
// n mod l, so the long-lag read for Z(n) fetches the slot that Z(n) will
// later overwrite. The pipeline has three steps: issue both reads, register
// the product of the read data, then present Z(n) and write it back. A value
// written in step n+2 is readable from step n+3, which is early enough for
// the short lag as long as k >= 3. The RAM pair and the write-back follow
// the original HASPRNG design; the lag pair (17, 5), the pipeline depth and
// the loading protocol are this design's own (the original design does not
// fix the lags).
//
// Interface: ld_valid_i writes ld_data_i as the next of the l initial values
// Z(0)..Z(l-1) (odd numbers, as the recurrence requires); after l loads the
// generator is primed and produces Z(l), Z(l+1), ... While primed, the
// pipeline advances on every clock with en_i high; rn_o is valid when
// rn_valid_o is high, which after priming takes two advancing clocks.
module mlfg #(
  parameter int unsigned W     = 64,
  parameter int unsigned LAG_L = 17,
  parameter int unsigned LAG_K = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_valid_i,
  input  logic [W-1:0] ld_data_i,
  input  logic         en_i,
  output logic [W-1:0] rn_o,
  output logic         rn_valid_o,
  output logic         ready_o
);
  localparam int unsigned AW = $clog2(LAG_L);

  logic          primed_q;
  logic          adv;
  logic [AW-1:0] idx_q;       // n mod l of the read being issued
  logic [AW-1:0] ld_idx_q;
  logic [AW-1:0] raddr_l;
  logic [AW-1:0] raddr_k;
  logic [AW-1:0] widx1_q;     // index of the value whose operands are read
  logic [AW-1:0] widx2_q;     // index of the value in prod_q
  logic          v1_q;
  logic          v2_q;
  logic [W-1:0]  rd_l;
  logic [W-1:0]  rd_k;
  logic [W-1:0]  prod_q;
  logic          we;
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;

  assign adv     = primed_q & en_i & ~ld_valid_i;
  assign raddr_l = idx_q;
  assign raddr_k = (idx_q >= AW'(LAG_K)) ? idx_q - AW'(LAG_K)
                                         : idx_q + AW'(LAG_L - LAG_K);

  assign we    = ld_valid_i | (adv & v2_q);
  assign waddr = ld_valid_i ? ld_idx_q : widx2_q;
  assign wdata = ld_valid_i ? ld_data_i : prod_q;

  dpram #(.DW(W), .DEPTH(LAG_L)) u_ram_l (
    .clk     (clk),
    .we_i    (we),
    .waddr_i (waddr),
    .wdata_i (wdata),
    .re_i    (adv),
    .raddr_i (raddr_l),
    .rdata_o (rd_l)
  );

  dpram #(.DW(W), .DEPTH(LAG_L)) u_ram_k (
    .clk     (clk),
    .we_i    (we),
    .waddr_i (waddr),
    .wdata_i (wdata),
    .re_i    (adv),
    .raddr_i (raddr_k),
    .rdata_o (rd_k)
  );

  always_ff @(posedge clk) begin
    if (adv) begin
      widx1_q <= idx_q;
      widx2_q <= widx1_q;
      prod_q  <= rd_l * rd_k;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed_q <= 1'b0;
      ld_idx_q <= '0;
      idx_q    <= '0;
      v1_q     <= 1'b0;
      v2_q     <= 1'b0;
    end else if (ld_valid_i) begin
      v1_q  <= 1'b0;
      v2_q  <= 1'b0;
      idx_q <= '0;
      if (ld_idx_q == AW'(LAG_L - 1)) begin
        primed_q <= 1'b1;
        ld_idx_q <= '0;
      end else begin
        primed_q <= 1'b0;
        ld_idx_q <= ld_idx_q + 1'b1;
      end
    end else if (adv) begin
      idx_q <= (idx_q == AW'(LAG_L - 1)) ? '0 : idx_q + 1'b1;
      v1_q  <= 1'b1;
      v2_q  <= v1_q;
    end
  end

  assign rn_o       = prod_q;
  assign rn_valid_o = adv & v2_q;
  assign ready_o    = primed_q;

  // The short lag must exceed the two-step write-back latency.
  initial begin
    assert (LAG_K >= 3 && LAG_K < LAG_L)
      else $error("mlfg: lags need 3 <= LAG_K < LAG_L");
  end

endmodule
