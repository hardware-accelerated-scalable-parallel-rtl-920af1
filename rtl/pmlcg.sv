// pmlcg: prime modulus linear congruential generator,
// Z(n) = a * Z(n-1) * 2^SHIFT mod (2^61-1), one number every other clock.
//
// The 61 x 61-bit product a*Z(n-1) is formed from four partial products of
// the operand halves (low 32 bits, high 29 bits), one multiplier each, as
// the four pipelined multipliers of the original design. Phase 0 registers
// the four partial products; phase 1 adds them into the 122-bit product, folds
// it modulo the Mersenne prime 2^61-1 (2^61 = 1), multiplies by 2^SHIFT,
// which modulo 2^61-1 is a 61-bit rotation, and writes Z(n) back. The loop
// therefore takes two clocks and the generator yields a number every other
// clock. SHIFT = 32 is the factor printed in the generator equation; the
// operand split, two-phase schedule, load protocol and handshake are this
// design's own.
//
// Interface: ld_valid_i loads the state Z(k) (1 <= Z(k) < 2^61-1) and primes
// the generator; a_i is the stream multiplier (below 2^61-1). While primed,
// the generator steps on each clock with en_i high; rn_o = Z(n) is valid on
// the phase-1 clocks (rn_valid_o), starting with Z(k+1).
module pmlcg
  import hasprng_pkg::*;
#(
  parameter int unsigned SHIFT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [60:0] a_i,
  input  logic        ld_valid_i,
  input  logic [60:0] ld_data_i,
  input  logic        en_i,
  output logic [60:0] rn_o,
  output logic        rn_valid_o,
  output logic        ready_o
);
  logic [60:0]  z_q;
  logic [63:0]  pp_ll_q;     // a[31:0]  * z[31:0]
  logic [60:0]  pp_lh_q;     // a[31:0]  * z[60:32]
  logic [60:0]  pp_hl_q;     // a[60:32] * z[31:0]
  logic [57:0]  pp_hh_q;     // a[60:32] * z[60:32]
  logic [121:0] prod;
  logic [60:0]  z_new;
  logic         phase_q;
  logic         primed_q;
  logic         run;

  assign run = en_i & primed_q & ~ld_valid_i;

  // Phase 0: the four partial-product multipliers.
  always_ff @(posedge clk) begin
    if (run && !phase_q) begin
      pp_ll_q <= a_i[31:0]  * z_q[31:0];
      pp_lh_q <= a_i[31:0]  * z_q[60:32];
      pp_hl_q <= a_i[60:32] * z_q[31:0];
      pp_hh_q <= a_i[60:32] * z_q[60:32];
    end
  end

  // Phase 1: sum, reduce modulo 2^61-1, scale by 2^SHIFT.
  always_comb begin
    prod  = 122'(pp_ll_q)
          + (122'(pp_lh_q) << 32)
          + (122'(pp_hl_q) << 32)
          + (122'(pp_hh_q) << 64);
    z_new = rotl_m61(mod_m61(prod), SHIFT);
  end

  always_ff @(posedge clk) begin
    if (ld_valid_i)           z_q <= ld_data_i;
    else if (run && phase_q)  z_q <= z_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= 1'b0;
      primed_q <= 1'b0;
    end else if (ld_valid_i) begin
      phase_q  <= 1'b0;
      primed_q <= 1'b1;
    end else if (run) begin
      phase_q  <= ~phase_q;
    end
  end

  assign rn_o       = z_new;
  assign rn_valid_o = run & phase_q;
  assign ready_o    = primed_q;

endmodule
