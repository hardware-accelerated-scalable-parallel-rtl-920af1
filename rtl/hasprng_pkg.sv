// hasprng_pkg: types, constants and modular-arithmetic helpers shared by the
// HASPRNG generators and the verification platform.
//
// The moduli (2^31-1 for the CMRG lag part, 2^61-1 for the PMLCG) and the
// CMRG lag coefficients 107374182 and 104480 are the ones of the generator
// equations. The reduction helpers use the Mersenne property
// 2^k = 1 (mod 2^k-1): the high part of a wide value is folded onto the low
// part, then one conditional subtraction gives the canonical residue.
// The generator enumeration, the 32-bit capture word and the run-time
// configuration record are this design's own choices.
package hasprng_pkg;

  // Mersenne moduli of the CMRG lag part and of the PMLCG.
  localparam logic [30:0] M31 = 31'h7FFF_FFFF;
  localparam logic [60:0] M61 = 61'h1FFF_FFFF_FFFF_FFFF;

  // Coefficients of Y(n) = C1*Y(n-1) + C5*Y(n-5) mod (2^31-1).
  localparam logic [26:0] CMRG_C1 = 27'd107374182;
  localparam logic [16:0] CMRG_C5 = 17'd104480;

  // Word width of the capture DPRAM: 128 KB holding 32K numbers.
  localparam int unsigned CAP_W = 32;

  // Generator selected for a verification run.
  typedef enum logic [2:0] {
    GEN_LCG48 = 3'd0,
    GEN_LCG64 = 3'd1,
    GEN_CMRG  = 3'd2,
    GEN_MLFG  = 3'd3,
    GEN_PMLCG = 3'd4
  } gen_sel_e;

  // Run-time stream parameters written by the host processor at seeding.
  // a8/p8 are the look-ahead constants a' = a^8 and
  // p' = p*(a^7+...+a+1) of the eight-deep LCG pipeline.
  typedef struct packed {
    logic [47:0] lcg48_a8;
    logic [47:0] lcg48_p8;
    logic [63:0] lcg64_a8;
    logic [63:0] lcg64_p8;
    logic [63:0] cmrg_a8;
    logic [63:0] cmrg_p8;
    logic [60:0] pmlcg_a;
  } gen_cfg_t;

  // x mod (2^31-1) for x < 2^60.
  function automatic logic [30:0] mod_m31(input logic [59:0] x);
    logic [31:0] s1;
    logic [31:0] s2;
    s1 = {3'b0, x[59:31]} + {1'b0, x[30:0]};   // < 2^31 + 2^29
    s2 = {31'b0, s1[31]} + {1'b0, s1[30:0]};   // <= 2^31
    if (s2 >= {1'b0, M31}) s2 = s2 - {1'b0, M31};
    return s2[30:0];
  endfunction

  // x mod (2^61-1) for x < 2^122.
  function automatic logic [60:0] mod_m61(input logic [121:0] x);
    logic [61:0] s1;
    logic [61:0] s2;
    s1 = {1'b0, x[121:61]} + {1'b0, x[60:0]};  // < 2^62
    s2 = {60'b0, s1[61]} + {1'b0, s1[60:0]};   // <= 2^61
    if (s2 >= {1'b0, M61}) s2 = s2 - {1'b0, M61};
    return s2[60:0];
  endfunction

  // x * 2^s mod (2^61-1) for a canonical residue x: a 61-bit rotation.
  function automatic logic [60:0] rotl_m61(input logic [60:0] x, input int unsigned s);
    int unsigned r;
    r = s % 61;
    return (x << r) | (x >> (61 - r));
  endfunction

endpackage
