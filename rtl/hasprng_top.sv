// hasprng_top: the HASPRNG generator bank inside its hardware verification
// platform.
//
// Five generators run side by side: the 48-bit and 64-bit LCGs (one number
// per clock), the CMRG (every other clock), the multiplicative LFG (one per
// clock) and the PMLCG (every other clock). gen_sel_i picks the generator
// under test; only that one is enabled, by the master controller (cont2).
// The most significant 32 bits of each number it produces are written by the
// local controller (cont1) into a 32K x 32-bit (128 KB) dual-port RAM. When
// the RAM is full, cont1 tells cont2, which stops the generator and raises
// buf_ready_o. The host processor then reads the RAM through the rd_* port,
// compares every word bit by bit with its software reference, and pulses
// check_done_i; cont2 clears cont1 and enables the generator again, and the
// stream continues where it stopped. abort_i stops a run.
//
// Seeding is done by the host: ld_valid_i writes ld_data_i into the
// generator named by ld_gen_i (ld_sel_i picks the CMRG half: 0 = LCG
// states, 1 = lag states). cfg_i holds the stream constants. Change
// gen_sel_i only while the platform is idle. The platform structure and the
// 32K / 128 KB buffer follow the original verification platform; the 32-bit
// capture of the most significant bits, the seeding port and the control
// handshakes are this design's own.
//
// Status outputs: gen_en_o is the enable of the generator under test,
// gen_ready_o[g] shows that generator g is seeded, fill_o is the number of
// words in the capture RAM. The host read port has one clock of latency.
module hasprng_top
  import hasprng_pkg::*;
#(
  parameter int unsigned CAP_DEPTH   = 32768,
  parameter int unsigned MLFG_LAG_L  = 17,
  parameter int unsigned MLFG_LAG_K  = 5,
  parameter int unsigned PMLCG_SHIFT = 32,
  parameter int unsigned CAP_AW      = $clog2(CAP_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gen_cfg_t          cfg_i,
  input  gen_sel_e          gen_sel_i,
  input  logic              ld_valid_i,
  input  gen_sel_e          ld_gen_i,
  input  logic              ld_sel_i,
  input  logic [63:0]       ld_data_i,
  input  logic              start_i,
  input  logic              abort_i,
  input  logic              check_done_i,
  output logic              buf_ready_o,
  output logic [31:0]       iter_o,
  output logic              gen_en_o,
  output logic [4:0]        gen_ready_o,
  output logic [CAP_AW:0]   fill_o,
  input  logic              rd_en_i,
  input  logic [CAP_AW-1:0] rd_addr_i,
  output logic [CAP_W-1:0]  rd_data_o
);
  logic              gen_en;
  logic              full;
  logic              clear;
  logic              cap_valid;
  logic [CAP_W-1:0]  cap_data;
  logic              ram_we;
  logic [CAP_AW-1:0] ram_waddr;
  logic [CAP_W-1:0]  ram_wdata;
  logic [CAP_AW:0]   count;

  logic [47:0] lcg48_rn;
  logic [63:0] lcg64_rn, cmrg_rn, mlfg_rn;
  logic [60:0] pmlcg_rn;
  logic [4:0]  valid, ready, en, ld;

  // Load and enable steering.
  always_comb begin
    for (int g = 0; g < 5; g++) begin
      ld[g] = ld_valid_i && (ld_gen_i == gen_sel_e'(g));
      en[g] = gen_en     && (gen_sel_i == gen_sel_e'(g));
    end
  end

  lcg #(.W(48), .STAGES(7)) u_lcg48 (
    .clk, .rst_n,
    .a8_i (cfg_i.lcg48_a8), .p8_i (cfg_i.lcg48_p8),
    .ld_valid_i (ld[GEN_LCG48]), .ld_data_i (ld_data_i[47:0]),
    .en_i (en[GEN_LCG48]),
    .rn_o (lcg48_rn), .rn_valid_o (valid[GEN_LCG48]), .ready_o (ready[GEN_LCG48])
  );

  lcg #(.W(64), .STAGES(7)) u_lcg64 (
    .clk, .rst_n,
    .a8_i (cfg_i.lcg64_a8), .p8_i (cfg_i.lcg64_p8),
    .ld_valid_i (ld[GEN_LCG64]), .ld_data_i (ld_data_i),
    .en_i (en[GEN_LCG64]),
    .rn_o (lcg64_rn), .rn_valid_o (valid[GEN_LCG64]), .ready_o (ready[GEN_LCG64])
  );

  cmrg u_cmrg (
    .clk, .rst_n,
    .a8_i (cfg_i.cmrg_a8), .p8_i (cfg_i.cmrg_p8),
    .ld_valid_i (ld[GEN_CMRG]), .ld_sel_i (ld_sel_i), .ld_data_i (ld_data_i),
    .en_i (en[GEN_CMRG]),
    .rn_o (cmrg_rn), .rn_valid_o (valid[GEN_CMRG]), .ready_o (ready[GEN_CMRG])
  );

  mlfg #(.W(64), .LAG_L(MLFG_LAG_L), .LAG_K(MLFG_LAG_K)) u_mlfg (
    .clk, .rst_n,
    .ld_valid_i (ld[GEN_MLFG]), .ld_data_i (ld_data_i),
    .en_i (en[GEN_MLFG]),
    .rn_o (mlfg_rn), .rn_valid_o (valid[GEN_MLFG]), .ready_o (ready[GEN_MLFG])
  );

  pmlcg #(.SHIFT(PMLCG_SHIFT)) u_pmlcg (
    .clk, .rst_n,
    .a_i (cfg_i.pmlcg_a),
    .ld_valid_i (ld[GEN_PMLCG]), .ld_data_i (ld_data_i[60:0]),
    .en_i (en[GEN_PMLCG]),
    .rn_o (pmlcg_rn), .rn_valid_o (valid[GEN_PMLCG]), .ready_o (ready[GEN_PMLCG])
  );

  // Most significant 32 bits of the selected generator's number; the low
  // bits of the wider numbers are not captured.
  always_comb begin
    unique case (gen_sel_i)
      GEN_LCG48: cap_data = lcg48_rn[47:16];
      GEN_LCG64: cap_data = lcg64_rn[63:32];
      GEN_CMRG:  cap_data = cmrg_rn[63:32];
      GEN_MLFG:  cap_data = mlfg_rn[63:32];
      GEN_PMLCG: cap_data = pmlcg_rn[60:29];
      default:   cap_data = '0;
    endcase
    cap_valid = |(valid & en);
  end

  cont1 #(.DW(CAP_W), .DEPTH(CAP_DEPTH)) u_cont1 (
    .clk, .rst_n,
    .rn_valid_i  (cap_valid),
    .rn_data_i   (cap_data),
    .clear_i     (clear),
    .ram_we_o    (ram_we),
    .ram_waddr_o (ram_waddr),
    .ram_wdata_o (ram_wdata),
    .full_o      (full),
    .count_o     (count)
  );

  cont2 #(.ITW(32)) u_cont2 (
    .clk, .rst_n,
    .start_i      (start_i),
    .abort_i      (abort_i),
    .full_i       (full),
    .check_done_i (check_done_i),
    .gen_en_o     (gen_en),
    .clear_o      (clear),
    .buf_ready_o  (buf_ready_o),
    .iter_o       (iter_o)
  );

  dpram #(.DW(CAP_W), .DEPTH(CAP_DEPTH)) u_capture (
    .clk,
    .we_i    (ram_we),
    .waddr_i (ram_waddr),
    .wdata_i (ram_wdata),
    .re_i    (rd_en_i),
    .raddr_i (rd_addr_i),
    .rdata_o (rd_data_o)
  );

  assign gen_en_o    = gen_en;
  assign gen_ready_o = ready;
  assign fill_o      = count;

endmodule
