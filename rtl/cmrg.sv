// cmrg: combined multiple recursive generator,
// Z(n) = X(n) + Y(n)*2^32 mod 2^64, one number every other clock.
//
// X(n) comes from a 64-bit LCG (the lcg module, W=64). Y(n) comes from a
// lagged recursion Y(n) = 107374182*Y(n-1) + 104480*Y(n-5) mod (2^31-1),
// built as the original HASPRNG design specifies: a register holding
// Y(n-1), a four-deep FIFO of registers holding Y(n-2)..Y(n-5), two multipliers and
// combinational reduction logic. Y(n) depends on Y(n-1), and the loop takes
// two clocks (phase 0: both products are registered; phase 1: sum, Mersenne
// reduction, combination with X(n) and shift of the FIFO), so a number is
// produced every other clock. The LCG half advances only in phase 1.
// The two-phase split, loading protocol and handshake are this design's own.
//
// Interface:
//   a8_i, p8_i    look-ahead constants of the 64-bit LCG half (see lcg).
//   ld_valid_i    loads ld_data_i: with ld_sel_i = 0 into the LCG half (eight
//                 states, oldest first, see lcg); with ld_sel_i = 1 into the
//                 lag part (five states Y(k-4)..Y(k), oldest first, low 31
//                 bits used, each below 2^31-1). Both halves must be loaded
//                 with states of the same index k; output resumes at k+1.
//   en_i          advance; while both halves are primed the generator steps
//                 on every clock with en_i high.
//   rn_o          the number, valid when rn_valid_o is high (a phase-1
//                 clock with en_i high).
module cmrg
  import hasprng_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] a8_i,
  input  logic [63:0] p8_i,
  input  logic        ld_valid_i,
  input  logic        ld_sel_i,
  input  logic [63:0] ld_data_i,
  input  logic        en_i,
  output logic [63:0] rn_o,
  output logic        rn_valid_o,
  output logic        ready_o
);
  localparam int unsigned YLAGS = 5;

  logic [30:0] y1_q;            // Y(n-1)
  logic [30:0] fifo_q [4];      // Y(n-2) .. Y(n-5)
  logic [57:0] prod1_q;         // C1 * Y(n-1)
  logic [47:0] prod5_q;         // C5 * Y(n-5)
  logic        phase_q;
  logic        y_primed_q;
  logic [2:0]  y_cnt_q;
  logic        x_ready;
  logic        x_en;
  logic [63:0] x_rn;
  logic        x_valid;
  logic        run;
  logic [30:0] y_new;

  assign run  = en_i & y_primed_q & x_ready & ~ld_valid_i;
  assign x_en = run & phase_q;

  lcg #(.W(64), .STAGES(7)) u_x (
    .clk        (clk),
    .rst_n      (rst_n),
    .a8_i       (a8_i),
    .p8_i       (p8_i),
    .ld_valid_i (ld_valid_i & ~ld_sel_i),
    .ld_data_i  (ld_data_i),
    .en_i       (x_en),
    .rn_o       (x_rn),
    .rn_valid_o (x_valid),
    .ready_o    (x_ready)
  );

  // Phase 1 combinational logic: sum of the products reduced mod 2^31-1.
  assign y_new = mod_m31({2'b0, prod1_q} + {12'b0, prod5_q});

  // Phase 0: the two lag multipliers.
  always_ff @(posedge clk) begin
    if (run && !phase_q) begin
      prod1_q <= y1_q * CMRG_C1;
      prod5_q <= fifo_q[3] * CMRG_C5;
    end
  end

  // Y(n-1) register and the four-deep FIFO, shifted by loads and by phase 1.
  always_ff @(posedge clk) begin
    if ((ld_valid_i && ld_sel_i) || (run && phase_q)) begin
      y1_q      <= (ld_valid_i && ld_sel_i) ? ld_data_i[30:0] : y_new;
      fifo_q[0] <= y1_q;
      for (int i = 1; i < 4; i++) fifo_q[i] <= fifo_q[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q    <= 1'b0;
      y_primed_q <= 1'b0;
      y_cnt_q    <= '0;
    end else begin
      if (ld_valid_i) phase_q <= 1'b0;
      else if (run)   phase_q <= ~phase_q;
      if (ld_valid_i && ld_sel_i) begin
        if (y_cnt_q == 3'(YLAGS - 1)) begin
          y_primed_q <= 1'b1;
          y_cnt_q    <= '0;
        end else begin
          y_primed_q <= 1'b0;
          y_cnt_q    <= y_cnt_q + 1'b1;
        end
      end
    end
  end

  assign rn_o       = x_rn + {1'b0, y_new, 32'b0};
  assign rn_valid_o = x_valid;
  assign ready_o    = y_primed_q & x_ready;

endmodule
