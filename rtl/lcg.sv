// lcg: linear congruential generator with prime addend,
// Z(n) = a*Z(n-1) + p mod 2^W, producing one number per clock.
//
// The recurrence is unrolled eight steps so that its feedback loop can hold a
// seven-stage pipelined multiplier plus the addend register:
// Z(n) = a'*Z(n-8) + p' mod 2^W, with a' = a^8 and
// p' = p*(a^7+a^6+...+a+1). Eight independent values circulate in the loop,
// each re-entering the multiplier as soon as it leaves the adder, so the loop
// yields a new number every clock. The same module serves the 48-bit (W=48)
// and 64-bit (W=64) generators and the LCG half of the CMRG. The look-ahead
// transform and the seven multiplier stages follow the original HASPRNG
// design; the loading protocol and the stall handshake are this design's own.
//
// Interface:
//   a8_i, p8_i   a' and p', supplied by the host that seeds the stream.
//   ld_valid_i   loads ld_data_i into the loop. Eight loads, oldest first,
//                of the states Z(k-7)..Z(k) prime the generator; it then
//                continues with Z(k+1). A load always restarts priming.
//   en_i         advance: while primed, a number is taken on every clock
//                with en_i high; with en_i low the loop holds.
//   rn_o         current number; valid when rn_valid_o = ready_o & en_i.
//   ready_o      the generator is primed.
// Timing: the first number is available the clock after the eighth load;
// one number per enabled clock afterwards.
module lcg #(
  parameter int unsigned W      = 48,
  parameter int unsigned STAGES = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a8_i,
  input  logic [W-1:0] p8_i,
  input  logic         ld_valid_i,
  input  logic [W-1:0] ld_data_i,
  input  logic         en_i,
  output logic [W-1:0] rn_o,
  output logic         rn_valid_o,
  output logic         ready_o
);
  // Values in flight in the loop: multiplier stages plus the adder register.
  localparam int unsigned DEPTH = STAGES + 1;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [W-1:0]  z_q;      // adder register, the current number
  logic [W-1:0]  mul_in;
  logic [W-1:0]  mul_out;
  logic          adv;
  logic          primed_q;
  logic [CW-1:0] ld_cnt_q;

  assign adv    = ld_valid_i | (primed_q & en_i);
  assign mul_in = ld_valid_i ? ld_data_i : z_q;

  pipe_mult #(.W(W), .STAGES(STAGES)) u_mult (
    .clk  (clk),
    .en_i (adv),
    .a_i  (a8_i),
    .b_i  (mul_in),
    .p_o  (mul_out)
  );

  always_ff @(posedge clk) begin
    if (adv) z_q <= mul_out + p8_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed_q <= 1'b0;
      ld_cnt_q <= '0;
    end else if (ld_valid_i) begin
      if (ld_cnt_q == CW'(DEPTH - 1)) begin
        primed_q <= 1'b1;
        ld_cnt_q <= '0;
      end else begin
        primed_q <= 1'b0;
        ld_cnt_q <= ld_cnt_q + 1'b1;
      end
    end
  end

  assign rn_o       = z_q;
  assign ready_o    = primed_q;
  assign rn_valid_o = primed_q & en_i & ~ld_valid_i;

endmodule
