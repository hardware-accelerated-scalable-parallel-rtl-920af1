// pipe_mult: pipelined W x W multiplier keeping the low W bits of the product
// (the product modulo 2^W), used in the loop of the linear congruential
// generators.
//
// The multiplier operand b is cut into STAGES digits of CH bits. Stage i adds
// the partial product a * digit_i, shifted by i*CH, to the running sum and
// hands a, b and the sum on to the next stage, so one new operand pair can
// enter every clock and its product leaves STAGES clocks later. Seven stages
// follow the original HASPRNG design; the digit split is this design's own
// choice of how to build the stages.
//
// Interface: en_i advances every stage at once (a stalled pipeline holds its
// contents). Timing: p_o is the product of the operands presented STAGES
// advancing edges earlier. The datapath has no reset: its contents only
// matter after STAGES advances with defined operands.
module pipe_mult #(
  parameter int unsigned W      = 64,
  parameter int unsigned STAGES = 7
) (
  input  logic         clk,
  input  logic         en_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] p_o
);
  localparam int unsigned CH = (W + STAGES - 1) / STAGES;  // digit width
  localparam int unsigned BW = CH * STAGES;                // padded b width

  logic [W-1:0]  a_q   [STAGES];
  logic [BW-1:0] b_q   [STAGES];
  logic [W-1:0]  acc_q [STAGES];

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic [W-1:0]  a_in;
    logic [BW-1:0] b_in;
    logic [W-1:0]  acc_in;
    logic [W-1:0]  pp;

    if (i == 0) begin : g_first
      assign a_in   = a_i;
      assign b_in   = BW'(b_i);
      assign acc_in = '0;
    end else begin : g_next
      assign a_in   = a_q[i-1];
      assign b_in   = b_q[i-1];
      assign acc_in = acc_q[i-1];
    end

    // Partial product of this stage's digit, aligned and truncated to W bits.
    always_comb begin
      logic [W-1:0] digit;
      digit = W'(b_in[i*CH +: CH]);
      pp    = (a_in * digit) << (i * CH);
    end

    always_ff @(posedge clk) begin
      if (en_i) begin
        a_q[i]   <= a_in;
        b_q[i]   <= b_in;
        acc_q[i] <= acc_in + pp;
      end
    end
  end

  assign p_o = acc_q[STAGES-1];

endmodule
