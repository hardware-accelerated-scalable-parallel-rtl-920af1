// cont2: master controller of the verification platform (Cont_2). It
// enables the generator under test, stops it when the local controller
// reports a full DPRAM, and enables it again when the processor reports that
// it has checked the buffer.
//
// States: IDLE (generator stopped, waiting for start_i after seeding), RUN
// (generator enabled) and PAUSE (buffer full, waiting for check_done_i).
// gen_en_o is low as soon as full_i rises, in the same clock, so the
// generator never runs past a full buffer. Leaving PAUSE pulses clear_o,
// which empties the local controller's counter, and counts one checked
// iteration; a start from IDLE also pulses clear_o. abort_i returns to IDLE
// from any state, as the processor does when a check fails. The stop/enable
// sequence follows the original verification platform; the state encoding,
// the start and abort inputs and the iteration counter are this design's own.
module cont2 #(
  parameter int unsigned ITW = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_i,
  input  logic           abort_i,
  input  logic           full_i,
  input  logic           check_done_i,
  output logic           gen_en_o,
  output logic           clear_o,
  output logic           buf_ready_o,
  output logic [ITW-1:0] iter_o
);
  typedef enum logic [1:0] {IDLE = 2'd0, RUN = 2'd1, PAUSE = 2'd2} state_e;

  state_e         state_q;
  logic [ITW-1:0] iter_q;

  assign gen_en_o    = (state_q == RUN) & ~full_i;
  assign clear_o     = (((state_q == PAUSE) & check_done_i) |
                        ((state_q == IDLE) & start_i)) & ~abort_i;
  assign buf_ready_o = (state_q == PAUSE);
  assign iter_o      = iter_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      iter_q  <= '0;
    end else if (abort_i) begin
      state_q <= IDLE;
    end else begin
      unique case (state_q)
        IDLE:    if (start_i) begin
                   state_q <= RUN;
                   iter_q  <= '0;
                 end
        RUN:     if (full_i) state_q <= PAUSE;
        PAUSE:   if (check_done_i) begin
                   state_q <= RUN;
                   iter_q  <= iter_q + 1'b1;
                 end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
