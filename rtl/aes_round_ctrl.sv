// aes_round_ctrl: sequencer for one 128-bit block through the round
// datapath, one transformation per clock.
//
// Because a register follows every transformation, a block takes 40 clock
// edges: the edge that accepts it (initial AddRoundKey, STEP_LOAD), then
// SubBytes, ShiftRows, MixColumn and AddRoundKey for rounds 1 to 9, then
// SubBytes, ShiftRows and AddRoundKey for round 10. The counter cnt numbers
// these edges 0 .. 39; step tells the datapath which transformation its
// register loads on the coming edge and round which round it belongs to.
//
// start is accepted only when the sequencer is idle (busy low); that edge is
// edge 0. key_step marks the ShiftRows edge of every round, where an
// on-the-fly key schedule advances so that round key r is ready for the
// AddRoundKey two (round 10: one) edges later. last marks edge 39, where
// the finished block leaves the datapath. The 40-cycle count is the one the
// design reports for encryption; the counter itself is this design's choice.
// Reset is asynchronous and active high.
module aes_round_ctrl
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   start,
  output logic   busy,
  output step_e  step,
  output round_t round,
  output logic   key_step,
  output logic   last
);

  logic [5:0] cnt;   // index of the coming edge while busy, 1 .. 39
  logic [5:0] pos;   // position inside rounds 1 .. 9: cnt - 1

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cnt  <= 6'd1;
      end
    end else if (cnt == 6'(BLOCK_CYCLES - 1)) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else begin
      cnt <= cnt + 6'd1;
    end
  end

  assign pos = cnt - 6'd1;

  always_comb begin
    step     = STEP_IDLE;
    round    = '0;
    key_step = 1'b0;
    last     = 1'b0;
    if (!busy) begin
      if (start) step = STEP_LOAD;
    end else if (cnt <= 6'((NUM_ROUNDS - 1) * STEPS_ROUND)) begin
      round = round_t'(pos[5:2] + 4'd1);
      unique case (pos[1:0])
        2'd0: step = STEP_SUB;
        2'd1: step = STEP_SHIFT;
        2'd2: step = STEP_MIX;
        default: step = STEP_ARK;
      endcase
      key_step = (pos[1:0] == 2'd1);
    end else begin
      round = round_t'(NUM_ROUNDS);
      unique case (cnt)
        6'd37:   step = STEP_SUB;
        6'd38:   step = STEP_SHIFT;
        default: step = STEP_ARK;
      endcase
      key_step = (cnt == 6'd38);
      last     = (cnt == 6'(BLOCK_CYCLES - 1));
    end
  end

  a_cnt_range : assert property (@(posedge clk) disable iff (reset)
    busy |-> (cnt >= 6'd1 && cnt <= 6'(BLOCK_CYCLES - 1)));

endmodule
