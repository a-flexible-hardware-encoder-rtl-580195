// Stage controller of the four-stage encoder pipeline.
//
// Each stage reports a one-cycle finish pulse when its work for the current
// message block is complete. Once every stage that holds a block has
// finished, the controller sends one start pulse to all stages together, so
// the four stages always work on four consecutive blocks and move on in step.
// With each start it advances the buffer epoch, from which the stages derive
// which bank of each double (or four-fold) buffer they write and read, and it
// shifts the record of which stages hold a block: a stage with no block gets
// no start and counts as finished, which fills and drains the pipeline.
// Stage 1 takes in a message; if stage 1 has taken no bit yet and no message
// is offered while the others are done, the controller moves on with a bubble
// instead of waiting, so the last blocks leave the pipeline.
//
// The start/finish scheme follows the described design; the occupancy record,
// the bubble rule and the epoch counter are this design's choices.
// Timing: start is a registered pulse, issued the clock after the last finish.
module stage_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] finish,      // one-cycle finish pulses of stages 1..4
  input  logic       s1_empty,    // stage 1 has taken no message bit yet
  input  logic       msg_offered, // a message bit is offered at the input
  output logic       start,       // start pulse to the stages
  output logic [3:0] active,      // stages that hold a block (bit 0: stage 1)
  output logic [1:0] epoch,       // buffer epoch, advances with start
  output logic       bubble       // pulse: advanced with stage 1 empty
);

  logic       init_q;
  logic [3:0] fin_q;
  logic [3:0] done_w;
  logic       s1_ok;
  logic       advance;

  assign done_w  = fin_q | finish;
  assign s1_ok   = done_w[0] || (s1_empty && !msg_offered);
  assign advance = !init_q && !start && s1_ok &&
                   (done_w[1] || !active[1]) &&
                   (done_w[2] || !active[2]) &&
                   (done_w[3] || !active[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q <= 1'b1;
      fin_q  <= '0;
      start  <= 1'b0;
      active <= 4'b0000;
      epoch  <= '0;
      bubble <= 1'b0;
    end else begin
      start  <= 1'b0;
      bubble <= 1'b0;
      fin_q  <= done_w;
      if (init_q) begin
        init_q <= 1'b0;
        start  <= 1'b1;
        active <= 4'b0001;
        fin_q  <= '0;
      end else if (advance) begin
        start  <= 1'b1;
        epoch  <= epoch + 1'b1;
        active <= {active[2:1], done_w[0], 1'b1};
        bubble <= !done_w[0];
        fin_q  <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !advance)
    else $error("stage_controller: advance during start");

endmodule
