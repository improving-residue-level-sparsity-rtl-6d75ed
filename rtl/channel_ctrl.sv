// channel_ctrl: run control and per-channel deactivation.
//
// Because the regularized weights leave each residue channel with its own
// sparsity, the zero-skipping channels finish a layer at different times
// and the dense channels take the full vector length.  This controller
// starts all N channels together, and switches off each one (ch_active low,
// the enable that gates the channel's PE array) as soon as that channel
// reports completion, while the others keep running.  `done` rises when
// every channel has finished and stays up until the next `start`.
//
// Timing: `start` is registered; in the following cycle `ch_start` pulses
// (it restarts the decoders and clears the PE arrays) and all ch_active
// bits are 1.  A channel's ch_done is ignored during that pulse, since it
// may still show the previous run.  ch_active[k] falls the cycle after
// ch_done[k] is seen.  Deactivating a finished channel follows the
// document; the start/clear sequencing is this design's choice.
module channel_ctrl #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] ch_done,
  output logic         ch_start,
  output logic [N-1:0] ch_active,
  output logic         busy,
  output logic         done
);

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DONE} cstate_e;

  cstate_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      ch_start  <= 1'b0;
      ch_active <= '0;
    end else if (start) begin
      state     <= C_RUN;
      ch_start  <= 1'b1;
      ch_active <= '1;
    end else begin
      ch_start <= 1'b0;
      if (state == C_RUN && !ch_start) begin
        ch_active <= ch_active & ~ch_done;
        if ((ch_active & ~ch_done) == '0) state <= C_DONE;
      end
    end
  end

  assign busy = (state == C_RUN);
  assign done = (state == C_DONE);

  // A channel, once switched off, stays off until the next start.
  a_gate: assert property (@(posedge clk) disable iff (!rst_n || start)
    busy && !ch_start |=> (ch_active & ~$past(ch_active)) == '0);

endmodule
