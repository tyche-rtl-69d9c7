// p-circuit controller: the accelerator's six-state machine.
//
//   S0_CONFIG  idle; J, h and the run settings may be written. start -> S1 with
//              i = 1 and no sample completed.
//   S1_GETSEQ  look up the i-th p-bit of the current update sequence; its J row
//              and h entry are read from memory.
//   S2_WEIGHT  the p-bit core computes and registers I_i.
//   S3_UPDATE  the p-bit core writes the new value of the p-bit into m_Reg.
//              If i < N_m: i <- i + 1, back to S1. Otherwise one more sample is
//              complete: go to S4.
//   S4_SAMPLE  a sample (one update of every p-bit) is complete; the sequence
//              register moves to the next update order. If fewer than N_s
//              samples are complete: i <- 1, back to S1; else S5.
//   S5_DONE    done = 1. Waits for start to fall, then returns to S0.
// A sample therefore takes 3*N_m + 1 cycles and a run N_s*(3*N_m + 1) cycles
// after the start cycle.
//
// States and transitions follow the original state machine. This design's
// choices: S4 compares the count of completed samples with N_s, so exactly N_s
// samples run (the printed guards, taken literally, would run N_s - 1); the exit
// from S5 on start = 0; N_s = 0 runs one sample. i_idx is 0-based.
module tyche_fsm
  import tyche_pkg::*;
#(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned NS_W   = 32,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [R:0]      nm,       // latched N_m (valid from S1 on)
  input  logic [NS_W-1:0] ns,       // latched N_s (valid from S1 on)
  output state_t          state,
  output logic [R-1:0]    i_idx,    // position in the update sequence, 0-based
  output logic            launch,   // S0 -> S1 this cycle
  output logic            next_seq, // S4: move to the next update order
  output logic            done
);

  state_t          state_d;
  logic [R-1:0]    i_d;
  logic [NS_W-1:0] samples_q, samples_d;   // completed samples

  always_comb begin
    state_d   = state;
    i_d       = i_idx;
    samples_d = samples_q;
    launch    = 1'b0;
    unique case (state)
      S0_CONFIG: if (start) begin
        state_d   = S1_GETSEQ;
        i_d       = '0;
        samples_d = '0;
        launch    = 1'b1;
      end
      S1_GETSEQ: state_d = S2_WEIGHT;
      S2_WEIGHT: state_d = S3_UPDATE;
      S3_UPDATE: begin
        if ((32'(i_idx) + 32'd1) < 32'(nm)) begin
          i_d     = i_idx + 1'b1;
          state_d = S1_GETSEQ;
        end else begin
          samples_d = samples_q + 1'b1;
          state_d   = S4_SAMPLE;
        end
      end
      S4_SAMPLE: begin
        if ((samples_q < ns) && (ns != '0)) begin
          i_d     = '0;
          state_d = S1_GETSEQ;
        end else begin
          state_d = S5_DONE;
        end
      end
      S5_DONE: if (!start) state_d = S0_CONFIG;
      default: state_d = S0_CONFIG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S0_CONFIG;
      i_idx     <= '0;
      samples_q <= '0;
    end else begin
      state     <= state_d;
      i_idx     <= i_d;
      samples_q <= samples_d;
    end
  end

  assign next_seq = (state == S4_SAMPLE);
  assign done     = (state == S5_DONE);

  // The sample count never passes N_s once a run is under way.
  a_samples_bounded: assert property (@(posedge clk)
    (state == S4_SAMPLE) |-> (samples_q <= ns || ns == '0));

endmodule
