// Synchronisation block (SYN): times the storage of approximation codes.
//
// The test signal generator reports each new stimulus word with a one-cycle
// `step` pulse. SYN answers each step with one `store` pulse, cfg_delay + 1
// clock cycles later, so that the codes are captured after the stimulus has
// propagated through the board, the differentiators and the comparators.
// The delay must be shorter than the step period; a step that arrives while
// a store is still pending restarts the delay, and the pending store is
// lost and counted in `missed`.
//
// It also frames an acquisition: `frame_start` marks the first store after
// the generator became busy, `frame_end` pulses once the generator is idle
// and no store is pending, and `sample_n` numbers the stores of the frame
// (the step index n of the reconstruction rule). The method only names this
// block and its role; the delay, the framing signals and their timing are
// this design's own choices.
//
// Timing: all outputs are registered.
module syn #(
  parameter int unsigned DLY_W = 16,   // width of the capture delay
  parameter int unsigned CNT_W = 16    // width of the sample counter
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,        // from the generator
  input  logic             busy,        // from the generator
  input  logic [DLY_W-1:0] cfg_delay,   // extra cycles from step to store
  output logic             store,       // capture strobe to the code store
  output logic             frame_start, // with the first store of a frame
  output logic             frame_end,   // frame complete
  output logic [CNT_W-1:0] sample_n,    // index of the current store
  output logic [CNT_W-1:0] missed       // stores lost to a too long delay
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t           state;
  logic             armed;      // a store is pending
  logic [DLY_W-1:0] wait_cnt;
  logic             first;      // the next store opens the frame
  logic             fire;

  assign fire = armed && (wait_cnt == cfg_delay);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      armed       <= 1'b0;
      wait_cnt    <= '0;
      first       <= 1'b0;
      store       <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      sample_n    <= '0;
      missed      <= '0;
    end else begin
      store       <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;

      if (step) begin
        if (armed && !fire) missed <= missed + 1'b1;
        armed    <= 1'b1;
        wait_cnt <= '0;
      end else if (armed) begin
        if (fire) armed <= 1'b0;
        else      wait_cnt <= wait_cnt + 1'b1;
      end

      if (fire) begin
        store       <= 1'b1;
        frame_start <= first;
        first       <= 1'b0;
        sample_n    <= first ? '0 : sample_n + 1'b1;
      end

      unique case (state)
        S_IDLE: if (step) begin
          state  <= S_RUN;
          first  <= 1'b1;
          missed <= '0;
        end
        S_RUN: if (!busy && !step) state <= S_DRAIN;
        S_DRAIN: if (!armed) begin
          state     <= S_IDLE;
          frame_end <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
