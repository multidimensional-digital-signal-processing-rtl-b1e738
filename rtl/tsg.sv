// Test signal generator (TSG): drives the stimulus vector U^In onto the board.
//
// The host loads a pattern of up to DEPTH words, each N bits wide (bit i is
// the level of stimulus node u_(i+1)^In), through a simple write port. A
// start pulse then plays words 0 .. cfg_len-1 in order, each held for
// cfg_period clock cycles, which is one sampling step T. All N nodes change
// on the same clock edge, which gives the simultaneous stimulation of all
// inputs that the method relies on. After the last word the outputs return
// to 0.
//
// Interface to the synchronisation block: `step` pulses for one cycle on the
// cycle in which a new word first appears on u_in, and `busy` is high from
// the first word until the last word has been held for its full step.
//
// Timing: u_in, step and busy are registered. The first word appears on the
// cycle after start. A start while busy is ignored. cfg_len = 0 plays
// nothing; cfg_period = 0 is treated as 1. The generator's function (drive
// U^In) is from the method; the pattern memory, the hold counter and this
// interface are this design's own choices.
module tsg #(
  parameter int unsigned N     = 7,    // stimulus nodes
  parameter int unsigned DEPTH = 256,  // pattern words
  parameter int unsigned DIV_W = 16,   // width of the step period
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host pattern write port
  input  logic             pat_we,
  input  logic [AW-1:0]    pat_addr,
  input  logic [N-1:0]     pat_wdata,
  // configuration, held stable while busy
  input  logic [DIV_W-1:0] cfg_period,  // clock cycles per step T
  input  logic [AW:0]      cfg_len,     // words to play, 0..DEPTH
  input  logic             start,
  // outputs
  output logic [N-1:0]     u_in,        // stimulus vector U^In
  output logic             step,        // a new word is on u_in
  output logic             busy
);

  logic [N-1:0]     mem [DEPTH];
  logic [AW:0]      idx;        // index of the next word to apply
  logic [DIV_W-1:0] hold;       // cycles the current word has been held
  logic [DIV_W-1:0] period_m1;

  assign period_m1 = (cfg_period == '0) ? '0 : cfg_period - 1'b1;

  always_ff @(posedge clk) begin
    if (pat_we) mem[pat_addr] <= pat_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_in <= '0;
      step <= 1'b0;
      busy <= 1'b0;
      idx  <= '0;
      hold <= '0;
    end else begin
      step <= 1'b0;
      if (!busy) begin
        if (start && cfg_len != '0) begin
          u_in <= mem[0];
          step <= 1'b1;
          busy <= 1'b1;
          idx  <= (AW+1)'(1);
          hold <= '0;
        end
      end else if (hold != period_m1) begin
        hold <= hold + 1'b1;
      end else begin
        hold <= '0;
        if (idx == cfg_len) begin
          u_in <= '0;
          busy <= 1'b0;
          idx  <= '0;
        end else begin
          u_in <= mem[idx[AW-1:0]];
          step <= 1'b1;
          idx  <= idx + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $error("tsg: DEPTH must be a power of two");
  end

endmodule
