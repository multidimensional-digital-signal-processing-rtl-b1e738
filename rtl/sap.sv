// Storage and PC interface (SAP): the code store of the tester.
//
// Every `store` strobe pushes one word, the approximation codes of all K
// observed nodes captured in the same clock cycle, into a memory of DEPTH
// words. The words leave in the order they were pushed, through a
// valid/ready stream towards the host PC, so the host receives the code
// sequence of each node in time order, as its reconstruction rule needs.
// Reading may overlap writing. A push into a full store is dropped and sets
// the sticky `overflow` flag; `clear` empties the store and clears the flag.
//
// The method calls this memory a stack and says only that it holds the
// sequences of codes and that its contents go to the PC; first-in first-out
// order, the stream handshake, the depth and the overflow policy are this
// design's own choices.
//
// Timing: a pushed word can be read from the cycle after the push. pc_data
// is valid whenever pc_valid is high and is taken on a cycle with pc_valid
// and pc_ready both high. `level` counts the words held. rst_n also
// disables the stream assertion below, which is why lint sees it used both
// as an asynchronous reset and as a synchronous signal; no logic uses it so.
module sap #(
  parameter int unsigned W     = 24,    // word width, K codes of 3 bits
  parameter int unsigned DEPTH = 1024,  // words held
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // from the synchronisation block and the fuzzy logic units
  input  logic          store,
  input  logic [W-1:0]  codes,
  // to the PC
  output logic [W-1:0]  pc_data,
  output logic          pc_valid,
  input  logic          pc_ready,
  // status
  output logic [AW:0]   level,
  output logic          overflow
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign pc_valid = (level != '0);
  assign pc_data  = mem[rd_ptr];
  assign pop      = pc_valid && pc_ready;
  assign push     = store && (level != (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= codes;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      level    <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      if (push && !pop)      level <= level + 1'b1;
      else if (pop && !push) level <= level - 1'b1;
      if (store && !push) overflow <= 1'b1;
    end
  end

  // Stream rule: a word offered to the PC stays offered, unchanged, until it
  // is taken (clear excepted).
  property p_hold;
    @(posedge clk) disable iff (!rst_n || clear)
      (pc_valid && !pc_ready) |=> (pc_valid && $stable(pc_data));
  endproperty
  a_hold: assert property (p_hold);

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $error("sap: DEPTH must be a power of two");
  end

endmodule
