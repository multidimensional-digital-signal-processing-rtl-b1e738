// Self-checking testbench of sap.
//
// Pushes random code words on random cycles while a random pc_ready pulls
// them out, and compares every word the PC side takes, and the fill level,
// with a queue model. A phase with pc_ready low fills the store until a push
// is refused: the overflow flag must rise and the refused word must not
// appear. Then clear must empty the store and drop the flag. Counts how
// often a word waited for pc_ready (a stall), an overflow and a clear
// happened, and fails if one of them never did.
module tb_sap;
  localparam int W = 24, DEPTH = 8;

  int checks = 0, failures = 0;
  int stalls = 0, overflows = 0, clears = 0, popped = 0;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clear = 1'b0, store = 1'b0, pc_ready = 1'b0;
  logic [W-1:0]  codes = '0, pc_data;
  logic          pc_valid, overflow;
  logic [3:0]    level;
  logic [W-1:0]  model [$];

  sap #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Compare outputs, then apply this cycle's inputs to the model at the edge.
  task automatic cycle(bit do_store, logic [W-1:0] word, bit ready, bit do_clear);
    bit expect_ovf, full_before;
    store = do_store; codes = word; pc_ready = ready; clear = do_clear;
    #1;
    chk("level", level == 4'(model.size()));
    chk("pc_valid", pc_valid == (model.size() != 0));
    if (model.size() != 0) chk("pc_data", pc_data == model[0]);
    if (pc_valid && !ready) stalls++;
    expect_ovf = overflow;
    full_before = (model.size() == DEPTH);
    @(posedge clk);
    if (do_clear) begin
      model.delete();
      clears++;
      expect_ovf = 1'b0;
    end else begin
      if (model.size() != 0 && ready) begin
        void'(model.pop_front());
        popped++;
      end
      if (do_store) begin
        // a push is refused only when the store was full before this edge
        if (!full_before) model.push_back(word);
        else begin
          expect_ovf = 1'b1;
          overflows++;
        end
      end
    end
    #1;
    chk("overflow flag", overflow == expect_ovf);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    // random traffic
    for (int i = 0; i < 400; i++)
      cycle($urandom_range(0, 1), W'($urandom), $urandom_range(0, 2) != 0, 1'b0);
    // drain
    for (int i = 0; i < 20; i++) cycle(1'b0, '0, 1'b1, 1'b0);
    chk("empty after drain", !pc_valid);
    // fill past the end with the PC not reading
    for (int i = 0; i < DEPTH + 3; i++) cycle(1'b1, W'($urandom), 1'b0, 1'b0);
    chk("full", level == 4'(DEPTH));
    chk("overflow raised", overflow);
    // read all back in order, overflow stays
    for (int i = 0; i < DEPTH + 2; i++) cycle(1'b0, '0, 1'b1, 1'b0);
    chk("overflow sticky", overflow);
    // some words, then clear
    for (int i = 0; i < 3; i++) cycle(1'b1, W'($urandom), 1'b0, 1'b0);
    cycle(1'b0, '0, 1'b0, 1'b1);
    chk("cleared", level == 0 && !overflow && !pc_valid);
    for (int i = 0; i < 4; i++) cycle(1'b1, W'($urandom), 1'b1, 1'b0);
    for (int i = 0; i < 6; i++) cycle(1'b0, '0, 1'b1, 1'b0);
    $display("stalls=%0d overflows=%0d clears=%0d words=%0d", stalls, overflows, clears, popped);
    chk("stall exercised", stalls > 0);
    chk("overflow exercised", overflows > 0);
    chk("clear exercised", clears > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
