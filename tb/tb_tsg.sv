// Self-checking testbench of tsg.
//
// Loads a random pattern, plays it with several step periods and lengths
// and compares u_in, step and busy on every clock cycle with a cycle model
// of the generator kept in the testbench: word k is on u_in during cycles
// 1 + k*P .. (k+1)*P after the start pulse, step pulses at the first of
// them, busy covers all len*P cycles, and u_in is 0 otherwise. Also checks
// that a start while busy is ignored and that cfg_len = 0 plays nothing.
module tb_tsg;
  localparam int N = 7, DEPTH = 16, DIV_W = 8;

  int checks = 0, failures = 0;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             pat_we = 1'b0;
  logic [3:0]       pat_addr = '0;
  logic [N-1:0]     pat_wdata = '0;
  logic [DIV_W-1:0] cfg_period = 8'd1;
  logic [4:0]       cfg_len = '0;
  logic             start = 1'b0;
  logic [N-1:0]     u_in;
  logic             step, busy;
  logic [N-1:0]     pattern [DEPTH];

  tsg #(.N(N), .DEPTH(DEPTH), .DIV_W(DIV_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(string what, logic [N-1:0] eu, logic es, logic eb);
    checks++;
    if (u_in !== eu || step !== es || busy !== eb) begin
      failures++;
      $display("FAIL %s: u_in=%b step=%b busy=%b expected %b %b %b",
               what, u_in, step, busy, eu, es, eb);
    end
  endtask

  // Start a run and check every cycle until well after it ends.
  task automatic run(int unsigned period, int unsigned len, bit restart_midway);
    int unsigned p = (period == 0) ? 1 : period;
    cfg_period = DIV_W'(period);
    cfg_len    = 5'(len);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    // cycle c = 1 is the first cycle after the start edge
    for (int c = 1; c <= len * p + 3; c++) begin
      if (restart_midway && c == 2) start = 1'b1;
      if (restart_midway && c == 3) start = 1'b0;
      if (c <= len * p) begin
        int k = (c - 1) / p;
        expect_out($sformatf("P=%0d len=%0d cycle %0d", p, len, c),
                   pattern[k], ((c - 1) % p) == 0, 1'b1);
      end else begin
        expect_out($sformatf("P=%0d len=%0d idle cycle %0d", p, len, c),
                   '0, 1'b0, 1'b0);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      pattern[a] = N'($urandom);
      pat_we = 1'b1; pat_addr = 4'(a); pat_wdata = pattern[a];
      @(negedge clk);
    end
    pat_we = 1'b0;
    expect_out("after reset", '0, 1'b0, 1'b0);
    run(1, 5, 1'b0);
    run(3, 16, 1'b0);
    run(0, 4, 1'b0);     // period 0 behaves as 1
    run(4, 6, 1'b1);     // start while busy ignored
    run(2, 0, 1'b0);     // nothing played
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
