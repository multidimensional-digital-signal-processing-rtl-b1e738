// Self-checking testbench of syn.
//
// Drives syn with the step/busy pattern of the generator (steps every P
// cycles while busy) for several periods and delays, and checks on every
// cycle that `store` pulses exactly D + 2 cycles after each step, that
// sample_n numbers the stores 0, 1, 2, ..., that frame_start comes with the
// first store only and that frame_end pulses once, on the cycle after the
// last store. A run with D >= P must report the lost stores in `missed`.
module tb_syn;
  localparam int DLY_W = 8, CNT_W = 16;

  int checks = 0, failures = 0;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             step = 1'b0, busy = 1'b0;
  logic [DLY_W-1:0] cfg_delay = '0;
  logic             store, frame_start, frame_end;
  logic [CNT_W-1:0] sample_n, missed;

  syn #(.DLY_W(DLY_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One frame of `len` steps with period p; delay d. Signals are driven
  // right after a rising edge, as registered generator outputs would be.
  task automatic frame(int p, int len, int d, int exp_missed);
    int total = len * p + d + 8;
    int n_store = 0, n_end = 0;
    bit exp_store [int];
    cfg_delay = DLY_W'(d);
    // expected store cycles, relative to cycle 0 = first step
    for (int k = 0; k < len; k++) begin
      if (d < p) exp_store[k * p + d + 2] = 1'b1;
    end
    if (d >= p) exp_store[(len - 1) * p + d + 2] = 1'b1;
    for (int c = 0; c < total; c++) begin
      step = (c < len * p) && (c % p == 0);
      busy = (c < len * p);
      @(posedge clk);
      #1;
      // outputs now reflect the edge at the end of cycle c, i.e. cycle c+1
      if (exp_store.exists(c + 1)) begin
        chk($sformatf("store at cycle %0d (P=%0d D=%0d)", c + 1, p, d), store === 1'b1);
        if (store) begin
          chk("sample_n", sample_n == CNT_W'(n_store));
          chk("frame_start", frame_start === (n_store == 0));
          n_store++;
        end
      end else begin
        chk($sformatf("no store at cycle %0d (P=%0d D=%0d)", c + 1, p, d), store === 1'b0);
      end
      if (frame_end) begin
        n_end++;
        chk("frame_end after the last store", n_store == exp_store.num());
      end
    end
    step = 1'b0;
    chk($sformatf("one frame_end (P=%0d D=%0d)", p, d), n_end == 1);
    chk($sformatf("missed (P=%0d D=%0d)", p, d), missed == CNT_W'(exp_missed));
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    frame(4, 6, 0, 0);
    frame(4, 6, 2, 0);
    frame(5, 9, 4, 0);
    frame(1, 7, 0, 0);
    frame(3, 5, 3, 4);   // delay not shorter than the period: only the last store survives
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
