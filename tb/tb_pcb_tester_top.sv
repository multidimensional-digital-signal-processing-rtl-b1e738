// End-to-end testbench of pcb_tester_top, at the top's default sizes
// (7 stimulus nodes, 8 observed nodes, 256 pattern words, 1024 stored words).
//
// A behavioural model of the analog side closes the loop. It wires the
// outputs to the inputs as on the example board (outputs 1-4 follow inputs
// 1-4, output 5 also follows input 4, outputs 6-8 follow inputs 5-7). Each
// output moves towards H*delta while its input is high and towards 0 while
// it is low, by at most `slope` discretisation steps per sampling step T, so
// pulses become trapezoids. The differentiator and amplifiers are modelled
// by presenting, one clock after each stimulus step, the change of that
// step as a 4-bit sign-magnitude word (2 LSB per step plus a random LSB of
// noise that must not change the code).
//
// The PC side reads the code stream with a random pc_ready, compares every
// word with the codes the model expects and rebuilds each waveform with the
// host's rule u_j(nT) = sum code_j * delta, which must retrace the model's
// waveform wherever no rate exceeded the code range.
//
// Phases:
//   1. The code-generation example: input 1 carries three pulses whose
//      output edges have slopes of 3, 2 and 1 steps per T and an amplitude
//      of 3 steps, so output 1 shows codes 011/111, then 010/110, then
//      001/101 on its edges; the other inputs carry random pulses, and
//      output 8 has slope 5, beyond the code range (saturation).
//   2. A full 256-word pattern played five times with the PC not reading:
//      the 1024-word store fills and overflows; the first 1024 words must
//      be intact.
//   3. A capture delay longer than the step period: lost stores counted.
// Counts stalls, overflows, clears, lost stores, saturated codes, frames and
// each of the 8 codes on output 1, and fails if any never happened.
module tb_pcb_tester_top;
  import pcbt_pkg::*;

  localparam int N = 7, K = 8, DU_W = 4, PAT_DEPTH = 256, STACK_DEPTH = 1024;
  localparam int W = K * CODE_W;

  int checks = 0, failures = 0;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   pat_we = 1'b0;
  logic [7:0]             pat_addr = '0;
  logic [N-1:0]           pat_wdata = '0;
  logic [15:0]            cfg_period = 16'd4, cfg_delay = 16'd1;
  logic [8:0]             cfg_len = '0;
  logic                   start = 1'b0, clear = 1'b0;
  logic [N-1:0]           u_in;
  logic [K-1:0][DU_W-1:0] du;
  logic [W-1:0]           pc_data;
  logic                   pc_valid, pc_ready;
  logic                   busy, frame_start, frame_end, overflow;
  logic [15:0]            sample_n, missed;
  logic [10:0]            level;

  pcb_tester_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- analog side model ----------------
  int src   [K] = '{0, 1, 2, 3, 3, 4, 5, 6};  // input feeding each output
  int amp   [K] = '{3, 6, 6, 6, 6, 6, 6, 10};
  int slope [K] = '{3, 1, 2, 3, 2, 1, 3, 5};
  int v     [K];                              // output level, in steps
  int step_no;                                // steps since the frame began

  // expected stored words and, per word, the model levels after that step
  logic [W-1:0] exp_q [$];
  int           lvl_q [$];   // K levels per word, output 1 first

  int n_sat = 0, code_seen [8];

  // signed-rate reference: the code band of a change of d steps
  function automatic apx_code_t ref_code(int d, bit noise_neg);
    apx_code_t c;
    int a = (d < 0) ? -d : d;
    c.sign = (d < 0) || (d == 0 && noise_neg);
    c.rate = (a >= 3) ? 2'd3 : 2'(a);
    return c;
  endfunction

  // Sampling steps, predicted from the start pulse and the configuration:
  // word k of a frame drives u_in in cycle 1 + k*P after the start cycle.
  logic step;
  int   m_left = 0, m_cnt = 0;
  assign step = (m_left > 0) && (m_cnt == 0);
  always @(posedge clk) begin
    if (!rst_n) begin
      m_left <= 0;
      m_cnt  <= 0;
    end else if (start && m_left == 0) begin
      m_left <= int'(cfg_len);
      m_cnt  <= 0;
    end else if (m_left > 0) begin
      if (m_cnt == int'(cfg_period) - 1) begin
        m_cnt  <= 0;
        m_left <= m_left - 1;
      end else begin
        m_cnt <= m_cnt + 1;
      end
    end
  end

  bit pc_ready_en = 1'b0;

  always @(posedge clk) begin
    if (rst_n && step) begin
      automatic logic [W-1:0] word;
      automatic int lv [K];
      for (int j = 0; j < K; j++) begin
        automatic int target = u_in[src[j]] ? amp[j] : 0;
        automatic int d = target - v[j];
        automatic int s = slope[j];
        automatic bit noise = 1'($urandom);
        // no negative-zero noise on output 1 during the first pulse, whose
        // code row is compared with the published example below
        automatic bit nneg  = (j == 0 && step_no < 16) ? 1'b0 : 1'($urandom);
        automatic int mag;
        if (j == 0) s = (step_no < 16) ? 3 : (step_no < 32) ? 2 : 1;
        if (d > s)  d = s;
        if (d < -s) d = -s;
        v[j] += d;
        lv[j] = v[j];
        mag = 2 * ((d < 0) ? -d : d) + int'(noise);
        if (mag > 7) mag = 7;
        du[j] <= {(d < 0) || (d == 0 && nneg), 3'(mag)};
        word[CODE_W*j +: CODE_W] = ref_code(d, nneg);
        if (d > 3 || d < -3) n_sat++;
        if (j == 0) code_seen[ref_code(d, nneg)]++;
      end
      step_no++;
      if (exp_q.size() < STACK_DEPTH || pc_ready_en) begin
        exp_q.push_back(word);
        for (int j = 0; j < K; j++) lvl_q.push_back(lv[j]);
      end
    end
  end

  // ---------------- PC side ----------------
  int words_read = 0, n_stall = 0;
  apx_code_t out1 [$];   // codes of output 1, first words of phase 1
  int acc [K];

  always @(negedge clk) pc_ready = pc_ready_en && ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && pc_valid && !pc_ready) n_stall++;
    if (rst_n && pc_valid && pc_ready) begin
      if (exp_q.size() == 0) chk("word without a step", 1'b0);
      else begin
        automatic logic [W-1:0] e = exp_q.pop_front();
        automatic int lv [K];
        for (int j = 0; j < K; j++) lv[j] = lvl_q.pop_front();
        chk($sformatf("word %0d: got %h expected %h", words_read, pc_data, e), pc_data == e);
        for (int j = 0; j < K; j++) begin
          automatic apx_code_t c = apx_code_t'(pc_data[CODE_W*j +: CODE_W]);
          acc[j] += code_to_steps(c);
          if (j == 0 && words_read < 10) out1.push_back(c);
          // output 8 saturates, so its sum is not expected to retrace it
          if (j != K - 1) begin
            chk($sformatf("reconstruction of output %0d", j + 1), acc[j] == lv[j]);
          end
        end
      end
      words_read++;
    end
  end

  // ---------------- host procedures ----------------
  int n_frames = 0, n_frame_end = 0;
  always @(posedge clk) begin
    if (rst_n && frame_start) n_frames++;
    if (rst_n && frame_end)   n_frame_end++;
  end

  task automatic load(logic [N-1:0] pat [], int len);
    for (int a = 0; a < len; a++) begin
      @(negedge clk);
      pat_we = 1'b1; pat_addr = 8'(a); pat_wdata = pat[a];
    end
    @(negedge clk) pat_we = 1'b0;
  endtask

  // Play the pattern once and wait for the frame to end. Returns cycles.
  task automatic play(int len, int period, int delay, output int cycles);
    longint t0;
    cfg_len = 9'(len); cfg_period = 16'(period); cfg_delay = 16'(delay);
    @(negedge clk) start = 1'b1;
    t0 = $time;
    @(negedge clk) start = 1'b0;
    while (!frame_end) @(negedge clk);
    cycles = int'(($time - t0) / 10);
    @(negedge clk);
  endtask

  task automatic reset_levels();
    for (int j = 0; j < K; j++) begin v[j] = 0; acc[j] = 0; end
    step_no = 0;
  endtask

  initial begin
    automatic logic [N-1:0] pat [];
    automatic int cyc, n_ovf = 0, n_clear = 0, n_missed = 0;
    du = '0;
    reset_levels();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- phase 1: code generation example, PC reading ----
    pat = new[64];
    for (int a = 0; a < 64; a++) begin
      pat[a] = N'($urandom) & {N{a < 56}};
      // input 1: high for steps 1-6, 17-23 and 33-44 (one pulse per slope)
      pat[a][0] = (a >= 1 && a < 7) || (a >= 17 && a < 24) || (a >= 33 && a < 45);
    end
    load(pat, 64);
    pc_ready_en = 1'b1;
    play(64, 4, 1, cyc);
    // frame_end comes len*P + 3 cycles after the start cycle
    chk($sformatf("frame length %0d cycles, expected %0d", cyc, 64 * 4 + 3), cyc == 64 * 4 + 3);
    chk("64 stores in the frame", sample_n == 16'd63);
    repeat (200) @(negedge clk);
    chk("all words read", exp_q.size() == 0 && !pc_valid);
    // first pulse: rise of 3 steps in one T, flat top, fall in one T,
    // the code row 000 011 000 000 000 000 000 111 000 of the example
    begin
      automatic apx_code_t row [9] = '{3'b000, 3'b011, 3'b000, 3'b000, 3'b000,
                                       3'b000, 3'b000, 3'b111, 3'b000};
      for (int k = 0; k < 9; k++)
        chk($sformatf("output 1 code %0d is %b", k, row[k]), out1[k] == row[k]);
    end
    for (int c = 0; c < 8; c++)
      chk($sformatf("code %03b produced on output 1", c), code_seen[c] > 0);

    // ---- phase 2: full pattern, PC not reading, overflow ----
    pc_ready_en = 1'b0;
    @(negedge clk);
    pat = new[PAT_DEPTH];
    for (int a = 0; a < PAT_DEPTH; a++) pat[a] = N'($urandom) & {N{a % 64 < 48}};
    load(pat, PAT_DEPTH);
    for (int r = 0; r < 5; r++) begin
      play(PAT_DEPTH, 2, 0, cyc);
      chk($sformatf("full frame length %0d", cyc), cyc == PAT_DEPTH * 2 + 3);
    end
    chk("store full", level == 11'(STACK_DEPTH));
    chk("overflow flagged", overflow);
    if (overflow) n_ovf++;
    pc_ready_en = 1'b1;
    while (pc_valid) @(negedge clk);
    chk("1024 words read back", exp_q.size() == 0);
    // clear the flag
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    chk("clear", !overflow && level == 0);
    n_clear++;

    // ---- phase 3: delay not shorter than the period ----
    pc_ready_en = 1'b0;
    reset_levels();
    play(8, 2, 3, cyc);
    // the late last store sets the end: last step + D + 3
    chk("short frame length", cyc == 1 + 7 * 2 + 3 + 3);
    n_missed = int'(missed);
    chk("lost stores counted", missed == 16'd7);
    chk("one store survives", level == 11'd1);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    n_clear++;
    exp_q.delete(); lvl_q.delete();

    $display("stalls=%0d overflows=%0d clears=%0d lost=%0d saturated=%0d frames=%0d/%0d words=%0d",
             n_stall, n_ovf, n_clear, n_missed, n_sat, n_frames, n_frame_end, words_read);
    chk("stall happened", n_stall > 0);
    chk("overflow happened", n_ovf > 0);
    chk("clear happened", n_clear > 0);
    chk("lost store happened", n_missed > 0);
    chk("saturation happened", n_sat > 0);
    chk("frames counted", n_frames == 7 && n_frame_end == 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
