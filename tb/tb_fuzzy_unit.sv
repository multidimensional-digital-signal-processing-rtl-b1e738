// Self-checking testbench of fuzzy_unit.
//
// Sweeps every input word of two instances: the default one (4-bit
// sign-magnitude rate, step of 2 LSB) and a wider one (6-bit rate, step of
// 3 LSB) whose largest rates exceed four steps and so saturate. Each code is
// compared with a reference that tests the rate against the band edges
// 0, STEP, 2*STEP, 3*STEP one by one, the way the comparator bank does. For
// the default instance the code must also equal du[3:1], the mapping of the
// unit's published timing simulation (du = 0000 .. 1111 gives
// y = 000, 000, 001, 001, ..., 111, 111).
module tb_fuzzy_unit;
  import pcbt_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] du4;
  logic [5:0] du6;
  apx_code_t  y4, y6;

  fuzzy_unit #(.DU_W(4), .STEP(2)) dut4 (.du(du4), .y(y4));
  fuzzy_unit #(.DU_W(6), .STEP(3)) dut6 (.du(du6), .y(y6));

  // Reference: band search over the magnitude.
  function automatic apx_code_t ref_code(int unsigned mag, bit neg, int unsigned step);
    apx_code_t c;
    c.sign = neg;
    c.rate = 2'd0;
    for (int k = 1; k <= 3; k++)
      if (mag >= k * step) c.rate = 2'(k);
    return c;
  endfunction

  task automatic check(string what, apx_code_t got, apx_code_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sat_seen = 0;

  initial begin
    du4 = '0;
    du6 = '0;
    for (int v = 0; v < 16; v++) begin
      du4 = 4'(v);
      #1;
      check($sformatf("du4=%b", du4), y4, ref_code(v % 8, v >= 8, 2));
      check($sformatf("du4=%b vs timing diagram", du4), y4, apx_code_t'(du4[3:1]));
    end
    for (int v = 0; v < 64; v++) begin
      du6 = 6'(v);
      #1;
      check($sformatf("du6=%b", du6), y6, ref_code(v % 32, v >= 32, 3));
      if ((v % 32) >= 12) sat_seen++;
    end
    // Both signs of a zero rate carry rate 0.
    du4 = 4'b1000; #1;
    check("negative zero", y4, '{sign: 1'b1, rate: 2'd0});
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
