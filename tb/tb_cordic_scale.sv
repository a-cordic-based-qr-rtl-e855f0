// tb_cordic_scale: checks the shift-and-add scale correction against the
// real product x * 0.609375 (at most 3 LSB of truncation error) and that
// the factor is within 0.5 % of the CORDIC gain compensation K = 0.60725.
module tb_cordic_scale;
  import qrd_pkg::*;

  idata_t x, y;
  int checks = 0, failures = 0;

  cordic_scale dut (.x(x), .y(y));

  task automatic try_one(idata_t v);
    real want, err;
    x = v;
    #1;
    want = real'(v) * 0.609375;
    err  = real'(y) - want;
    checks++;
    if (err > 3.0 || err < -3.0) begin
      failures++;
      $display("FAIL x=%0d y=%0d want %f", v, y, want);
    end
    if (v > 10000 || v < -10000) begin
      real ratio;
      ratio = real'(y) / real'(v);
      checks++;
      if (ratio < 0.60725 * 0.995 || ratio > 0.60725 * 1.005) begin
        failures++;
        $display("FAIL gain %f", ratio);
      end
    end
  endtask

  initial begin
    try_one('0);
    try_one(idata_t'(1 <<< (INT_W - 2)));
    try_one(-idata_t'(1 <<< (INT_W - 2)));
    for (int i = 0; i < 500; i++) try_one(idata_t'($urandom) >>> 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
