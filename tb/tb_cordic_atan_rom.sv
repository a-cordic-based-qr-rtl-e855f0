// tb_cordic_atan_rom: checks every entry of the elementary-angle table
// against round(atan(2^-i) * 2^15 / pi) computed with real arithmetic.
module tb_cordic_atan_rom;
  import qrd_pkg::*;

  logic [ATAN_ADDR_W-1:0] addr;
  angle_t                 angle;
  int checks = 0, failures = 0;

  cordic_atan_rom dut (.addr(addr), .angle(angle));

  initial begin
    for (int i = 0; i < MAX_STAGES; i++) begin
      real    a;
      angle_t want;
      addr = ATAN_ADDR_W'(i);
      #1;
      a    = $atan(2.0 ** (-i)) * real'(1 << (ANGLE_W - 1)) / 3.14159265358979;
      want = angle_t'($rtoi(a + 0.5));
      checks++;
      if (angle !== want) begin
        failures++;
        $display("FAIL entry %0d: got %0d want %0d", i, angle, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
