// tb_cordic_rot_stage: checks one micro-rotation (rotation: d = +1 when z >= 0) at
// iterations 0, 4 and 12 against the update equations evaluated in the
// testbench with integer arithmetic, and its one-cycle latency.
module tb_cordic_rot_stage;
  import qrd_pkg::*;

  localparam int NS = 3;
  localparam int STAGES [NS] = '{0, 4, 12};

  logic   clk = 0;
  logic   rst_n = 0;
  logic   in_valid = 0;
  idata_t in_x, in_y;
  angle_t in_z;
  logic   out_valid [NS];
  idata_t out_x [NS];
  idata_t out_y [NS];
  angle_t out_z [NS];
  logic   out_tag [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_dut
    cordic_rot_stage #(.STAGE(STAGES[s]), .TAG_W(1)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .in_x(in_x), .in_y(in_y), .in_z(in_z), .in_tag(in_valid),
      .out_valid(out_valid[s]), .out_x(out_x[s]), .out_y(out_y[s]),
      .out_z(out_z[s]), .out_tag(out_tag[s]));
  end

  function automatic angle_t atan_entry(int i);
    real a;
    a = $atan(2.0 ** (-i)) * real'(1 << (ANGLE_W - 1)) / 3.14159265358979;
    return angle_t'($rtoi(a + 0.5));
  endfunction

  initial begin
    in_x = '0; in_y = '0; in_z = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      idata_t x, y, ex, ey;
      angle_t z, ez;
      int d;
      x = idata_t'($urandom) >>> 3;
      y = idata_t'($urandom) >>> 3;
      z = angle_t'($urandom);
      in_x = x; in_y = y; in_z = z; in_valid = 1;
      @(negedge clk);            // one clock edge later the result is there
      for (int s = 0; s < NS; s++) begin
        d  = (z >= 0) ? 1 : -1;
        ex = x - idata_t'(d) * (y >>> STAGES[s]);
        ey = y + idata_t'(d) * (x >>> STAGES[s]);
        ez = z - angle_t'(d) * atan_entry(STAGES[s]);
        checks++;
        if (!out_valid[s] || !out_tag[s] || out_x[s] != ex || out_y[s] != ey || out_z[s] != ez) begin
          failures++;
          $display("FAIL stage %0d: got (%0d,%0d,%0d) want (%0d,%0d,%0d)", STAGES[s],
                   out_x[s], out_y[s], out_z[s], ex, ey, ez);
        end
      end
      if (n % 7 == 0) begin     // a gap: valid must drop after one cycle
        in_valid = 0;
        @(negedge clk);
        checks++;
        if (out_valid[0]) begin
          failures++;
          $display("FAIL valid did not drop");
        end
      end
    end
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
