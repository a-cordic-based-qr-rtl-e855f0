// tb_qrd_rx_rotate: pushes received vectors at random times and presents a
// Q^T a fixed 12 cycles after each push, the way a QR engine with
// several matrices in flight does. Two instances run side by side, N = 2 at
// the default depth and N = 4 with a FIFO that the traffic fills completely.
// Each y' is compared with an integer reference (products summed exactly,
// rounded half-up, saturated), and out_valid must follow q_valid by exactly
// one cycle. Bursts of back-to-back pushes and full-scale values that
// saturate are both included.
module tb_qrd_rx_rotate;
  import qrd_pkg::*;

  localparam int LAT  = 12;
  localparam int NCYC = 3000;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  y_valid = 0;
  logic  q_valid = 0;
  data_t y2  [2];
  data_t qt2 [2][2];
  data_t yr2 [2];
  data_t y4  [4];
  data_t qt4 [4][4];
  data_t yr4 [4];
  logic  ov2, ov4;

  int checks = 0, failures = 0;
  int n_out = 0, n_sat = 0, n_full = 0;

  qrd_rx_rotate #(.N(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .y_valid(y_valid), .y(y2),
    .q_valid(q_valid), .qt(qt2), .out_valid(ov2), .yr(yr2));

  qrd_rx_rotate #(.N(4), .DEPTH(LAT)) dut4 (
    .clk(clk), .rst_n(rst_n), .y_valid(y_valid), .y(y4),
    .q_valid(q_valid), .qt(qt4), .out_valid(ov4), .yr(yr4));

  always #5 clk = ~clk;

  function automatic int unsigned rnd(int unsigned lo, int unsigned hi);
    return lo + ($urandom % (hi - lo + 1));
  endfunction

  // Q^T entry: within +-1 as for a rotation, one in sixteen a full-scale
  // extreme so that the saturation path is reached.
  function automatic data_t rnd_q();
    int unsigned r;
    r = rnd(0, 15);
    if (r == 0) return data_t'(16'sh7fff);
    return data_t'(int'(rnd(0, 2 * 8192)) - 8192);
  endfunction

  // Received-vector element; one in eight is a full-scale extreme.
  function automatic data_t rnd_elem();
    int unsigned r;
    r = rnd(0, 15);
    if (r == 0) return data_t'(16'sh7fff);
    if (r == 1) return data_t'(16'sh8000);
    return data_t'($urandom);
  endfunction

  function automatic data_t ref_round(longint acc, output bit sat);
    longint r;
    r = (acc + (longint'(1) <<< (FRAC_W - 1))) >>> FRAC_W;
    sat = 1'b1;
    if (r > 32767)  return data_t'(16'sh7fff);
    if (r < -32768) return data_t'(16'sh8000);
    sat = 1'b0;
    return data_t'(r);
  endfunction

  // vectors waiting for their Q^T, and the cycle each Q^T is due
  data_t   q_y2 [$][2];
  data_t   q_y4 [$][4];
  int      due  [$];
  data_t   exp2 [2];
  data_t   exp4 [4];
  logic    expect_out = 0;
  int      cyc = 0;
  int      burst = 0;

  initial begin
    for (int k = 0; k < 2; k++) y2[k] = '0;
    for (int k = 0; k < 4; k++) y4[k] = '0;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) qt2[i][j] = '0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) qt4[i][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      bit do_push, do_pop;
      // check the outputs of the previous cycle's pop
      checks++;
      if (ov2 != expect_out || ov4 != expect_out) begin
        failures++;
        $display("FAIL cycle %0d: out_valid %b/%b, expected %b", cyc, ov2, ov4, expect_out);
      end
      if (expect_out) begin
        n_out++;
        for (int i = 0; i < 2; i++) begin
          checks++;
          if (yr2[i] !== exp2[i]) begin
            failures++;
            $display("FAIL N=2 y'[%0d] = %0d, expected %0d", i, yr2[i], exp2[i]);
          end
        end
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (yr4[i] !== exp4[i]) begin
            failures++;
            $display("FAIL N=4 y'[%0d] = %0d, expected %0d", i, yr4[i], exp4[i]);
          end
        end
      end

      // a Q^T is due when the oldest push is LAT cycles old
      do_pop = (due.size() > 0) && (due[0] == cyc);
      q_valid = do_pop;
      expect_out = do_pop;
      if (do_pop) begin
        for (int i = 0; i < 2; i++) begin
          longint acc;
          bit s;
          acc = 0;
          for (int j = 0; j < 2; j++) begin
            qt2[i][j] = rnd_q();
            acc += longint'(qt2[i][j]) * longint'(q_y2[0][j]);
          end
          exp2[i] = ref_round(acc, s);
          if (s) n_sat++;
        end
        for (int i = 0; i < 4; i++) begin
          longint acc;
          bit s;
          acc = 0;
          for (int j = 0; j < 4; j++) begin
            qt4[i][j] = rnd_q();
            acc += longint'(qt4[i][j]) * longint'(q_y4[0][j]);
          end
          exp4[i] = ref_round(acc, s);
          if (s) n_sat++;
        end
        q_y2.delete(0);
        q_y4.delete(0);
        due.delete(0);
      end

      // pushes: mostly sparse, sometimes a burst of back-to-back vectors
      if (burst == 0 && rnd(0, 99) == 0) burst = LAT + 4;
      if (burst > 0) begin
        do_push = 1'b1;
        burst--;
      end else begin
        do_push = (rnd(0, 3) == 0);
      end
      if (cyc > NCYC - LAT - 2) do_push = 1'b0;
      y_valid = do_push;
      if (do_push) begin
        data_t v2 [2];
        data_t v4 [4];
        for (int k = 0; k < 2; k++) begin v2[k] = rnd_elem(); y2[k] = v2[k]; end
        for (int k = 0; k < 4; k++) begin v4[k] = rnd_elem(); y4[k] = v4[k]; end
        q_y2.push_back(v2);
        q_y4.push_back(v4);
        due.push_back(cyc + LAT);
      end
      if (due.size() >= LAT) n_full++;
      @(negedge clk);
    end

    checks++;
    if (n_out < 500) begin
      failures++;
      $display("FAIL only %0d outputs", n_out);
    end
    checks++;
    if (n_sat == 0 || n_full == 0) begin
      failures++;
      $display("FAIL saturation (%0d) or full FIFO (%0d) never reached", n_sat, n_full);
    end
    $display("outputs %0d, saturated elements %0d, cycles with the N=4 FIFO full %0d",
             n_out, n_sat, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
