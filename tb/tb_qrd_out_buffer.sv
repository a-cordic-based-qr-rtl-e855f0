// tb_qrd_out_buffer: sends sets of three tagged vectors on consecutive
// cycles and checks that the first is reported at once with its norm
// (head_valid) and that all three are presented together in the cycle the
// third arrives (all_valid), and never otherwise.
module tb_qrd_out_buffer;
  import qrd_pkg::*;

  localparam int NV = 3;

  logic     clk = 0;
  logic     rst_n = 0;
  logic     rot_valid = 0;
  data_t    rot_x, rot_y;
  rot_tag_t rot_tag;
  logic     head_valid, all_valid;
  data_t    head_mag;
  vec_t     head_vec;
  vec_t     all_vecs [NV];

  int checks = 0, failures = 0, n_head = 0, n_all = 0;

  qrd_out_buffer #(.NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    rot_x = '0; rot_y = '0; rot_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 80; s++) begin
      vec_t  v [NV];
      data_t m;
      m = data_t'($urandom);
      for (int k = 0; k < NV; k++) begin
        v[k] = vec_t'($urandom);
        rot_valid   = 1;
        rot_x       = v[k].x;
        rot_y       = v[k].y;
        rot_tag.idx = IDX_W'(k);
        rot_tag.mag = m;
        #1;
        checks++;
        if (head_valid != (k == 0) || all_valid != (k == NV - 1)) begin
          failures++;
          $display("FAIL valid flags at index %0d", k);
        end
        if (k == 0) begin
          n_head++;
          checks++;
          if (head_mag != m || head_vec != v[0]) begin
            failures++;
            $display("FAIL head");
          end
        end
        if (k == NV - 1) begin
          n_all++;
          for (int j = 0; j < NV; j++) begin
            checks++;
            if (all_vecs[j] != v[j]) begin
              failures++;
              $display("FAIL vector %0d of set %0d", j, s);
            end
          end
        end
        @(negedge clk);
      end
      rot_valid = 0;
      rot_tag   = rot_tag_t'($urandom);
      repeat (s % 3) begin
        #1;
        checks++;
        if (head_valid || all_valid) begin
          failures++;
          $display("FAIL valid without input");
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_head != 80 || n_all != 80) begin
      failures++;
      $display("FAIL counts");
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
