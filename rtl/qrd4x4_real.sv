// qrd4x4_real: QR decomposition of a real 4x4 channel matrix with four
// Givens-rotation units (qrd_givens_stream), H = Q R.
//
// Six rotations zero the lower triangle in four steps of one rotation
// latency each, two rotations running in parallel where rows allow:
//   step 1: unit A rows (1,2) and unit B rows (3,4), pivot column 1
//   step 2: unit C rows (1,3), pivot column 1; unit D rows (2,4), pivot col 2
//   step 3: unit A again, rows (2,3), pivot column 2
//   step 4: unit B again, rows (3,4), pivot column 3
// Each unit takes the two rows as a stream of 2-vectors, one column per
// cycle: the four matrix columns followed by the four identity columns, so
// the same rotations build Q^T = G6..G1 alongside R. A step starts with its
// pivot column, so each step begins one column later than the step before,
// and the streams of two rows meet column by column without buffers, except
// for row 4, which waits 2*NUM_STAGES cycles between steps 2 and 4. The
// number of units, four, and the four-step structure follow the source; the
// schedule and the streaming are this design's own.
//
// Interface: a matrix h[row][col] is accepted when in_valid and in_ready are
// high; one matrix is processed at a time. r (upper triangle, zeros below)
// is valid for the cycle r_valid is high, 108 cycles after the input; qt is
// valid for the cycle q_valid is high, 112 cycles after the input.
module qrd4x4_real
  import qrd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t h  [4][4],
  output logic  r_valid,
  output data_t r  [4][4],
  output logic  q_valid,
  output data_t qt [4][4]
);

  localparam int unsigned ROW4_DELAY = 2 * NUM_STAGES;

  typedef struct packed {
    logic       late;   // 0: stream of step 1 or 2, 1: stream of step 3 or 4
    logic [2:0] col;    // 0..3 matrix columns, 4..7 identity columns
  } tag_t;

  // ---------------------------------------------------------------- input
  logic       busy;
  logic       accept;
  data_t      h_q [4][4];
  logic [2:0] ser_cnt;        // next column to serialise, 0 = idle
  logic       ser_valid;
  logic [2:0] ser_col;
  vec_t       ser_ab, ser_cd; // column ser_col of rows (1,2) and (3,4)

  assign in_ready = !busy;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ser_cnt <= '0;
    else if (accept)          ser_cnt <= 3'd1;
    else if (ser_cnt != 3'd0) ser_cnt <= ser_cnt + 3'd1;   // wraps 7 -> 0
  end

  always_ff @(posedge clk) begin
    if (accept) h_q <= h;
  end

  function automatic data_t elem(data_t m [4][4], int row, logic [2:0] col);
    if (col < 3'd4) return m[row][col[1:0]];
    else            return (col[1:0] == 2'(row)) ? DATA_ONE : '0;
  endfunction

  always_comb begin
    ser_valid = accept || (ser_cnt != 3'd0);
    ser_col   = accept ? 3'd0 : ser_cnt;
    if (accept) begin
      ser_ab = '{x: elem(h, 0, 3'd0),       y: elem(h, 1, 3'd0)};
      ser_cd = '{x: elem(h, 2, 3'd0),       y: elem(h, 3, 3'd0)};
    end else begin
      ser_ab = '{x: elem(h_q, 0, ser_col),  y: elem(h_q, 1, ser_col)};
      ser_cd = '{x: elem(h_q, 2, ser_col),  y: elem(h_q, 3, ser_col)};
    end
  end

  // ---------------------------------------------------------------- units
  logic a_iv, a_if, a_ov, a_of;   vec_t a_ivec, a_ovec;   tag_t a_itag, a_otag;
  logic b_iv, b_if, b_ov, b_of;   vec_t b_ivec, b_ovec;   tag_t b_itag, b_otag;
  logic c_iv, c_if, c_ov, c_of;   vec_t c_ivec, c_ovec;   tag_t c_itag, c_otag;
  logic d_iv, d_if, d_ov, d_of;   vec_t d_ivec, d_ovec;   tag_t d_itag, d_otag;

  // row 4 between step 2 (unit D) and step 4 (unit B)
  logic  r4_valid [ROW4_DELAY];
  data_t r4_data  [ROW4_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ROW4_DELAY; k++) r4_valid[k] <= 1'b0;
    end else begin
      r4_valid[0] <= d_ov && (d_otag.col >= 3'd2);
      for (int k = 1; k < ROW4_DELAY; k++) r4_valid[k] <= r4_valid[k-1];
    end
  end

  always_ff @(posedge clk) begin
    r4_data[0] <= d_ovec.y;
    for (int k = 1; k < ROW4_DELAY; k++) r4_data[k] <= r4_data[k-1];
  end

  logic a_step1_out, b_step1_out, a_step3_out, b_step4_out;
  assign a_step1_out = a_ov && !a_otag.late;
  assign b_step1_out = b_ov && !b_otag.late;
  assign a_step3_out = a_ov &&  a_otag.late;
  assign b_step4_out = b_ov &&  b_otag.late;

  always_comb begin
    // unit A: step 1 from the input, step 3 from units D (row 2) and C (row 3)
    if (d_ov) begin
      a_iv   = 1'b1;
      a_if   = (d_otag.col == 3'd1);
      a_ivec = '{x: d_ovec.x, y: c_ovec.y};
      a_itag = '{late: 1'b1, col: d_otag.col};
    end else begin
      a_iv   = ser_valid;
      a_if   = (ser_col == 3'd0);
      a_ivec = ser_ab;
      a_itag = '{late: 1'b0, col: ser_col};
    end
    // unit B: step 1 from the input, step 4 from unit A (row 3) and row 4
    if (a_step3_out && a_otag.col >= 3'd2) begin
      b_iv   = 1'b1;
      b_if   = (a_otag.col == 3'd2);
      b_ivec = '{x: a_ovec.y, y: r4_data[ROW4_DELAY-1]};
      b_itag = '{late: 1'b1, col: a_otag.col};
    end else begin
      b_iv   = ser_valid;
      b_if   = (ser_col == 3'd0);
      b_ivec = ser_cd;
      b_itag = '{late: 1'b0, col: ser_col};
    end
    // unit C: rows 1 and 3 from step 1, all columns
    c_iv   = a_step1_out;
    c_if   = (a_otag.col == 3'd0);
    c_ivec = '{x: a_ovec.x, y: b_ovec.x};
    c_itag = a_otag;
    // unit D: rows 2 and 4 from step 1, from column 2 on
    d_iv   = a_step1_out && (a_otag.col != 3'd0);
    d_if   = (a_otag.col == 3'd1);
    d_ivec = '{x: a_ovec.y, y: b_ovec.y};
    d_itag = a_otag;
  end

  qrd_givens_stream #(.TAG_W($bits(tag_t))) u_unit_a (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_iv), .in_first(a_if), .in_vec(a_ivec), .in_tag(a_itag),
    .out_valid(a_ov), .out_first(a_of), .out_vec(a_ovec), .out_tag(a_otag));

  qrd_givens_stream #(.TAG_W($bits(tag_t))) u_unit_b (
    .clk(clk), .rst_n(rst_n),
    .in_valid(b_iv), .in_first(b_if), .in_vec(b_ivec), .in_tag(b_itag),
    .out_valid(b_ov), .out_first(b_of), .out_vec(b_ovec), .out_tag(b_otag));

  qrd_givens_stream #(.TAG_W($bits(tag_t))) u_unit_c (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c_iv), .in_first(c_if), .in_vec(c_ivec), .in_tag(c_itag),
    .out_valid(c_ov), .out_first(c_of), .out_vec(c_ovec), .out_tag(c_otag));

  qrd_givens_stream #(.TAG_W($bits(tag_t))) u_unit_d (
    .clk(clk), .rst_n(rst_n),
    .in_valid(d_iv), .in_first(d_if), .in_vec(d_ivec), .in_tag(d_itag),
    .out_valid(d_ov), .out_first(d_of), .out_vec(d_ovec), .out_tag(d_otag));

  // ---------------------------------------------------------------- output
  data_t r_q  [4][4];
  data_t qt_q [4][4];
  logic  r_done, q_done;

  always_ff @(posedge clk) begin
    // row 1 from unit C (step 2)
    if (c_ov) begin
      if (!c_otag.col[2]) r_q [0][c_otag.col[1:0]] <= c_ovec.x;
      else                qt_q[0][c_otag.col[1:0]] <= c_ovec.x;
    end
    // row 2 from unit A (step 3)
    if (a_step3_out) begin
      if (!a_otag.col[2]) r_q [1][a_otag.col[1:0]] <= a_ovec.x;
      else                qt_q[1][a_otag.col[1:0]] <= a_ovec.x;
    end
    // rows 3 and 4 from unit B (step 4)
    if (b_step4_out) begin
      if (!b_otag.col[2]) begin
        r_q [2][b_otag.col[1:0]] <= b_ovec.x;
        r_q [3][b_otag.col[1:0]] <= b_ovec.y;
      end else begin
        qt_q[2][b_otag.col[1:0]] <= b_ovec.x;
        qt_q[3][b_otag.col[1:0]] <= b_ovec.y;
      end
    end
  end

  assign r_done = b_step4_out && (b_otag.col == 3'd3);
  assign q_done = b_step4_out && (b_otag.col == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      r_valid <= 1'b0;
      q_valid <= 1'b0;
    end else begin
      r_valid <= r_done;
      q_valid <= q_done;
      if (accept)      busy <= 1'b1;
      else if (q_done) busy <= 1'b0;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        r[i][j]  = (j >= i) ? r_q[i][j] : '0;
        qt[i][j] = qt_q[i][j];
      end
  end

  // units C and D see the step-1 streams of A and B side by side; unit A
  // sees the step-2 streams of D and C side by side
  a_step1_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    a_step1_out |-> b_step1_out && b_otag.col == a_otag.col);
  a_step2_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
    d_ov |-> c_ov && c_otag.col == d_otag.col);
  a_row4_align : assert property (@(posedge clk) disable iff (!rst_n)
    (a_step3_out && a_otag.col >= 3'd2) |-> r4_valid[ROW4_DELAY-1]);
  a_no_overlap : assert property (@(posedge clk) disable iff (!rst_n)
    !(d_ov && ser_valid));

endmodule
