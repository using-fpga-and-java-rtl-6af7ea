// Self-checking testbench for transform_unit.
//
// Two instances run side by side on the same 16x16 input: the single-stage
// (one product per cycle) and the parallel (four products per cycle) variant.
// For the forward core transform, the inverse core transform and the 4x4
// Hadamard transform, random arrays are loaded and every output value is
// compared with a reference computed here: the forward transform as a matrix
// product, the inverse with the butterfly equations of the standard, the
// Hadamard with its own butterflies. Luma arrays (16x16) and chroma pairs
// (two 8x8 components) are both used. The number of cycles from the last
// sample to the last result is checked: 128 (single-stage) or 32 (parallel)
// per 4x4 block, plus one for the output register.
module tb_transform_unit;
  import h264_pkg::*;
  localparam int DW = 16, N = 16;
  logic clk = 0, rst_n = 0;
  logic data_en = 0;
  logic [DW-1:0] data_in = '0;
  tmode_e mode = TMODE_FWD;
  logic chroma = 0;
  logic in_ready_s, busy_s, out_valid_s, out_last_s;
  logic in_ready_p, busy_p, out_valid_p, out_last_p;
  logic [DW-1:0] out_data_s, out_data_p;

  transform_unit dut_s (.clk, .rst_n, .data_en, .data_in, .mode, .chroma, .in_ready(in_ready_s), .busy(busy_s),
                        .out_valid(out_valid_s), .out_data(out_data_s), .out_last(out_last_s));
  transform_unit #(.PARALLEL(1'b1)) dut_p (.clk, .rst_n, .data_en, .data_in, .mode, .chroma, .in_ready(in_ready_p),
                        .busy(busy_p), .out_valid(out_valid_p), .out_data(out_data_p), .out_last(out_last_p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int x[N][N];
  int expq[$];
  int exp_s[$], exp_p[$];
  int t_load, t_last_s, t_last_p, cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && out_valid_s) begin
      check(exp_s.size() > 0 && out_data_s == DW'(exp_s[0]), $sformatf("single-stage value %0d want %0d", $signed(out_data_s), exp_s.size() ? exp_s[0] : 0));
      if (exp_s.size()) void'(exp_s.pop_front());
      if (out_last_s) t_last_s = cyc;
    end
    if (rst_n && out_valid_p) begin
      check(exp_p.size() > 0 && out_data_p == DW'(exp_p[0]), $sformatf("parallel value %0d want %0d", $signed(out_data_p), exp_p.size() ? exp_p[0] : 0));
      if (exp_p.size()) void'(exp_p.pop_front());
      if (out_last_p) t_last_p = cyc;
    end
  end

  // Reference transforms of one 4x4 block.
  function automatic void ref_fwd(input int b[4][4], output int y[4][4]);
    int m[4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int t[4][4];
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
      t[i][k] = 0;
      for (int l = 0; l < 4; l++) t[i][k] += m[i][l] * b[l][k];
    end
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
      y[i][k] = 0;
      for (int l = 0; l < 4; l++) y[i][k] += t[i][l] * m[k][l];
    end
  endfunction

  function automatic void ref_inv(input int d[4][4], output int y[4][4]);
    int f[4][4], e0, e1, e2, e3, h[4][4];
    for (int i = 0; i < 4; i++) begin   // rows
      e0 = d[i][0] + d[i][2]; e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3]; e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int k = 0; k < 4; k++) begin   // columns
      e0 = f[0][k] + f[2][k]; e1 = f[0][k] - f[2][k];
      e2 = (f[1][k] >>> 1) - f[3][k]; e3 = f[1][k] + (f[3][k] >>> 1);
      h[0][k] = e0 + e3; h[1][k] = e1 + e2; h[2][k] = e1 - e2; h[3][k] = e0 - e3;
    end
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) y[i][k] = (h[i][k] + 32) >>> 6;
  endfunction

  function automatic void ref_had(input int d[4][4], output int y[4][4]);
    int f[4][4], a, b, c, e;
    for (int i = 0; i < 4; i++) begin
      a = d[i][0] + d[i][3]; b = d[i][1] + d[i][2]; c = d[i][1] - d[i][2]; e = d[i][0] - d[i][3];
      f[i][0] = a + b; f[i][1] = e + c; f[i][2] = a - b; f[i][3] = e - c;
    end
    for (int k = 0; k < 4; k++) begin
      a = f[0][k] + f[3][k]; b = f[1][k] + f[2][k]; c = f[1][k] - f[2][k]; e = f[0][k] - f[3][k];
      y[0][k] = a + b; y[1][k] = e + c; y[2][k] = a - b; y[3][k] = e - c;
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 9; round++) begin
      tmode_e m;
      bit chr;
      int nblk, side;
      m = tmode_e'(round % 3);
      chr = (round >= 6);
      // Luma: one N x N array. Chroma: two N/2 x N/2 components, x[comp*N/2 + row][col].
      side = chr ? N / 2 : N;
      nblk = chr ? 2 * (N / 8) * (N / 8) : (N / 4) * (N / 4);
      for (int i = 0; i < N; i++) for (int k = 0; k < N; k++)
        x[i][k] = (m == TMODE_INV) ? $urandom_range(0, 2047) - 1024 : $urandom_range(0, 510) - 255;
      for (int b = 0; b < nblk; b++) begin
        int blk[4][4], y[4][4], bpc, r0, c0;
        bpc = (side / 4) * (side / 4);               // blocks per component
        r0 = (b / bpc) * side + 4 * ((b % bpc) / (side / 4));
        c0 = 4 * ((b % bpc) % (side / 4));
        for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) blk[i][k] = x[r0 + i][c0 + k];
        case (m)
          TMODE_FWD: ref_fwd(blk, y);
          TMODE_INV: ref_inv(blk, y);
          default:   ref_had(blk, y);
        endcase
        for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
          exp_s.push_back(y[i][k]);
          exp_p.push_back(y[i][k]);
        end
      end
      @(negedge clk);
      check(in_ready_s && in_ready_p, "ready to load");
      mode = m;
      chroma = chr;
      for (int i = 0; i < (chr ? N : N); i++) for (int k = 0; k < side; k++) begin
        data_en = 1; data_in = DW'(x[i][k]);
        @(negedge clk);
        chroma = 0;   // only sampled with the first sample
      end
      data_en = 0;
      t_load = cyc;
      mode = TMODE_HAD;   // mode is taken with the last sample
      while (busy_s || busy_p) @(negedge clk);
      @(negedge clk);
      check(exp_s.size() == 0 && exp_p.size() == 0, "all values out");
      check(t_last_s - t_load == 128 * nblk + 1, $sformatf("single-stage cycles %0d", t_last_s - t_load));
      check(t_last_p - t_load == 32 * nblk + 1, $sformatf("parallel cycles %0d", t_last_p - t_load));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
