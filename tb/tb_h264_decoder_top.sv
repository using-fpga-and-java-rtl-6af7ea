// End-to-end testbench for h264_decoder_top, with every parameter at its default.
//
// Bitstream path: a host model on the system bus loads a microprogram for
// each NAL unit (the 8-bit NAL header as u(1) u(2) u(5), then random u(n),
// ue(v), se(v), te(v) and me(v) elements and a byte alignment), starts the
// parser and reads back the parameter registers. The byte stream of all units
// (3- and 4-byte start codes, units regenerated if they contain a start-code
// prefix) is pushed in concurrently under in_ready, so the FIFO fills while
// the parser waits for its next start and the input is held back.
//
// Residual path: three 16x16 luma arrays and one chroma pair go through the
// transform unit (inverse with intra prediction, inverse with inter
// prediction, an inverse chroma pair, forward after a mode switch over the
// bus), and every reconstructed sample is compared with
// clip(prediction + reference transform). The time from an array's last
// sample to its last reconstructed sample is checked: 2048 (luma) or 1024
// (chroma pair) transform cycles plus two register stages.
//
// Mechanisms counted, each must occur: both start-code forms, input held back
// by a full FIFO, end-of-stream flush, me(v) with the intra and the inter
// table, both prediction sources, clipping at 0 and at 255, the transform
// mode switch and the switch between luma and chroma.
module tb_h264_decoder_top;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready, next_nalu;
  logic [31:0] in_data = '0;
  logic sys_we = 0;
  logic [7:0] sys_addr = '0;
  logic [31:0] sys_wdata = '0, sys_rdata;
  logic elem_valid, elem_intra, elem_inter;
  logic [15:0] elem_value;
  logic [4:0] elem_dest;
  logic res_valid = 0, res_ready, sel_inter = 0;
  logic [15:0] res_data = '0;
  logic res_chroma = 0;
  logic [7:0] pred_intra = '0, pred_inter = '0, recon_sample;
  logic recon_valid, recon_clipped, recon_last;

  h264_decoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_sc3 = 0, n_sc4 = 0, n_hold = 0, n_pulses = 0, n_me_intra = 0, n_me_inter = 0;
  int n_clip_lo = 0, n_clip_hi = 0, n_pred_intra = 0, n_pred_inter = 0, n_modes = 0, n_chroma = 0, n_units_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (next_nalu) n_pulses++;
    if (in_valid && !in_ready) n_hold++;
    if (elem_intra) n_me_intra++;
    if (elem_inter) n_me_inter++;
  end

  // ---------------- system bus host model ----------------
  // The bus is shared by two host threads, so accesses take a lock.
  semaphore bus = new(1);
  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    bus.get(1);
    @(negedge clk);
    sys_we = 1; sys_addr = a; sys_wdata = d;
    @(negedge clk);
    sys_we = 0;
    bus.put(1);
  endtask
  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    bus.get(1);
    @(negedge clk);
    sys_addr = a;
    #1 d = sys_rdata;
    bus.put(1);
  endtask

  // ---------------- bitstream generation ----------------
  localparam int NUNITS = 10;
  bit bits[$];
  byte unsigned stream[$];
  uinstr_t prog[NUNITS][$];
  logic [15:0] expv[NUNITS][32];
  bit expset[NUNITS][32];

  task automatic put_bits(input int v, input int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask
  task automatic put_ue(input int v);
    int lz;
    lz = $clog2(v + 2) - 1;
    put_bits(0, lz);
    put_bits(v + 1, lz + 1);
  endtask

  int me_code[4]  = '{0, 3, 12, 29};
  int me_intra[4] = '{47, 0, 39, 1};
  int me_inter[4] = '{0, 2, 47, 43};

  function automatic uinstr_t ui(input desc_e d, input int n, input int dst);
    uinstr_t u;
    u.desc = d; u.n = 5'(n); u.dest = 5'(dst);
    return u;
  endfunction

  task automatic make_unit(input int u);
    bit ok;
    do begin
      bits.delete();
      prog[u].delete();
      for (int r = 0; r < 32; r++) expset[u][r] = 0;
      // NAL header: forbidden_zero_bit, nal_ref_idc, nal_unit_type
      begin
        int t, ridc;
        ridc = $urandom_range(0, 3); t = $urandom_range(1, 12);
        put_bits(0, 1); put_bits(ridc, 2); put_bits(t, 5);
        prog[u].push_back(ui(DESC_U, 1, 0)); expv[u][0] = 0; expset[u][0] = 1;
        prog[u].push_back(ui(DESC_U, 2, 1)); expv[u][1] = 16'(ridc); expset[u][1] = 1;
        prog[u].push_back(ui(DESC_U, 5, 2)); expv[u][2] = 16'(t); expset[u][2] = 1;
      end
      for (int e = 0; e < 20; e++) begin
        int sel, v, d, c, len;
        d = 3 + e;
        sel = $urandom_range(0, 5);
        case (sel)
          0: begin len = $urandom_range(1, 16); v = $urandom_range(0, (1 << len) - 1); put_bits(v, len); prog[u].push_back(ui(DESC_U, len, d)); end
          1: begin v = $urandom_range(0, 300); put_ue(v); prog[u].push_back(ui(DESC_UE, 0, d)); end
          2: begin v = $urandom_range(0, 100) - 50; put_ue(v > 0 ? 2 * v - 1 : -2 * v); prog[u].push_back(ui(DESC_SE, 0, d)); end
          3: begin v = $urandom_range(0, 1); put_bits(!v, 1); prog[u].push_back(ui(DESC_TE, 1, d)); end
          default: begin
            int inter;
            inter = (sel == 5); c = $urandom_range(0, 3);
            v = inter ? me_inter[c] : me_intra[c];
            put_ue(me_code[c]); prog[u].push_back(ui(DESC_ME, inter, d));
          end
        endcase
        expv[u][d] = 16'(v); expset[u][d] = 1;
      end
      prog[u].push_back(ui(DESC_ALIGN, 0, 0));
      prog[u].push_back(ui(DESC_END, 0, 0));
      // rbsp trailing bits
      put_bits(1, 1);
      while (bits.size() % 8 != 0) bits.push_back(0);
      // No start-code prefix inside the unit.
      ok = 1;
      for (int i = 0; i + 23 < bits.size(); i += 8) begin
        int b0, b1, b2;
        b0 = 0; b1 = 0; b2 = 0;
        for (int k = 0; k < 8; k++) begin
          b0 = 2 * b0 + bits[i + k]; b1 = 2 * b1 + bits[i + 8 + k]; b2 = 2 * b2 + bits[i + 16 + k];
        end
        if (b0 == 0 && b1 == 0 && b2 <= 3) ok = 0;
      end
    end while (!ok);
    // Append to the byte stream with a start code.
    if (u == 0 || $urandom_range(0, 1)) begin stream.push_back(8'h00); n_sc4++; end
    else n_sc3++;
    stream.push_back(8'h00); stream.push_back(8'h00); stream.push_back(8'h01);
    for (int i = 0; i < bits.size(); i += 8) begin
      int b;
      b = 0;
      for (int k = 0; k < 8; k++) b = 2 * b + bits[i + k];
      stream.push_back(8'(b));
    end
  endtask

  // ---------------- residual path ----------------
  function automatic void ref_inv(input int d[4][4], output int y[4][4]);
    int f[4][4], e0, e1, e2, e3, h[4][4];
    for (int i = 0; i < 4; i++) begin
      e0 = d[i][0] + d[i][2]; e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3]; e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int k = 0; k < 4; k++) begin
      e0 = f[0][k] + f[2][k]; e1 = f[0][k] - f[2][k];
      e2 = (f[1][k] >>> 1) - f[3][k]; e3 = f[1][k] + (f[3][k] >>> 1);
      h[0][k] = e0 + e3; h[1][k] = e1 + e2; h[2][k] = e1 - e2; h[3][k] = e0 - e3;
    end
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) y[i][k] = (h[i][k] + 32) >>> 6;
  endfunction
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

  int res_exp[$];
  int cyc = 0, t_recon_last = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && recon_valid && recon_last) t_recon_last = cyc;
  end
  int n_recon = 0;
  // Predictions change after every reconstructed sample; a sample is formed
  // at least three cycles after the previous one.
  always @(negedge clk) begin
    pred_intra <= 8'(n_recon * 37 + 11);
    pred_inter <= 8'(n_recon * 53 + 200);
  end
  always @(posedge clk) if (rst_n && recon_valid) begin
    int p, e;
    p = sel_inter ? ((n_recon * 53 + 200) & 255) : ((n_recon * 37 + 11) & 255);
    if (res_exp.size() == 0) check(0, "unexpected sample");
    else begin
      e = p + res_exp.pop_front();
      if (e < 0) begin e = 0; n_clip_lo++; end
      if (e > 255) begin e = 255; n_clip_hi++; end
      check(recon_sample == 8'(e), $sformatf("recon sample %0d: %0d want %0d", n_recon, recon_sample, e));
    end
    if (sel_inter) n_pred_inter++; else n_pred_intra++;
    n_recon++;
  end

  // A luma round is one 16x16 array; a chroma round is two 8x8 components,
  // held here as x[comp*8 + row][col].
  task automatic residual_round(input tmode_e m, input bit inter, input bit chr);
    int x[16][16];
    int side, t_load;
    side = chr ? 8 : 16;
    bus_write(8'h21, 32'(m));
    n_modes++;
    if (chr) n_chroma++;
    sel_inter = inter;
    for (int i = 0; i < 16; i++) for (int k = 0; k < 16; k++)
      x[i][k] = (m == TMODE_INV) ? $urandom_range(0, 2047) - 1024 : $urandom_range(0, 60) - 30;
    for (int b = 0; b < (chr ? 8 : 16); b++) begin
      int blk[4][4], y[4][4], r0, c0;
      r0 = chr ? (b / 4) * 8 + 4 * ((b % 4) / 2) : 4 * (b / 4);
      c0 = chr ? 4 * (b % 2) : 4 * (b % 4);
      for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) blk[i][k] = x[r0 + i][c0 + k];
      if (m == TMODE_INV) ref_inv(blk, y); else ref_fwd(blk, y);
      for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) res_exp.push_back(y[i][k]);
    end
    for (int i = 0; i < 16; i++) for (int k = 0; k < side; k++) begin
      @(negedge clk);
      while (!res_ready) @(negedge clk);
      res_valid = 1; res_data = 16'(x[i][k]);
      res_chroma = chr && i == 0 && k == 0;
      @(negedge clk);
      res_valid = 0;
      res_chroma = 0;
    end
    t_load = cyc;
    while (res_exp.size() > 0) @(negedge clk);
    @(negedge clk);
    // Transform time (single-stage: 128 cycles per 4x4 block) plus the
    // transform and reconstruction output registers.
    check(t_recon_last - t_load == (chr ? 1024 : 2048) + 2,
          $sformatf("array took %0d cycles after its last sample", t_recon_last - t_load));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int u = 0; u < NUNITS; u++) make_unit(u);
    while (stream.size() % 4 != 0) stream.push_back(8'hFF);   // bytes after the last unit's trailing bits
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // Bitstream feeder.
      begin
        int total;
        total = stream.size() / 4;
        for (int w = 0; w < total; w++) begin
          @(negedge clk);
          in_valid = 1;
          in_data  = {stream[4*w], stream[4*w+1], stream[4*w+2], stream[4*w+3]};
          in_last  = (w == total - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1;
          in_valid = 0;
          in_last  = 0;
        end
      end
      // Host: one microprogram run per NAL unit.
      begin
        for (int u = 0; u < NUNITS; u++) begin
          logic [31:0] st, d;
          repeat (30) @(negedge clk);   // let the FIFO fill
          for (int i = 0; i < prog[u].size(); i++) bus_write(8'(i), 32'(prog[u][i]));
          bus_write(8'h20, 32'd1);
          do bus_read(8'h22, st); while (st[2]);
          check(!st[3], $sformatf("unit %0d: parser error", u));
          for (int r = 0; r < 32; r++) if (expset[u][r]) begin
            bus_read(8'h40 + 8'(r), d);
            check(d[15:0] == expv[u][r], $sformatf("unit %0d reg %0d: %0d want %0d", u, r, d[15:0], expv[u][r]));
          end
          n_units_done++;
        end
      end
      // Residual path.
      begin
        residual_round(TMODE_INV, 1'b0, 1'b0);
        residual_round(TMODE_INV, 1'b1, 1'b0);
        residual_round(TMODE_INV, 1'b1, 1'b1);
        residual_round(TMODE_FWD, 1'b0, 1'b0);
      end
    join
    begin
      logic [31:0] d;
      bus_read(8'h23, d);
      check(d == NUNITS, $sformatf("start codes counted %0d", d));
      bus_read(8'h22, d);
      check(d[4] == 0 && d[0] == 0, "no overrun, flush finished");
    end
    check(n_units_done == NUNITS, "all units parsed");
    check(n_recon == 3 * 256 + 128, $sformatf("reconstructed samples %0d", n_recon));
    // Every mechanism must have happened.
    check(n_sc3 > 0, "3-byte start code");
    check(n_sc4 > 0, "4-byte start code");
    check(n_pulses == NUNITS, "start-code pulses");
    check(n_hold > 0, "input held back by full FIFO");
    check(n_me_intra > 0 && n_me_inter > 0, "me(v) intra and inter");
    check(n_pred_intra > 0 && n_pred_inter > 0, "intra and inter prediction");
    check(n_clip_lo > 0 && n_clip_hi > 0, "clipping at both ends");
    check(n_modes >= 4, "transform mode switch");
    check(n_chroma > 0, "luma/chroma switch");
    $display("mechanisms: sc3=%0d sc4=%0d hold=%0d me_intra=%0d me_inter=%0d clip_lo=%0d clip_hi=%0d chroma=%0d",
             n_sc3, n_sc4, n_hold, n_me_intra, n_me_inter, n_clip_lo, n_clip_hi, n_chroma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
