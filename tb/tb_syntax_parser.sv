// Self-checking testbench for syntax_parser.
//
// For each of several NAL units it draws a random microprogram (u(n), ue(v),
// se(v), te(v), me(v) and byte-align instructions), random values, and
// encodes them into a bitstream with its own Exp-Golomb encoder. The words are
// offered through a FIFO model that is sometimes empty, preceded by stray
// words of an earlier unit that the parser must skip. Each decoded element, its
// destination, the parameter registers and the throughput (one element per
// cycle while the FIFO has data) are checked. A final unit with a 16-zero
// prefix must raise error. me(v) values are limited to codeNums whose
// coded_block_pattern is listed below from the standard's table.
module tb_syntax_parser;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fifo_ready, fifo_first, fifo_last, fifo_request;
  logic [31:0] fifo_data;
  logic mp_we = 0, start = 0;
  logic [4:0] mp_addr = '0;
  logic [UINSTR_W-1:0] mp_wdata = '0;
  logic busy, error, elem_valid, intra, inter;
  logic [15:0] elem_value, preg_rdata;
  logic [4:0] elem_dest, preg_addr = '0;

  syntax_parser dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // FIFO model: queue of {first, last, data}; availability gated at random.
  logic [33:0] fq[$];
  bit gate = 1;
  assign fifo_ready = gate && fq.size() > 0;
  assign {fifo_first, fifo_last, fifo_data} = (fq.size() > 0) ? fq[0] : 34'd0;
  // The read is registered at the clock edge and applied half a cycle later,
  // so that the parser samples the head word before it changes.
  logic pop_q = 0;
  always @(posedge clk) pop_q <= fifo_request && fifo_ready;
  always @(negedge clk) if (pop_q) void'(fq.pop_front());

  // Expected elements.
  logic [15:0] exp_val[$];
  logic [4:0]  exp_dst[$];
  logic [15:0] model_preg[32];
  int n_elem_seen = 0, n_me_intra = 0, n_me_inter = 0, n_align = 0;

  always @(posedge clk) begin
    if (rst_n && elem_valid) begin
      n_elem_seen++;
      if (exp_val.size() == 0) check(0, "unexpected element");
      else begin
        check(elem_value == exp_val[0] && elem_dest == exp_dst[0],
              $sformatf("element %0d: got %0d->r%0d want %0d->r%0d", n_elem_seen, elem_value, elem_dest, exp_val[0], exp_dst[0]));
        void'(exp_val.pop_front());
        void'(exp_dst.pop_front());
      end
    end
    if (intra) n_me_intra++;
    if (inter) n_me_inter++;
  end

  bit bits[$];
  task automatic put_bits(input longint v, input int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask
  task automatic put_ue(input int v);
    int lz;
    lz = $clog2(v + 2) - 1;
    put_bits(0, lz);
    put_bits(v + 1, lz + 1);
  endtask

  // coded_block_pattern for some codeNums (intra, inter), from the standard.
  int me_code[7]  = '{0, 1, 2, 3, 12, 29, 47};
  int me_intra[7] = '{47, 31, 15, 0, 39, 1, 41};
  int me_inter[7] = '{0, 16, 1, 2, 47, 43, 41};

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model_preg[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int unit = 0; unit < 12; unit++) begin
      int n;
      int t0, nstray;
      bits.delete();
      n = 1 + $urandom_range(0, 30);
      // Microprogram and bitstream.
      for (int j = 0; j < n; j++) begin
        uinstr_t u;
        int sel, v, len, c;
        sel = $urandom_range(0, 9);
        u.dest = 5'($urandom_range(0, 31));
        u.n = '0;
        case (sel)
          0, 1: begin
            u.desc = DESC_U; len = $urandom_range(1, 16); u.n = 5'(len);
            v = $urandom_range(0, (1 << len) - 1); put_bits(v, len);
          end
          2, 3: begin
            u.desc = DESC_UE;
            v = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 65534) : $urandom_range(0, 40);
            put_ue(v);
          end
          4, 5: begin
            u.desc = DESC_SE;
            v = $urandom_range(0, 400) - 200;
            put_ue(v > 0 ? 2 * v - 1 : -2 * v);
          end
          6: begin
            u.desc = DESC_TE;
            if ($urandom_range(0, 1)) begin u.n = 5'd1; v = $urandom_range(0, 1); put_bits(!v, 1); end
            else begin u.n = 5'd2; v = $urandom_range(0, 20); put_ue(v); end
          end
          7, 8: begin
            u.desc = DESC_ME; u.n = 5'($urandom_range(0, 1)); c = $urandom_range(0, 6);
            v = u.n[0] ? me_inter[c] : me_intra[c];
            put_ue(me_code[c]);
          end
          default: begin
            u.desc = DESC_ALIGN; n_align++;
            while (bits.size() % 8 != 0) bits.push_back(1'b0);
            // Put a marker byte after the alignment so a wrong skip shows.
            v = -1;
          end
        endcase
        if (u.desc != DESC_ALIGN) begin
          exp_val.push_back(16'(v));
          exp_dst.push_back(u.dest);
          model_preg[u.dest] = 16'(v);
        end
        @(negedge clk);
        mp_we = 1; mp_addr = 5'(j); mp_wdata = u;
      end
      @(negedge clk);
      mp_we = 1; mp_addr = 5'(n); mp_wdata = {DESC_END, 10'd0};
      @(negedge clk);
      mp_we = 0;
      // Trailing bits, then pack into words.
      put_bits(32'hA5C3_0F81, 32);
      while (bits.size() % 32 != 0) bits.push_back(1'b0);
      // Stray words of an earlier unit.
      nstray = $urandom_range(0, 3);
      for (int s = 0; s < nstray; s++) fq.push_back({2'b00, 32'($urandom)});
      for (int w = 0; w < bits.size() / 32; w++) begin
        logic [31:0] d;
        for (int b = 0; b < 32; b++) d[31-b] = bits[32*w + b];
        fq.push_back({(w == 0), (w == bits.size() / 32 - 1), d});
      end
      // Run, with the FIFO sometimes starved in odd units.
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = 0;
      while (busy) begin
        gate = (unit % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        @(negedge clk);
        t0++;
      end
      gate = 1;
      check(!error, "no error");
      check(exp_val.size() == 0, $sformatf("all elements out (%0d left)", exp_val.size()));
      // Even units: FIFO always ready. One cycle per stray word dropped, two to
      // fill the window, one per instruction and one for DESC_END.
      if (unit % 2 == 0) check(t0 == nstray + 2 + n + 1, $sformatf("cycles %0d for %0d instructions", t0, n));
      for (int r = 0; r < 32; r++) begin
        preg_addr = 5'(r);
        #1;
        check(preg_rdata == model_preg[r], $sformatf("preg %0d", r));
      end
      fq.delete();
    end
    // A 16-zero prefix is outside the supported range.
    @(negedge clk);
    mp_we = 1; mp_addr = 0; mp_wdata = {DESC_UE, 5'd0, 5'd0};
    @(negedge clk);
    mp_addr = 1; mp_wdata = {DESC_END, 10'd0};
    @(negedge clk);
    mp_we = 0;
    fq.push_back({2'b10, 32'h0000_8000});
    fq.push_back({2'b01, 32'h0});
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    check(error, "error on 16-zero prefix");
    check(n_me_intra > 0 && n_me_inter > 0 && n_align > 0, "intra and inter me(v) and align used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
