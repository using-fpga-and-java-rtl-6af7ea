// Self-checking testbench for recon_adder: random residuals (including values
// far outside the sample range) and predictions from both sources; each output
// is compared with the clipped sum worked out here, one cycle after the input.
module tb_recon_adder;
  logic clk = 0, rst_n = 0;
  logic res_valid = 0, sel_inter = 0, out_valid, out_clipped;
  logic [15:0] res_data = '0;
  logic [7:0] pred_intra = '0, pred_inter = '0, out_sample;

  recon_adder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int r, p, e;
      bit v;
      @(negedge clk);
      v = ($urandom_range(0, 3) != 0);
      r = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 65535) - 32768 : $urandom_range(0, 600) - 300;
      res_valid = v; res_data = 16'(r);
      sel_inter = 1'($urandom_range(0, 1));
      pred_intra = 8'($urandom); pred_inter = 8'($urandom);
      p = sel_inter ? pred_inter : pred_intra;
      e = p + r;
      if (e < 0) begin e = 0; n_lo++; end
      else if (e > 255) begin e = 255; n_hi++; end
      @(negedge clk);
      res_valid = 0;
      check(out_valid == v, "valid one cycle later");
      if (v) check(out_sample == 8'(e), $sformatf("sample %0d want %0d", out_sample, e));
      if (v) check(out_clipped == (p + r < 0 || p + r > 255), "clip flag");
    end
    check(n_lo > 0 && n_hi > 0, "both clip directions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
