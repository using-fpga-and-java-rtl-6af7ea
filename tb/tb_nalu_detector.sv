// Self-checking testbench for nalu_detector.
//
// Builds a random Annex B byte stream of NAL units (2 to 40 bytes, 3- and
// 4-byte start codes, payloads with no 00 00 pair so that no start code is
// emulated), feeds it word by word with random gaps, and compares every
// reassembled NAL unit, its first/last flags and the start-code pulses with the
// units that were generated. The first unit is a 2-byte access unit delimiter.
module tb_nalu_detector;
  logic clk = 0, rst_n = 0;
  logic data_en = 0, data_last = 0, drain_hold = 0;
  logic [31:0] data = '0;
  logic busy, next_nalu, out_valid, out_first, out_last, overrun;
  logic [31:0] out_data;
  logic [2:0] out_bytes;

  nalu_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned stream[$];
  byte unsigned units[$][$];
  byte unsigned got[$];
  int n_units = 0, n_got = 0, n_pulses = 0, n_four = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Collect output words.
  always @(posedge clk) begin
    if (rst_n && next_nalu) n_pulses++;
    if (rst_n && out_valid) begin
      check(out_bytes >= 1 && out_bytes <= 4, "out_bytes range");
      check(out_first == (got.size() == 0), "out_first flag");
      for (int i = 0; i < out_bytes; i++) got.push_back(out_data[31-8*i -: 8]);
      for (int i = int'(out_bytes); i < 4; i++) check(out_data[31-8*i -: 8] == 0, "padding is zero");
      if (out_last) begin
        if (n_got < units.size()) begin
          check(got.size() == units[n_got].size(), $sformatf("unit %0d length %0d vs %0d", n_got, got.size(), units[n_got].size()));
          for (int i = 0; i < got.size() && i < units[n_got].size(); i++)
            check(got[i] == units[n_got][i], $sformatf("unit %0d byte %0d", n_got, i));
        end else check(0, "extra unit");
        n_got++;
        got.delete();
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    n_units = 60;
    for (int u = 0; u < n_units; u++) begin
      byte unsigned nal[$];
      int len;
      bit four;
      nal.delete();
      len = (u == 0) ? 2 : 2 + $urandom_range(0, 38);
      four = (u == 0) || ($urandom_range(0, 1) == 1);
      if (four) begin stream.push_back(8'h00); n_four++; end
      stream.push_back(8'h00); stream.push_back(8'h00); stream.push_back(8'h01);
      for (int i = 0; i < len; i++) begin
        byte unsigned b;
        b = (i == 0) ? 8'h09 : 8'($urandom_range(0, 255));
        if (i == len - 1 && b == 0) b = 8'h80;
        if (b == 0 && nal.size() > 0 && nal[nal.size()-1] == 0) b = 8'h03;
        nal.push_back(b);
        stream.push_back(b);
      end
      units.push_back(nal);
    end
    // Make the stream a whole number of words by growing the last unit.
    while (stream.size() % 4 != 0) begin
      stream.push_back(8'h5A);
      units[n_units-1].push_back(8'h5A);
    end
    total = stream.size() / 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < total; w++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      data_en   = 1;
      data      = {stream[4*w], stream[4*w+1], stream[4*w+2], stream[4*w+3]};
      data_last = (w == total - 1);
      @(posedge clk);
      #1;
      data_en   = 0;
      data_last = 0;
    end
    @(posedge clk);
    while (busy) begin
      drain_hold = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      #1;
    end
    drain_hold = 0;
    repeat (5) @(posedge clk);
    check(n_got == n_units, $sformatf("units out %0d of %0d", n_got, n_units));
    check(n_pulses == n_units, $sformatf("start-code pulses %0d", n_pulses));
    check(!overrun, "no overrun");
    check(n_four > 0 && n_four < n_units, "both start-code forms used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
