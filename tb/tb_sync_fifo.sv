// Self-checking testbench for sync_fifo: random writes and reads against a
// queue model, checking data order, the full/empty flags and the count, and
// that writes into a full FIFO and reads from an empty one are ignored.
module tb_sync_fifo;
  localparam int W = 12, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (!empty) check(rd_data == model[0], "read data");
      if (full) n_full++;
      if (empty) n_empty++;
      // Phases that favour filling and draining.
      wr_en   = ($urandom_range(0, 99) < ((i / 200) % 2 ? 30 : 75));
      rd_en   = ($urandom_range(0, 99) < ((i / 200) % 2 ? 75 : 30));
      wr_data = W'($urandom);
      begin
        bit can_wr;
        can_wr = wr_en && (model.size() < DEPTH);
        @(posedge clk);
        if (rd_en && model.size() > 0) void'(model.pop_front());
        if (can_wr) model.push_back(wr_data);
      end
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
