// tb_ring_buffer: self-checking test of the ring buffer. Random writes and
// reads of 0, 1 or 2 entries, biased so that the buffer fills up and drains
// completely in phases, are compared with a queue model: both read windows,
// the full flag, the level and the high-water mark are checked every clock.
module tb_ring_buffer;
  localparam int W = 16, D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [W-1:0] wr_data = '0;
  logic full, rd_valid, rd_valid2;
  logic [1:0] rd_pop = 2'd0;
  logic [W-1:0] rd_data, rd_data2;
  logic [$clog2(D):0] level, max_level;
  int checks = 0, failures = 0;
  int n_full = 0, n_pop2 = 0, n_empty = 0, n_wrfull = 0;
  logic [W-1:0] q[$];
  int hw = 0;

  ring_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int phase = (t / 200) % 2;   // 0: mostly write, 1: mostly read
      @(negedge clk);
      // compare the read side with the model
      check(rd_valid == (q.size() > 0), "rd_valid");
      check(rd_valid2 == (q.size() > 1), "rd_valid2");
      check(full == (q.size() == D), "full");
      check(int'(level) == q.size(), "level");
      check(int'(max_level) == hw, "max_level");
      if (q.size() > 0) check(rd_data == q[0], "rd_data");
      if (q.size() > 1) check(rd_data2 == q[1], "rd_data2");
      if (q.size() > hw) hw = q.size();
      // choose the next action
      rd_pop = 2'd0;
      if ($urandom_range(0, 9) < (phase ? 7 : 3)) begin
        if (q.size() > 1 && $urandom_range(0, 1) == 1) rd_pop = 2'd2;
        else if (q.size() > 0) rd_pop = 2'd1;
      end
      wr_en   = ($urandom_range(0, 9) < (phase ? 3 : 8)) && (q.size() < D || rd_pop != 0);
      wr_data = W'($urandom);
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      if (rd_pop == 2'd2) n_pop2++;
      if (q.size() == D && wr_en) n_wrfull++;
      // update the model
      for (int i = 0; i < int'(rd_pop); i++) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    check(n_full > 0 && n_empty > 0 && n_pop2 > 0 && n_wrfull > 0, "coverage");
    $display("full %0d empty %0d pop2 %0d write-while-full %0d", n_full, n_empty, n_pop2, n_wrfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
