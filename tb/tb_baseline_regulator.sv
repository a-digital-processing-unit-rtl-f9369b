// tb_baseline_regulator: self-checking test of the baseline regulator.
//
// Part 1 (open loop): random sample words, targets and freeze pulses; the
// offset error, the coarse/fine choice and the control code are compared
// every clock with an integer model of the three stages (error two clocks
// before the code it produces, see the module header).
//
// Part 2 (closed loop): a behavioural ADC in the testbench turns an analog
// baseline (target 3 LSB plus a fractional offset, with two upward steps of
// 4 LSB, as in a drift test) into samples, shifted down by the control code
// minus mid-scale. After each step the loop must switch to coarse tuning,
// settle, and then keep the *average* ADC output within 0.2 LSB of the
// target while the code keeps toggling (sigma-delta dithering). The same run
// with coarse tuning disabled must settle more slowly.
module tb_baseline_regulator;
  import adu_pkg::*;

  localparam int CW = 6, FR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, freeze = 1'b0;
  logic [WORD_W-1:0] samples = '0;
  logic [SAMPLE_W-1:0] target = 8'd3, switch_thr = 8'd2;
  logic [3:0] coarse_shift = 4'd2, fine_shift = 4'd5;
  logic [CW-1:0] ctrl_code;
  logic signed [SAMPLE_W+2:0] err_out;
  logic coarse;
  int checks = 0, failures = 0;

  baseline_regulator #(.CTRL_W(CW), .FRAC(FR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
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

  // behavioural ADC: analog baseline in LSB, shifted by the control code
  real base;
  function automatic logic [31:0] adc_word(real b, int code);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin
      // analog noise of about +-0.7 LSB peak on every sample
      real v = b + (real'($urandom_range(0, 1400)) / 1000.0 - 0.7) - real'(code - (1 << (CW - 1)));
      int  q = int'($floor(v));
      if (q < 0) q = 0;
      if (q > 255) q = 255;
      w[8*i +: 8] = 8'(q);
    end
    return w;
  endfunction

  // closed-loop run: returns words until |mean-target| stays < 0.2 after a step
  int settle_words [2];
  real mean_err [2];
  task automatic closed_loop(int idx, int steps_at0, int steps_at1);
    int win = 0; int sum = 0; int settled = -1; int n_coarse = 0; int codes_seen = 0;
    int last_code = -1; int toggles = 0; real m;
    rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    freeze = 1'b0;
    for (int t = 0; t < 700; t++) begin
      base = 3.3 + ((t >= steps_at0) ? 4.0 : 0.0) + ((t >= steps_at1) ? 4.0 : 0.0);
      in_valid = 1'b1;
      samples  = adc_word(base, int'(ctrl_code));
      @(negedge clk);
      if (coarse) n_coarse++;
      if (t >= steps_at1) begin
        // running mean of the last 32 words of the ADC output
        sum += int'(samples[7:0]) + int'(samples[15:8]) + int'(samples[23:16]) + int'(samples[31:24]);
        win++;
        if (win == 32) begin
          m = real'(sum) / 128.0;
          if (settled < 0 && m > 2.8 && m < 3.2) settled = t - steps_at1;
          if (t > 600) mean_err[idx] = m - 3.0;
          sum = 0; win = 0;
        end
        if (t > 500 && int'(ctrl_code) != last_code) toggles++;
        last_code = int'(ctrl_code);
      end
    end
    settle_words[idx] = settled;
    if (idx == 0) begin
      check(n_coarse > 0, "coarse tuning used after a step");
      check(toggles > 4, "control code keeps regulating (sigma-delta toggling)");
      check(mean_err[0] < 0.2 && mean_err[0] > -0.2, "average baseline equals target");
      $display("closed loop: settled after %0d words, residual mean error %f, %0d code changes",
               settled, mean_err[0], toggles);
    end
  endtask

  initial begin
    int acc = (1 << (CW + FR - 1));
    int err_q = 0, err_q1 = 0; bit v_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // ---------------- part 1: open loop against a model --------------------
    for (int t = 0; t < 3000; t++) begin
      int s; int e; int sh;
      in_valid = ($urandom_range(0, 7) != 0);
      freeze   = ($urandom_range(0, 15) == 0);
      target   = 8'($urandom_range(0, 40));
      for (int i = 0; i < 4; i++) samples[8*i +: 8] = 8'($urandom_range(0, 60));
      s = 0;
      for (int i = 0; i < 4; i++) s += int'(samples[8*i +: 8]);
      e = s - 4 * int'(target);
      @(negedge clk);
      // the registered error is the one computed from the previous inputs
      if (in_valid) err_q = e;
      check(int'(err_out) == err_q, "offset error");
      // the accumulator took the error registered one clock earlier
      if (v_q) begin
        int mag;
        mag = err_q1 < 0 ? -err_q1 : err_q1;
        sh = (mag > 4 * int'(switch_thr)) ? int'(coarse_shift) : int'(fine_shift);
        acc = acc + ((err_q1 * (1 << FR)) >>> (2 + sh));
        if (acc < 0) acc = 0;
        if (acc > (1 << (CW + FR)) - 1) acc = (1 << (CW + FR)) - 1;
      end
      check(int'(ctrl_code) == (acc >> FR), "control code");
      check(coarse == ((err_q < 0 ? -err_q : err_q) > 4 * int'(switch_thr)), "coarse/fine switch");
      v_q    = in_valid && !freeze;
      err_q1 = err_q;
    end
    // ---------------- part 2: closed loop --------------------------------------
    target = 8'd3;
    closed_loop(0, 100, 350);
    switch_thr = 8'd255;                     // coarse tuning never selected
    closed_loop(1, 100, 350);
    $display("fine only: settled after %0d words", settle_words[1]);
    check(settle_words[0] >= 0 && (settle_words[1] < 0 || settle_words[1] > settle_words[0]),
          "coarse tuning settles faster than fine tuning alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
