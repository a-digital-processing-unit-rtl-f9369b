// tb_data_selector: self-checking test of the three-to-one data selector.
// Drives random and directed ADC words with fixed thresholds, predicts the
// selected ADC, the forwarded word and the noise flag from its own model, and
// checks them one clock later (the selector's latency).
module tb_data_selector;
  import adu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [WORD_W-1:0] adc1 = '0, adc2 = '0, adc3 = '0;
  logic [SAMPLE_W-1:0] thr_noise = 8'd10, thr_high = 8'd200, thr_med = 8'd180;
  logic out_valid, out_noise;
  logic [WORD_W-1:0] out_data;
  src_e out_src;
  int checks = 0, failures = 0;
  int n_src [4] = '{0, 0, 0, 0};
  int n_noise = 0;

  data_selector dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent model
  function automatic void model(input logic [31:0] a1, a2, a3,
                                output logic [31:0] d, output int s, output logic n);
    bit hi = 0, md = 0, nz = 1;
    for (int i = 0; i < 4; i++) begin
      int x1 = int'(a1 >> (8*i)) & 255;
      int x2 = int'(a2 >> (8*i)) & 255;
      if (x1 >= int'(thr_high)) hi = 1;
      if (x2 >= int'(thr_med))  md = 1;
      if (!(x1 < int'(thr_noise) && x1 < 16)) nz = 0;
    end
    s = md ? 3 : hi ? 2 : 1;
    d = (s == 3) ? a3 : (s == 2) ? a2 : a1;
    n = (s == 1) && nz;
  endfunction

  function automatic logic [31:0] rnd_word(int kind);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin
      case (kind)
        0: w[8*i +: 8] = 8'($urandom_range(0, 9));     // noise
        1: w[8*i +: 8] = 8'($urandom_range(0, 255));
        default: w[8*i +: 8] = 8'($urandom_range(150, 255));
      endcase
    end
    return w;
  endfunction

  logic [31:0] exp_d; int exp_s; logic exp_n;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      adc1 = rnd_word($urandom_range(0, 2));
      adc2 = rnd_word($urandom_range(0, 2));
      adc3 = rnd_word(1);
      if (t % 7 == 0) begin            // directed: just below / at thresholds
        adc1 = {8'd3, 8'd199, 8'd2, 8'd1};
        adc2 = (t % 14 == 0) ? {8'd180, 8'd0, 8'd0, 8'd0} : {8'd179, 8'd0, 8'd0, 8'd0};
      end
      if (t % 11 == 0) adc1 = {8'd9, 8'd9, 8'd0, 8'd9};
      model(adc1, adc2, adc3, exp_d, exp_s, exp_n);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_data !== exp_d || int'(out_src) != exp_s || out_noise !== exp_n) begin
        failures++;
        if (failures < 10)
          $display("mismatch t=%0d got %h src %0d n %0b exp %h src %0d n %0b",
                   t, out_data, out_src, out_noise, exp_d, exp_s, exp_n);
      end
      n_src[exp_s]++;
      if (exp_n) n_noise++;
    end
    // noise threshold above 16: samples 16..19 are not noise
    thr_noise = 8'd20;
    @(negedge clk); adc1 = {8'd16, 8'd1, 8'd1, 8'd1}; adc2 = '0;
    @(posedge clk); #1; checks++;
    if (out_noise !== 1'b0 || out_src != SRC_ADC1) failures++;
    @(negedge clk); adc1 = {8'd15, 8'd1, 8'd1, 8'd19 - 8'd4};
    @(posedge clk); #1; checks++;
    if (out_noise !== 1'b1) failures++;
    // every source and noise must have been exercised
    checks++;
    if (n_src[1] == 0 || n_src[2] == 0 || n_src[3] == 0 || n_noise == 0) begin
      failures++;
      $display("coverage hole: src1 %0d src2 %0d src3 %0d noise %0d",
               n_src[1], n_src[2], n_src[3], n_noise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
