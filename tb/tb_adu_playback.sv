// tb_adu_playback: laboratory-style playback through the internal waveform
// generator, at the unit's default parameters.
//
// The pattern memory is loaded with one period of a light signal: 16 dark
// clock words (0.2 p.e.), then a pulse rising to 1000 p.e. and falling back
// over 48 words with a cubic shape, so that every range gets samples. It is
// stored as the three
// ADCs would see it (gains 255/16, 255/100 and 255/1000 LSB per p.e.). The
// generator plays it at the ADC entry point for several periods. The output
// stream is decoded and every sample is reconstructed in p.e. from the ADC
// the metadata names. Checks:
//   * each reconstructed sample is within one LSB of its ADC of the true
//     value (the chosen ADC is never saturated);
//   * the samples are labelled noise, high, medium and low gain, and each
//     label occurs;
//   * the output needs fewer words than the input, helped by compression.
module tb_adu_playback;
  import adu_pkg::*;

  localparam int ROWS = 64, PERIODS = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0, trig = 1'b0;
  logic [WORD_W-1:0] adc1 = '0, adc2 = '0, adc3 = '0;
  logic [SAMPLE_W-1:0] thr_noise = 8'd8, thr_high = 8'd250, thr_med = 8'd250;
  logic wg_cfg_we = 1'b0;
  logic [5:0] wg_cfg_addr = '0;
  logic [3*WORD_W-1:0] wg_cfg_data = '0;
  logic [1:0] wg_entry = 2'd0;
  logic [6:0] wg_length = 7'(ROWS);
  logic wg_play = 1'b0;
  logic [SAMPLE_W-1:0] bl_target = 8'd0, bl_switch_thr = 8'd2;
  logic [3:0] bl_coarse_shift = 4'd2, bl_fine_shift = 4'd5;
  logic bl_freeze = 1'b1;
  logic [5:0] dac_code [3];
  logic [2:0] bl_coarse;
  logic out_valid;
  logic [WORD_W-1:0] out_word;
  kind_e out_kind;
  logic [6:0] buf_level, buf_max_level;
  logic buf_dropped;

  adu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real gain [4] = '{1.0, 255.0 / 16.0, 255.0 / 100.0, 255.0 / 1000.0};
  real truth [ROWS * 4];      // p.e. of each sample of one period

  function automatic logic [7:0] digitise(real pe, int k);
    int q = int'($floor(pe * gain[k]));
    return (q > 255) ? 8'd255 : 8'(q);
  endfunction

  // decoder
  int abs_next = 0, cur_src = 1, words_in = 0, words_out = 0;
  bit cur_noise = 0;
  int n_label [5] = '{0, 0, 0, 0, 0};   // 0 noise, 1..3 source ADC
  int n_samples = 0;
  int limit = ROWS * PERIODS;

  task automatic sample_check(int idx, int value, int k, bit noise);
    real est, tru;
    if (idx >= limit) return;
    tru = truth[idx % (ROWS * 4)];
    est = real'(value) / gain[k];
    checks++;
    if (!(est <= tru + 1e-9 && tru - est < 1.0 / gain[k] + 1e-9) || (value == 255 && k != 3)) begin
      failures++;
      if (failures < 15) $display("sample %0d: true %f p.e., ADC %0d value %0d", idx, tru, k, value);
    end
    n_label[noise ? 0 : k]++;
    n_samples++;
  endtask

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      words_out++;
      case (out_kind)
        KIND_META: begin
          abs_next  = (abs_next & ~32'hffff) | int'(out_word[31:16]);
          cur_src   = int'(out_word[1:0]);
          cur_noise = out_word[3];
        end
        KIND_DATA: begin
          for (int i = 0; i < 4; i++) sample_check(4 * abs_next + i, int'(out_word[8*i +: 8]), cur_src, 0);
          abs_next++;
        end
        KIND_NOISE2: begin
          for (int i = 0; i < 8; i++) sample_check(4 * abs_next + i, int'(out_word[4*i +: 4]), 1, 1);
          abs_next += 2;
        end
        KIND_NOISE1: begin
          for (int i = 0; i < 4; i++) sample_check(4 * abs_next + i, int'(out_word[4*i +: 4]), 1, 1);
          abs_next++;
        end
        default: ;
      endcase
    end
  end

  initial begin
    limit = 4 * ROWS * PERIODS;
    for (int s = 0; s < ROWS * 4; s++) begin
      int  h = (ROWS * 4 - 64) / 2;     // samples of the rising half
      real u;
      if (s < 64) truth[s] = 0.2;
      else begin
        u = (s - 64 < h) ? real'(s - 64) / real'(h) : real'(2 * h - (s - 64)) / real'(h);
        truth[s] = 0.2 + 999.8 * u * u * u;
      end
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      logic [31:0] w [3];
      for (int k = 0; k < 3; k++)
        for (int i = 0; i < 4; i++) w[k][8*i +: 8] = digitise(truth[4 * r + i], k + 1);
      wg_cfg_we = 1'b1; wg_cfg_addr = 6'(r); wg_cfg_data = {w[2], w[1], w[0]};
      @(negedge clk);
    end
    wg_cfg_we = 1'b0;
    wg_entry = 2'd1; wg_play = 1'b1;
    repeat (ROWS * PERIODS) begin
      @(negedge clk);
      words_in++;
    end
    wg_play = 1'b0;
    repeat (100) @(posedge clk);
    $display("samples %0d: noise %0d, high gain %0d, medium gain %0d, low gain %0d",
             n_samples, n_label[0], n_label[1], n_label[2], n_label[3]);
    $display("%0d input words (x3 ADCs), %0d output words", words_in, words_out);
    checks++;
    // the final noise entry may wait for a partner
    if (n_samples < 4 * ROWS * PERIODS - 8) begin failures++; $display("samples missing"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_label[k] == 0) begin failures++; $display("label %0d never used", k); end
    end
    checks++;
    if (words_out >= words_in) begin failures++; $display("no data reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
