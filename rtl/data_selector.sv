// data_selector: first stage of the main data processor.
//
// Three ADCs with different gains sample the same PMT signal in parallel; only
// one of them needs to be sent. Every clock this stage receives one 32-bit word
// (four 8-bit samples) from each ADC and forwards a single word ("3 samples ->
// 1 sample") together with the number of the ADC it came from.
//
// Selection, made per clock word, with programmable thresholds:
//   * any ADC 2 sample >= thr_med   -> ADC 3 (medium-gain range exceeded)
//   * else any ADC 1 sample >= thr_high -> ADC 2 (high-gain range exceeded)
//   * else                             -> ADC 1 (default, best resolution)
// so the unsaturated ADC with the best resolution is always taken, and the
// choice falls back as soon as the amplitude drops below the thresholds.
// A word from ADC 1 whose four samples are all below thr_noise (and below 16,
// so that they fit four bits) is flagged as noise for later compression.
//
// The three thresholds and the default choice of ADC 1 follow the source
// design. Which ADC each threshold is compared with, the per-word (rather than
// per-sample) granularity and the absence of hysteresis are this design's own
// choices.
//
// Timing: registered, one clock of latency; out_valid follows in_valid.
module data_selector
  import adu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] adc1,      // high gain ADC word
  input  logic [WORD_W-1:0] adc2,      // medium gain ADC word
  input  logic [WORD_W-1:0] adc3,      // low gain ADC word
  input  logic [SAMPLE_W-1:0] thr_noise,
  input  logic [SAMPLE_W-1:0] thr_high,
  input  logic [SAMPLE_W-1:0] thr_med,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  output src_e              out_src,
  output logic              out_noise
);

  logic over_high, over_med, all_noise;
  src_e sel;

  always_comb begin
    over_high = 1'b0;
    over_med  = 1'b0;
    all_noise = 1'b1;
    for (int i = 0; i < SAMPLES; i++) begin
      if (adc1[SAMPLE_W*i +: SAMPLE_W] >= thr_high) over_high = 1'b1;
      if (adc2[SAMPLE_W*i +: SAMPLE_W] >= thr_med)  over_med  = 1'b1;
      if (adc1[SAMPLE_W*i +: SAMPLE_W] >= thr_noise ||
          adc1[SAMPLE_W*i +: SAMPLE_W] >= 8'd16)     all_noise = 1'b0;
    end
    if (over_med)       sel = SRC_ADC3;
    else if (over_high) sel = SRC_ADC2;
    else                sel = SRC_ADC1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_src   <= SRC_ADC1;
      out_noise <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_src   <= sel;
        out_noise <= all_noise && (sel == SRC_ADC1);
        unique case (sel)
          SRC_ADC3: out_data <= adc3;
          SRC_ADC2: out_data <= adc2;
          default:  out_data <= adc1;
        endcase
      end
    end
  end

endmodule
