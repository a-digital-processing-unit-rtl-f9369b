// adu_top: digital processing unit of the PMT receiver chip (ADU).
//
// Three 8-bit ADCs with different gains digitise the same PMT signal. This
// unit reduces their combined stream to a single one and regulates their
// baselines:
//
//   ADC 1..3 --> [waveform_generator] --> data_selector --> [waveform_generator]
//       --> data_tagger --> ring_buffer --> output_formatter --> out_word
//
//   ADC k --> baseline_regulator k --> dac_code[k] (to DAC MIN / DAC MID of ADC k)
//
// data_selector keeps one word of the three per clock (three-to-one), the
// tagger attaches source, time stamp and trigger, the ring buffer absorbs the
// overhead of reset and metadata words, and the formatter sends metadata ahead
// of data and compresses noise two-to-one. The waveform generator can replace
// the ADC words or the selected word with a programmed pattern for testing.
// One baseline regulator per ADC computes the control code for that ADC's
// reference DACs; the DACs, reference generators and ADCs are analog and lie
// outside this unit, so the codes are outputs and the loop closes through the
// ADC inputs.
//
// Interface: adc1..adc3 carry four samples per clock (sample 1 in bits [7:0])
// while adc_valid is high; trig is aligned with them. out_word/out_kind are
// valid when out_valid is high. The thresholds, the regulator settings and
// the generator port are static configuration inputs.
//
// Timing: a data word leaves the output register three clocks after the clock
// edge that registers it in the selector (selector, tagger, buffer write and
// formatter registers), plus one clock for each reset or metadata word sent
// ahead of it while it waits in the buffer. Noise entries may wait one more
// clock for a partner.
module adu_top
  import adu_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 64,  // ring buffer entries
  parameter int unsigned WG_DEPTH  = 64,  // waveform generator rows
  parameter int unsigned CTRL_W    = 6,   // regulator control bits per ADC
  parameter int unsigned FRAC      = 8    // regulator integrator fraction bits
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ADC words
  input  logic                        adc_valid,
  input  logic [WORD_W-1:0]           adc1,
  input  logic [WORD_W-1:0]           adc2,
  input  logic [WORD_W-1:0]           adc3,
  input  logic                        trig,
  // data selector thresholds
  input  logic [SAMPLE_W-1:0]         thr_noise,
  input  logic [SAMPLE_W-1:0]         thr_high,
  input  logic [SAMPLE_W-1:0]         thr_med,
  // waveform generator
  input  logic                        wg_cfg_we,
  input  logic [$clog2(WG_DEPTH)-1:0] wg_cfg_addr,
  input  logic [3*WORD_W-1:0]         wg_cfg_data,
  input  logic [1:0]                  wg_entry,
  input  logic [$clog2(WG_DEPTH):0]   wg_length,
  input  logic                        wg_play,
  // baseline regulators (shared settings)
  input  logic [SAMPLE_W-1:0]         bl_target,
  input  logic [3:0]                  bl_coarse_shift,
  input  logic [3:0]                  bl_fine_shift,
  input  logic [SAMPLE_W-1:0]         bl_switch_thr,
  input  logic                        bl_freeze,
  output logic [CTRL_W-1:0]           dac_code [3],
  output logic [2:0]                  bl_coarse,
  // processor output
  output logic                        out_valid,
  output logic [WORD_W-1:0]           out_word,
  output kind_e                       out_kind,
  // monitors
  output logic [$clog2(BUF_DEPTH):0]  buf_level,
  output logic [$clog2(BUF_DEPTH):0]  buf_max_level,
  output logic                        buf_dropped
);

  // ---- waveform generator, entry point at the ADC words -------------------
  logic              s_adc_valid;
  logic [WORD_W-1:0] adc_pins [3];
  logic [WORD_W-1:0] s_adc    [3];

  assign adc_pins[0] = adc1;
  assign adc_pins[1] = adc2;
  assign adc_pins[2] = adc3;

  logic              sel_valid, t_valid;
  logic [WORD_W-1:0] sel_data,  t_data;
  src_e              sel_src,   t_src;
  logic              sel_noise, t_noise;

  waveform_generator #(.DEPTH(WG_DEPTH)) u_wg (
    .clk, .rst_n,
    .cfg_we(wg_cfg_we), .cfg_addr(wg_cfg_addr), .cfg_data(wg_cfg_data),
    .entry(wg_entry), .length(wg_length), .play(wg_play),
    .adc_valid_in(adc_valid), .adc_in(adc_pins),
    .adc_valid_out(s_adc_valid), .adc_out(s_adc),
    .sel_valid_in(sel_valid), .sel_data_in(sel_data), .sel_src_in(sel_src),
    .sel_noise_in(sel_noise),
    .sel_valid_out(t_valid), .sel_data_out(t_data), .sel_src_out(t_src),
    .sel_noise_out(t_noise)
  );

  // ---- stage 1: data selection ---------------------------------------------
  data_selector u_sel (
    .clk, .rst_n,
    .in_valid(s_adc_valid), .adc1(s_adc[0]), .adc2(s_adc[1]), .adc3(s_adc[2]),
    .thr_noise, .thr_high, .thr_med,
    .out_valid(sel_valid), .out_data(sel_data), .out_src(sel_src),
    .out_noise(sel_noise)
  );

  // the trigger is aligned with the ADC words; delay it like the selector
  logic trig_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_q <= 1'b0;
    else        trig_q <= trig;
  end

  // ---- stage 2: tagging -----------------------------------------------------
  logic   wr_en, buf_full, buf_resume;
  entry_t wr_entry;

  // after an overflow, writing resumes once the buffer is half empty
  assign buf_resume = (buf_level <= ($clog2(BUF_DEPTH)+1)'(BUF_DEPTH / 2));

  data_tagger u_tag (
    .clk, .rst_n,
    .in_valid(t_valid), .in_data(t_data), .in_src(t_src), .in_noise(t_noise),
    .in_trig(trig_q), .buf_full, .buf_resume,
    .wr_en, .wr_entry, .dropped(buf_dropped)
  );

  // ---- internal storage -----------------------------------------------------
  logic       rd_valid, rd_valid2;
  entry_t     rd_entry, rd_entry2;
  logic [1:0] rd_pop;

  ring_buffer #(.WIDTH($bits(entry_t)), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en, .wr_data(wr_entry), .full(buf_full),
    .rd_pop, .rd_valid, .rd_data(rd_entry), .rd_valid2, .rd_data2(rd_entry2),
    .level(buf_level), .max_level(buf_max_level)
  );

  // ---- stage 3: formatting and noise compression ----------------------------
  output_formatter u_fmt (
    .clk, .rst_n,
    .rd_valid, .rd_entry, .rd_valid2, .rd_entry2, .rd_pop,
    .out_valid, .out_word, .out_kind
  );

  // ---- baseline regulation, one loop per ADC --------------------------------
  for (genvar k = 0; k < 3; k++) begin : g_bl
    logic signed [SAMPLE_W+2:0] err_unused;
    baseline_regulator #(.CTRL_W(CTRL_W), .FRAC(FRAC)) u_bl (
      .clk, .rst_n,
      .in_valid(adc_valid), .samples(adc_pins[k]),
      .target(bl_target), .coarse_shift(bl_coarse_shift),
      .fine_shift(bl_fine_shift), .switch_thr(bl_switch_thr),
      .freeze(bl_freeze),
      .ctrl_code(dac_code[k]), .err_out(err_unused), .coarse(bl_coarse[k])
    );
  end

endmodule
