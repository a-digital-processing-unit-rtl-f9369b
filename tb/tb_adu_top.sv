// tb_adu_top: end-to-end test of the digital processing unit at its default
// parameters.
//
// The testbench models the three ADCs: a PMT signal in photoelectrons (p.e.)
// is digitised with gains of 255/16, 255/100 and 255/1000 LSB per p.e. (full
// scale 16, 100 and 1000 p.e.), on a baseline of 3 LSB with random noise, and
// the reference shift requested by each ADC's baseline regulator is applied
// (one LSB per control step). Phases:
//   1. a ramp on ADC 1 right after reset: the stream must start with the reset
//      word and a metadata word, the word of samples 35,36,37,38 (hex) must
//      come out as 32'h38373635, and the latency is checked;
//   2. triangular pulses up to 900 p.e. with a trigger at each pulse: the
//      selection must step through ADC 1, 2, 3 and back, with noise compressed
//      between pulses;
//   3. a burst with a trigger on every word: metadata ahead of every word
//      fills the ring buffer until it overflows and words are dropped;
//   4. a long stretch without light (over 65536 words, so the time stamp
//      wraps) with two baseline steps of +4 LSB on every ADC: the output rate
//      must fall to about half a word per input word, and the regulators must
//      bring the average baselines back to the target;
//   5. the internal waveform generator played at both entry points.
// A decoder parses the output stream (reset word, metadata, data, compressed
// noise) and checks every word against what was driven, so that every word
// not dropped is accounted for. Each mechanism is counted and must occur.
module tb_adu_top;
  import adu_pkg::*;

  localparam int MAXW = 90000;     // words recorded

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 1'b0, trig = 1'b0;
  logic [WORD_W-1:0] adc1 = '0, adc2 = '0, adc3 = '0;
  logic [SAMPLE_W-1:0] thr_noise = 8'd12, thr_high = 8'd240, thr_med = 8'd240;
  logic wg_cfg_we = 1'b0;
  logic [5:0] wg_cfg_addr = '0;
  logic [3*WORD_W-1:0] wg_cfg_data = '0;
  logic [1:0] wg_entry = 2'd0;
  logic [6:0] wg_length = 7'd16;
  logic wg_play = 1'b0;
  logic [SAMPLE_W-1:0] bl_target = 8'd3, bl_switch_thr = 8'd2;
  logic [3:0] bl_coarse_shift = 4'd2, bl_fine_shift = 4'd5;
  logic bl_freeze = 1'b0;
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
      if (failures < 15) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- records
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] rec_data  [MAXW];
  logic [1:0]  rec_src   [MAXW];
  bit          rec_noise [MAXW];
  bit          rec_trig  [MAXW];
  int          rec_cyc   [MAXW];
  int          nwords = 0;      // words entering the tagging stage

  // counts of the mechanisms
  int n_src [4] = '{0, 0, 0, 0};
  int n_switch = 0, n_noise2 = 0, n_noise1 = 0, n_meta_trig = 0, n_meta_ovf = 0;
  int n_meta_lost = 0, n_dropped = 0, n_wg_adc = 0, n_wg_sel = 0, n_coarse = 0;
  int n_reset = 0, n_decoded = 0;

  // independent selection model (same rules as the unit's documentation)
  function automatic void select(input logic [31:0] a1, a2, a3,
                                 output logic [31:0] d, output logic [1:0] s, output bit n);
    bit hi = 0, md = 0, nz = 1;
    for (int i = 0; i < 4; i++) begin
      if (a1[8*i +: 8] >= thr_high) hi = 1;
      if (a2[8*i +: 8] >= thr_med)  md = 1;
      if (!(a1[8*i +: 8] < thr_noise && a1[8*i +: 8] < 16)) nz = 0;
    end
    s = md ? 2'd3 : hi ? 2'd2 : 2'd1;
    d = (s == 3) ? a3 : (s == 2) ? a2 : a1;
    n = (s == 1) && nz;
  endfunction

  // the word that reaches the tagging stage one clock after the ADC words;
  // recorded here from the selector output, checked against the model
  logic        pend_v = 0, pend_direct = 0, pend_trig = 0;
  logic [31:0] pend_a [3];
  logic [31:0] pend_d;
  logic [1:0]  pend_s;
  bit          pend_n;

  always @(posedge clk) if (rst_n) begin
    if (pend_v) begin
      logic [31:0] d; logic [1:0] s; bit n;
      if (pend_direct) begin d = pend_d; s = pend_s; n = pend_n; end
      else select(pend_a[0], pend_a[1], pend_a[2], d, s, n);
      if (nwords < MAXW) begin
        rec_data[nwords]  = d;
        rec_src[nwords]   = s;
        rec_noise[nwords] = n;
        rec_trig[nwords]  = pend_trig;
        rec_cyc[nwords]   = cyc;
      end
      nwords++;
      n_src[s]++;
    end
  end

  // ------------------------------------------------------------- ADC model
  real base_off = 0.0;                 // baseline drift, LSB
  real gain [3] = '{255.0 / 16.0, 255.0 / 100.0, 255.0 / 1000.0};

  function automatic logic [31:0] adc_word(int k, real pe [4]);
    logic [31:0] w;
    for (int i = 0; i < 4; i++) begin
      real v = pe[i] * gain[k] + 3.0 + base_off
               + (real'($urandom_range(0, 1400)) / 1000.0 - 0.7)
               - real'(int'(dac_code[k]) - 32);
      int q = int'($floor(v));
      w[8*i +: 8] = (q < 0) ? 8'd0 : (q > 255) ? 8'd255 : 8'(q);
    end
    return w;
  endfunction

  // drive one clock word; pe[] is the light in p.e. of the four samples
  task automatic drive(real pe [4], bit t);
    @(negedge clk);
    adc_valid = 1'b1;
    trig      = t;
    adc1 = adc_word(0, pe);
    adc2 = adc_word(1, pe);
    adc3 = adc_word(2, pe);
    pend_v = (wg_entry == 2'd0 || !wg_play) ? 1'b1 : 1'b0;
    pend_direct = 1'b0;
    pend_trig = t;
    pend_a[0] = adc1; pend_a[1] = adc2; pend_a[2] = adc3;
  endtask

  task automatic drive_raw(logic [31:0] a1, a2, a3);
    @(negedge clk);
    adc_valid = 1'b1; trig = 1'b0;
    adc1 = a1; adc2 = a2; adc3 = a3;
    pend_v = 1'b1; pend_direct = 1'b0; pend_trig = 1'b0;
    pend_a[0] = a1; pend_a[1] = a2; pend_a[2] = a3;
  endtask

  task automatic dark(int words);
    real z [4] = '{0.0, 0.0, 0.0, 0.0};
    repeat (words) drive(z, 1'b0);
  endtask

  // triangle pulse of the given peak (p.e.) and rise/fall in words
  task automatic pulse(real peak, int rise, bit t_every);
    real pe [4];
    int n = 4 * rise;
    for (int w = 0; w < 2 * rise; w++) begin
      for (int i = 0; i < 4; i++) begin
        int s = 4 * w + i;
        pe[i] = (s < n) ? peak * real'(s) / real'(n) : peak * real'(2 * n - s) / real'(n);
      end
      drive(pe, t_every || w == 0);
    end
  endtask

  // ----------------------------------------------------------------- decoder
  int   abs_next = 0;
  logic [1:0] cur_src = 2'd1;
  bit   cur_noise = 0;
  bit   seen_first = 0;
  int   first_data_cyc = -1, ramp_probe_cyc = -1;

  function automatic logic [15:0] nib(logic [31:0] d);
    return {d[27:24], d[19:16], d[11:8], d[3:0]};
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      if (!seen_first) begin
        check(out_kind == KIND_RESET && out_word == 32'h0, "stream starts with the reset word");
        seen_first = 1;
      end
      case (out_kind)
        KIND_RESET: n_reset++;
        KIND_META: begin
          int a;
          a = (abs_next & ~32'hffff) | int'(out_word[31:16]);
          if (a < abs_next) a += 65536;
          check(a >= abs_next, "metadata time stamp");
          if (a > abs_next) check(out_word[6] == 1'b1, "skipped words are flagged as lost");
          abs_next = a;
          if (out_word[1:0] != cur_src) n_switch++;
          cur_src   = out_word[1:0];
          cur_noise = out_word[3];
          if (a < MAXW) begin
            check(cur_src == rec_src[a] && cur_noise == rec_noise[a], "metadata source and noise");
            if (!out_word[6]) check(out_word[4] == rec_trig[a], "metadata trigger");
            if (!out_word[6]) check(out_word[5] == (a > 0 && out_word[31:16] == 16'h0), "metadata counter overflow");
          end
          check(out_word[15:8] == 8'h00 && out_word[7] == 1'b0 && out_word[2] == 1'b0, "metadata reserved bits");
          if (out_word[4]) n_meta_trig++;
          if (out_word[5]) n_meta_ovf++;
          if (out_word[6]) n_meta_lost++;
        end
        KIND_DATA: begin
          if (abs_next < MAXW) begin
            check(out_word == rec_data[abs_next] && rec_src[abs_next] == cur_src &&
                  !rec_noise[abs_next], "data word");
            // cyc has already counted the edge that registered this word
            if (first_data_cyc < 0) first_data_cyc = cyc - 1 - rec_cyc[abs_next];
            if (abs_next == 10) ramp_probe_cyc = cyc - 1 - rec_cyc[abs_next];
          end
          abs_next++; n_decoded++;
        end
        KIND_NOISE2: begin
          if (abs_next + 1 < MAXW)
            check(cur_noise && rec_noise[abs_next] && rec_noise[abs_next+1] &&
                  out_word[15:0] == nib(rec_data[abs_next]) &&
                  out_word[31:16] == nib(rec_data[abs_next+1]), "compressed noise pair");
          abs_next += 2; n_decoded += 2; n_noise2++;
        end
        KIND_NOISE1: begin
          if (abs_next < MAXW)
            check(cur_noise && rec_noise[abs_next] && out_word[31:16] == 16'h0 &&
                  out_word[15:0] == nib(rec_data[abs_next]), "single compressed noise word");
          abs_next++; n_decoded++; n_noise1++;
        end
        default: check(0, "unknown output kind");
      endcase
    end
    if (buf_dropped) n_dropped++;
    if (bl_coarse != 3'b000) n_coarse++;
  end

  // ----------------------------------------------------------------- stimulus
  real ramp_pe [4];
  int  out_cnt, in_cnt;
  real mean [3];
  logic [3*WORD_W-1:0] pat [16];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // 1. ramp: four consecutive values per word, starting at 8'h1d
    for (int w = 0; w < 30; w++) begin
      logic [31:0] a1;
      for (int i = 0; i < 4; i++) a1[8*i +: 8] = 8'(8'h1d + 4 * w + i);
      drive_raw(a1, 32'h0505_0505, 32'h0101_0101);
    end
    dark(10);
    check(rec_data[6] == 32'h38373635, "ramp word 6 holds samples 35..38");
    $display("latency: first data word %0d clocks, steady %0d clocks", first_data_cyc, ramp_probe_cyc);
    // from the clock edge that registers the ADC words: selector, tagger,
    // buffer write, formatter = 3, plus the metadata word sent ahead
    check(first_data_cyc == 4, "first word latency: 3 clocks plus its metadata word");
    check(ramp_probe_cyc == 4, "steady latency: 3 clocks plus one metadata word");

    // 2. pulses of rising size with a trigger each, dark gaps between
    for (int p = 0; p < 12; p++) begin
      pulse(5.0 + 80.0 * p, 10 + p, 1'b0);
      dark(40);
    end

    // 3. burst: a trigger with every word, pulses back to back
    repeat (8) pulse(600.0, 20, 1'b1);
    dark(300);

    // 4. long dark stretch with baseline steps; regulators run freely
    in_cnt = 0; out_cnt = 0;
    fork
      begin
        dark(20000);
        base_off = 4.0;
        dark(20000);
        base_off = 8.0;
        dark(30000);
      end
      begin
        repeat (2000) @(posedge clk);
        repeat (60000) begin
          @(posedge clk);
          in_cnt++;
          if (out_valid) out_cnt++;
        end
      end
    join
    $display("dark stretch: %0d output words for %0d input words", out_cnt, in_cnt);
    check(real'(out_cnt) / real'(in_cnt) > 0.49 && real'(out_cnt) / real'(in_cnt) < 0.52,
          "noise compression halves the output rate");
    // average baselines after regulation
    for (int k = 0; k < 3; k++) mean[k] = 0.0;
    for (int w = nwords - 2000; w < nwords; w++)
      for (int i = 0; i < 4; i++) mean[0] += real'(rec_data[w][8*i +: 8]) / 8000.0;
    $display("ADC 1 mean baseline after regulation: %f (target 3), codes %0d %0d %0d",
             mean[0], dac_code[0], dac_code[1], dac_code[2]);
    check(mean[0] > 2.85 && mean[0] < 3.15, "ADC 1 baseline regulated to target");
    for (int k = 0; k < 3; k++)
      check(int'(dac_code[k]) >= 32 + 8 - 1 && int'(dac_code[k]) <= 32 + 8 + 1,
            "regulator code follows the 8 LSB drift");

    // 5. waveform generator: load 16 rows
    for (int r = 0; r < 16; r++) begin
      logic [31:0] a1, a2, a3;
      a1 = (r < 8) ? {4{8'(20 + 25 * r)}} : {4{8'd4}};
      a2 = {4{8'(30 * r)}};
      a3 = {4{8'(r)}};
      pat[r] = {a3, a2, a1};
      @(negedge clk);
      adc_valid = 1'b0; pend_v = 1'b0;
      wg_cfg_we = 1'b1; wg_cfg_addr = 6'(r); wg_cfg_data = pat[r];
    end
    @(negedge clk);
    wg_cfg_we = 1'b0;
    // entry point 1: ADC words replaced; play 48 clocks
    wg_entry = 2'd1; wg_length = 7'd16; wg_play = 1'b1;
    adc_valid = 1'b0;
    pend_v = 1'b0;
    for (int t = 0; t < 48; t++) begin
      @(negedge clk);
      pend_v = 1'b1; pend_direct = 1'b0; pend_trig = 1'b0;
      pend_a[0] = pat[t % 16][31:0]; pend_a[1] = pat[t % 16][63:32]; pend_a[2] = pat[t % 16][95:64];
      n_wg_adc++;
    end
    // the row register already holds the next row when play falls: it is
    // taken one more clock
    @(negedge clk);
    wg_play = 1'b0;
    pend_a[0] = pat[0][31:0]; pend_a[1] = pat[0][63:32]; pend_a[2] = pat[0][95:64];
    @(negedge clk);
    pend_v = 1'b0;
    // entry point 2: selected word replaced
    wg_entry = 2'd2; wg_play = 1'b1;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      pend_v = 1'b1; pend_direct = 1'b1; pend_trig = 1'b0;
      // rows played at the second entry point: data ADC 1 word, source and
      // noise from bits [66:64]
      pend_d = pat[t % 16][31:0]; pend_s = 2'(pat[t % 16][65:64]); pend_n = pat[t % 16][66];
      n_wg_sel++;
    end
    @(negedge clk);
    wg_play = 1'b0;
    pend_d = pat[0][31:0]; pend_s = 2'(pat[0][65:64]); pend_n = pat[0][66];
    @(negedge clk);
    pend_v = 1'b0; wg_entry = 2'd0;
    dark(8);
    // end with data words so that no noise word waits for a partner
    for (int w = 0; w < 6; w++) drive_raw(32'h4040_4040, 32'h0808_0808, 32'h0101_0101);
    @(negedge clk);
    adc_valid = 1'b0; pend_v = 1'b0;
    repeat (200) @(posedge clk);

    // ---------------------------------------------------- accounting
    $display("words %0d decoded %0d dropped %0d max buffer level %0d", nwords, n_decoded, n_dropped, buf_max_level);
    check(n_decoded + n_dropped == nwords, "every word is sent or reported dropped");
    check(n_reset == 1, "one reset word");
    $display("sources: ADC1 %0d ADC2 %0d ADC3 %0d; switches %0d; noise pairs %0d singles %0d",
             n_src[1], n_src[2], n_src[3], n_switch, n_noise2, n_noise1);
    $display("metadata: trigger %0d counter overflow %0d lost %0d; coarse tuning %0d clocks; generator %0d/%0d",
             n_meta_trig, n_meta_ovf, n_meta_lost, n_coarse, n_wg_adc, n_wg_sel);
    check(n_src[1] > 0, "ADC 1 selected");
    check(n_src[2] > 0, "ADC 2 selected");
    check(n_src[3] > 0, "ADC 3 selected");
    check(n_switch > 0, "source switch");
    check(n_noise2 > 0, "noise compression (pairs)");
    check(n_noise1 > 0, "noise compression (single)");
    check(n_meta_trig > 0, "trigger metadata");
    check(n_meta_ovf > 0, "time-stamp overflow metadata");
    check(n_dropped > 0 && n_meta_lost > 0, "buffer overflow");
    check(n_coarse > 0, "regulator coarse tuning");
    check(n_wg_adc > 0 && n_wg_sel > 0, "waveform generator at both entry points");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
