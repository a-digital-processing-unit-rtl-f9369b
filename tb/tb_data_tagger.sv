// tb_data_tagger: self-checking test of the tagging stage. Random selected
// words with random triggers are fed in while the buffer-full input is raised
// at random. Each clock the write strobe and the written entry (data, source,
// noise, time stamp, trigger, time-stamp overflow and lost flags) are compared
// with a model; the run is long enough for the 16-bit time stamp to wrap.
module tb_data_tagger;
  import adu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_noise = 1'b0, in_trig = 1'b0, buf_full = 1'b0, buf_resume = 1'b1;
  logic [WORD_W-1:0] in_data = '0;
  src_e in_src = SRC_ADC1;
  logic wr_en, dropped;
  entry_t wr_entry;
  int checks = 0, failures = 0;
  int n_drop = 0, n_ovf = 0, n_lost = 0, n_carry = 0;

  data_tagger dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit     reg_v = 0;
  entry_t reg_e;
  int     count = 0;          // words tagged so far
  bit     p_lost = 0, p_trig = 0, p_ovf = 0;
  bit     dmode = 0;
  bit     drop;
  int     n_hyst = 0;

  initial begin
    entry_t exp_e;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 80000; t++) begin
      @(negedge clk);
      buf_full   = ($urandom_range(0, 9) == 0);
      buf_resume = !buf_full && ($urandom_range(0, 3) == 0);
      #1;
      // check the entry registered at the last edge
      drop = reg_v && (buf_full || (dmode && !buf_resume));
      if (drop && !buf_full) n_hyst++;
      checks++;
      if (wr_en !== (reg_v && !drop) || dropped !== drop) begin
        failures++;
        if (failures < 10) $display("strobe mismatch t=%0d", t);
      end
      if (reg_v) begin
        exp_e        = reg_e;
        exp_e.lost   = p_lost;
        exp_e.trig   = reg_e.trig | p_trig;
        exp_e.ts_ovf = reg_e.ts_ovf | p_ovf;
        if (!drop) begin
          checks++;
          if (wr_entry !== exp_e) begin
            failures++;
            if (failures < 10) $display("entry mismatch t=%0d got %h exp %h", t, wr_entry, exp_e);
          end
          if (exp_e.ts_ovf) n_ovf++;
          if (exp_e.lost) n_lost++;
          if (p_trig) n_carry++;
          p_lost = 0; p_trig = 0; p_ovf = 0;
        end else begin
          n_drop++;
          p_lost = 1; p_trig = exp_e.trig; p_ovf = exp_e.ts_ovf;
        end
      end
      if (drop) dmode = 1; else if (buf_resume) dmode = 0;
      // next input
      in_valid = ($urandom_range(0, 9) != 0);
      in_data  = 32'($urandom);
      in_src   = src_e'($urandom_range(1, 3));
      in_noise = $urandom_range(0, 1);
      in_trig  = ($urandom_range(0, 9) == 0);
      reg_v = in_valid;
      if (in_valid) begin
        reg_e.data   = in_data;
        reg_e.src    = in_src;
        reg_e.noise  = in_noise;
        reg_e.trig   = in_trig;
        reg_e.ts     = 16'(count);
        reg_e.ts_ovf = (count > 0) && (16'(count) == 16'd0);
        reg_e.lost   = 1'b0;
        count++;
      end
    end
    checks++;
    if (n_drop == 0 || n_ovf == 0 || n_lost == 0 || n_carry == 0 || n_hyst == 0) begin
      failures++;
      $display("coverage hole: drop %0d ovf %0d lost %0d carried trig %0d", n_drop, n_ovf, n_lost, n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
