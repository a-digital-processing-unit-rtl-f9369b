// tb_waveform_generator: self-checking test of the test-waveform source.
// Loads a random pattern, then checks for several lengths and both entry
// points that the rows are played in a loop starting with row 0 one clock
// after play is raised, that the other entry point passes its inputs
// unchanged, and that everything passes through when the generator is off.
module tb_waveform_generator;
  import adu_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [$clog2(D)-1:0] cfg_addr = '0;
  logic [3*WORD_W-1:0] cfg_data = '0;
  logic [1:0] entry = 2'd0;
  logic [$clog2(D):0] length = '0;
  logic play = 1'b0;
  logic adc_valid_in = 1'b0, adc_valid_out;
  logic [WORD_W-1:0] adc_in [3], adc_out [3];
  logic sel_valid_in = 1'b0, sel_noise_in = 1'b0, sel_valid_out, sel_noise_out;
  logic [WORD_W-1:0] sel_data_in = '0, sel_data_out;
  src_e sel_src_in = SRC_ADC2, sel_src_out;
  int checks = 0, failures = 0;
  logic [3*WORD_W-1:0] pat [D];

  waveform_generator #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic drive_random();
    adc_valid_in = $urandom_range(0, 1);
    for (int i = 0; i < 3; i++) adc_in[i] = 32'($urandom);
    sel_valid_in = $urandom_range(0, 1);
    sel_data_in  = 32'($urandom);
    sel_src_in   = src_e'($urandom_range(1, 3));
    sel_noise_in = $urandom_range(0, 1);
  endtask

  task automatic check_pass_adc();
    check(adc_valid_out == adc_valid_in && adc_out == adc_in, "ADC pass-through");
  endtask
  task automatic check_pass_sel();
    check(sel_valid_out == sel_valid_in && sel_data_out == sel_data_in &&
          sel_src_out == sel_src_in && sel_noise_out == sel_noise_in, "selector pass-through");
  endtask

  initial begin
    for (int i = 0; i < 3; i++) adc_in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // load the pattern
    for (int r = 0; r < D; r++) begin
      pat[r] = {32'($urandom), 32'($urandom), 32'($urandom)};
      cfg_we = 1'b1; cfg_addr = r[$clog2(D)-1:0]; cfg_data = pat[r];
      @(negedge clk);
    end
    cfg_we = 1'b0;
    // generator off: everything passes
    for (int t = 0; t < 20; t++) begin
      drive_random(); #1; check_pass_adc(); check_pass_sel(); @(negedge clk);
    end
    // play at each entry point with several lengths
    for (int ep = 1; ep <= 2; ep++) begin
      foreach (pat[len]) begin
        int L;
        if (len % 5 != 0 && len != D - 1) continue;
        L = len + 1;
        entry = 2'(ep); length = ($clog2(D)+1)'(L); play = 1'b1;
        for (int t = 0; t < 3 * L + 4; t++) begin
          logic [3*WORD_W-1:0] row;
          @(negedge clk);
          drive_random(); #1;
          row = pat[t % L];
          if (ep == 1) begin
            check(adc_valid_out && adc_out[0] == row[31:0] && adc_out[1] == row[63:32] &&
                  adc_out[2] == row[95:64], "ADC entry point row");
            check_pass_sel();
          end else begin
            check(sel_valid_out && sel_data_out == row[31:0] &&
                  sel_src_out == src_e'(row[65:64]) && sel_noise_out == row[66],
                  "selector entry point row");
            check_pass_adc();
          end
        end
        play = 1'b0;
        @(negedge clk);
        drive_random(); #1; check_pass_adc(); check_pass_sel();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
