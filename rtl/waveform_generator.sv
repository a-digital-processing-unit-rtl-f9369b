// waveform_generator: internal test-waveform source of the data processor.
//
// Lets the processing chain be exercised on silicon without a PMT signal. A
// pattern memory of DEPTH rows is loaded through a simple write port; each row
// holds one clock word for each of the three ADCs (ADC 1 in bits [31:0], ADC 2
// in [63:32], ADC 3 in [95:64]). While enabled, rows 0..length-1 are played in
// a loop, one row per clock, and fed into the chain at one of two entry points:
//   ENTRY_ADC      - replaces the three ADC words in front of the data
//                    selector, so selection, tagging, buffering and formatting
//                    are all exercised;
//   ENTRY_SELECTED - replaces the selector output in front of the tagging
//                    stage: the row's bits [31:0] are the data word, [65:64]
//                    the source ADC and bit 66 the noise flag, so the buffer
//                    and formatter can be driven with any sequence.
// With entry = ENTRY_OFF the ADC and selector signals pass unchanged.
//
// That an internal generator can feed waveforms into several entry points of
// the chain follows the source design; the memory size, the row layout and the
// two entry points chosen are this design's own.
//
// Timing: the pattern rows come out of registers, one per clock; the muxes are
// combinational. Row 0 appears in the first clock after play is raised.
module waveform_generator
  import adu_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // pattern memory write port
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  logic [3*WORD_W-1:0]      cfg_data,
  // control
  input  logic [1:0]               entry,     // 0 off, 1 ADC inputs, 2 selector output
  input  logic [$clog2(DEPTH):0]   length,    // rows played, 1..DEPTH
  input  logic                     play,
  // entry point 1: ADC words
  input  logic                     adc_valid_in,
  input  logic [WORD_W-1:0]        adc_in  [3],
  output logic                     adc_valid_out,
  output logic [WORD_W-1:0]        adc_out [3],
  // entry point 2: selected word
  input  logic                     sel_valid_in,
  input  logic [WORD_W-1:0]        sel_data_in,
  input  src_e                     sel_src_in,
  input  logic                     sel_noise_in,
  output logic                     sel_valid_out,
  output logic [WORD_W-1:0]        sel_data_out,
  output src_e                     sel_src_out,
  output logic                     sel_noise_out
);

  localparam logic [1:0] ENTRY_OFF      = 2'd0;
  localparam logic [1:0] ENTRY_ADC      = 2'd1;
  localparam logic [1:0] ENTRY_SELECTED = 2'd2;
  localparam int unsigned AW = $clog2(DEPTH);

  logic [3*WORD_W-1:0] mem [DEPTH];
  logic [AW-1:0]       rd_addr;
  logic [3*WORD_W-1:0] row;
  logic                row_v;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      row     <= '0;
      row_v   <= 1'b0;
    end else if (play && entry != ENTRY_OFF) begin
      row     <= mem[rd_addr];
      row_v   <= 1'b1;
      rd_addr <= ((AW+1)'(rd_addr) + 1'b1 >= length) ? '0 : rd_addr + 1'b1;
    end else begin
      rd_addr <= '0;
      row_v   <= 1'b0;
    end
  end

  always_comb begin
    if (entry == ENTRY_ADC && row_v) begin
      adc_valid_out = 1'b1;
      for (int i = 0; i < 3; i++) adc_out[i] = row[WORD_W*i +: WORD_W];
    end else begin
      adc_valid_out = adc_valid_in;
      adc_out       = adc_in;
    end
    if (entry == ENTRY_SELECTED && row_v) begin
      sel_valid_out = 1'b1;
      sel_data_out  = row[WORD_W-1:0];
      sel_src_out   = src_e'(row[2*WORD_W +: 2]);
      sel_noise_out = row[2*WORD_W + 2];
    end else begin
      sel_valid_out = sel_valid_in;
      sel_data_out  = sel_data_in;
      sel_src_out   = sel_src_in;
      sel_noise_out = sel_noise_in;
    end
  end

endmodule
