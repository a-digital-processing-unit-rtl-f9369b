// baseline_regulator: digital part of the sigma-delta ADC baseline regulator.
//
// Offsets from biasing drifts or from the tail of a previous pulse shift the
// ADC baseline, cost dynamic range and corrupt the charge integral. This block
// closes a loop around one ADC: instead of correcting the samples, its control
// bits move the ADC reference voltages (through the DAC MIN and DAC MID
// converters and the reference generator, which are analog) until the
// average ADC baseline equals the programmed target.
//
// The loop, in three stages:
//   offset error - err = (s1+s2+s3+s4) - 4*target over one clock word of four
//                  samples (the error of the word's mean, in quarter LSBs);
//   scaling      - err is multiplied by 2^-coarse_shift (coarse tuning) when
//                  |err| exceeds 4*switch_thr, else by 2^-fine_shift (fine
//                  tuning): big offsets settle fast, small ones precisely;
//   integrator   - an accumulator with FRAC fractional bits sums the scaled
//                  error; its CTRL_W integer bits are the control code.
// The control code is never held: the truncation of the accumulator acts as a
// first-order sigma-delta modulator, so the code toggles between neighbouring
// values and the *average* baseline matches the target even when the offset is
// a fraction of an LSB.
//
// Sign convention: a higher ctrl_code raises the ADC references and lowers the
// ADC output; the code resets to mid-scale 2^(CTRL_W-1) (no correction). With
// freeze high the accumulator holds (e.g. while a pulse is being digitised).
//
// The three stages, the continuous sigma-delta regulation and the automatic
// coarse/fine switch on the error magnitude follow the source design. The
// power-of-two scaling, the widths, the switch threshold input and the freeze
// input are this design's own choices.
//
// Timing: err is registered (1 clock), the accumulator and ctrl_code update one
// clock later: a sample affects ctrl_code two clocks after it is presented.
// For stability with the analog loop delay, coarse gains of 2^-2 or smaller
// are recommended.
module baseline_regulator
  import adu_pkg::*;
#(
  parameter int unsigned CTRL_W = 6,   // control bits to the reference DACs
  parameter int unsigned FRAC   = 8    // fractional bits of the integrator
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [WORD_W-1:0]   samples,      // four samples, one clock word
  input  logic [SAMPLE_W-1:0] target,       // desired baseline, ADC LSB
  input  logic [3:0]          coarse_shift, // coarse tuning: gain 2^-coarse_shift
  input  logic [3:0]          fine_shift,   // fine tuning:   gain 2^-fine_shift
  input  logic [SAMPLE_W-1:0] switch_thr,   // |mean error| above this -> coarse
  input  logic                freeze,
  output logic [CTRL_W-1:0]   ctrl_code,
  output logic signed [SAMPLE_W+2:0] err_out, // registered offset error
  output logic                coarse        // coarse tuning in use
);

  localparam int unsigned EW = SAMPLE_W + 3;        // signed error width
  localparam int unsigned AW = CTRL_W + FRAC;       // accumulator width
  localparam int unsigned SW = EW + FRAC + 2;       // scaled error width

  // ---- stage 1: offset error ----------------------------------------------
  logic [SAMPLE_W+1:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < SAMPLES; i++) sum += (SAMPLE_W+2)'(samples[SAMPLE_W*i +: SAMPLE_W]);
  end

  logic signed [EW-1:0] err_q;
  logic                 err_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q <= '0;
      err_v <= 1'b0;
    end else begin
      err_v <= in_valid && !freeze;
      if (in_valid) err_q <= $signed({1'b0, sum}) - $signed({1'b0, target, 2'b00});
    end
  end
  assign err_out = err_q;

  // ---- stage 2: scaling with automatic coarse / fine switch ----------------
  logic [EW-1:0]        err_mag;
  logic [3:0]           shift;
  logic signed [SW-1:0] scaled;
  always_comb begin
    err_mag = err_q[EW-1] ? EW'(-err_q) : EW'(err_q);
    coarse  = err_mag > {1'b0, switch_thr, 2'b00};
    shift   = coarse ? coarse_shift : fine_shift;
    // err is in quarter LSB: err * 2^FRAC / 4 / 2^shift
    scaled  = (SW'(err_q) <<< FRAC) >>> (2 + shift);
  end

  // ---- stage 3: error integrator --------------------------------------------
  localparam logic [AW-1:0] MID = AW'(1) << (AW - 1);
  logic [AW-1:0]        acc;
  logic signed [SW+1:0] acc_next;
  always_comb begin
    acc_next = $signed({2'b00, {(SW-AW){1'b0}}, acc}) + (SW+2)'(scaled);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= MID;
    end else if (err_v) begin
      if (acc_next < 0)                                acc <= '0;
      else if (acc_next > $signed((SW+2)'({AW{1'b1}}))) acc <= '1;
      else                                             acc <= acc_next[AW-1:0];
    end
  end

  assign ctrl_code = acc[AW-1 -: CTRL_W];

endmodule
