// adu_pkg: types and constants shared by the digital processing unit of the
// PMT receiver chip (ADU).
//
// Each of the three ADCs delivers four 8-bit samples per clock, packed into a
// 32-bit word with the earliest sample in bits [7:0]. The four-samples-per-clock
// packing and the byte order follow the example transmission of the design
// (input samples 35,36,37,38 leave as the word 32'h38373635). ADC 1 has the
// highest gain (best resolution, smallest range), ADC 3 the lowest.
//
// Entries in the internal buffer carry the selected word plus the metadata the
// formatter needs. The output word kinds and the metadata word layout are this
// design's own choice; the source only states that metadata identifies the ADC
// gain, timing, trigger and events such as counter overflows.
package adu_pkg;

  localparam int unsigned SAMPLE_W  = 8;                 // ADC resolution
  localparam int unsigned SAMPLES   = 4;                 // samples per clock word
  localparam int unsigned WORD_W    = SAMPLE_W * SAMPLES; // 32-bit data word
  localparam int unsigned TS_W      = 16;                // time-stamp counter width

  // Source of a data word (the gain range it came from).
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_ADC1 = 2'd1,   // high gain
    SRC_ADC2 = 2'd2,   // medium gain
    SRC_ADC3 = 2'd3    // low gain
  } src_e;

  // One entry of the internal ring buffer (stage 2 output).
  typedef struct packed {
    logic [TS_W-1:0]   ts;        // time stamp of the word (clock count)
    logic              ts_ovf;    // time-stamp counter wrapped with this word
    logic              lost;      // buffer overflowed: entries before this one were dropped
    logic              trig;      // external trigger with this word
    logic              noise;     // all samples below the noise threshold
    src_e              src;       // selected ADC
    logic [WORD_W-1:0] data;      // four samples, sample 1 in bits [7:0]
  } entry_t;


  // Kind of word on the processor output.
  typedef enum logic [2:0] {
    KIND_RESET  = 3'd0,  // reset word 32'h0000_0000, first word after reset
    KIND_META   = 3'd1,  // metadata word, precedes the data it describes
    KIND_DATA   = 3'd2,  // four 8-bit samples
    KIND_NOISE2 = 3'd3,  // two noise words compressed: eight 4-bit samples
    KIND_NOISE1 = 3'd4   // one noise word compressed: four 4-bit samples in [15:0]
  } kind_e;

  // Metadata word layout (this design's own):
  //   [31:16] time stamp of the following data word
  //   [15:8]  constant 8'h00
  //   [7]     reserved, 0
  //   [6]     buffer overflow (data lost before the following word)
  //   [5]     time-stamp counter overflow
  //   [4]     trigger
  //   [3]     noise (following words are noise compressed)
  //   [2]     reserved, 0
  //   [1:0]   source ADC (1..3)
  function automatic logic [WORD_W-1:0] meta_word(entry_t e);
    return {e.ts, 8'h00, 1'b0, e.lost, e.ts_ovf, e.trig, e.noise, 1'b0, e.src};
  endfunction

  // Lower nibble of each sample of a noise word, sample 1 in bits [3:0].
  function automatic logic [WORD_W/2-1:0] compress_word(logic [WORD_W-1:0] d);
    logic [WORD_W/2-1:0] r;
    for (int i = 0; i < SAMPLES; i++) r[4*i +: 4] = d[SAMPLE_W*i +: 4];
    return r;
  endfunction

endpackage
