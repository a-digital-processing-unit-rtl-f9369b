// output_formatter: third stage of the main data processor.
//
// Turns the entries of the ring buffer into the 32-bit output stream:
//   * after reset the stream starts with a reset word 32'h0000_0000;
//   * a metadata word is sent ahead of the data whenever the source ADC or the
//     noise state changes, and with every trigger, time-stamp overflow or
//     buffer overflow (the first entry after reset always gets one);
//   * an ordinary entry is sent as one data word, its four samples unchanged;
//   * noise entries (all samples below the noise threshold, so below 16) are
//     compressed by two: the low nibbles of two consecutive noise entries are
//     packed into one word, the older entry in bits [15:0].
// A noise entry that cannot be paired, because the entry after it is not noise
// or carries an event, is sent alone in bits [15:0] of a KIND_NOISE1 word.
// A noise entry waits until a second entry is present in the buffer.
//
// Each output word comes with out_kind, so a receiver can parse the stream.
// Reset word, metadata ahead of data and two-to-one noise compression follow
// the source design; the metadata layout (see adu_pkg), the out_kind side band
// and the pairing rules are this design's own.
//
// Interface: reads the ring buffer through its two first-word-fall-through
// windows (rd_valid/rd_entry, rd_valid2/rd_entry2) and rd_pop (0, 1 or 2).
// Timing: at most one output word per clock, registered; a word reflects the
// buffer state of the previous clock.
module output_formatter
  import adu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_valid,
  input  entry_t            rd_entry,
  input  logic              rd_valid2,
  input  entry_t            rd_entry2,
  output logic [1:0]        rd_pop,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  output kind_e             out_kind
);

  logic reset_sent;     // reset word has been sent
  logic have_mode;      // a metadata word has been sent since reset
  logic meta_done;      // metadata for the head entry has been sent
  src_e last_src;
  logic last_noise;

  logic              nx_valid;
  logic [WORD_W-1:0] nx_word;
  kind_e             nx_kind;
  logic              nx_meta;
  logic              need_meta;

  function automatic logic has_event(entry_t e);
    return e.trig || e.ts_ovf || e.lost;
  endfunction

  always_comb begin
    nx_valid  = 1'b0;
    nx_word   = '0;
    nx_kind   = KIND_DATA;
    nx_meta   = 1'b0;
    rd_pop    = 2'd0;
    need_meta = !have_mode || rd_entry.src != last_src ||
                rd_entry.noise != last_noise || has_event(rd_entry);
    if (!reset_sent) begin
      nx_valid = 1'b1;
      nx_kind  = KIND_RESET;
    end else if (rd_valid) begin
      if (need_meta && !meta_done) begin
        nx_valid = 1'b1;
        nx_kind  = KIND_META;
        nx_word  = meta_word(rd_entry);
        nx_meta  = 1'b1;
      end else if (rd_entry.noise) begin
        if (rd_valid2 && rd_entry2.noise && !has_event(rd_entry2)) begin
          nx_valid = 1'b1;
          nx_kind  = KIND_NOISE2;
          nx_word  = {compress_word(rd_entry2.data), compress_word(rd_entry.data)};
          rd_pop   = 2'd2;
        end else if (rd_valid2) begin
          nx_valid = 1'b1;
          nx_kind  = KIND_NOISE1;
          nx_word  = {16'h0000, compress_word(rd_entry.data)};
          rd_pop   = 2'd1;
        end
      end else begin
        nx_valid = 1'b1;
        nx_kind  = KIND_DATA;
        nx_word  = rd_entry.data;
        rd_pop   = 2'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reset_sent <= 1'b0;
      have_mode  <= 1'b0;
      meta_done  <= 1'b0;
      last_src   <= SRC_ADC1;
      last_noise <= 1'b0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      out_kind   <= KIND_RESET;
    end else begin
      reset_sent <= 1'b1;
      out_valid  <= nx_valid;
      out_word   <= nx_word;
      out_kind   <= nx_kind;
      if (nx_meta) begin
        have_mode  <= 1'b1;
        meta_done  <= 1'b1;
        last_src   <= rd_entry.src;
        last_noise <= rd_entry.noise;
      end else if (rd_pop != 2'd0) begin
        meta_done <= 1'b0;
      end
    end
  end

  a_meta_then_data: assert property (@(posedge clk) disable iff (!rst_n)
                                     nx_meta |=> !nx_meta)
    else $error("output_formatter: two metadata words for one entry");

endmodule
