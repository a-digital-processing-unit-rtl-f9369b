// data_tagger: second stage of the main data processor.
//
// Prepares each selected word for reconstruction: the source ADC, a time stamp
// and the trigger flag are attached to the word and the resulting entry is
// written into the internal ring buffer.
//
// The time stamp is a free-running TS_W-bit count of data words. When it wraps,
// the entry carrying count 0 is flagged ts_ovf, which the formatter reports in
// a metadata word (counter overflows are one of the system events the metadata
// field encodes). If the ring buffer is full, entries are dropped, and dropping
// goes on until the buffer has drained to its resume level (buf_resume, half
// full in the top level). The first entry written afterwards carries the flag
// lost, and a trigger or overflow flag of a dropped entry is carried over to
// it so that no event goes unreported. The hysteresis matters: every flagged
// entry costs a metadata word, so without it an overflow would keep the
// buffer full by itself.
//
// The kinds of information attached follow the source design; the time-stamp
// width, the lost flag and the drop policy are this design's own choices.
//
// Timing: one register stage. The entry registered in cycle n is written in
// cycle n+1 unless it is dropped (wr_en and dropped are combinational from the
// registered entry, buf_full and buf_resume).
module data_tagger
  import adu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  input  src_e              in_src,
  input  logic              in_noise,
  input  logic              in_trig,     // trigger, aligned with in_valid
  input  logic              buf_full,
  input  logic              buf_resume,  // buffer drained enough to accept again
  output logic              wr_en,
  output entry_t            wr_entry,
  output logic              dropped      // pulses when an entry is discarded
);

  logic [TS_W-1:0] ts_cnt;
  entry_t          ent_q;
  logic            ent_v;
  logic            lost_pend, trig_pend, ovf_pend;
  logic            drop_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_cnt <= '0;
      ent_q  <= '0;
      ent_v  <= 1'b0;
    end else begin
      ent_v <= in_valid;
      if (in_valid) begin
        ts_cnt       <= ts_cnt + 1'b1;
        ent_q.ts     <= ts_cnt;
        ent_q.ts_ovf <= (ts_cnt == '0);
        ent_q.lost   <= 1'b0;
        ent_q.trig   <= in_trig;
        ent_q.noise  <= in_noise;
        ent_q.src    <= in_src;
        ent_q.data   <= in_data;
      end
    end
  end

  // The first word after reset also has count 0; it is not an overflow.
  logic first_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_done <= 1'b0;
    else if (ent_v) first_done <= 1'b1;
  end

  assign dropped = ent_v && (buf_full || (drop_mode && !buf_resume));
  assign wr_en   = ent_v && !dropped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          drop_mode <= 1'b0;
    else if (dropped)    drop_mode <= 1'b1;
    else if (buf_resume) drop_mode <= 1'b0;
  end

  always_comb begin
    wr_entry        = ent_q;
    wr_entry.ts_ovf = (ent_q.ts_ovf && first_done) || ovf_pend;
    wr_entry.lost   = lost_pend;
    wr_entry.trig   = ent_q.trig || trig_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_pend <= 1'b0;
      trig_pend <= 1'b0;
      ovf_pend  <= 1'b0;
    end else if (dropped) begin
      lost_pend <= 1'b1;
      trig_pend <= wr_entry.trig;
      ovf_pend  <= wr_entry.ts_ovf;
    end else if (wr_en) begin
      lost_pend <= 1'b0;
      trig_pend <= 1'b0;
      ovf_pend  <= 1'b0;
    end
  end

endmodule
