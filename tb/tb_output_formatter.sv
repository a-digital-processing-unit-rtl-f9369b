// tb_output_formatter: self-checking test of the output formatter.
// The testbench plays the ring buffer: it offers a stream of random entries
// (runs of noise and of data from each ADC, random triggers, time-stamp and
// buffer overflows) through two first-word-fall-through windows at a random
// rate, and honours rd_pop. The expected output stream (reset word, metadata
// ahead of data, data words, two-to-one and single compressed noise words) is
// built from the entry list by a reference model and compared word by word.
module tb_output_formatter;
  import adu_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_valid, rd_valid2;
  entry_t rd_entry, rd_entry2;
  logic [1:0] rd_pop;
  logic out_valid;
  logic [WORD_W-1:0] out_word;
  kind_e out_kind;
  int checks = 0, failures = 0;

  output_formatter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t ent [N];
  typedef struct { logic [31:0] w; kind_e k; } word_t;
  word_t exp_q[$];
  int avail = 0;   // entries offered so far
  int head  = 0;   // entries popped so far
  int n_kind [5] = '{0, 0, 0, 0, 0};

  // the offered window
  always_comb begin
    rd_valid  = head < avail;
    rd_valid2 = head + 1 < avail;
    rd_entry  = rd_valid  ? ent[head]     : '0;
    rd_entry2 = rd_valid2 ? ent[head + 1] : '0;
  end

  function automatic bit ev(entry_t e);
    return e.trig | e.ts_ovf | e.lost;
  endfunction

  function automatic logic [15:0] nib(logic [31:0] d);
    return {d[27:24], d[19:16], d[11:8], d[3:0]};
  endfunction

  initial begin
    // ---- entry stream ----
    int run = 0; bit nz = 0; src_e s = SRC_ADC1;
    for (int i = 0; i < N; i++) begin
      if (run == 0) begin
        run = $urandom_range(1, 12);
        nz  = $urandom_range(0, 1);
        s   = nz ? SRC_ADC1 : src_e'($urandom_range(1, 3));
      end
      run--;
      ent[i].ts     = 16'(i);
      ent[i].trig   = ($urandom_range(0, 99) < 4);
      ent[i].ts_ovf = ($urandom_range(0, 99) < 2);
      ent[i].lost   = ($urandom_range(0, 99) < 2);
      ent[i].noise  = nz;
      ent[i].src    = s;
      ent[i].data   = nz ? 32'($urandom) & 32'h0f0f_0f0f : 32'($urandom);
    end
    // the last entry is data, so no noise entry waits for a partner at the end
    ent[N-1].noise = 1'b0;
    // ---- reference model ----
    begin
      bit have = 0; src_e ls = SRC_ADC1; bit ln = 0; int i = 0;
      exp_q.push_back('{32'h0, KIND_RESET});
      while (i < N) begin
        entry_t e;
        e = ent[i];
        if (!have || e.src != ls || e.noise != ln || ev(e)) begin
          exp_q.push_back('{{e.ts, 8'h00, 1'b0, e.lost, e.ts_ovf, e.trig, e.noise, 1'b0, e.src}, KIND_META});
          have = 1; ls = e.src; ln = e.noise;
        end
        if (e.noise) begin
          if (i + 1 < N && ent[i+1].noise && !ev(ent[i+1])) begin
            exp_q.push_back('{{nib(ent[i+1].data), nib(e.data)}, KIND_NOISE2});
            i += 2;
          end else begin
            exp_q.push_back('{{16'h0, nib(e.data)}, KIND_NOISE1});
            i += 1;
          end
        end else begin
          exp_q.push_back('{e.data, KIND_DATA});
          i += 1;
        end
      end
    end
    // ---- run ----
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (exp_q.size() > 0) begin
      int p;
      @(negedge clk);
      p = int'(rd_pop);
      if (out_valid) begin
        word_t x;
        x = exp_q.pop_front();
        checks++;
        n_kind[int'(out_kind)]++;
        if (out_word !== x.w || out_kind != x.k) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h kind %0d, exp %h kind %0d",
                                      out_word, out_kind, x.w, x.k);
        end
      end
      // buffer side: pop what the formatter asked for, offer more entries
      @(posedge clk);
      #1;
      head += p;
      if ($urandom_range(0, 3) != 0) avail = (avail + 1 > N) ? N : avail + 1;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_kind[k] == 0) begin failures++; $display("kind %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
