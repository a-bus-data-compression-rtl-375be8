// tb_bdc_aligner: random image-like bursts are encoded by the reference model;
// each reference beat is presented to the aligner as register head entries and
// the bus word, PI, pop count, split flag and half-word count are compared.
// The last beat of a burst is presented short with flush set, to check padding,
// and again without flush, where the aligner must hold back.
module tb_bdc_aligner;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic [SLOTS-1:0][5:0] head;
  logic [4:0]            count;
  logic                  flush;
  logic                  fire;
  logic [15:0]           bus_word;
  logic [2:0]            pi;
  logic [2:0]            pop_n;
  logic                  split_out, padded;
  logic [2:0]            n_half;
  int checks = 0, failures = 0;

  bdc_aligner #(.SLOTS(SLOTS), .HW(4), .CW(5)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned d[$];
    beat_t        beats[$];
    int           nib_total;
    for (int it = 0; it < 300; it++) begin
      bit cmp;
      cmp = ($urandom_range(0, 4) != 0);
      gen_image($urandom_range(1, 40), $urandom_range(0, 40), d);
      ref_encode(d, cmp, beats);
      nib_total = 0;
      foreach (d[i]) nib_total += (cmp && i > 0 && (d[i] >> 4) == (d[i-1] >> 4)) ? 1 : 2;
      foreach (beats[b]) begin
        int real_n, nh;
        real_n = (b == beats.size() - 1) ? nib_total - b * SLOTS : SLOTS;
        nh = 0;
        for (int p = 0; p < SLOTS; p++) begin
          if (p < real_n) head[p] = {2'(beats[b].tags[p]), 4'((beats[b].word >> (4*p)) & 15)};
          else            head[p] = 6'($urandom);
          if (p < real_n && beats[b].tags[p] == T_H) nh++;
        end
        count = 5'(real_n + ((real_n == SLOTS) ? $urandom_range(0, 8) : 0));
        flush = (real_n < SLOTS) ? 1'b1 : 1'($urandom);
        #1;
        check(fire, $sformatf("fire, beat %0d", b));
        check(int'(bus_word) == beats[b].word, $sformatf("word %h exp %h", bus_word, beats[b].word));
        check(int'(pi) == beats[b].pi, $sformatf("pi %0d exp %0d", pi, beats[b].pi));
        check(int'(pop_n) == real_n, $sformatf("pop_n %0d exp %0d", pop_n, real_n));
        check(split_out == (beats[b].tags[SLOTS-1] == T_L), "split_out");
        check(padded == (real_n < SLOTS), "padded");
        check(int'(n_half) == nh, $sformatf("n_half %0d exp %0d", n_half, nh));
        if (real_n < SLOTS) begin
          flush = 1'b0;
          #1;
          check(!fire, "fire without flush on a short beat");
        end
      end
    end
    count = '0;
    flush = 1'b1;
    #1;
    check(!fire, "fire when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
