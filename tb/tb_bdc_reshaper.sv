// tb_bdc_reshaper: bursts of image-like bytes are encoded by the reference
// model and fed beat by beat (with gaps) to the re-shaper; the words it
// rebuilds, cut to the burst length, must equal the original bytes.
module tb_bdc_reshaper;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, beat;
  logic [15:0]           bus_word;
  tag_e [SLOTS-1:0]      tags;
  logic [SLOTS-1:0][7:0] words;
  logic [2:0]            nwords;
  int checks = 0, failures = 0;

  bdc_reshaper #(.SLOTS(SLOTS), .WORD_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned d[$];
    beat_t        beats[$];
    start = 0; beat = 0; bus_word = '0; tags = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      byte unsigned got[$];
      got.delete();
      gen_image($urandom_range(1, 60), $urandom_range(0, 40), d);
      ref_encode(d, ($urandom_range(0, 4) != 0), beats);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (beats[b]) begin
        while ($urandom_range(0, 3) == 0) begin
          beat = 0;
          bus_word = 16'($urandom);
          @(negedge clk);
        end
        bus_word = 16'(beats[b].word);
        for (int p = 0; p < SLOTS; p++) tags[p] = tag_e'(beats[b].tags[p]);
        beat = 1;
        #1;
        for (int k = 0; k < int'(nwords); k++) got.push_back(words[k]);
        @(negedge clk);
        beat = 0;
      end
      checks++;
      if (got.size() < d.size()) begin
        failures++;
        $display("burst %0d: %0d words rebuilt, %0d sent", it, got.size(), d.size());
      end else begin
        foreach (d[i]) begin
          checks++;
          if (got[i] != d[i]) begin
            failures++;
            $display("burst %0d word %0d: %h expected %h", it, i, got[i], d[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
