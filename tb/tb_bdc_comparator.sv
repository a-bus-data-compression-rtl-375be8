// tb_bdc_comparator: random groups of four bytes, random valid counts and
// predecessor states, with compression on and off; each half-word flag and the
// predecessor passed on are compared with a byte-by-byte reference.
module tb_bdc_comparator;
  logic        enable;
  logic [31:0] words;
  logic [2:0]  nvalid;
  logic        prev_valid;
  logic [3:0]  prev_hi;
  logic [3:0]  is_half;
  logic        last_valid;
  logic [3:0]  last_hi;
  int checks = 0, failures = 0;

  bdc_comparator #(.NWORDS(4), .WORD_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      bit       rv;
      int       rh;
      bit [3:0] exp;
      enable     = ($urandom_range(0, 9) != 0);
      nvalid     = 3'($urandom_range(0, 4));
      prev_valid = 1'($urandom);
      prev_hi    = 4'($urandom);
      // bias towards equal upper nibbles
      for (int i = 0; i < 4; i++)
        words[i*8 +: 8] = {($urandom_range(0, 2) != 0) ? prev_hi : 4'($urandom), 4'($urandom)};
      #1;
      rv  = prev_valid;
      rh  = int'(prev_hi);
      exp = '0;
      for (int i = 0; i < int'(nvalid); i++) begin
        int hi;
        hi = int'(words[i*8+4 +: 4]);
        exp[i] = enable && rv && (hi == rh);
        rv = 1;
        rh = hi;
      end
      checks++;
      if (is_half != exp || last_valid != rv || int'(last_hi) != rh) begin
        failures++;
        $display("words=%h n=%0d prev=%0d/%h: half=%b exp=%b last=%0d/%h exp %0d/%h",
                 words, nvalid, prev_valid, prev_hi, is_half, exp, last_valid, last_hi, rv, rh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
