// tb_bdc_pi_decoder: checks bdc_pi_decoder for every PI value and both split
// states against the brute-force pattern list of tb_bdc_ref_pkg, including the
// pattern counts (8 without and 5 with a carried upper nibble, 3-bit PI).
module tb_bdc_pi_decoder;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic [2:0]        pi;
  logic              split_in;
  tag_e [SLOTS-1:0]  tags;
  logic              split_out, pi_ok;
  int checks = 0, failures = 0;

  bdc_pi_decoder #(.SLOTS(SLOTS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tags_t t;
    bit ok;
    checks++;
    if (ref_npat(0) != 8 || ref_npat(1) != 5 || pi_width(4) != 3) begin
      failures++;
      $display("pattern count mismatch %0d %0d", ref_npat(0), ref_npat(1));
    end
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 8; v++) begin
        pi = 3'(v);
        split_in = c[0];
        #1;
        ref_tags(v, c[0], t, ok);
        checks++;
        if (pi_ok != ok) begin
          failures++;
          $display("pi=%0d split=%0d pi_ok=%0d expected %0d", v, c, pi_ok, ok);
        end
        if (ok) begin
          for (int p = 0; p < SLOTS; p++) begin
            checks++;
            if (int'(tags[p]) != t[p]) begin
              failures++;
              $display("pi=%0d split=%0d slot %0d tag %0d expected %0d", v, c, p, tags[p], t[p]);
            end
          end
          checks++;
          if (split_out != (t[SLOTS-1] == T_L)) begin
            failures++;
            $display("pi=%0d split_out wrong", v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
