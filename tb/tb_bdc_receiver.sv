// tb_bdc_receiver: drives the channel with bursts built by the reference
// encoder (control beat, two address beats, data beats with the PI on PHASE),
// with random VALID gaps and random back-pressure on the output.  Checks the
// header, every restored byte, the word counts, the last flag and that the
// error flag stays low; then sends a PI that names no pattern and a beat with a
// wrong phase, each of which must raise the error flag.  Some bursts are read
// headers (no data follows) and some are data beats only, after the receiver
// has been armed with the control word of a read request.
module tb_bdc_receiver;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        s_valid, s_ready;
  logic [15:0] s_channel;
  logic [2:0]  s_phase;
  logic        arm_valid, arm_ready;
  ctrl_word_t  arm_ctrl;
  logic        hdr_valid;
  ctrl_word_t  hdr_ctrl;
  logic [31:0] hdr_addr;
  logic        out_valid, out_ready;
  logic [31:0] out_data;
  logic [2:0]  out_nwords;
  logic        out_last;
  logic        err;
  int checks = 0, failures = 0;
  bit stall_mode;
  byte unsigned got[$];
  int lasts, hdrs;
  ctrl_word_t  seen_ctrl;
  logic [31:0] seen_addr;

  bdc_receiver dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  // output collector
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int i = 0; i < int'(out_nwords); i++) got.push_back(out_data[i*8 +: 8]);
      if (out_last) lasts++;
      if (out_nwords == 0 || out_nwords > 4) begin
        failures++;
        $display("bad out_nwords %0d", out_nwords);
      end
    end
    if (rst_n && hdr_valid) begin
      hdrs++;
      seen_ctrl <= hdr_ctrl;
      seen_addr <= hdr_addr;
    end
  end
  always @(negedge clk) out_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send(int phase, int word);
    @(negedge clk);
    while (stall_mode && $urandom_range(0, 3) == 0) begin
      s_valid = 0;
      @(negedge clk);
    end
    s_valid   = 1;
    s_phase   = 3'(phase);
    s_channel = 16'(word);
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    byte unsigned d[$];
    beat_t        beats[$];
    arm_valid = 0; arm_ctrl = '0;
    s_valid = 0; s_phase = 0; s_channel = 0; out_ready = 1; stall_mode = 0;
    lasts = 0; hdrs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int len;
      bit cmp, rd_hdr, armed;
      ctrl_word_t c;
      logic [31:0] a;
      stall_mode = it[0];
      len = (it % 7 == 0) ? 256 : $urandom_range(1, 256);
      cmp = (it % 5 != 3);
      gen_image(len, $urandom_range(0, 30), d);
      rd_hdr = (it % 9 == 5);
      armed  = !rd_hdr && (it % 6 == 2);
      if (rd_hdr) d.delete();
      ref_encode(d, cmp, beats);
      got.delete();
      lasts = 0;
      hdrs  = 0;
      c = '0;
      c.cmp_en = cmp;
      c.cache  = 2'($urandom);
      c.len_m1 = 8'(len - 1);
      if (rd_hdr || armed) c.traffic = TR_READ;
      a = $urandom;
      if (armed) begin
        @(negedge clk);
        arm_valid = 1;
        arm_ctrl  = c;
        @(posedge clk);
        while (!arm_ready) @(posedge clk);
        @(negedge clk);
        arm_valid = 0;
      end else begin
        send(int'(PH_CTRL), int'(c));
        send(int'(PH_ADDR), int'(a[15:0]));
        send(int'(PH_ADDR), int'(a[31:16]));
      end
      foreach (beats[b]) send(beats[b].pi, beats[b].word);
      repeat (20) @(negedge clk);
      while (out_valid) @(negedge clk);
      if (armed) check(hdrs == 0, $sformatf("burst %0d: header reported for armed read", it));
      else check(hdrs == 1 && seen_ctrl == c && seen_addr == a, $sformatf("burst %0d header", it));
      if (rd_hdr) len = 0;
      check(got.size() == len, $sformatf("burst %0d: %0d bytes out, expected %0d", it, got.size(), len));
      check(lasts == (rd_hdr ? 0 : 1), $sformatf("burst %0d: %0d last flags", it, lasts));
      if (got.size() == len)
        foreach (d[i]) check(got[i] == d[i], $sformatf("burst %0d byte %0d: %h expected %h", it, i, got[i], d[i]));
    end
    check(!err, "error flag raised by legal traffic");
    // a PI that names no pattern: a full byte split over beats, then PI 7
    stall_mode = 0;
    send(int'(PH_CTRL), 32'h0007);           // 8 words, no compression flag needed
    send(int'(PH_ADDR), 0);
    send(int'(PH_ADDR), 0);
    send(1, 32'h1234);                 // pattern H,H,H,L: ends with a split byte
    send(7, 32'h5678);                 // only 5 patterns exist after a split
    repeat (3) @(negedge clk);
    check(err, "invalid PI not flagged");
    // a wrong phase in place of a control beat needs a fresh reset
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    check(!err, "error flag after reset");
    send(int'(PH_ADDR), 32'h0001);
    repeat (2) @(negedge clk);
    check(err, "address beat without control beat not flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
