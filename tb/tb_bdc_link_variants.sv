// tb_bdc_link_variants: the two other configurations of the scheme, side by
// side: a 32-bit channel with one-byte words (eight nibble slots, 6-bit PI on
// six PHASE lines) and a 16-bit channel with two-byte words (a half-word is
// then one byte, two slots per beat, 2-bit PI).  Random bursts of smooth and
// random content pass through both links; the words read from each block
// buffer must equal those sent, the data beats per burst must equal
// ceil(half-words / slots), where a word counts one half-word when its upper
// half repeats and two otherwise, and neither receiver may flag an error.
// Read bursts from an SRAM model in each link are checked the same way on the
// slave channel, and write bursts from the motion-compensation side must land
// in each SRAM model word for word.
module tb_bdc_link_variants;
  import bdc_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // ---- 32-bit channel, byte words ----
  logic        a_req_valid, a_req_ready, a_in_valid, a_in_ready;
  ctrl_word_t  a_req_ctrl, a_hdr_ctrl;
  logic [31:0] a_req_addr, a_hdr_addr, a_in_data;
  logic        a_hdr_valid, a_rd_valid, a_rd_ready, a_rd_last;
  logic [15:0] a_rd_data;
  logic [1:0]  a_rd_nwords;
  logic        a_ch_valid, a_ch_ready, a_busy, a_err;
  logic [31:0] a_ch_channel;
  logic [5:0]  a_ch_phase;

  logic        a_rq_valid, a_rq_ready, a_rdat_valid, a_rdat_ready, a_rdat_last;
  ctrl_word_t  a_rq_ctrl;
  logic [31:0] a_rq_addr, a_rdat_data, a_sram_rdata;
  logic [2:0]  a_rdat_nwords;
  logic        a_sram_re, a_sch_valid, a_sch_ready;
  logic [11:0] a_sram_addr;
  logic [31:0] a_sram [4096];
  logic        a_sram_we, a_mc_req_valid, a_mc_req_ready, a_mc_in_valid, a_mc_in_ready;
  logic [31:0] a_sram_wdata, a_mc_req_addr, a_mc_in_data;
  logic [3:0]  a_sram_wmask;
  ctrl_word_t  a_mc_req_ctrl;
  always @(posedge clk) begin
    if (a_sram_re) a_sram_rdata <= a_sram[a_sram_addr];
    if (a_sram_we)
      for (int i = 0; i < 4; i++) if (a_sram_wmask[i]) a_sram[a_sram_addr][i*8 +: 8] <= a_sram_wdata[i*8 +: 8];
  end

  bdc_link_top #(.SLOTS(8), .WORD_W(8), .RX_QDEPTH(12)) dut_a (
    .clk(clk), .rst_n(rst_n),
    .req_valid(a_req_valid), .req_ready(a_req_ready), .req_ctrl(a_req_ctrl), .req_addr(a_req_addr),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in_data),
    .hdr_valid(a_hdr_valid), .hdr_ctrl(a_hdr_ctrl), .hdr_addr(a_hdr_addr),
    .sd_valid(a_rd_valid), .sd_ready(a_rd_ready), .sd_data(a_rd_data), .sd_nwords(a_rd_nwords),
    .sd_last(a_rd_last), .mch_valid(a_ch_valid), .mch_ready(a_ch_ready), .mch_channel(a_ch_channel),
    .mch_phase(a_ch_phase), .tx_busy(a_busy), .err(a_err),
    .rq_valid(a_rq_valid), .rq_ready(a_rq_ready), .rq_ctrl(a_rq_ctrl), .rq_addr(a_rq_addr),
    .rdat_valid(a_rdat_valid), .rdat_ready(a_rdat_ready), .rdat_data(a_rdat_data),
    .rdat_nwords(a_rdat_nwords), .rdat_last(a_rdat_last),
    .sram_re(a_sram_re), .sram_we(a_sram_we), .sram_addr(a_sram_addr), .sram_wdata(a_sram_wdata),
    .sram_wmask(a_sram_wmask), .sram_rdata(a_sram_rdata),
    .mc_req_valid(a_mc_req_valid), .mc_req_ready(a_mc_req_ready), .mc_req_ctrl(a_mc_req_ctrl), .mc_req_addr(a_mc_req_addr),
    .mc_in_valid(a_mc_in_valid), .mc_in_ready(a_mc_in_ready), .mc_in_data(a_mc_in_data),
    .sch_valid(a_sch_valid), .sch_ready(a_sch_ready), .sch_channel(), .sch_phase());

  // ---- 16-bit channel, two-byte words ----
  logic        b_req_valid, b_req_ready, b_in_valid, b_in_ready;
  ctrl_word_t  b_req_ctrl, b_hdr_ctrl;
  logic [31:0] b_req_addr, b_hdr_addr, b_in_data;
  logic        b_hdr_valid, b_rd_valid, b_rd_ready, b_rd_last;
  logic [15:0] b_rd_data;
  logic        b_rd_nwords;
  logic        b_ch_valid, b_ch_ready, b_busy, b_err;
  logic [15:0] b_ch_channel;
  logic [2:0]  b_ch_phase;

  logic        b_rq_valid, b_rq_ready, b_rdat_valid, b_rdat_ready, b_rdat_last;
  ctrl_word_t  b_rq_ctrl;
  logic [31:0] b_rq_addr, b_rdat_data, b_sram_rdata;
  logic [1:0]  b_rdat_nwords;
  logic        b_sram_re, b_sch_valid, b_sch_ready;
  logic [11:0] b_sram_addr;
  logic [31:0] b_sram [4096];
  logic        b_sram_we, b_mc_req_valid, b_mc_req_ready, b_mc_in_valid, b_mc_in_ready;
  logic [31:0] b_sram_wdata, b_mc_req_addr, b_mc_in_data;
  logic [1:0]  b_sram_wmask;
  ctrl_word_t  b_mc_req_ctrl;
  always @(posedge clk) begin
    if (b_sram_re) b_sram_rdata <= b_sram[b_sram_addr];
    if (b_sram_we)
      for (int i = 0; i < 2; i++) if (b_sram_wmask[i]) b_sram[b_sram_addr][i*16 +: 16] <= b_sram_wdata[i*16 +: 16];
  end

  bdc_link_top #(.SLOTS(2), .WORD_W(16), .IN_WORDS(2)) dut_b (
    .clk(clk), .rst_n(rst_n),
    .req_valid(b_req_valid), .req_ready(b_req_ready), .req_ctrl(b_req_ctrl), .req_addr(b_req_addr),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in_data),
    .hdr_valid(b_hdr_valid), .hdr_ctrl(b_hdr_ctrl), .hdr_addr(b_hdr_addr),
    .sd_valid(b_rd_valid), .sd_ready(b_rd_ready), .sd_data(b_rd_data), .sd_nwords(b_rd_nwords),
    .sd_last(b_rd_last), .mch_valid(b_ch_valid), .mch_ready(b_ch_ready), .mch_channel(b_ch_channel),
    .mch_phase(b_ch_phase), .tx_busy(b_busy), .err(b_err),
    .rq_valid(b_rq_valid), .rq_ready(b_rq_ready), .rq_ctrl(b_rq_ctrl), .rq_addr(b_rq_addr),
    .rdat_valid(b_rdat_valid), .rdat_ready(b_rdat_ready), .rdat_data(b_rdat_data),
    .rdat_nwords(b_rdat_nwords), .rdat_last(b_rdat_last),
    .sram_re(b_sram_re), .sram_we(b_sram_we), .sram_addr(b_sram_addr), .sram_wdata(b_sram_wdata),
    .sram_wmask(b_sram_wmask), .sram_rdata(b_sram_rdata),
    .mc_req_valid(b_mc_req_valid), .mc_req_ready(b_mc_req_ready), .mc_req_ctrl(b_mc_req_ctrl), .mc_req_addr(b_mc_req_addr),
    .mc_in_valid(b_mc_in_valid), .mc_in_ready(b_mc_in_ready), .mc_in_data(b_mc_in_data),
    .sch_valid(b_sch_valid), .sch_ready(b_sch_ready), .sch_channel(), .sch_phase());

  always #5 clk = ~clk;

  initial begin
    #100000000;
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

  int a_got[$], b_got[$];
  int a_beats, b_beats;
  int a_rgot[$], b_rgot[$];
  int a_rbeats, b_rbeats;

  always @(negedge clk) begin
    a_rd_ready <= ($urandom_range(0, 3) != 0);
    b_rd_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_rd_valid && a_rd_ready)
      for (int i = 0; i < int'(a_rd_nwords); i++) a_got.push_back(int'(a_rd_data[i*8 +: 8]));
    if (b_rd_valid && b_rd_ready && b_rd_nwords) b_got.push_back(int'(b_rd_data));
    if (a_ch_valid && a_ch_ready && dut_a.u_tx.state == 2'd3) a_beats++;
    if (b_ch_valid && b_ch_ready && dut_b.u_tx.state == 2'd3) b_beats++;
    if (a_rdat_valid && a_rdat_ready)
      for (int i = 0; i < int'(a_rdat_nwords); i++) a_rgot.push_back(int'(a_rdat_data[i*8 +: 8]));
    if (b_rdat_valid && b_rdat_ready)
      for (int i = 0; i < int'(b_rdat_nwords); i++) b_rgot.push_back(int'(b_rdat_data[i*16 +: 16]));
    if (a_sch_valid && a_sch_ready) a_rbeats++;
    if (b_sch_valid && b_sch_ready) b_rbeats++;
  end

  // Generates 'len' words of WW bits, smooth or random.
  function automatic void gen(int len, int ww, bit smooth, ref int d[$]);
    int v, maxv;
    maxv = (1 << ww) - 1;
    d.delete();
    v = $urandom_range(0, maxv);
    for (int i = 0; i < len; i++) begin
      if (smooth) v = v + $urandom_range(0, 6) - 3;
      else v = $urandom_range(0, maxv);
      if (v < 0) v = 0;
      if (v > maxv) v = maxv;
      d.push_back(v);
    end
  endfunction

  function automatic int halves(int d[$], int ww, bit cmp);
    int n = 0;
    foreach (d[i]) n += (cmp && i > 0 && (d[i] >> (ww/2)) == (d[i-1] >> (ww/2))) ? 1 : 2;
    return n;
  endfunction

  initial begin
    int da[$], db[$];
    a_mc_req_valid = 0; a_mc_req_ctrl = '0; a_mc_req_addr = 0; a_mc_in_valid = 0; a_mc_in_data = 0;
    b_mc_req_valid = 0; b_mc_req_ctrl = '0; b_mc_req_addr = 0; b_mc_in_valid = 0; b_mc_in_data = 0;
    a_rq_valid = 0; a_rq_ctrl = '0; a_rq_addr = 0; a_rdat_ready = 1; a_sram_rdata = 0;
    b_rq_valid = 0; b_rq_ctrl = '0; b_rq_addr = 0; b_rdat_ready = 1; b_sram_rdata = 0;
    gen(16384, 8, 1'b1, da);
    gen(8192, 16, 1'b1, db);
    for (int g = 0; g < 4096; g++) begin
      a_sram[g] = {8'(da[4*g+3]), 8'(da[4*g+2]), 8'(da[4*g+1]), 8'(da[4*g])};
      b_sram[g] = {16'(db[2*g+1]), 16'(db[2*g])};
    end
    for (int g = 2048; g < 4096; g++) begin
      a_sram[g] = $urandom;
      b_sram[g] = $urandom;
    end
    a_req_valid = 0; a_in_valid = 0; a_in_data = 0; a_req_ctrl = '0; a_req_addr = 0;
    b_req_valid = 0; b_in_valid = 0; b_in_data = 0; b_req_ctrl = '0; b_req_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      int len;
      bit cmp, smooth;
      len    = $urandom_range(1, 256);
      cmp    = (it % 4 != 3);
      smooth = (it % 3 != 2);
      gen(len, 8, smooth, da);
      gen(len, 16, smooth, db);
      a_got.delete(); b_got.delete();
      a_beats = 0; b_beats = 0;
      fork
        begin : send_a
          int sent;
          @(negedge clk);
          a_req_ctrl = '0;
          a_req_ctrl.cmp_en = cmp;
          a_req_ctrl.len_m1 = 8'(len - 1);
          a_req_addr = $urandom;
          a_req_valid = 1;
          @(posedge clk);
          while (!a_req_ready) @(posedge clk);
          @(negedge clk);
          a_req_valid = 0;
          sent = 0;
          while (sent < len) begin
            a_in_valid = ($urandom_range(0, 3) != 0);
            for (int i = 0; i < 4; i++) a_in_data[i*8 +: 8] = (sent + i < len) ? 8'(da[sent + i]) : 8'($urandom);
            @(posedge clk);
            if (a_in_valid && a_in_ready) sent += 4;
            @(negedge clk);
          end
          a_in_valid = 0;
        end
        begin : send_b
          int sent;
          @(negedge clk);
          b_req_ctrl = '0;
          b_req_ctrl.cmp_en = cmp;
          b_req_ctrl.wide_word = 1'b1;
          b_req_ctrl.len_m1 = 8'(len - 1);
          b_req_addr = $urandom;
          b_req_valid = 1;
          @(posedge clk);
          while (!b_req_ready) @(posedge clk);
          @(negedge clk);
          b_req_valid = 0;
          sent = 0;
          while (sent < len) begin
            b_in_valid = ($urandom_range(0, 3) != 0);
            for (int i = 0; i < 2; i++) b_in_data[i*16 +: 16] = (sent + i < len) ? 16'(db[sent + i]) : 16'($urandom);
            @(posedge clk);
            if (b_in_valid && b_in_ready) sent += 2;
            @(negedge clk);
          end
          b_in_valid = 0;
        end
      join
      while (a_got.size() < len || b_got.size() < len || a_busy || b_busy) @(negedge clk);
      repeat (5) @(negedge clk);
      check(a_got.size() == len, $sformatf("32-bit bus: %0d bytes, expected %0d", a_got.size(), len));
      check(b_got.size() == len, $sformatf("two-byte words: %0d words, expected %0d", b_got.size(), len));
      if (a_got.size() == len) foreach (da[i]) check(a_got[i] == da[i], $sformatf("32-bit bus byte %0d", i));
      if (b_got.size() == len) foreach (db[i]) check(b_got[i] == db[i], $sformatf("two-byte word %0d", i));
      check(a_beats == (halves(da, 8, cmp) + 7) / 8,
            $sformatf("32-bit bus: %0d data beats, expected %0d", a_beats, (halves(da, 8, cmp) + 7) / 8));
      check(b_beats == (halves(db, 16, cmp) + 1) / 2,
            $sformatf("two-byte words: %0d data beats, expected %0d", b_beats, (halves(db, 16, cmp) + 1) / 2));
    end
    // read bursts, smooth (low half of the SRAM) and random (high half)
    for (int it = 0; it < 24; it++) begin
      int len, ga, gb;
      bit cmp;
      len = $urandom_range(1, 256);
      cmp = (it % 4 != 3);
      ga  = (it % 2) * 2048 + $urandom_range(0, 1900);
      gb  = (it % 2) * 2048 + $urandom_range(0, 1900);
      da.delete();
      db.delete();
      for (int i = 0; i < len; i++) begin
        da.push_back(int'(a_sram[ga + i / 4][(i % 4)*8 +: 8]));
        db.push_back(int'(b_sram[gb + i / 2][(i % 2)*16 +: 16]));
      end
      a_rgot.delete(); b_rgot.delete();
      a_rbeats = 0; b_rbeats = 0;
      @(negedge clk);
      a_rq_ctrl = '0;
      a_rq_ctrl.cmp_en = cmp;
      a_rq_ctrl.len_m1 = 8'(len - 1);
      a_rq_addr = 32'(ga * 4);
      b_rq_ctrl = a_rq_ctrl;
      b_rq_ctrl.wide_word = 1'b1;
      b_rq_addr = 32'(gb * 4);
      a_rq_valid = 1;
      b_rq_valid = 1;
      @(posedge clk);
      while (a_rq_valid || b_rq_valid) begin
        if (a_rq_ready) a_rq_valid <= 0;
        if (b_rq_ready) b_rq_valid <= 0;
        @(posedge clk);
      end
      while (a_rgot.size() < len || b_rgot.size() < len) @(negedge clk);
      repeat (5) @(negedge clk);
      check(a_rgot.size() == len && b_rgot.size() == len, $sformatf("read %0d: word counts", it));
      if (a_rgot.size() == len) foreach (da[i]) check(a_rgot[i] == da[i], $sformatf("32-bit bus read byte %0d", i));
      if (b_rgot.size() == len) foreach (db[i]) check(b_rgot[i] == db[i], $sformatf("two-byte word read %0d", i));
      check(a_rbeats == (halves(da, 8, cmp) + 7) / 8,
            $sformatf("32-bit bus read: %0d beats, expected %0d", a_rbeats, (halves(da, 8, cmp) + 7) / 8));
      check(b_rbeats == (halves(db, 16, cmp) + 1) / 2,
            $sformatf("two-byte word read: %0d beats, expected %0d", b_rbeats, (halves(db, 16, cmp) + 1) / 2));
    end
    // MC writes into each SRAM
    for (int it = 0; it < 12; it++) begin
      int len, ga, gb;
      bit cmp;
      len = $urandom_range(1, 256);
      cmp = (it % 4 != 1);
      ga  = $urandom_range(0, 4000);
      gb  = $urandom_range(0, 3900);
      gen(len, 8, it[0], da);
      gen(len, 16, it[0], db);
      fork
        begin : mc_a
          int sent;
          @(negedge clk);
          a_mc_req_ctrl = '0;
          a_mc_req_ctrl.cmp_en = cmp;
          a_mc_req_ctrl.len_m1 = 8'(len - 1);
          a_mc_req_addr = 32'(ga * 4);
          a_mc_req_valid = 1;
          @(posedge clk);
          while (!a_mc_req_ready) @(posedge clk);
          @(negedge clk);
          a_mc_req_valid = 0;
          sent = 0;
          while (sent < len) begin
            a_mc_in_valid = ($urandom_range(0, 3) != 0);
            for (int i = 0; i < 4; i++) a_mc_in_data[i*8 +: 8] = (sent + i < len) ? 8'(da[sent + i]) : 8'($urandom);
            @(posedge clk);
            if (a_mc_in_valid && a_mc_in_ready) sent += 4;
            @(negedge clk);
          end
          a_mc_in_valid = 0;
        end
        begin : mc_b
          int sent;
          @(negedge clk);
          b_mc_req_ctrl = '0;
          b_mc_req_ctrl.cmp_en = cmp;
          b_mc_req_ctrl.wide_word = 1'b1;
          b_mc_req_ctrl.len_m1 = 8'(len - 1);
          b_mc_req_addr = 32'(gb * 4);
          b_mc_req_valid = 1;
          @(posedge clk);
          while (!b_mc_req_ready) @(posedge clk);
          @(negedge clk);
          b_mc_req_valid = 0;
          sent = 0;
          while (sent < len) begin
            b_mc_in_valid = ($urandom_range(0, 3) != 0);
            for (int i = 0; i < 2; i++) b_mc_in_data[i*16 +: 16] = (sent + i < len) ? 16'(db[sent + i]) : 16'($urandom);
            @(posedge clk);
            if (b_mc_in_valid && b_mc_in_ready) sent += 2;
            @(negedge clk);
          end
          b_mc_in_valid = 0;
        end
      join
      while (!a_mc_req_ready || !b_mc_req_ready || dut_a.u_sram_wr.busy || dut_b.u_sram_wr.busy) @(negedge clk);
      repeat (2) @(negedge clk);
      for (int i = 0; i < len; i++) begin
        check(a_sram[ga + i / 4][(i % 4)*8 +: 8] == 8'(da[i]), $sformatf("32-bit bus SRAM write %0d byte %0d", it, i));
        check(b_sram[gb + i / 2][(i % 2)*16 +: 16] == 16'(db[i]), $sformatf("two-byte word SRAM write %0d word %0d", it, i));
      end
    end
    check(!a_err && !b_err, "receiver error flag");
    check($bits(a_ch_phase) == 6 && pi_width(8) == 6 && pi_width(2) == 2, "PI widths");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
