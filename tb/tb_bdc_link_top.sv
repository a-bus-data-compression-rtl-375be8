// tb_bdc_link_top: end-to-end test of the compressed link at its default
// parameters.  A sending core model transfers macroblock-sized results (384
// bytes of 4:2:0 video, in bursts of at most 256 bytes) of smooth, textured
// and random content, each with compression on and then off; a memory-side
// model drains the block buffer with random back-pressure in part of the run.
// Every byte read from the block buffer is compared with what was sent, along
// with burst headers and last flags.  For each data set the data cycles on the
// channel are counted with and without compression: uncompressed must be
// ceil(len/2) beats per burst, compressed must match the reference encoder and
// never exceed it.  With the memory side always ready, a burst must take
// exactly 3 + (data beats) cycles: compression adds no cycle.  The mechanisms of the design are counted and each must
// occur: half-word beats, all-half beats, bytes split over two beats, padded
// last beats, uncompressed bursts, prefill of the register during the control
// and address phases, channel stalls, a full block buffer and short last
// groups.  Read bursts then go the other way: the core's read request travels
// as a header on a second master channel, the SRAM controller reads a memory
// model through its SRAM port and returns the data compressed as data-only
// beats on the slave channel.  Every byte delivered to the core is compared
// with the memory, the slave-channel beats with the reference encoder, and a
// read runs alongside a write once; read bursts, read data stalls on the slave
// channel and compressed read beats are counted as mechanisms too.  Last, the
// motion-compensation side writes compressed bursts into the SRAM; the SRAM
// must then hold exactly the bytes sent (partial last groups masked), they are
// read back through the loop filter's read path, and a write running against
// a read must wait for the shared SRAM port at least once.
module tb_bdc_link_top;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready;
  ctrl_word_t  req_ctrl;
  logic [31:0] req_addr;
  logic        in_valid, in_ready;
  logic [31:0] in_data;
  logic        hdr_valid;
  ctrl_word_t  hdr_ctrl;
  logic [31:0] hdr_addr;
  logic        sd_valid, sd_ready;
  logic [15:0] sd_data;
  logic [1:0]  sd_nwords;
  logic        sd_last;
  logic        mch_valid, mch_ready;
  logic [15:0] mch_channel;
  logic [2:0]  mch_phase;
  logic        rq_valid, rq_ready;
  ctrl_word_t  rq_ctrl;
  logic [31:0] rq_addr;
  logic        rdat_valid, rdat_ready;
  logic [31:0] rdat_data;
  logic [2:0]  rdat_nwords;
  logic        rdat_last;
  logic        sram_re, sram_we;
  logic [11:0] sram_addr;
  logic [31:0] sram_wdata;
  logic [3:0]  sram_wmask;
  logic        mc_req_valid, mc_req_ready, mc_in_valid, mc_in_ready;
  ctrl_word_t  mc_req_ctrl;
  logic [31:0] mc_req_addr, mc_in_data;
  int n_mc_write, n_sram_wait;
  logic [31:0] sram_rdata;
  logic        sch_valid, sch_ready;
  logic [15:0] sch_channel;
  logic [2:0]  sch_phase;
  logic        tx_busy, err;
  logic [31:0] sram [4096];
  byte unsigned got_r[$];
  int rdat_lasts, sch_beats;
  bit rdat_slow;
  int n_read, n_read_cmp, n_sch_stall;

  int checks = 0, failures = 0;
  int sd_mode;                 // 0 always ready, 1 random, 2 slow, 3 held
  byte unsigned got[$];
  int sd_lasts, hdrs;
  int data_cycles;             // data beats on the channel
  int busy_cycles;             // cycles the transmitter spends on a burst
  ctrl_word_t hdr_seen;
  logic [31:0] addr_seen;
  // mechanism counters
  int n_half_beats, n_all_half, n_split, n_padded, n_uncomp, n_prefill,
      n_stall, n_buf_full, n_short_group;

  bdc_link_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
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

  always @(negedge clk)
    sd_ready <= (sd_mode == 3) ? 1'b0 : (sd_mode == 0) ? 1'b1 :
                (sd_mode == 1) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 7) == 0);

  // SRAM macro: data the cycle after the read
  always @(posedge clk) begin
    if (sram_re) sram_rdata <= sram[sram_addr];
    if (sram_we)
      for (int i = 0; i < 4; i++) if (sram_wmask[i]) sram[sram_addr][i*8 +: 8] <= sram_wdata[i*8 +: 8];
    if (rst_n && sram_re && sram_we) begin
      failures++;
      $display("mismatch: SRAM read and write in one cycle");
    end
    if (rst_n && dut.w_valid && sram_re) n_sram_wait++;
  end

  always @(negedge clk) rdat_ready <= rdat_slow ? ($urandom_range(0, 3) == 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (rdat_valid && rdat_ready) begin
      for (int i = 0; i < int'(rdat_nwords); i++) got_r.push_back(rdat_data[i*8 +: 8]);
      if (rdat_last) rdat_lasts++;
    end
    if (sch_valid && sch_ready) begin
      sch_beats++;
      if (dut.u_sram_tx.ctrl.cmp_en && dut.u_sram_tx.al_nhalf != 0) n_read_cmp++;
    end
    if (sch_valid && !sch_ready) n_sch_stall++;
    if (sd_valid && sd_ready) begin
      for (int i = 0; i < int'(sd_nwords); i++) got.push_back(sd_data[i*8 +: 8]);
      if (sd_last) sd_lasts++;
    end
    if (hdr_valid) begin
      hdrs++;
      hdr_seen  <= hdr_ctrl;
      addr_seen <= hdr_addr;
    end
    if (mch_valid && mch_ready && dut.u_tx.state == 2'd3) begin
      data_cycles++;
      if (dut.u_tx.al_nhalf != 0) n_half_beats++;
      if (dut.u_tx.al_nhalf == 3'd4) n_all_half++;
      if (dut.u_tx.al_split) n_split++;
      if (dut.u_tx.al_padded) n_padded++;
    end
    if (tx_busy) busy_cycles++;
    if (mch_valid && !mch_ready) n_stall++;
    if (dut.u_tx.in_fire && (dut.u_tx.state == 2'd1 || dut.u_tx.state == 2'd2)) n_prefill++;
    if (dut.rx_valid && !dut.rx_ready) n_buf_full++;
    if (dut.rx_valid && dut.rx_ready && dut.rx_n != 3'd4) n_short_group++;
  end

  // Hands one burst to the transmitter; returns when the transmitter is done.
  task automatic send_only(byte unsigned d[$], bit cmp, output ctrl_word_t c, output logic [31:0] a);
    int sent, len;
    len = d.size();
    c = '0;
    c.cmp_en  = cmp;
    c.burst   = 2'd1;
    c.len_m1  = 8'(len - 1);
    a = $urandom & 32'hffff_fffc;
    @(negedge clk);
    req_ctrl  = c;
    req_addr  = a;
    req_valid = 1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    sent = 0;
    while (sent < len) begin
      in_valid = 1;
      for (int i = 0; i < 4; i++) in_data[i*8 +: 8] = (sent + i < len) ? d[sent + i] : 8'($urandom);
      @(posedge clk);
      if (in_ready) sent += 4;
      @(negedge clk);
    end
    in_valid = 0;
    while (tx_busy) @(negedge clk);
  endtask

  // Sends one burst and waits until it has been read out of the block buffer.
  task automatic burst(byte unsigned d[$], bit cmp, output int cycles);
    ctrl_word_t  c;
    logic [31:0] a;
    int          len;
    len = d.size();
    got.delete();
    sd_lasts = 0;
    hdrs = 0;
    data_cycles = 0;
    busy_cycles = 0;
    send_only(d, cmp, c, a);
    while (got.size() < len) @(negedge clk);
    repeat (5) @(negedge clk);
    cycles = data_cycles;
    if (sd_mode == 0)
      check(busy_cycles == 3 + data_cycles,
            $sformatf("burst took %0d cycles, expected %0d (no added latency)", busy_cycles, 3 + data_cycles));
    check(hdrs == 1 && hdr_seen == c && addr_seen == a, "burst header");
    check(got.size() == len, $sformatf("%0d bytes read, %0d sent", got.size(), len));
    check(sd_lasts == 1, $sformatf("%0d last flags", sd_lasts));
    if (got.size() == len)
      foreach (d[i]) check(got[i] == d[i], $sformatf("byte %0d: %h expected %h", i, got[i], d[i]));
  endtask

  // Reads len bytes from SRAM group g0 into the core; returns the number of
  // data beats on the slave channel.
  task automatic read_burst(int g0, int len, bit cmp, output int beats_out);
    ctrl_word_t c;
    beat_t      beats[$];
    byte unsigned d[$];
    for (int i = 0; i < len; i++) d.push_back(sram[g0 + i / 4][(i % 4)*8 +: 8]);
    ref_encode(d, cmp, beats);
    got_r.delete();
    rdat_lasts = 0;
    sch_beats  = 0;
    c = '0;
    c.cmp_en = cmp;
    c.burst  = 2'd1;
    c.len_m1 = 8'(len - 1);
    @(negedge clk);
    rq_ctrl  = c;
    rq_addr  = 32'(g0 * 4);
    rq_valid = 1;
    @(posedge clk);
    while (!rq_ready) @(posedge clk);
    @(negedge clk);
    rq_valid = 0;
    n_read++;
    while (got_r.size() < len) @(negedge clk);
    repeat (5) @(negedge clk);
    beats_out = sch_beats;
    check(got_r.size() == len, $sformatf("read: %0d bytes delivered, %0d asked", got_r.size(), len));
    check(rdat_lasts == 1, $sformatf("read: %0d last flags", rdat_lasts));
    check(sch_beats == beats.size(), $sformatf("read: %0d slave-channel beats, expected %0d", sch_beats, beats.size()));
    if (got_r.size() == len)
      foreach (d[i]) check(got_r[i] == d[i], $sformatf("read byte %0d: %h expected %h", i, got_r[i], d[i]));
  endtask

  // The MC core writes d into the SRAM from group g0; returns when the last
  // group is in the SRAM.
  task automatic mc_write(int g0, byte unsigned d[$], bit cmp);
    int sent, len;
    len = d.size();
    @(negedge clk);
    mc_req_ctrl        = '0;
    mc_req_ctrl.cmp_en = cmp;
    mc_req_ctrl.burst  = 2'd1;
    mc_req_ctrl.len_m1 = 8'(len - 1);
    mc_req_addr        = 32'(g0 * 4);
    mc_req_valid       = 1;
    @(posedge clk);
    while (!mc_req_ready) @(posedge clk);
    @(negedge clk);
    mc_req_valid = 0;
    n_mc_write++;
    sent = 0;
    while (sent < len) begin
      mc_in_valid = 1;
      for (int i = 0; i < 4; i++) mc_in_data[i*8 +: 8] = (sent + i < len) ? d[sent + i] : 8'($urandom);
      @(posedge clk);
      if (mc_in_ready) sent += 4;
      @(negedge clk);
    end
    mc_in_valid = 0;
    while (!mc_req_ready || dut.u_sram_wr.busy) @(negedge clk);
  endtask

  localparam int    ROUGHS[3] = '{2, 15, 100};
  localparam string NAMES[3]  = '{"smooth", "textured", "random"};

  initial begin
    byte unsigned mb[$], part[$];
    beat_t        beats[$];
    req_valid = 0; in_valid = 0; in_data = 0; req_ctrl = '0; req_addr = 0;
    mc_req_valid = 0; mc_req_ctrl = '0; mc_req_addr = 0; mc_in_valid = 0; mc_in_data = 0;
    {n_mc_write, n_sram_wait} = '0;
    rq_valid = 0; rq_ctrl = '0; rq_addr = 0; rdat_slow = 0; sram_rdata = 0;
    {n_read, n_read_cmp, n_sch_stall} = '0;
    // SRAM contents: smooth, textured and random regions of 1024 groups
    for (int r = 0; r < 4; r++) begin
      gen_image(4096, ROUGHS[r % 3], mb);
      for (int g = 0; g < 1024; g++)
        sram[r*1024 + g] = {mb[4*g+3], mb[4*g+2], mb[4*g+1], mb[4*g]};
    end
    sd_mode = 0;
    {n_half_beats, n_all_half, n_split, n_padded, n_uncomp, n_prefill,
     n_stall, n_buf_full, n_short_group} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 3; set++) begin
      int tot_on, tot_off;
      tot_on  = 0;
      tot_off = 0;
      for (int mbn = 0; mbn < 4; mbn++) begin
        sd_mode = (mbn == 1) ? 1 : (mbn == 2) ? 2 : 0;
        gen_image(384, ROUGHS[set], mb);
        for (int off = 0; off < 384; off += 256) begin
          int len, cyc_on, cyc_off;
          len = (384 - off > 256) ? 256 : 384 - off;
          part.delete();
          for (int i = 0; i < len; i++) part.push_back(mb[off + i]);
          ref_encode(part, 1'b1, beats);
          burst(part, 1'b1, cyc_on);
          burst(part, 1'b0, cyc_off);
          n_uncomp++;
          check(cyc_off == (len + 1) / 2, $sformatf("uncompressed %0d beats, expected %0d", cyc_off, (len + 1) / 2));
          check(cyc_on == beats.size(), $sformatf("compressed %0d beats, expected %0d", cyc_on, beats.size()));
          check(cyc_on <= cyc_off, "compression made the burst longer");
          tot_on  += cyc_on;
          tot_off += cyc_off;
        end
      end
      $display("%s content: %0d data cycles compressed, %0d uncompressed (%0d%% fewer)",
               NAMES[set], tot_on, tot_off, 100 * (tot_off - tot_on) / tot_off);
    end
    // a burst of identical upper nibbles and a one-byte burst
    mb.delete();
    for (int i = 0; i < 61; i++) mb.push_back(8'h70 | 8'(i % 16));
    begin
      int cyc;
      burst(mb, 1'b1, cyc);
      check(cyc == 16, $sformatf("61 bytes, one upper nibble: %0d beats, expected 16", cyc));
      mb.delete();
      mb.push_back(8'hA5);
      burst(mb, 1'b1, cyc);
      check(cyc == 1, "one-byte burst");
    end
    // two full bursts with the memory side held: the block buffer fills
    begin
      byte unsigned d2[$];
      ctrl_word_t c1, c2;
      logic [31:0] a1, a2;
      gen_image(256, 5, mb);
      gen_image(256, 5, d2);
      got.delete();
      sd_mode = 3;
      send_only(mb, 1'b1, c1, a1);
      fork
        send_only(d2, 1'b1, c2, a2);
      join_none
      repeat (300) @(negedge clk);
      sd_mode = 0;
      wait fork;
      while (got.size() < 512) @(negedge clk);
      repeat (5) @(negedge clk);
      check(got.size() == 512, $sformatf("%0d bytes after the full buffer, expected 512", got.size()));
      if (got.size() == 512)
        for (int i = 0; i < 256; i++) begin
          check(got[i] == mb[i], $sformatf("first burst byte %0d", i));
          check(got[256 + i] == d2[i], $sformatf("second burst byte %0d", i));
        end
    end
    // read bursts from each SRAM region, compressed and not
    for (int set = 0; set < 3; set++) begin
      int tot_on, tot_off;
      tot_on  = 0;
      tot_off = 0;
      for (int k = 0; k < 6; k++) begin
        int g0, len, b_on, b_off;
        rdat_slow = (k == 2);
        len = (k % 3 == 0) ? 256 : $urandom_range(1, 256);
        g0  = set * 1024 + $urandom_range(0, 1023 - 64);
        read_burst(g0, len, 1'b1, b_on);
        read_burst(g0, len, 1'b0, b_off);
        check(b_off == (len + 1) / 2, $sformatf("uncompressed read: %0d beats, expected %0d", b_off, (len + 1) / 2));
        tot_on  += b_on;
        tot_off += b_off;
      end
      rdat_slow = 0;
      $display("%s read data: %0d slave-channel beats compressed, %0d uncompressed (%0d%% fewer)",
               NAMES[set], tot_on, tot_off, 100 * (tot_off - tot_on) / tot_off);
    end
    // a read alongside a write
    begin
      int b;
      gen_image(200, 4, mb);
      got.delete();
      sd_mode = 0;
      fork
        begin
          ctrl_word_t c;
          logic [31:0] a;
          send_only(mb, 1'b1, c, a);
        end
        read_burst(300, 180, 1'b1, b);
      join
      while (got.size() < 200) @(negedge clk);
      repeat (5) @(negedge clk);
      check(got.size() == 200, "write alongside a read: byte count");
      if (got.size() == 200)
        foreach (mb[i]) check(got[i] == mb[i], $sformatf("write alongside a read: byte %0d", i));
    end
    // MC writes into the SRAM, checked in place and read back by the LF
    for (int k = 0; k < 8; k++) begin
      int g0, len, b;
      logic [31:0] old_last, old_next;
      len = (k % 4 == 0) ? 256 : $urandom_range(1, 256);
      g0  = 3072 + k * 64;
      gen_image(len, ROUGHS[k % 3], mb);
      old_last = sram[g0 + (len - 1) / 4];
      old_next = sram[g0 + 64];
      mc_write(g0, mb, k != 5);
      for (int i = 0; i < len; i++)
        check(sram[g0 + i / 4][(i % 4)*8 +: 8] == mb[i], $sformatf("SRAM write %0d byte %0d", k, i));
      for (int i = len % 4; i < 4 && len % 4 != 0; i++)
        check(sram[g0 + (len - 1) / 4][i*8 +: 8] == old_last[i*8 +: 8], $sformatf("SRAM write %0d: byte beyond the burst changed", k));
      check(sram[g0 + 64] == old_next, $sformatf("SRAM write %0d: word after the burst changed", k));
      read_burst(g0, len, 1'b1, b);
    end
    // an MC write while the LF reads: they share the SRAM port
    begin
      int b;
      byte unsigned rd_ref[$];
      gen_image(256, 4, mb);
      for (int i = 0; i < 256; i++) rd_ref.push_back(sram[100 + i / 4][(i % 4)*8 +: 8]);
      fork
        mc_write(3800, mb, 1'b1);
        read_burst(100, 256, 1'b0, b);
      join
      for (int i = 0; i < 256; i++)
        check(sram[3800 + i / 4][(i % 4)*8 +: 8] == mb[i], $sformatf("SRAM write against a read, byte %0d", i));
    end
    check(!err, "receiver error flag");
    $display("mechanisms: half-word beats %0d, all-half beats %0d, split bytes %0d, padded beats %0d, uncompressed bursts %0d, prefill cycles %0d, channel stalls %0d, buffer full %0d, short groups %0d, read bursts %0d, compressed read beats %0d, read data stalls %0d, MC writes %0d, SRAM port waits %0d",
             n_half_beats, n_all_half, n_split, n_padded, n_uncomp, n_prefill, n_stall, n_buf_full, n_short_group, n_read, n_read_cmp, n_sch_stall, n_mc_write, n_sram_wait);
    check(n_half_beats > 0, "no half-word beat");
    check(n_all_half > 0, "no all-half beat");
    check(n_split > 0, "no split byte");
    check(n_padded > 0, "no padded beat");
    check(n_uncomp > 0, "no uncompressed burst");
    check(n_prefill > 0, "no prefill during control/address phases");
    check(n_stall > 0, "no channel stall");
    check(n_buf_full > 0, "block buffer never full");
    check(n_short_group > 0, "no short group");
    check(n_read > 0, "no read burst");
    check(n_read_cmp > 0, "no compressed read beat");
    check(n_sch_stall > 0, "no stall on the slave channel");
    check(n_mc_write > 0, "no write into the SRAM");
    check(n_sram_wait > 0, "no write waited for the SRAM port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
